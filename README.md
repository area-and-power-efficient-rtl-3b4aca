# Sparse-aware pointwise convolution unit (VDBB, FP32)

Pointwise (1x1) convolution makes up most of the parameters of MobileNet-style
networks. It is also the part that pruning methods thin out. For an activation
map of H x W x C and N kernels of 1 x 1 x C, each output is a dot product over
the channels:

    out(h, w, n) = sum over c of act(h, w, c) * kern(n, c)

This RTL computes such layers in FP32 and skips the work on pruned (zero)
weights. Two ideas make that cheap:

* **Variable Density Bound Block (VDBB) selection.** Channels are handled 32
  at a time, but an engine has only 16 multipliers. A 32-channel block with
  at most 16 non-zero weights (sparsity of 50% or more) runs in one cycle. A
  denser block runs in two. No non-zero weight is ever dropped, whatever the
  sparsity, so the hardware needs half the multipliers of a dense design.
* **Activation stationarity.** The activations of one pixel (all its
  channels) are read from the buffer once. They stay in the engine's
  activation register while every kernel is applied to them.

The architecture follows a published sparse-aware pointwise convolution unit
for MobileNet-v1: four engines, per-engine tiled activation buffers, a shared
mask buffer and a shared weight buffer that stores only non-zero weights. The
published description gives the block structure, the VDBB principle and the
cycle counts. Buffer layouts, sizes, handshakes, the adder tree and the
floating-point details are this implementation's own choices. Each is listed
under "Where this RTL departs or decides".

## Block structure

```
                 mask buffer ----------+---------------+---------------+----------- (broadcast)
                 weight buffer --------|-+-------------|-+-------------|-+--------- (broadcast)
                                       | |             | |             | |
 act buffer 0 -> [act_reg -> activation_selector -> 16 x fp32_mul -> adder tree -> (+) -> otpt[0]]  engine 0
 act buffer 1 -> [                         same                                         ] otpt[1]  engine 1
 act buffer 2 -> [                         same                                         ] otpt[2]  engine 2
 act buffer 3 -> [                         same                                         ] otpt[3]  engine 3
                                   pwc_controller sequences all of it
```

The feature map is split into four tiles, one per engine. All engines work
in lockstep on the same location index of their own tile. Each engine uses
the same mask and weight word in the same cycle, so one pass over the
kernels yields four outputs per kernel.

## Data layout

Everything the unit reads is prepared offline from the pruned layer and
written into the buffers through their write ports. Reading this section
first makes the rest easy.

**Activation buffer (one per engine).** Each word holds 32 FP32 activations:
channels 32w to 32w+31 of one pixel. This is 1024 bits, and element i is
channel 32w+i. A pixel with C channels takes D = C/32 consecutive words. Pixel
p of the tile is at addresses p*D to p*D+D-1.

**Mask buffer.** This holds one 32-bit mask per kernel and block. Bit i is 1
when the kernel's weight for channel 32w+i is non-zero. Kernel n, block w is
at address n*D+w. For example, the 8-channel kernel `8 5 3 0 0 0 2 0` has the
mask `1 1 1 0 0 0 1 0`.

**Weight buffer.** Each word holds 16 FP32 weights and feeds one engine
cycle. Weights are listed in channel order from lane 0, with unused lanes
zero. A block with at most 16 non-zero weights takes one word holding all of
them. A block with more takes two words: first the non-zero weights of
channels 0-15, then those of channels 16-31. The words follow kernel by
kernel and block by block, starting at address 0. That is exactly the order
the controller reads them.

## The activation selector (VDBB)

`activation_selector` receives the current activation word, its mask and the
phase. It counts the mask's set bits:

* **At most 16 set bits:** one cycle. The k-th set bit, counting from
  channel 0, gives the index of lane k.
* **More than 16:** two cycles. Phase 0 uses only channels 0-15 of the mask,
  and phase 1 only channels 16-31. Each half has at most 16 set bits, so it
  always fits, packed in the same way.

For each lane an index is computed first. A 32:1 multiplexer then picks that
activation, so there are 16 multiplexers per engine. Lanes without an index
carry +0.0. Their weight is also forced to zero, so they add nothing.

An 8-channel, 4-lane illustration, with the mask written from channel 7 down
to channel 0:

| mask (7..0) | set bits | cycles | lane 0, 1, 2, 3 |
|---|---|---|---|
| `0101 0010` | 1, 4, 6 | 1 | act1, act4, act6, 0 |
| `0111 0110` | 1, 2, 4, 5, 6 | 2 | phase 0: act1, act2, 0, 0 / phase 1: act4, act5, act6, 0 |

Because the weight word lists the non-zero weights in the same packed order,
lane k's activation and weight always belong to the same channel.

## Timing

The buffers have a one-cycle registered read. For each location the
controller does two things in turn:

1. **Load:** `rd_en` is high for D cycles, reading the location's words from
   all four activation buffers. Each word lands in the activation registers
   one cycle later.
2. **Compute:** for kernel n = 0..N-1 and block w = 0..D-1, it reads mask
   n*D+w and the next weight word. The read for the next block is issued in
   the same cycle as the current block is computed. Blocks therefore follow
   one another with no gaps. A dense block gets a second cycle, in which only
   the next weight word is read and the mask output is held.

Selection, the 16 multiplications, the adder tree and the accumulation
happen within the compute cycle. For a kernel of D blocks, of which X are
dense, `out_valid` pulses D + X cycles after the previous one. At 64
channels, two sparse blocks take 2 cycles, one sparse and one dense block
take 3, and two dense blocks take 4.

The whole run, from the cycle that accepts `start` to `done`, takes

    1 + L * (D + 1 + sum over kernels and blocks of (1 or 2)) cycles

where L is the number of locations per tile. Activations are read L*D times
in all, never once per kernel.

How often the second cycle is needed depends on how the pruning falls. When
each weight is pruned at random with probability 50%, a block's non-zero count
is binomial around 16, and roughly 40-45% of blocks need two cycles. That is
about 1.4 cycles per block. At 75% pruning practically every block fits in
one cycle. So 16 multipliers per engine do the work of 32 for well-pruned
layers, and of about 23 at 50% pruning.

The single-cycle datapath (16 multipliers, four levels of FP32 adders and the
accumulator in one cycle) matches the published cycle counts. It is a long
combinational path; pipelining it would add latency but not change the
throughput.

## Arithmetic

`fp32_mul` and `fp32_add` are IEEE-754 single precision with
round-to-nearest-even. Subnormal inputs are read as zero, and results below
the normal range are flushed to zero. Infinities and NaNs propagate, with
every NaN result given as the quiet NaN `7FC00000`. The 16 products are
summed by a balanced tree: lanes (0+1), (2+3), ... then pairs of those.
Results therefore match a sequential sum only up to FP32 rounding.

## Top-level interface (`pwc_unit`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `act_wr_en[NUM_ENGINES]`, `act_wr_addr`, `act_wr_data` | in | write one word of the selected tile buffers |
| `mask_wr_en`, `mask_wr_addr`, `mask_wr_data` | in | write one mask |
| `wt_wr_en`, `wt_wr_addr`, `wt_wr_data` | in | write one weight word |
| `start` | in | one-cycle pulse while idle |
| `depth_words` | in | D = C/32, from 1 to MAX_DEPTH_WORDS |
| `num_kernels` | in | N, from 1 to MAX_KERNELS |
| `num_locs` | in | pixels per tile |
| `busy`, `done` | out | running; one-cycle pulse at the end |
| `otpt[NUM_ENGINES]` | out | FP32 result of each engine |
| `out_valid` | out | `otpt` holds a finished dot product |
| `res_kernel`, `res_loc` | out | kernel and location of that result |
| `rd_en`, `wt_rd` | out | activation and weight buffer reads |
| `dense_block` | out | the block being computed takes two cycles |

Hold the configuration inputs stable from `start` to `done`. Write the
buffers only while the unit is idle. Results come in order: location 0
kernels 0..N-1, then location 1, and so on. Nothing stalls the output, so
capture every `out_valid` cycle.

## Parameters and sizes

| parameter | default | basis |
|---|---|---|
| `NUM_ENGINES` | 4 | published design |
| 32 channels per word, 16 lanes (`pwc_pkg`) | 32, 16 | published design |
| `MAX_DEPTH_WORDS` | 32 | 1024 channels, the deepest MobileNet-v1 layer |
| `ACT_BUF_WORDS` | 3136 | a quarter of 112x112x32 |
| `MASK_WORDS` | 32768 | 1024 kernels x 1024 channels / 32 |
| `WT_WORDS` | 65536 | a dense 1024x1024 layer, 16 per word |
| `MAX_KERNELS` | 1024 | MobileNet-v1 |

At these sizes every MobileNet-v1 pointwise layer fits, with its spatial
extent split over four tiles:

| input | kernels | activation words per tile | masks | weight words (no sparsity) |
|---|---|---|---|---|
| 112x112x32 | 32 | 3136 | 32 | 64 |
| 56x56x32 | 64 | 784 | 64 | 128 |
| 56x56x64 | 128 | 1568 | 256 | 512 |
| 28x28x128 | 128 | 784 | 512 | 1024 |
| 28x28x128 | 256 | 784 | 1024 | 2048 |
| 14x14x256 | 256 | 392 | 2048 | 4096 |
| 14x14x256 | 512 | 392 | 4096 | 8192 |
| 14x14x512 | 512 | 784 | 8192 | 16384 |
| 7x7x512 | 1024 | 208 | 16384 | 32768 |
| 7x7x1024 | 1024 | 416 | 32768 | 65536 |

The weight buffer needs fewer words as sparsity grows. The worst case is a
word per block when every block has at most 16 non-zero weights, and two
words per block when none is sparse.

## Where this RTL departs or decides

* **Lane order in two-cycle mode.** The published selector figure keeps each
  selected activation at its own position within the half. Here they are
  packed from lane 0, as in one-cycle mode. The weight word then lines up
  with the lanes without a second selector on the weight side.
* **Exactly 16 non-zero weights** count as one cycle. The published text
  gives one cycle above 50% sparsity and two below, and nothing in between.
* **Load, then compute.** The published waveforms show the weight reads
  starting while activations are still being read. Here the D load cycles
  come first, costing D+1 cycles per location, shared by all N kernels.
* **Buffer layouts, sizes and the write-port loading** are this design's
  own. Only the 32-activation word and the "non-zero weights only" rule are
  given.
* **Adder tree, single-cycle datapath and FP32 details** (flush-to-zero,
  round-to-nearest-even, NaN handling) are this design's own. The published
  design states only FP32 precision and one cycle per block.
* **Not included:** producing masks and packed weights from a trained
  kernel. This is offline data preparation; `tb/tb_pwc_pkg.sv` models it.
  There is no output buffer either: results leave through `otpt` and
  `out_valid`. The dense (sparse-unaware) comparison design is not part of
  this RTL.

## Files

| file | contents |
|---|---|
| `rtl/pwc_pkg.sv` | FP32 type, word/mask/lane types, constants |
| `rtl/pwc_unit.sv` | top level |
| `rtl/pwc_controller.sv` | load/compute sequencing, read addresses, result tags |
| `rtl/pwc_engine.sv` | one engine |
| `rtl/act_reg.sv` | activation register |
| `rtl/activation_selector.sv` | VDBB selection |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv`, `rtl/fp32_add_tree.sv` | FP32 arithmetic |
| `rtl/act_buffer.sv`, `rtl/mask_buffer.sv`, `rtl/weight_buffer.sv` | memories |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fp_pkg.sv`, `tb/tb_pwc_pkg.sv` | reference arithmetic; model of mask and weight preparation |

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog.

* `tb_fp32_mul` and `tb_fp32_add` compare random operands bit for bit
  against a double-precision result rounded to FP32. They include exact
  ties, cancellation and the special values.
* `tb_activation_selector` tries every mask density from 0 to 32 in both
  phases.
* `tb_pwc_engine` and `tb_pwc_controller` check the datapath and the
  read/compute schedule, including exact cycle counts.
* `tb_pwc_unit` runs the whole unit at its default size. It runs a
  64-channel layer whose kernels must take 2, 3 and 4 cycles, a random
  96-channel layer with 6 kernels over 4 locations, and a 1024-channel layer.
  Every output of every engine is compared with an integer dot product; the
  test data are small integers, so FP32 results are exact.
* `tb_mobilenet_layers` runs the shapes of the MobileNet-v1 pointwise layers,
  with full depth and kernel count and a few locations per tile.

To simulate one testbench with Verilator, run this from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pwc_pkg.sv tb/tb_fp_pkg.sv tb/tb_pwc_pkg.sv tb/tb_pwc_unit.sv \
    --top-module tb_pwc_unit -o sim
./obj_dir/sim
```

Change the testbench name to run another one. The package files must come
first. Assertions check the lockstep of the engines and the phase rules of
the selector and controller.
