// Mask buffer: one 32-bit mask per kernel and 32-channel block.
//
// Bit i of a mask is set when the kernel's weight for channel i of the block
// is non-zero. Masks are stored kernel by kernel, block by block: kernel n,
// block w at address n*(C/32)+w. The same mask goes to every engine.
// Simple dual-port memory with a registered read port: rd_data is valid the
// cycle after rd_en and holds while rd_en is low, which lets the controller
// keep a mask for the second cycle of a dense block without re-reading it.
//
// The depth is this design's choice: 32768 masks cover the largest
// MobileNet-v1 pointwise layer (1024 kernels of 1024 channels).
module mask_buffer
  import pwc_pkg::*;
#(
  parameter int unsigned WORDS = 32768
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  mask_t                    wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output mask_t                    rd_data
);

  mask_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
