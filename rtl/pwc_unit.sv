// Sparse-aware pointwise convolution unit (top level).
//
// Computes a 1x1 convolution, out(p, n) = sum over c of act(p, c) * w(n, c),
// in FP32 for pruned kernels. The feature map is split into NUM_ENGINES
// tiles, each in its own tiled activation buffer feeding its own engine; the
// engines run in lockstep on the same location index of their tiles, so one
// pass produces NUM_ENGINES outputs per kernel. The mask buffer and the
// weight buffer, which stores only non-zero weights, are shared: their words
// are broadcast to all engines. A controller keeps each location's
// activations stationary in the engines' activation registers while every
// kernel is applied, and spends one cycle on each 32-channel block with at
// most 16 non-zero weights and two on a denser one (Variable Density Bound
// Block selection onto 16 multipliers per engine).
//
// Loading: the buffers are filled through their write ports (act_wr_*,
// mask_wr_*, wt_wr_*) while the unit is idle; the layout of each buffer is
// given in its module. Running: pulse start with depth_words (C/32),
// num_kernels (N) and num_locs (pixels per tile) and hold them until done.
// Results: each cycle out_valid is high, otpt[e] is the output of engine e's
// tile at location res_loc for kernel res_kernel. rd_en and wt_rd show the
// activation and weight buffer reads, as in the reference design's traces.
module pwc_unit
  import pwc_pkg::*;
#(
  parameter int unsigned NUM_ENGINES     = 4,
  parameter int unsigned MAX_DEPTH_WORDS = 32,
  parameter int unsigned ACT_BUF_WORDS   = 3136,
  parameter int unsigned MASK_WORDS      = 32768,
  parameter int unsigned WT_WORDS        = 65536,
  parameter int unsigned MAX_KERNELS     = 1024
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // buffer loading
  input  logic [NUM_ENGINES-1:0]              act_wr_en,
  input  logic [$clog2(ACT_BUF_WORDS)-1:0]    act_wr_addr,
  input  act_word_t                           act_wr_data,
  input  logic                                mask_wr_en,
  input  logic [$clog2(MASK_WORDS)-1:0]       mask_wr_addr,
  input  mask_t                               mask_wr_data,
  input  logic                                wt_wr_en,
  input  logic [$clog2(WT_WORDS)-1:0]         wt_wr_addr,
  input  lane_vec_t                           wt_wr_data,
  // layer configuration and control
  input  logic                                start,
  input  logic [$clog2(MAX_DEPTH_WORDS):0]    depth_words,
  input  logic [$clog2(MAX_KERNELS):0]        num_kernels,
  input  logic [$clog2(ACT_BUF_WORDS):0]      num_locs,
  output logic                                busy,
  output logic                                done,
  // results
  output fp32_t [NUM_ENGINES-1:0]             otpt,
  output logic                                out_valid,
  output logic [$clog2(MAX_KERNELS)-1:0]      res_kernel,
  output logic [$clog2(ACT_BUF_WORDS)-1:0]    res_loc,
  // status
  output logic                                rd_en,
  output logic                                wt_rd,
  output logic                                dense_block
);

  localparam int unsigned DW = $clog2(MAX_DEPTH_WORDS);

  logic [$clog2(ACT_BUF_WORDS)-1:0] act_raddr;
  logic                             act_we;
  logic [DW-1:0]                    act_waddr;
  logic                             mask_rd;
  logic [$clog2(MASK_WORDS)-1:0]    mask_raddr;
  mask_t                            mask_rdata;
  logic [$clog2(WT_WORDS)-1:0]      wt_raddr;
  lane_vec_t                        wt_rdata;
  logic                             cmp_valid, cmp_phase, cmp_first, cmp_last;
  logic [DW-1:0]                    cmp_word;
  logic [NUM_ENGINES-1:0]           eng_valid;

  pwc_controller #(
    .MAX_DEPTH_WORDS(MAX_DEPTH_WORDS),
    .ACT_BUF_WORDS  (ACT_BUF_WORDS),
    .MASK_WORDS     (MASK_WORDS),
    .WT_WORDS       (WT_WORDS),
    .MAX_KERNELS    (MAX_KERNELS)
  ) u_ctrl (
    .clk, .rst_n, .start, .depth_words, .num_kernels, .num_locs, .busy, .done,
    .rd_en, .act_raddr, .act_we, .act_waddr,
    .mask_rd, .mask_raddr, .mask_rdata, .wt_rd, .wt_raddr,
    .cmp_valid, .cmp_word, .cmp_phase, .cmp_first, .cmp_last,
    .res_kernel, .res_loc, .dense_block
  );

  mask_buffer #(.WORDS(MASK_WORDS)) u_mask_buf (
    .clk, .wr_en(mask_wr_en), .wr_addr(mask_wr_addr), .wr_data(mask_wr_data),
    .rd_en(mask_rd), .rd_addr(mask_raddr), .rd_data(mask_rdata)
  );

  weight_buffer #(.WORDS(WT_WORDS)) u_wt_buf (
    .clk, .wr_en(wt_wr_en), .wr_addr(wt_wr_addr), .wr_data(wt_wr_data),
    .rd_en(wt_rd), .rd_addr(wt_raddr), .rd_data(wt_rdata)
  );

  for (genvar e = 0; e < NUM_ENGINES; e++) begin : g_engine
    act_word_t act_rdata;

    act_buffer #(.WORDS(ACT_BUF_WORDS)) u_act_buf (
      .clk, .wr_en(act_wr_en[e]), .wr_addr(act_wr_addr), .wr_data(act_wr_data),
      .rd_en, .rd_addr(act_raddr), .rd_data(act_rdata)
    );

    pwc_engine #(.MAX_DEPTH_WORDS(MAX_DEPTH_WORDS)) u_engine (
      .clk, .rst_n,
      .act_we, .act_waddr, .act_wdata(act_rdata),
      .cmp_valid, .cmp_word, .cmp_phase, .cmp_first, .cmp_last,
      .mask(mask_rdata), .wt(wt_rdata),
      .otpt(otpt[e]), .out_valid(eng_valid[e])
    );
  end

  // The engines run in lockstep, so their valid flags are equal.
  assign out_valid = eng_valid[0];

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    eng_valid == {NUM_ENGINES{eng_valid[0]}});

endmodule
