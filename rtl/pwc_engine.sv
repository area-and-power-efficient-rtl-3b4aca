// Engine of the sparse-aware pointwise convolution unit.
//
// An engine computes dot products between the activations of one spatial
// location and one kernel at a time. It holds the location's activations in
// its activation register (act_reg), and each compute cycle the activation
// selector uses the broadcast 32-bit mask to route the activations that meet
// non-zero weights onto 16 FP32 multiplier lanes. The broadcast weight word
// carries the matching non-zero weights, packed from lane 0. The 16 products
// are summed by an adder tree and added to the output register, which acts
// as the accumulator (the adder with feedback from "Output" in the
// reference block diagram).
//
// Timing: a 32-channel block costs one cycle when its mask has at most 16 set
// bits and two cycles (phase 0 then 1) otherwise. Selection, multiplication,
// reduction and accumulation all happen in the compute cycle itself, as in
// the reference design where a block takes one clock cycle; the pipelining
// needed for a high clock rate is not described and not added. On the cycle
// with cmp_first the accumulator restarts from zero; on the cycle with
// cmp_last the sum is complete and otpt holds it from the next edge, with
// out_valid high for that one cycle. Reset (rst_n low, synchronous) clears
// otpt and out_valid.
//
// Interface: act_we/act_waddr/act_wdata load the activation register;
// cmp_* describe the compute cycle; mask and wt are the mask and weight
// buffer outputs, shared by all engines.
module pwc_engine
  import pwc_pkg::*;
#(
  parameter int unsigned MAX_DEPTH_WORDS = 32
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // activation register load
  input  logic                               act_we,
  input  logic [$clog2(MAX_DEPTH_WORDS)-1:0] act_waddr,
  input  act_word_t                          act_wdata,
  // compute cycle
  input  logic                               cmp_valid,
  input  logic [$clog2(MAX_DEPTH_WORDS)-1:0] cmp_word,
  input  logic                               cmp_phase,
  input  logic                               cmp_first,
  input  logic                               cmp_last,
  input  mask_t                              mask,
  input  lane_vec_t                          wt,
  // result
  output fp32_t                              otpt,
  output logic                               out_valid
);

  act_word_t          cur_word;
  logic               two_cycle;
  lane_vec_t          sel_act;
  logic [LANES-1:0]   lane_valid;
  logic [$clog2(LANES):0] lane_count;
  lane_vec_t          prod;
  fp32_t              psum, acc_in, acc_next;

  act_reg #(.MAX_DEPTH_WORDS(MAX_DEPTH_WORDS)) u_act_reg (
    .clk  (clk),
    .we   (act_we),
    .waddr(act_waddr),
    .wdata(act_wdata),
    .raddr(cmp_word),
    .rdata(cur_word)
  );

  activation_selector u_sel (
    .act       (cur_word),
    .mask      (mask),
    .phase     (cmp_phase),
    .two_cycle (two_cycle),
    .sel_act   (sel_act),
    .lane_valid(lane_valid),
    .lane_count(lane_count)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_mul
    fp32_mul u_mul (
      .a(sel_act[l]),
      .b(lane_valid[l] ? wt[l] : FP_ZERO),
      .p(prod[l])
    );
  end

  fp32_add_tree #(.N(LANES)) u_tree (
    .in (prod),
    .sum(psum)
  );

  assign acc_in = cmp_first ? FP_ZERO : otpt;

  fp32_add u_acc (
    .a(acc_in),
    .b(psum),
    .s(acc_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      otpt      <= FP_ZERO;
      out_valid <= 1'b0;
    end else begin
      out_valid <= cmp_valid && cmp_last;
      if (cmp_valid) otpt <= acc_next;
    end
  end

  // The second phase exists only for a block with more than 16 non-zero
  // weights, and a dense block must end in its second phase.
  a_phase1_dense : assert property (@(posedge clk) disable iff (!rst_n)
    cmp_valid && cmp_phase |-> two_cycle);
  a_lane_count : assert property (@(posedge clk) disable iff (!rst_n)
    cmp_valid |-> lane_count <= ($clog2(LANES)+1)'(LANES));

endmodule
