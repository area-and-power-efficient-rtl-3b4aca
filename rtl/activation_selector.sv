// Activation selector: Variable Density Bound Block (VDBB) selection of the
// activations that meet non-zero weights.
//
// One activation word holds 32 channels, but an engine has only 16
// multipliers. The selector counts the set bits of the word's mask. With at
// most 16 (sparsity of 50% or more) every activation whose weight is
// non-zero fits in one cycle: the k-th set mask bit, counting from channel 0,
// drives lane k. With more than 16 set bits the word takes two cycles: phase
// 0 serves the lower 16 channels and phase 1 the upper 16, each compacted in
// the same way. No non-zero weight is ever dropped.
//
// For each lane the selector first works out an index (the channel number)
// and then a 32:1 multiplexer picks that activation, as in the published
// selector. Lanes left without an index carry +0.0 and lane_valid is low for
// them. The lane order is this design's choice: lanes are packed from lane 0
// upward in both modes so that the weight word, which stores only non-zero
// weights, can be read in the same packed order.
//
// Interface (combinational): act word and mask in, phase selects the half in
// two-cycle mode; two_cycle tells the controller the word needs a second
// cycle; sel_act/lane_valid go to the multipliers; lane_count is the number
// of valid lanes.
module activation_selector
  import pwc_pkg::*;
(
  input  act_word_t          act,
  input  mask_t              mask,
  input  logic               phase,
  output logic               two_cycle,
  output lane_vec_t          sel_act,
  output logic [LANES-1:0]   lane_valid,
  output logic [$clog2(LANES):0] lane_count
);

  localparam int unsigned IDX_W = $clog2(CH_PER_WORD);

  logic [$clog2(CH_PER_WORD):0] nnz;
  mask_t                        eff_mask;
  logic [IDX_W-1:0]             idx [LANES];
  logic [$clog2(CH_PER_WORD):0] k;

  // Mask bits that take part in this cycle.
  always_comb begin
    nnz = '0;
    for (int i = 0; i < CH_PER_WORD; i++) nnz += ($clog2(CH_PER_WORD)+1)'(mask[i]);
    two_cycle = (nnz > ($clog2(CH_PER_WORD)+1)'(LANES));
    if (!two_cycle)
      eff_mask = mask;
    else if (!phase)
      eff_mask = {{(CH_PER_WORD-LANES){1'b0}}, mask[LANES-1:0]};
    else
      eff_mask = {mask[CH_PER_WORD-1:LANES], {LANES{1'b0}}};
  end

  // Index generation: the k-th set bit of eff_mask becomes the index of lane k.
  always_comb begin
    lane_valid = '0;
    k = '0;
    for (int l = 0; l < LANES; l++) idx[l] = '0;
    for (int i = 0; i < CH_PER_WORD; i++) begin
      if (eff_mask[i] && (k < ($clog2(CH_PER_WORD)+1)'(LANES))) begin
        idx[k[$clog2(LANES)-1:0]]        = IDX_W'(i);
        lane_valid[k[$clog2(LANES)-1:0]] = 1'b1;
        k = k + 1'b1;
      end
    end
    lane_count = k[$clog2(LANES):0];
  end

  // One 32:1 multiplexer per lane.
  always_comb begin
    for (int l = 0; l < LANES; l++)
      sel_act[l] = lane_valid[l] ? act[idx[l]] : FP_ZERO;
  end

endmodule
