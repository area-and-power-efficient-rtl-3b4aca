// Shared types and constants of the sparse-aware pointwise convolution unit.
//
// Activations and weights are IEEE-754 single precision (FP32) numbers, as in
// the reference design. One activation word holds 32 activations taken along
// the channel direction (32-channel unrolling); its mask holds one bit per
// channel, set where the kernel weight is non-zero. Each engine has 16
// multiplier lanes, half the channels of a word: a word whose mask has at most
// 16 set bits takes one cycle, a denser word takes two (Variable Density
// Bound Block selection). A weight word carries the 16 non-zero weights one
// engine cycle consumes, packed from lane 0 upward.
package pwc_pkg;

  localparam int unsigned FP_W        = 32;  // FP32 data
  localparam int unsigned CH_PER_WORD = 32;  // channels per activation word
  localparam int unsigned LANES       = 16;  // multipliers per engine

  typedef logic [FP_W-1:0]        fp32_t;
  typedef fp32_t [CH_PER_WORD-1:0] act_word_t;   // element i = channel i of the word
  typedef logic [CH_PER_WORD-1:0]  mask_t;       // bit i set: weight of channel i is non-zero
  typedef fp32_t [LANES-1:0]       lane_vec_t;   // one value per multiplier lane

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

endpackage
