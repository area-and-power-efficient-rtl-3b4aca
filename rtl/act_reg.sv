// Activation register ("Act Reg") of one engine.
//
// Holds every activation word of one spatial location: all channels of the
// pixel, 32 per word, up to MAX_DEPTH_WORDS words (1024 channels, the deepest
// MobileNet-v1 layer). The words are written once, one per cycle, as they
// come out of the engine's tiled activation buffer, and then stay put while
// every kernel is applied to them (activation stationary). The read side is
// combinational: the activation selector picks the word of the current
// 32-channel block.
//
// Timing: a word written at a clock edge can be read right after that edge.
// Contents are not cleared by reset, since each location is written before
// it is read.
module act_reg
  import pwc_pkg::*;
#(
  parameter int unsigned MAX_DEPTH_WORDS = 32
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [$clog2(MAX_DEPTH_WORDS)-1:0] waddr,
  input  act_word_t                          wdata,
  input  logic [$clog2(MAX_DEPTH_WORDS)-1:0] raddr,
  output act_word_t                          rdata
);

  act_word_t words [MAX_DEPTH_WORDS];

  always_ff @(posedge clk) begin
    if (we) words[waddr] <= wdata;
  end

  assign rdata = words[raddr];

endmodule
