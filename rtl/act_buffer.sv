// Tiled activation buffer: the on-chip store of one engine's feature-map tile.
//
// The feature map is split into tiles, one per engine. Each word holds the
// 32 activations of one 32-channel block of one pixel, taken along the
// channel direction, so a pixel with C channels occupies C/32 consecutive
// words (pixel p, block w at address p*(C/32)+w). Simple dual-port memory:
// one write port for the loader and one registered read port. rd_data is
// valid the cycle after rd_en and holds its value while rd_en is low.
//
// The depth is this design's choice: 3136 words hold a quarter of the
// largest MobileNet-v1 pointwise input (112x112x32, or 56x56x64), so any
// MobileNet-v1 pointwise layer fits across four tiles.
module act_buffer
  import pwc_pkg::*;
#(
  parameter int unsigned WORDS = 3136
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  act_word_t                wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output act_word_t                rd_data
);

  act_word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
