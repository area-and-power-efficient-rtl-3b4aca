// Weight buffer: holds only the non-zero weights, 16 per word.
//
// Each word feeds one engine cycle. For a 32-channel block with at most 16
// non-zero weights one word holds them all, in channel order from lane 0,
// with unused lanes zero. A block with more than 16 takes two words: first
// the non-zero weights of channels 0-15, then those of channels 16-31. Words
// follow kernel by kernel, block by block, in the order the controller
// consumes them. The same word goes to every engine. Simple dual-port memory
// with a registered read port: rd_data is valid the cycle after rd_en.
//
// The layout and depth are this design's choice: 65536 words cover the
// largest MobileNet-v1 pointwise layer (1024x1024) even with no sparsity.
module weight_buffer
  import pwc_pkg::*;
#(
  parameter int unsigned WORDS = 65536
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  lane_vec_t                wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output lane_vec_t                rd_data
);

  lane_vec_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
