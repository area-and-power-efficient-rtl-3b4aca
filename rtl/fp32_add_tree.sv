// Balanced FP32 adder tree: sums the LANES products of one engine cycle.
//
// Level j adds neighbouring pairs of level j-1 (lane 2i with lane 2i+1), so
// sixteen products pass through four levels of fp32_add. Combinational. The
// reference design shows a multiplier feeding an accumulating adder but not
// how the sixteen products are reduced; a balanced tree is this design's
// choice. N must be a power of two.
module fp32_add_tree
  import pwc_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  fp32_t [N-1:0] in,
  output fp32_t         sum
);

  localparam int unsigned LEVELS = $clog2(N);

  // node[j] holds the N >> j partial sums of level j
  fp32_t [N-1:0] node [LEVELS+1];

  assign node[0] = in;

  for (genvar j = 1; j <= LEVELS; j++) begin : g_level
    for (genvar i = 0; i < (N >> j); i++) begin : g_add
      fp32_add u_add (
        .a(node[j-1][2*i]),
        .b(node[j-1][2*i+1]),
        .s(node[j][i])
      );
    end
    // upper entries of this level are unused
    if ((N >> j) < N) begin : g_pad
      assign node[j][N-1:(N >> j)] = '0;
    end
  end

  assign sum = node[LEVELS][0];

endmodule
