// FP32 adder: the adders of an engine's reduction tree and its accumulator.
//
// Combinational IEEE-754 single precision sum, rounded to nearest, ties to
// even. Subnormal inputs are read as zero and results below the normal range
// are flushed to zero; an exact zero sum is +0 unless both operands are -0.
// Infinities and NaNs follow IEEE rules, every NaN result being the canonical
// quiet NaN. The alignment keeps three extra bits (guard, round, sticky),
// which makes the rounding exact.
//
// Interface: a, b in; s = a + b out, no clock.
module fp32_add
  import pwc_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  logic        sa, sb, sbig, ssmall, sr;
  logic [7:0]  ea, eb, ebig, esmall, d;
  logic        za, zb, ia, ib, na, nb;
  logic [26:0] mbig, msmall, msh;   // {hidden, 23 fraction, guard, round, sticky}
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [9:0]  er;
  logic [26:0] norm;
  logic        round_up;
  logic [24:0] mant_r;
  logic        sub, a_big;

  // Shift right by d keeping a sticky bit of everything shifted out.
  function automatic logic [26:0] shr_sticky(input logic [26:0] v, input logic [7:0] sh);
    logic [26:0] r;
    logic        st;
    if (sh >= 8'd27) begin
      r = '0;
      st = |v;
    end else begin
      r  = v >> sh;
      st = |(v & ((27'd1 << sh) - 27'd1));
    end
    return {r[26:1], r[0] | st};
  endfunction

  always_comb begin
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (a[22:0] == 23'd0);
    ib = (eb == 8'hFF) && (b[22:0] == 23'd0);
    na = (ea == 8'hFF) && (a[22:0] != 23'd0);
    nb = (eb == 8'hFF) && (b[22:0] != 23'd0);

    a_big  = (a[30:0] >= b[30:0]);
    sbig   = a_big ? sa : sb;
    ssmall = a_big ? sb : sa;
    ebig   = a_big ? ea : eb;
    esmall = a_big ? eb : ea;
    mbig   = a_big ? {1'b1, a[22:0], 3'b000} : {1'b1, b[22:0], 3'b000};
    msmall = a_big ? {1'b1, b[22:0], 3'b000} : {1'b1, a[22:0], 3'b000};
    d      = ebig - esmall;
    msh    = shr_sticky(msmall, d);
    sub    = sbig ^ ssmall;
    sum    = sub ? ({1'b0, mbig} - {1'b0, msh}) : ({1'b0, mbig} + {1'b0, msh});
    sr     = sbig;

    // Normalise: either one right shift (carry out) or a left shift by the
    // number of leading zeros.
    lz = 5'd0;
    for (int i = 26; i >= 0; i--) begin
      if (sum[i]) begin
        lz = 5'(26 - i);
        break;
      end
    end
    if (sum[27]) begin
      norm = {sum[27:2], sum[1] | sum[0]};
      er   = 10'(ebig) + 10'd1;
    end else begin
      norm = sum[26:0] << lz;
      er   = 10'(ebig) - 10'(lz);
    end
    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r   = {1'b0, norm[26:3]} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      er     = er + 10'd1;
    end

    if (na || nb || (ia && ib && (sa != sb)))
      s = FP_QNAN;
    else if (ia)
      s = a;
    else if (ib)
      s = b;
    else if (za && zb)
      s = {sa & sb, 31'd0};
    else if (zb)
      s = a;
    else if (za)
      s = b;
    else if (sum == 28'd0)
      s = FP_ZERO;                      // exact cancellation gives +0
    else if ($signed(er) >= 10'sd255)
      s = {sr, 8'hFF, 23'd0};
    else if ($signed(er) <= 10'sd0)
      s = {sr, 31'd0};                  // underflow, flushed to zero
    else
      s = {sr, er[7:0], mant_r[22:0]};
  end

endmodule
