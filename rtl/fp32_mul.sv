// FP32 multiplier: one of the sixteen multiplier lanes of an engine.
//
// Combinational IEEE-754 single precision product, rounded to nearest, ties
// to even. Subnormal inputs are read as zero and results below the normal
// range are flushed to signed zero (flush-to-zero), a common choice for
// neural network datapaths; the reference design states FP32 precision but not
// its subnormal handling. Infinities and NaNs follow IEEE rules, with every
// NaN result given as the canonical quiet NaN.
//
// Interface: a, b in; p = a * b out, no clock.
module fp32_mul
  import pwc_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [9:0]  exp_raw;      // signed, biased exponent of the product
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic [9:0]  exp_n;

  always_comb begin
    sa = a[31]; sb = b[31]; sp = sa ^ sb;
    ea = a[30:23]; eb = b[30:23];
    za = (ea == 8'd0);                 // zero or subnormal (read as zero)
    zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (a[22:0] == 23'd0);
    ib = (eb == 8'hFF) && (b[22:0] == 23'd0);
    na = (ea == 8'hFF) && (a[22:0] != 23'd0);
    nb = (eb == 8'hFF) && (b[22:0] != 23'd0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    prod = ma * mb;                    // in [2^46, 2^48)
    exp_raw = 10'(ea) + 10'(eb) - 10'd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_raw = exp_raw + 10'd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    exp_n    = exp_raw;
    if (mant_r[24]) begin              // rounding carried into a new bit
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 10'd1;
    end

    if (na || nb || (ia && zb) || (ib && za))
      p = FP_QNAN;
    else if (ia || ib)
      p = {sp, 8'hFF, 23'd0};
    else if (za || zb)
      p = {sp, 31'd0};
    else if ($signed(exp_n) >= 10'sd255)
      p = {sp, 8'hFF, 23'd0};          // overflow to infinity
    else if ($signed(exp_n) <= 10'sd0)
      p = {sp, 31'd0};                 // underflow, flushed to zero
    else
      p = {sp, exp_n[7:0], mant_r[22:0]};
  end

endmodule
