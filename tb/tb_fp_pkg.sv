// Reference arithmetic for the testbenches: FP32 <-> real conversions.
//
// f2r widens an FP32 bit pattern to a real (subnormals read as zero, like the
// design). r2f rounds a real to FP32, nearest even, flushing results below
// the normal range to zero and overflowing to infinity. Because a double
// holds more than twice the FP32 significand, a single FP32 product or sum
// computed in real and rounded with r2f is the correctly rounded FP32 result.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [52:0] m;
    logic [24:0] mr;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    g  = m[28];
    st = |m[27:0];
    mr = {1'b0, m[52:29]} + 25'((g && (st || m[29])) ? 1 : 0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // Random FP32 number with exponent in [emin, emax] and random sign.
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // FP32 encoding of a small integer (exact).
  function automatic logic [31:0] int2f(input int v);
    return r2f(real'(v));
  endfunction

endpackage
