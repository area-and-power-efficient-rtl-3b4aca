// Self-checking testbench of fp32_add: random operands over a range of
// exponent differences (including near-cancellation of opposite signs)
// compared bit for bit with a double-precision sum rounded to FP32, plus
// zeros, infinities and NaN.
module tb_fp32_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, expected %h", what, a, b, s, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = rand_fp(100, 154);
      b = rand_fp(100, 154);
      check(r2f(f2r(a) + f2r(b)), "random");
    end
    for (int i = 0; i < 20000; i++) begin
      // close exponents, often cancelling
      a = rand_fp(120, 122);
      b = {~a[31], a[30:23], 23'($urandom)};
      if ($urandom_range(1) == 1) b[30:23] = a[30:23] - 8'd1;
      check(r2f(f2r(a) + f2r(b)), "cancel");
    end
    a = int2f(3);  b = int2f(-3);  check(32'h0000_0000, "3-3");
    a = int2f(5);  b = 32'h0;      check(int2f(5), "5+0");
    a = 32'h8000_0000; b = 32'h8000_0000; check(32'h8000_0000, "-0+-0");
    a = 32'h7F80_0000; b = int2f(1); check(32'h7F80_0000, "inf+1");
    a = 32'h7F80_0000; b = 32'hFF80_0000; check(32'h7FC0_0000, "inf-inf");
    a = 32'hFFC0_0001; b = int2f(1); check(32'h7FC0_0000, "nan");
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; check(32'h7F80_0000, "overflow");
    a = 32'h0080_0001; b = 32'h8080_0000; check(32'h0000_0000, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
