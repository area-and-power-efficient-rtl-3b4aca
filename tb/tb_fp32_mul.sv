// Self-checking testbench of fp32_mul: random operands compared bit for bit
// with a product computed in double precision and rounded to FP32, operands
// with short significands (exact ties), plus zeros, infinities, NaN,
// overflow and underflow.
module tb_fp32_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = rand_fp(70, 184);
      b = rand_fp(70, 184);
      check(r2f(f2r(a) * f2r(b)), "random");
    end
    // short significands: products land exactly halfway between two FP32
    // numbers often, which exercises ties-to-even
    for (int i = 0; i < 5000; i++) begin
      a = rand_fp(100, 154); a[10:0] = '0;
      b = rand_fp(100, 154); b[10:0] = '0;
      check(r2f(f2r(a) * f2r(b)), "tie");
    end
    // small integers are exact
    a = int2f(3);  b = int2f(-7);  check(int2f(-21), "3*-7");
    a = int2f(0);  b = int2f(5);   check(32'h0000_0000, "0*5");
    a = 32'h8000_0000; b = int2f(5); check(32'h8000_0000, "-0*5");
    a = 32'h7F80_0000; b = int2f(-2); check(32'hFF80_0000, "inf*-2");
    a = 32'h7F80_0000; b = 32'h0;    check(32'h7FC0_0000, "inf*0");
    a = 32'h7FC0_1234; b = int2f(1); check(32'h7FC0_0000, "nan*1");
    a = 32'h7F00_0000; b = 32'h7F00_0000; check(32'h7F80_0000, "overflow");
    a = 32'h0080_0000; b = 32'h3E00_0000; check(32'h0000_0000, "underflow");
    a = 32'h0000_0001; b = int2f(1); check(32'h0000_0000, "subnormal input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
