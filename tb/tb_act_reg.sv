// Self-checking testbench of act_reg: fills a random depth of words, reads
// all of them back several times in random order (the stationary reuse),
// and checks that a rewrite of one word leaves the others unchanged.
module tb_act_reg;
  import pwc_pkg::*;

  localparam int unsigned D = 32;
  logic clk = 0;
  logic we;
  logic [$clog2(D)-1:0] waddr, raddr;
  act_word_t wdata, rdata;
  act_word_t model [D];
  int checks = 0, failures = 0;

  act_reg #(.MAX_DEPTH_WORDS(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin
      for (int c = 0; c < CH_PER_WORD; c++) model[i][c] = $urandom;
      @(negedge clk); we = 1; waddr = 5'(i); wdata = model[i];
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 4 * D; r++) begin
      raddr = 5'($urandom_range(D - 1));
      #1; checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
    end
    @(negedge clk); we = 1; waddr = 5'd7; wdata = '1; model[7] = '1;
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      raddr = 5'(i); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL reread %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
