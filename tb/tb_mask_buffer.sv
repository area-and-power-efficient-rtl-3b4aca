// Self-checking testbench of mask_buffer at its full depth: writes random words at
// random addresses, then checks the one-cycle registered read, that the read
// data holds while rd_en is low, and that a write and read of different
// addresses in one cycle do not disturb each other.
module tb_mask_buffer;
  import pwc_pkg::*;

  localparam int unsigned WORDS = 32768;
  localparam int unsigned AW = $clog2(WORDS);
  logic clk = 0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  mask_t wr_data, rd_data;
  mask_t model [int];
  logic [AW-1:0] addrs [$];
  int checks = 0, failures = 0;

  mask_buffer #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  function automatic mask_t rand_word();
    return $urandom;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    // writes, including the first and last address
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = (i == 0) ? '0 : (i == 1) ? AW'(WORDS - 1) : AW'($urandom_range(WORDS - 1));
      wr_data = rand_word();
      if (!model.exists(int'(wr_addr))) addrs.push_back(wr_addr);
      model[int'(wr_addr)] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    foreach (addrs[i]) begin
      @(negedge clk); rd_en = 1; rd_addr = addrs[i];
      @(negedge clk); rd_en = 0; rd_addr = addrs[(i + 1) % addrs.size()];
      checks++;
      if (rd_data !== model[int'(addrs[i])]) begin
        failures++; $display("FAIL read %0d", addrs[i]);
      end
      // read data must hold while rd_en is low
      @(negedge clk);
      checks++;
      if (rd_data !== model[int'(addrs[i])]) begin
        failures++; $display("FAIL hold %0d", addrs[i]);
      end
    end
    // simultaneous write to one address and read of another
    @(negedge clk);
    wr_en = 1; wr_addr = addrs[0]; wr_data = rand_word();
    rd_en = 1; rd_addr = addrs[1];
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    checks++;
    if (rd_data !== model[int'(addrs[1])]) begin failures++; $display("FAIL concurrent read"); end
    model[int'(addrs[0])] = wr_data;
    @(negedge clk); rd_en = 1; rd_addr = addrs[0];
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== model[int'(addrs[0])]) begin failures++; $display("FAIL concurrent write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
