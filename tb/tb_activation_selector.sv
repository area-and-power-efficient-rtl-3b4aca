// Self-checking testbench of activation_selector. Random masks with every
// density from 0 to 32 set bits; for each, the expected lanes are worked out
// by walking the mask (the whole word when at most 16 bits are set, else the
// lower or upper 16 channels by phase) and compared with the outputs. Also
// checks the scaled-up cases of the published 8-channel example.
module tb_activation_selector;
  import pwc_pkg::*;

  act_word_t        act;
  mask_t            mask;
  logic             phase;
  logic             two_cycle;
  lane_vec_t        sel_act;
  logic [LANES-1:0] lane_valid;
  logic [$clog2(LANES):0] lane_count;
  int checks = 0, failures = 0;

  activation_selector dut (.*);

  task automatic check_case();
    int         n, lo, hi, k;
    bit         exp_two;
    lane_vec_t  exp_act;
    logic [LANES-1:0] exp_valid;
    n = $countones(mask);
    exp_two = (n > 16);
    lo = (exp_two && phase) ? 16 : 0;
    hi = (exp_two && !phase) ? 15 : 31;
    exp_act = '0;
    exp_valid = '0;
    k = 0;
    for (int i = lo; i <= hi; i++) begin
      if (mask[i]) begin
        exp_act[k] = act[i];
        exp_valid[k] = 1'b1;
        k++;
      end
    end
    #1;
    checks++;
    if (two_cycle !== exp_two || sel_act !== exp_act || lane_valid !== exp_valid ||
        int'(lane_count) != k) begin
      failures++;
      $display("FAIL mask=%h phase=%0d two=%0d/%0d count=%0d/%0d", mask, phase, two_cycle, exp_two,
               lane_count, k);
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
    for (int i = 0; i < CH_PER_WORD; i++) act[i] = 32'h4000_0000 + 32'(i);  // distinct values
    // Published 8-channel example, scaled: one mask per half pattern.
    mask = 32'h0000_0052; phase = 0; check_case();          // 3 set: one cycle
    mask = 32'h7676_7676; phase = 0; check_case();          // 20 set: two cycles
    phase = 1; check_case();
    for (int n = 0; n <= 32; n++) begin
      for (int t = 0; t < 60; t++) begin
        // mask with exactly n set bits
        mask = '0;
        while ($countones(mask) < n) mask[$urandom_range(31)] = 1'b1;
        for (int i = 0; i < CH_PER_WORD; i++) act[i] = $urandom;
        phase = 0; check_case();
        phase = 1; check_case();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
