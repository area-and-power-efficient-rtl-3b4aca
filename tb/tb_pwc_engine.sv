// Self-checking testbench of pwc_engine. Each trial loads a location of
// 1 to 4 activation words into the engine, then applies several kernels made
// of blocks of every density (sparse, dense, exactly half, all-zero, full),
// driving one compute cycle per sparse block and two per dense block, as the
// controller does. After the last cycle of each kernel out_valid must pulse
// once and otpt must equal the integer dot product worked out here.
module tb_pwc_engine;
  import pwc_pkg::*;
  import tb_fp_pkg::*;
  import tb_pwc_pkg::*;

  localparam int unsigned MD = 4;
  logic clk = 0, rst_n = 0;
  logic act_we;
  logic [$clog2(MD)-1:0] act_waddr, cmp_word;
  act_word_t act_wdata;
  logic cmp_valid, cmp_phase, cmp_first, cmp_last;
  mask_t mask;
  lane_vec_t wt;
  fp32_t otpt;
  logic out_valid;
  int checks = 0, failures = 0;
  int acts [MD][CH_PER_WORD];
  int n_dense = 0, n_sparse = 0;

  pwc_engine #(.MAX_DEPTH_WORDS(MD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // out_valid must pulse once per kernel
  int n_valid = 0, n_kernels = 0;
  always @(posedge clk) if (rst_n && out_valid) n_valid++;

  initial begin
    act_we = 0; act_waddr = '0; act_wdata = '0;
    cmp_valid = 0; cmp_word = '0; cmp_phase = 0; cmp_first = 0; cmp_last = 0;
    mask = '0; wt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      automatic int d = $urandom_range(MD, 1);
      for (int w = 0; w < d; w++) begin
        @(negedge clk);
        act_we = 1; act_waddr = 2'(w);
        for (int c = 0; c < CH_PER_WORD; c++) begin
          acts[w][c] = rand_act();
          act_wdata[c] = int2f(acts[w][c]);
        end
      end
      @(negedge clk); act_we = 0;
      for (int k = 0; k < 5; k++) begin
        automatic int expv = 0;
        for (int w = 0; w < d; w++) begin
          automatic kblock_t kb = rand_block($urandom_range(4));
          automatic bit dense = (nnz(kb) > 16);
          for (int c = 0; c < CH_PER_WORD; c++) expv += acts[w][c] * kb[c];
          if (dense) n_dense++; else n_sparse++;
          for (int ph = 0; ph <= int'(dense); ph++) begin
            cmp_valid = 1; cmp_word = 2'(w); cmp_phase = 1'(ph);
            cmp_first = (w == 0) && (ph == 0);
            cmp_last  = (w == d - 1) && (ph == int'(dense));
            mask = make_mask(kb);
            wt = !dense ? pack_range(kb, 0, 31) : (ph == 0) ? pack_range(kb, 0, 15) : pack_range(kb, 16, 31);
            @(negedge clk);
          end
        end
        cmp_valid = 0;
        mask = $urandom; wt = '1;   // garbage while idle must not disturb the result
        checks++;
        if (!out_valid || otpt !== int2f(expv)) begin
          failures++;
          $display("FAIL trial %0d kernel %0d: valid=%0d otpt=%h expected %h (%0d)", trial, k,
                   out_valid, otpt, int2f(expv), expv);
        end
        n_kernels++;
        // otpt holds while idle
        @(negedge clk);
        checks++;
        if (out_valid || otpt !== int2f(expv)) begin failures++; $display("FAIL hold"); end
      end
    end
    checks++;
    if (n_valid != n_kernels) begin failures++; $display("FAIL %0d out_valid pulses for %0d kernels", n_valid, n_kernels); end
    checks++;
    if (n_dense == 0 || n_sparse == 0) begin failures++; $display("FAIL coverage"); end
    $display("blocks: %0d one-cycle, %0d two-cycle", n_sparse, n_dense);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
