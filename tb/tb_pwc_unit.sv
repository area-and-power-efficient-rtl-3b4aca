// End-to-end testbench of pwc_unit at its default (full) size: four engines,
// 1024-channel activation registers and full-depth buffers.
//
// It fills the four tiled activation buffers, the mask buffer and the weight
// buffer through the write ports with data prepared in software (mask bit set
// per non-zero weight; non-zero weights packed 16 per word), runs layers and
// checks every output of every engine against an integer dot product. Runs:
//  1. 64 channels, three kernels whose two blocks are sparse/sparse,
//     dense/sparse and dense/dense: the kernels must take 2, 3 and 4 cycles.
//  2. A random layer: 96 channels, 6 kernels, 4 locations per tile.
//  3. 1024 channels (the deepest layer), 2 kernels, 2 locations.
// It also counts how often each mechanism occurred (one-cycle block,
// two-cycle block, all-zero block, kernels reusing loaded activations,
// location change, differing engine outputs) and fails if one never did; and
// it checks that activations are read only depth_words times per location.
module tb_pwc_unit;
  import pwc_pkg::*;
  import tb_fp_pkg::*;
  import tb_pwc_pkg::*;

  localparam int unsigned NE = 4;
  logic clk = 0, rst_n = 0;
  logic [NE-1:0] act_wr_en;
  logic [11:0] act_wr_addr;
  act_word_t act_wr_data;
  logic mask_wr_en;
  logic [14:0] mask_wr_addr;
  mask_t mask_wr_data;
  logic wt_wr_en;
  logic [15:0] wt_wr_addr;
  lane_vec_t wt_wr_data;
  logic start, busy, done;
  logic [5:0] depth_words;
  logic [10:0] num_kernels;
  logic [12:0] num_locs;
  fp32_t [NE-1:0] otpt;
  logic out_valid, rd_en, wt_rd, dense_block;
  logic [9:0] res_kernel;
  logic [11:0] res_loc;
  int checks = 0, failures = 0;

  pwc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // layer data: acts[e][p][c], kern[k][c]
  int acts [NE][][];
  int kern [][];
  int cov_sparse = 0, cov_dense = 0, cov_zero = 0, cov_reuse = 0, cov_loc = 0, cov_diff = 0;
  int rd_cycles, cur_cycle, last_valid_cycle, last_rd_cycle;
  int kcycles [$];

  always @(posedge clk) begin
    cur_cycle++;
    if (rd_en) begin
      rd_cycles++;
      last_rd_cycle = cur_cycle;
    end
    if (out_valid) begin
      kcycles.push_back((last_rd_cycle > last_valid_cycle) ? cur_cycle - last_rd_cycle - 2
                                                           : cur_cycle - last_valid_cycle);
      last_valid_cycle = cur_cycle;
    end
  end

  // kinds[k][w]: block kind per rand_block
  task automatic run_layer(input int d, input int n, input int l, input int kinds [][]);
    int wp = 0;
    int expv;
    int got = 0;
    // kernels and masks
    kern = new[n];
    for (int k = 0; k < n; k++) begin
      kern[k] = new[d * CH_PER_WORD];
      for (int w = 0; w < d; w++) begin
        automatic kblock_t kb = rand_block(kinds[k][w]);
        automatic int nz = nnz(kb);
        for (int c = 0; c < CH_PER_WORD; c++) kern[k][w*CH_PER_WORD + c] = kb[c];
        if (nz == 0) cov_zero++;
        @(negedge clk);
        mask_wr_en = 1; mask_wr_addr = 15'(k*d + w); mask_wr_data = make_mask(kb);
        if (nz <= 16) begin
          @(negedge clk); mask_wr_en = 0;
          wt_wr_en = 1; wt_wr_addr = 16'(wp++); wt_wr_data = pack_range(kb, 0, 31);
        end else begin
          @(negedge clk); mask_wr_en = 0;
          wt_wr_en = 1; wt_wr_addr = 16'(wp++); wt_wr_data = pack_range(kb, 0, 15);
          @(negedge clk);
          wt_wr_en = 1; wt_wr_addr = 16'(wp++); wt_wr_data = pack_range(kb, 16, 31);
        end
        @(negedge clk); wt_wr_en = 0;
      end
    end
    // activation tiles
    for (int e = 0; e < NE; e++) begin
      acts[e] = new[l];
      for (int p = 0; p < l; p++) begin
        acts[e][p] = new[d * CH_PER_WORD];
        for (int w = 0; w < d; w++) begin
          @(negedge clk);
          for (int c = 0; c < CH_PER_WORD; c++) begin
            acts[e][p][w*CH_PER_WORD + c] = rand_act();
            act_wr_data[c] = int2f(acts[e][p][w*CH_PER_WORD + c]);
          end
          act_wr_en = 4'(1 << e); act_wr_addr = 12'(p*d + w);
        end
      end
    end
    @(negedge clk); act_wr_en = '0;
    // run
    depth_words = 6'(d); num_kernels = 11'(n); num_locs = 13'(l);
    rd_cycles = 0; kcycles.delete(); last_valid_cycle = 0; last_rd_cycle = 0; cur_cycle = 0;
    start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        automatic int k = int'(res_kernel), p = int'(res_loc);
        automatic int exp_k = got % n, exp_p = got / n;
        automatic bit differ = 0;
        checks++;
        if (k != exp_k || p != exp_p) fail($sformatf("tag loc %0d kernel %0d, expected %0d %0d", p, k, exp_p, exp_k));
        for (int e = 0; e < NE; e++) begin
          expv = 0;
          for (int c = 0; c < d * CH_PER_WORD; c++) expv += acts[e][exp_p][c] * kern[exp_k][c];
          checks++;
          if (otpt[e] !== int2f(expv))
            fail($sformatf("engine %0d loc %0d kernel %0d: %h expected %h (%0d)", e, exp_p, exp_k,
                           otpt[e], int2f(expv), expv));
          if (otpt[e] != otpt[0]) differ = 1;
        end
        if (differ) cov_diff++;
        if (exp_k > 0) cov_reuse++;
        if (exp_p > 0 && exp_k == 0) cov_loc++;
        got++;
      end
      if (dense_block && !dut.cmp_phase) cov_dense++;
      else if (dut.cmp_valid && !dense_block) cov_sparse++;
    end
    @(posedge clk);  // let the monitor see the final out_valid
    #1;
    checks++;
    if (got != n * l) fail($sformatf("%0d results, expected %0d", got, n * l));
    checks++;
    if (rd_cycles != l * d) fail($sformatf("%0d activation reads, expected %0d", rd_cycles, l * d));
  endtask

  initial begin
    int kinds [][];
    act_wr_en = '0; act_wr_addr = '0; act_wr_data = '0;
    mask_wr_en = 0; mask_wr_addr = '0; mask_wr_data = '0;
    wt_wr_en = 0; wt_wr_addr = '0; wt_wr_data = '0;
    start = 0; depth_words = '0; num_kernels = '0; num_locs = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. 64 channels: sparse/sparse, dense/sparse, dense/dense kernels
    kinds = new[3];
    kinds[0] = '{0, 0}; kinds[1] = '{1, 0}; kinds[2] = '{1, 4};
    run_layer(2, 3, 1, kinds);
    checks++;
    if (kcycles.size() != 3 || kcycles[0] != 2 || kcycles[1] != 3 || kcycles[2] != 4)
      fail($sformatf("64-channel kernel cycles %p, expected 2 3 4", kcycles));
    else $display("64-channel kernels took %0d, %0d and %0d cycles", kcycles[0], kcycles[1], kcycles[2]);

    // 2. random layer, 96 channels, 6 kernels, 4 locations per tile
    kinds = new[6];
    foreach (kinds[k]) begin
      kinds[k] = new[3];
      foreach (kinds[k][w]) kinds[k][w] = $urandom_range(4);
    end
    kinds[0][0] = 3;  // one all-pruned block
    kinds[1][1] = 2;  // exactly half
    run_layer(3, 6, 4, kinds);

    // 3. 1024 channels
    kinds = new[2];
    foreach (kinds[k]) begin
      kinds[k] = new[32];
      foreach (kinds[k][w]) kinds[k][w] = $urandom_range(4);
    end
    run_layer(32, 2, 2, kinds);

    $display("coverage: one-cycle blocks %0d, two-cycle blocks %0d, all-zero blocks %0d, reused loads %0d, location changes %0d, differing engines %0d",
             cov_sparse, cov_dense, cov_zero, cov_reuse, cov_loc, cov_diff);
    checks++;
    if (cov_sparse == 0 || cov_dense == 0 || cov_zero == 0 || cov_reuse == 0 || cov_loc == 0 || cov_diff == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
