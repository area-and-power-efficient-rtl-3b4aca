// Self-checking testbench of pwc_controller with a behavioural mask memory.
// Random layers (depth 1-4 words, 1-5 kernels, 1-3 locations) with masks of
// every density. Checked against a schedule worked out here:
//  - activation reads: depth_words per location only (activation
//    stationary), at addresses loc*D+i, each written to register word i;
//  - mask reads at n*D+w and weight reads 0,1,2,... restarting per location;
//  - each compute cycle's word, phase, first and last flags, one cycle per
//    block with at most 16 mask bits and two for a denser one;
//  - result tags, and the total run time 1+L*(D+1+sum of block cycles) from
//    start to done (the 1 is the cycle that accepts start).
module tb_pwc_controller;
  import pwc_pkg::*;
  import tb_pwc_pkg::*;

  localparam int unsigned MD = 4, AB = 64, MW = 256, WW = 512, MK = 16;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [$clog2(MD):0] depth_words;
  logic [$clog2(MK):0] num_kernels;
  logic [$clog2(AB):0] num_locs;
  logic rd_en, act_we, mask_rd, wt_rd;
  logic [$clog2(AB)-1:0] act_raddr, res_loc;
  logic [$clog2(MD)-1:0] act_waddr, cmp_word;
  logic [$clog2(MW)-1:0] mask_raddr;
  logic [$clog2(WW)-1:0] wt_raddr;
  mask_t mask_rdata;
  logic cmp_valid, cmp_phase, cmp_first, cmp_last, dense_block;
  logic [$clog2(MK)-1:0] res_kernel;
  int checks = 0, failures = 0;

  pwc_controller #(.MAX_DEPTH_WORDS(MD), .ACT_BUF_WORDS(AB), .MASK_WORDS(MW),
                   .WT_WORDS(WW), .MAX_KERNELS(MK)) dut (.*);

  always #5 clk = ~clk;

  // behavioural mask buffer: registered read, holds while not read
  mask_t masks [MW];
  always_ff @(posedge clk) if (mask_rd) mask_rdata <= masks[mask_raddr];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // expected schedule of one run
  typedef struct { int w; int ph; bit first; bit last; int k; } ev_t;
  ev_t evs [$];
  int  exp_act_rd [$];
  int  exp_mask_rd [$];
  int  exp_wt_rd [$];
  int  exp_act_wr [$];
  int  exp_cycles, cycles, dense_seen, sparse_seen, locs_seen;

  // monitor: compare every read and compute cycle with the schedule
  bit running = 0;
  int prev_valid_last = 0;
  always @(posedge clk) if (running) begin
    cycles++;
    if (rd_en) begin
      checks++;
      if (exp_act_rd.size() == 0) fail("extra activation read");
      else if (int'(act_raddr) != exp_act_rd.pop_front()) fail("activation read address");
    end
    if (act_we) begin
      checks++;
      if (exp_act_wr.size() == 0) fail("extra register write");
      else if (int'(act_waddr) != exp_act_wr.pop_front()) fail("register write index");
    end
    if (mask_rd) begin
      checks++;
      if (exp_mask_rd.size() == 0) fail("extra mask read");
      else if (int'(mask_raddr) != exp_mask_rd.pop_front()) fail("mask read address");
    end
    if (wt_rd) begin
      checks++;
      if (exp_wt_rd.size() == 0) fail("extra weight read");
      else if (int'(wt_raddr) != exp_wt_rd.pop_front()) fail("weight read address");
    end
    if (cmp_valid) begin
      ev_t e;
      checks++;
      if (evs.size() == 0) fail("extra compute cycle");
      else begin
        e = evs.pop_front();
        if (int'(cmp_word) != e.w || int'(cmp_phase) != e.ph || cmp_first != e.first ||
            cmp_last != e.last)
          fail($sformatf("compute cycle w=%0d/%0d ph=%0d/%0d first=%0d/%0d last=%0d/%0d",
                         cmp_word, e.w, cmp_phase, e.ph, cmp_first, e.first, cmp_last, e.last));
        if (dense_block) dense_seen++; else if (!cmp_phase) sparse_seen++;
        if (e.last) prev_valid_last = e.k + 1;
      end
    end
  end
  // result tag is checked the cycle after the last compute cycle of a kernel
  always @(posedge clk) if (running && prev_valid_last != 0) begin
    #1;
    checks++;
    if (int'(res_kernel) != prev_valid_last - 1) fail("result kernel tag");
    prev_valid_last = 0;
  end

  initial begin
    start = 0; depth_words = '0; num_kernels = '0; num_locs = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      automatic int d = $urandom_range(MD, 1);
      automatic int n = $urandom_range(5, 1);
      automatic int l = $urandom_range(3, 1);
      automatic int blk_cycles = 0;
      automatic int wp;
      for (int k = 0; k < n; k++)
        for (int w = 0; w < d; w++)
          masks[k*d + w] = make_mask(rand_block($urandom_range(4)));
      exp_cycles = 0;
      for (int loc = 0; loc < l; loc++) begin
        for (int i = 0; i < d; i++) begin
          exp_act_rd.push_back(loc*d + i);
          exp_act_wr.push_back(i);
        end
        wp = 0;
        for (int k = 0; k < n; k++)
          for (int w = 0; w < d; w++) begin
            automatic bit dense = ($countones(masks[k*d + w]) > 16);
            exp_mask_rd.push_back(k*d + w);
            for (int ph = 0; ph <= int'(dense); ph++) begin
              automatic ev_t e;
              e.w = w; e.ph = ph; e.first = (w == 0 && ph == 0);
              e.last = (w == d-1) && (ph == int'(dense)); e.k = k;
              evs.push_back(e);
              exp_wt_rd.push_back(wp++);
              if (loc == 0) blk_cycles++;
            end
          end
      end
      exp_cycles = 1 + l * (d + 1 + blk_cycles);  // one cycle accepts start
      @(negedge clk);
      depth_words = 3'(d); num_kernels = 5'(n); num_locs = 7'(l);
      start = 1; cycles = 0; running = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      running = 0;
      checks++;
      if (cycles != exp_cycles) fail($sformatf("run %0d: %0d cycles, expected %0d", run, cycles, exp_cycles));
      checks++;
      if (evs.size() != 0 || exp_act_rd.size() != 0 || exp_mask_rd.size() != 0 ||
          exp_wt_rd.size() != 0 || exp_act_wr.size() != 0) fail("missing events");
      checks++;
      if (busy) fail("busy after done");
      evs.delete(); exp_act_rd.delete(); exp_mask_rd.delete(); exp_wt_rd.delete(); exp_act_wr.delete();
      repeat ($urandom_range(3)) @(negedge clk);
    end
    checks++;
    if (dense_seen == 0 || sparse_seen == 0) fail("coverage: dense or sparse blocks never seen");
    $display("blocks: %0d one-cycle, %0d two-cycle", sparse_seen, dense_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
