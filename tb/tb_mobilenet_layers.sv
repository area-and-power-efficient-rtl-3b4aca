// Workload testbench: the ten MobileNet-v1 pointwise layer shapes at the
// unit's default size, each with its full channel depth and kernel count but
// only one location per tile (the spatial extent only repeats the same work).
// Weights are pruned at random, each weight zero with probability 50% or 75%
// (the sparsity levels reported for pruned MobileNet-v1), so block densities
// vary as in a real pruned layer. Every output of every engine is compared
// with an integer dot product, and the run time is compared with
// 1 + (D + 1 + sum of block cycles) for the layer's masks.
module tb_mobilenet_layers;
  import pwc_pkg::*;
  import tb_fp_pkg::*;
  import tb_pwc_pkg::*;

  localparam int unsigned NE = 4;
  localparam int NL = 10;
  // channels C and kernels N of each pointwise layer
  localparam int LC [NL] = '{32, 32, 64, 128, 128, 256, 256, 512, 512, 1024};
  localparam int LN [NL] = '{32, 64, 128, 128, 256, 256, 512, 512, 1024, 1024};

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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  int acts [NE][];
  int kern [][];

  initial begin
    act_wr_en = '0; act_wr_addr = '0; act_wr_data = '0;
    mask_wr_en = 0; mask_wr_addr = '0; mask_wr_data = '0;
    wt_wr_en = 0; wt_wr_addr = '0; wt_wr_data = '0;
    start = 0; depth_words = '0; num_kernels = '0; num_locs = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int li = 0; li < NL; li++) begin
      automatic int c_ch = LC[li], n = LN[li], d = LC[li] / 32;
      automatic int pct = (li % 2 == 0) ? 50 : 75;
      automatic int wp = 0, blk_cycles = 0, n_dense = 0, cycles = 0, got = 0;
      kern = new[n];
      for (int k = 0; k < n; k++) begin
        kern[k] = new[c_ch];
        for (int w = 0; w < d; w++) begin
          automatic kblock_t kb;
          foreach (kb[i]) begin
            kb[i] = (int'($urandom_range(99)) < pct) ? 0 :
                    ($urandom_range(1) ? int'($urandom_range(8, 1)) : -int'($urandom_range(8, 1)));
            kern[k][w*32 + i] = kb[i];
          end
          @(negedge clk);
          mask_wr_en = 1; mask_wr_addr = 15'(k*d + w); mask_wr_data = make_mask(kb);
          if (nnz(kb) <= 16) begin
            wt_wr_en = 1; wt_wr_addr = 16'(wp++); wt_wr_data = pack_range(kb, 0, 31);
            blk_cycles += 1;
          end else begin
            wt_wr_en = 1; wt_wr_addr = 16'(wp++); wt_wr_data = pack_range(kb, 0, 15);
            @(negedge clk);
            mask_wr_en = 0;
            wt_wr_en = 1; wt_wr_addr = 16'(wp++); wt_wr_data = pack_range(kb, 16, 31);
            blk_cycles += 2;
            n_dense++;
          end
        end
      end
      for (int e = 0; e < NE; e++) begin
        acts[e] = new[c_ch];
        for (int w = 0; w < d; w++) begin
          @(negedge clk);
          mask_wr_en = 0; wt_wr_en = 0;
          for (int c = 0; c < 32; c++) begin
            acts[e][w*32 + c] = rand_act();
            act_wr_data[c] = int2f(acts[e][w*32 + c]);
          end
          act_wr_en = 4'(1 << e); act_wr_addr = 12'(w);
        end
      end
      @(negedge clk);
      act_wr_en = '0; mask_wr_en = 0; wt_wr_en = 0;
      depth_words = 6'(d); num_kernels = 11'(n); num_locs = 13'd1;
      start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin
        @(posedge clk);
        #1;
        cycles++;
        if (out_valid) begin
          checks++;
          if (int'(res_kernel) != got % 1024) fail("kernel tag");
          for (int e = 0; e < NE; e++) begin
            automatic int expv = 0;
            for (int c = 0; c < c_ch; c++) expv += acts[e][c] * kern[got][c];
            checks++;
            if (otpt[e] !== int2f(expv))
              fail($sformatf("layer %0d engine %0d kernel %0d: %h expected %h", li, e, got, otpt[e], int2f(expv)));
          end
          got++;
        end
      end
      checks++;
      if (got != n) fail($sformatf("layer %0d: %0d results, expected %0d", li, got, n));
      checks++;
      if (cycles != 1 + d + 1 + blk_cycles)
        fail($sformatf("layer %0d: %0d cycles, expected %0d", li, cycles, 1 + d + 1 + blk_cycles));
      $display("layer %0d: %0d channels x %0d kernels, %0d%% pruned: %0d of %0d blocks dense, %0d compute cycles per location (%0d for a 16-lane engine without skipping, %0d for 32 lanes)",
               li, c_ch, n, pct, n_dense, n * d, blk_cycles, 2 * n * d, n * d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
