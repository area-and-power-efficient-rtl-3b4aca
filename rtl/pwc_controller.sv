// Controller of the sparse-aware pointwise convolution unit.
//
// Runs one pointwise layer over the tiles held in the activation buffers.
// For every location (pixel) of a tile it first reads the location's
// depth_words activation words into the engines' activation registers
// (rd_en high for depth_words cycles), and then keeps them there while every
// kernel is applied (activation stationary): for kernel n = 0..N-1 and block
// w = 0..D-1 it reads mask n*D+w and the next weight word (wt_rd). Buffers
// have a one-cycle read latency, so the read issued in one cycle is computed
// on in the next. In that compute cycle the controller counts the mask's set
// bits: a block with more than 16 spends a second cycle (phase 1), for which
// only the next weight word is read and the mask buffer output is held. The
// read for the next block is issued in the same cycle as the current block's
// compute, so blocks follow each other without gaps: a kernel of D blocks
// takes D cycles plus one per dense block. The mask and weight pointers
// restart at zero for each location, since every location meets the same
// kernels.
//
// Loading and computing are sequential here: the reference design overlaps
// the first kernel with the activation reads, but does not say how; this
// costs depth_words+1 cycles per location, shared over all kernels.
//
// Interface: start (one cycle, while idle) with the layer's depth_words
// (1..MAX_DEPTH_WORDS), num_kernels and num_locs held stable until done;
// busy while running; done pulses one cycle at the end. Result tags
// res_kernel/res_loc name the output produced by the engines' out_valid in
// the same cycle. Reset (rst_n low) is synchronous.
module pwc_controller
  import pwc_pkg::*;
#(
  parameter int unsigned MAX_DEPTH_WORDS = 32,
  parameter int unsigned ACT_BUF_WORDS   = 3136,
  parameter int unsigned MASK_WORDS      = 32768,
  parameter int unsigned WT_WORDS        = 65536,
  parameter int unsigned MAX_KERNELS     = 1024
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // layer configuration
  input  logic                                start,
  input  logic [$clog2(MAX_DEPTH_WORDS):0]    depth_words,
  input  logic [$clog2(MAX_KERNELS):0]        num_kernels,
  input  logic [$clog2(ACT_BUF_WORDS):0]      num_locs,
  output logic                                busy,
  output logic                                done,
  // activation buffers (all tiles read at the same address)
  output logic                                rd_en,
  output logic [$clog2(ACT_BUF_WORDS)-1:0]    act_raddr,
  // activation register load, one cycle after rd_en
  output logic                                act_we,
  output logic [$clog2(MAX_DEPTH_WORDS)-1:0]  act_waddr,
  // mask and weight buffers
  output logic                                mask_rd,
  output logic [$clog2(MASK_WORDS)-1:0]       mask_raddr,
  input  mask_t                               mask_rdata,
  output logic                                wt_rd,
  output logic [$clog2(WT_WORDS)-1:0]         wt_raddr,
  // compute cycle, to the engines
  output logic                                cmp_valid,
  output logic [$clog2(MAX_DEPTH_WORDS)-1:0]  cmp_word,
  output logic                                cmp_phase,
  output logic                                cmp_first,
  output logic                                cmp_last,
  // tags of the result the engines present next cycle
  output logic [$clog2(MAX_KERNELS)-1:0]      res_kernel,
  output logic [$clog2(ACT_BUF_WORDS)-1:0]    res_loc,
  // per-block cycle count (1 or 2), for monitoring
  output logic                                dense_block
);

  localparam int unsigned DW = $clog2(MAX_DEPTH_WORDS);
  localparam int unsigned KW = $clog2(MAX_KERNELS);
  localparam int unsigned LW = $clog2(ACT_BUF_WORDS);
  localparam int unsigned MW = $clog2(MASK_WORDS);
  localparam int unsigned WW = $clog2(WT_WORDS);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMPUTE} state_t;

  state_t          state;
  logic [DW-1:0]   ld_cnt;         // next activation word to read
  logic [LW-1:0]   loc;            // current location within the tile
  logic [LW-1:0]   act_ptr;        // address of the next activation word
  // issue side of the compute loop
  logic            iss_more;       // blocks left to issue for this location
  logic [DW-1:0]   iss_w;
  logic [KW-1:0]   iss_k;
  logic [MW-1:0]   mask_ptr;
  logic [WW-1:0]   wt_ptr;
  // compute side: the block whose mask and weights are at the buffer outputs
  logic            d_valid;
  logic [DW-1:0]   d_w;
  logic [KW-1:0]   d_k;
  logic            d_phase;
  logic [5:0]      nnz;
  logic            d_dense;
  logic            need_phase1;
  logic            issue_block;

  always_comb begin
    nnz = '0;
    for (int i = 0; i < CH_PER_WORD; i++) nnz += 6'(mask_rdata[i]);
    d_dense     = (nnz > 6'(LANES));
    need_phase1 = d_valid && !d_phase && d_dense;
    issue_block = (state == S_COMPUTE) && !need_phase1 && iss_more;
  end

  // buffer reads
  assign rd_en      = (state == S_LOAD);
  assign act_raddr  = act_ptr;
  assign mask_rd    = issue_block;
  assign mask_raddr = mask_ptr;
  assign wt_rd      = issue_block || ((state == S_COMPUTE) && need_phase1);
  assign wt_raddr   = wt_ptr;

  // compute cycle
  assign cmp_valid   = d_valid;
  assign cmp_word    = d_w;
  assign cmp_phase   = d_phase;
  assign cmp_first   = (d_w == '0) && !d_phase;
  assign cmp_last    = (d_w == DW'(depth_words - 1'b1)) && (d_phase || !d_dense);
  assign dense_block = d_valid && d_dense;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ld_cnt     <= '0;
      loc        <= '0;
      act_ptr    <= '0;
      iss_more   <= 1'b0;
      iss_w      <= '0;
      iss_k      <= '0;
      mask_ptr   <= '0;
      wt_ptr     <= '0;
      d_valid    <= 1'b0;
      d_w        <= '0;
      d_k        <= '0;
      d_phase    <= 1'b0;
      act_we     <= 1'b0;
      act_waddr  <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      res_kernel <= '0;
      res_loc    <= '0;
    end else begin
      done   <= 1'b0;
      act_we <= rd_en;
      if (rd_en) act_waddr <= ld_cnt;
      if (d_valid && cmp_last) begin
        res_kernel <= d_k;
        res_loc    <= loc;
      end

      unique case (state)
        S_IDLE: begin
          d_valid <= 1'b0;
          if (start) begin
            state   <= S_LOAD;
            busy    <= 1'b1;
            loc     <= '0;
            act_ptr <= '0;
            ld_cnt  <= '0;
          end
        end

        S_LOAD: begin
          act_ptr <= act_ptr + 1'b1;
          ld_cnt  <= ld_cnt + 1'b1;
          if (ld_cnt == DW'(depth_words - 1'b1)) begin
            state    <= S_COMPUTE;
            iss_more <= 1'b1;
            iss_w    <= '0;
            iss_k    <= '0;
            mask_ptr <= '0;
            wt_ptr   <= '0;
          end
        end

        S_COMPUTE: begin
          if (need_phase1) begin
            // second cycle of a dense block: next weight word, same mask
            wt_ptr  <= wt_ptr + 1'b1;
            d_phase <= 1'b1;
          end else if (iss_more) begin
            mask_ptr <= mask_ptr + 1'b1;
            wt_ptr   <= wt_ptr + 1'b1;
            d_valid  <= 1'b1;
            d_w      <= iss_w;
            d_k      <= iss_k;
            d_phase  <= 1'b0;
            if (iss_w == DW'(depth_words - 1'b1)) begin
              iss_w <= '0;
              if (iss_k == KW'(num_kernels - 1'b1)) iss_more <= 1'b0;
              else                                 iss_k    <= iss_k + 1'b1;
            end else begin
              iss_w <= iss_w + 1'b1;
            end
          end else begin
            // the last block of this location is being computed now
            d_valid <= 1'b0;
            ld_cnt  <= '0;
            if (loc == LW'(num_locs - 1'b1)) begin
              state <= S_IDLE;
              busy  <= 1'b0;
              done  <= 1'b1;
            end else begin
              loc   <= loc + 1'b1;
              state <= S_LOAD;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_depth_range : assert property (@(posedge clk) disable iff (!rst_n)
    start && state == S_IDLE |-> depth_words != '0 && depth_words <= ($clog2(MAX_DEPTH_WORDS)+1)'(MAX_DEPTH_WORDS));
  a_no_read_overlap : assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && wt_rd));

endmodule
