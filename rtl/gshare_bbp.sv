// gshare_bbp: gshare branch predictor carrying basic-block power.
//
// A gshare predictor (2-bit saturating counters indexed by PC xor global
// history) whose every entry also holds BB_TOK_W bits with the power tokens
// last consumed by the basic block that follows the branch on the predicted
// path.  A prediction therefore returns, along with the direction, the power
// the next basic block is expected to burn; the level manager uses it to
// decide how aggressively to save power.
//
// How it works: the global history register is updated speculatively with
// each prediction; on a misprediction it is rebuilt from the history the
// branch was predicted with plus its actual outcome.  The counter of an entry
// is trained when the branch resolves; its token field is written separately,
// once the following basic block has committed (bw_* port).
//
// Interface: prediction (pr_valid, pr_pc -> pr_taken, pr_bb_tok, pr_idx,
// pr_ghr; combinational, history updated at the edge), training (up_valid,
// up_idx, up_ghr, up_taken, up_mispred) and token write (bw_valid, bw_idx,
// bw_tok).  The core keeps pr_idx and pr_ghr with the branch.  After reset
// the table clears itself one entry per cycle (weakly not-taken, 0 tokens).
// The 64 KB of counters, 16-bit history and 9 token bits per entry follow the
// design description; the history handling and reset state are this design's.
module gshare_bbp
  import pt_pkg::*;
#(
  parameter int unsigned ENTRIES = 262144,
  parameter int unsigned HIST_W  = 16,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  input  logic              pr_valid,
  input  pc_t               pr_pc,
  output logic              pr_taken,
  output bbtok_t            pr_bb_tok,
  output logic [IDX_W-1:0]  pr_idx,
  output logic [HIST_W-1:0] pr_ghr,
  input  logic              up_valid,
  input  logic [IDX_W-1:0]  up_idx,
  input  logic [HIST_W-1:0] up_ghr,
  input  logic              up_taken,
  input  logic              up_mispred,
  input  logic              bw_valid,
  input  logic [IDX_W-1:0]  bw_idx,
  input  bbtok_t            bw_tok
);
  typedef logic [IDX_W-1:0] idx_t;

  logic [1:0]        cnt_mem [ENTRIES];
  bbtok_t            tok_mem [ENTRIES];
  logic [HIST_W-1:0] ghr;
  idx_t              clr_idx;
  logic              clearing;

  assign pr_ghr    = ghr;
  assign pr_idx    = pr_pc[2 +: IDX_W] ^ IDX_W'(ghr);
  assign pr_taken  = cnt_mem[pr_idx][1];
  assign pr_bb_tok = tok_mem[pr_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_idx  <= '0;
      clearing <= 1'b1;
      ghr      <= '0;
    end else begin
      if (clearing) begin
        clr_idx <= clr_idx + 1'b1;
        if (clr_idx == idx_t'(ENTRIES - 1)) clearing <= 1'b0;
      end
      if (up_valid && up_mispred) ghr <= {up_ghr[HIST_W-2:0], up_taken};
      else if (pr_valid)          ghr <= {ghr[HIST_W-2:0], pr_taken};
    end
  end

  always_ff @(posedge clk) begin
    if (clearing) begin
      cnt_mem[clr_idx] <= 2'b01;
      tok_mem[clr_idx] <= '0;
    end else begin
      if (up_valid) begin
        if (up_taken && cnt_mem[up_idx] != 2'b11)       cnt_mem[up_idx] <= cnt_mem[up_idx] + 1'b1;
        else if (!up_taken && cnt_mem[up_idx] != 2'b00) cnt_mem[up_idx] <= cnt_mem[up_idx] - 1'b1;
      end
      if (bw_valid) tok_mem[bw_idx] <= bw_tok;
    end
  end

  assign init_done = !clearing;
endmodule
