// power_manager: two-level power-budget manager for an out-of-order core.
//
// Keeps the processor's power under a budget given in power tokens.  Power
// is estimated every cycle from the token costs of the instructions in
// flight, costs that a PC-indexed history table learned at commit.  Two
// levels act on it:
//   * coarse: a DVFS controller picks a voltage/frequency mode (three modes
//     by default) from the average power of long search intervals;
//   * fine: the Basic Block Level Manager (BBLM) forecasts, at each branch
//     prediction, the power of the next basic block (stored in the branch
//     predictor) and enables, from least to most aggressive, critical-path
//     instruction delaying, JRS confidence throttling and decode/commit ratio
//     throttling of the front end.
// Power-Token Throttling (PTT), which admits fetched instructions only while
// their tokens fit the budget, can be switched on alongside (ptt_en), with
// critical instructions exempt when ptt_cp is set.
//
// Interface: the core presents its fetch group (fe_*), one branch prediction
// per cycle (bp_*), branch resolutions (br_*), dispatch (dp_*), the oldest
// issue-queue entry (iq_old_*), issue candidates (is_*), the decode count and
// its commit group (cm_*).  The core keeps with each instruction the token
// estimate fe_tok and the flag fe_delayable it got at fetch, and with each
// branch bp_idx and bp_ghr, and returns them at issue, resolve and commit.
// fe_allow, is_ok and the throttled width are combinational answers for the
// current cycle; the power estimate, the technique level and the DVFS mode
// are registered.  The tables clear themselves after reset; init_done rises
// when all have finished, and inputs should stay idle until then.
module power_manager
  import pt_pkg::*;
#(
  parameter int unsigned PTHT_ENTRIES  = 8192,
  parameter int unsigned CP_ENTRIES    = 8192,
  parameter int unsigned JRS_ENTRIES   = 65536,
  parameter int unsigned BP_ENTRIES    = 262144,
  parameter int unsigned HIST_W        = 16,
  parameter int unsigned X_PCT         = 15,
  parameter int unsigned Y_PCT         = 65,
  parameter int unsigned DVFS_INTERVAL = 500000,
  parameter int unsigned DVFS_MODES    = 3,
  parameter int unsigned DCR_WINDOW    = 64,
  parameter int unsigned MAX_DELAY     = 2,
  localparam int unsigned BP_IDX_W     = $clog2(BP_ENTRIES)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                init_done,
  // configuration
  input  pwr_t                budget,
  input  logic                bblm_en,
  input  logic                dvfs_en,
  input  logic                ptt_en,
  input  logic                ptt_cp,
  // fetch group
  input  logic                fe_valid     [FETCH_W],
  input  pc_t                 fe_pc        [FETCH_W],
  input  logic                fe_branch    [FETCH_W],
  output tok_t                fe_tok       [FETCH_W],
  output logic                fe_delayable [FETCH_W],
  output logic                fe_allow     [FETCH_W],
  output logic [2:0]          fe_width,
  // branch prediction
  input  logic                bp_valid,
  input  pc_t                 bp_pc,
  output logic                bp_taken,
  output logic                bp_lowconf,
  output logic [BP_IDX_W-1:0] bp_idx,
  output logic [HIST_W-1:0]   bp_ghr,
  // branch resolution
  input  logic                br_valid,
  input  pc_t                 br_pc,
  input  logic [BP_IDX_W-1:0] br_idx,
  input  logic [HIST_W-1:0]   br_ghr,
  input  logic                br_taken,
  input  logic                br_mispred,
  input  logic [2:0]          lc_release,
  // decode / dispatch / issue
  input  logic [2:0]          dec_count,
  input  logic                dp_valid     [FETCH_W],
  input  ruu_idx_t            dp_ruu       [FETCH_W],
  input  logic                iq_old_valid,
  input  ruu_idx_t            iq_old_ruu,
  input  logic                iq_old_ready,
  input  logic                is_valid     [ISSUE_W],
  input  ruu_idx_t            is_ruu       [ISSUE_W],
  input  logic                is_delayable [ISSUE_W],
  output logic                is_ok        [ISSUE_W],
  // commit and squash
  input  logic                cm_valid     [COMMIT_W],
  input  pc_t                 cm_pc        [COMMIT_W],
  input  ruu_idx_t            cm_ruu       [COMMIT_W],
  input  grp_t                cm_grp       [COMMIT_W],
  input  tok_t                cm_tok_est   [COMMIT_W],
  input  logic                cm_branch    [COMMIT_W],
  input  logic [BP_IDX_W-1:0] cm_bp_idx    [COMMIT_W],
  input  pwr_t                squash_tok,
  input  logic                bb_flush,
  // status
  output pwr_t                power,
  output logic                over_budget,
  output bblm_level_e         level,
  output logic                ptt_stall,
  output logic                cp_holding,
  output logic                jrs_active,
  output logic                dcr_active,
  output mode_t               dvfs_mode,
  output logic                dvfs_busy,
  output tok_t                cm_tok       [COMMIT_W]
);
  // ---------------------------------------------------------------- tables
  logic init_ptht, init_cp, init_jrs, init_bp;
  logic cp_crit   [FETCH_W];
  logic cm_crit   [COMMIT_W];
  logic cm_over   [COMMIT_W];
  logic issued    [ISSUE_W];

  ptht #(.ENTRIES(PTHT_ENTRIES)) u_ptht (
    .clk, .rst_n, .init_done(init_ptht),
    .rd_pc(fe_pc), .rd_tok(fe_tok),
    .wr_en(cm_valid), .wr_pc(cm_pc), .wr_tok(cm_tok)
  );

  token_calc u_token_calc (
    .clk, .rst_n,
    .dp_valid, .dp_ruu,
    .cm_valid, .cm_ruu, .cm_grp, .cm_tok
  );

  crit_pred #(.ENTRIES(CP_ENTRIES)) u_crit_pred (
    .clk, .rst_n, .init_done(init_cp),
    .rd_pc(fe_pc), .rd_crit(cp_crit), .rd_delayable(fe_delayable),
    .wr_en(cm_valid), .wr_pc(cm_pc), .wr_crit(cm_crit), .wr_over(cm_over)
  );

  always_comb
    for (int i = 0; i < ISSUE_W; i++) issued[i] = is_valid[i] && is_ok[i];

  qold_marker u_qold (
    .clk,
    .dp_valid, .dp_ruu,
    .old_valid(iq_old_valid), .old_ruu(iq_old_ruu), .old_ready(iq_old_ready),
    .is_valid(issued), .is_ruu, .over_budget,
    .cm_ruu, .cm_crit, .cm_over
  );

  // ------------------------------------------------------ power estimation
  logic fe_in [FETCH_W];
  always_comb
    for (int i = 0; i < FETCH_W; i++) fe_in[i] = fe_valid[i] && fe_allow[i];

  token_meter u_token_meter (
    .clk, .rst_n,
    .in_valid(fe_in), .in_tok(fe_tok),
    .out_valid(cm_valid), .out_tok(cm_tok_est),
    .squash_tok, .budget, .power, .over_budget
  );

  // ------------------------------------------------- branch side and BBLM
  bbtok_t                bp_bb_tok;
  logic                  bw_valid;
  logic [BP_IDX_W-1:0]   bw_idx;
  bbtok_t                bw_tok;
  logic                  jrs_trig;
  logic [5:0]            lc_inflight;
  bblm_level_e           bblm_sel;

  gshare_bbp #(.ENTRIES(BP_ENTRIES), .HIST_W(HIST_W)) u_bp (
    .clk, .rst_n, .init_done(init_bp),
    .pr_valid(bp_valid), .pr_pc(bp_pc), .pr_taken(bp_taken), .pr_bb_tok(bp_bb_tok),
    .pr_idx(bp_idx), .pr_ghr(bp_ghr),
    .up_valid(br_valid), .up_idx(br_idx), .up_ghr(br_ghr), .up_taken(br_taken),
    .up_mispred(br_mispred),
    .bw_valid, .bw_idx, .bw_tok
  );

  bb_accum #(.IDX_W(BP_IDX_W)) u_bb_accum (
    .clk, .rst_n, .flush(bb_flush),
    .cm_valid, .cm_tok, .cm_branch, .cm_bp_idx,
    .bw_valid, .bw_idx, .bw_tok
  );

  jrs_conf #(.ENTRIES(JRS_ENTRIES)) u_jrs (
    .clk, .rst_n, .init_done(init_jrs),
    .pr_valid(bp_valid), .pr_pc(bp_pc), .pr_lowconf(bp_lowconf),
    .up_valid(br_valid), .up_pc(br_pc), .up_correct(!br_mispred),
    .lc_release, .lc_inflight, .trigger(jrs_trig)
  );

  bblm_ctrl #(.X_PCT(X_PCT), .Y_PCT(Y_PCT)) u_bblm (
    .clk, .rst_n, .en(bblm_en),
    .pr_valid(bp_valid), .pr_bb_tok(bp_bb_tok),
    .power, .budget, .over_budget,
    .level, .sel(bblm_sel)
  );

  // ---------------------------------------------------- front-end control
  logic [2:0] com_count;
  logic       dcr_trig;
  logic       thr_valid [FETCH_W];

  always_comb begin
    com_count = '0;
    for (int c = 0; c < COMMIT_W; c++) com_count += 3'(cm_valid[c]);
  end

  dcr_monitor #(.WINDOW(DCR_WINDOW)) u_dcr (
    .clk, .rst_n, .dec_count, .com_count, .trigger(dcr_trig)
  );

  fe_throttle #(.WIDTH(FETCH_W)) u_throttle (
    .clk, .rst_n,
    .jrs_en(level >= LVL_JRS), .jrs_trig,
    .dcr_en(level == LVL_DCR), .dcr_trig,
    .over_budget, .width(fe_width), .jrs_active, .dcr_active
  );

  always_comb
    for (int i = 0; i < FETCH_W; i++) thr_valid[i] = fe_valid[i] && (3'(i) < fe_width);

  ptt_gate u_ptt (
    .ptt_en, .cp_mode(ptt_cp), .power, .budget,
    .lane_valid(thr_valid), .lane_tok(fe_tok), .lane_branch(fe_branch),
    .lane_crit(cp_crit), .lane_allow(fe_allow), .stall(ptt_stall)
  );

  // ------------------------------------------------------ issue control
  cp_issue_gate #(.MAX_DELAY(MAX_DELAY)) u_cp_gate (
    .clk, .cp_active(level >= LVL_CP && over_budget),
    .dp_valid, .dp_ruu,
    .is_valid, .is_ruu, .is_delayable, .is_ok, .holding(cp_holding)
  );

  // ------------------------------------------------------ coarse level
  mode_t dvfs_target;
  logic  dvfs_interval_end;

  dvfs_ctrl #(.INTERVAL(DVFS_INTERVAL), .N_MODES(DVFS_MODES)) u_dvfs (
    .clk, .rst_n, .en(dvfs_en), .power, .budget,
    .mode(dvfs_mode), .target(dvfs_target), .busy(dvfs_busy),
    .interval_end(dvfs_interval_end)
  );

  assign init_done = init_ptht && init_cp && init_jrs && init_bp;
endmodule
