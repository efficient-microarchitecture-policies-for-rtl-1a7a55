// tb_power_manager: end-to-end test of the power-budget manager at its
// default sizes (8K-entry history and criticality tables, 64K-entry
// confidence table, 256K-entry predictor, 500K-cycle DVFS interval).
//
// A behavioural model of a 4-wide out-of-order core runs a synthetic loop of
// 48 instructions with 6 branches: it fetches groups up to the first branch,
// dispatches them into a 128-entry RUU, issues ready instructions (some
// suffer 40-cycle misses), resolves branches with data-dependent outcomes,
// commits in order and occasionally squashes its youngest instructions.  It
// honours fe_allow, fe_width and is_ok and carries the per-instruction values
// the manager hands out.
//
// Checked every cycle against values the model computes itself:
//   * the token cost at commit (group base + cycles in the RUU);
//   * the history-table estimate at fetch (last committed cost of that PC);
//   * the power estimate (sum of the estimates of instructions in flight);
//   * with PTT on, that non-branch, non-critical instructions were admitted
//     only while they fit the budget.
// Phases vary the budget and switch PTT and its CP variant on and off.  Each
// mechanism must occur at least once: over-budget cycles, every BBLM level,
// level release, critical-path holds, JRS and DCR throttling, a PTT stall,
// a squash, a misprediction, a stored block power read back, a DVFS switch.
`include "tb_util.svh"
module tb_power_manager;
  import pt_pkg::*;
  localparam int unsigned BPW = 18;
  localparam int unsigned HW  = 16;
  localparam int unsigned LOOP = 48;
  localparam int unsigned RUN  = 520000;
  localparam int unsigned BASE [8] = '{1, 2, 3, 4, 6, 8, 12, 16};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // DUT ports
  logic init_done;
  pwr_t budget;
  logic bblm_en, dvfs_en, ptt_en, ptt_cp;
  logic fe_valid [4], fe_branch [4], fe_delayable [4], fe_allow [4];
  pc_t  fe_pc [4];
  tok_t fe_tok [4];
  logic [2:0] fe_width;
  logic bp_valid, bp_taken, bp_lowconf;
  pc_t  bp_pc;
  logic [BPW-1:0] bp_idx;
  logic [HW-1:0]  bp_ghr;
  logic br_valid, br_taken, br_mispred;
  pc_t  br_pc;
  logic [BPW-1:0] br_idx;
  logic [HW-1:0]  br_ghr;
  logic [2:0] lc_release, dec_count;
  logic dp_valid [4];
  ruu_idx_t dp_ruu [4];
  logic iq_old_valid, iq_old_ready;
  ruu_idx_t iq_old_ruu;
  logic is_valid [4], is_delayable [4], is_ok [4];
  ruu_idx_t is_ruu [4];
  logic cm_valid [4], cm_branch [4];
  pc_t  cm_pc [4];
  ruu_idx_t cm_ruu [4];
  grp_t cm_grp [4];
  tok_t cm_tok_est [4], cm_tok [4];
  logic [BPW-1:0] cm_bp_idx [4];
  pwr_t squash_tok, power;
  logic bb_flush, over_budget, ptt_stall, cp_holding, jrs_active, dcr_active, dvfs_busy;
  bblm_level_e level;
  mode_t dvfs_mode;

  power_manager dut (.*);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("watchdog"); `TB_FINISH end

  // ------------------------------------------------------------ core model
  typedef struct {
    logic           v;
    int             pc;
    int             grp;
    int             tok;
    logic           br;
    logic [BPW-1:0] bidx;
    logic [HW-1:0]  bghr;
    logic           ptaken;
    logic           lowc;
    logic           dly;
    logic           iss;
    int             disp;
    int             ready;
    int             done;
  } ent_t;

  ent_t win [RUU_SIZE];
  int head = 0, count = 0, fpc = 0, now = 0, mpower = 0;
  int last_tok [LOOP];
  int iter [LOOP];

  // mechanism counters
  int n_over = 0, n_lvl [4] = '{0, 0, 0, 0}, n_release = 0, n_cphold = 0;
  int n_jrs = 0, n_dcr = 0, n_ptt = 0, n_squash = 0, n_mispred = 0, n_bbtok = 0;
  int n_dvfs = 0, n_commit = 0, n_width = 0;

  function automatic logic is_br_pc(int pc);
    return (pc % 8) == 7;
  endfunction
  function automatic int grp_of(int pc);
    return (pc * 5 + pc / 8) % 8;
  endfunction
  function automatic logic outcome(int pc, int it);
    // most branches are biased; pc 23 follows a pattern the history can learn,
    // pc 39 is data-dependent
    if (pc == 47) return 1'b1;
    if (pc == 39) return ($urandom % 2) == 1;
    if (pc == 23) return (it % 3) == 0;
    return (it % 16) != 0;
  endfunction

  initial begin
    int prev_lvl, prev_mode;
    foreach (win[i]) win[i].v = 0;
    foreach (last_tok[i]) begin last_tok[i] = 4; iter[i] = 0; end
    budget = 120; bblm_en = 1; dvfs_en = 1; ptt_en = 0; ptt_cp = 0;
    foreach (fe_valid[i]) begin
      fe_valid[i] = 0; fe_pc[i] = '0; fe_branch[i] = 0; dp_valid[i] = 0; dp_ruu[i] = '0;
      is_valid[i] = 0; is_ruu[i] = '0; is_delayable[i] = 0; cm_valid[i] = 0; cm_pc[i] = '0;
      cm_ruu[i] = '0; cm_grp[i] = '0; cm_tok_est[i] = '0; cm_branch[i] = 0; cm_bp_idx[i] = '0;
    end
    bp_valid = 0; bp_pc = '0; br_valid = 0; br_pc = '0; br_idx = '0; br_ghr = '0; br_taken = 0;
    br_mispred = 0; lc_release = 0; dec_count = 0; iq_old_valid = 0; iq_old_ready = 0;
    iq_old_ruu = '0; squash_tok = '0; bb_flush = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    begin
      int wait_cyc; wait_cyc = 0;
      while (!init_done) begin @(posedge clk); #1 wait_cyc++; end
      `CHECK(wait_cyc == 262144, $sformatf("table clear took %0d cycles", wait_cyc))
    end
    prev_lvl = 0; prev_mode = 0;

    for (now = 0; now < RUN; now++) begin
      int ncm, nis, nfe, brl, sq_n, sq_tok, lcrel;
      logic squash_now, br_in_issue;

      // phases
      if (now < 30000)       begin budget = 120; ptt_en = 0; ptt_cp = 0; end
      else if (now < 45000)  begin budget = 700; ptt_en = 0; end
      else if (now < 60000)  begin budget = 150; ptt_en = 1; ptt_cp = 1; end
      else if (now < 75000)  begin budget = 100; ptt_en = 1; ptt_cp = 0; end
      else                   begin budget = 120; ptt_en = 0; ptt_cp = 0; end

      // ---- commit: up to 4 oldest finished instructions
      ncm = 0;
      foreach (cm_valid[c]) cm_valid[c] = 0;
      for (int k = 0; k < 4 && k < count; k++) begin
        int e; e = (head + k) % RUU_SIZE;
        if (!(win[e].iss && win[e].done <= now)) break;
        cm_valid[k] = 1; cm_pc[k] = pc_t'(win[e].pc * 4); cm_ruu[k] = ruu_idx_t'(e);
        cm_grp[k] = grp_t'(win[e].grp); cm_tok_est[k] = tok_t'(win[e].tok);
        cm_branch[k] = win[e].br; cm_bp_idx[k] = win[e].bidx;
        ncm++;
      end

      // ---- issue candidates and oldest waiting entry
      nis = 0; br_in_issue = 0; iq_old_valid = 0; iq_old_ready = 0;
      foreach (is_valid[i]) is_valid[i] = 0;
      for (int k = 0; k < count; k++) begin
        int e; e = (head + k) % RUU_SIZE;
        if (win[e].iss) continue;
        if (!iq_old_valid) begin
          iq_old_valid = 1; iq_old_ruu = ruu_idx_t'(e); iq_old_ready = win[e].ready <= now;
        end
        if (nis < 4 && win[e].ready <= now && !(win[e].br && br_in_issue)) begin
          is_valid[nis] = 1; is_ruu[nis] = ruu_idx_t'(e); is_delayable[nis] = win[e].dly;
          if (win[e].br) br_in_issue = 1;
          nis++;
        end
      end

      // ---- squash now and then (youngest not-yet-issued instructions)
      squash_now = (now % 997 == 500) && count > 8;
      sq_tok = 0; sq_n = 0;

      // ---- fetch group up to the first branch
      nfe = 0; brl = -1;
      foreach (fe_valid[i]) begin fe_valid[i] = 0; fe_branch[i] = 0; end
      if (!squash_now && count + 4 + ncm <= RUU_SIZE + ncm && count <= RUU_SIZE - 4) begin
        for (int i = 0; i < 4; i++) begin
          int pc; pc = (fpc + i) % LOOP;
          fe_valid[i] = 1; fe_pc[i] = pc_t'(pc * 4); fe_branch[i] = is_br_pc(pc);
          nfe++;
          if (is_br_pc(pc)) begin brl = i; break; end
        end
      end
      bp_valid = 0; br_valid = 0; lc_release = 0; bb_flush = 0;
      #1;
      if (brl >= 0 && fe_allow[brl]) begin bp_valid = 1; bp_pc = fe_pc[brl]; end
      // dispatch = admitted fetch lanes (in order)
      dec_count = 0;
      foreach (dp_valid[i]) begin
        dp_valid[i] = fe_valid[i] && fe_allow[i];
        dp_ruu[i] = ruu_idx_t'((head + count + i) % RUU_SIZE);
        if (dp_valid[i]) dec_count++;
      end
      // resolve the issued branch, if any
      lcrel = 0;
      foreach (is_valid[i]) if (is_valid[i] && is_ok[i] && win[is_ruu[i]].br) begin
        int e; logic act;
        e = is_ruu[i];
        act = outcome(win[e].pc, iter[win[e].pc]);
        iter[win[e].pc]++;
        br_valid = 1; br_pc = pc_t'(win[e].pc * 4); br_idx = win[e].bidx; br_ghr = win[e].bghr;
        br_taken = act; br_mispred = act != win[e].ptaken;
        if (br_mispred) n_mispred++;
        if (win[e].lowc) lcrel++;
      end
      if (squash_now) begin
        for (int k = count - 1; k >= 0 && sq_n < 8; k--) begin
          int e; e = (head + k) % RUU_SIZE;
          if (win[e].iss) break;
          sq_tok += win[e].tok; sq_n++;
          if (win[e].br && win[e].lowc) lcrel++;
        end
      end
      squash_tok = pwr_t'(sq_tok);
      lc_release = 3'(lcrel);
      #1;

      // ---- checks on this cycle's combinational answers
      foreach (cm_valid[c]) if (cm_valid[c]) begin
        int e, exp_t;
        e = cm_ruu[c];
        exp_t = BASE[win[e].grp] + (now - win[e].disp);
        if (exp_t > 255) exp_t = 255;
        `CHECK(cm_tok[c] == tok_t'(exp_t), $sformatf("commit tokens %0d expected %0d", cm_tok[c], exp_t))
      end
      foreach (fe_valid[i]) if (fe_valid[i])
        `CHECK(fe_tok[i] == tok_t'(last_tok[fe_pc[i] / 4]), "history-table estimate at fetch")
      `CHECK(power == pwr_t'(mpower), $sformatf("power %0d expected %0d", power, mpower))
      `CHECK(over_budget == (mpower > budget), "over-budget flag")
      begin
        int run; logic blocked; run = mpower; blocked = 0;
        foreach (fe_valid[i]) if (fe_valid[i]) begin
          if (3'(i) >= fe_width) `CHECK(!fe_allow[i], "lane beyond throttled width admitted")
          if (ptt_en && fe_allow[i] && !fe_branch[i] && !ptt_cp)
            `CHECK(run + fe_tok[i] <= budget, "PTT admitted an instruction over budget")
          if (fe_allow[i]) run += fe_tok[i];
        end
      end
      if (bp_valid && bp_bb_tok_seen()) n_bbtok++;

      // ---- mechanism counters
      if (over_budget) n_over++;
      n_lvl[int'(level)]++;
      if (int'(level) < prev_lvl) n_release++;
      prev_lvl = int'(level);
      if (cp_holding) n_cphold++;
      if (jrs_active) n_jrs++;
      if (dcr_active) n_dcr++;
      if (ptt_stall) n_ptt++;
      if (fe_width < 4) n_width++;
      if (squash_now) n_squash++;
      if (int'(dvfs_mode) != prev_mode) n_dvfs++;
      prev_mode = int'(dvfs_mode);

      // ---- update the model
      foreach (cm_valid[c]) if (cm_valid[c]) begin
        int e; e = cm_ruu[c];
        last_tok[win[e].pc] = cm_tok[c];
        mpower -= win[e].tok;
        win[e].v = 0;
        n_commit++;
      end
      head = (head + ncm) % RUU_SIZE; count -= ncm;
      foreach (is_valid[i]) if (is_valid[i] && is_ok[i]) begin
        int e; e = is_ruu[i];
        win[e].iss = 1;
        win[e].done = now + 1 + (($urandom % 10 == 0) ? 40 : ($urandom % 3));
      end
      if (squash_now) begin
        count -= sq_n; mpower -= sq_tok;
        fpc = win[(head + count) % RUU_SIZE].pc;
      end else begin
        foreach (dp_valid[i]) if (dp_valid[i]) begin
          int e; e = dp_ruu[i];
          win[e].v = 1; win[e].pc = fe_pc[i] / 4; win[e].grp = grp_of(fe_pc[i] / 4);
          win[e].tok = fe_tok[i]; win[e].br = fe_branch[i]; win[e].dly = fe_delayable[i];
          win[e].iss = 0; win[e].disp = now; win[e].ready = now + 1 + ($urandom % 4);
          win[e].lowc = 0;
          if (fe_branch[i]) begin
            win[e].bidx = bp_idx; win[e].bghr = bp_ghr; win[e].ptaken = bp_taken;
            win[e].lowc = bp_lowconf;
          end
          mpower += fe_tok[i];
          count++;
          fpc = (fe_pc[i] / 4 + 1) % LOOP;
        end
      end
      @(posedge clk); #1;
    end

    $display("cycles=%0d commits=%0d over=%0d lvl=%0d/%0d/%0d/%0d release=%0d cphold=%0d jrs=%0d dcr=%0d width<4=%0d ptt=%0d squash=%0d mispred=%0d bbtok=%0d dvfs=%0d mode=%0d",
             RUN, n_commit, n_over, n_lvl[0], n_lvl[1], n_lvl[2], n_lvl[3], n_release, n_cphold,
             n_jrs, n_dcr, n_width, n_ptt, n_squash, n_mispred, n_bbtok, n_dvfs, dvfs_mode);
    `CHECK(n_commit > 1000, "instructions committed")
    `CHECK(n_over > 0, "over-budget cycles")
    `CHECK(n_lvl[1] > 0 && n_lvl[2] > 0 && n_lvl[3] > 0, "every BBLM level used")
    `CHECK(n_release > 0, "BBLM level released")
    `CHECK(n_cphold > 0, "critical-path delay")
    `CHECK(n_jrs > 0, "JRS throttling")
    `CHECK(n_dcr > 0, "DCR throttling")
    `CHECK(n_ptt > 0, "PTT fetch stall")
    `CHECK(n_squash > 0, "squash")
    `CHECK(n_mispred > 0, "branch misprediction")
    `CHECK(n_bbtok > 0, "stored basic-block power read back")
    `CHECK(n_dvfs > 0, "DVFS mode switch")
    `TB_FINISH
  end

  function automatic logic bp_bb_tok_seen();
    return dut.bp_bb_tok != '0;
  endfunction
endmodule
