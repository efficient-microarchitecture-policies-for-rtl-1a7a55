// tb_budget_sweep: power-budget sweep in the manner of the original
// evaluation.  The behavioural 4-wide core of tb_power_manager runs the same
// synthetic loop under four configurations:
//   BASE    no technique (power is only measured)
//   BBLM    Basic Block Level Manager alone
//   2LVL    limited DVFS + BBLM (the two-level scheme)
//   PTTCP   BBLM + Power-Token Throttling with critical instructions exempt
// and budgets of 95, 80, 70, 60, 50 and 40 % of the peak estimate seen in a
// first unconstrained run.  For every run it reports the fraction of cycles
// over the budget, the area over the budget (sum of the excess power, with
// power scaled by V^2 f of the current DVFS mode) and instructions committed.
// It checks every cycle that the power estimate equals the model's sum of
// in-flight estimates, and at the end that PTT removes most of the area over
// the budget, that the level manager engages wherever the budget is exceeded
// that the level manager lowers per-cycle activity (one token per waiting
// instruction plus each issue's base cost) where it engages, and that only
// the two-level runs leave the nominal DVFS mode.  The BBLM
// rows are reported, not judged: delaying and throttling slow a window-full
// core without emptying it, and because residency is part of every token
// cost, the in-flight estimate this table measures can rise under them.
// Sizes are reduced (4K-entry predictor and confidence table, 5000-cycle
// DVFS interval) so that the 25 runs finish in seconds.
`include "tb_util.svh"
module tb_budget_sweep;
  import pt_pkg::*;
  localparam int unsigned BPW = 12;
  localparam int unsigned HW  = 12;
  localparam int unsigned LOOP = 48;
  localparam int unsigned RUN  = 20000;
  localparam int unsigned MISS_PCT = 2;
  localparam int unsigned NB = 6, NC = 4;
  localparam int unsigned PCT [NB] = '{95, 80, 70, 60, 50, 40};
  localparam int unsigned F [5] = '{1000000, 857375, 729000, 607500, 526500};

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

  power_manager #(.JRS_ENTRIES(4096), .BP_ENTRIES(4096), .HIST_W(HW),
                  .DVFS_INTERVAL(5000)) dut (.*);

  always #5 clk = ~clk;
  // watchdog: 5M cycles, about ten times what the 25 runs need
  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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


  longint area [NB][NC];
  int     over [NB][NC];
  int     done [NB][NC];
  int     peak;
  int     lvl_cyc [NB][NC];
  int     low_mode [NB][NC];
  int     g_lvl, g_mode;
  longint act [NB][NC];
  longint g_act;
  localparam int unsigned BASE [8] = '{1, 2, 3, 4, 6, 8, 12, 16};

  task automatic run_one(input int cfg, input int bgt, output longint a, output int ov,
                         output int cm, output int pk);
    a = 0; ov = 0; cm = 0; pk = 0; g_lvl = 0; g_mode = 0; g_act = 0;
    rst_n = 0;
    foreach (win[i]) win[i].v = 0;
    foreach (last_tok[i]) begin last_tok[i] = 4; iter[i] = 0; end
    head = 0; count = 0; fpc = 0; mpower = 0;
    budget = pwr_t'(bgt);
    bblm_en = cfg != 0; dvfs_en = cfg == 2; ptt_en = cfg == 3; ptt_cp = cfg == 3;
    foreach (fe_valid[i]) begin
      fe_valid[i] = 0; dp_valid[i] = 0; is_valid[i] = 0; cm_valid[i] = 0;
    end
    bp_valid = 0; br_valid = 0; lc_release = 0; dec_count = 0; iq_old_valid = 0;
    squash_tok = '0; bb_flush = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!init_done) begin @(posedge clk); #1; end
    for (now = 0; now < RUN; now++) begin
      int ncm, nis, brl, sq_n, sq_tok, lcrel;
      logic squash_now, br_in_issue;
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
      squash_now = (now % 997 == 500) && count > 8;
      sq_tok = 0; sq_n = 0; brl = -1;
      foreach (fe_valid[i]) begin fe_valid[i] = 0; fe_branch[i] = 0; end
      if (!squash_now && count <= RUU_SIZE - 4) begin
        for (int i = 0; i < 4; i++) begin
          int pc; pc = (fpc + i) % LOOP;
          fe_valid[i] = 1; fe_pc[i] = pc_t'(pc * 4); fe_branch[i] = is_br_pc(pc);
          if (is_br_pc(pc)) begin brl = i; break; end
        end
      end
      bp_valid = 0; br_valid = 0; lc_release = 0;
      #1;
      if (brl >= 0 && fe_allow[brl]) begin bp_valid = 1; bp_pc = fe_pc[brl]; end
      dec_count = 0;
      foreach (dp_valid[i]) begin
        dp_valid[i] = fe_valid[i] && fe_allow[i];
        dp_ruu[i] = ruu_idx_t'((head + count + i) % RUU_SIZE);
        if (dp_valid[i]) dec_count++;
      end
      lcrel = 0;
      foreach (is_valid[i]) if (is_valid[i] && is_ok[i] && win[is_ruu[i]].br) begin
        int e; logic act;
        e = is_ruu[i];
        act = outcome(win[e].pc, iter[win[e].pc]);
        iter[win[e].pc]++;
        br_valid = 1; br_pc = pc_t'(win[e].pc * 4); br_idx = win[e].bidx; br_ghr = win[e].bghr;
        br_taken = act; br_mispred = act != win[e].ptaken;
        if (win[e].lowc) lcrel++;
      end
      if (squash_now)
        for (int k = count - 1; k >= 0 && sq_n < 8; k--) begin
          int e; e = (head + k) % RUU_SIZE;
          if (win[e].iss) break;
          sq_tok += win[e].tok; sq_n++;
          if (win[e].br && win[e].lowc) lcrel++;
        end
      squash_tok = pwr_t'(sq_tok);
      lc_release = 3'(lcrel);
      #1;
      `CHECK(power == pwr_t'(mpower), $sformatf("power %0d expected %0d", power, mpower))
      begin
        longint preal;
        preal = longint'(power) * F[dvfs_mode] / F[0];
        if (preal > bgt) begin ov++; a += preal - bgt; end
        if (power > pk) pk = power;
        if (level != LVL_NONE) g_lvl++;
        // activity: one token per waiting instruction plus the base cost of each issue
        g_act += count;
        foreach (is_valid[i]) if (is_valid[i] && is_ok[i]) g_act += BASE[win[is_ruu[i]].grp];
        if (int'(dvfs_mode) > g_mode) g_mode = int'(dvfs_mode);
      end
      foreach (cm_valid[c]) if (cm_valid[c]) begin
        int e; e = cm_ruu[c];
        last_tok[win[e].pc] = cm_tok[c];
        mpower -= win[e].tok; win[e].v = 0; cm++;
      end
      head = (head + ncm) % RUU_SIZE; count -= ncm;
      foreach (is_valid[i]) if (is_valid[i] && is_ok[i]) begin
        int e; e = is_ruu[i];
        win[e].iss = 1;
        win[e].done = now + 1 + (($urandom % 100 < MISS_PCT) ? 40 : ($urandom % 3));
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
          mpower += fe_tok[i]; count++;
          fpc = (fe_pc[i] / 4 + 1) % LOOP;
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    longint a; int ov, cm, pk;
    foreach (fe_pc[i]) begin fe_pc[i] = '0; dp_ruu[i] = '0; is_ruu[i] = '0; is_delayable[i] = 0;
      cm_pc[i] = '0; cm_ruu[i] = '0; cm_grp[i] = '0; cm_tok_est[i] = '0; cm_branch[i] = 0; cm_bp_idx[i] = '0; end
    bp_pc = '0; br_pc = '0; br_idx = '0; br_ghr = '0; br_taken = 0; br_mispred = 0; iq_old_ruu = '0;
    run_one(0, 65535, a, ov, cm, pk);
    peak = pk;
    $display("peak estimate %0d tokens, %0d instructions in %0d cycles", peak, cm, RUN);
    `CHECK(peak > 0, "nonzero peak")
    $display(" PB%%  config  cycles>PB%%    area>PB   committed  lvl>0  mode  act/cyc");
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < NC; c++) begin
        run_one(c, peak * PCT[b] / 100, area[b][c], over[b][c], done[b][c], pk);
        lvl_cyc[b][c] = g_lvl; low_mode[b][c] = g_mode; act[b][c] = g_act;
        $display(" %3d  %-6s  %9.2f  %10d  %9d  %6d  %4d  %7.1f", PCT[b], c == 0 ? "BASE" : c == 1 ? "BBLM" : c == 2 ? "2LVL" : "PTTCP",
                 100.0 * over[b][c] / RUN, area[b][c], done[b][c], lvl_cyc[b][c], low_mode[b][c],
                 real'(act[b][c]) / RUN);
      end
    for (int b = 0; b < NB; b++) begin
      // PTT bounds the estimate at fetch, so it must remove most of the excess
      if (area[b][0] > 0) begin
        `CHECK(area[b][3] * 2 <= area[b][0], $sformatf("PTT(CP) area at %0d%%", PCT[b]))
        `CHECK(over[b][3] < over[b][0], $sformatf("PTT(CP) cycles over budget at %0d%%", PCT[b]))
      end
      // wherever the budget is exceeded the level manager must engage
      if (over[b][0] > RUN / 10) begin
        `CHECK(lvl_cyc[b][1] > 0 && lvl_cyc[b][2] > 0, $sformatf("BBLM engaged at %0d%%", PCT[b]))
        `CHECK(act[b][1] < act[b][0], $sformatf("BBLM lowers activity at %0d%%", PCT[b]))
      end
      // without DVFS the mode never leaves nominal
      `CHECK(low_mode[b][0] == 0 && low_mode[b][1] == 0 && low_mode[b][3] == 0, "mode without DVFS")
    end
    // tight budgets drive the two-level scheme into its slowest limited mode
    `CHECK(low_mode[NB-1][2] == 2, "two-level scheme reached mode 2 at the tightest budget")
    `CHECK(area[NB-1][0] > 0, "tightest budget exceeded without techniques")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
