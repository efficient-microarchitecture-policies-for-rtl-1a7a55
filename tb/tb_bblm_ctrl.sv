// tb_bblm_ctrl: self-checking test of the Basic Block Level Manager.
// Directed forecasts check the X=15% / Y=65% boundaries exactly (budget 200:
// excess 29 -> critical path, 30 -> JRS, 129 -> JRS, 130 -> DCR).  Then a
// random run compares the level with a reference that raises it on a higher
// forecast and, while the power is at or under budget, lowers it one level
// every 3 cycles.
`include "tb_util.svh"
module tb_bblm_ctrl;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, pr_valid, over_budget;
  bbtok_t pr_bb_tok;
  pwr_t power, budget;
  bblm_level_e level, sel;
  int lvl = 0, dc = 0;
  int seen [4] = '{0, 0, 0, 0};
  int n_down = 0;

  bblm_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  function automatic int ref_sel(int p, int b, int bb);
    int est, ex;
    est = p + bb;
    if (est <= b) return 0;
    ex = (est - b) * 100;
    if (ex < 15 * b) return 1;
    if (ex < 65 * b) return 2;
    return 3;
  endfunction

  initial begin
    en = 0; pr_valid = 0; pr_bb_tok = 0; power = 0; budget = 200; over_budget = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    power = 150;
    pr_bb_tok = 50;  #1 `CHECK(sel == LVL_NONE, "at budget -> none")
    pr_bb_tok = 79;  #1 `CHECK(sel == LVL_CP,   "14.5% -> CP")
    pr_bb_tok = 80;  #1 `CHECK(sel == LVL_JRS,  "15% -> JRS")
    pr_bb_tok = 179; #1 `CHECK(sel == LVL_JRS,  "64.5% -> JRS")
    pr_bb_tok = 180; #1 `CHECK(sel == LVL_DCR,  "65% -> DCR")
    en = 1;
    for (int t = 0; t < 6000; t++) begin
      int s;
      pr_valid = $urandom % 4 == 0;
      budget = 200;
      power = pwr_t'(100 + $urandom % 200);
      pr_bb_tok = bbtok_t'($urandom % 200);
      over_budget = (t / 50) % 2 == 0 ? ($urandom % 4 != 0) : ($urandom % 8 == 0);
      if (t == 5000) en = 0;
      if (t == 5010) en = 1;
      #1;
      s = ref_sel(power, budget, pr_bb_tok);
      `CHECK(int'(sel) == s, "selection")
      `CHECK(int'(level) == lvl, $sformatf("level %0d expected %0d", level, lvl))
      seen[lvl]++;
      if (!en) begin lvl = 0; dc = 0; end
      else if (pr_valid && s > lvl) begin lvl = s; dc = 0; end
      else if (!over_budget && lvl != 0) begin
        if (dc == 2) begin lvl--; dc = 0; n_down++; end else dc++;
      end else dc = 0;
      @(posedge clk); #1;
    end
    `CHECK(seen[0] > 0 && seen[1] > 0 && seen[2] > 0 && seen[3] > 0 && n_down > 0, "all levels and releases seen")
    `TB_FINISH
  end
endmodule
