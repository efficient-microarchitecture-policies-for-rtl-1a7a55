// tb_ptt_gate: self-checking test of Power-Token Throttling admission.
// Random fetch groups are compared with an in-order reference: a lane enters
// if all older valid lanes entered and its tokens fit the remaining budget,
// or it is a branch, or (CP mode) it is predicted critical.
`include "tb_util.svh"
module tb_ptt_gate;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic ptt_en, cp_mode;
  pwr_t power, budget;
  logic lane_valid [4], lane_branch [4], lane_crit [4], lane_allow [4];
  tok_t lane_tok [4];
  logic stall;
  int n_stall = 0, n_branch_pass = 0;

  ptt_gate dut (.*);

  initial begin #1000000; failures++; `TB_FINISH end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int run; logic blk, exp_a [4], exp_s;
      ptt_en = $urandom % 8 != 0; cp_mode = $urandom % 2 == 1;
      budget = pwr_t'(200 + $urandom % 200);
      power  = pwr_t'($urandom % 420);
      foreach (lane_valid[i]) begin
        lane_valid[i] = $urandom % 8 != 0; lane_tok[i] = tok_t'($urandom % 40);
        lane_branch[i] = $urandom % 6 == 0; lane_crit[i] = $urandom % 4 == 0;
      end
      #1;
      run = power; blk = 0; exp_s = 0;
      for (int i = 0; i < 4; i++) begin
        logic ok;
        ok = !ptt_en || (run + lane_tok[i] <= budget) || lane_branch[i] || (cp_mode && lane_crit[i]);
        exp_a[i] = lane_valid[i] && !blk && ok;
        if (lane_valid[i] && !exp_a[i]) begin blk = 1; exp_s = 1; end
        if (exp_a[i]) run += lane_tok[i];
        if (exp_a[i] && ptt_en && run > budget) n_branch_pass++;
        `CHECK(lane_allow[i] == exp_a[i], $sformatf("lane %0d allow", i))
      end
      `CHECK(stall == exp_s, "stall flag")
      if (stall) n_stall++;
    end
    `CHECK(n_stall > 0 && n_branch_pass > 0, "stall and exemption both exercised")
    `TB_FINISH
  end
endmodule
