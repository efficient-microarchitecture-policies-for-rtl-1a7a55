// tb_cp_issue_gate: self-checking test of critical-path issue delaying.
// Delayable candidates are presented every cycle while the technique is
// active: each must be refused exactly MAX_DELAY (=3 here) times and then
// allowed.  Non-delayable candidates and an inactive technique never hold.
// A re-dispatch clears the wait count.
`include "tb_util.svh"
module tb_cp_issue_gate;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, cp_active, holding;
  logic dp_valid [4], is_valid [4], is_delayable [4], is_ok [4];
  ruu_idx_t dp_ruu [4], is_ruu [4];
  int waited [RUU_SIZE];
  int n_hold = 0;

  cp_issue_gate #(.MAX_DELAY(3)) dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    foreach (dp_valid[i]) begin dp_valid[i] = 0; is_valid[i] = 0; is_delayable[i] = 0; dp_ruu[i] = '0; is_ruu[i] = '0; end
    cp_active = 0;
    foreach (waited[i]) waited[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      logic used [RUU_SIZE];
      logic exp_h;
      foreach (used[i]) used[i] = 0;
      cp_active = (t < 100) ? 1'b1 : ($urandom % 4 != 0);
      foreach (dp_valid[d]) begin
        int e; e = $urandom % 32;
        if (t < 8) e = t * 4 + d;
        dp_valid[d] = t < 8 ? 1'b1 : (!used[e] && $urandom % 4 == 0);
        if (dp_valid[d]) used[e] = 1;
        dp_ruu[d] = ruu_idx_t'(e);
      end
      exp_h = 0;
      foreach (is_valid[i]) begin
        int e; e = $urandom % 32;
        is_valid[i] = t >= 8 && !used[e];
        if (is_valid[i]) used[e] = 1;
        is_ruu[i] = ruu_idx_t'(e);
        is_delayable[i] = $urandom % 3 != 0;
      end
      #1;
      foreach (is_valid[i]) if (is_valid[i]) begin
        logic exp_ok;
        exp_ok = !(cp_active && is_delayable[i] && waited[is_ruu[i]] < 3);
        `CHECK(is_ok[i] == exp_ok, $sformatf("issue ok entry %0d waited %0d", is_ruu[i], waited[is_ruu[i]]))
        if (!exp_ok) begin waited[is_ruu[i]]++; exp_h = 1; end
      end
      `CHECK(holding == exp_h, "holding flag")
      if (exp_h) n_hold++;
      foreach (dp_valid[d]) if (dp_valid[d]) waited[dp_ruu[d]] = 0;
      @(posedge clk); #1;
    end
    `CHECK(n_hold > 0, "instructions were delayed")
    `TB_FINISH
  end
endmodule
