// tb_qold_marker: self-checking test of QOld marking.
// Random dispatches, oldest-entry reports and issues are applied; a
// reference keeps per-entry critical and over-budget bits (cleared on
// dispatch, critical set when the reported oldest is not ready, over-budget
// sampled at issue) and the commit-side outputs are compared.
`include "tb_util.svh"
module tb_qold_marker;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic dp_valid [4], is_valid [4], cm_crit [4], cm_over [4];
  ruu_idx_t dp_ruu [4], is_ruu [4], cm_ruu [4];
  logic old_valid, old_ready, over_budget;
  ruu_idx_t old_ruu;
  logic rc [RUU_SIZE], ro [RUU_SIZE], init [RUU_SIZE];
  int n_crit = 0;

  qold_marker dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    foreach (init[i]) init[i] = 0;
    foreach (dp_valid[i]) begin dp_valid[i] = 0; is_valid[i] = 0; dp_ruu[i] = '0; is_ruu[i] = '0; cm_ruu[i] = '0; end
    old_valid = 0; old_ready = 0; old_ruu = '0; over_budget = 0;
    for (int t = 0; t < 4000; t++) begin
      logic used [RUU_SIZE];
      foreach (used[i]) used[i] = 0;
      foreach (dp_valid[d]) begin
        int e; e = $urandom % RUU_SIZE;
        dp_valid[d] = !used[e] && $urandom % 3 == 0;
        if (dp_valid[d]) used[e] = 1;
        dp_ruu[d] = ruu_idx_t'(e);
      end
      foreach (is_valid[i]) begin
        int e; e = $urandom % RUU_SIZE;
        is_valid[i] = !used[e] && $urandom % 3 == 0;
        if (is_valid[i]) used[e] = 1;
        is_ruu[i] = ruu_idx_t'(e);
        cm_ruu[i] = ruu_idx_t'($urandom % RUU_SIZE);
      end
      begin
        int e; e = $urandom % RUU_SIZE;
        old_valid = !used[e] && $urandom % 2 == 0; old_ruu = ruu_idx_t'(e);
        old_ready = $urandom % 2 == 0;
      end
      over_budget = $urandom % 2 == 0;
      #1;
      foreach (cm_ruu[c]) if (init[cm_ruu[c]]) begin
        `CHECK(cm_crit[c] == rc[cm_ruu[c]], "critical bit")
        `CHECK(cm_over[c] == ro[cm_ruu[c]], "over bit")
        if (cm_crit[c]) n_crit++;
      end
      if (old_valid && !old_ready) rc[old_ruu] = 1;
      foreach (is_valid[i]) if (is_valid[i]) ro[is_ruu[i]] = over_budget;
      foreach (dp_valid[d]) if (dp_valid[d]) begin rc[dp_ruu[d]] = 0; ro[dp_ruu[d]] = 0; init[dp_ruu[d]] = 1; end
      @(posedge clk); #1;
    end
    `CHECK(n_crit > 0, "critical marks seen")
    `TB_FINISH
  end
endmodule
