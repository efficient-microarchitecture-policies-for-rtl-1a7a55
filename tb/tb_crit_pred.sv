// tb_crit_pred: self-checking test of the critical path predictor.
// A 64-entry table is trained through four commit ports with random PCs,
// criticality and over-budget bits; a reference model applies +8 (saturating
// at 63) / -1 (saturating at 0) and the predictions (critical when the counter
// is at least 8; delayable when non-critical and last over budget) are checked
// on all four lookup ports.  Each write lane uses a distinct entry.
`include "tb_util.svh"
module tb_crit_pred;
  import pt_pkg::*;
  localparam int unsigned N = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init_done;
  pc_t  rd_pc [4];
  logic rd_crit [4], rd_delayable [4];
  logic wr_en [4], wr_crit [4], wr_over [4];
  pc_t  wr_pc [4];
  int   cnt [N];
  logic ovr [N];
  int   n_crit = 0, n_dly = 0;

  crit_pred #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    foreach (wr_en[p]) begin wr_en[p] = 0; wr_pc[p] = '0; wr_crit[p] = 0; wr_over[p] = 0; rd_pc[p] = '0; end
    foreach (cnt[i]) begin cnt[i] = 0; ovr[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (init_done); @(posedge clk); #1;
    for (int t = 0; t < 3000; t++) begin
      logic used [N];
      foreach (used[i]) used[i] = 0;
      foreach (wr_en[p]) begin
        int e;
        e = $urandom % 16;                 // few PCs so counters move a lot
        wr_en[p] = !used[e] && ($urandom % 2 == 1);
        if (wr_en[p]) used[e] = 1;
        wr_pc[p]   = pc_t'(e * 4) | (pc_t'($urandom) << 20);
        wr_crit[p] = $urandom % 5 == 0;
        wr_over[p] = $urandom % 2 == 1;
        rd_pc[p]   = pc_t'(($urandom % 16) * 4);
      end
      #1;
      foreach (rd_pc[p]) begin
        int e; e = rd_pc[p][7:2];
        `CHECK(rd_crit[p] == (cnt[e] >= 8), $sformatf("crit e=%0d cnt=%0d", e, cnt[e]))
        `CHECK(rd_delayable[p] == (cnt[e] < 8 && ovr[e]), "delayable")
        if (rd_crit[p]) n_crit++;
        if (rd_delayable[p]) n_dly++;
      end
      foreach (wr_en[p]) if (wr_en[p]) begin
        int e; e = wr_pc[p][7:2];
        cnt[e] = wr_crit[p] ? ((cnt[e] + 8 > 63) ? 63 : cnt[e] + 8) : (cnt[e] == 0 ? 0 : cnt[e] - 1);
        ovr[e] = wr_over[p];
      end
      @(posedge clk); #1;
    end
    `CHECK(n_crit > 0 && n_dly > 0, "both predictions exercised")
    `TB_FINISH
  end
endmodule
