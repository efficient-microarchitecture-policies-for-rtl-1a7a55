// tb_jrs_conf: self-checking test of the JRS confidence estimator.
// A 64-entry table is trained with random outcomes: a reference counter
// saturates upward on a correct prediction and resets on a misprediction;
// a branch is confident only when its counter is 3.  The in-flight count of
// low-confidence branches and the trigger are checked against a reference.
`include "tb_util.svh"
module tb_jrs_conf;
  import pt_pkg::*;
  localparam int unsigned N = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init_done;
  logic pr_valid, pr_lowconf, up_valid, up_correct, trigger;
  pc_t pr_pc, up_pc;
  logic [2:0] lc_release;
  logic [5:0] lc_inflight;
  int cnt [N];
  int infl = 0, n_conf = 0, n_trig = 0;

  jrs_conf #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    int cyc;
    pr_valid = 0; up_valid = 0; up_correct = 0; pr_pc = '0; up_pc = '0; lc_release = 0;
    foreach (cnt[i]) cnt[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!init_done) begin @(posedge clk); #1 cyc++; end
    `CHECK(cyc == N, "clear sweep length")
    for (int t = 0; t < 4000; t++) begin
      pr_valid = $urandom % 2 == 1; pr_pc = pc_t'(($urandom % 8) * 4);
      up_valid = $urandom % 2 == 1; up_pc = pc_t'(($urandom % 8) * 4);
      up_correct = $urandom % 6 != 0;
      lc_release = 3'($urandom % (infl > 3 ? 3 : infl + 1));
      #1;
      `CHECK(pr_lowconf == (cnt[pr_pc[7:2]] != 3), "low-confidence flag")
      `CHECK(lc_inflight == 6'(infl), $sformatf("inflight %0d expected %0d", lc_inflight, infl))
      `CHECK(trigger == (infl != 0), "trigger")
      if (!pr_lowconf) n_conf++;
      if (trigger) n_trig++;
      infl = infl + ((pr_valid && pr_lowconf) ? 1 : 0) - lc_release;
      if (infl < 0) infl = 0;
      if (infl > 63) infl = 63;
      if (up_valid) cnt[up_pc[7:2]] = up_correct ? (cnt[up_pc[7:2]] == 3 ? 3 : cnt[up_pc[7:2]] + 1) : 0;
      @(posedge clk); #1;
    end
    `CHECK(n_conf > 0 && n_trig > 0, "confident branches and trigger seen")
    `TB_FINISH
  end
endmodule
