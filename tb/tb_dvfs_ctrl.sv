// tb_dvfs_ctrl: self-checking test of the DVFS mode controller.
// With a 100-cycle interval and all five modes, constant power levels are
// applied per interval.  The reference computes the fastest mode whose
// projected power (activity * V^2 f) fits the budget; the new mode must
// appear exactly 6 cycles after the interval ends, with busy high meanwhile.
// A second instance with the limited 3-mode set must never go below mode 2.
`include "tb_util.svh"
module tb_dvfs_ctrl;
  import pt_pkg::*;
  localparam int unsigned IV = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, busy, iend, busy3, iend3;
  pwr_t power, budget;
  mode_t mode, target, mode3, target3;
  int n_change = 0, n_lim = 0;
  localparam int unsigned F [5] = '{1000000, 857375, 729000, 607500, 526500};

  dvfs_ctrl #(.INTERVAL(IV), .N_MODES(5)) dut (.clk, .rst_n, .en, .power, .budget,
    .mode, .target, .busy, .interval_end(iend));
  dvfs_ctrl #(.INTERVAL(IV)) dut3 (.clk, .rst_n, .en, .power, .budget,
    .mode(mode3), .target(target3), .busy(busy3), .interval_end(iend3));

  always #5 clk = ~clk;
  initial begin #4000000; failures++; `TB_FINISH end

  function automatic int pick(int p, int b, int n);
    for (int m = 0; m < n; m++) if (longint'(p) * F[m] <= longint'(b) * F[0]) return m;
    return n - 1;
  endfunction

  // Cycle-by-cycle reference: interval counter, average of the interval's
  // power, chosen mode and a 6-cycle transition.
  initial begin
    int tick, sum, mode_r, tgt_r, tr, mode3_r, tgt3_r, tr3, w, p;
    en = 1; power = 0; budget = 1000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    tick = 0; sum = 0; mode_r = 0; tgt_r = 0; tr = 0; mode3_r = 0; tgt3_r = 0; tr3 = 0; w = 0; p = 900;
    for (int t = 0; t < 60 * IV; t++) begin
      if (tick == 0) begin
        p = (w % 10 == 9) ? 900 : 900 + (w % 9) * 100;   // 900 .. 1700 tokens
        en = w < 50;
        w++;
      end
      power = pwr_t'(p);
      #1;
      `CHECK(iend == (tick == IV - 1), "interval end pulse")
      `CHECK(int'(mode) == mode_r && busy == (tr != 0), $sformatf("mode %0d expected %0d", mode, mode_r))
      `CHECK(int'(mode3) == mode3_r && busy3 == (tr3 != 0), "limited-set mode")
      `CHECK(mode3 <= 2, "limited set stays within 3 modes")
      if (tr != 0) begin tr--; if (tr == 0) mode_r = tgt_r; end
      if (tr3 != 0) begin tr3--; if (tr3 == 0) mode3_r = tgt3_r; end
      sum += p;
      if (tick == IV - 1) begin
        int b5, b3;
        b5 = en ? pick(sum / IV, 1000, 5) : 0;
        b3 = en ? pick(sum / IV, 1000, 3) : 0;
        if (tr == 0 && b5 != mode_r) begin tgt_r = b5; tr = 6; n_change++; if (b5 > 2) n_lim++; end
        if (tr3 == 0 && b3 != mode3_r) begin tgt3_r = b3; tr3 = 6; end
        tick = 0; sum = 0;
      end else tick++;
      @(posedge clk); #1;
    end
    `CHECK(n_change > 0 && n_lim > 0, "mode changes seen")
    `TB_FINISH
  end
endmodule
