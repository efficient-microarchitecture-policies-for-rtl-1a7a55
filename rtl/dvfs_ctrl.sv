// dvfs_ctrl: coarse-grained DVFS mode selection over long search intervals.
//
// The first level of the two-level scheme.  The power estimate (tokens in
// flight, taken as activity at nominal voltage and frequency) is summed over
// a search interval of INTERVAL cycles.  At the end of each interval the
// fastest of the first N_MODES voltage/frequency modes whose projected power
// (average activity times V^2*f relative to nominal) fits the budget is
// chosen; if none fits, the slowest allowed mode.  A change of mode makes the
// regulator busy for TRANS_CYC cycles, after which mode takes the new value.
// With en low the controller returns to the nominal mode.
//
// Interface: en, power and budget (tokens) -> mode (current), target,
// busy (transition in progress) and interval_end (one-cycle pulse).
// The 500K-cycle interval, the mode table, the limited set of three modes
// used together with the level manager and the 6-cycle switch follow the
// design description; the projection rule and using the token estimate as
// the measured power are this design's choices.
module dvfs_ctrl
  import pt_pkg::*;
#(
  parameter int unsigned INTERVAL  = 500000,
  parameter int unsigned N_MODES   = 3,
  parameter int unsigned TRANS_CYC = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  pwr_t  power,
  input  pwr_t  budget,
  output mode_t mode,
  output mode_t target,
  output logic  busy,
  output logic  interval_end
);
  localparam int unsigned IW = $clog2(INTERVAL);
  localparam int unsigned SW = PWR_W + IW + 1;
  localparam int unsigned PW = SW + 24;
  localparam int unsigned TW = $clog2(TRANS_CYC + 1);

  logic [IW-1:0] tick;
  logic [SW-1:0] sum, sum_n;
  logic [TW-1:0] trans;
  mode_t         best;

  assign sum_n        = sum + SW'(power);
  assign interval_end = tick == IW'(INTERVAL - 1);

  always_comb begin
    best = mode_t'(N_MODES - 1);
    for (int m = int'(N_MODES) - 1; m >= 0; m--)
      if (PW'(sum_n) * PW'(mode_pwr_factor(m)) <=
          PW'(budget) * PW'(INTERVAL) * PW'(mode_pwr_factor(0)))
        best = mode_t'(m);
    if (!en) best = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick   <= '0;
      sum    <= '0;
      mode   <= '0;
      target <= '0;
      trans  <= '0;
    end else begin
      if (interval_end) begin
        tick <= '0;
        sum  <= '0;
        if (trans == '0 && best != mode) begin
          target <= best;
          trans  <= TW'(TRANS_CYC);
        end
      end else begin
        tick <= tick + 1'b1;
        sum  <= sum_n;
      end
      if (trans != '0) begin
        trans <= trans - 1'b1;
        if (trans == TW'(1)) mode <= target;
      end
    end
  end

  assign busy = trans != '0;
endmodule
