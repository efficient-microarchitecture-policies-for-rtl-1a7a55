// qold_marker: QOld criticality marking and over-budget sampling per RUU entry.
//
// Training information for the critical path predictor.  Every cycle the
// core reports the oldest instruction waiting in its issue queue; if that
// instruction is not ready it is marked critical (the QOld heuristic).  When
// an instruction issues, the current over-budget flag is recorded for it.  At
// commit both bits are read out and sent to the predictor.  The flags of an
// RUU entry are cleared when a new instruction is dispatched into it.
//
// Interface: DISP_W dispatch lanes, the oldest-entry report (old_valid,
// old_ruu, old_ready), ISSUE_W issue lanes with over_budget, and CM_W commit
// lanes (cm_ruu -> cm_crit, cm_over, combinational).
// Timing: a mark or sample made in cycle t is visible at commit from t+1.
// The QOld rule follows the design description.  The description also says a
// marked instruction becomes non-critical once it is ready; here the mark is
// kept until commit, so that an instruction that ever stalled at the head of
// the queue trains the predictor as critical.
module qold_marker
  import pt_pkg::*;
#(
  parameter int unsigned DISP_W = FETCH_W,
  parameter int unsigned IS_W   = ISSUE_W,
  parameter int unsigned CM_W   = COMMIT_W
) (
  input  logic     clk,
  input  logic     dp_valid  [DISP_W],
  input  ruu_idx_t dp_ruu    [DISP_W],
  input  logic     old_valid,
  input  ruu_idx_t old_ruu,
  input  logic     old_ready,
  input  logic     is_valid  [IS_W],
  input  ruu_idx_t is_ruu    [IS_W],
  input  logic     over_budget,
  input  ruu_idx_t cm_ruu    [CM_W],
  output logic     cm_crit   [CM_W],
  output logic     cm_over   [CM_W]
);
  logic crit_f [RUU_SIZE];
  logic over_f [RUU_SIZE];

  always_ff @(posedge clk) begin
    if (old_valid && !old_ready) crit_f[old_ruu] <= 1'b1;
    for (int i = 0; i < IS_W; i++)
      if (is_valid[i]) over_f[is_ruu[i]] <= over_budget;
    for (int d = 0; d < DISP_W; d++)
      if (dp_valid[d]) begin
        crit_f[dp_ruu[d]] <= 1'b0;
        over_f[dp_ruu[d]] <= 1'b0;
      end
  end

  always_comb
    for (int c = 0; c < CM_W; c++) begin
      cm_crit[c] = crit_f[cm_ruu[c]];
      cm_over[c] = over_f[cm_ruu[c]];
    end
endmodule
