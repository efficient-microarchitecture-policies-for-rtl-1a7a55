// bblm_ctrl: Basic Block Level Manager technique selection.
//
// When a branch is predicted, the power the next basic block consumed last
// time (pr_bb_tok) is added to the current power estimate to forecast how far
// above the budget executing that block would take the processor.  The
// forecast excess, as a percentage of the budget, picks a technique:
//   excess <= 0          none
//   0 < excess < X_PCT   critical path (delay non-critical instructions)
//   X_PCT <= excess < Y_PCT  JRS confidence throttling
//   excess >= Y_PCT      DCR throttling
// The level only rises on a forecast; once the measured power is at or under
// the budget the techniques are switched off one at a time, in reverse order,
// one level every DOWN_CYC cycles.  A level enables its own technique and all
// lower ones.
//
// Interface: en, pr_valid, pr_bb_tok, power, budget, over_budget -> level
// (registered) and sel (combinational forecast of this cycle).
// The thresholds X=15 and Y=65, the order of the techniques and their
// progressive reverse-order release follow the design description; the
// forecast (current estimate plus block tokens) and the release pace are
// this design's choices.
module bblm_ctrl
  import pt_pkg::*;
#(
  parameter int unsigned X_PCT    = 15,
  parameter int unsigned Y_PCT    = 65,
  parameter int unsigned DOWN_CYC = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        pr_valid,
  input  bbtok_t      pr_bb_tok,
  input  pwr_t        power,
  input  pwr_t        budget,
  input  logic        over_budget,
  output bblm_level_e level,
  output bblm_level_e sel
);
  localparam int unsigned EW = PWR_W + 8;
  localparam int unsigned DW = $clog2(DOWN_CYC + 1);

  logic [DW-1:0] down_cnt;

  always_comb begin
    logic [EW-1:0] est, excess100;
    est       = EW'(power) + EW'(pr_bb_tok);
    excess100 = (est > EW'(budget)) ? (est - EW'(budget)) * EW'(100) : '0;
    if (est <= EW'(budget))                        sel = LVL_NONE;
    else if (excess100 < EW'(X_PCT) * EW'(budget)) sel = LVL_CP;
    else if (excess100 < EW'(Y_PCT) * EW'(budget)) sel = LVL_JRS;
    else                                           sel = LVL_DCR;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level    <= LVL_NONE;
      down_cnt <= '0;
    end else if (!en) begin
      level    <= LVL_NONE;
      down_cnt <= '0;
    end else if (pr_valid && sel > level) begin
      level    <= sel;
      down_cnt <= '0;
    end else if (!over_budget && level != LVL_NONE) begin
      if (down_cnt == DW'(DOWN_CYC - 1)) begin
        level    <= bblm_level_e'(level - 2'd1);
        down_cnt <= '0;
      end else begin
        down_cnt <= down_cnt + 1'b1;
      end
    end else begin
      down_cnt <= '0;
    end
  end
endmodule
