// ptt_gate: Power-Token Throttling fetch gate.
//
// Before an instruction enters the pipeline its predicted token cost is known
// from the history table.  Fetch admits instructions in program order while
// the current estimate plus the costs admitted so far in this cycle stays at
// or below the budget; the first instruction that does not fit stalls itself
// and all younger lanes until committing instructions release tokens.
// Branches always enter, so that mispredictions are found early.  In the CP
// variant, instructions the critical path predictor marks critical also
// enter regardless of the budget.
//
// Interface (purely combinational): power and budget in tokens, W fetch lanes
// (lane_valid, lane_tok, lane_branch, lane_crit) -> lane_allow; stall is high
// when a valid lane was refused.  With ptt_en low every valid lane is allowed.
// The admission rule, the branch exemption and the CP variant follow the design
// description; admitting a partial fetch group is this design's choice.
module ptt_gate
  import pt_pkg::*;
#(
  parameter int unsigned W = FETCH_W
) (
  input  logic ptt_en,
  input  logic cp_mode,
  input  pwr_t power,
  input  pwr_t budget,
  input  logic lane_valid  [W],
  input  tok_t lane_tok    [W],
  input  logic lane_branch [W],
  input  logic lane_crit   [W],
  output logic lane_allow  [W],
  output logic stall
);
  localparam int unsigned SW = PWR_W + 4;

  always_comb begin
    logic [SW-1:0] running;
    logic          blocked;
    running = SW'(power);
    blocked = 1'b0;
    stall   = 1'b0;
    for (int i = 0; i < W; i++) begin
      logic exempt, fits;
      exempt        = lane_branch[i] || (cp_mode && lane_crit[i]);
      fits          = (running + SW'(lane_tok[i])) <= SW'(budget);
      lane_allow[i] = lane_valid[i] && !blocked && (!ptt_en || fits || exempt);
      if (lane_valid[i] && !lane_allow[i]) begin
        blocked = 1'b1;
        stall   = 1'b1;
      end
      if (lane_allow[i]) running = running + SW'(lane_tok[i]);
    end
  end
endmodule
