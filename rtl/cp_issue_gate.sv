// cp_issue_gate: delays non-critical instructions while over the power budget.
//
// While the critical-path technique is active (cp_active: enabled and the
// budget currently exceeded), an issue candidate flagged delayable by the
// critical path predictor is refused, and its per-RUU-entry delay counter is
// incremented.  Once an instruction has been held MAX_DELAY cycles it may
// issue regardless, so that a non-critical instruction is not delayed long
// enough to become critical.  Every delayable candidate found is held; there
// is no attempt to delay only as many as needed to get under the budget.
//
// Interface: DISP_W dispatch lanes clear the counter of the entry written;
// IS_W issue lanes (is_valid, is_ruu, is_delayable) -> is_ok, combinational.
// The rule follows the design description; the default limit of 2 cycles is
// this design's choice among the limits of 1 to 8 cycles evaluated there.
module cp_issue_gate
  import pt_pkg::*;
#(
  parameter int unsigned DISP_W    = FETCH_W,
  parameter int unsigned IS_W      = ISSUE_W,
  parameter int unsigned MAX_DELAY = 2
) (
  input  logic     clk,
  input  logic     cp_active,
  input  logic     dp_valid     [DISP_W],
  input  ruu_idx_t dp_ruu       [DISP_W],
  input  logic     is_valid     [IS_W],
  input  ruu_idx_t is_ruu       [IS_W],
  input  logic     is_delayable [IS_W],
  output logic     is_ok        [IS_W],
  output logic     holding
);
  localparam int unsigned DW = $clog2(MAX_DELAY + 1);
  typedef logic [DW-1:0] dly_t;

  dly_t waited [RUU_SIZE];

  always_comb begin
    holding = 1'b0;
    for (int i = 0; i < IS_W; i++) begin
      is_ok[i] = !(cp_active && is_delayable[i] && int'(waited[is_ruu[i]]) < MAX_DELAY);
      if (is_valid[i] && !is_ok[i]) holding = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < IS_W; i++)
      if (is_valid[i] && !is_ok[i]) waited[is_ruu[i]] <= waited[is_ruu[i]] + 1'b1;
    for (int d = 0; d < DISP_W; d++)
      if (dp_valid[d]) waited[dp_ruu[d]] <= '0;
  end
endmodule
