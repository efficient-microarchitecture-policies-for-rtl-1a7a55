// token_meter: cycle-level power estimate in power tokens.
//
// The processor's current power is estimated, without performance counters,
// as the sum of the token costs of all instructions in flight.  Each fetched
// instruction adds the cost the history table predicted for it; the same
// cost is released when the instruction commits or is squashed, so the sum
// tracks the instructions actually inside the pipeline.
//
// Interface: IN_W admission lanes (in_valid, in_tok), OUT_W release lanes
// (out_valid, out_tok) and squash_tok, the total cost of instructions squashed
// this cycle.  power is the registered estimate; over_budget compares it with
// budget (both in tokens).  The sum saturates at 0 and at its maximum.
// Timing: an admission or release in cycle t shows in power at cycle t+1.
// The accounting rule follows the design description; the 16-bit width, the
// saturation and the squash port are this design's choices.
module token_meter
  import pt_pkg::*;
#(
  parameter int unsigned IN_W  = FETCH_W,
  parameter int unsigned OUT_W = COMMIT_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid  [IN_W],
  input  tok_t in_tok    [IN_W],
  input  logic out_valid [OUT_W],
  input  tok_t out_tok   [OUT_W],
  input  pwr_t squash_tok,
  input  pwr_t budget,
  output pwr_t power,
  output logic over_budget
);
  localparam int unsigned SW = PWR_W + 3;
  logic [SW-1:0] add_sum, sub_sum;
  logic [SW:0]   nxt;

  always_comb begin
    add_sum = '0;
    sub_sum = SW'(squash_tok);
    for (int i = 0; i < IN_W; i++)  if (in_valid[i])  add_sum += SW'(in_tok[i]);
    for (int o = 0; o < OUT_W; o++) if (out_valid[o]) sub_sum += SW'(out_tok[o]);
    nxt = (SW+1)'(power) + (SW+1)'(add_sum);
    if (nxt < (SW+1)'(sub_sum))                      nxt = '0;
    else                                             nxt = nxt - (SW+1)'(sub_sum);
    if (nxt > (SW+1)'({PWR_W{1'b1}}))                nxt = (SW+1)'({PWR_W{1'b1}});
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) power <= '0;
    else        power <= pwr_t'(nxt);

  assign over_budget = power > budget;
endmodule
