// token_calc: power tokens consumed by committing instructions.
//
// One power token is the energy of one instruction spending one cycle in the
// RUU (the wakeup/select logic energy shared among waiting instructions).  An
// instruction's cost is therefore the base tokens of its power group, which
// covers all its regular structure accesses, plus the number of cycles it
// spent in the RUU.  Instruction types are assigned to N_GROUPS groups offline
// (by clustering their measured base power); the group id arrives with the
// instruction from decode.
//
// How it works: a free-running 16-bit cycle counter is stamped into a per-RUU
// entry register when an instruction is dispatched; at commit the stamp is
// subtracted from the counter (modulo 2^16) and added to the group's base
// cost.  The sum saturates at the token field's maximum.
//
// Interface: DISP_W dispatch lanes (dp_valid, dp_ruu) and CM_W commit lanes
// (cm_valid, cm_ruu, cm_grp -> cm_tok, combinational in the commit cycle).
// The token definition and the 8 groups follow the design description; the
// base cost of each group (BASE_TOK) is not given there and is a placeholder
// to be calibrated for a real core.
module token_calc
  import pt_pkg::*;
#(
  parameter int unsigned DISP_W = FETCH_W,
  parameter int unsigned CM_W   = COMMIT_W,
  parameter int unsigned BASE_TOK [N_GROUPS] = '{1, 2, 3, 4, 6, 8, 12, 16}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     dp_valid [DISP_W],
  input  ruu_idx_t dp_ruu   [DISP_W],
  input  logic     cm_valid [CM_W],
  input  ruu_idx_t cm_ruu   [CM_W],
  input  grp_t     cm_grp   [CM_W],
  output tok_t     cm_tok   [CM_W]
);
  localparam int unsigned TS_W = 16;
  typedef logic [TS_W-1:0] ts_t;

  ts_t now;
  ts_t stamp [RUU_SIZE];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  always_ff @(posedge clk)
    for (int d = 0; d < DISP_W; d++)
      if (dp_valid[d]) stamp[dp_ruu[d]] <= now;

  always_comb begin
    for (int c = 0; c < CM_W; c++) begin
      logic [TS_W:0] total;
      ts_t           resid;
      resid     = now - stamp[cm_ruu[c]];
      total     = {1'b0, resid} + (TS_W+1)'(BASE_TOK[cm_grp[c]]);
      cm_tok[c] = (total > (TS_W+1)'({TOK_W{1'b1}})) ? {TOK_W{1'b1}} : tok_t'(total);
      if (!cm_valid[c]) cm_tok[c] = '0;
    end
  end
endmodule
