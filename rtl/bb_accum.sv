// bb_accum: measures the power of each committed basic block.
//
// A basic block is taken here as the instructions after a branch up to and
// including the next branch.  The tokens of committing instructions are summed
// (saturating at BB_TOK_W bits); when the branch that ends a block commits,
// the sum is written to the predictor entry of the branch that led into the
// block, the one whose prediction will next want this block's power.  The
// predictor entry index of every committed branch is carried from prediction.
//
// Interface: CM_W commit lanes in program order (cm_valid, cm_tok,
// cm_branch, cm_bp_idx) -> one write (bw_valid, bw_idx, bw_tok),
// combinational in the commit cycle.  If several blocks end in one commit
// group, only the youngest is written.  flush drops the block being summed
// (for instance after an exception), so no entry is written with a partial sum.
// Storing the block power in the entry of the branch that points to the
// block follows the design description; the block boundary and the
// one-write-per-cycle limit are this design's choices.
module bb_accum
  import pt_pkg::*;
#(
  parameter int unsigned CM_W  = COMMIT_W,
  parameter int unsigned IDX_W = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             cm_valid  [CM_W],
  input  tok_t             cm_tok    [CM_W],
  input  logic             cm_branch [CM_W],
  input  logic [IDX_W-1:0] cm_bp_idx [CM_W],
  output logic             bw_valid,
  output logic [IDX_W-1:0] bw_idx,
  output bbtok_t           bw_tok
);
  localparam int unsigned SMAX = (1 << BB_TOK_W) - 1;

  bbtok_t           acc, acc_n;
  logic             prev_v, prev_v_n;
  logic [IDX_W-1:0] prev_idx, prev_idx_n;

  always_comb begin
    acc_n      = acc;
    prev_v_n   = prev_v;
    prev_idx_n = prev_idx;
    bw_valid   = 1'b0;
    bw_idx     = '0;
    bw_tok     = '0;
    for (int i = 0; i < CM_W; i++) begin
      if (cm_valid[i]) begin
        acc_n = (int'(acc_n) + int'(cm_tok[i]) > SMAX) ? bbtok_t'(SMAX)
                                                       : acc_n + bbtok_t'(cm_tok[i]);
        if (cm_branch[i]) begin
          if (prev_v_n) begin
            bw_valid = 1'b1;
            bw_idx   = prev_idx_n;
            bw_tok   = acc_n;
          end
          acc_n      = '0;
          prev_v_n   = 1'b1;
          prev_idx_n = cm_bp_idx[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc      <= '0;
      prev_v   <= 1'b0;
      prev_idx <= '0;
    end else if (flush) begin
      acc      <= '0;
      prev_v   <= 1'b0;
    end else begin
      acc      <= acc_n;
      prev_v   <= prev_v_n;
      prev_idx <= prev_idx_n;
    end
endmodule
