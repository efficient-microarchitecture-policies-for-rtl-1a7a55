// jrs_conf: JRS-style branch confidence estimator with in-flight counting.
//
// A direct-mapped table indexed by the branch PC holds, per entry, a 2-bit
// counter of consecutive correct predictions: it saturates upward on a
// correct prediction and resets to zero on a misprediction.  A branch is
// confident when its counter exceeds THRESH; otherwise it is low-confidence.
// The number of low-confidence branches currently in flight is counted, and
// trigger is high while any is in flight: this is the condition on which the
// front end is throttled.
//
// Interface: prediction lookup (pr_valid, pr_pc -> pr_lowconf, same cycle;
// a valid low-confidence lookup counts one branch in flight), training at
// resolve (up_valid, up_pc, up_correct) and lc_release, the number of
// low-confidence branches resolved or squashed this cycle.  After reset the
// table clears itself one entry per cycle (all branches low-confidence).
// The 64K entries of 2 bits follow the design description; the PC-only index,
// the threshold (only a saturated counter is confident) and the in-flight
// counter are this design's choices.
module jrs_conf
  import pt_pkg::*;
#(
  parameter int unsigned ENTRIES = 65536,
  parameter int unsigned CNT_W   = 2,
  parameter int unsigned THRESH  = 2,
  parameter int unsigned LC_W    = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            init_done,
  input  logic            pr_valid,
  input  pc_t             pr_pc,
  output logic            pr_lowconf,
  input  logic            up_valid,
  input  pc_t             up_pc,
  input  logic            up_correct,
  input  logic [2:0]      lc_release,
  output logic [LC_W-1:0] lc_inflight,
  output logic            trigger
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [CNT_W-1:0] cnt_t;

  cnt_t mem [ENTRIES];
  idx_t clr_idx;
  logic clearing;

  function automatic idx_t pc_index(input pc_t pc);
    return pc[2 +: IDX_W];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_idx  <= '0;
      clearing <= 1'b1;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == idx_t'(ENTRIES - 1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing) mem[clr_idx] <= '0;
    else if (up_valid) begin
      if (!up_correct)                 mem[pc_index(up_pc)] <= '0;
      else if (mem[pc_index(up_pc)] != '1) mem[pc_index(up_pc)] <= mem[pc_index(up_pc)] + 1'b1;
    end
  end

  assign pr_lowconf = !(int'(mem[pc_index(pr_pc)]) > THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lc_inflight <= '0;
    else begin
      logic [LC_W+1:0] n;
      n = (LC_W+2)'(lc_inflight) + (LC_W+2)'(pr_valid && pr_lowconf);
      n = (n < (LC_W+2)'(lc_release)) ? '0 : n - (LC_W+2)'(lc_release);
      lc_inflight <= (n > (LC_W+2)'({LC_W{1'b1}})) ? {LC_W{1'b1}} : n[LC_W-1:0];
    end
  end

  assign trigger   = lc_inflight != '0;
  assign init_done = !clearing;
endmodule
