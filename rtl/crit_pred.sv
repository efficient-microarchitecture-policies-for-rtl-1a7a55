// crit_pred: critical path predictor with over-budget history.
//
// A direct-mapped table indexed by PC.  Each entry holds a saturating
// criticality counter, raised by INC when the committing instruction was
// found critical and lowered by DEC otherwise, and one bit recording whether
// the instruction last executed while the power budget was exceeded.  An
// instruction is predicted critical when its counter is at least CRIT_THRESH.
// An instruction predicted non-critical whose last execution was over budget
// is "delayable": the scheduler may hold it back while the budget is
// exceeded.
//
// Interface: RD_PORTS combinational lookups at fetch (rd_pc -> rd_crit,
// rd_delayable) and WR_PORTS training ports at commit (wr_en, wr_pc,
// wr_crit, wr_over), applied at the clock edge.  Two training ports hitting
// the same entry in one cycle: the higher-numbered one wins and the lower one
// is lost.  After reset the table clears itself, one entry per cycle.
// The 8K entries, 6-bit counters and +8/-1 update follow the design
// description; the prediction threshold, the PC bits used as index and the
// clearing sweep are this design's choices.
module crit_pred
  import pt_pkg::*;
#(
  parameter int unsigned ENTRIES     = 8192,
  parameter int unsigned CNT_W       = 6,
  parameter int unsigned INC         = 8,
  parameter int unsigned DEC         = 1,
  parameter int unsigned CRIT_THRESH = 8,
  parameter int unsigned RD_PORTS    = FETCH_W,
  parameter int unsigned WR_PORTS    = COMMIT_W
) (
  input  logic clk,
  input  logic rst_n,
  output logic init_done,
  input  pc_t  rd_pc        [RD_PORTS],
  output logic rd_crit      [RD_PORTS],
  output logic rd_delayable [RD_PORTS],
  input  logic wr_en        [WR_PORTS],
  input  pc_t  wr_pc        [WR_PORTS],
  input  logic wr_crit      [WR_PORTS],
  input  logic wr_over      [WR_PORTS]
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned CMAX  = (1 << CNT_W) - 1;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [CNT_W-1:0] cnt_t;
  typedef struct packed {
    cnt_t cnt;
    logic over;
  } entry_t;

  entry_t mem [ENTRIES];
  idx_t   clr_idx;
  logic   clearing;

  function automatic idx_t pc_index(input pc_t pc);
    return pc[2 +: IDX_W];
  endfunction

  function automatic cnt_t train(input cnt_t c, input logic crit);
    if (crit) return (int'(c) + INC > CMAX) ? cnt_t'(CMAX) : cnt_t'(int'(c) + INC);
    else      return (int'(c) < DEC) ? '0 : cnt_t'(int'(c) - DEC);
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
    if (clearing) begin
      mem[clr_idx] <= '0;
    end else begin
      for (int p = 0; p < WR_PORTS; p++)
        if (wr_en[p])
          mem[pc_index(wr_pc[p])] <= '{cnt:  train(mem[pc_index(wr_pc[p])].cnt, wr_crit[p]),
                                       over: wr_over[p]};
    end
  end

  always_comb
    for (int p = 0; p < RD_PORTS; p++) begin
      entry_t e;
      e               = mem[pc_index(rd_pc[p])];
      rd_crit[p]      = int'(e.cnt) >= CRIT_THRESH;
      rd_delayable[p] = !rd_crit[p] && e.over;
    end

  assign init_done = !clearing;
endmodule
