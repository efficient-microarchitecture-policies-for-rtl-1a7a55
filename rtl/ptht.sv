// ptht: Power-Token History Table.
//
// A direct-mapped table indexed by PC that remembers how many power tokens
// each instruction consumed the last time it committed.  The front end reads
// it for every fetched instruction to know the instruction's power before it
// enters the pipeline; the commit stage writes the measured tokens back.
//
// Interface: RD_PORTS combinational read ports (rd_pc -> rd_tok, same cycle)
// and WR_PORTS write ports applied at the clock edge; when two write ports hit
// the same entry in one cycle the higher-numbered port wins.  An entry never
// written returns INIT_TOK.
//
// Timing: after reset the table clears itself one entry per cycle; init_done
// rises after ENTRIES cycles.  Writes during the sweep are ignored.
// The 8K-entry size follows the design description.  The asynchronous read,
// the 8-bit saturating token field, the index taken from PC bits [14:2]
// (4-byte instructions) and the clearing sweep are this design's choices.
module ptht
  import pt_pkg::*;
#(
  parameter int unsigned ENTRIES  = 8192,
  parameter int unsigned RD_PORTS = FETCH_W,
  parameter int unsigned WR_PORTS = COMMIT_W,
  parameter tok_t        INIT_TOK = tok_t'(4)
) (
  input  logic clk,
  input  logic rst_n,
  output logic init_done,
  input  pc_t  rd_pc  [RD_PORTS],
  output tok_t rd_tok [RD_PORTS],
  input  logic wr_en  [WR_PORTS],
  input  pc_t  wr_pc  [WR_PORTS],
  input  tok_t wr_tok [WR_PORTS]
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  typedef logic [IDX_W-1:0] idx_t;

  tok_t mem [ENTRIES];
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
    if (clearing) begin
      mem[clr_idx] <= INIT_TOK;
    end else begin
      for (int p = 0; p < WR_PORTS; p++)
        if (wr_en[p]) mem[pc_index(wr_pc[p])] <= wr_tok[p];
    end
  end

  always_comb
    for (int p = 0; p < RD_PORTS; p++) rd_tok[p] = mem[pc_index(rd_pc[p])];

  assign init_done = !clearing;
endmodule
