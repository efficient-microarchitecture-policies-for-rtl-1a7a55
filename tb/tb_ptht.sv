// tb_ptht: self-checking test of the power-token history table.
// A small table (64 entries) is cleared, then written through all four
// ports with random PCs and tokens while all four read ports are compared
// with a reference array.  The clearing sweep must take exactly ENTRIES
// cycles.  Same-cycle writes to one entry must resolve to the highest port.
`include "tb_util.svh"
module tb_ptht;
  import pt_pkg::*;
  localparam int unsigned N = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init_done;
  pc_t  rd_pc [4];
  tok_t rd_tok [4];
  logic wr_en [4];
  pc_t  wr_pc [4];
  tok_t wr_tok [4];
  tok_t ref_mem [N];

  ptht #(.ENTRIES(N), .INIT_TOK(tok_t'(5))) dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; `TB_FINISH end

  initial begin
    int cyc;
    foreach (wr_en[p]) begin wr_en[p] = 0; wr_pc[p] = '0; wr_tok[p] = '0; rd_pc[p] = '0; end
    foreach (ref_mem[i]) ref_mem[i] = 5;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!init_done) begin @(posedge clk); #1 cyc++; end
    `CHECK(cyc == N, $sformatf("clear took %0d cycles, expected %0d", cyc, N))
    for (int i = 0; i < N; i++) begin
      rd_pc[0] = pc_t'(i * 4); #1;
      `CHECK(rd_tok[0] == 5, "entry not cleared to INIT_TOK")
    end
    for (int t = 0; t < 400; t++) begin
      foreach (wr_en[p]) begin
        wr_en[p]  = ($urandom % 2) == 1;
        wr_pc[p]  = {$urandom, $urandom} & 64'hFFFF_FFFF_FFFF_FFFC;
        wr_tok[p] = tok_t'($urandom);
        rd_pc[p]  = {$urandom, $urandom};
      end
      if (t % 7 == 0) begin wr_pc[3] = wr_pc[1]; wr_en[1] = 1; wr_en[3] = 1; end
      #1;
      foreach (rd_pc[p])
        `CHECK(rd_tok[p] == ref_mem[rd_pc[p][7:2]], "read mismatch")
      foreach (wr_en[p]) if (wr_en[p]) ref_mem[wr_pc[p][7:2]] = wr_tok[p];
      @(posedge clk); #1;
    end
    foreach (wr_en[p]) wr_en[p] = 0;
    for (int i = 0; i < N; i++) begin
      rd_pc[0] = pc_t'(i * 4) | 64'h1000_0000_0000_0000; #1;
      `CHECK(rd_tok[0] == ref_mem[i], "final contents mismatch")
    end
    `TB_FINISH
  end
endmodule
