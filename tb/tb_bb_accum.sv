// tb_bb_accum: self-checking test of basic-block power measurement.
// A random commit stream (some lanes empty, some branches) is applied.  The
// reference walks the stream instruction by instruction: it sums tokens up to
// and including a branch, then records (index of the previous branch, sum).
// The block's single write per cycle must equal the youngest block completed
// that cycle.
`include "tb_util.svh"
module tb_bb_accum;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush;
  logic cm_valid [4], cm_branch [4], bw_valid;
  tok_t cm_tok [4];
  logic [17:0] cm_bp_idx [4], bw_idx;
  bbtok_t bw_tok;
  int acc = 0, pidx = 0, n_wr = 0, n_sat = 0;
  logic pv = 0;

  bb_accum dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    foreach (cm_valid[i]) begin cm_valid[i] = 0; cm_branch[i] = 0; cm_tok[i] = 0; cm_bp_idx[i] = '0; end
    flush = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      logic ev; int ei, et;
      flush = $urandom % 200 == 0;
      foreach (cm_valid[i]) begin
        cm_valid[i] = $urandom % 5 != 0; cm_tok[i] = tok_t'($urandom % ((t / 1000) % 2 == 0 ? 30 : 256));
        cm_branch[i] = $urandom % 6 == 0; cm_bp_idx[i] = 18'($urandom);
      end
      #1;
      ev = 0; ei = 0; et = 0;
      foreach (cm_valid[i]) if (cm_valid[i]) begin
        acc += cm_tok[i]; if (acc > 511) acc = 511;
        if (cm_branch[i]) begin
          if (pv) begin ev = 1; ei = pidx; et = acc; end
          acc = 0; pv = 1; pidx = cm_bp_idx[i];
        end
      end
      `CHECK(bw_valid == ev, "write valid")
      if (ev) begin
        `CHECK(bw_idx == 18'(ei) && bw_tok == bbtok_t'(et), $sformatf("write idx/tokens %0d exp %0d", bw_tok, et))
        n_wr++;
        if (et == 511) n_sat++;
      end
      if (flush) begin acc = 0; pv = 0; end
      @(posedge clk); #1;
    end
    `CHECK(n_wr > 0 && n_sat > 0, "writes and saturation seen")
    `TB_FINISH
  end
endmodule
