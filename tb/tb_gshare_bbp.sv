// tb_gshare_bbp: self-checking test of the gshare predictor with block power.
// A 1024-entry, 8-bit-history instance is driven with random predictions,
// resolutions (some mispredicted) and block-token writes.  A reference keeps
// the counters, token fields and history; the index (PC bits xor history),
// direction, stored tokens and history are checked on every prediction.
`include "tb_util.svh"
module tb_gshare_bbp;
  import pt_pkg::*;
  localparam int unsigned N = 1024, H = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init_done;
  logic pr_valid, pr_taken, up_valid, up_taken, up_mispred, bw_valid;
  pc_t pr_pc;
  bbtok_t pr_bb_tok, bw_tok;
  logic [9:0] pr_idx, up_idx, bw_idx;
  logic [H-1:0] pr_ghr, up_ghr;
  int cnt [N], tok [N];
  logic [H-1:0] ghr = 0;
  int n_taken = 0, n_tok = 0;

  gshare_bbp #(.ENTRIES(N), .HIST_W(H)) dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    pr_valid = 0; up_valid = 0; bw_valid = 0; pr_pc = '0; up_idx = '0; up_ghr = '0;
    up_taken = 0; up_mispred = 0; bw_idx = '0; bw_tok = '0;
    foreach (cnt[i]) begin cnt[i] = 1; tok[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (init_done); @(posedge clk); #1;
    for (int t = 0; t < 5000; t++) begin
      int ei;
      pr_valid = $urandom % 2 == 1; pr_pc = {$urandom, $urandom};
      up_valid = $urandom % 2 == 1; up_idx = 10'($urandom % 64); up_ghr = H'($urandom);
      up_taken = $urandom % 3 != 0; up_mispred = $urandom % 5 == 0;
      bw_valid = $urandom % 3 == 0; bw_idx = 10'($urandom % 64); bw_tok = bbtok_t'($urandom);
      #1;
      ei = (pr_pc[11:2] ^ 10'(ghr));
      `CHECK(pr_idx == 10'(ei), "index")
      `CHECK(pr_ghr == ghr, "history")
      `CHECK(pr_taken == (cnt[ei] >= 2), "direction")
      `CHECK(pr_bb_tok == bbtok_t'(tok[ei]), "block tokens")
      if (pr_taken) n_taken++;
      if (pr_bb_tok != 0) n_tok++;
      if (up_valid && up_mispred) ghr = {up_ghr[H-2:0], up_taken};
      else if (pr_valid) ghr = {ghr[H-2:0], pr_taken};
      if (up_valid) cnt[up_idx] = up_taken ? (cnt[up_idx] == 3 ? 3 : cnt[up_idx] + 1)
                                           : (cnt[up_idx] == 0 ? 0 : cnt[up_idx] - 1);
      if (bw_valid) tok[bw_idx] = bw_tok;
      @(posedge clk); #1;
      if (t % 2 == 0) begin   // predict inside the trained region too
        pr_valid = 0; up_valid = 0; bw_valid = 0;
        pr_pc = pc_t'((($urandom % 64) ^ 0) << 2); #1;
        ei = (pr_pc[11:2] ^ 10'(ghr));
        `CHECK(pr_taken == (cnt[ei] >= 2) && pr_bb_tok == bbtok_t'(tok[ei]), "lookup in trained region")
        if (pr_taken) n_taken++;
        if (pr_bb_tok != 0) n_tok++;
        @(posedge clk); #1;
      end
    end
    `CHECK(n_taken > 0 && n_tok > 0, "taken predictions and stored tokens seen")
    `TB_FINISH
  end
endmodule
