// tb_token_calc: self-checking test of instruction token computation.
// Instructions are dispatched into random RUU entries at known cycles and
// committed later; the expected cost is the group's base tokens plus the
// cycles between dispatch and commit, saturated at 255.
`include "tb_util.svh"
module tb_token_calc;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic     dp_valid [4];
  ruu_idx_t dp_ruu   [4];
  logic     cm_valid [4];
  ruu_idx_t cm_ruu   [4];
  grp_t     cm_grp   [4];
  tok_t     cm_tok   [4];
  localparam int unsigned BASE [8] = '{1, 2, 3, 4, 6, 8, 12, 16};
  int disp_cyc [RUU_SIZE];
  logic live [RUU_SIZE];
  int cyc = 0;

  token_calc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #500000; failures++; `TB_FINISH end

  initial begin
    foreach (dp_valid[i]) begin dp_valid[i] = 0; dp_ruu[i] = '0; cm_valid[i] = 0; cm_ruu[i] = '0; cm_grp[i] = '0; end
    foreach (live[i]) live[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic used [RUU_SIZE];
      foreach (used[i]) used[i] = 0;
      foreach (cm_valid[c]) begin
        int e;
        cm_valid[c] = 0;
        e = $urandom % RUU_SIZE;
        if (live[e] && !used[e] && ($urandom % 4 == 0 || cyc - disp_cyc[e] > 300)) begin
          cm_valid[c] = 1; cm_ruu[c] = ruu_idx_t'(e); cm_grp[c] = grp_t'($urandom); used[e] = 1;
        end
      end
      foreach (dp_valid[d]) begin
        int e;
        dp_valid[d] = 0;
        e = $urandom % RUU_SIZE;
        if (!live[e] && !used[e] && $urandom % 3 == 0) begin
          dp_valid[d] = 1; dp_ruu[d] = ruu_idx_t'(e); used[e] = 1;
        end
      end
      #1;
      foreach (cm_valid[c]) if (cm_valid[c]) begin
        int exp_t;
        exp_t = BASE[cm_grp[c]] + (cyc - disp_cyc[cm_ruu[c]]);
        if (exp_t > 255) exp_t = 255;
        `CHECK(cm_tok[c] == tok_t'(exp_t), $sformatf("tokens %0d expected %0d", cm_tok[c], exp_t))
        live[cm_ruu[c]] = 0;
      end
      foreach (dp_valid[d]) if (dp_valid[d]) begin live[dp_ruu[d]] = 1; disp_cyc[dp_ruu[d]] = cyc; end
      @(posedge clk); #1;
    end
    `TB_FINISH
  end
endmodule
