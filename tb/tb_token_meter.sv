// tb_token_meter: self-checking test of the in-flight token estimate.
// Random admissions, releases and squashes are applied; a reference sum
// (clamped at 0 and 65535) is compared each cycle, as is the over-budget
// flag.  The estimate must lag its inputs by exactly one cycle.
`include "tb_util.svh"
module tb_token_meter;
  import pt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid [4];
  tok_t in_tok [4];
  logic out_valid [4];
  tok_t out_tok [4];
  pwr_t squash_tok, budget, power;
  logic over_budget;
  longint model;
  int n_over = 0;

  token_meter dut (.*);

  always #5 clk = ~clk;
  initial begin #500000; failures++; `TB_FINISH end

  initial begin
    foreach (in_valid[i]) begin in_valid[i] = 0; in_tok[i] = 0; out_valid[i] = 0; out_tok[i] = 0; end
    squash_tok = 0; budget = 600; model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    `CHECK(power == 0, "power not reset")
    for (int t = 0; t < 4000; t++) begin
      foreach (in_valid[i]) begin
        in_valid[i] = $urandom % 2 == 1; in_tok[i] = tok_t'($urandom % 60);
        out_valid[i] = $urandom % 2 == 1; out_tok[i] = tok_t'($urandom % (t < 2000 ? 50 : 70));
      end
      squash_tok = ($urandom % 20 == 0) ? pwr_t'($urandom % 300) : '0;
      if (t == 3000) squash_tok = 16'hFFFF;
      if (t > 3500) foreach (in_tok[i]) in_tok[i] = 8'hFF;
      #1;
      foreach (in_valid[i]) if (in_valid[i]) model += in_tok[i];
      foreach (out_valid[i]) if (out_valid[i]) model -= out_tok[i];
      model -= squash_tok;
      if (model < 0) model = 0;
      if (model > 65535) model = 65535;
      @(posedge clk); #1;
      `CHECK(power == pwr_t'(model), $sformatf("power %0d expected %0d", power, model))
      `CHECK(over_budget == (model > 600), "over_budget flag")
      if (over_budget) n_over++;
    end
    `CHECK(n_over > 0, "never over budget")
    `TB_FINISH
  end
endmodule
