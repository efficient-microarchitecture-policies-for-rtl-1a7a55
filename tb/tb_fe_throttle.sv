// tb_fe_throttle: self-checking test of front-end throttling.
// Random enables, triggers and over-budget flags are applied; a reference
// keeps each technique active while its condition holds and 3 cycles after,
// and the allowed width must be 4, 2 (JRS, 1/2) or 1 (DCR, 1/4), the
// narrowest of the active ones.  A second instance with DCR_DIV=0 checks the
// full stop.
`include "tb_util.svh"
module tb_fe_throttle;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic jrs_en, jrs_trig, dcr_en, dcr_trig, over_budget;
  logic [2:0] width, width0;
  logic jrs_active, dcr_active, ja0, da0;
  int jh = 0, dh = 0, n_j = 0, n_d = 0, n_stop = 0;

  fe_throttle dut (.*);
  fe_throttle #(.DCR_DIV(0)) dut0 (.clk, .rst_n, .jrs_en, .jrs_trig, .dcr_en, .dcr_trig,
                                   .over_budget, .width(width0), .jrs_active(ja0), .dcr_active(da0));

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    jrs_en = 0; jrs_trig = 0; dcr_en = 0; dcr_trig = 0; over_budget = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic jc, dc, ja, da; int w, w0;
      jrs_en = $urandom % 4 != 0; dcr_en = $urandom % 3 != 0;
      jrs_trig = $urandom % 5 == 0; dcr_trig = $urandom % 4 == 0; over_budget = $urandom % 2 == 0;
      #1;
      jc = jrs_en && jrs_trig; dc = dcr_en && dcr_trig && over_budget;
      ja = jc || jh > 0; da = dc || dh > 0;
      w = 4; if (ja) w = 2; if (da) w = 1;
      w0 = 4; if (ja) w0 = 2; if (da) w0 = 0;
      `CHECK(jrs_active == ja && dcr_active == da, "active flags")
      `CHECK(width == 3'(w), $sformatf("width %0d expected %0d", width, w))
      `CHECK(width0 == 3'(w0), "full-stop width")
      if (ja) n_j++;
      if (da) n_d++;
      if (width0 == 0) n_stop++;
      jh = jc ? 3 : (jh > 0 ? jh - 1 : 0);
      dh = dc ? 3 : (dh > 0 ? dh - 1 : 0);
      @(posedge clk); #1;
    end
    `CHECK(n_j > 0 && n_d > 0 && n_stop > 0, "all throttle modes seen")
    `TB_FINISH
  end
endmodule
