// fe_throttle: front-end bandwidth throttling for the JRS and DCR techniques.
//
// Each technique, once enabled, throttles fetch and decode while its trigger
// condition lasts and for HOLD more cycles after it ends.  JRS throttling
// acts when a low-confidence branch is in flight; DCR throttling acts when
// the decode/commit ratio trigger is set and the power budget is exceeded.
// Throttling divides the fetch/decode width by JRS_DIV or DCR_DIV (2 or 4);
// a divider of 0 stops the front end.  If both act, the narrower width wins.
//
// Interface: enables jrs_en and dcr_en, triggers jrs_trig and dcr_trig,
// over_budget -> width (allowed fetch/decode slots this cycle, 0..WIDTH) and
// the active flags.  A trigger seen in cycle t throttles in cycle t; the
// hold counters are registered.
// The dividers, the full stop and the 3-cycle extension follow the design
// description; which divider each technique uses inside the level manager
// is not given there, and the defaults (1/2 for JRS, 1/4 for DCR) are this
// design's choice.
module fe_throttle #(
  parameter int unsigned WIDTH   = 4,
  parameter int unsigned HOLD    = 3,
  parameter int unsigned JRS_DIV = 2,
  parameter int unsigned DCR_DIV = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       jrs_en,
  input  logic                       jrs_trig,
  input  logic                       dcr_en,
  input  logic                       dcr_trig,
  input  logic                       over_budget,
  output logic [$clog2(WIDTH+1)-1:0] width,
  output logic                       jrs_active,
  output logic                       dcr_active
);
  localparam int unsigned HW = $clog2(HOLD + 1);
  localparam int unsigned WW = $clog2(WIDTH + 1);

  logic          jrs_cond, dcr_cond;
  logic [HW-1:0] jrs_hold, dcr_hold;

  assign jrs_cond = jrs_en && jrs_trig;
  assign dcr_cond = dcr_en && dcr_trig && over_budget;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jrs_hold <= '0;
      dcr_hold <= '0;
    end else begin
      jrs_hold <= jrs_cond ? HW'(HOLD) : (jrs_hold != '0 ? jrs_hold - 1'b1 : '0);
      dcr_hold <= dcr_cond ? HW'(HOLD) : (dcr_hold != '0 ? dcr_hold - 1'b1 : '0);
    end
  end

  assign jrs_active = jrs_cond || jrs_hold != '0;
  assign dcr_active = dcr_cond || dcr_hold != '0;

  function automatic logic [WW-1:0] divided(input int unsigned div);
    return (div == 0) ? '0 : WW'(WIDTH / div);
  endfunction

  always_comb begin
    width = WW'(WIDTH);
    if (jrs_active && divided(JRS_DIV) < width) width = divided(JRS_DIV);
    if (dcr_active && divided(DCR_DIV) < width) width = divided(DCR_DIV);
  end
endmodule
