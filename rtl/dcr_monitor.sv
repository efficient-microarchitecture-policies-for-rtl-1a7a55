// dcr_monitor: decode/commit ratio (DCR) throttling trigger.
//
// The ratio of decoded to committed instructions estimates how much of the
// work entering the pipeline is useful: a front end that decodes far more
// than the back end commits is filling the window with instructions that
// wait or will be squashed.  Decoded and committed instructions are counted
// over a window of WINDOW cycles; at the end of each window trigger is set
// for the whole next window when decoded >= RATIO * committed (and something
// was decoded), and cleared otherwise.
//
// Interface: dec_count and com_count, instructions decoded and committed this
// cycle (0..4); trigger is registered.  The ratio of 3 follows the design
// description, whose footnote words it the other way round ("three times more
// committed than decoded"); the direction used here is the one that detects
// low useful throughput.  The window length is this design's choice.
module dcr_monitor #(
  parameter int unsigned WINDOW = 64,
  parameter int unsigned RATIO  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] dec_count,
  input  logic [2:0] com_count,
  output logic       trigger
);
  localparam int unsigned CW = $clog2(WINDOW * 4 + 1) + 1;
  localparam int unsigned TW = $clog2(WINDOW);
  typedef logic [CW-1:0] cnt_t;

  cnt_t                dec_acc, com_acc, dec_n, com_n;
  logic [TW-1:0]       tick;

  assign dec_n = dec_acc + CW'(dec_count);
  assign com_n = com_acc + CW'(com_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_acc <= '0;
      com_acc <= '0;
      tick    <= '0;
      trigger <= 1'b0;
    end else if (tick == TW'(WINDOW - 1)) begin
      trigger <= (dec_n != '0) && ((CW+2)'(dec_n) >= (CW+2)'(RATIO) * (CW+2)'(com_n));
      dec_acc <= '0;
      com_acc <= '0;
      tick    <= '0;
    end else begin
      dec_acc <= dec_n;
      com_acc <= com_n;
      tick    <= tick + 1'b1;
    end
  end
endmodule
