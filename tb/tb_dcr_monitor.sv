// tb_dcr_monitor: self-checking test of the decode/commit ratio trigger.
// With an 8-cycle window, random decode and commit counts are summed by a
// reference; the trigger must change only at window boundaries and equal
// (decoded != 0 && decoded >= 3 * committed) of the previous window.
`include "tb_util.svh"
module tb_dcr_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, trigger;
  logic [2:0] dec_count, com_count;
  int dsum = 0, csum = 0, k = 0, n_on = 0, n_off = 0;
  logic exp_t = 0;

  dcr_monitor #(.WINDOW(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_FINISH end

  initial begin
    dec_count = 0; com_count = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int phase; phase = (t / 200) % 3;
      dec_count = 3'($urandom % 5);
      com_count = (phase == 0) ? 3'($urandom % 2) : (phase == 1) ? 3'($urandom % 5) : 3'(0);
      if (phase == 2 && (t / 40) % 2 == 0) dec_count = 0;
      #1;
      `CHECK(trigger == exp_t, $sformatf("trigger at window step %0d", k))
      if (trigger) n_on++; else n_off++;
      dsum += dec_count; csum += com_count; k++;
      if (k == 8) begin
        exp_t = (dsum != 0) && (dsum >= 3 * csum);
        dsum = 0; csum = 0; k = 0;
      end
      @(posedge clk); #1;
    end
    `CHECK(n_on > 0 && n_off > 0, "trigger toggled")
    `TB_FINISH
  end
endmodule
