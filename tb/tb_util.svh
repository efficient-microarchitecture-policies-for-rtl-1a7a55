// tb_util.svh: checking helpers shared by the testbenches.
// Each testbench declares `int checks, failures;` and uses CHECK to compare
// a block's output with an independently computed expectation.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg); \
    end \
  end
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
