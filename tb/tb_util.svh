// Shared checking macros for the testbenches. Each testbench declares
// "int checks, failures;" and ends with TB_FINISH.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL t=%0t: %s", $time, msg); \
    end \
  end
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define WATCHDOG(n) \
  initial begin \
    repeat (n) @(posedge clk); \
    failures++; \
    $display("FAIL watchdog expired"); \
    `TB_FINISH \
  end
`endif
