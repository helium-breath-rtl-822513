// Tests count, wrap at 2048 and clear priority of the sampling counter.
`include "tb/tb_util.svh"
module tb_sampling_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst, clear, count; logic [10:0] q; int m;
  sampling_counter dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    rst = 1; clear = 0; count = 0; @(posedge clk); #1; rst = 0; m = 0;
    `CHECK(q == 0, "reset")
    for (int i = 0; i < 6000; i++) begin
      count = ($urandom_range(0, 3) != 0); clear = ($urandom_range(0, 2999) == 0);
      @(posedge clk); #1;
      if (clear) m = 0; else if (count) m = (m + 1) % 2048;
      `CHECK(q == 11'(m), "sampling counter")
    end
    count = 1; clear = 1; @(posedge clk); #1; `CHECK(q == 0, "clear wins")
    `TB_FINISH
  end
endmodule
