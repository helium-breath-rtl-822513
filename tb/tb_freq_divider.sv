// Drives a fast stand-in sampling square wave and checks that a tick comes every
// DIV sampling periods (overridden to 10 here; the default is 640).
`include "tb/tb_util.svh"
module tb_freq_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst, sampling, tick, slow; int cyc, last_tick, nticks; logic slow_prev;
  freq_divider #(.DIV(10)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    rst = 1; sampling = 0; repeat (2) @(posedge clk); rst = 0;
    cyc = 0; last_tick = -1; nticks = 0; slow_prev = 0;
    for (int i = 0; i < 8 * 10 * 10; i++) begin
      sampling = ((i % 8) < 4);
      @(posedge clk); #1; cyc++;
      if (tick) begin
        nticks++;
        if (last_tick >= 0) `CHECK(cyc - last_tick == 80, $sformatf("tick spacing %0d", cyc - last_tick))
        `CHECK(slow != slow_prev, "slow toggles on tick")
        last_tick = cyc;
      end else begin
        `CHECK(slow == slow_prev, "slow steady")
      end
      slow_prev = slow;
    end
    `CHECK(nticks == 10, $sformatf("ticks %0d", nticks))
    `TB_FINISH
  end
endmodule
