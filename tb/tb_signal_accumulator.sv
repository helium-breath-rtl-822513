// Tests clear, load (acc + bus mod 256), carry and hold of the accumulator.
`include "tb/tb_util.svh"
module tb_signal_accumulator;
  int checks = 0, failures = 0;
  logic clk = 0, rst, clear, load, carry; logic [7:0] bus, acc; int m;
  signal_accumulator dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    rst = 1; clear = 0; load = 0; bus = 0; @(posedge clk); #1; rst = 0; m = 0;
    `CHECK(acc == 0, "reset")
    for (int i = 0; i < 5000; i++) begin
      clear = ($urandom_range(0, 7) == 0); load = 1'($urandom); bus = 8'($urandom);
      #1; `CHECK(carry == ((m + int'(bus)) > 255), "carry")
      @(posedge clk); #1;
      if (clear) m = 0; else if (load) m = (m + int'(bus)) % 256;
      `CHECK(acc == 8'(m), "acc")
    end
    `TB_FINISH
  end
endmodule
