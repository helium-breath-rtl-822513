// Tests fractional stepping of the shifting counter: after n counts with step s
// the integer address must be floor(n*s/64) mod 2048.
`include "tb/tb_util.svh"
module tb_shifting_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst, clear, count; logic [7:0] step; logic [16:0] q; logic [10:0] addr;
  longint acc;
  shifting_counter dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  initial begin
    rst = 1; clear = 0; count = 0; step = 8'h40; @(posedge clk); #1; rst = 0;
    for (int k = 0; k < 6; k++) begin
      step = (k == 0) ? 8'h40 : (k == 1) ? 8'h41 : (k == 2) ? 8'h3F : (k == 3) ? 8'h20 : (k == 4) ? 8'h80 : 8'hFF;
      clear = 1; count = 0; @(posedge clk); #1; clear = 0; acc = 0;
      `CHECK(q == 0, "clear")
      for (int n = 1; n <= 3000; n++) begin
        count = 1; @(posedge clk); #1;
        acc += longint'(step);
        `CHECK(addr == 11'((acc / 64) % 2048), $sformatf("step %h n %0d", step, n))
        `CHECK(q[5:0] == 6'(acc % 64), "fraction")
      end
    end
    count = 0; @(posedge clk); #1; `CHECK(q == 17'(acc), "hold")
    `TB_FINISH
  end
endmodule
