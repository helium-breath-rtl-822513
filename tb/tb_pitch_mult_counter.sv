// Tests reset value (1.0), up/down counting and saturation of the pitch multiplier.
`include "tb/tb_util.svh"
module tb_pitch_mult_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst, up, down; logic [7:0] q; int m;
  pitch_mult_counter dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    rst = 1; up = 0; down = 0; @(posedge clk); #1; rst = 0;
    `CHECK(q == 8'h40, "reset to 1.0")
    m = 64;
    for (int i = 0; i < 300; i++) begin up = 1; @(posedge clk); #1; m = (m < 255) ? m + 1 : 255; `CHECK(q == 8'(m), "up") end
    `CHECK(q == 8'hFF, "saturate high")
    up = 0;
    for (int i = 0; i < 300; i++) begin down = 1; @(posedge clk); #1; m = (m > 0) ? m - 1 : 0; `CHECK(q == 8'(m), "down") end
    `CHECK(q == 0, "saturate low")
    for (int i = 0; i < 2000; i++) begin
      up = 1'($urandom); down = 1'($urandom); @(posedge clk); #1;
      if (up && !down && m < 255) m++; else if (down && !up && m > 0) m--;
      `CHECK(q == 8'(m), "random")
    end
    up = 0; down = 0; rst = 1; @(posedge clk); #1; `CHECK(q == 8'h40, "reset again")
    `TB_FINISH
  end
endmodule
