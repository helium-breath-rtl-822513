// Tests the BufSel toggle and the buffer address bit.
`include "tb/tb_util.svh"
module tb_buf_sel;
  int checks = 0, failures = 0;
  logic clk = 0, rst, swap, shift_buf, bufsel, a_buf; logic m;
  buf_sel dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  initial begin
    rst = 1; swap = 0; shift_buf = 0; @(posedge clk); #1; rst = 0; m = 0;
    `CHECK(bufsel == 0, "reset")
    for (int i = 0; i < 500; i++) begin
      swap = 1'($urandom); shift_buf = 1'($urandom);
      @(posedge clk); #1;
      if (swap) m = !m;
      `CHECK(bufsel == m, "toggle")
      `CHECK(a_buf == (shift_buf ? !m : m), "buffer bit")
    end
    `TB_FINISH
  end
endmodule
