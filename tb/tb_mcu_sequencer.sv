// Tests count, synchronous load and synchronous clear of the microprogram counter.
`include "tb/tb_util.svh"
module tb_mcu_sequencer;
  int checks = 0, failures = 0;
  logic clk = 0, clr_n, load_n; logic [7:0] d, q, exp_q;
  mcu_sequencer #(.ADDR_W(8)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  initial begin
    clr_n = 0; load_n = 1; d = 0;
    @(posedge clk); #1;
    `CHECK(q == 0, "clear")
    exp_q = 0;
    for (int i = 0; i < 2000; i++) begin
      clr_n = ($urandom_range(0, 19) != 0); load_n = ($urandom_range(0, 3) != 0); d = 8'($urandom);
      @(posedge clk); #1;
      if (!clr_n) exp_q = 0; else if (!load_n) exp_q = d; else exp_q = exp_q + 1;
      `CHECK(q == exp_q, "sequencer next address")
    end
    `TB_FINISH
  end
endmodule
