// Checks decoding, one-cycle registering and pin polarity of the assertion logic.
`include "tb/tb_util.svh"
module tb_assertion_logic;
  import ps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst; logic [15:0] instr; ctrl_t ctrl; pins_t pins;
  logic [14:0] e;
  assertion_logic dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  initial begin
    rst = 1; instr = 16'h8000 | 16'h7FFF; @(posedge clk); #1;
    `CHECK(ctrl == '0 && pins == PINS_IDLE, "reset")
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      instr = 16'($urandom);
      if (instr[15]) instr[3] = instr[3] & ~instr[2];  // no simultaneous SRAM read and write
      @(posedge clk); #1;
      e = instr[15] ? instr[14:0] : 15'h0;
      `CHECK(ctrl == ctrl_t'(e), "ctrl")
      `CHECK(pins.a2d_w_n == !e[0], "a2d_w_n")
      `CHECK(pins.a2d_cs_n == !(e[0] | e[1]), "a2d_cs_n")
      `CHECK(pins.sram_we_n == !e[2] && pins.sram_oe_n == !e[3] && pins.sram_cs_n == !(e[2] | e[3]), "sram pins")
      `CHECK(pins.d2a_cs_n == !e[12], "d2a_cs_n")
    end
    `TB_FINISH
  end
endmodule
