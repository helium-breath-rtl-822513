// Walks the control unit through the pitch shifter microprogram with hand-set
// status inputs and checks the instruction address and the registered controls:
// conditional branches taken and not taken, JMP, ASSERT and /RESET. Then does
// the same for parts of the three test programs.
`include "tb/tb_util.svh"
module tb_mcu;
  import ps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst; logic [1:0] prog_sel = 0; logic [6:0] status; ctrl_t ctrl; pins_t pins; logic [7:0] upc;
  mcu dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  // status bits: 0 SAMPLING, 1 A2D busy, 2 Full, 3 Shift, 4 PassOrig, 6 SAMPLING inverted
  task automatic step_expect(int exp_upc, string what);
    @(posedge clk); #1;
    `CHECK(upc == 8'(exp_upc), $sformatf("%s: upc %0d expected %0d", what, upc, exp_upc))
  endtask
  initial begin
    rst = 1; status = 7'b0000001; repeat (2) @(posedge clk); #1;
    `CHECK(upc == 0, "reset address")
    rst = 0;
    step_expect(1, "after init");
    `CHECK(ctrl.clear_samp && ctrl.clear_shift && ctrl.acc_clear && !ctrl.count, "init asserts")
    step_expect(1, "wait while SAMPLING high");
    step_expect(1, "wait while SAMPLING high");
    status[0] = 0; status[6] = 1;
    step_expect(2, "SAMPLING low");
    step_expect(2, "wait while SAMPLING low");
    step_expect(2, "wait while SAMPLING low");
    status[0] = 1; status[6] = 0;
    step_expect(3, "rising edge");
    step_expect(4, "");
    step_expect(5, "start");
    `CHECK(ctrl.a2d_start && !pins.a2d_w_n && !pins.a2d_cs_n, "conversion start pins")
    step_expect(6, ""); step_expect(7, ""); step_expect(8, "");
    status[1] = 1;
    step_expect(8, "busy"); step_expect(8, "busy");
    status[1] = 0; status[4] = 1; status[3] = 1;
    step_expect(9, "conversion done");
    step_expect(12, "PassOrig taken");
    step_expect(13, "");
    `CHECK(ctrl.a2d_read && ctrl.sram_we && ctrl.acc_load && pins.a2d_w_n && !pins.a2d_cs_n && !pins.sram_we_n, "store+mix")
    step_expect(15, "Shift taken");
    step_expect(16, "");
    `CHECK(ctrl.shift_count && ctrl.shift_buf && ctrl.sram_oe && ctrl.acc_load && !pins.sram_oe_n, "shift read")
    status[2] = 1;
    step_expect(23, "shift full -> wrap path");
    step_expect(24, "");
    step_expect(25, "");
    `CHECK(ctrl.d2a_latch && !pins.d2a_cs_n, "d2a latch")
    status[2] = 0;
    step_expect(26, "sampling not full");
    step_expect(27, "");
    `CHECK(ctrl.count && ctrl.clear_shift, "count + clear shift")
    step_expect(1, "back to wait");
    // second sample: no pass, no shift, sampling full -> swap
    status = 7'b1000000;
    step_expect(2, ""); step_expect(2, ""); status = 7'b0000001; step_expect(3, ""); step_expect(4, "");
    step_expect(5, ""); step_expect(6, ""); step_expect(7, ""); step_expect(8, "");
    step_expect(9, ""); step_expect(10, "PassOrig not taken"); step_expect(11, "");
    `CHECK(ctrl.a2d_read && ctrl.sram_we && !ctrl.acc_load, "store only")
    step_expect(13, "JMP"); step_expect(14, "Shift not taken"); step_expect(18, "JMP out");
    status[2] = 1;
    step_expect(19, ""); step_expect(28, "sampling full -> swap"); step_expect(29, "");
    `CHECK(ctrl.swap_buf && ctrl.clear_samp && ctrl.clear_shift && !ctrl.count, "swap")
    step_expect(1, "");
    rst = 1; step_expect(0, "reset");
    // loopback program
    prog_sel = 1; status = 7'b0000001; step_expect(0, "reset");
    rst = 0;
    step_expect(1, ""); `CHECK(ctrl.acc_clear, "loopback clear")
    status = 7'b1000000; step_expect(2, ""); step_expect(2, "");
    status = 7'b0000001; step_expect(3, ""); step_expect(4, "");
    `CHECK(ctrl.a2d_start && ctrl.acc_clear, "loopback start")
    step_expect(5, ""); step_expect(6, ""); step_expect(7, "");
    status[1] = 1; step_expect(7, "busy"); status[1] = 0;
    step_expect(8, ""); step_expect(9, "");
    `CHECK(ctrl.a2d_read && ctrl.acc_load && !ctrl.sram_we && !ctrl.count, "loopback read")
    step_expect(10, ""); `CHECK(ctrl.d2a_latch, "loopback output")
    step_expect(1, "loop");
    // storage ramp program
    rst = 1; prog_sel = 2; status = 7'b1000000; step_expect(0, "reset");
    rst = 0;
    step_expect(1, ""); `CHECK(ctrl.clear_samp && ctrl.clear_shift && ctrl.acc_clear, "ramp clears")
    step_expect(2, ""); step_expect(2, "");
    status = 7'b0000001; step_expect(3, ""); step_expect(4, "");
    `CHECK(ctrl.acc_clear && !ctrl.a2d_start, "ramp clear")
    step_expect(5, "");
    `CHECK(ctrl.ramp_drive && ctrl.sram_we && pins.sram_oe_n && !pins.sram_we_n && pins.a2d_cs_n, "ramp store")
    step_expect(6, "");
    `CHECK(ctrl.shift_count && ctrl.shift_buf && ctrl.sram_oe && ctrl.acc_load && !ctrl.ramp_drive, "ramp read")
    step_expect(7, "not at end"); step_expect(8, ""); `CHECK(ctrl.d2a_latch, "ramp output")
    status[2] = 1; step_expect(16, "sampling full"); step_expect(17, "");
    `CHECK(ctrl.swap_buf && ctrl.clear_samp && ctrl.clear_shift, "ramp swap")
    status = 7'b1000000; step_expect(1, ""); step_expect(2, "");
    status = 7'b0000001; step_expect(3, ""); step_expect(4, ""); step_expect(5, "");
    status[2] = 1; step_expect(6, ""); step_expect(12, "shifting at end");
    status[2] = 0; step_expect(13, ""); `CHECK(ctrl.d2a_latch, "ramp output 2")
    step_expect(14, ""); step_expect(15, "");
    `CHECK(ctrl.count && ctrl.clear_shift && !ctrl.clear_samp, "ramp wrap")
    step_expect(1, "");
    // adder test program
    rst = 1; prog_sel = 3; status = 7'b1000000; step_expect(0, "reset");
    rst = 0;
    step_expect(1, ""); `CHECK(ctrl.clear_samp && ctrl.acc_clear, "adder clears")
    step_expect(2, ""); status = 7'b0000001; step_expect(3, "");
    step_expect(4, ""); `CHECK(ctrl.ramp_drive && ctrl.acc_load && !ctrl.acc_clear && !ctrl.sram_we, "adder add")
    step_expect(5, ""); `CHECK(ctrl.d2a_latch, "adder output")
    step_expect(6, "not full"); step_expect(7, ""); `CHECK(ctrl.count, "adder count")
    status = 7'b1000000; step_expect(1, ""); step_expect(2, "");
    status = 7'b0000001; step_expect(3, ""); step_expect(4, ""); step_expect(5, ""); status[2] = 1;
    step_expect(8, "full"); step_expect(9, "");
    `CHECK(ctrl.clear_samp && !ctrl.count, "adder index restart")
    step_expect(1, "");
    `TB_FINISH
  end
endmodule
