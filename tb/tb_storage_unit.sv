// Fills the sampling buffer through the bus, swaps buffers and reads the data back
// through the shifting counter at pitch 1.0 and at a raised pitch. Also checks the
// low address bits used by the ramp test.
`include "tb/tb_util.svh"
module tb_storage_unit;
  import ps_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, pitch_up, pitch_down; logic [3:0] buf_size_sel;
  ctrl_t ctrl; pins_t pins; logic [7:0] bus, sram_dout, pitch, addr_low; logic sram_drive, full;
  logic [7:0] written [2048];
  int acc, n;
  storage_unit dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  task automatic cyc(ctrl_t c);
    ctrl = c;
    pins = PINS_IDLE;
    pins.sram_we_n = !c.sram_we; pins.sram_oe_n = !c.sram_oe; pins.sram_cs_n = !(c.sram_we | c.sram_oe);
    @(posedge clk); #1;
    ctrl = '0; pins = PINS_IDLE;
  endtask
  function automatic ctrl_t mk(logic [14:0] bits); return ctrl_t'(bits); endfunction
  initial begin
    rst = 1; pitch_up = 0; pitch_down = 0; buf_size_sel = 4'd1; ctrl = '0; pins = PINS_IDLE; bus = 0;
    @(posedge clk); #1; rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      // fill: write then check Full, count, until full; then swap
      n = 0;
      forever begin
        bus = 8'($urandom); written[n] = bus;
        ctrl = mk(SRAM_WE); #1;
        `CHECK(full == (n >= 255), $sformatf("sampling full at %0d", n))
        `CHECK(addr_low == 8'(n), "address low bits follow the sampling counter")
        cyc(mk(SRAM_WE));
        if (n == 255) break;
        cyc(mk(COUNT)); n++;
      end
      `CHECK(n == 255, "256-sample buffer")
      cyc(mk(SWAP_BUF | CLEAR_SAMP | CLEAR_SHIFT));
      // read back at the current pitch
      acc = 0;
      for (int k = 0; k < 256; k++) begin
        ctrl = mk(SHIFT_COUNT | SHIFT_BUF | SRAM_OE);
        pins.sram_oe_n = 0; pins.sram_cs_n = 0; #1;
        `CHECK(sram_drive, "drive")
        `CHECK(addr_low == 8'(acc >> 6), "address low bits follow the shifting index")
        `CHECK(sram_dout == written[(acc >> 6) % 256], $sformatf("read %0d (pitch %h)", k, pitch))
        `CHECK(full == (((acc >> 6) % 2048) >= 255), "shift full")
        if (full) begin cyc(mk(COUNT | CLEAR_SHIFT)); acc = 0; end
        else begin cyc(mk(COUNT)); acc += int'(pitch); end
        if (((acc >> 6) % 2048) > 255) break;
      end
      // raise the pitch for the second pass
      repeat (10) begin pitch_up = 1; @(posedge clk); #1; end
      pitch_up = 0;
      `CHECK(pitch == 8'(64 + 10 * (pass + 1)), $sformatf("pitch raised to %h", pitch))
      cyc(mk(CLEAR_SAMP | CLEAR_SHIFT));
    end
    `TB_FINISH
  end
endmodule
