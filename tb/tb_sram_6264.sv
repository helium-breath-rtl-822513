// Tests the SRAM model against a reference array with random accesses.
`include "tb/tb_util.svh"
module tb_sram_6264;
  int checks = 0, failures = 0;
  logic clk = 0; logic [12:0] a; logic cs_n, we_n, oe_n; logic [7:0] din, dout; logic drive;
  logic [7:0] ref_mem [8192]; bit valid [8192];
  sram_6264 dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  initial begin
    cs_n = 1; we_n = 1; oe_n = 1; a = 0; din = 0;
    for (int i = 0; i < 20000; i++) begin
      a = 13'($urandom_range(0, 63)) | (13'($urandom_range(0, 1)) << 12);
      din = 8'($urandom);
      case ($urandom_range(0, 3))
        0: begin cs_n = 0; we_n = 0; oe_n = 1; end
        1, 2: begin cs_n = 0; we_n = 1; oe_n = 0; end
        default: begin cs_n = 1; we_n = 1'($urandom_range(0, 1)); oe_n = 0; end
      endcase
      #1;
      if (!cs_n && !oe_n && we_n) begin
        `CHECK(drive, "drive")
        if (valid[a]) `CHECK(dout == ref_mem[a], "read data")
      end else begin
        `CHECK(!drive && dout == 0, "idle")
      end
      @(posedge clk);
      if (!cs_n && !we_n) begin ref_mem[a] = din; valid[a] = 1; end
      #1;
    end
    `TB_FINISH
  end
endmodule
