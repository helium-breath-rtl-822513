// Tests the data bus multiplexer: each of the three drivers alone, and nobody.
`include "tb/tb_util.svh"
module tb_data_bus;
  int checks = 0, failures = 0;
  logic a2d_drive, sram_drive, ramp_drive; logic [7:0] a2d_data, sram_data, ramp_data, bus;
  data_bus dut (.*);
  initial begin
    for (int i = 0; i < 4000; i++) begin
      a2d_data = 8'($urandom); sram_data = 8'($urandom); ramp_data = 8'($urandom);
      a2d_drive = (i % 4 == 0); sram_drive = (i % 4 == 1); ramp_drive = (i % 4 == 2);
      #1;
      `CHECK(bus == (a2d_drive ? a2d_data : sram_drive ? sram_data :
                     ramp_drive ? ramp_data : 8'h00), "bus")
    end
    `TB_FINISH
  end
endmodule
