// storage_unit: sample storage, CPLD address logic plus a 6264 SRAM.
//
// Two 2048-byte halves of the SRAM serve as the Sampling Buffer (being filled
// from the A2D) and the Shifting Buffer (being read back at the fractional rate
// set by the pitch multiplier); BufSel decides which half is which. The control
// signals come from the control unit (ctrl, active high) and the SRAM pins from
// its assertion logic (pins, active low). The SRAM writes the data bus and, when
// read, offers sram_dout with sram_drive high. Address bit 12 of the SRAM is
// unused and held at 0. addr_low, the low 8 bits of the CPLD's address output,
// is the data source for the ramp and adder tests. Structure follows the design
// description.
module storage_unit
  import ps_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  ctrl_t      ctrl,
  input  pins_t      pins,
  input  logic       pitch_up,
  input  logic       pitch_down,
  input  logic [3:0] buf_size_sel,
  input  logic [7:0] bus,
  output logic [7:0] sram_dout,
  output logic       sram_drive,
  output logic       full,
  output logic [7:0] pitch,
  output logic [7:0] addr_low
);
  logic [11:0] addr;

  storage_cpld u_cpld (
    .clk(clk), .rst(rst), .count(ctrl.count), .clear_samp(ctrl.clear_samp),
    .clear_shift(ctrl.clear_shift), .swap_buf(ctrl.swap_buf),
    .shift_count(ctrl.shift_count), .shift_buf(ctrl.shift_buf),
    .pitch_up(pitch_up), .pitch_down(pitch_down), .buf_size_sel(buf_size_sel),
    .sram_addr(addr), .full(full), .pitch(pitch));

  assign addr_low = addr[7:0];

  sram_6264 u_sram (
    .clk(clk), .a({1'b0, addr}), .cs_n(pins.sram_cs_n), .we_n(pins.sram_we_n),
    .oe_n(pins.sram_oe_n), .din(bus), .dout(sram_dout), .drive(sram_drive));
endmodule
