// pitch_shifter: real-time audio pitch shifter (top level).
//
// Audio is sampled by an external 8-bit A2D (AD670) into one half of an SRAM, the
// Sampling Buffer, while the other half, the Shifting Buffer, holding the
// previous chunk, is read back through a fractional address counter. Stepping
// that counter by less than one sample per output repeats samples (the chunk is
// stretched: lower pitch); stepping by more skips samples and wraps around to the
// start of the chunk (squished: higher pitch). When the Sampling Buffer is full
// the two halves swap roles. A signal accumulator can mix the original sample
// with the shifted one before it goes to the external 8-bit D2A (AD558).
//
// A microprogrammed control unit runs the whole sequence once per sampling
// period: wait for the SAMPLING edge, start a conversion, wait for STATUS to
// fall, write the sample, read the shifted sample, output, advance the counters,
// and swap buffers or restart the shifting counter when the full detector says so.
//
// Blocks: synchronizer (all switches, buttons, /RESET, A2D STATUS), timing_unit
// (921.6 kHz clock -> 9600 or 19200 Hz SAMPLING), freq_divider (15 Hz auto-repeat
// for the pitch buttons), mcu, storage_unit, data_bus, signal_accumulator.
// The block structure follows the design description; the microprogram, the
// auto-repeat source and the bus multiplexer are this design's choices.
//
// prog_sel picks the microprogram: 0 the pitch shifter, 1 a converter loopback
// test (A2D straight to D2A through the accumulator), 2 a storage test that
// records a ramp (the low SRAM address bits) instead of A2D samples and plays it
// back shifted, 3 an adder test that sums the low SRAM address bits in the
// accumulator. Change it while /RESET is low.
//
// External converters: the A2D starts converting on a clock with a2d_w_n and
// a2d_cs_n low, raises a2d_status while converting and must present a2d_data
// while a2d_cs_n is low with a2d_w_n high. The D2A latch is open while d2a_cs_n
// is low; d2a_data (the accumulator) is stable then.
module pitch_shifter
  import ps_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 921_600,
  parameter int unsigned FS_LOW_HZ  = 9_600,
  parameter int unsigned FS_HIGH_HZ = 19_200,
  parameter int unsigned REPEAT_DIV = 640
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       pitch_up,
  input  logic       pitch_down,
  input  logic       shift_sw,
  input  logic       pass_orig_sw,
  input  logic       fs_sel,
  input  logic [3:0] buf_size_sel,
  input  logic [1:0] prog_sel,
  input  logic [7:0] a2d_data,
  input  logic       a2d_status,
  output logic       a2d_w_n,
  output logic       a2d_cs_n,
  output logic [7:0] d2a_data,
  output logic       d2a_cs_n,
  output logic [7:0] pitch,
  output logic [7:0] upc
);
  logic       rst;
  logic       up_p, down_p, shift_s, pass_s, fs_s, status_s;
  logic [1:0] psel_s;
  logic [7:0] addr_low;
  logic [3:0] size_s;
  logic       sampling, repeat_tick, slow;
  ctrl_t      ctrl;
  pins_t      pins;
  logic [7:0] bus, sram_dout;
  logic       sram_drive, a2d_drive, full, carry;

  synchronizer u_sync (
    .clk(clk), .reset_n_async(reset_n), .pitch_up_async(pitch_up),
    .pitch_down_async(pitch_down), .shift_async(shift_sw), .pass_orig_async(pass_orig_sw),
    .fs_sel_async(fs_sel), .buf_size_async(buf_size_sel), .a2d_status_async(a2d_status),
    .repeat_tick(repeat_tick), .rst(rst), .pitch_up_pulse(up_p), .pitch_down_pulse(down_p),
    .shift_s(shift_s), .pass_orig_s(pass_s), .fs_sel_s(fs_s), .buf_size_s(size_s),
    .a2d_status_s(status_s), .prog_sel_async(prog_sel), .prog_sel_s(psel_s));

  timing_unit #(.CLK_HZ(CLK_HZ), .FS_LOW_HZ(FS_LOW_HZ), .FS_HIGH_HZ(FS_HIGH_HZ)) u_timing (
    .clk(clk), .rst(rst), .fs_sel(fs_s), .sampling(sampling));

  freq_divider #(.DIV(REPEAT_DIV)) u_repeat (
    .clk(clk), .rst(rst), .sampling(sampling), .tick(repeat_tick), .slow(slow));

  mcu u_mcu (
    .clk(clk), .rst(rst), .prog_sel(psel_s),
    .status({~sampling, carry, pass_s, shift_s, full, status_s, sampling}),
    .ctrl(ctrl), .pins(pins), .upc(upc));

  storage_unit u_store (
    .clk(clk), .rst(rst), .ctrl(ctrl), .pins(pins), .pitch_up(up_p), .pitch_down(down_p),
    .buf_size_sel(size_s), .bus(bus), .sram_dout(sram_dout), .sram_drive(sram_drive),
    .full(full), .pitch(pitch), .addr_low(addr_low));

  assign a2d_drive = !pins.a2d_cs_n && pins.a2d_w_n;

  data_bus u_bus (
    .a2d_drive(a2d_drive), .a2d_data(a2d_data), .sram_drive(sram_drive),
    .sram_data(sram_dout), .ramp_drive(ctrl.ramp_drive), .ramp_data(addr_low), .bus(bus));

  signal_accumulator u_acc (
    .clk(clk), .rst(rst), .clear(ctrl.acc_clear), .load(ctrl.acc_load), .bus(bus),
    .acc(d2a_data), .carry(carry));

  assign a2d_w_n  = pins.a2d_w_n;
  assign a2d_cs_n = pins.a2d_cs_n;
  assign d2a_cs_n = pins.d2a_cs_n;

  // Only one unit may drive the data bus.
  assert property (@(posedge clk) disable iff (rst)
                   $onehot0({a2d_drive, sram_drive, ctrl.ramp_drive}));

  // The slow divider output has no use in the pitch shifter itself.
  logic unused;
  assign unused = slow;
endmodule
