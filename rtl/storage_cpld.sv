// storage_cpld: SRAM address logic of the storage unit (one CPLD).
//
// Holds the sampling counter (11 bits, +1 per count), the shifting counter
// (17 bits, + pitch multiplier per count), the 8-bit pitch multiplier counter, the
// BufSel flip-flop and the full detector. shift_count selects which counter
// addresses the SRAM (0: sampling, 1: the 11 integer bits of the shifting
// counter); that 11-bit address also feeds the full detector. The twelfth SRAM
// address bit picks the buffer (see buf_sel). All counters change at the rising
// clock edge; sram_addr and full are combinational from the registers and
// shift_count/shift_buf. The structure follows the design description.
module storage_cpld #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          count,
  input  logic          clear_samp,
  input  logic          clear_shift,
  input  logic          swap_buf,
  input  logic          shift_count,
  input  logic          shift_buf,
  input  logic          pitch_up,
  input  logic          pitch_down,
  input  logic [3:0]    buf_size_sel,
  output logic [AW:0]   sram_addr,
  output logic          full,
  output logic [7:0]    pitch
);
  logic [AW-1:0]   samp_q, shift_addr, addr;
  logic [AW+5:0]   shift_q;
  logic            a_buf, bufsel;

  pitch_mult_counter u_pitch (.clk(clk), .rst(rst), .up(pitch_up), .down(pitch_down), .q(pitch));

  sampling_counter #(.W(AW)) u_samp (
    .clk(clk), .rst(rst), .clear(clear_samp), .count(count), .q(samp_q));

  shifting_counter #(.W(AW+6), .FRAC(6), .STEP_W(8)) u_shift (
    .clk(clk), .rst(rst), .clear(clear_shift), .count(count), .step(pitch),
    .q(shift_q), .addr(shift_addr));

  buf_sel u_bufsel (.clk(clk), .rst(rst), .swap(swap_buf), .shift_buf(shift_buf),
                    .bufsel(bufsel), .a_buf(a_buf));

  assign addr      = shift_count ? shift_addr : samp_q;
  assign sram_addr = {a_buf, addr};

  full_detector #(.AW(AW)) u_full (.addr(addr), .size_sel(buf_size_sel), .full(full));

  // shift_q's fraction and bufsel are internal state only.
  logic unused;
  assign unused = ^{shift_q, bufsel};
endmodule
