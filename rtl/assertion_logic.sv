// assertion_logic: decoding and registering of the control unit's assertions.
//
// On an assertion instruction (bit 15 = 1) bits 14:0 name the control signals to
// assert; on a branch the low bits are an address and nothing is asserted. The
// decoded controls are registered so that every output is glitch-free, which means
// a control is active during the clock cycle after its instruction, for exactly one
// cycle per instruction. Besides the active-high controls, the module produces the
// chip pins, which are active low and sit at 1 when unasserted:
//   A2D  /W  low for a conversion start; /CS low for a start or a read
//   SRAM /WE low for a write, /OE low for a read, /CS low for either
//   D2A  /CS low while its latch is open
// Registering follows the design description; the bit assignment is this design's.
module assertion_logic
  import ps_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] instr,
  output ctrl_t       ctrl,
  output pins_t       pins
);
  ctrl_t next;

  always_comb next = instr[15] ? ctrl_t'(instr[14:0]) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0;
      pins <= PINS_IDLE;
    end else begin
      ctrl           <= next;
      pins.a2d_w_n   <= ~next.a2d_start;
      pins.a2d_cs_n  <= ~(next.a2d_start | next.a2d_read);
      pins.sram_we_n <= ~next.sram_we;
      pins.sram_oe_n <= ~next.sram_oe;
      pins.sram_cs_n <= ~(next.sram_we | next.sram_oe);
      pins.d2a_cs_n  <= ~next.d2a_latch;
    end
  end

  // A read and a write of the SRAM in the same cycle is a microprogram error.
  assert property (@(posedge clk) disable iff (rst) !(ctrl.sram_we && ctrl.sram_oe));
endmodule
