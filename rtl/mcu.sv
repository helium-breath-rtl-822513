// mcu: microprogrammed control unit.
//
// The sequencer's address reads a microinstruction from the microcode store. On a
// branch (bit 15 = 0) the condition mux selects one of eight conditions (seven
// status inputs and constant true); if it is 1 the sequencer loads bits 7:0 at the
// next clock, otherwise it steps to the next address. Assertion instructions never
// branch; the assertion logic turns their bits into registered control signals.
// rst (the synchronized /RESET) clears the sequencer to address 0. prog_sel
// picks the program in the microcode store; change it only while in reset.
// Structure and instruction set follow the design description.
//
// Status inputs: see ps_pkg (ST_*). Status must be synchronous to clk.
// Timing: one instruction per clock; controls appear one clock after their
// instruction.
module mcu
  import ps_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [PSEL_W-1:0]   prog_sel,
  input  logic [6:0]          status,
  output ctrl_t               ctrl,
  output pins_t               pins,
  output logic [UADDR_W-1:0]  upc
);
  logic [15:0] instr;
  logic        load_n;

  mcu_sequencer #(.ADDR_W(UADDR_W)) u_seq (
    .clk(clk), .clr_n(~rst), .load_n(load_n), .d(instr[UADDR_W-1:0]), .q(upc));

  microcode_rom #(.ADDR_W(UADDR_W)) u_rom (.prog_sel(prog_sel), .addr(upc), .data(instr));

  cond_mux u_mux (
    .d({1'b1, status}), .sel(instr[14:12]), .g_n(instr[15]), .y(), .w_n(load_n));

  assertion_logic u_assert (.clk(clk), .rst(rst), .instr(instr), .ctrl(ctrl), .pins(pins));
endmodule
