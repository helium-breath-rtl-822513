// cond_mux: condition multiplexer of the control unit (an LS151 8-to-1 mux).
//
// With the enable /G low, Y is the data input picked by sel and /W its inverse;
// with /G high, Y is 0 and /W is 1. In the control unit /G is instruction bit 15
// (0 for branches), sel is bits 14:12, seven inputs carry status signals and input
// 7 is tied to logic 1 so that select 7 is an unconditional branch. /W drives the
// sequencer's /LOAD: the sequencer loads the jump address only on a branch whose
// selected status is high. This follows the design description.
//
// Purely combinational.
module cond_mux (
  input  logic [7:0] d,
  input  logic [2:0] sel,
  input  logic       g_n,
  output logic       y,
  output logic       w_n
);
  always_comb begin
    y   = ~g_n & d[sel];
    w_n = ~y;
  end
endmodule
