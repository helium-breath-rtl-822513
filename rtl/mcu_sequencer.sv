// mcu_sequencer: microprogram counter (two cascaded LS163 4-bit counters).
//
// A synchronous counter that holds the address of the current microinstruction.
// At each rising clock edge: /CLR low clears it (the /RESET line, forcing a
// restart at address 0); otherwise /LOAD low loads the jump address d (a taken
// branch); otherwise it counts up by one (an assertion or an untaken branch).
// Clear and load are synchronous, as in the LS163. This follows the design
// description; the width is a parameter (8 bits as built from two counters).
module mcu_sequencer #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              clr_n,
  input  logic              load_n,
  input  logic [ADDR_W-1:0] d,
  output logic [ADDR_W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!clr_n)       q <= '0;
    else if (!load_n) q <= d;
    else              q <= q + 1'b1;
  end
endmodule
