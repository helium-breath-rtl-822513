// signal_accumulator: mixer for the original and the pitch-shifted signal.
//
// An 8-bit register fed by an 8-bit adder that adds the data bus to the
// register's current value. At a rising clock edge: clear empties it (wins over
// load); load stores acc + bus. Clearing and then loading once passes one signal;
// loading twice (original sample, then shifted sample) mixes both. The sum wraps
// modulo 256; carry is the adder's carry out for the current bus value, available
// to the control unit as status. acc drives the D2A. Follows the design
// description; clear priority is this design's choice.
module signal_accumulator (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       load,
  input  logic [7:0] bus,
  output logic [7:0] acc,
  output logic       carry
);
  logic [7:0] sum;

  adder8 u_add (.a(acc), .b(bus), .ci(1'b0), .s(sum), .co(carry));

  always_ff @(posedge clk) begin
    if (rst || clear) acc <= '0;
    else if (load)    acc <= sum;
  end
endmodule
