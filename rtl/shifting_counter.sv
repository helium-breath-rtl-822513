// shifting_counter: read address within the Shifting Buffer, with a fraction.
//
// A W-bit fixed-point counter: the upper W-FRAC bits (11) address a sample, the
// lower FRAC bits (6) are a fraction. Each clock with count high it adds step,
// the pitch multiplier, so 0x40 steps by exactly 1.0 sample, 0x41 slightly more
// (samples get skipped: the waveform is squished, pitch rises) and 0x3F slightly
// less (samples repeat: the waveform is stretched, pitch falls). The integer part
// wraps at 2048. clear (ClearShift) is a synchronous clear that wins over count.
// Widths follow the design description; clear priority is this design's choice.
module shifting_counter #(
  parameter int unsigned W      = 17,
  parameter int unsigned FRAC   = 6,
  parameter int unsigned STEP_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              count,
  input  logic [STEP_W-1:0] step,
  output logic [W-1:0]      q,
  output logic [W-FRAC-1:0] addr
);
  always_ff @(posedge clk) begin
    if (rst || clear) q <= '0;
    else if (count)   q <= q + W'(step);
  end

  assign addr = q[W-1:FRAC];
endmodule
