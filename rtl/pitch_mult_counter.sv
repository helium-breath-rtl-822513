// pitch_mult_counter: the pitch multiplier (increment of the shifting counter).
//
// An 8-bit up/down counter: it counts up at a clock edge with up high and down at
// one with down high (both together: no change). Read as a fixed-point number with
// 6 fraction bits, 0x40 is 1.0 (no shift), 0x20 half pitch, 0x80 double pitch.
// Reset loads RESET_VAL = 0x40, so /RESET cancels any pitch shift. The counter
// stops at 0 and at 255 rather than wrapping. The up/down behaviour follows the
// design description; the reset value reading and the saturation are this
// design's choices.
module pitch_mult_counter #(
  parameter int unsigned     W         = 8,
  parameter logic [W-1:0]    RESET_VAL = W'(64)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)                         q <= RESET_VAL;
    else if (up && !down && !(&q))   q <= q + 1'b1;
    else if (down && !up && (|q))    q <= q - 1'b1;
  end
endmodule
