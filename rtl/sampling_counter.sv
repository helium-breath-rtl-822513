// sampling_counter: write address within the Sampling Buffer.
//
// An 11-bit counter that counts up by one at each rising clock edge with count
// high, reaching all 2048 samples of a buffer. clear (ClearSamp) is a synchronous
// clear and wins over count. Follows the design description; clear priority is
// this design's choice.
module sampling_counter #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         count,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst || clear) q <= '0;
    else if (count)   q <= q + 1'b1;
  end
endmodule
