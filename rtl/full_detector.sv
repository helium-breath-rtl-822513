// full_detector: end-of-buffer detection for the selected buffer size.
//
// The four buffer size switches pick one of sixteen buffer sizes,
// UNIT*(size_sel+1) samples: 128, 256, ... 2048 with the default UNIT = 128.
// full is high while the multiplexed SRAM address is at or past the last index of
// that size, telling the control unit to restart a counter and perhaps swap
// buffers. Sixteen sizes up to a 2048-sample buffer follow the design description;
// the size table is this design's choice. Purely combinational.
module full_detector #(
  parameter int unsigned AW   = 11,
  parameter int unsigned UNIT = 128
) (
  input  logic [AW-1:0] addr,
  input  logic [3:0]    size_sel,
  output logic          full
);
  logic [AW:0] last;   // last index of the chosen buffer size

  always_comb begin
    last = (AW+1)'(UNIT) * ((AW+1)'(size_sel) + 1'b1) - 1'b1;
    full = ({1'b0, addr} >= last);
  end
endmodule
