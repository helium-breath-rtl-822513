// sram_6264: 8K x 8 static RAM with /CS, /WE and /OE (6264 type).
//
// Written as a memory array. A write stores din at address a at the rising clock
// edge while /CS and /WE are low. While /CS and /OE are low (and /WE high), dout
// shows the word at a combinationally; otherwise dout is 0 and drive is low, so
// the data bus can tell whether the RAM is driving it. The real part is
// asynchronous and has one bidirectional data port; the clocked write and the
// split data ports are this design's choices.
module sram_6264 #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  input  logic          cs_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  output logic          drive
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!cs_n && !we_n) mem[a] <= din;
  end

  assign drive = !cs_n && !oe_n && we_n;
  assign dout  = drive ? mem[a] : '0;
endmodule
