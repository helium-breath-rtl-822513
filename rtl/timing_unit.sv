// timing_unit: sampling-rate generator.
//
// Divides the system clock into the SAMPLING square wave that tells the control
// unit when to start an A2D conversion. Two rates are available, picked by the
// sampling frequency select switch: 9600 Hz (base rate) and 19.2 kHz (higher
// quality), from a 921.6 kHz clock, i.e. 96 or 48 clocks per sample. The rates and
// clock are the ones suggested for the design; the square-wave shape (high for the
// first half of each period) is this design's choice.
//
// Interface: clk, rst (synchronous, active high), fs_sel (1 = high rate) ->
// sampling. A change of fs_sel takes effect at the next period boundary.
module timing_unit #(
  parameter int unsigned CLK_HZ     = 921_600,
  parameter int unsigned FS_LOW_HZ  = 9_600,
  parameter int unsigned FS_HIGH_HZ = 19_200
) (
  input  logic clk,
  input  logic rst,
  input  logic fs_sel,
  output logic sampling
);
  localparam int unsigned DIV_LOW  = CLK_HZ / FS_LOW_HZ;
  localparam int unsigned DIV_HIGH = CLK_HZ / FS_HIGH_HZ;
  localparam int unsigned CW       = $clog2(DIV_LOW + 1);

  initial begin
    assert (DIV_HIGH >= 2 && DIV_LOW >= DIV_HIGH)
      else $error("timing_unit: clock too slow for the sampling rates");
  end

  logic [CW-1:0] cnt;
  logic [CW-1:0] period;   // clocks in the current period, latched at its start

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      period <= CW'(DIV_LOW);
    end else if (cnt == period - 1'b1) begin
      cnt    <= '0;
      period <= fs_sel ? CW'(DIV_HIGH) : CW'(DIV_LOW);
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign sampling = (cnt < (period >> 1));
endmodule
