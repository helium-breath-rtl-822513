// freq_divider: slow-rate divider driven by the sampling signal.
//
// Counts rising edges of the SAMPLING square wave and divides them by DIV. With
// the default DIV = 640 the 9600 Hz sampling rate becomes 15 Hz (30 Hz at the
// 19.2 kHz rate), inside the 10-20 Hz range asked of this divider for the lower
// rate. The exact ratio is this design's choice. Here the divider's tick paces the
// auto-repeat of the pitch buttons.
//
// Interface: sampling is synchronous to clk. tick is high for one clock every DIV
// sampling periods (on the rising sampling edge that completes the count); slow is
// a square wave toggling on each tick.
module freq_divider #(
  parameter int unsigned DIV = 640
) (
  input  logic clk,
  input  logic rst,
  input  logic sampling,
  output logic tick,
  output logic slow
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic          samp_q;
  logic [CW-1:0] cnt;
  logic          rise;

  assign rise = sampling & ~samp_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      samp_q <= 1'b0;
      cnt    <= '0;
      tick   <= 1'b0;
      slow   <= 1'b0;
    end else begin
      samp_q <= sampling;
      tick   <= 1'b0;
      if (rise) begin
        if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
          slow <= ~slow;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
