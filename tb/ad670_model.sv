// ad670_model: behavioural model of an AD670-style 8-bit A2D converter, for
// simulation only (the real part is analog).
//
// A clock with /W and /CS both low starts a conversion: STATUS goes high at that
// edge and stays high for CONV_CYCLES clocks (10 us at 921.6 kHz is about 10
// clocks). The converted value is sample(n) for the n-th conversion, a
// deterministic test waveform. While /CS is low with /W high (a read) the value is
// on data; otherwise data reads 0.
module ad670_model #(
  parameter int unsigned CONV_CYCLES = 10
) (
  input  logic       clk,
  input  logic       w_n,
  input  logic       cs_n,
  output logic       status,
  output logic [7:0] data,
  output int         conversions
);
  int unsigned busy = 0;
  logic [7:0] value = 8'h00;

  // test waveform: a coarse triangle plus a small ripple, so neighbouring
  // samples differ
  function automatic logic [7:0] sample(int n);
    int t;
    t = n % 200;
    return 8'(((t < 100) ? t * 2 : (399 - t * 2)) + (n % 7) * 3);
  endfunction

  initial conversions = 0;

  always @(posedge clk) begin
    if (!w_n && !cs_n) begin
      busy  <= CONV_CYCLES;
      value <= sample(conversions);
      conversions <= conversions + 1;
    end else if (busy != 0) begin
      busy <= busy - 1;
    end
  end

  assign status = (busy != 0);
  assign data   = (!cs_n && w_n) ? value : 8'h00;
endmodule
