// ad558_model: behavioural model of an AD558-style 8-bit D2A converter with input
// latch, for simulation only. The latch is transparent while /CS is low and holds
// otherwise; out is the latched code (the analog level it stands for).
module ad558_model (
  input  logic       cs_n,
  input  logic [7:0] data,
  output logic [7:0] out
);
  always_latch begin
    if (!cs_n) out = data;
  end
endmodule
