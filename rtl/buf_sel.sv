// buf_sel: buffer role memory (a T flip-flop) and SRAM buffer address bit.
//
// bufsel records which half of the SRAM is currently the Sampling Buffer; a clock
// edge with swap (SwapBuf) high toggles it, exchanging the roles of the two
// buffers. The SRAM's buffer address bit a_buf is bufsel while shift_buf is low
// (the Sampling Buffer) and the other half while shift_buf is high (the Shifting
// Buffer), i.e. bufsel XOR shift_buf. The T flip-flop follows the design
// description; the combining function is chosen to match the described roles.
module buf_sel (
  input  logic clk,
  input  logic rst,
  input  logic swap,
  input  logic shift_buf,
  output logic bufsel,
  output logic a_buf
);
  always_ff @(posedge clk) begin
    if (rst)       bufsel <= 1'b0;
    else if (swap) bufsel <= ~bufsel;
  end

  assign a_buf = bufsel ^ shift_buf;
endmodule
