// adder8: 8-bit binary adder with carry in and carry out (two 4-bit adders in
// cascade, LS283 style). Purely combinational.
module adder8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       ci,
  output logic [7:0] s,
  output logic       co
);
  logic c4;
  assign {c4, s[3:0]} = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'b0, ci};
  assign {co, s[7:4]} = {1'b0, a[7:4]} + {1'b0, b[7:4]} + {4'b0, c4};
endmodule
