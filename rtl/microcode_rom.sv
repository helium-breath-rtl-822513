// microcode_rom: microinstruction store (two 8-bit Flash PROMs side by side).
//
// A read-only table of 16-bit microinstructions, read combinationally at the
// sequencer's address as a PROM is. The low byte holds jump addresses or low
// assertion bits, the high byte the instruction type, condition select and high
// assertion bits. The contents are the pitch shifter microprogram from ps_pkg,
// filled in by a constant function at elaboration; unused words hold JMP 0.
// The sequencer supplies the low ADDR_W address bits; the PSEL_W bits above them
// come from a program-select switch, so the store holds 2**PSEL_W programs of
// 2**ADDR_W words (program 0: pitch shifter, program 1: converter loopback test,
// program 2: storage ramp test, program 3: adder test). Selecting programs with
// the upper PROM address lines follows the design description; the three test
// programs are this design's versions of the suggested bring-up tests.
module microcode_rom
  import ps_pkg::*;
#(
  parameter int unsigned ADDR_W = UADDR_W,
  parameter int unsigned SEL_W  = PSEL_W
) (
  input  logic [SEL_W-1:0]  prog_sel,
  input  logic [ADDR_W-1:0] addr,
  output logic [15:0]       data
);
  localparam int unsigned WORDS = 2 ** ADDR_W;
  localparam int unsigned DEPTH = WORDS * (2 ** SEL_W);

  function automatic logic [DEPTH-1:0][15:0] fill();
    logic [DEPTH-1:0][15:0] t;
    for (int unsigned i = 0; i < DEPTH; i++) t[i] = program_word(i / WORDS, i % WORDS);
    return t;
  endfunction

  localparam logic [DEPTH-1:0][15:0] ROM = fill();

  assign data = ROM[{prog_sel, addr}];
endmodule
