// data_bus: the shared 8-bit data bus.
//
// The A2D (during a read cycle) and the SRAM (during a read) take turns driving
// the bus; the SRAM and the accumulator listen. For the storage and adder test
// programs a third driver puts the low SRAM address bits on the bus, so that a
// ramp can be stored or summed. Built as a multiplexer instead of tri-state wires: bus carries the
// driving unit's data, or 0 when nobody drives. Two drivers at once would be a
// bus fight in the board-level design; the top level asserts that it never
// happens. The bus and the address-to-bus buffer follow the design description;
// the multiplexer form is this design's choice. Purely combinational.
module data_bus (
  input  logic       a2d_drive,
  input  logic [7:0] a2d_data,
  input  logic       sram_drive,
  input  logic [7:0] sram_data,
  input  logic       ramp_drive,
  input  logic [7:0] ramp_data,
  output logic [7:0] bus
);
  always_comb begin
    case ({a2d_drive, sram_drive, ramp_drive})
      3'b100:  bus = a2d_data;
      3'b010:  bus = sram_data;
      3'b001:  bus = ramp_data;
      default: bus = '0;
    endcase
  end
endmodule
