// address_mux: address multiplexer of the VPLP control unit.
//
// Combinational 2:1 selection of the PRAM address: the program counter for
// instruction and immediate-operand reads, the index counter (sel_ic = 1) for
// LDAC, STAC and CPAH. The select polarity is this design's choice.
module address_mux #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel_ic,
  input  logic [WIDTH-1:0] pc,
  input  logic [WIDTH-1:0] ic,
  output logic [WIDTH-1:0] address
);
  always_comb address = sel_ic ? ic : pc;
endmodule
