// branch_adder: branch target adder of the VPLP control unit.
//
// Combinational: sum = pc + offset modulo 2^WIDTH. The offset is the low byte
// of a branch instruction word (BIG $02 at word 03h gives 05h), so a backward
// branch is an offset read as two's complement. The result is offered to the
// program counter's first load input (PCin1).
module branch_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] pc,
  input  logic [WIDTH-1:0] offset,
  output logic [WIDTH-1:0] sum
);
  always_comb sum = pc + offset;
endmodule
