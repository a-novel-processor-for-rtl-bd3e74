// bus_mux: the PRAM bus multiplexer of the VPLP test system.
//
// Combinational 2:1 selection of the 26-bit PRAM access bus (8-bit address,
// 16-bit write data, RD, WR). Input s1 carries the processor's bus, s2 the
// PRAM controller's. The select c1 is the processor's synchronised reset Qrst:
// while the processor is held in reset the controller owns the PRAM, and once
// it runs the processor does, so the two never drive the memory together.
module bus_mux #(
  parameter int unsigned WIDTH = 26
) (
  input  logic             c1,
  input  logic [WIDTH-1:0] s1,
  input  logic [WIDTH-1:0] s2,
  output logic [WIDTH-1:0] y
);
  always_comb y = c1 ? s2 : s1;
endmodule
