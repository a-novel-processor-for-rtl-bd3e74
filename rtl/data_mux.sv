// data_mux: data multiplexer in front of the VPALU.
//
// Combinational 2:1 selection of the VPALU's data operand: PRAM read data
// (dati_dp) when ms is 0, the multi-valued input lines (Mvi_dp, fed by
// MVD_in) when ms is 1. The polarity of MS is this design's choice.
module data_mux #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             ms,
  input  logic [WIDTH-1:0] dati_dp,
  input  logic [WIDTH-1:0] mvi_dp,
  output logic [WIDTH-1:0] y
);
  always_comb y = ms ? mvi_dp : dati_dp;
endmodule
