// pram8: 8-bit PRAM cell, i.e. one 16-bit PRAM word.
//
// Eight basic cells (pram_cell) side by side with common clock, reset, enable
// and write enable; bit i of the 8-bit buses p18/q18 goes to cell i and cell
// i drives bit i of p28/q28. In the 16-bit word, p is the high byte and q the
// low byte (this design's choice). Timing is that of pram_cell.
module pram8 #(
  parameter int unsigned BITS = 8
) (
  input  logic            clk8pmc,
  input  logic            rst8pmc,
  input  logic            en8pmc,
  input  logic            we,
  input  logic [BITS-1:0] p18,
  input  logic [BITS-1:0] q18,
  output logic [BITS-1:0] p28,
  output logic [BITS-1:0] q28
);
  for (genvar i = 0; i < BITS; i++) begin : g_cell
    pram_cell u_cell (
      .clkpmc(clk8pmc), .rstpmc(rst8pmc), .enpmc(en8pmc), .we(we),
      .p1(p18[i]), .q1(q18[i]), .p2(p28[i]), .q2(q28[i])
    );
  end
endmodule
