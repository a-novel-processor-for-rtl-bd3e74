// index_counter: the 8-bit index counter (IC) of the VPLP control unit.
//
// Holds an operand address for LDAC, STAC and CPAH. On a rising clock edge it
// loads d (LDC, the low byte of the instruction word) when ld is high,
// otherwise counts up on inc (INC) or down on dec (DEC), wrapping modulo 256.
// The priority order is this design's choice. Cleared by Qrst.
module index_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic             inc,
  input  logic             dec,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)      q <= '0;
    else if (ld)  q <= d;
    else if (inc) q <= q + 1'b1;
    else if (dec) q <= q - 1'b1;
  end
endmodule
