// flag_register: the 3-bit FLAGS register of the VPLP datapath.
//
// Stores the VPALU comparison result (bit 0 EQUAL, bit 1 GREATER, bit 2 LESS)
// when Fld_dp (ld) is high on a rising clock edge and presents it on FL_dp to
// the control unit, where BIG tests GREATER. GREATER at bit 1 follows the
// recorded FLAGS value 2h; the other two positions are this design's choice.
// Cleared by Qrst.
module flag_register #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end
endmodule
