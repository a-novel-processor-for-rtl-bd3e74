// register_b: the 16-bit register B of the VPLP datapath.
//
// Second operand register. On a rising clock edge it loads the VPALU's B
// result when ldb is high (LDB, LBA, CNB, SWB, FGO, dual-rail operations),
// otherwise counts up when inc is high (INCB) or down when dec is high (DECB).
// Load, increment and decrement in that priority order is this design's
// choice; the controller never raises two at once. Cleared by Qrst.
module register_b #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ldb,
  input  logic             inc,
  input  logic             dec,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)      q <= '0;
    else if (ldb) q <= d;
    else if (inc) q <= q + 1'b1;
    else if (dec) q <= q - 1'b1;
  end
endmodule
