// accumulator_a: the 16-bit accumulator A of the VPLP datapath.
//
// Holds one operand of most instructions and receives the VPALU's A result
// when LD1_dp (ld) is high on a rising clock edge. Its output is also the
// processor's write-data bus (dato). Cleared to 0000h by Qrst (asynchronous
// assertion, as all VPLP registers).
module accumulator_a #(
  parameter int unsigned WIDTH = 16
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
