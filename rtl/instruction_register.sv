// instruction_register: the 16-bit instruction register of the VPLP control
// unit.
//
// Loads a word read from PRAM when ld is high on a rising clock edge. A word
// holds two 8-bit instructions (high byte first), or one instruction and its
// 8-bit operand. Cleared by Qrst.
module instruction_register #(
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
