// mv_register: the 16-bit multi-valued register of the VPLP datapath.
//
// OUTM copies accumulator A here when LD2_dp (ld) is high on a rising clock
// edge; the register drives Mvo_dp, the processor's MVD_out lines (eight
// quaternary digits of two bits). Cleared to 0000h by Qrst.
module mv_register #(
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
