// pc_save_register: the control unit's additional register that keeps a copy
// of the program counter so the PC can later be reloaded with it.
//
// On a rising clock edge with save high the register takes the current PC
// value; its output goes to the program counter's second load input (PCin2),
// which PCld2 selects. Cleared by Qrst (rst). The register and its place
// between the controller and the program counter follow the control unit's
// block diagram; the save input, its width (that of the PC) and the reset are
// this design's choices. No instruction described for the processor saves
// or restores the PC, so the controller keeps save and PCld2 low.
module pc_save_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             save,
  input  logic [WIDTH-1:0] pc,
  output logic [WIDTH-1:0] saved
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)       saved <= '0;
    else if (save) saved <= pc;
  end
endmodule
