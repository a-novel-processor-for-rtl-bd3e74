// reset_circuit: reset synchroniser of the VPLP.
//
// Two D flip-flops in series. While vplp_rst is high both are set
// asynchronously, so Qrst rises at once. After vplp_rst falls, the constant 0
// on D1's input shifts through D1 and D2, so Qrst falls on the second rising
// edge of vplp_clk: assertion is asynchronous, release is synchronous.
// The two-flop structure with a grounded first input is the document's; the
// reading that the asynchronous pin drives the flops to 1 (so that the
// synchronised reset is active high) is this design's.
module reset_circuit (
  input  logic vplp_clk,
  input  logic vplp_rst,   // active high, asynchronous
  output logic qrst        // active high, released synchronously
);
  logic q1;

  always_ff @(posedge vplp_clk or posedge vplp_rst) begin
    if (vplp_rst) begin
      q1   <= 1'b1;
      qrst <= 1'b1;
    end else begin
      q1   <= 1'b0;  // D1 tied to ground
      qrst <= q1;
    end
  end
endmodule
