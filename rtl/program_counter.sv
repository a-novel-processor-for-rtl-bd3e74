// program_counter: the 8-bit program counter of the VPLP.
//
// Built as in the processor's PC schematic: an adder adds the constant
// 0000_0001 to PCout; multiplexer 1 chooses between that sum and PCin1
// (selected by PCld1); multiplexer 2 chooses between the output of
// multiplexer 1 and PCin2 (selected by PCld2); a register with clock enable
// and clear stores the result. The multiplexers only act while ENB is 1, so
// the register changes on a rising clock edge only when ENB is 1 and one of
// PCinc, PCld1 or PCld2 is 1. PCld2 wins over PCld1, which wins over PCinc,
// following the order of the multiplexers. PCclr (Qrst) clears it to 00h.
module program_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             pcclr,
  input  logic             enb,
  input  logic             pcinc,
  input  logic             pcld1,
  input  logic             pcld2,
  input  logic [WIDTH-1:0] pcin1,
  input  logic [WIDTH-1:0] pcin2,
  output logic [WIDTH-1:0] pcout
);
  logic [WIDTH-1:0] sum, mux1, mux2;
  logic             ena;

  always_comb begin
    sum  = pcout + WIDTH'(1);
    mux1 = pcld1 ? pcin1 : sum;
    mux2 = pcld2 ? pcin2 : mux1;
    ena  = enb & (pcinc | pcld1 | pcld2);
  end

  always_ff @(posedge clk or posedge pcclr) begin
    if (pcclr)    pcout <= '0;
    else if (ena) pcout <= mux2;
  end
endmodule
