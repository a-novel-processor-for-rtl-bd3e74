// pram_cell: basic predicate RAM cell, one predicate pair (p, q).
//
// Four D flip-flops and two output buffers. Dff1 and Dff3 store the data bits
// p1 and q1; Dff2 and Dff4 register the enable ENpmc, and their outputs enable
// the buffers TSB1 and TSB2 that drive p2 and q2. The data flip-flops load on
// a rising CLKpmc edge when ENpmc and we are both 1; the write enable is this
// design's addition so that a read leaves the contents alone. A disabled
// buffer is high impedance in the original; here it outputs 0, so that the
// outputs of many cells can be combined by OR into a read multiplexer.
// Timing: the stored value appears on p2/q2 in the cycle after the one in
// which ENpmc was 1. RSTpmc clears all four flip-flops asynchronously.
module pram_cell (
  input  logic clkpmc,
  input  logic rstpmc,
  input  logic enpmc,
  input  logic we,
  input  logic p1,
  input  logic q1,
  output logic p2,
  output logic q2
);
  logic dff1, dff2, dff3, dff4;

  always_ff @(posedge clkpmc or posedge rstpmc) begin
    if (rstpmc) begin
      dff1 <= 1'b0; dff2 <= 1'b0; dff3 <= 1'b0; dff4 <= 1'b0;
    end else begin
      if (enpmc && we) begin
        dff1 <= p1;
        dff3 <= q1;
      end
      dff2 <= enpmc;
      dff4 <= enpmc;
    end
  end

  always_comb begin
    p2 = dff2 & dff1;  // TSB1
    q2 = dff4 & dff3;  // TSB2
  end
endmodule
