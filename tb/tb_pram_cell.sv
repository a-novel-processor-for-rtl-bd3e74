// tb_pram_cell: self-checking test of the basic predicate RAM cell.
//
// Random enable, write-enable and data for 1000 cycles. A model keeps the
// stored pair and the registered enable: the cell must store p1/q1 only when
// ENpmc and we are both 1, and drive the stored pair on p2/q2 only in the
// cycle after ENpmc was 1 (0 otherwise, standing for high impedance). Also
// checks the reset.
module tb_pram_cell;
  logic clk = 1'b0, rst, en, we, p1, q1, p2, q2;
  logic mp, mq, men;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pram_cell dut (.clkpmc(clk), .rstpmc(rst), .enpmc(en), .we(we), .p1(p1), .q1(q1), .p2(p2), .q2(q2));

  initial begin
    en = 0; we = 0; p1 = 0; q1 = 0;
    rst = 1; mp = 0; mq = 0; men = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (p2 !== 0 || q2 !== 0) begin failures++; $display("reset"); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom); p1 = 1'($urandom); q1 = 1'($urandom);
      @(posedge clk);
      if (en && we) begin mp = p1; mq = q1; end
      men = en;
      #1;
      checks++;
      if (p2 !== (men & mp) || q2 !== (men & mq)) begin
        failures++;
        $display("cycle %0d: p2=%b q2=%b want %b %b", i, p2, q2, men & mp, men & mq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
