// tb_pram8: self-checking test of the 8-bit PRAM cell (one 16-bit word).
//
// Random enable, write-enable and 8-bit data for 1000 cycles. A model keeps the
// stored bytes and the registered enable: the word must store p18/q18 only when
// ENpmc and we are both 1, and drive them on p28/q28 only in the
// cycle after ENpmc was 1 (0 otherwise, standing for high impedance). Also
// checks the reset.
module tb_pram8;
  logic clk = 1'b0, rst, en, we; logic [7:0] p1, q1, p2, q2;
  logic [7:0] mp, mq; logic men;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pram8 #(.BITS(8)) dut (.clk8pmc(clk), .rst8pmc(rst), .en8pmc(en), .we(we), .p18(p1), .q18(q1), .p28(p2), .q28(q2));

  initial begin
    en = 0; we = 0; p1 = 0; q1 = 0;
    rst = 1; mp = 0; mq = 0; men = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (p2 !== 0 || q2 !== 0) begin failures++; $display("reset"); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom); p1 = 8'($urandom); q1 = 8'($urandom);
      @(posedge clk);
      if (en && we) begin mp = p1; mq = q1; end
      men = en;
      #1;
      checks++;
      if (p2 !== (men ? mp : 8'h00) || q2 !== (men ? mq : 8'h00)) begin
        failures++;
        $display("cycle %0d: p2=%h q2=%h want %h %h", i, p2, q2, men ? mp : 8'h00, men ? mq : 8'h00);
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
