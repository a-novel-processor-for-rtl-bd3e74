// tb_reset_circuit: self-checking test of the reset synchroniser.
//
// Checks that Qrst rises as soon as vplp_rst rises (between clock edges,
// without waiting for an edge), stays high while vplp_rst is high, and falls
// exactly on the second rising edge after vplp_rst falls. Repeated with
// random reset lengths and random release phases.
module tb_reset_circuit;
  logic clk = 1'b0, rst, qrst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reset_circuit dut (.vplp_clk(clk), .vplp_rst(rst), .qrst(qrst));

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (qrst !== v) begin failures++; $display("%s: qrst=%b", what, qrst); end
  endtask

  initial begin
    rst = 1'b0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      // assert asynchronously in the middle of a low clock phase
      @(negedge clk); #2 rst = 1'b1; #1;
      expect_q(1'b1, "asynchronous assertion");
      repeat (1 + $urandom % 4) @(posedge clk);
      #1 expect_q(1'b1, "held in reset");
      // release after a rising edge
      #($urandom % 3) rst = 1'b0;
      @(posedge clk); #1 expect_q(1'b1, "one edge after release");
      @(posedge clk); #1 expect_q(1'b0, "two edges after release");
      repeat ($urandom % 3) begin
        @(posedge clk); #1 expect_q(1'b0, "running");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
