// tb_branch_adder: self-checking test of branch_adder.
//
// The sum must equal pc + offset modulo 256 (computed in integers).
// 1000 random input vectors; each output is compared with the value worked
// out in the testbench.
module tb_branch_adder;
  logic [7:0] pc, off, sum;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  branch_adder #(.WIDTH(8)) dut (.pc(pc), .offset(off), .sum(sum));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      pc = 8'($urandom); off = 8'($urandom);
      #1;
      checks++;
      if (!(int'(sum) == (int'(pc) + int'(off)) % 256)) begin
        failures++;
        $display("pc=%h off=%h sum=%h", pc, off, sum);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
