// tb_bus_mux: self-checking test of bus_mux.
//
// C1 = 1 (processor in reset) must give the controller bus S2, C1 = 0 the processor bus S1.
// 1000 random input vectors; each output is compared with the value worked
// out in the testbench.
module tb_bus_mux;
  logic c1; logic [25:0] s1, s2, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  bus_mux #(.WIDTH(26)) dut (.c1(c1), .s1(s1), .s2(s2), .y(y));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      c1 = 1'($urandom); s1 = 26'($urandom); s2 = 26'($urandom);
      #1;
      checks++;
      if (!(y === (c1 ? s2 : s1))) begin
        failures++;
        $display("c1=%b s1=%h s2=%h y=%h", c1, s1, s2, y);
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
