// tb_address_mux: self-checking test of address_mux.
//
// Select 1 must give the index counter, select 0 the program counter.
// 1000 random input vectors; each output is compared with the value worked
// out in the testbench.
module tb_address_mux;
  logic s; logic [7:0] pc, ic, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  address_mux #(.WIDTH(8)) dut (.sel_ic(s), .pc(pc), .ic(ic), .address(y));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      s = 1'($urandom); pc = 8'($urandom); ic = 8'($urandom);
      #1;
      checks++;
      if (!(y === (s ? ic : pc))) begin
        failures++;
        $display("s=%b pc=%h ic=%h y=%h", s, pc, ic, y);
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
