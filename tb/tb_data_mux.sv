// tb_data_mux: self-checking test of data_mux.
//
// Select 0 must give the PRAM data, select 1 the multi-valued lines.
// 1000 random input vectors; each output is compared with the value worked
// out in the testbench.
module tb_data_mux;
  logic ms; logic [15:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_mux #(.WIDTH(16)) dut (.ms(ms), .dati_dp(a), .mvi_dp(b), .y(y));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      ms = 1'($urandom); a = 16'($urandom); b = 16'($urandom);
      #1;
      checks++;
      if (!(y === (ms ? b : a))) begin
        failures++;
        $display("ms=%b a=%h b=%h y=%h", ms, a, b, y);
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
