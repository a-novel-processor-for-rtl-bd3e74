// tb_pram_controller: self-checking test of the PRAM controller.
//
// With a 5-word program parameter, checks that nothing is written while the
// active-low reset is low, that after release word i is written to address i
// on consecutive cycles with RD low, that done rises after the last word and
// that no further write follows.
module tb_pram_controller;
  localparam logic [15:0] PROG [5] = '{16'h1234, 16'hABCD, 16'h0F0F, 16'h8001, 16'h7E7E};
  logic clk = 1'b0, rst_n, rd, wr, done;
  logic [7:0]  addr;
  logic [15:0] dato;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pram_controller #(.PROG_WORDS(5), .PROGRAM(PROG)) dut (
    .clk(clk), .rst_n(rst_n), .address(addr), .dato(dato), .rd(rd), .wr(wr), .done(done));

  initial begin
    rst_n = 0;
    repeat (3) begin
      @(negedge clk);
      checks++; if (wr !== 0 || rd !== 0) begin failures++; $display("write during reset"); end
    end
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      checks++;
      if (wr !== 1 || rd !== 0 || addr !== 8'(i) || dato !== PROG[i] || done !== 0) begin
        failures++;
        $display("word %0d: wr=%b rd=%b addr=%h data=%h done=%b", i, wr, rd, addr, dato, done);
      end
    end
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (wr !== 0 || done !== 1) begin failures++; $display("after load: wr=%b done=%b", wr, done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
