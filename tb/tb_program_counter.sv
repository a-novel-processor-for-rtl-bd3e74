// tb_program_counter: self-checking test of the program counter.
//
// 1000 cycles of random PCinc, PCld1, PCld2, ENB and load values; after every
// rising edge PCout is compared with a model that gives PCld2 priority over
// PCld1 over PCinc, changes nothing while ENB is 0, and wraps 0FFh + 1 to 00h.
// Also checks the clear by PCclr.
module tb_program_counter;
  logic clk = 1'b0, clr, enb, inc, ld1, ld2;
  logic [7:0] in1, in2, pcout, model;
  int checks = 0, failures = 0, wraps = 0;
  always #5 clk = ~clk;

  program_counter #(.WIDTH(8)) dut (
    .clk(clk), .pcclr(clr), .enb(enb), .pcinc(inc), .pcld1(ld1), .pcld2(ld2),
    .pcin1(in1), .pcin2(in2), .pcout(pcout));

  initial begin
    enb = 0; inc = 0; ld1 = 0; ld2 = 0; in1 = 0; in2 = 0;
    clr = 1; model = 0;
    @(posedge clk); #1 clr = 0;
    checks++; if (pcout !== 8'h00) begin failures++; $display("clear"); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      enb = ($urandom % 8) != 0;
      inc = ($urandom % 2) == 0;
      ld1 = ($urandom % 6) == 0;
      ld2 = ($urandom % 8) == 0;
      in1 = 8'($urandom); in2 = 8'($urandom);
      if (i % 200 == 100) begin ld1 = 1; in1 = 8'hFE; ld2 = 0; enb = 1; end
      @(posedge clk);
      if (enb) begin
        if (ld2) model = in2;
        else if (ld1) model = in1;
        else if (inc) begin
          if (model == 8'hFF) wraps++;
          model = 8'((int'(model) + 1) % 256);
        end
      end
      #1;
      checks++;
      if (pcout !== model) begin
        failures++;
        $display("cycle %0d: pcout=%h want %h", i, pcout, model);
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
