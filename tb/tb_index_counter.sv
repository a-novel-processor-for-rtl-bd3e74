// tb_index_counter: self-checking test of index_counter.
//
// Applies random data with random load, increment and decrement requests for
// 400 cycles and compares the output after every rising edge with a model
// register kept in the testbench; also checks the reset value.
module tb_index_counter;
  localparam int W = 8;
  logic clk = 1'b0, rst;
  logic ld, inc, dec;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  index_counter #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .ld(ld), .inc(inc), .dec(dec), .d(d), .q(q));

  initial begin
    ld = 0; d = '0; inc = 0; dec = 0;
    rst = 1; model = '0;
    @(posedge clk); #1 rst = 0;
    checks++; if (q !== '0) begin failures++; $display("reset value %h", q); end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ld = ($urandom % 3) == 0;
      d  = W'($urandom);
      inc = ($urandom % 3) == 0;
      dec = ($urandom % 3) == 0;
      @(posedge clk);
      if (ld) model = d;
      else if (inc) model = model + 1'b1;
      else if (dec) model = model - 1'b1;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q=%h want %h", i, q, model);
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
