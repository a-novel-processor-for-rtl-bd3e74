// tb_pram: self-checking test of the 256 x 16 predicate RAM.
//
// Fills every word with a random value, then runs 3000 random reads and
// writes against a model array. A read must return the model word in the
// cycle after RD (one-cycle latency) and the value must stay on dout in
// later cycles without RD, including across writes. The reset clears the
// memory; this is checked on a few words first.
module tb_pram;
  logic clk = 1'b0, rst, rd, wr;
  logic [7:0]  addr;
  logic [15:0] din, dout, model [256], last;
  int checks = 0, failures = 0, reads = 0, writes = 0;
  always #5 clk = ~clk;

  pram #(.WORDS(256), .AW(8)) dut (.clk(clk), .rst(rst), .rd(rd), .wr(wr), .address(addr), .din(din), .dout(dout));

  task automatic do_read(input logic [7:0] a);
    @(negedge clk); rd = 1; wr = 0; addr = a;
    @(negedge clk); rd = 0; addr = 8'($urandom);
    last = model[a];
    checks++; reads++;
    if (dout !== last) begin failures++; $display("read %h: %h want %h", a, dout, last); end
  endtask

  task automatic do_write(input logic [7:0] a, input logic [15:0] v);
    @(negedge clk); wr = 1; rd = 0; addr = a; din = v;
    @(negedge clk); wr = 0; din = 16'($urandom);
    model[a] = v; writes++;
  endtask

  initial begin
    rd = 0; wr = 0; addr = 0; din = 0; last = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (model[i]) model[i] = 16'h0000;
    for (int i = 0; i < 4; i++) do_read(8'($urandom));
    for (int i = 0; i < 256; i++) do_write(8'(i), 16'($urandom));
    for (int i = 0; i < 3000; i++) begin
      if ($urandom % 3 == 0) do_write(8'($urandom), 16'($urandom));
      else do_read(8'($urandom));
      // idle cycle: the last read value must be held
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        checks++;
        if (dout !== last) begin failures++; $display("hold: %h want %h", dout, last); end
      end
    end
    $display("%0d reads, %0d writes", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
