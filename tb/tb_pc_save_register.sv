// tb_pc_save_register: self-checking test of the program counter save
// register.
//
// A model register is updated alongside the device: random PC values are
// applied every clock, save is raised at random, and reset is pulsed now and
// then. After every clock the saved value must equal the PC value present at
// the last clock with save high (or 00h after reset).
module tb_pc_save_register;
  logic       clk = 1'b0, rst, save;
  logic [7:0] pc, saved, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pc_save_register #(.WIDTH(8)) dut (
    .clk(clk), .rst(rst), .save(save), .pc(pc), .saved(saved));

  initial begin
    rst = 1'b1; save = 1'b0; pc = 8'h00; model = 8'h00;
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      pc   = 8'($urandom);
      save = ($urandom % 4) == 0;
      rst  = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (rst) model = 8'h00;
      else if (save) model = pc;
      checks++;
      if (saved !== model) begin
        failures++;
        $display("step %0d: saved=%h want %h", i, saved, model);
      end
      rst = 1'b0;
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
