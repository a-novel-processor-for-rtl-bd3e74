// tb_vplp: self-checking test of the VPLP processor on its own.
//
// The processor is connected to a behavioural 256-word memory written in this
// testbench (read data appears one clock after RD and is then held, like the
// PRAM), loaded with the third test program of the document: LDC #0Bh, then a
// loop of INC/LDAC/INC/CPAH/BIG that compares the high bytes of two words, and
// the stores of A to three locations. Checked: every memory write (address,
// data and order), the recorded final A = 55AAh, IC = 0Dh, FLAGS = GREATER,
// that RD and WR are never active together, that the processor halts, and
// the number of clocks from the release of Qrst to HALT.
module tb_vplp;
  logic        clk = 1'b0, rst;
  logic [15:0] mvd_in = 16'h0000, mvd_out, dati, dato, acc_a, reg_b;
  logic        rd, wr, qrst, halted;
  logic [7:0]  address, opcode, pc, ic;
  logic [2:0]  flags;
  logic [15:0] mem [256];
  int checks = 0, failures = 0, nwr = 0, cycles = 0;
  logic [7:0]  exp_addr [3] = '{8'h0E, 8'h0C, 8'h0D};
  logic [15:0] exp_data [3] = '{16'h55AA, 16'h00AA, 16'h55AA};
  always #5 clk = ~clk;

  vplp dut (
    .vplp_clk(clk), .vplp_rst(rst), .mvd_in(mvd_in), .mvd_out(mvd_out),
    .dati(dati), .dato(dato), .rd(rd), .wr(wr), .address(address), .qrst(qrst),
    .halted(halted), .opcode(opcode), .pc(pc), .ic(ic), .acc_a(acc_a),
    .reg_b(reg_b), .flags(flags));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // behavioural program memory
  always @(posedge clk) begin
    if (rst) dati <= 16'h0000;
    else if (rd) dati <= mem[address];
    if (wr) begin
      mem[address] <= dato;
      if (nwr < 3) check($sformatf("write %0d to %h = %h", nwr, address, dato),
                         address == exp_addr[nwr] && dato == exp_data[nwr]);
      else check("extra write", 1'b0);
      nwr <= nwr + 1;
    end
    if (!qrst && !halted) cycles <= cycles + 1;
  end

  always @(posedge clk) if (!qrst) check("RD and WR exclusive", !(rd && wr));

  initial begin
    logic [15:0] prog [15] = '{16'h090B, 16'h0A0B, 16'h0A0E, 16'h1202, 16'h0807,
                               16'h0A0C, 16'h140B, 16'h140C, 16'h0A0A, 16'h0B14,
                               16'h0C07, 16'h0000, 16'h55AA, 16'h00AA, 16'h0000};
    for (int i = 0; i < 256; i++) mem[i] = (i < 15) ? prog[i] : 16'h0000;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("Qrst released two clocks after reset", !qrst);
    wait (halted);
    repeat (3) @(posedge clk);
    #1;
    check("three writes", nwr == 3);
    check($sformatf("final A %h", acc_a), acc_a == 16'h55AA);
    check($sformatf("final IC %h", ic), ic == 8'h0D);
    check($sformatf("final FLAGS %b", flags), flags == 3'b010);
    check($sformatf("memory 0C..0E %h %h %h", mem[12], mem[13], mem[14]),
          mem[12] == 16'h00AA && mem[13] == 16'h55AA && mem[14] == 16'h55AA);
    check($sformatf("opcode at halt %h", opcode), opcode == 8'h07);
    check("no activity after halt", !rd && !wr);
    $display("clocks from Qrst release to HALT: %0d", cycles);
    check($sformatf("cycle count %0d", cycles), cycles == 105);
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
