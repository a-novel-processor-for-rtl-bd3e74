// tb_vplp_trace2: the second test program as captured on the original
// hardware, run on the VPLP test system and checked clock by clock.
//
// The captured run of the second program starts with LDB at address 00h, so
// the image here is four words: LDB/DECB, the LDB operand 4FB1h, SWB/CNB and
// NOP/HLT. Its instruction slots sit exactly where the first test program's
// do, so the same timing applies: B must read 4FB1h from t = 11, 4FB0h from
// t = 15, B04Fh from t = 22 and B0FFh from t = 26 (t counted as in
// tb_vplp_full: sample t is the value just before rising edge t, edge 0
// being the first with vplp_rst low). Checked every clock from t = 0 to 45:
// address, RD, WR, OPCODE (17h, 16h, 1Ch, 1Bh, 08h, 07h), A and the
// multi-valued output (both stay 0000h), B, and that the processor halts.
module tb_vplp_trace2;
  logic        clk = 1'b0;
  logic        vplp_rst, pram_rst;
  logic [15:0] mvd_in, mvd_out, dati, dato, acc_a, reg_b;
  logic [7:0]  address, opcode, pc, ic;
  logic        rd, wr, halted, loaded;
  logic [2:0]  flags;
  int          checks = 0, failures = 0;
  localparam logic [15:0] IMAGE [4] = '{16'h1716, 16'h4FB1, 16'h1C1B, 16'h0807};

  always #10 clk = ~clk;

  vplp_system #(.PROG_WORDS(4), .PROGRAM(IMAGE)) dut (
    .vplp_clk(clk), .vplp_rst(vplp_rst), .pram_rst(pram_rst), .mvd_in(mvd_in),
    .mvd_out(mvd_out), .address(address), .dati(dati), .dato(dato), .rd(rd),
    .wr(wr), .halted(halted), .loaded(loaded), .opcode(opcode), .pc(pc),
    .ic(ic), .acc_a(acc_a), .reg_b(reg_b), .flags(flags)
  );

  function automatic logic [7:0] exp_addr(input int t);
    if (t <= 8)  return 8'h00;
    if (t <= 15) return 8'h01;
    if (t <= 26) return 8'h02;
    return 8'h03;
  endfunction

  function automatic logic [7:0] exp_opc(input int t);
    if (t <= 11) return 8'h17;
    if (t <= 18) return 8'h16;
    if (t <= 22) return 8'h1C;
    if (t <= 29) return 8'h1B;
    if (t <= 33) return 8'h08;
    return 8'h07;
  endfunction

  function automatic logic [15:0] exp_b(input int t);
    if (t <= 10) return 16'h0000;
    if (t <= 14) return 16'h4FB1;
    if (t <= 21) return 16'h4FB0;
    if (t <= 25) return 16'hB04F;
    return 16'hB0FF;
  endfunction

  task automatic check_clock(input int t);
    logic erd;
    erd = (t == 3 || t == 9 || t == 16 || t == 27);
    checks++;
    if (address !== exp_addr(t) || rd !== erd || wr !== 1'b0 ||
        (t >= 6 && opcode !== exp_opc(t)) || reg_b !== exp_b(t) ||
        acc_a !== 16'h0000 || mvd_out !== 16'h0000) begin
      failures++;
      $display("t=%0d got addr=%h rd=%b wr=%b opc=%h a=%h b=%h mv=%h", t, address, rd,
               wr, opcode, acc_a, reg_b, mvd_out);
      $display("     want addr=%h rd=%b wr=0 opc=%h a=0000 b=%h mv=0000", exp_addr(t), erd,
               exp_opc(t), exp_b(t));
    end
  endtask

  initial begin
    mvd_in   = 16'h0000;
    vplp_rst = 1'b1;
    pram_rst = 1'b0;
    repeat (3) @(posedge clk);
    #1 pram_rst = 1'b1;
    wait (loaded);
    repeat (4) @(posedge clk);
    @(posedge clk); #1 vplp_rst = 1'b0;
    for (int t = 0; t <= 45; t++) begin
      @(negedge clk);
      check_clock(t);
    end
    checks++;
    if (!halted) begin failures++; $display("processor did not halt"); end
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
