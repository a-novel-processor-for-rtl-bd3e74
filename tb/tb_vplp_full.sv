// tb_vplp_full: full-size run of the VPLP test system with every parameter at
// its default (256-word PRAM, first test program in the PRAM controller).
//
// The PRAM controller loads the program while the processor is held in
// reset; then vplp_rst falls and the testbench compares, cycle by cycle from
// t = -2 to t = 61, the PRAM address, PRAM write data, PRAM read data, RD, WR,
// OPCODE, PC, accumulator A and register B with a recorded logic-analyser
// trace of the same program on the original hardware. Sample t is the value
// held just before rising edge t, edge 0 being the first at which vplp_rst is
// low. The OPCODE column is compared from t = 6 on: before the first
// instruction the original shows a stale 07h where this design holds 00h.
module tb_vplp_full;
  logic        clk = 1'b0;
  logic        vplp_rst, pram_rst;
  logic [15:0] mvd_in, mvd_out, dati, dato, acc_a, reg_b;
  logic [7:0]  address, opcode, pc, ic;
  logic        rd, wr, halted, loaded;
  logic [2:0]  flags;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  vplp_system dut (
    .vplp_clk(clk), .vplp_rst(vplp_rst), .pram_rst(pram_rst), .mvd_in(mvd_in),
    .mvd_out(mvd_out), .address(address), .dati(dati), .dato(dato), .rd(rd),
    .wr(wr), .halted(halted), .loaded(loaded), .opcode(opcode), .pc(pc),
    .ic(ic), .acc_a(acc_a), .reg_b(reg_b), .flags(flags)
  );

  // Recorded trace: address, PRAM write data, PRAM read data, RD, WR,
  // OPCODE, PC, A, B for t = -2 .. 61.
  typedef struct packed {
    logic [7:0]  addr;
    logic [15:0] pdin;
    logic [15:0] pdout;
    logic        rd;
    logic        wr;
    logic [7:0]  opc;
    logic [7:0]  pc;
    logic [15:0] a;
    logic [15:0] b;
  } row_t;

  function automatic row_t r(input logic [7:0] addr, input logic [15:0] pdin,
                             input logic [15:0] pdout, input logic rdv,
                             input logic [7:0] opc, input logic [15:0] a,
                             input logic [15:0] b);
    return '{addr: addr, pdin: pdin, pdout: pdout, rd: rdv, wr: 1'b0,
             opc: opc, pc: addr, a: a, b: b};
  endfunction

  function automatic row_t expected(input int t);
    if (t <= 2)  return r(8'h00, 16'h0000, 16'h0000, 0, 8'h07, 16'h0000, 16'h0000);
    if (t == 3)  return r(8'h00, 16'h0000, 16'h0000, 1, 8'h07, 16'h0000, 16'h0000);
    if (t <= 5)  return r(8'h00, 16'h0000, 16'h171D, 0, 8'h07, 16'h0000, 16'h0000);
    if (t <= 8)  return r(8'h00, 16'h0000, 16'h171D, 0, 8'h17, 16'h0000, 16'h0000);
    if (t == 9)  return r(8'h01, 16'h0000, 16'h171D, 1, 8'h17, 16'h0000, 16'h0000);
    if (t == 10) return r(8'h01, 16'h0000, 16'h55AF, 0, 8'h17, 16'h0000, 16'h0000);
    if (t == 11) return r(8'h01, 16'h0000, 16'h55AF, 0, 8'h17, 16'h0000, 16'h55AF);
    if (t <= 14) return r(8'h01, 16'h0000, 16'h55AF, 0, 8'h1D, 16'h0000, 16'h55AF);
    if (t == 15) return r(8'h01, 16'h55AF, 16'h55AF, 0, 8'h1D, 16'h55AF, 16'h55AF);
    if (t == 16) return r(8'h02, 16'h55AF, 16'h55AF, 1, 8'h1D, 16'h55AF, 16'h55AF);
    if (t <= 18) return r(8'h02, 16'h55AF, 16'h1B20, 0, 8'h1D, 16'h55AF, 16'h55AF);
    if (t <= 21) return r(8'h02, 16'h55AF, 16'h1B20, 0, 8'h1B, 16'h55AF, 16'h55AF);
    if (t == 22) return r(8'h02, 16'h55AF, 16'h1B20, 0, 8'h1B, 16'h55AF, 16'h55FA);
    if (t <= 25) return r(8'h02, 16'h55AF, 16'h1B20, 0, 8'h20, 16'h55AF, 16'h55FA);
    if (t == 26) return r(8'h02, 16'h55AF, 16'h1B20, 0, 8'h20, 16'h55AF, 16'h50FF);
    if (t == 27) return r(8'h03, 16'h55AF, 16'h1B20, 1, 8'h20, 16'h55AF, 16'h50FF);
    if (t <= 29) return r(8'h03, 16'h55AF, 16'h171D, 0, 8'h20, 16'h55AF, 16'h50FF);
    if (t <= 32) return r(8'h03, 16'h55AF, 16'h171D, 0, 8'h17, 16'h55AF, 16'h50FF);
    if (t == 33) return r(8'h04, 16'h55AF, 16'h171D, 1, 8'h17, 16'h55AF, 16'h50FF);
    if (t == 34) return r(8'h04, 16'h55AF, 16'hAACD, 0, 8'h17, 16'h55AF, 16'h50FF);
    if (t == 35) return r(8'h04, 16'h55AF, 16'hAACD, 0, 8'h17, 16'h55AF, 16'hAACD);
    if (t <= 38) return r(8'h04, 16'h55AF, 16'hAACD, 0, 8'h1D, 16'h55AF, 16'hAACD);
    if (t == 39) return r(8'h04, 16'hAACD, 16'hAACD, 0, 8'h1D, 16'hAACD, 16'hAACD);
    if (t == 40) return r(8'h05, 16'hAACD, 16'hAACD, 1, 8'h1D, 16'hAACD, 16'hAACD);
    if (t <= 42) return r(8'h05, 16'hAACD, 16'h1B20, 0, 8'h1D, 16'hAACD, 16'hAACD);
    if (t <= 45) return r(8'h05, 16'hAACD, 16'h1B20, 0, 8'h1B, 16'hAACD, 16'hAACD);
    if (t == 46) return r(8'h05, 16'hAACD, 16'h1B20, 0, 8'h1B, 16'hAACD, 16'hAA67);
    if (t <= 49) return r(8'h05, 16'hAACD, 16'h1B20, 0, 8'h20, 16'hAACD, 16'hAA67);
    if (t == 50) return r(8'h05, 16'hAACD, 16'h1B20, 0, 8'h20, 16'hAACD, 16'h22EF);
    if (t == 51) return r(8'h06, 16'hAACD, 16'h1B20, 1, 8'h20, 16'hAACD, 16'h22EF);
    if (t <= 53) return r(8'h06, 16'hAACD, 16'h0807, 0, 8'h20, 16'hAACD, 16'h22EF);
    if (t <= 57) return r(8'h06, 16'hAACD, 16'h0807, 0, 8'h08, 16'hAACD, 16'h22EF);
    return              r(8'h06, 16'hAACD, 16'h0807, 0, 8'h07, 16'hAACD, 16'h22EF);
  endfunction

  task automatic check_row(input int t);
    row_t e;
    e = expected(t);
    checks++;
    if (address !== e.addr || dato !== e.pdin || dati !== e.pdout ||
        rd !== e.rd || wr !== e.wr || pc !== e.pc || acc_a !== e.a ||
        reg_b !== e.b || (t >= 6 && opcode !== e.opc)) begin
      failures++;
      $display("t=%0d got addr=%h din=%h dout=%h rd=%b wr=%b opc=%h pc=%h a=%h b=%h",
               t, address, dato, dati, rd, wr, opcode, pc, acc_a, reg_b);
      $display("     want addr=%h din=%h dout=%h rd=%b wr=%b opc=%h pc=%h a=%h b=%h",
               e.addr, e.pdin, e.pdout, e.rd, e.wr, e.opc, e.pc, e.a, e.b);
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
    // This negedge is the sample of t = -2.
    @(negedge clk); check_row(-2);
    @(negedge clk); check_row(-1);
    @(posedge clk); #1 vplp_rst = 1'b0;  // low from sample 0 on
    for (int t = 0; t <= 61; t++) begin
      @(negedge clk);
      check_row(t);
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
