// tb_datapath: self-checking test of the VPLP datapath.
//
// Drives the control lines the way the controller does for a sequence of
// instructions and checks the registers after each one: the recorded values
// of the first test program (LDB #55AF, LAB, CNB -> 55FAh, FGO -> 50FFh), the
// second (LDB #4FB1, DECB, SWB, CNB -> B0FFh), INCB, INM from the
// multi-valued lines, OUTM to the multi-valued register, a dual-rail OR into
// both A and B, and CPAH loading FLAGS (GREATER, then LESS, then EQUAL).
module tb_datapath;
  import vplp_pkg::*;
  logic clk = 1'b0, rst;
  logic ms, ld1, ldb, inc, dec, ld2, fld;
  logic [15:0] dati, mvi, a, mvo, b;
  logic [2:0]  fl;
  alu_op_e     op;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  datapath #(.WIDTH(16)) dut (
    .clk(clk), .rst(rst), .ms(ms), .dati_dp(dati), .mvi_dp(mvi), .vpalus_dp(op),
    .ld1_dp(ld1), .ldb(ldb), .inc_dp(inc), .dec_dp(dec), .ld2_dp(ld2), .fld_dp(fld),
    .dato_dp(a), .mvo_dp(mvo), .fl_dp(fl), .regb_out(b));

  task automatic step(input alu_op_e o, input logic la, input logic lb, input logic i,
                      input logic d, input logic lm, input logic lf, input logic m,
                      input logic [15:0] din);
    @(negedge clk);
    op = o; ld1 = la; ldb = lb; inc = i; dec = d; ld2 = lm; fld = lf; ms = m; dati = din;
    @(negedge clk);
    ld1 = 0; ldb = 0; inc = 0; dec = 0; ld2 = 0; fld = 0; ms = 0;
  endtask

  task automatic expect_regs(input string what, input logic [15:0] ea, input logic [15:0] eb,
                             input logic [15:0] emv, input logic [2:0] ef);
    checks++;
    if (a !== ea || b !== eb || mvo !== emv || fl !== ef) begin
      failures++;
      $display("%s: A=%h B=%h MV=%h FL=%b want %h %h %h %b", what, a, b, mvo, fl, ea, eb, emv, ef);
    end
  endtask

  initial begin
    ms = 0; ld1 = 0; ldb = 0; inc = 0; dec = 0; ld2 = 0; fld = 0; dati = 0;
    mvi = 16'h3210; op = ALU_PASS_D;
    rst = 1; @(posedge clk); #1 rst = 0;
    expect_regs("reset", 0, 0, 0, 0);
    step(ALU_PASS_D, 0, 1, 0, 0, 0, 0, 0, 16'h55AF); expect_regs("LDB", 16'h0000, 16'h55AF, 0, 0);
    step(ALU_PASS_B, 1, 0, 0, 0, 0, 0, 0, 16'h1234); expect_regs("LAB", 16'h55AF, 16'h55AF, 0, 0);
    step(ALU_CNOT,   0, 1, 0, 0, 0, 0, 0, 16'h1234); expect_regs("CNB", 16'h55AF, 16'h55FA, 0, 0);
    step(ALU_FRED,   1, 1, 0, 0, 0, 0, 0, 16'h1234); expect_regs("FGO", 16'h55AF, 16'h50FF, 0, 0);
    step(ALU_PASS_D, 0, 1, 0, 0, 0, 0, 0, 16'h4FB1); expect_regs("LDB 2", 16'h55AF, 16'h4FB1, 0, 0);
    step(ALU_PASS_D, 0, 0, 0, 1, 0, 0, 0, 16'h1234); expect_regs("DECB", 16'h55AF, 16'h4FB0, 0, 0);
    step(ALU_SWAP,   0, 1, 0, 0, 0, 0, 0, 16'h1234); expect_regs("SWB", 16'h55AF, 16'hB04F, 0, 0);
    step(ALU_CNOT,   0, 1, 0, 0, 0, 0, 0, 16'h1234); expect_regs("CNB 2", 16'h55AF, 16'hB0FF, 0, 0);
    step(ALU_PASS_D, 0, 0, 1, 0, 0, 0, 0, 16'h1234); expect_regs("INCB", 16'h55AF, 16'hB100, 0, 0);
    step(ALU_PASS_D, 1, 0, 0, 0, 0, 0, 1, 16'h1234); expect_regs("INM", 16'h3210, 16'hB100, 0, 0);
    step(ALU_PASS_D, 0, 0, 0, 0, 1, 0, 0, 16'h1234); expect_regs("OUTM", 16'h3210, 16'hB100, 16'h3210, 0);
    // dual-rail OR: A = 0xA5 (A55A), B = 0x3C (3CC3) -> 0xBD (BD42) in A and B
    step(ALU_PASS_D, 1, 0, 0, 0, 0, 0, 0, 16'hA55A);
    step(ALU_PASS_D, 0, 1, 0, 0, 0, 0, 0, 16'h3CC3);
    step(ALU_DOR,    1, 1, 0, 0, 0, 0, 0, 16'h1234); expect_regs("DOR", 16'hBD42, 16'hBD42, 16'h3210, 0);
    step(ALU_CMPH,   0, 0, 0, 0, 0, 1, 0, 16'h00AA); expect_regs("CPAH gt", 16'hBD42, 16'hBD42, 16'h3210, 3'b010);
    step(ALU_CMPH,   0, 0, 0, 0, 0, 1, 0, 16'hC000); expect_regs("CPAH lt", 16'hBD42, 16'hBD42, 16'h3210, 3'b100);
    step(ALU_CMPH,   0, 0, 0, 0, 0, 1, 0, 16'hBD00); expect_regs("CPAH eq", 16'hBD42, 16'hBD42, 16'h3210, 3'b001);
    step(ALU_CMPH,   0, 0, 0, 0, 0, 0, 0, 16'h00AA); expect_regs("no FLd", 16'hBD42, 16'hBD42, 16'h3210, 3'b001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
