// tb_control_unit: self-checking test of the VPLP control unit.
//
// The testbench plays the PRAM (one-cycle read latency, read data held) and
// the FLAGS register. Part 1 runs the first test program's instruction words
// and checks the cycles of every PRAM read and every register-load pulse
// against the recorded trace (shifted by the two cycles of the reset
// synchroniser, which is not part of this unit), and the halt. Part 2 runs a
// program with LDC, INC, LDAC, DEC, STAC and BIG (taken and not taken) and
// checks the ordered list of PRAM accesses with their addresses, i.e. the
// index-counter addressing and the branch targets.
module tb_control_unit;
  import vplp_pkg::*;
  logic clk = 1'b0, rst;
  logic [15:0] dati, dato_cu, mem [256];
  logic [2:0]  fls;
  alu_op_e     vpalus;
  logic rd, wr, ms, ld, ldmv, ldb, binc, bdec, fld, halted;
  logic [7:0] address, opcode, pcout, icout;
  int checks = 0, failures = 0, cyc;
  always #5 clk = ~clk;

  control_unit dut (
    .clk(clk), .rst(rst), .dati(dati), .fls_cu(fls), .vpalus_cu(vpalus), .rd(rd), .wr(wr),
    .ms_cu(ms), .ld_cu(ld), .ldmv_cu(ldmv), .ldb_cu(ldb), .binc_cu(binc), .bdec_cu(bdec),
    .fld_cu(fld), .dato_cu(dato_cu), .address(address), .opcode(opcode), .pcout(pcout),
    .icout(icout), .halted(halted));

  always_ff @(posedge clk) begin
    if (rst) dati <= 16'h0000;
    else if (rd) dati <= mem[address];
    if (wr) mem[address] <= 16'hBEEF;
  end

  // access log: {wr, address}
  logic [8:0] log_q [$];
  int rd_cycles [$], ldb_cycles [$], ld_cycles [$];
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (rd || wr) log_q.push_back({wr, address});
    if (rd) rd_cycles.push_back(cyc);
    if (ldb) ldb_cycles.push_back(cyc);
    if (ld) ld_cycles.push_back(cyc);
  end

  task automatic cmp_list(input string what, input int got [$], input int want [$]);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %p want %p", what, got, want);
    end
  endtask

  initial begin
    int want_rd [$], want_ldb [$], want_ld [$];
    logic [8:0] want_log [$];
    fls = 0; cyc = 0;
    foreach (mem[i]) mem[i] = 16'h0000;
    mem[0] = 16'h171D; mem[1] = 16'h55AF; mem[2] = 16'h1B20; mem[3] = 16'h171D;
    mem[4] = 16'hAACD; mem[5] = 16'h1B20; mem[6] = 16'h0807;
    rst = 1; @(posedge clk); #1 rst = 0;
    wait (halted);
    repeat (5) @(posedge clk);
    // trace samples 3, 9, 16, 27, 33, 40, 51 (RD), 10, 21, 25, 34, 45, 49 (B load),
    // 14, 25, 38, 49 (A load); cycle 1 here is trace sample 2, the first
    // cycle with the synchronised reset released
    want_rd  = '{2, 8, 15, 26, 32, 39, 50};
    want_ldb = '{9, 20, 24, 33, 44, 48};
    want_ld  = '{13, 24, 37, 48};
    cmp_list("RD cycles", rd_cycles, want_rd);
    cmp_list("LDB_cu cycles", ldb_cycles, want_ldb);
    cmp_list("LD_cu cycles", ld_cycles, want_ld);
    checks++; if (opcode !== 8'h07 || pcout !== 8'h06) begin failures++; $display("halt state opcode=%h pc=%h", opcode, pcout); end

    // Part 2
    foreach (mem[i]) mem[i] = 16'h0000;
    mem[0] = 16'h090B;  // LDC $0B
    mem[1] = 16'h0A0B;  // INC, LDAC      -> read 0C
    mem[2] = 16'h140C;  // DEC, STAC      -> write 0B
    mem[3] = 16'h1202;  // BIG $02, GREATER set -> 05
    mem[5] = 16'h1203;  // BIG $03, GREATER clear -> 06
    mem[6] = 16'h0807;  // NOP, HLT
    log_q.delete();
    rst = 1; @(posedge clk); #1 rst = 0;
    fork
      begin
        wait (pcout == 8'h05);
        fls = 3'b100;
      end
      begin
        fls = 3'b010;
      end
    join
    wait (halted);
    repeat (3) @(posedge clk);
    want_log = '{{1'b0, 8'h00}, {1'b0, 8'h01}, {1'b0, 8'h0C}, {1'b0, 8'h02}, {1'b1, 8'h0B},
                 {1'b0, 8'h03}, {1'b0, 8'h05}, {1'b0, 8'h06}};
    checks++;
    if (log_q != want_log) begin failures++; $display("access list %p want %p", log_q, want_log); end
    checks++; if (icout !== 8'h0B) begin failures++; $display("IC %h", icout); end
    checks++; if (mem[8'h0B] !== 16'hBEEF) begin failures++; $display("STAC write missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
