// tb_vplp_trace3: the third test program on the VPLP test system, checked
// against the sequence of values captured on the original hardware.
//
// The program (LDC #0B; INC, LDAC; INC, CPAH; BIG +2; NOP, HLT skipped;
// INC, STAC; DEC, LDAC; DEC, STAC; INC, INC; LDAC, DEC; STAC, HLT, with
// 55AAh at 0Ch and 00AAh at 0Dh) runs from reset to HALT. Every change of
// accumulator A, PRAM write data, PC, IC, FLAGS and OPCODE is recorded, and
// each list of successive values is compared with the capture:
//   A, write data   0000, 55AA, 00AA, 55AA
//   PC              00, 01, 02, 03, 05, 06, 07, 08, 09, 0A  (BIG skips 04)
//   IC              00, 0B, 0C, 0D, 0E, 0D, 0C, 0D, 0E, 0D
//   FLAGS           0, 2 (GREATER, loaded once by CPAH)
//   OPCODE          every instruction in order (INC, INC merge into one
//                   value); the values the capture labels - 00, 09, 0B, 0E,
//                   12, 0C, 0B, 0C, 0A, 0B, 14, 0C, 07 - must appear in it in
//                   that order.
// Also counted: 3 PRAM writes (to 0Eh, 0Ch, 0Dh in that order) and 14 reads
// (10 instruction words, 4 operands), and the processor must halt.
module tb_vplp_trace3;
  logic        clk = 1'b0;
  logic        vplp_rst, pram_rst;
  logic [15:0] mvd_in, mvd_out, dati, dato, acc_a, reg_b;
  logic [7:0]  address, opcode, pc, ic;
  logic        rd, wr, halted, loaded;
  logic [2:0]  flags;
  int          checks = 0, failures = 0;
  localparam logic [15:0] IMAGE [15] = '{
    16'h090B, 16'h0A0B, 16'h0A0E, 16'h1202, 16'h0807, 16'h0A0C, 16'h140B,
    16'h140C, 16'h0A0A, 16'h0B14, 16'h0C07, 16'h0000, 16'h55AA, 16'h00AA,
    16'h0000};

  logic [15:0] a_seq[$], d_seq[$], pc_seq[$], ic_seq[$], fl_seq[$], op_seq[$];
  logic [7:0]  wr_addr[$];
  int          n_rd = 0;
  logic        run = 1'b0;

  always #10 clk = ~clk;

  vplp_system #(.PROG_WORDS(15), .PROGRAM(IMAGE)) dut (
    .vplp_clk(clk), .vplp_rst(vplp_rst), .pram_rst(pram_rst), .mvd_in(mvd_in),
    .mvd_out(mvd_out), .address(address), .dati(dati), .dato(dato), .rd(rd),
    .wr(wr), .halted(halted), .loaded(loaded), .opcode(opcode), .pc(pc),
    .ic(ic), .acc_a(acc_a), .reg_b(reg_b), .flags(flags)
  );

  // Append v to q if it differs from the last value recorded.
  function automatic void note(ref logic [15:0] q[$], input logic [15:0] v);
    if (q.size() == 0 || q[q.size()-1] != v) q.push_back(v);
  endfunction

  always @(negedge clk) if (run) begin
    note(a_seq, acc_a);
    note(d_seq, dato);
    note(pc_seq, 16'(pc));
    note(ic_seq, 16'(ic));
    note(fl_seq, 16'(flags));
    note(op_seq, 16'(opcode));
    if (rd) n_rd++;
    if (wr) wr_addr.push_back(address);
  end

  task automatic same(input string what, input logic [15:0] got[$], input logic [15:0] want[$]);
    checks++;
    if (got != want) begin
      failures++;
      $write("%s: got", what);
      foreach (got[i]) $write(" %h", got[i]);
      $write(", want");
      foreach (want[i]) $write(" %h", want[i]);
      $display("");
    end
  endtask

  initial begin
    logic [15:0] labels[$];
    int          k;
    mvd_in   = 16'h0000;
    vplp_rst = 1'b1;
    pram_rst = 1'b0;
    repeat (3) @(posedge clk);
    #1 pram_rst = 1'b1;
    wait (loaded);
    repeat (4) @(posedge clk);
    @(posedge clk); #1 vplp_rst = 1'b0;
    run = 1'b1;
    wait (halted);
    repeat (4) @(posedge clk);
    run = 1'b0;

    same("A", a_seq, '{16'h0000, 16'h55AA, 16'h00AA, 16'h55AA});
    same("write data", d_seq, '{16'h0000, 16'h55AA, 16'h00AA, 16'h55AA});
    same("PC", pc_seq, '{16'h00, 16'h01, 16'h02, 16'h03, 16'h05, 16'h06, 16'h07,
                         16'h08, 16'h09, 16'h0A});
    same("IC", ic_seq, '{16'h00, 16'h0B, 16'h0C, 16'h0D, 16'h0E, 16'h0D, 16'h0C,
                         16'h0D, 16'h0E, 16'h0D});
    same("FLAGS", fl_seq, '{16'h0, 16'h2});
    same("OPCODE", op_seq, '{16'h00, 16'h09, 16'h0A, 16'h0B, 16'h0A, 16'h0E, 16'h12,
                             16'h0A, 16'h0C, 16'h14, 16'h0B, 16'h14, 16'h0C, 16'h0A,
                             16'h0B, 16'h14, 16'h0C, 16'h07});
    // The labelled OPCODE values must occur in this order.
    labels = '{16'h00, 16'h09, 16'h0B, 16'h0E, 16'h12, 16'h0C, 16'h0B, 16'h0C,
               16'h0A, 16'h0B, 16'h14, 16'h0C, 16'h07};
    k = 0;
    foreach (op_seq[i]) if (k < labels.size() && op_seq[i] == labels[k]) k++;
    checks++;
    if (k != labels.size()) begin
      failures++;
      $display("OPCODE labels: only %0d of %0d found in order", k, labels.size());
    end
    checks++;
    if (wr_addr.size() != 3 || wr_addr[0] != 8'h0E || wr_addr[1] != 8'h0C ||
        wr_addr[2] != 8'h0D) begin
      failures++;
      $display("writes: %p, want 0E 0C 0D", wr_addr);
    end
    checks++;
    if (n_rd != 14) begin failures++; $display("reads: %0d, want 14", n_rd); end
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
