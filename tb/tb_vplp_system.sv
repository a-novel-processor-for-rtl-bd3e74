// tb_vplp_system: end-to-end test of the VPLP test system.
//
// Three systems, each with its own program in the PRAM controller:
//   P2  the second test program: LDA #0000, LDB #4FB1, DECB, SWB, CNB, NOP,
//       HLT (register B goes 4FB1h, 4FB0h, B04Fh, B0FFh);
//   P3  the third test program: index-counter addressing, LDAC, STAC, CPAH and
//       a taken BIG branch over a NOP/HLT word, with data at 0Ch and 0Dh;
//   P4  a program that runs every remaining instruction: INM/OUTM through the
//       multi-valued lines, INCA/DECA/INCB/LBA, the dual-rail operations with
//       valid codes and with spacers, and a BIG that is not taken.
// Each system loads its program (the PRAM image is checked word by word
// before the processors start), is released from reset and runs to HLT. The
// final A, B, multi-valued register, FLAGS, IC and the whole PRAM are then
// compared with an instruction-level reference model (function run) on
// the same image. Mechanisms are counted on the system's ports and internal
// buses: controller writes, processor reads and writes, word fetches holding
// two instructions, operand fetches, taken and not-taken branches, FLAGS
// loads, multi-valued output and halt; each must occur at least once.
module tb_vplp_system;

  localparam logic [15:0] P2 [6] = '{
    16'h0D17, 16'h0000, 16'h4FB1, 16'h161C, 16'h1B08, 16'h0708
  };
  localparam logic [15:0] P3 [15] = '{
    16'h090B, 16'h0A0B, 16'h0A0E, 16'h1202, 16'h0807, 16'h0A0C, 16'h140B,
    16'h140C, 16'h0A0A, 16'h0B14, 16'h0C07, 16'h0000, 16'h55AA, 16'h00AA,
    16'h0000
  };
  localparam logic [15:0] P4 [32] = '{
    16'h2122, 16'h1818, 16'h191E, 16'h150D, 16'hA55A, 16'h1723, 16'h3CC3,
    16'h2528, 16'h240D, 16'hF005, 16'h1726, 16'h3CC3, 16'h0D17, 16'hF0FF,
    16'h0F00, 16'h290D, 16'h8001, 16'h1727, 16'h8181, 16'h0D17, 16'h5AA5,
    16'h33CC, 16'h2A08, 16'h091F, 16'h0E08, 16'h1203, 16'h0708, 16'h0000,
    16'h0000, 16'h0000, 16'h0000, 16'hFFFF
  };
  localparam logic [15:0] MVD = 16'h1234;

  // Instruction-level reference model.
  // run() executes a PRAM image word by word the way the processor's
  // programmer sees it (two instructions per word, high byte first; LDB/LDA
  // take the next word as operand; LDC/BIG take the low byte and end the word)
  // and returns the final registers, the final memory and how often each opcode
  // ran. The logic operations are written bit by bit, independently of the RTL.

  typedef struct {
    logic [15:0] mem [256];
    logic [15:0] a, b, mv;
    logic [2:0]  fl;
    logic [7:0]  ic, pc;
    bit          halted;
    int unsigned steps;
    int unsigned op_count [256];
    int unsigned branches_taken, branches_not_taken;
  } ref_state_t;

  function automatic void dual(input logic [15:0] x, input int i,
                               output logic t, output logic f);
    t = x[8+i];
    f = x[i];
  endfunction

  function automatic ref_state_t run(input ref_state_t s, input logic [15:0] mvd_in,
                                     input int unsigned max_steps);
    logic [15:0] w, opnd, ra, rb;
    logic [7:0]  op, lo;
    logic        at, af, bt, bf, tt, ff;
    bit          word_done;
    s.a = 0; s.b = 0; s.mv = 0; s.fl = 0; s.ic = 0; s.pc = 0; s.halted = 0;
    s.steps = 0; s.branches_taken = 0; s.branches_not_taken = 0;
    foreach (s.op_count[k]) s.op_count[k] = 0;
    while (!s.halted && s.steps < max_steps) begin
      w = s.mem[s.pc];
      lo = w[7:0];
      word_done = 0;
      for (int slot = 0; slot < 2 && !word_done && !s.halted; slot++) begin
        op = slot == 0 ? w[15:8] : w[7:0];
        s.op_count[op]++;
        s.steps++;
        ra = s.a; rb = s.b;
        case (op)
          8'h07: s.halted = 1;
          8'h09: begin s.ic = lo; word_done = 1; end
          8'h0A: s.ic++;
          8'h14: s.ic--;
          8'h0B: s.a = s.mem[s.ic];
          8'h0C: s.mem[s.ic] = s.a;
          8'h0E: begin
            opnd = s.mem[s.ic];
            s.fl = {s.a[15:8] < opnd[15:8], s.a[15:8] > opnd[15:8], s.a[15:8] == opnd[15:8]};
          end
          8'h12: begin
            word_done = 1;
            if (s.fl[1]) begin s.pc = s.pc + lo; s.branches_taken++; end
            else begin s.pc++; s.branches_not_taken++; end
          end
          8'h0D: begin s.pc++; s.a = s.mem[s.pc]; end
          8'h17: begin s.pc++; s.b = s.mem[s.pc]; end
          8'h15: s.b++;
          8'h16: s.b--;
          8'h18: s.a++;
          8'h19: s.a--;
          8'h1B: s.b[7:0] = s.b[7:0] ^ s.b[15:8];
          8'h1C: s.b = {s.b[7:0], s.b[15:8]};
          8'h1D: s.a = s.b;
          8'h1E: s.b = s.a;
          8'h20: for (int i = 0; i < 8; i++)
                   if (s.a[8+i]) begin s.b[8+i] = rb[i]; s.b[i] = rb[8+i]; end
          8'h21: s.a = mvd_in;
          8'h22: s.mv = s.a;
          8'h23, 8'h24, 8'h26, 8'h27, 8'h29, 8'h2A: begin
            for (int i = 0; i < 8; i++) begin
              dual(ra, i, at, af);
              dual(rb, i, bt, bf);
              if (op == 8'h23 || op == 8'h26 || op == 8'h29) begin tt = at | bt; ff = af & bf; end
              else begin tt = at & bt; ff = af | bf; end
              if ((op == 8'h26 || op == 8'h27) && ((!at && !af) || (!bt && !bf))) begin
                tt = 0; ff = 0;
              end
              if (op == 8'h29 || op == 8'h2A) begin
                if (at == af)      begin tt = at; ff = af; end
                else if (bt == bf) begin tt = bt; ff = bf; end
              end
              s.a[8+i] = tt; s.a[i] = ff;
            end
            s.b = s.a;
          end
          8'h25, 8'h28: s.a = {ra[7:0], ra[15:8]};
          default: ;
        endcase
      end
      if (!s.halted && !(op == 8'h12)) s.pc++;
    end
    return s;
  endfunction

  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic        vplp_rst, pram_rst;
  int          checks = 0, failures = 0;

  // Ports of the three systems.
  logic [15:0] mvo [3], di [3], dout [3], acc [3], rb [3];
  logic [7:0]  ad [3], opc [3], pcv [3], icv [3];
  logic        rdv [3], wrv [3], hlt [3], ldd [3];
  logic [2:0]  flv [3];

  vplp_system #(.PROG_WORDS(6), .PROGRAM(P2)) s2 (
    .vplp_clk(clk), .vplp_rst(vplp_rst), .pram_rst(pram_rst), .mvd_in(MVD),
    .mvd_out(mvo[0]), .address(ad[0]), .dati(di[0]), .dato(dout[0]), .rd(rdv[0]),
    .wr(wrv[0]), .halted(hlt[0]), .loaded(ldd[0]), .opcode(opc[0]), .pc(pcv[0]),
    .ic(icv[0]), .acc_a(acc[0]), .reg_b(rb[0]), .flags(flv[0]));
  vplp_system #(.PROG_WORDS(15), .PROGRAM(P3)) s3 (
    .vplp_clk(clk), .vplp_rst(vplp_rst), .pram_rst(pram_rst), .mvd_in(MVD),
    .mvd_out(mvo[1]), .address(ad[1]), .dati(di[1]), .dato(dout[1]), .rd(rdv[1]),
    .wr(wrv[1]), .halted(hlt[1]), .loaded(ldd[1]), .opcode(opc[1]), .pc(pcv[1]),
    .ic(icv[1]), .acc_a(acc[1]), .reg_b(rb[1]), .flags(flv[1]));
  vplp_system #(.PROG_WORDS(32), .PROGRAM(P4)) s4 (
    .vplp_clk(clk), .vplp_rst(vplp_rst), .pram_rst(pram_rst), .mvd_in(MVD),
    .mvd_out(mvo[2]), .address(ad[2]), .dati(di[2]), .dato(dout[2]), .rd(rdv[2]),
    .wr(wrv[2]), .halted(hlt[2]), .loaded(ldd[2]), .opcode(opc[2]), .pc(pcv[2]),
    .ic(icv[2]), .acc_a(acc[2]), .reg_b(rb[2]), .flags(flv[2]));

  // Mechanism counters, summed over the three systems.
  int n_ctl_wr, n_cpu_rd, n_cpu_wr, n_fetch, n_pair, n_operand, n_jump,
      n_flags, n_mvout, n_halt;
  logic [7:0]  pc_q [3];
  logic [15:0] mvo_q [3];
  logic [2:0]  fl_q [3];
  logic [7:0]  opc_q [3];
  logic        hlt_q [3];
  logic        qr [3];
  always_comb begin
    qr[0] = s2.qrst; qr[1] = s3.qrst; qr[2] = s4.qrst;
  end

  always @(posedge clk) begin
    for (int k = 0; k < 3; k++) begin
      if (qr[k] && wrv[k]) n_ctl_wr++;
      if (!qr[k] && rdv[k]) n_cpu_rd++;
      if (!qr[k] && wrv[k]) n_cpu_wr++;
      if (!qr[k] && pcv[k] != pc_q[k] && pcv[k] != pc_q[k] + 8'd1) n_jump++;
      if (!qr[k] && fl_q[k] != flv[k]) n_flags++;
      if (mvo_q[k] != mvo[k]) n_mvout++;
      if (hlt[k] && !hlt_q[k]) n_halt++;
      pc_q[k] = pcv[k]; mvo_q[k] = mvo[k]; fl_q[k] = flv[k]; opc_q[k] = opc[k];
      hlt_q[k] = hlt[k];
    end
  end
  // Fetch of a word, second instruction of a word, operand read (internal).
  always @(posedge clk) begin
    if (s2.u_vplp.u_cu.ctrl.ir_ld) n_fetch++;
    if (s3.u_vplp.u_cu.ctrl.ir_ld) n_fetch++;
    if (s4.u_vplp.u_cu.ctrl.ir_ld) n_fetch++;
    if (s2.u_vplp.u_cu.u_vplc.slot && s2.u_vplp.u_cu.u_vplc.opcode != s2.u_vplp.u_cu.u_ir.q[15:8]) n_pair++;
    if (s4.u_vplp.u_cu.ctrl.pc_inc && s4.u_vplp.u_cu.u_vplc.state_n == s4.u_vplp.u_cu.u_vplc.S_OPRD) n_operand++;
    if (s2.u_vplp.u_cu.ctrl.pc_inc && s2.u_vplp.u_cu.u_vplc.state_n == s2.u_vplp.u_cu.u_vplc.S_OPRD) n_operand++;
  end

  // PRAM contents, read from the cells' data flip-flops (p = high byte).
  logic [15:0] mem2 [256], mem3 [256], mem4 [256];
  for (genvar w = 0; w < 256; w++) begin : g_view
    for (genvar i = 0; i < 8; i++) begin : g_bit
      always_comb begin
        mem2[w][8+i] = s2.u_pram.g_word[w].u_word.g_cell[i].u_cell.dff1;
        mem2[w][i]   = s2.u_pram.g_word[w].u_word.g_cell[i].u_cell.dff3;
        mem3[w][8+i] = s3.u_pram.g_word[w].u_word.g_cell[i].u_cell.dff1;
        mem3[w][i]   = s3.u_pram.g_word[w].u_word.g_cell[i].u_cell.dff3;
        mem4[w][8+i] = s4.u_pram.g_word[w].u_word.g_cell[i].u_cell.dff1;
        mem4[w][i]   = s4.u_pram.g_word[w].u_word.g_cell[i].u_cell.dff3;
      end
    end
  end

  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic compare(input int k, input logic [15:0] img [], input string name);
    ref_state_t s;
    logic [15:0] m;
    foreach (s.mem[i]) s.mem[i] = (i < img.size()) ? img[i] : 16'h0000;
    s = run(s, MVD, 10000);
    chk({name, " halted"}, 16'(hlt[k]), 16'(s.halted));
    chk({name, " A"}, acc[k], s.a);
    chk({name, " B"}, rb[k], s.b);
    chk({name, " MV"}, mvo[k], s.mv);
    chk({name, " FLAGS"}, 16'(flv[k]), 16'(s.fl));
    chk({name, " IC"}, 16'(icv[k]), 16'(s.ic));
    for (int i = 0; i < 256; i++) begin
      case (k)
        0: m = mem2[i];
        1: m = mem3[i];
        default: m = mem4[i];
      endcase
      chk($sformatf("%s mem[%02h]", name, i), m, s.mem[i]);
    end
    $display("%s: %0d instructions, %0d branches taken, %0d not taken",
             name, s.steps, s.branches_taken, s.branches_not_taken);
    if (k == 1) begin
      chk("P3 branch taken", 16'(s.branches_taken), 16'd1);
      chk("P3 A (document)", acc[k], 16'h55AA);
    end
    if (k == 0) chk("P2 B (document)", rb[k], 16'hB0FF);
  endtask

  initial begin
    n_ctl_wr = 0; n_cpu_rd = 0; n_cpu_wr = 0; n_fetch = 0; n_pair = 0;
    n_operand = 0; n_jump = 0; n_flags = 0; n_mvout = 0; n_halt = 0;
    for (int k = 0; k < 3; k++) begin
      pc_q[k] = 0; mvo_q[k] = 0; fl_q[k] = 0; opc_q[k] = 0; hlt_q[k] = 0;
    end
    vplp_rst = 1'b1;
    pram_rst = 1'b0;
    repeat (3) @(posedge clk);
    #1 pram_rst = 1'b1;
    wait (ldd[0] && ldd[1] && ldd[2]);
    @(posedge clk);
    // The images the controllers wrote, before the processors start.
    for (int i = 0; i < 256; i++) begin
      chk($sformatf("P2 loaded [%02h]", i), mem2[i], (i < 6)  ? P2[i % 6]  : 16'h0000);
      chk($sformatf("P3 loaded [%02h]", i), mem3[i], (i < 15) ? P3[i % 15] : 16'h0000);
      chk($sformatf("P4 loaded [%02h]", i), mem4[i], (i < 32) ? P4[i % 32] : 16'h0000);
    end
    #1 vplp_rst = 1'b0;
    // Give the processors a bounded time to halt; results are compared
    // whether or not they did.
    for (int c = 0; c < 3000 && !(hlt[0] && hlt[1] && hlt[2]); c++) @(posedge clk);
    repeat (4) @(posedge clk);
    compare(0, P2, "P2");
    compare(1, P3, "P3");
    compare(2, P4, "P4");
    $display("mechanisms: controller writes %0d, cpu reads %0d, cpu writes %0d, fetches %0d, second-slot instructions %0d, operand fetches %0d, PC jumps %0d, FLAGS changes %0d, MV output changes %0d, halts %0d",
             n_ctl_wr, n_cpu_rd, n_cpu_wr, n_fetch, n_pair, n_operand, n_jump, n_flags, n_mvout, n_halt);
    checks++; if (n_ctl_wr != 6 + 15 + 32) begin failures++; $display("FAIL controller writes"); end
    checks++; if (n_cpu_rd == 0) begin failures++; $display("FAIL no processor read"); end
    checks++; if (n_cpu_wr != 3) begin failures++; $display("FAIL STAC writes %0d", n_cpu_wr); end
    checks++; if (n_fetch == 0) begin failures++; $display("FAIL no fetch"); end
    checks++; if (n_pair == 0) begin failures++; $display("FAIL no second-slot instruction"); end
    checks++; if (n_operand == 0) begin failures++; $display("FAIL no operand fetch"); end
    checks++; if (n_jump == 0) begin failures++; $display("FAIL no branch"); end
    checks++; if (n_flags == 0) begin failures++; $display("FAIL no FLAGS load"); end
    checks++; if (n_mvout == 0) begin failures++; $display("FAIL no MV output"); end
    checks++; if (n_halt != 3) begin failures++; $display("FAIL halts"); end
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
