// tb_vplc: self-checking test of the variable predicate logic controller.
//
// For every implemented opcode the testbench plays the instruction register
// (loading the word {opcode, HLT} whenever the controller asks for it) and
// records, from the moment OPCODE shows the instruction until the next
// OPCODE, which control lines were raised, the VPALU operation used when a
// register was loaded, and the number of cycles. These are compared with a
// table written from the instruction descriptions: which registers an
// instruction changes, whether it reads or writes PRAM, and the cycle counts
// of the recorded runs (4 cycles per instruction, 6 for LDB/LDA, 5 for
// LDAC/CPAH, 3 for a taken branch, which goes straight to the fetch of its
// target). Branches are run with GREATER set and clear. The PC save and
// second PC load lines must never be raised.
module tb_vplc;
  import vplp_pkg::*;
  logic clk = 1'b0, rst;
  logic [15:0] ir;
  logic [2:0]  flags;
  ctrl_t       ctrl;
  logic [7:0]  opcode;
  logic        halted;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // No described instruction saves or restores the PC.
  int n_pc_save = 0;
  always @(posedge clk) if (ctrl.pc_save || ctrl.pc_ld2) n_pc_save++;

  vplc dut (.clk(clk), .rst(rst), .ir(ir), .flags(flags), .ctrl(ctrl), .opcode(opcode), .halted(halted));

  typedef struct packed {
    logic rd, wr, ms, ld_a, ld_mv, ld_b, binc, bdec, fld, ic_ld, ic_inc, ic_dec, pc_inc, pc_ld1, addr_ic;
  } sig_t;

  function automatic sig_t pack(input ctrl_t c);
    return '{c.rd, c.wr, c.ms, c.ld_a, c.ld_mv, c.ld_b, c.binc, c.bdec, c.fld,
             c.ic_ld, c.ic_inc, c.ic_dec, c.pc_inc, c.pc_ld1, c.addr_ic};
  endfunction

  // Expected: control lines, VPALU op at a load, cycles until the next opcode.
  task automatic expect_for(input logic [7:0] op, input logic gt, output sig_t s,
                            output alu_op_e alu, output int cyc);
    s = '0; alu = ALU_PASS_D; cyc = 4;
    case (op)
      8'h09: begin s.ic_ld = 1; s.pc_inc = 1; s.rd = 1; end  // ends the word: PC+1, fetch
      8'h0A: s.ic_inc = 1;
      8'h14: s.ic_dec = 1;
      8'h0B: begin s.rd = 1; s.addr_ic = 1; s.ld_a = 1; cyc = 5; end
      8'h0C: begin s.wr = 1; s.addr_ic = 1; end
      8'h0E: begin s.rd = 1; s.addr_ic = 1; s.fld = 1; alu = ALU_CMPH; cyc = 5; end
      8'h12: begin
        s.rd = 1;
        if (gt) begin s.pc_ld1 = 1; cyc = 3; end else s.pc_inc = 1;
      end
      8'h0D: begin s.pc_inc = 1; s.rd = 1; s.ld_a = 1; cyc = 6; end
      8'h17: begin s.pc_inc = 1; s.rd = 1; s.ld_b = 1; cyc = 6; end
      8'h15: s.binc = 1;
      8'h16: s.bdec = 1;
      8'h18: begin s.ld_a = 1; alu = ALU_INC_A; end
      8'h19: begin s.ld_a = 1; alu = ALU_DEC_A; end
      8'h1B: begin s.ld_b = 1; alu = ALU_CNOT; end
      8'h1C: begin s.ld_b = 1; alu = ALU_SWAP; end
      8'h1D: begin s.ld_a = 1; alu = ALU_PASS_B; end
      8'h1E: begin s.ld_b = 1; alu = ALU_PASS_A; end
      8'h20: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_FRED; end
      8'h21: begin s.ld_a = 1; s.ms = 1; alu = ALU_PASS_D; end
      8'h22: s.ld_mv = 1;
      8'h23: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_DOR; end
      8'h24: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_DAND; end
      8'h25: begin s.ld_a = 1; alu = ALU_TNOT; end
      8'h26: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_TOR; end
      8'h27: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_TAND; end
      8'h28: begin s.ld_a = 1; alu = ALU_SNOT; end
      8'h29: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_SOR; end
      8'h2A: begin s.ld_a = 1; s.ld_b = 1; alu = ALU_SAND; end
      default: ;  // NOP
    endcase
  endtask

  // Plays the instruction register.
  always_ff @(posedge clk) if (rst) ir <= 16'h0000; else if (ctrl.ir_ld) ir <= {cur_op, 8'h07};
  logic [7:0] cur_op;

  task automatic run_one(input logic [7:0] op, input logic gt);
    sig_t got, want;
    alu_op_e alu_got, alu_want;
    int cyc;
    logic [7:0] first;
    cur_op = op; flags = gt ? 3'b010 : 3'b100;
    rst = 1; @(posedge clk); #1 rst = 0;
    wait (opcode == op);
    got = '0; alu_got = ALU_PASS_D; cyc = 0;
    // count cycles until the opcode changes or a new fetch starts
    while (1) begin
      @(negedge clk);
      if (opcode != op) break;
      if (cyc > 0 && dut.state == dut.S_FETCH && (op == 8'h09 || op == 8'h12)) begin
        got |= pack(ctrl);
        break;
      end
      got |= pack(ctrl);
      if (ctrl.ld_a || ctrl.ld_b || ctrl.fld) alu_got = ctrl.vpalus;
      cyc++;
      if (cyc > 20) break;
    end
    begin
      int cw;
      expect_for(op, gt, want, alu_want, cw);
      checks++;
      if (got !== want || alu_got !== alu_want || cyc !== cw) begin
        failures++;
        $display("op %h gt=%b: lines %b want %b, alu %0d want %0d, cycles %0d want %0d",
                 op, gt, got, want, alu_got, alu_want, cyc, cw);
      end
    end
  endtask

  localparam logic [7:0] OPS [29] = '{
    8'h08, 8'h09, 8'h0A, 8'h0B, 8'h0C, 8'h0D, 8'h0E, 8'h12, 8'h14, 8'h15,
    8'h16, 8'h17, 8'h18, 8'h19, 8'h1B, 8'h1C, 8'h1D, 8'h1E, 8'h20, 8'h21,
    8'h22, 8'h23, 8'h24, 8'h25, 8'h26, 8'h27, 8'h28, 8'h29, 8'h2A
  };

  initial begin
    flags = 0; cur_op = 8'h08;
    foreach (OPS[i]) run_one(OPS[i], 1'b0);
    run_one(8'h12, 1'b1);
    // HLT: the controller must stop and stay stopped.
    cur_op = 8'h07; rst = 1; @(posedge clk); #1 rst = 0;
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (!halted || opcode !== 8'h07) begin failures++; $display("HLT: halted=%b opcode=%h", halted, opcode); end
    repeat (10) begin
      @(negedge clk);
      checks++;
      if (ctrl.rd || ctrl.wr || ctrl.pc_inc || !halted) begin failures++; $display("activity after HLT"); end
    end
    checks++;
    if (n_pc_save != 0) begin
      failures++;
      $display("PC save or PCld2 raised %0d times; no instruction uses them", n_pc_save);
    end
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
