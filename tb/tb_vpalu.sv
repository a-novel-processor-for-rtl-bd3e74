// tb_vpalu: self-checking test of the variable predicate ALU.
//
// Directed cases first, with the operand/result pairs recorded on the
// original processor: CNOT 55AFh -> 55FAh and AACDh -> AA67h, Fredkin with
// A = 55AFh, B = 55FAh -> B = 50FFh and A = AACDh, B = AA67h -> B = 22EFh,
// SWAP 4FB0h -> B04Fh, CNOT B04Fh -> B0FFh, and the high-byte compare
// 55AAh against 00AAh (GREATER). Then 3000 random operations, each compared
// with a bit-by-bit model in the testbench.
module tb_vpalu;
  import vplp_pkg::*;
  logic [15:0] a, b, d, ra, rb, ea, eb;
  logic [2:0]  fl, ef;
  alu_op_e     op;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  vpalu #(.WIDTH(16)) dut (.op(op), .a(a), .b(b), .d(d), .res_a(ra), .res_b(rb), .flags(fl));

  // Bit-level model: expected A result, B result and flags.
  task automatic model(output logic [15:0] xa, output logic [15:0] xb, output logic [2:0] xf);
    logic at, af, bt, bf, t, f;
    logic [15:0] r;
    xf = 3'b000;
    r  = 16'h0000;
    case (op)
      ALU_PASS_D: r = d;
      ALU_PASS_A: r = a;
      ALU_PASS_B: r = b;
      ALU_INC_A:  r = 16'((int'(a) + 1) % 65536);
      ALU_DEC_A:  r = 16'((int'(a) + 65535) % 65536);
      ALU_CNOT:   for (int i = 0; i < 16; i++) r[i] = (i >= 8) ? b[i] : (b[i] != b[i+8]);
      ALU_SWAP:   for (int i = 0; i < 16; i++) r[i] = b[(i + 8) % 16];
      ALU_FRED:   for (int i = 0; i < 8; i++) begin
                    r[8+i] = a[8+i] ? b[i] : b[8+i];
                    r[i]   = a[8+i] ? b[8+i] : b[i];
                  end
      ALU_CMPH: begin
        r = a;
        if (a[15:8] == d[15:8]) xf = 3'b001;
        else if (a[15:8] > d[15:8]) xf = 3'b010;
        else xf = 3'b100;
      end
      default: for (int i = 0; i < 8; i++) begin
        at = a[8+i]; af = a[i]; bt = b[8+i]; bf = b[i];
        case (op)
          ALU_DOR, ALU_TOR, ALU_SOR: begin t = at || bt; f = af && bf; end
          ALU_DAND, ALU_TAND, ALU_SAND: begin t = at && bt; f = af || bf; end
          default: begin t = af; f = at; end  // TNOT, SNOT
        endcase
        if ((op == ALU_TOR || op == ALU_TAND) && ((at == 0 && af == 0) || (bt == 0 && bf == 0))) begin
          t = 0; f = 0;
        end
        if (op == ALU_SOR || op == ALU_SAND) begin
          if (at == af) begin t = at; f = af; end
          else if (bt == bf) begin t = bt; f = bf; end
        end
        r[8+i] = t; r[i] = f;
      end
    endcase
    xb = r;
    xa = (op == ALU_FRED) ? a : r;
  endtask

  task automatic check(input string tag);
    #1;
    model(ea, eb, ef);
    checks++;
    if (ra !== ea || rb !== eb || fl !== ef) begin
      failures++;
      $display("%s op=%0d a=%h b=%h d=%h: got %h %h %b want %h %h %b",
               tag, op, a, b, d, ra, rb, fl, ea, eb, ef);
    end
  endtask

  task automatic direct(input alu_op_e o, input logic [15:0] va, input logic [15:0] vb,
                        input logic [15:0] vd, input logic [15:0] want_b, input logic [2:0] want_f);
    op = o; a = va; b = vb; d = vd;
    #1;
    checks++;
    if (rb !== want_b || fl !== want_f) begin
      failures++;
      $display("recorded case op=%0d a=%h b=%h: got B=%h flags=%b want %h %b", o, va, vb, rb, fl, want_b, want_f);
    end
    check("recorded");
  endtask

  initial begin
    direct(ALU_CNOT, 16'h55AF, 16'h55AF, 0, 16'h55FA, 3'b000);
    direct(ALU_CNOT, 16'hAACD, 16'hAACD, 0, 16'hAA67, 3'b000);
    direct(ALU_FRED, 16'h55AF, 16'h55FA, 0, 16'h50FF, 3'b000);
    direct(ALU_FRED, 16'hAACD, 16'hAA67, 0, 16'h22EF, 3'b000);
    direct(ALU_SWAP, 16'h0000, 16'h4FB0, 0, 16'hB04F, 3'b000);
    direct(ALU_CNOT, 16'h0000, 16'hB04F, 0, 16'hB0FF, 3'b000);
    direct(ALU_CMPH, 16'h55AA, 16'h0000, 16'h00AA, 16'h55AA, 3'b010);
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'(5'($urandom % 17));
      a = 16'($urandom); b = 16'($urandom); d = 16'($urandom);
      if (i % 4 == 0) d = {a[15:8], 8'($urandom)};  // equal high bytes
      check("random");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
