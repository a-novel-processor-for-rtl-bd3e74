// vpalu: variable predicate arithmetic logic unit.
//
// Purely combinational. The 5-bit operation select (VPALUs) chooses how the
// 16-bit operands A (accumulator), B (register B) and D (data multiplexer:
// PRAM word or MVD_in) are combined, so the same unit switches logic style
// from one instruction to the next:
//   pass-through     D, A or B             (LDB, LDA, INM, LBA, LAB)
//   arithmetic       A + 1, A - 1           (INCA, DECA)
//   pseudo-quantum   CNOT: B.lo ^= B.hi; SWAP: exchange B.hi and B.lo
//   reversible       Fredkin: control A.hi; where a control bit is 1, the
//                    bits of B.hi and B.lo are exchanged; A passes unchanged
//   dual-rail        8 dual-rail bits per word: true rails in the high byte,
//                    false rails in the low byte
//     plain          DOR, DAND: rail-wise OR/AND (true rails) with AND/OR
//                    (false rails)
//     single spacer  TNOT, TOR, TAND: 00 is the spacer; a spacer on any input
//                    bit gives a spacer on that output bit
//     dual spacer    SNOT, SOR, SAND: 00 and 11 are spacers; a spacer input
//                    bit is passed on (A's if A has one, else B's)
//   compare          CMPH: unsigned A[15:8] against D[15:8] -> flags
// res_a goes to accumulator A, res_b to register B; the controller decides
// which of them is loaded. The operations and their results follow the
// document's instruction descriptions and recorded runs; the operation codes,
// the rail layout and the spacer rules are this design's own.
module vpalu
  import vplp_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] res_a,
  output logic [WIDTH-1:0] res_b,
  output logic [2:0]       flags
);
  localparam int unsigned H = WIDTH / 2;

  logic [H-1:0] at, af, bt, bf;     // dual-rail views
  logic [H-1:0] sa1, sb1;           // single-spacer (00) bits
  logic [H-1:0] sa2, sb2;           // dual-spacer (00 or 11) bits
  logic [H-1:0] ort, orf, andt, andf;
  logic [H-1:0] c, fx, fy;          // Fredkin
  logic [WIDTH-1:0] res;

  always_comb begin
    at  = a[WIDTH-1:H];  af = a[H-1:0];
    bt  = b[WIDTH-1:H];  bf = b[H-1:0];
    sa1 = ~(at | af);    sb1 = ~(bt | bf);
    sa2 = ~(at ^ af);    sb2 = ~(bt ^ bf);
    ort  = at | bt;      orf  = af & bf;
    andt = at & bt;      andf = af | bf;
    c  = a[WIDTH-1:H];
    fx = (~c & b[WIDTH-1:H]) | (c & b[H-1:0]);
    fy = (~c & b[H-1:0])     | (c & b[WIDTH-1:H]);

    res   = d;
    res_b = '0;
    flags = '0;
    unique case (op)
      ALU_PASS_D: res = d;
      ALU_PASS_A: res = a;
      ALU_PASS_B: res = b;
      ALU_INC_A:  res = a + 1'b1;
      ALU_DEC_A:  res = a - 1'b1;
      ALU_CNOT:   res = {b[WIDTH-1:H], b[WIDTH-1:H] ^ b[H-1:0]};
      ALU_SWAP:   res = {b[H-1:0], b[WIDTH-1:H]};
      ALU_FRED:   res = {fx, fy};
      ALU_DOR:    res = {ort, orf};
      ALU_DAND:   res = {andt, andf};
      ALU_TNOT:   res = {af, at};
      ALU_TOR:    res = {ort & ~(sa1 | sb1), orf & ~(sa1 | sb1)};
      ALU_TAND:   res = {andt & ~(sa1 | sb1), andf & ~(sa1 | sb1)};
      ALU_SNOT:   res = {af, at};
      ALU_SOR:    res = {(sa2 & at) | (~sa2 & sb2 & bt) | (~sa2 & ~sb2 & ort),
                         (sa2 & af) | (~sa2 & sb2 & bf) | (~sa2 & ~sb2 & orf)};
      ALU_SAND:   res = {(sa2 & at) | (~sa2 & sb2 & bt) | (~sa2 & ~sb2 & andt),
                         (sa2 & af) | (~sa2 & sb2 & bf) | (~sa2 & ~sb2 & andf)};
      ALU_CMPH: begin
        res = a;
        flags[FL_EQ] = (a[WIDTH-1:H] == d[WIDTH-1:H]);
        flags[FL_GT] = (a[WIDTH-1:H] >  d[WIDTH-1:H]);
        flags[FL_LT] = (a[WIDTH-1:H] <  d[WIDTH-1:H]);
      end
      default:    res = d;
    endcase
    // Fredkin leaves the control operand in A unchanged.
    res_a = (op == ALU_FRED) ? a : res;
    res_b = res;
  end
endmodule
