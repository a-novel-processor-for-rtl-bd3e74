// vplc: variable predicate logic controller (VPLCI), the finite state machine
// at the heart of the VPLP control unit.
//
// Each 16-bit word read from PRAM holds two 8-bit instructions; the high byte
// is executed first, then the low byte, then the next word is fetched. LDB and
// LDA read a 16-bit operand from the word after the current one; LDC and BIG
// take the low byte of their own word as operand and end the word.
//
// Cycle sequence (one state per vplp_clk cycle):
//   FETCH  RD with address = PC
//   FWAIT  PRAM data valid; instruction register loads it
//   FDEC   OPCODE <= high byte of the instruction register
//   EX1, EX2, EX3  the instruction acts at the end of EX3 (registers load,
//          IC/PC change, RD or WR is issued with the address it needs)
//   OPRD   (LDB, LDA) RD with address = PC, which EX3 advanced to the operand
//   OPLD   (LDB, LDA, LDAC, CPAH) the read word is loaded / compared
//   NEXT   after the high byte: OPCODE <= low byte, back to EX1;
//          after the low byte: PC <= PC + 1, back to FETCH
//   HALT   after HLT, until reset
// A register written by an instruction therefore shows its new value three
// cycles after OPCODE changes, and the next OPCODE (or fetch) follows one
// cycle later, as in the processor's recorded runs (LDB: 6 cycles, most other
// instructions 4, plus 3 cycles to fetch a word). The controller leaves IDLE
// on the first clock edge after reset. The sequence is reconstructed from the
// document's signal trace; state names and the encoding are this design's.
// The control word's PC save and second PC load lines stay low: no described
// instruction saves or restores the program counter.
module vplc
  import vplp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] ir,
  input  logic [2:0]  flags,
  output ctrl_t       ctrl,
  output logic [7:0]  opcode,
  output logic        halted
);
  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_FWAIT, S_FDEC, S_EX1, S_EX2, S_EX3,
    S_OPRD, S_OPLD, S_NEXT, S_HALT
  } state_e;

  state_e state, state_n;
  logic   slot, slot_n;      // 0: executing high byte, 1: low byte / word done
  logic [7:0] opcode_n;
  opcode_e op;

  always_comb op = opcode_e'(opcode);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= S_IDLE;
      slot   <= 1'b0;
      opcode <= 8'h00;
    end else begin
      state  <= state_n;
      slot   <= slot_n;
      opcode <= opcode_n;
    end
  end

  always_comb halted = (state == S_HALT);

  always_comb begin
    ctrl     = '0;
    ctrl.vpalus = ALU_PASS_D;
    state_n  = state;
    slot_n   = slot;
    opcode_n = opcode;

    unique case (state)
      S_IDLE:  state_n = S_FETCH;
      S_FETCH: begin
        ctrl.rd = 1'b1;
        state_n = S_FWAIT;
      end
      S_FWAIT: begin
        ctrl.ir_ld = 1'b1;
        state_n    = S_FDEC;
      end
      S_FDEC: begin
        opcode_n = ir[15:8];
        slot_n   = 1'b0;
        state_n  = S_EX1;
      end
      S_EX1: state_n = S_EX2;
      S_EX2: state_n = S_EX3;
      S_EX3: begin
        state_n = S_NEXT;
        unique case (op)
          OP_HLT:  state_n = S_HALT;
          OP_LDC:  begin ctrl.ic_ld = 1'b1; slot_n = 1'b1; end
          OP_INC:  ctrl.ic_inc = 1'b1;
          OP_DEC:  ctrl.ic_dec = 1'b1;
          OP_LDAC, OP_CPAH: begin
            ctrl.rd = 1'b1; ctrl.addr_ic = 1'b1; state_n = S_OPLD;
          end
          OP_STAC: begin ctrl.wr = 1'b1; ctrl.addr_ic = 1'b1; end
          OP_LDA, OP_LDB: begin ctrl.pc_inc = 1'b1; state_n = S_OPRD; end
          OP_BIG: begin
            if (flags[FL_GT]) begin
              ctrl.pc_ld1 = 1'b1;
              state_n     = S_FETCH;
            end else begin
              slot_n = 1'b1;
            end
          end
          OP_INCA: begin ctrl.vpalus = ALU_INC_A;  ctrl.ld_a = 1'b1; end
          OP_DECA: begin ctrl.vpalus = ALU_DEC_A;  ctrl.ld_a = 1'b1; end
          OP_INCB: ctrl.binc = 1'b1;
          OP_DECB: ctrl.bdec = 1'b1;
          OP_LAB:  begin ctrl.vpalus = ALU_PASS_B; ctrl.ld_a = 1'b1; end
          OP_LBA:  begin ctrl.vpalus = ALU_PASS_A; ctrl.ld_b = 1'b1; end
          OP_INM:  begin ctrl.vpalus = ALU_PASS_D; ctrl.ms = 1'b1; ctrl.ld_a = 1'b1; end
          OP_OUTM: ctrl.ld_mv = 1'b1;
          OP_CNB:  begin ctrl.vpalus = ALU_CNOT;   ctrl.ld_b = 1'b1; end
          OP_SWB:  begin ctrl.vpalus = ALU_SWAP;   ctrl.ld_b = 1'b1; end
          OP_FGO:  begin ctrl.vpalus = ALU_FRED;   ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          OP_DOR:  begin ctrl.vpalus = ALU_DOR;    ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          OP_DAND: begin ctrl.vpalus = ALU_DAND;   ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          OP_TNOT: begin ctrl.vpalus = ALU_TNOT;   ctrl.ld_a = 1'b1; end
          OP_TOR:  begin ctrl.vpalus = ALU_TOR;    ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          OP_TAND: begin ctrl.vpalus = ALU_TAND;   ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          OP_SNOT: begin ctrl.vpalus = ALU_SNOT;   ctrl.ld_a = 1'b1; end
          OP_SOR:  begin ctrl.vpalus = ALU_SOR;    ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          OP_SAND: begin ctrl.vpalus = ALU_SAND;   ctrl.ld_a = 1'b1; ctrl.ld_b = 1'b1; end
          default: ;  // NOP and undecoded opcodes
        endcase
      end
      S_OPRD: begin
        ctrl.rd = 1'b1;
        state_n = S_OPLD;
      end
      S_OPLD: begin
        state_n = S_NEXT;
        unique case (op)
          OP_LDB:  begin ctrl.vpalus = ALU_PASS_D; ctrl.ld_b = 1'b1; end
          OP_CPAH: begin ctrl.vpalus = ALU_CMPH;   ctrl.fld  = 1'b1; end
          default: begin ctrl.vpalus = ALU_PASS_D; ctrl.ld_a = 1'b1; end  // LDA, LDAC
        endcase
      end
      S_NEXT: begin
        if (!slot) begin
          opcode_n = ir[7:0];
          slot_n   = 1'b1;
          state_n  = S_EX1;
        end else begin
          ctrl.pc_inc = 1'b1;
          state_n     = S_FETCH;
        end
      end
      S_HALT: state_n = S_HALT;
      default: state_n = S_IDLE;
    endcase
  end

  // A PRAM access is either a read or a write.
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (rst) !(ctrl.rd && ctrl.wr))
    else $error("vplc: RD and WR together");
endmodule
