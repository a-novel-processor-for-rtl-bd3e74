// vplp_pkg: shared types and constants of the variable predicate logic
// processor (VPLP).
//
// Instruction words are 16 bits wide and hold two 8-bit instructions, the
// high byte executed first. LDB and LDA take a 16-bit operand from the next
// word; LDC and BIG take an 8-bit operand from the low byte of their own word.
// The opcodes of HLT, NOP, LDC, INC, LDAC, STAC, CPAH, BIG, DEC, DECB, LDB,
// CNB, SWB, LAB and FGO are the ones seen in the processor's recorded test
// runs; the remaining opcodes and every VPALU operation code are this
// design's own assignment.
package vplp_pkg;


  typedef enum logic [7:0] {
    OP_HLT  = 8'h07,  // stop
    OP_NOP  = 8'h08,  // no operation
    OP_LDC  = 8'h09,  // IC <= low byte of the word
    OP_INC  = 8'h0A,  // IC <= IC + 1
    OP_LDAC = 8'h0B,  // A <= PRAM[IC]
    OP_STAC = 8'h0C,  // PRAM[IC] <= A
    OP_LDA  = 8'h0D,  // A <= next word
    OP_CPAH = 8'h0E,  // FLAGS <= compare A[15:8] with PRAM[IC][15:8]
    OP_BIG  = 8'h12,  // if GREATER: PC <= PC + low byte
    OP_DEC  = 8'h14,  // IC <= IC - 1
    OP_INCB = 8'h15,  // B <= B + 1
    OP_DECB = 8'h16,  // B <= B - 1
    OP_LDB  = 8'h17,  // B <= next word
    OP_INCA = 8'h18,  // A <= A + 1
    OP_DECA = 8'h19,  // A <= A - 1
    OP_CNB  = 8'h1B,  // B.lo <= B.lo ^ B.hi   (CNOT)
    OP_SWB  = 8'h1C,  // B <= {B.lo, B.hi}     (SWAP)
    OP_LAB  = 8'h1D,  // A <= B
    OP_LBA  = 8'h1E,  // B <= A
    OP_FGO  = 8'h20,  // Fredkin: control A.hi, targets B.hi / B.lo
    OP_INM  = 8'h21,  // A <= MVD_in
    OP_OUTM = 8'h22,  // MV register <= A
    OP_DOR  = 8'h23,  // dual-rail OR,  A and B <= A op B
    OP_DAND = 8'h24,  // dual-rail AND
    OP_TNOT = 8'h25,  // dual-rail NOT, single spacer, A only
    OP_TOR  = 8'h26,  // dual-rail OR,  single spacer
    OP_TAND = 8'h27,  // dual-rail AND, single spacer
    OP_SNOT = 8'h28,  // dual-rail NOT, dual spacer, A only
    OP_SOR  = 8'h29,  // dual-rail OR,  dual spacer
    OP_SAND = 8'h2A   // dual-rail AND, dual spacer
  } opcode_e;

  // VPALU operation select (VPALUs, 5 bits).
  typedef enum logic [4:0] {
    ALU_PASS_D = 5'd0,   // result = data multiplexer (PRAM or MVD_in)
    ALU_PASS_A = 5'd1,   // result = A
    ALU_PASS_B = 5'd2,   // result = B
    ALU_INC_A  = 5'd3,
    ALU_DEC_A  = 5'd4,
    ALU_CNOT   = 5'd5,
    ALU_SWAP   = 5'd6,
    ALU_FRED   = 5'd7,
    ALU_DOR    = 5'd8,
    ALU_DAND   = 5'd9,
    ALU_TNOT   = 5'd10,
    ALU_TOR    = 5'd11,
    ALU_TAND   = 5'd12,
    ALU_SNOT   = 5'd13,
    ALU_SOR    = 5'd14,
    ALU_SAND   = 5'd15,
    ALU_CMPH   = 5'd16   // flags only
  } alu_op_e;

  // FLAGS bit positions.
  localparam int unsigned FL_EQ = 0;
  localparam int unsigned FL_GT = 1;
  localparam int unsigned FL_LT = 2;

  // Control lines issued by the variable predicate logic controller.
  typedef struct packed {
    alu_op_e    vpalus;   // VPALU operation
    logic       rd;       // PRAM read
    logic       wr;       // PRAM write
    logic       ms;       // data multiplexer: 1 = MVD_in
    logic       ld_a;     // LD_cu   -> LD1_dp
    logic       ld_mv;    // LDMV_cu -> LD2_dp
    logic       ld_b;     // LDB_cu
    logic       binc;     // Binc_cu
    logic       bdec;     // Bdec_cu
    logic       fld;      // FLd_cu
    logic       ir_ld;    // instruction register load
    logic       ic_ld;    // index counter load
    logic       ic_inc;
    logic       ic_dec;
    logic       pc_inc;
    logic       pc_ld1;   // PC <= branch adder
    logic       addr_ic;  // address multiplexer: 1 = index counter
    logic       pc_save;  // save PC in the additional register (unused)
    logic       pc_ld2;   // PC <= saved value (unused)
  } ctrl_t;

endpackage
