// vplp: the variable predicate logic processor.
//
// An 8-bit-per-operand accumulator machine whose VPALU changes logic style per
// instruction: Boolean-style arithmetic, pseudo-quantum (CNOT, SWAP),
// reversible (Fredkin), dual-rail with no spacer, a single spacer or dual
// spacers, and multi-valued input/output. It consists of the reset circuit,
// the datapath and the control unit. vplp_rst (active high) is synchronised
// into Qrst, which clears every register; the processor starts fetching at
// address 00h on the third clock edge after vplp_rst falls.
// PRAM interface: address, RD, WR and dato (accumulator A) are issued in the
// same cycle; read data on dati must be valid in the cycle after RD and is
// used in that cycle. A write takes place on the rising edge that ends the
// WR cycle. opcode, pc, ic, acc_a, reg_b and flags expose internal state for
// observation.
module vplp
  import vplp_pkg::*;
(
  input  logic        vplp_clk,
  input  logic        vplp_rst,
  input  logic [15:0] mvd_in,
  output logic [15:0] mvd_out,
  input  logic [15:0] dati,
  output logic [15:0] dato,
  output logic        rd,
  output logic        wr,
  output logic [7:0]  address,
  output logic        qrst,
  output logic        halted,
  output logic [7:0]  opcode,
  output logic [7:0]  pc,
  output logic [7:0]  ic,
  output logic [15:0] acc_a,
  output logic [15:0] reg_b,
  output logic [2:0]  flags
);
  alu_op_e     vpalus;
  logic        ms, ld_a, ld_mv, ld_b, binc, bdec, fld;
  logic [15:0] dati_dp;

  reset_circuit u_rst (
    .vplp_clk(vplp_clk), .vplp_rst(vplp_rst), .qrst(qrst)
  );

  control_unit u_cu (
    .clk(vplp_clk), .rst(qrst), .dati(dati), .fls_cu(flags),
    .vpalus_cu(vpalus), .rd(rd), .wr(wr), .ms_cu(ms), .ld_cu(ld_a),
    .ldmv_cu(ld_mv), .ldb_cu(ld_b), .binc_cu(binc), .bdec_cu(bdec),
    .fld_cu(fld), .dato_cu(dati_dp), .address(address), .opcode(opcode),
    .pcout(pc), .icout(ic), .halted(halted)
  );

  datapath #(.WIDTH(16)) u_dp (
    .clk(vplp_clk), .rst(qrst), .ms(ms), .dati_dp(dati_dp), .mvi_dp(mvd_in),
    .vpalus_dp(vpalus), .ld1_dp(ld_a), .ldb(ld_b), .inc_dp(binc),
    .dec_dp(bdec), .ld2_dp(ld_mv), .fld_dp(fld), .dato_dp(acc_a),
    .mvo_dp(mvd_out), .fl_dp(flags), .regb_out(reg_b)
  );

  always_comb dato = acc_a;
endmodule
