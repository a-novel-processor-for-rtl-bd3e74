// control_unit: the VPLP control unit.
//
// Instruction register, variable predicate logic controller (VPLCI, see
// vplc), index counter, program counter, branch adder and address
// multiplexer, and the additional register that keeps a copy of the program
// counter (pc_save_register). The controller's control word drives the
// datapath lines (VPALU select, MS, LD, LDMV, LDB, Binc, Bdec, FLd), the PRAM
// lines (RD, WR) and the internal units. The address bus shows the program counter, or the
// index counter during LDAC, STAC and CPAH accesses. A branch loads the
// program counter with PC + offset through its first load input; the second
// load input takes the saved copy. The controller never raises the save and
// second-load lines, because no instruction described for the processor
// saves or restores the program counter. PRAM read data passes through to the
// datapath as dato_cu. All registers clear on Qrst (rst).
module control_unit
  import vplp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] dati,
  input  logic [2:0]  fls_cu,
  output alu_op_e     vpalus_cu,
  output logic        rd,
  output logic        wr,
  output logic        ms_cu,
  output logic        ld_cu,
  output logic        ldmv_cu,
  output logic        ldb_cu,
  output logic        binc_cu,
  output logic        bdec_cu,
  output logic        fld_cu,
  output logic [15:0] dato_cu,
  output logic [7:0]  address,
  output logic [7:0]  opcode,
  output logic [7:0]  pcout,
  output logic [7:0]  icout,
  output logic        halted
);
  ctrl_t       ctrl;
  logic [15:0] ir;
  logic [7:0]  target, pc_saved;

  instruction_register #(.WIDTH(16)) u_ir (
    .clk(clk), .rst(rst), .ld(ctrl.ir_ld), .d(dati), .q(ir)
  );

  vplc u_vplc (
    .clk(clk), .rst(rst), .ir(ir), .flags(fls_cu),
    .ctrl(ctrl), .opcode(opcode), .halted(halted)
  );

  index_counter #(.WIDTH(8)) u_ic (
    .clk(clk), .rst(rst), .ld(ctrl.ic_ld), .inc(ctrl.ic_inc), .dec(ctrl.ic_dec),
    .d(ir[7:0]), .q(icout)
  );

  branch_adder #(.WIDTH(8)) u_add (
    .pc(pcout), .offset(ir[7:0]), .sum(target)
  );

  program_counter #(.WIDTH(8)) u_pc (
    .clk(clk), .pcclr(rst), .enb(1'b1), .pcinc(ctrl.pc_inc),
    .pcld1(ctrl.pc_ld1), .pcld2(ctrl.pc_ld2), .pcin1(target), .pcin2(pc_saved),
    .pcout(pcout)
  );

  pc_save_register #(.WIDTH(8)) u_save (
    .clk(clk), .rst(rst), .save(ctrl.pc_save), .pc(pcout), .saved(pc_saved)
  );

  address_mux #(.WIDTH(8)) u_amux (
    .sel_ic(ctrl.addr_ic), .pc(pcout), .ic(icout), .address(address)
  );

  always_comb begin
    vpalus_cu = ctrl.vpalus;
    rd        = ctrl.rd;
    wr        = ctrl.wr;
    ms_cu     = ctrl.ms;
    ld_cu     = ctrl.ld_a;
    ldmv_cu   = ctrl.ld_mv;
    ldb_cu    = ctrl.ld_b;
    binc_cu   = ctrl.binc;
    bdec_cu   = ctrl.bdec;
    fld_cu    = ctrl.fld;
    dato_cu   = dati;
  end
endmodule
