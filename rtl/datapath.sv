// datapath: the VPLP datapath.
//
// Storage: register B (load/increment/decrement), accumulator A, the
// multi-valued register and the 3-bit FLAGS register, all clocked by vplp_clk
// and cleared by Qrst. Combinational: the data multiplexer (PRAM data or
// MVD_in, select MS) and the VPALU, whose A and B results feed accumulator A
// and register B. The multi-valued register loads straight from accumulator
// A (OUTM). Every register updates on the rising clock edge at the end of the
// cycle in which its load line is high; results are visible one cycle later.
// The structure is the document's; widths of the control lines other than the
// 5-bit VPALU select are this design's.
module datapath
  import vplp_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,        // vplp_clk
  input  logic             rst,        // Qrst
  input  logic             ms,         // MS
  input  logic [WIDTH-1:0] dati_dp,
  input  logic [WIDTH-1:0] mvi_dp,
  input  alu_op_e          vpalus_dp,
  input  logic             ld1_dp,     // load A
  input  logic             ldb,        // load B
  input  logic             inc_dp,     // B + 1
  input  logic             dec_dp,     // B - 1
  input  logic             ld2_dp,     // load multi-valued register
  input  logic             fld_dp,     // load FLAGS
  output logic [WIDTH-1:0] dato_dp,    // accumulator A
  output logic [WIDTH-1:0] mvo_dp,
  output logic [2:0]       fl_dp,
  output logic [WIDTH-1:0] regb_out
);
  logic [WIDTH-1:0] dmux, res_a, res_b;
  logic [2:0]       alu_flags;

  data_mux #(.WIDTH(WIDTH)) u_dmux (
    .ms(ms), .dati_dp(dati_dp), .mvi_dp(mvi_dp), .y(dmux)
  );

  vpalu #(.WIDTH(WIDTH)) u_vpalu (
    .op(vpalus_dp), .a(dato_dp), .b(regb_out), .d(dmux),
    .res_a(res_a), .res_b(res_b), .flags(alu_flags)
  );

  accumulator_a #(.WIDTH(WIDTH)) u_acca (
    .clk(clk), .rst(rst), .ld(ld1_dp), .d(res_a), .q(dato_dp)
  );

  register_b #(.WIDTH(WIDTH)) u_regb (
    .clk(clk), .rst(rst), .ldb(ldb), .inc(inc_dp), .dec(dec_dp),
    .d(res_b), .q(regb_out)
  );

  mv_register #(.WIDTH(WIDTH)) u_mvreg (
    .clk(clk), .rst(rst), .ld(ld2_dp), .d(dato_dp), .q(mvo_dp)
  );

  flag_register #(.WIDTH(3)) u_flags (
    .clk(clk), .rst(rst), .ld(fld_dp), .d(alu_flags), .q(fl_dp)
  );
endmodule
