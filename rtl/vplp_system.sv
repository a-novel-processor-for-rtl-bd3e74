// vplp_system: the VPLP test system, processor plus program memory.
//
// The processor (vplp), the 256 x 16 predicate RAM (pram), the PRAM
// controller and the 26-bit bus multiplexer. The multiplexer is switched by
// the processor's synchronised reset Qrst: while vplp_rst holds the processor
// in reset, the PRAM controller (reset by the active-low pram_rst) writes the
// program into PRAM; when vplp_rst falls the processor takes the bus and runs
// from address 00h. The processor receives PRAM read data directly. PRAM
// contents are cleared while pram_rst is low. Usage: hold vplp_rst high and
// pulse pram_rst low, wait for loaded, then drop vplp_rst.
// PROGRAM and PROG_WORDS choose the program (default: the first test
// program). All of this follows the document's test set-up except the
// program ROM, which is this design's choice.
// Qrst is used both as an asynchronous reset and as the multiplexer select,
// and the PRAM reset also disables an assertion; lint tools report this
// mixed use, which is intended.
module vplp_system #(
  parameter int unsigned PROG_WORDS = 7,
  parameter logic [15:0] PROGRAM [PROG_WORDS] = '{
    16'h171D, 16'h55AF, 16'h1B20, 16'h171D, 16'hAACD, 16'h1B20, 16'h0807
  }
) (
  input  logic        vplp_clk,
  input  logic        vplp_rst,
  input  logic        pram_rst,
  input  logic [15:0] mvd_in,
  output logic [15:0] mvd_out,
  output logic [7:0]  address,
  output logic [15:0] dati,
  output logic [15:0] dato,
  output logic        rd,
  output logic        wr,
  output logic        halted,
  output logic        loaded,
  output logic [7:0]  opcode,
  output logic [7:0]  pc,
  output logic [7:0]  ic,
  output logic [15:0] acc_a,
  output logic [15:0] reg_b,
  output logic [2:0]  flags
);
  logic        qrst;
  logic [7:0]  cpu_addr, ctl_addr;
  logic [15:0] cpu_dato, ctl_dato;
  logic        cpu_rd, cpu_wr, ctl_rd, ctl_wr;
  logic [25:0] bus;

  vplp u_vplp (
    .vplp_clk(vplp_clk), .vplp_rst(vplp_rst), .mvd_in(mvd_in),
    .mvd_out(mvd_out), .dati(dati), .dato(cpu_dato), .rd(cpu_rd),
    .wr(cpu_wr), .address(cpu_addr), .qrst(qrst), .halted(halted),
    .opcode(opcode), .pc(pc), .ic(ic), .acc_a(acc_a), .reg_b(reg_b),
    .flags(flags)
  );

  pram_controller #(.PROG_WORDS(PROG_WORDS), .PROGRAM(PROGRAM)) u_ctl (
    .clk(vplp_clk), .rst_n(pram_rst), .address(ctl_addr), .dato(ctl_dato),
    .rd(ctl_rd), .wr(ctl_wr), .done(loaded)
  );

  bus_mux #(.WIDTH(26)) u_mux (
    .c1(qrst),
    .s1({cpu_addr, cpu_dato, cpu_rd, cpu_wr}),
    .s2({ctl_addr, ctl_dato, ctl_rd, ctl_wr}),
    .y(bus)
  );

  always_comb {address, dato, rd, wr} = bus;

  pram #(.WORDS(256), .AW(8)) u_pram (
    .clk(vplp_clk), .rst(!pram_rst), .rd(rd), .wr(wr), .address(address),
    .din(dato), .dout(dati)
  );
endmodule
