// pram_controller: loads a program into PRAM before the processor runs.
//
// After its active-low reset rst_n is released, the controller writes
// PROGRAM[0], PROGRAM[1], ... to PRAM addresses 0, 1, ... one word per clock
// cycle (WR high, RD low), then raises done and stays idle. It drives the
// same 26-bit bus as the processor (8-bit address, 16-bit data, RD, WR); the
// bus multiplexer gives it the PRAM while the processor is held in reset.
// The program is a parameter ROM; its default is the processor's first test
// program: LDB #55AF, LAB, CNB, FGO, LDB #AACD, LAB, CNB, FGO, NOP, HLT.
// Having an active-low reset follows the document; holding the program in a
// parameter is this design's choice.
module pram_controller #(
  parameter int unsigned PROG_WORDS = 7,
  parameter logic [15:0] PROGRAM [PROG_WORDS] = '{
    16'h171D,  // LDB, LAB
    16'h55AF,  //   operand of LDB
    16'h1B20,  // CNB, FGO
    16'h171D,  // LDB, LAB
    16'hAACD,  //   operand of LDB
    16'h1B20,  // CNB, FGO
    16'h0807   // NOP, HLT
  }
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [7:0]  address,
  output logic [15:0] dato,
  output logic        rd,
  output logic        wr,
  output logic        done
);
  localparam int unsigned CW = $clog2(PROG_WORDS + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (!done) cnt <= cnt + 1'b1;
  end

  always_comb begin
    done    = (cnt == CW'(PROG_WORDS));
    wr      = rst_n && !done;
    rd      = 1'b0;
    address = done ? 8'h00 : 8'(cnt);
    dato    = done ? 16'h0000 : PROGRAM[cnt];
  end
endmodule
