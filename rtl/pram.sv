// pram: predicate RAM, WORDS x 16 bits (256 x 16 by default).
//
// Built from WORDS 8-bit PRAM cells (pram8) plus an address decoder and a read
// multiplexer. The decoder enables exactly the addressed word while RD or WR
// is high; WR also raises the words' write enable, so the word stores din on
// that rising clock edge. An enabled word drives its contents in the next
// cycle and all other words drive 0, so the multiplexer is an OR over the
// words. Read data therefore appears on dout in the cycle after RD; a hold
// register keeps it there until the next read, and after a write dout keeps
// the last read value. rst clears the whole memory asynchronously.
module pram #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] address,
  input  logic [15:0]   din,
  output logic [15:0]   dout
);
  logic [15:0] word_out [WORDS];
  logic [15:0] bus, hold;
  logic        rd_q;

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    logic en;
    always_comb en = (rd | wr) && (address == AW'(w));
    pram8 #(.BITS(8)) u_word (
      .clk8pmc(clk), .rst8pmc(rst), .en8pmc(en), .we(wr),
      .p18(din[15:8]), .q18(din[7:0]),
      .p28(word_out[w][15:8]), .q28(word_out[w][7:0])
    );
  end

  always_comb begin
    bus = '0;
    for (int w = 0; w < WORDS; w++) bus |= word_out[w];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rd_q <= 1'b0;
      hold <= '0;
    end else begin
      rd_q <= rd;
      if (rd_q) hold <= bus;
    end
  end

  always_comb dout = rd_q ? bus : hold;

  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (rst) !(rd && wr))
    else $error("pram: RD and WR together");
endmodule
