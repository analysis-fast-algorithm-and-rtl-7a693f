// coef_buffer: quantized-coefficient buffer between the encoding loop and
// the CAVLC stage, four dual-port banks of 96 words x 16 bits.
//
// The write port takes one column of a 4x4 block per cycle: the four
// levels go to banks 0..3 (bank = row of the coefficient) at the same word
// address, with a per-bank enable. The read port returns one coefficient
// per cycle from (bank, word) with one cycle of latency, which is what the
// CAVLC scanner needs. With the layout word = 4*block + column, one
// macroblock's 24 4x4 blocks (16 luma, 8 chroma: 384 levels) fit. The
// bank count and size follow the document; the layout and the port
// protocol are this design's choices.
module coef_buffer
  import intra_pkg::*;
#(
  parameter int WORDS = 96,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  // write port (encoding loop)
  input  logic [3:0]    wr_en,
  input  logic [AW-1:0] wr_addr,
  input  coef_t         wr_data [4],
  // read port (CAVLC)
  input  logic          rd_en,
  input  logic [1:0]    rd_bank,
  input  logic [AW-1:0] rd_addr,
  output coef_t         rd_data
);

  coef_t bank_q [4][WORDS];
  coef_t rd_word [4];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (wr_en[b]) bank_q[b][wr_addr] <= wr_data[b];
      if (rd_en)    rd_word[b] <= bank_q[b][rd_addr];
    end
  end

  logic [1:0] bank_sel_q;
  always_ff @(posedge clk) if (rd_en) bank_sel_q <= rd_bank;

  assign rd_data = rd_word[bank_sel_q];

endmodule
