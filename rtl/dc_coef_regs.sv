// dc_coef_regs: register file for the dc coefficients of the four I16MB
// candidate modes.
//
// When I16MB prediction is interleaved with I4MB prediction 4x4 block by
// 4x4 block, the dc term of each I16MB candidate's forward transform must
// be kept until all 16 blocks are done, because the I16MB cost needs the
// 4x4 Hadamard transform of the 16 dc values. This unit stores 4 modes x
// 16 blocks of 16-bit coefficients. Writes take one value at (mode, block)
// with block = 4*row + column of the 4x4 block in the macroblock. The read
// side returns a whole row of one mode's 4x4 dc matrix combinationally,
// ready for a four-parallel transform. clear zeroes all entries. The
// register count follows the document; the ports are this design's choice.
module dc_coef_regs
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       wr_en,
  input  logic [1:0] wr_mode,   // I16MB mode 0..3 (V, H, DC, plane)
  input  logic [3:0] wr_blk,
  input  coef_t      wr_data,
  input  logic [1:0] rd_mode,
  input  logic [1:0] rd_row,
  output coef_t      rd_data [4]
);

  coef_t dc_q [4][16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 4; m++)
        for (int b = 0; b < 16; b++) dc_q[m][b] <= '0;
    end else if (clear) begin
      for (int m = 0; m < 4; m++)
        for (int b = 0; b < 16; b++) dc_q[m][b] <= '0;
    end else if (wr_en) begin
      dc_q[wr_mode][wr_blk] <= wr_data;
    end
  end

  always_comb
    for (int c = 0; c < 4; c++) rd_data[c] = dc_q[rd_mode][{rd_row, 2'(c)}];

endmodule
