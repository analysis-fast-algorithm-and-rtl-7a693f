// dbbh: decoded block boundary handle. Registers that keep the
// reconstructed pixels around the current macroblock and hand each 4x4
// luma block its 13 neighbours (A..H above and above-right, I..L left, M
// above-left) together with availability.
//
// Contents:
//   up    21 pixels loaded over the 32-bit bus before a macroblock starts:
//         word 0..3 = the 16 pixels above, word 4 = the 4 above-right,
//         word 5 byte 0 = the above-left corner.
//   hrow  per pixel column, the bottom row of the latest reconstructed
//         block in that column (reloaded from "up" at mb_start).
//   vcol  per pixel row, the right column of the latest reconstructed
//         block in that row. At the end of a macroblock it holds the
//         macroblock's right column, which is the next macroblock's left
//         neighbour, so no bus transfer is needed for it.
//   lcol  copy of vcol taken at mb_start (the left macroblock's column).
//   br    bottom-right pixel of each reconstructed 4x4 block (corners M).
// A block at (blk_x, blk_y) takes its neighbours from these; blocks are
// assumed to be coded in the standard's order (8x8 quadrants, then 4x4
// blocks inside each, both raster), in which the left and upper blocks
// are always done before. Above-right pixels E..H are used only when that
// block is already coded (or lies in the available upper macroblock row);
// otherwise D is repeated into E..H, as the standard prescribes.
// Writes come one reconstructed column per cycle (wr_pix[i] = row i of
// column wr_col). Neighbour outputs are combinational.
//
// The function (register buffering of A..M and update before each 4x4
// block, left macroblock kept in registers, 17 upper pixels loaded per
// macroblock) follows the document; the register organisation and
// interface are this design's.
module dbbh
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // bus load of the upper neighbours
  input  logic        ld_en,
  input  logic [2:0]  ld_word,
  input  logic [31:0] ld_data,
  // macroblock start
  input  logic        mb_start,
  input  logic        mb_left_avail,
  input  logic        mb_top_avail,
  input  logic        mb_topright_avail,
  // current block
  input  logic [1:0]  blk_x,
  input  logic [1:0]  blk_y,
  output nb4_t        nb,
  output logic        top_avail,
  output logic        left_avail,
  // reconstructed column write
  input  logic        wr_en,
  input  logic [1:0]  wr_bx,
  input  logic [1:0]  wr_by,
  input  logic [1:0]  wr_col,
  input  pix_row_t    wr_pix,
  // macroblock-level neighbours (I16MB prediction)
  output pix_t        mb_top  [16],
  output pix_t        mb_left [16],
  output pix_t        mb_corner,
  output logic        mb_top_ok,
  output logic        mb_left_ok
);

  pix_t up_q   [21];
  pix_t hrow_q [16];
  pix_t vcol_q [16];
  pix_t lcol_q [16];
  pix_t br_q   [16];
  logic left_ok_q, top_ok_q, tr_ok_q;

  // coding order index of a block
  function automatic logic [3:0] zidx(logic [1:0] x, logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 21; i++) up_q[i] <= '0;
      for (int i = 0; i < 16; i++) begin
        hrow_q[i] <= '0;
        vcol_q[i] <= '0;
        lcol_q[i] <= '0;
        br_q[i]   <= '0;
      end
      left_ok_q <= 1'b0;
      top_ok_q  <= 1'b0;
      tr_ok_q   <= 1'b0;
    end else begin
      if (ld_en) begin
        if (ld_word == 3'd5) up_q[0] <= ld_data[7:0];
        else if (ld_word <= 3'd4)
          for (int b = 0; b < 4; b++) up_q[1 + 4*int'(ld_word) + b] <= ld_data[8*b +: 8];
      end
      if (mb_start) begin
        for (int i = 0; i < 16; i++) begin
          hrow_q[i] <= up_q[1 + i];
          lcol_q[i] <= vcol_q[i];
        end
        left_ok_q <= mb_left_avail;
        top_ok_q  <= mb_top_avail;
        tr_ok_q   <= mb_topright_avail;
      end else if (wr_en) begin
        hrow_q[{wr_bx, wr_col}] <= wr_pix[3];
        if (wr_col == 2'd3) begin
          for (int i = 0; i < 4; i++) vcol_q[{wr_by, 2'(i)}] <= wr_pix[i];
          br_q[{wr_by, wr_bx}] <= wr_pix[3];
        end
      end
    end
  end

  always_comb begin
    logic tr_ok;
    top_avail  = (blk_y != 2'd0) || top_ok_q;
    left_avail = (blk_x != 2'd0) || left_ok_q;
    if (blk_y == 2'd0)
      tr_ok = (blk_x != 2'd3) ? top_ok_q : tr_ok_q;
    else
      tr_ok = (blk_x != 2'd3) && (zidx(blk_x + 2'd1, blk_y - 2'd1) < zidx(blk_x, blk_y));
    for (int i = 0; i < 4; i++) begin
      if (blk_y == 2'd0) nb.top[i] = up_q[1 + 4*int'(blk_x) + i];
      else               nb.top[i] = hrow_q[{blk_x, 2'(i)}];
      if (blk_x == 2'd0) nb.left[i] = lcol_q[{blk_y, 2'(i)}];
      else               nb.left[i] = vcol_q[{blk_y, 2'(i)}];
    end
    for (int i = 4; i < 8; i++) begin
      if (!tr_ok)              nb.top[i] = nb.top[3];
      else if (blk_y == 2'd0)  nb.top[i] = up_q[1 + 4*int'(blk_x) + i];
      else                     nb.top[i] = hrow_q[{blk_x + 2'd1, 2'(i - 4)}];
    end
    if (blk_y == 2'd0)      nb.corner = up_q[5'({blk_x, 2'b00})];
    else if (blk_x == 2'd0) nb.corner = lcol_q[{blk_y - 2'd1, 2'd3}];
    else                    nb.corner = br_q[{blk_y - 2'd1, blk_x - 2'd1}];
  end

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      mb_top[i]  = up_q[1 + i];
      mb_left[i] = lcol_q[i];
    end
  end
  assign mb_corner  = up_q[0];
  assign mb_top_ok  = top_ok_q;
  assign mb_left_ok = left_ok_q;

endmodule
