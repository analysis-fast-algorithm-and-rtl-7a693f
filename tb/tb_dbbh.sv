// tb_dbbh: self-checking testbench for dbbh.
//
// Keeps a reference picture of 3x2 macroblocks. Macroblocks are processed
// in raster order: the upper neighbours are loaded from the picture over
// the bus port, mb_start is given with availability derived from the
// position, and the 16 blocks are visited in coding order. For each block
// the neighbours A..M and the availability flags are compared with values
// taken straight from the picture (above-right replaced by D where the
// standard deems it unavailable); then random reconstructed pixels are
// written column by column into both the picture and the unit. The
// macroblock-level outputs (row above, left column, corner) are checked
// too.
module tb_dbbh;
  import intra_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        ld_en = 0;
  logic [2:0]  ld_word = 0;
  logic [31:0] ld_data = 0;
  logic        mb_start = 0, mb_left_avail = 0, mb_top_avail = 0, mb_topright_avail = 0;
  logic [1:0]  blk_x = 0, blk_y = 0;
  nb4_t        nb;
  logic        top_avail, left_avail;
  logic        wr_en = 0;
  logic [1:0]  wr_bx = 0, wr_by = 0, wr_col = 0;
  pix_row_t    wr_pix = '0;
  pix_t        mb_top [16], mb_left [16], mb_corner;
  logic        mb_top_ok, mb_left_ok;

  int checks = 0, failures = 0;

  dbbh dut (.*);

  always #5 clk = ~clk;

  localparam int MBW = 3, MBH = 2;
  int pic [16*MBH][16*MBW];
  bit done_blk [4][4];

  function automatic int px(int x, int y);
    if (x < 0 || y < 0 || x >= 16*MBW || y >= 16*MBH) return -1;
    return pic[y][x];
  endfunction

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int x0, y0, bx, by, gx, gy, v;
    bit ta, la, tra;
    for (int y = 0; y < 16*MBH; y++)
      for (int x = 0; x < 16*MBW; x++) pic[y][x] = $urandom_range(0, 255);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++)
    for (int my = 0; my < MBH; my++) begin
      for (int mx = 0; mx < MBW; mx++) begin
        x0 = 16*mx; y0 = 16*my;
        // load the upper neighbours
        for (int w = 0; w < 6; w++) begin
          ld_en = 1;
          ld_word = 3'(w);
          ld_data = '0;
          if (w < 5) begin
            for (int b = 0; b < 4; b++) begin
              v = px(x0 + 4*w + b, y0 - 1);
              ld_data[8*b +: 8] = (v < 0) ? 8'd0 : 8'(v);
            end
          end else begin
            v = px(x0 - 1, y0 - 1);
            ld_data[7:0] = (v < 0) ? 8'd0 : 8'(v);
          end
          @(negedge clk);
        end
        ld_en = 0;
        mb_left_avail     = (mx > 0);
        mb_top_avail      = (my > 0);
        mb_topright_avail = (my > 0) && (mx < MBW - 1);
        mb_start = 1;
        @(negedge clk);
        mb_start = 0;
        for (int i = 0; i < 16; i++) begin
          if (my > 0) chk(int'(mb_top[i]), px(x0 + i, y0 - 1), "mb_top");
          if (mx > 0) chk(int'(mb_left[i]), px(x0 - 1, y0 + i), "mb_left");
        end
        if (mx > 0 && my > 0) chk(int'(mb_corner), px(x0 - 1, y0 - 1), "mb_corner");
        chk(int'(mb_top_ok), int'(my > 0), "mb_top_ok");
        chk(int'(mb_left_ok), int'(mx > 0), "mb_left_ok");
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) done_blk[a][b] = 0;
        for (int k = 0; k < 16; k++) begin
          bx = ((k >> 2) & 1) * 2 + (k & 1);
          by = ((k >> 3) & 1) * 2 + ((k >> 1) & 1);
          blk_x = 2'(bx); blk_y = 2'(by);
          #1;
          gx = x0 + 4*bx; gy = y0 + 4*by;
          ta = (by > 0) || (my > 0);
          la = (bx > 0) || (mx > 0);
          chk(int'(top_avail), int'(ta), "top_avail");
          chk(int'(left_avail), int'(la), "left_avail");
          if (ta) for (int i = 0; i < 4; i++) chk(int'(nb.top[i]), px(gx + i, gy - 1), "top");
          if (la) for (int i = 0; i < 4; i++) chk(int'(nb.left[i]), px(gx - 1, gy + i), "left");
          if (ta && la) chk(int'(nb.corner), px(gx - 1, gy - 1), "corner");
          // above-right availability
          if (by == 0) tra = (bx < 3) ? (my > 0) : ((my > 0) && (mx < MBW - 1));
          else         tra = (bx < 3) && done_blk[bx+1][by-1];
          if (ta)
            for (int i = 4; i < 8; i++)
              chk(int'(nb.top[i]), tra ? px(gx + i, gy - 1) : px(gx + 3, gy - 1), "topright");
          // write a new reconstructed block
          @(negedge clk);
          for (int c = 0; c < 4; c++) begin
            wr_en = 1; wr_bx = 2'(bx); wr_by = 2'(by); wr_col = 2'(c);
            for (int r = 0; r < 4; r++) begin
              v = $urandom_range(0, 255);
              pic[gy + r][gx + c] = v;
              wr_pix[r] = 8'(v);
            end
            @(negedge clk);
          end
          wr_en = 0;
          done_blk[bx][by] = 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
