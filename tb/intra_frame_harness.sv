// intra_frame_harness: frame-level driver and checker for intra_coder_top,
// shared by the end-to-end testbenches (small frame and full SDTV frame).
//
// It builds a synthetic luma frame of MBW x MBH macroblocks (per-macroblock
// mixtures of flat areas, gradients, stripes at several angles, diagonal
// edges and noise), and for every macroblock in raster order: loads the
// pixels, the reconstructed row above (with the above-right pixels and
// corner) and the modes of the upper blocks over the load port, starts the
// macroblock with its neighbour availability, and after mb_done reads back
// the reconstruction, the chosen modes and the plane predictors. At the end
// it flushes the bitstream and decodes it with an independent reference
// decoder written from the H.264/AVC decoding equations: header (mode
// flags/remaining modes with most-probable-mode derivation), CAVLC levels
// and runs, scaling, inverse transform and the nine 4x4 intra predictions.
// Checks:
//   * decoded modes and pixels equal the hardware's modes and
//     reconstruction, bit for bit;
//   * every chosen mode uses only available neighbours;
//   * plane predictors equal the standard's plane formula (macroblocks
//     with both neighbours);
//   * the reconstruction stays close to the source (mean absolute error);
//   * macroblock timing below the limit passed as MAX_MB_CYCLES.
// Mechanisms counted, each of which must occur at least once: every one
// of the nine I4MB modes chosen, mode coded as most probable and as
// remaining mode, I16MB reported better and worse than I4MB, encoding of
// one macroblock overlapping the bitstream coding of the previous one,
// an empty 4x4 block, a 4x4 block with 16 coefficients, a packer word
// output and the final partial-word flush.
// It ends the simulation with the TB_RESULT line.
module intra_frame_harness
  import intra_pkg::*;
#(
  parameter int MBW = 4,
  parameter int MBH = 3,
  parameter int QP = 28,
  parameter int LAMBDA = 16,
  parameter int MAX_MB_CYCLES = 1300
) (
  input  logic        clk,
  output logic        rst_n,
  output logic [5:0]  qp,
  output logic [7:0]  lambda,
  output logic        ld_en,
  output logic [1:0]  ld_sel,
  output logic [6:0]  ld_addr,
  output logic [31:0] ld_data,
  output logic        mb_start,
  output logic        mb_left_avail,
  output logic        mb_top_avail,
  output logic        mb_topright_avail,
  input  logic        busy,
  input  logic        mb_done,
  input  pred_mode_e  mb_modes [16],
  input  logic [23:0] i4_cost,
  input  pred_mode_e  i16_mode,
  input  logic [23:0] i16_cost,
  input  logic        i16_better,
  output logic        rec_rd_en,
  output logic [6:0]  rec_rd_addr,
  input  logic [31:0] rec_rd_data,
  output logic        pp_rd_en,
  output logic [5:0]  pp_rd_addr,
  input  logic [31:0] pp_rd_data,
  output logic        flush_req,
  input  logic        bs_busy,
  input  logic        bs_valid,
  input  logic [31:0] bs_word,
  input  logic [5:0]  bs_bits
);

  localparam int FW = 16 * MBW;
  localparam int FH = 16 * MBH;

  int checks = 0, failures = 0;
  byte unsigned src [FH][FW];
  byte unsigned rec [FH][FW];     // hardware reconstruction
  byte unsigned dec [FH][FW];     // reference decoder output
  int  hw_mode  [FH/4][FW/4];
  int  dec_mode [FH/4][FW/4];
  bit  bits [$];

  // mechanism counters
  int n_mode [9];
  int n_mpm_flag = 0, n_rem = 0, n_i16_better = 0, n_i16_worse = 0;
  int n_overlap = 0, n_empty = 0, n_full = 0, n_words = 0, n_flush = 0;
  int max_mb_cycles = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- bitstream capture ----------------
  always @(posedge clk) begin
    if (bs_valid) begin
      for (int i = 0; i < int'(bs_bits); i++) bits.push_back(bs_word[31 - i]);
      if (bs_bits == 6'd32) n_words++;
      else n_flush++;
    end
    if (busy && bs_busy) n_overlap++;
  end

  // ---------------- source frame ----------------
  function automatic int clip255(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic make_frame();
    int kind, v, bxp, byp;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        kind = (mx * 7 + my * 3 + (mx * my) % 5) % 8;
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++) begin
            bxp = 16 * mx + x;
            byp = 16 * my + y;
            case (kind)
              0: v = 120 + $urandom_range(0, 2);                     // flat
              1: v = 40 + 6 * x + 3 * y;                             // gradient
              2: v = ((x / 2) % 2 == 0) ? 200 : 50;                  // vertical stripes
              3: v = ((y / 3) % 2 == 0) ? 30 : 180;                  // horizontal stripes
              4: v = (((x + y) / 3) % 2 == 0) ? 60 : 210;            // diagonal down-left
              5: v = (((x - y + 32) / 3) % 2 == 0) ? 80 : 230;       // diagonal down-right
              6: v = $urandom_range(0, 255);                         // noise
              default: v = ((2 * x + y) % 7 < 3) ? 20 + 4 * y : 220 - 3 * x;  // steep edges
            endcase
            src[byp][bxp] = byte'(clip255(v));
          end
      end
  endtask

  // ---------------- reference decoder pieces ----------------
  function automatic int getb(int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      if (bits.size() == 0) return -1;
      v = (v << 1) | int'(bits.pop_front());
    end
    return v;
  endfunction

  function automatic int vscale(int qm, int r, int c);
    int t [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                     '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    int cls;
    if (r % 2 == 0 && c % 2 == 0) cls = 0;
    else if (r % 2 == 1 && c % 2 == 1) cls = 1;
    else cls = 2;
    return t[qm][cls];
  endfunction

  function automatic string rb_code(int zl, int run);
    string t1[2]  = '{"1", "0"};
    string t2[3]  = '{"1", "01", "00"};
    string t3[4]  = '{"11", "10", "01", "00"};
    string t4[5]  = '{"11", "10", "01", "001", "000"};
    string t5[6]  = '{"11", "10", "011", "010", "001", "000"};
    string t6[7]  = '{"11", "000", "001", "011", "010", "101", "100"};
    string t7[15] = '{"111", "110", "101", "100", "011", "010", "001", "0001",
                      "00001", "000001", "0000001", "00000001", "000000001",
                      "0000000001", "00000000001"};
    case (zl)
      1: return t1[run];
      2: return t2[run];
      3: return t3[run];
      4: return t4[run];
      5: return t5[run];
      6: return t6[run];
      default: return t7[run];
    endcase
  endfunction

  function automatic bit bits_match(string s);
    if (bits.size() < s.len()) return 0;
    for (int i = 0; i < s.len(); i++)
      if (bits[i] != (s[i] == "1")) return 0;
    return 1;
  endfunction

  // CAVLC block decode into raster order lv[16]
  task automatic cavlc_decode(output int lv [16], output bit ok);
    int zz [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
    int tc, t1, tz, sl, zl, pos, prefix, ssize, suffix, lc, lvl, tok, b;
    int levels [16];
    int runs [16];
    ok = 1;
    for (int i = 0; i < 16; i++) lv[i] = 0;
    tok = getb(6);
    if (tok < 0) begin ok = 0; return; end
    if (tok == 3) begin n_empty++; return; end
    tc = (tok >> 2) + 1;
    t1 = tok & 3;
    if (tc == 16) n_full++;
    for (int i = 0; i < t1; i++) levels[i] = (getb(1) == 1) ? -1 : 1;
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      prefix = 0;
      b = getb(1);
      while (b == 0 && prefix < 40) begin prefix++; b = getb(1); end
      if (b < 0) begin ok = 0; return; end
      if (prefix == 14 && sl == 0) ssize = 4;
      else if (prefix >= 15)       ssize = 12;
      else                         ssize = sl;
      suffix = (ssize > 0) ? getb(ssize) : 0;
      lc = ((prefix < 15 ? prefix : 15) << sl) + suffix;
      if (prefix >= 15 && sl == 0) lc += 15;
      if (i == t1 && t1 < 3) lc += 2;
      lvl = (lc % 2 == 0) ? (lc + 2) / 2 : -(lc + 1) / 2;
      levels[i] = lvl;
      if (sl == 0) sl = 1;
      if ((lvl < 0 ? -lvl : lvl) > (3 << (sl - 1)) && sl < 6) sl++;
    end
    tz = (tc < 16) ? getb(4) : 0;
    zl = tz;
    for (int i = 0; i < tc - 1; i++) begin
      runs[i] = 0;
      if (zl > 0) begin
        int found;
        found = -1;
        for (int r = 0; r <= zl && r < 15; r++)
          if (bits_match(rb_code(zl, r))) found = r;
        if (found < 0) begin ok = 0; return; end
        void'(getb(rb_code(zl, found).len()));
        runs[i] = found;
        zl -= found;
      end
    end
    runs[tc-1] = zl;
    pos = tc - 1 + tz;
    for (int i = 0; i < tc; i++) begin
      if (pos < 0 || pos > 15) begin ok = 0; return; end
      lv[zz[pos]] = levels[i];
      pos = pos - runs[i] - 1;
    end
  endtask

  // neighbour sample for the block at pixel (gx, gy) of the decoded frame;
  // dx in -1..7 with dy = -1, or dx = -1 with dy in -1..3
  function automatic int nbp(int gx, int gy, int dx, int dy, bit tr_ok);
    if (dy == -1 && dx > 3 && !tr_ok) dx = 3;
    return int'(dec[gy + dy][gx + dx]);
  endfunction

  task automatic pred4(int mode, int gx, int gy, bit ta, bit la, bit tr_ok, output int p [4][4]);
    int s, z, P [-1:7], L [-1:3];
    for (int i = -1; i <= 7; i++) P[i] = ta ? nbp(gx, gy, i, -1, tr_ok) : 0;
    for (int i = -1; i <= 3; i++) L[i] = la ? ((i == -1) ? (ta ? nbp(gx, gy, -1, -1, 1) : 0) : nbp(gx, gy, -1, i, 1)) : 0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        case (mode)
          0: p[y][x] = P[x];
          1: p[y][x] = L[y];
          2: begin
            s = 0;
            for (int i = 0; i < 4; i++) s += (ta ? P[i] : 0) + (la ? L[i] : 0);
            if (ta && la)  p[y][x] = (s + 4) >> 3;
            else if (ta || la) p[y][x] = (s + 2) >> 2;
            else p[y][x] = 128;
          end
          3: p[y][x] = (x == 3 && y == 3) ? (P[6] + 3 * P[7] + 2) >> 2
                                           : (P[x+y] + 2 * P[x+y+1] + P[x+y+2] + 2) >> 2;
          4: begin
            if (x > y)      p[y][x] = (P[x-y-2] + 2 * P[x-y-1] + P[x-y] + 2) >> 2;
            else if (x < y) p[y][x] = (L[y-x-2] + 2 * L[y-x-1] + L[y-x] + 2) >> 2;
            else            p[y][x] = (P[0] + 2 * P[-1] + L[0] + 2) >> 2;
          end
          5: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0) p[y][x] = (P[x-(y>>1)-1] + P[x-(y>>1)] + 1) >> 1;
            else if (z > 0)           p[y][x] = (P[x-(y>>1)-2] + 2 * P[x-(y>>1)-1] + P[x-(y>>1)] + 2) >> 2;
            else if (z == -1)         p[y][x] = (L[0] + 2 * L[-1] + P[0] + 2) >> 2;
            else                      p[y][x] = (L[y-1] + 2 * L[y-2] + L[y-3] + 2) >> 2;
          end
          6: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0) p[y][x] = (L[y-(x>>1)-1] + L[y-(x>>1)] + 1) >> 1;
            else if (z > 0)           p[y][x] = (L[y-(x>>1)-2] + 2 * L[y-(x>>1)-1] + L[y-(x>>1)] + 2) >> 2;
            else if (z == -1)         p[y][x] = (L[0] + 2 * L[-1] + P[0] + 2) >> 2;
            else                      p[y][x] = (P[x-1] + 2 * P[x-2] + P[x-3] + 2) >> 2;
          end
          7: begin
            if (y % 2 == 0) p[y][x] = (P[x+(y>>1)] + P[x+(y>>1)+1] + 1) >> 1;
            else            p[y][x] = (P[x+(y>>1)] + 2 * P[x+(y>>1)+1] + P[x+(y>>1)+2] + 2) >> 2;
          end
          default: begin
            z = x + 2 * y;
            if (z > 5)                p[y][x] = L[3];
            else if (z == 5)          p[y][x] = (L[2] + 3 * L[3] + 2) >> 2;
            else if (z % 2 == 0)      p[y][x] = (L[y+(x>>1)] + L[y+(x>>1)+1] + 1) >> 1;
            else                      p[y][x] = (L[y+(x>>1)] + 2 * L[y+(x>>1)+1] + L[y+(x>>1)+2] + 2) >> 2;
          end
        endcase
      end
  endtask

  // 4x4 inverse transform of dequantized coefficients, then (x+32)>>6
  task automatic itrans(int w [4][4], output int r [4][4]);
    int t [4][4];
    int e0, e1, e2, e3;
    for (int i = 0; i < 4; i++) begin          // rows
      e0 = w[i][0] + w[i][2];
      e1 = w[i][0] - w[i][2];
      e2 = (w[i][1] >>> 1) - w[i][3];
      e3 = w[i][1] + (w[i][3] >>> 1);
      t[i][0] = e0 + e3; t[i][1] = e1 + e2; t[i][2] = e1 - e2; t[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin          // columns
      e0 = t[0][j] + t[2][j];
      e1 = t[0][j] - t[2][j];
      e2 = (t[1][j] >>> 1) - t[3][j];
      e3 = t[1][j] + (t[3][j] >>> 1);
      r[0][j] = (e0 + e3 + 32) >>> 6; r[1][j] = (e1 + e2 + 32) >>> 6;
      r[2][j] = (e1 - e2 + 32) >>> 6; r[3][j] = (e0 - e3 + 32) >>> 6;
    end
  endtask

  function automatic int zorder(int x, int y);
    return (y >> 1) * 8 + (x >> 1) * 4 + (y & 1) * 2 + (x & 1);
  endfunction

  // decode the whole frame from the bit queue
  task automatic decode_frame();
    int qm, qd, k, bx, by, gx, gy, a, b, mpm, flag, rem, mode;
    int lv [16];
    int w [4][4], r [4][4], p [4][4];
    int modes [16];
    bit ok, ta, la, tr_ok;
    qm = QP % 6;
    qd = QP / 6;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        chk(getb(1) == 1, "mb_type");
        for (k = 0; k < 16; k++) begin
          bx = 4 * mx + 2 * ((k >> 2) & 1) + (k & 1);
          by = 4 * my + 2 * ((k >> 3) & 1) + ((k >> 1) & 1);
          if (bx == 0 || by == 0) mpm = 2;
          else begin
            a = dec_mode[by][bx-1];
            b = dec_mode[by-1][bx];
            mpm = (a < b) ? a : b;
          end
          flag = getb(1);
          if (flag == 1) begin mode = mpm; n_mpm_flag++; end
          else begin
            rem = getb(3);
            mode = (rem < mpm) ? rem : rem + 1;
            n_rem++;
          end
          dec_mode[by][bx] = mode;
        end
        chk(getb(1) == 1, "mb_qp_delta");
        for (k = 0; k < 16; k++) begin
          bx = 2 * ((k >> 2) & 1) + (k & 1);
          by = 2 * ((k >> 3) & 1) + ((k >> 1) & 1);
          gx = 16 * mx + 4 * bx;
          gy = 16 * my + 4 * by;
          cavlc_decode(lv, ok);
          chk(ok, "cavlc syntax");
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) w[i][j] = (lv[4*i + j] * vscale(qm, i, j)) << qd;
          itrans(w, r);
          ta = (gy > 0);
          la = (gx > 0);
          if (by == 0) tr_ok = (bx < 3) ? (my > 0) : (my > 0 && mx < MBW - 1);
          else         tr_ok = (bx < 3) && (zorder(bx + 1, by - 1) < zorder(bx, by));
          mode = dec_mode[gy/4][gx/4];
          pred4(mode, gx, gy, ta, la, tr_ok, p);
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) dec[gy + i][gx + j] = byte'(clip255(p[i][j] + r[i][j]));
        end
      end
  endtask

  // ---------------- stimulus ----------------
  task automatic read_back(int mx, int my, int start_cycle, ref int cyc);
    int bxi, byi, px, ok;
    int H, V, a, b, c, pv;
    int T [-1:15], Lc [-1:15];
    // reconstruction, word 4*blk + col, row i in byte i
    for (int k = 0; k < 16; k++) begin
      bxi = 2 * ((k >> 2) & 1) + (k & 1);
      byi = 2 * ((k >> 3) & 1) + ((k >> 1) & 1);
      for (int c2 = 0; c2 < 4; c2++) begin
        rec_rd_en = 1;
        rec_rd_addr = 7'(4 * k + c2);
        @(negedge clk);
        rec_rd_en = 0;
        for (int i = 0; i < 4; i++)
          rec[16*my + 4*byi + i][16*mx + 4*bxi + c2] = rec_rd_data[8*i +: 8];
      end
    end
    for (int i = 0; i < 16; i++) begin
      hw_mode[4*my + i/4][4*mx + i%4] = int'(mb_modes[i]);
      n_mode[int'(mb_modes[i]) % 9]++;
      checks++;
      if (mb_modes[i] > I4_HU) failures++;
    end
    if (i16_better) n_i16_better++; else n_i16_worse++;
    // plane predictors
    if (mx > 0 && my > 0) begin
      for (int i = -1; i < 16; i++) begin
        T[i]  = int'(rec[16*my - 1][16*mx + i]);
        Lc[i] = int'(rec[16*my + i][16*mx - 1]);
      end
      H = 0; V = 0;
      for (int i = 0; i < 8; i++) begin
        H += (i + 1) * (T[8 + i] - T[6 - i]);
        V += (i + 1) * (Lc[8 + i] - Lc[6 - i]);
      end
      a = 16 * (Lc[15] + T[15]);
      b = (5 * H + 32) >>> 6;
      c = (5 * V + 32) >>> 6;
      for (int y = 0; y < 16; y++)
        for (int w4 = 0; w4 < 4; w4++) begin
          pp_rd_en = 1;
          pp_rd_addr = 6'(4 * y + w4);
          @(negedge clk);
          pp_rd_en = 0;
          for (int j = 0; j < 4; j++) begin
            pv = clip255((a + b * (4 * w4 + j - 7) + c * (y - 7) + 16) >>> 5);
            chk(int'(pp_rd_data[8*j +: 8]) == pv, $sformatf("plane mb %0d,%0d (%0d,%0d)", mx, my, 4*w4+j, y));
          end
        end
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int mb_t0, mbx_prev, mby_prev, v, err, maxerr;
    longint sad;
    rst_n = 0; qp = 6'(QP); lambda = 8'(LAMBDA);
    ld_en = 0; ld_sel = 0; ld_addr = 0; ld_data = 0;
    mb_start = 0; mb_left_avail = 0; mb_top_avail = 0; mb_topright_avail = 0;
    rec_rd_en = 0; rec_rd_addr = 0; pp_rd_en = 0; pp_rd_addr = 0; flush_req = 0;
    for (int i = 0; i < 9; i++) n_mode[i] = 0;
    make_frame();
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    mbx_prev = -1; mby_prev = -1;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        while (busy) @(negedge clk);
        if (mbx_prev >= 0) read_back(mbx_prev, mby_prev, 0, cyc);
        // current macroblock
        for (int y = 0; y < 16; y++)
          for (int w4 = 0; w4 < 4; w4++) begin
            ld_en = 1; ld_sel = 2'd0; ld_addr = 7'(4 * y + w4);
            for (int j = 0; j < 4; j++) ld_data[8*j +: 8] = src[16*my + y][16*mx + 4*w4 + j];
            @(negedge clk);
          end
        // upper neighbours
        for (int w4 = 0; w4 < 6; w4++) begin
          ld_en = 1; ld_sel = 2'd1; ld_addr = 7'(w4); ld_data = '0;
          if (my > 0) begin
            if (w4 < 4)
              for (int j = 0; j < 4; j++) ld_data[8*j +: 8] = rec[16*my - 1][16*mx + 4*w4 + j];
            else if (w4 == 4 && mx < MBW - 1)
              for (int j = 0; j < 4; j++) ld_data[8*j +: 8] = rec[16*my - 1][16*mx + 16 + j];
            else if (w4 == 5 && mx > 0)
              ld_data[7:0] = rec[16*my - 1][16*mx - 1];
          end
          @(negedge clk);
        end
        ld_en = 1; ld_sel = 2'd2; ld_addr = 0; ld_data = '0;
        if (my > 0)
          for (int i = 0; i < 4; i++) ld_data[4*i +: 4] = 4'(hw_mode[4*my - 1][4*mx + i]);
        @(negedge clk);
        ld_en = 0;
        mb_left_avail = (mx > 0);
        mb_top_avail = (my > 0);
        mb_topright_avail = (my > 0) && (mx < MBW - 1);
        mb_start = 1;
        mb_t0 = cyc;
        @(negedge clk);
        mb_start = 0;
        while (!mb_done) @(negedge clk);
        if (cyc - mb_t0 > max_mb_cycles) max_mb_cycles = cyc - mb_t0;
        mbx_prev = mx; mby_prev = my;
      end
    while (busy) @(negedge clk);
    read_back(mbx_prev, mby_prev, 0, cyc);
    while (bs_busy) @(negedge clk);
    flush_req = 1;
    @(negedge clk);
    flush_req = 0;
    repeat (5) @(negedge clk);
    while (bs_busy) @(negedge clk);
    repeat (5) @(negedge clk);

    // mode legality
    for (int by = 0; by < FH/4; by++)
      for (int bx = 0; bx < FW/4; bx++) begin
        v = hw_mode[by][bx];
        chk(!(by == 0 && (v == 0 || v == 3 || v == 4 || v == 5 || v == 6 || v == 7)), "mode needs top");
        chk(!(bx == 0 && (v == 1 || v == 4 || v == 5 || v == 6 || v == 8)), "mode needs left");
      end

    decode_frame();
    chk(bits.size() < 32, $sformatf("%0d bits left after decoding", bits.size()));
    for (int by = 0; by < FH/4; by++)
      for (int bx = 0; bx < FW/4; bx++)
        chk(dec_mode[by][bx] == hw_mode[by][bx], $sformatf("mode of block %0d,%0d", bx, by));
    sad = 0;
    maxerr = 0;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        checks++;
        if (dec[y][x] != rec[y][x]) begin
          failures++;
          if (failures < 20) $display("FAIL pixel %0d,%0d dec %0d hw %0d", x, y, dec[y][x], rec[y][x]);
        end
        err = int'(src[y][x]) - int'(rec[y][x]);
        if (err < 0) err = -err;
        sad += longint'(err);
      end
    $display("frame %0dx%0d QP %0d: mean abs error %0.2f, %0d bits, longest macroblock %0d cycles",
             FW, FH, QP, real'(sad) / real'(FW * FH), n_words * 32, max_mb_cycles);
    chk(real'(sad) / real'(FW * FH) < 10.0, "reconstruction quality");
    chk(max_mb_cycles <= MAX_MB_CYCLES, "cycles per macroblock");

    // mechanisms
    for (int i = 0; i < 9; i++) begin
      $display("mechanism: I4MB mode %0d chosen %0d times", i, n_mode[i]);
      chk(n_mode[i] > 0, $sformatf("mode %0d never chosen", i));
    end
    $display("mechanism: most probable mode flag %0d, remaining mode %0d", n_mpm_flag, n_rem);
    $display("mechanism: I16MB better %0d, worse %0d", n_i16_better, n_i16_worse);
    $display("mechanism: encoding/bitstream overlap cycles %0d", n_overlap);
    $display("mechanism: empty blocks %0d, full blocks %0d", n_empty, n_full);
    $display("mechanism: packer words %0d, flushes %0d", n_words, n_flush);
    chk(n_mpm_flag > 0, "no mode coded as most probable");
    chk(n_rem > 0, "no remaining-mode code");
    chk(n_i16_better > 0, "I16MB never better");
    chk(n_i16_worse > 0, "I16MB never worse");
    chk(n_overlap > 0, "macroblock pipelining never overlapped");
    chk(n_empty > 0, "no empty block");
    chk(n_full > 0, "no block with 16 coefficients");
    chk(n_words > 0, "no packer word");
    chk(n_flush == 1, "flush count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
