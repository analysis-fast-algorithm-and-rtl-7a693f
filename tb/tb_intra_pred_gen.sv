// tb_intra_pred_gen: self-checking test of the four-parallel predictor
// generator. For random neighbour sets it checks, row by row, all nine
// I4MB modes against the H.264/AVC per-pixel predictor equations (written
// here in the standard's p[x,y] form), vertical/horizontal bypass, I4MB dc
// with each availability case, the four-cycle I16MB dc set-up (latency
// checked), and the plane mode over a whole 16x16 macroblock, driven from
// seeds and compared with Clip1((a + b(x-7) + c(y-7) + 16) >> 5).
module tb_intra_pred_gen;
  import intra_pkg::*;

  logic clk = 0, rst_n = 0;
  pred_mode_e mode;
  logic [1:0] row;
  nb4_t nb;
  logic top_avail, left_avail, dc16_start, plane_load, plane_step, dc16_busy;
  pix_t mb_top [16], mb_left [16];
  logic signed [19:0] plane_seed, plane_b, plane_c;
  pix_row_t pred;
  int checks = 0, failures = 0;

  intra_pred_gen dut (.*);
  always #5 clk = ~clk;

  // p(x,y) with x,y in -1..7 for the 4x4 block neighbours
  function automatic int p(int x, int y);
    if (y == -1 && x == -1) return int'(nb.corner);
    if (y == -1) return int'(nb.top[x]);
    return int'(nb.left[y]);
  endfunction

  function automatic int ref4(pred_mode_e m, int x, int y);
    int z;
    case (m)
      I4_V: return p(x, -1);
      I4_H: return p(-1, y);
      I4_DDL:
        if (x == 3 && y == 3) return (p(6, -1) + 3 * p(7, -1) + 2) >> 2;
        else return (p(x+y, -1) + 2 * p(x+y+1, -1) + p(x+y+2, -1) + 2) >> 2;
      I4_DDR:
        if (x > y) return (p(x-y-2, -1) + 2 * p(x-y-1, -1) + p(x-y, -1) + 2) >> 2;
        else if (x < y) return (p(-1, y-x-2) + 2 * p(-1, y-x-1) + p(-1, y-x) + 2) >> 2;
        else return (p(0, -1) + 2 * p(-1, -1) + p(-1, 0) + 2) >> 2;
      I4_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return (p(x-(y>>1)-1, -1) + p(x-(y>>1), -1) + 1) >> 1;
        if (z > 0) return (p(x-(y>>1)-2, -1) + 2 * p(x-(y>>1)-1, -1) + p(x-(y>>1), -1) + 2) >> 2;
        if (z == -1) return (p(-1, 0) + 2 * p(-1, -1) + p(0, -1) + 2) >> 2;
        return (p(-1, y-1) + 2 * p(-1, y-2) + p(-1, y-3) + 2) >> 2;
      end
      I4_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return (p(-1, y-(x>>1)-1) + p(-1, y-(x>>1)) + 1) >> 1;
        if (z > 0) return (p(-1, y-(x>>1)-2) + 2 * p(-1, y-(x>>1)-1) + p(-1, y-(x>>1)) + 2) >> 2;
        if (z == -1) return (p(-1, 0) + 2 * p(-1, -1) + p(0, -1) + 2) >> 2;
        return (p(x-1, -1) + 2 * p(x-2, -1) + p(x-3, -1) + 2) >> 2;
      end
      I4_VL:
        if (y % 2 == 0) return (p(x+(y>>1), -1) + p(x+(y>>1)+1, -1) + 1) >> 1;
        else return (p(x+(y>>1), -1) + 2 * p(x+(y>>1)+1, -1) + p(x+(y>>1)+2, -1) + 2) >> 2;
      I4_HU: begin
        z = x + 2 * y;
        if (z > 5) return p(-1, 3);
        if (z == 5) return (p(-1, 2) + 3 * p(-1, 3) + 2) >> 2;
        if (z % 2 == 0) return (p(-1, y+(x>>1)) + p(-1, y+(x>>1)+1) + 1) >> 1;
        return (p(-1, y+(x>>1)) + 2 * p(-1, y+(x>>1)+1) + p(-1, y+(x>>1)+2) + 2) >> 2;
      end
      default: begin
        int st = 0, sl = 0;
        for (int i = 0; i < 4; i++) begin st += p(i, -1); sl += p(-1, i); end
        if (top_avail && left_avail) return (st + sl + 4) >> 3;
        if (top_avail) return (st + 2) >> 2;
        if (left_avail) return (sl + 2) >> 2;
        return 128;
      end
    endcase
  endfunction

  task automatic check_row(int exp[4], string what);
    for (int x = 0; x < 4; x++) begin
      checks++;
      if (int'(pred[x]) != exp[x]) begin
        failures++;
        if (failures < 12) $display("%s x=%0d got %0d exp %0d", what, x, pred[x], exp[x]);
      end
    end
  endtask

  int nplane = 0;
  initial begin
    int exp[4];
    int a, b, c, H, V, st, sl, lat;
    mode = I4_V; row = 0; top_avail = 1; left_avail = 1; dc16_start = 0;
    plane_load = 0; plane_step = 0; plane_seed = 0; plane_b = 0; plane_c = 0;
    nb = '0;
    for (int i = 0; i < 16; i++) begin mb_top[i] = 0; mb_left[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // I4MB modes
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 8; i++) nb.top[i] = 8'($urandom);
      for (int i = 0; i < 4; i++) nb.left[i] = 8'($urandom);
      nb.corner = 8'($urandom);
      top_avail = ($urandom_range(0, 3) != 0);
      left_avail = ($urandom_range(0, 3) != 0);
      for (int m = 0; m <= 8; m++) begin
        mode = pred_mode_e'(m);
        for (int y = 0; y < 4; y++) begin
          row = 2'(y);
          #1;
          for (int x = 0; x < 4; x++) exp[x] = ref4(mode, x, y);
          check_row(exp, $sformatf("mode %0d y %0d", m, y));
        end
      end
    end
    // I16MB vertical / horizontal / dc
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) begin mb_top[i] = 8'($urandom); mb_left[i] = 8'($urandom); end
      top_avail = ($urandom_range(0, 3) != 0);
      left_avail = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      dc16_start = 1;
      @(negedge clk);
      dc16_start = 0;
      lat = 1;
      while (dc16_busy) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4) begin failures++; $display("I16 dc took %0d cycles", lat); end
      st = 0; sl = 0;
      for (int i = 0; i < 16; i++) begin st += int'(mb_top[i]); sl += int'(mb_left[i]); end
      mode = I16_DC;
      #1;
      for (int x = 0; x < 4; x++)
        exp[x] = (top_avail && left_avail) ? (st + sl + 16) >> 5 :
                 top_avail ? (st + 8) >> 4 : left_avail ? (sl + 8) >> 4 : 128;
      check_row(exp, "I16 dc");
      // vertical / horizontal bypass of a block at column group g, row y
      for (int g = 0; g < 4; g++) begin
        for (int i = 0; i < 4; i++) begin nb.top[i] = mb_top[4*g+i]; nb.left[i] = mb_left[4*g+i]; end
        mode = I16_V; row = 2'(g); #1;
        for (int x = 0; x < 4; x++) exp[x] = int'(mb_top[4*g+x]);
        check_row(exp, "I16 V");
        mode = I16_H; #1;
        for (int x = 0; x < 4; x++) exp[x] = int'(mb_left[4*g+g]);
        check_row(exp, "I16 H");
      end
    end
    // plane over whole macroblocks, column group by column group
    for (int n = 0; n < 30; n++) begin
      int pt[17], pl[17];
      for (int i = 0; i < 17; i++) begin pt[i] = $urandom_range(0, 255); pl[i] = $urandom_range(0, 255); end
      if (n == 0) for (int i = 0; i < 17; i++) begin pt[i] = (i < 8) ? 0 : 255; pl[i] = pt[i]; end
      // pt[0] / pl[0] is the corner p[-1,-1]; pt[i+1] = p[i,-1]
      H = 0; V = 0;
      for (int k = 0; k < 8; k++) begin
        H += (k + 1) * (pt[9 + k] - pt[7 - k]);
        V += (k + 1) * (pl[9 + k] - pl[7 - k]);
      end
      a = 16 * (pl[16] + pt[16]);
      b = (5 * H + 32) >>> 6;
      c = (5 * V + 32) >>> 6;
      plane_b = 20'(b); plane_c = 20'(c);
      mode = I16_PL;
      for (int g = 0; g < 4; g++) begin
        @(negedge clk);
        plane_seed = 20'(a + b * (4 * g - 7) + c * (-7) + 16);
        for (int y = 0; y < 16; y++) begin
          plane_load = (y == 0); plane_step = (y != 0);
          #1;
          for (int x = 0; x < 4; x++) begin
            int v;
            v = (a + b * (4 * g + x - 7) + c * (y - 7) + 16) >>> 5;
            exp[x] = v < 0 ? 0 : v > 255 ? 255 : v;
          end
          check_row(exp, $sformatf("plane g%0d y%0d", g, y));
          nplane++;
          @(negedge clk);
        end
        plane_load = 0; plane_step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
