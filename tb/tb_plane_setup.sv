// tb_plane_setup: self-checking test of the plane-mode set-up unit.
// For random (and extreme) neighbour rows it waits for done, checks the
// set-up time (11 cycles luma, 7 chroma), compares a, b, c and the four
// seeds with equations (5)-(9) computed here with multiplications, and
// checks that seed_blk + x*b + r*c, shifted and clipped, reproduces
// Clip1((a + b(x-o) + c(y-o) + 16) >> 5) for every pixel.
module tb_plane_setup;
  import intra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, chroma, busy, done;
  pix_t top_px [17], left_px [17];
  logic [1:0] blk_x, blk_y;
  logic signed [19:0] plane_a, plane_b, plane_c, seed_blk;
  logic signed [19:0] seed [4];
  int checks = 0, failures = 0;

  plane_setup dut (.*);
  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int n, o, s, H, V, a, b, c, lat, nb;
    start = 0; chroma = 0; blk_x = 0; blk_y = 0;
    for (int i = 0; i < 17; i++) begin top_px[i] = 0; left_px[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      chroma = t[0];
      for (int i = 0; i < 17; i++) begin
        top_px[i] = 8'($urandom); left_px[i] = 8'($urandom);
        if (t < 4) begin top_px[i] = (i < 9) ? 8'(t < 2 ? 255 : 0) : 8'(t < 2 ? 0 : 255); left_px[i] = top_px[i]; end
      end
      n = chroma ? 4 : 8; o = chroma ? 3 : 7; s = chroma ? 34 : 5; nb = chroma ? 2 : 4;
      H = 0; V = 0;
      for (int k = 0; k < n; k++) begin
        H += (k + 1) * (int'(top_px[n + 1 + k]) - int'(top_px[n - 1 - k]));
        V += (k + 1) * (int'(left_px[n + 1 + k]) - int'(left_px[n - 1 - k]));
      end
      a = 16 * (int'(left_px[2 * n]) + int'(top_px[2 * n]));
      b = (s * H + 32) >>> 6;
      c = (s * V + 32) >>> 6;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      chk(lat, chroma ? 7 : 11, "set-up cycles");
      chk(int'(plane_a), a, "a");
      chk(int'(plane_b), b, "b");
      chk(int'(plane_c), c, "c");
      for (int g = 0; g < nb; g++) chk(int'(seed[g]), a + b * (4 * g - o) - c * o + 16, "seed");
      for (int by = 0; by < nb; by++)
        for (int bx = 0; bx < nb; bx++) begin
          blk_x = 2'(bx); blk_y = 2'(by);
          #1;
          for (int r = 0; r < 4; r++)
            for (int x = 0; x < 4; x++) begin
              int v, e;
              v = (int'(seed_blk) + x * b + r * c) >>> 5;
              v = v < 0 ? 0 : v > 255 ? 255 : v;
              e = (a + b * (4 * bx + x - o) + c * (4 * by + r - o) + 16) >>> 5;
              e = e < 0 ? 0 : e > 255 ? 255 : e;
              chk(v, e, "pixel");
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
