// tb_cavlc_engine: self-checking testbench for cavlc_engine.
//
// A behavioural coefficient buffer (four banks, registered read) holds one
// 4x4 block of levels. The engine codes it; the testbench collects the
// codewords into a bit queue and decodes them with an independent decoder
// (coeff_token, trailing-one signs, level prefix/suffix with suffixLength
// adaptation, total_zeros, run_before), rebuilding the 16 levels, which must
// match the block. It also checks total_coeff and that reads only hit the
// block's words. Blocks: the worked example of the document's CAVLC
// figure, an empty block, a full block, a block with large levels
// (escape codes) and random sparse blocks at several block positions.
module tb_cavlc_engine;
  import intra_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start = 0;
  logic [6:0]  blk_word = 0;
  logic        rd_en;
  logic [1:0]  rd_bank;
  logic [6:0]  rd_addr;
  coef_t       rd_data;
  logic        cw_valid;
  logic [31:0] codeword;
  logic [4:0]  codelen;
  logic        busy, done;
  logic [4:0]  total_coeff;

  int checks = 0, failures = 0;

  cavlc_engine dut (.*);

  always #5 clk = ~clk;

  coef_t mem [4][96];
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_bank][rd_addr];

  bit bits [$];
  int bad_reads = 0;
  always @(posedge clk) begin
    if (cw_valid)
      for (int i = int'(codelen) - 1; i >= 0; i--) bits.push_back(codeword[i]);
    if (rd_en && (rd_addr < blk_word || rd_addr > blk_word + 3)) bad_reads++;
  end

  function automatic int getb(int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | int'(bits.pop_front());
    end
    return v;
  endfunction

  // run_before table as strings, used for decoding
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

  int zz [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  // decode one block from the bit queue into raster order
  task automatic decode(output int blk [16], output int tc_out);
    int tc, t1, tz, sl, zl, pos, prefix, ssize, suffix, lc, lvl;
    int levels [16];
    int runs [16];
    int tok;
    for (int i = 0; i < 16; i++) blk[i] = 0;
    if (bits.size() < 6) begin tc_out = -1; return; end
    tok = getb(6);
    if (tok == 3) begin tc_out = 0; return; end
    tc = (tok >> 2) + 1;
    t1 = tok & 3;
    tc_out = tc;
    for (int i = 0; i < t1; i++) levels[i] = (getb(1) != 0) ? -1 : 1;
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      prefix = 0;
      while (bits.size() > 0 && prefix < 40 && getb(1) == 0) prefix++;
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
        int found = -1;
        for (int r = 0; r <= zl && r < 15; r++)
          if (bits_match(rb_code(zl, r))) found = r;
        if (found < 0) begin found = 0; failures++; end
        void'(getb(rb_code(zl, found).len()));
        runs[i] = found;
        zl -= found;
      end
    end
    runs[tc-1] = zl;
    pos = tc - 1 + tz;
    for (int i = 0; i < tc; i++) begin
      if (pos >= 0 && pos < 16) blk[zz[pos]] = levels[i];
      pos = pos - runs[i] - 1;
    end
  endtask

  task automatic run_block(int b, int raster [16]);
    int got [16];
    int tc_got, ref_tc, cyc;
    blk_word = 7'(4 * b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) mem[r][4*b + c] = coef_t'(raster[4*r + c]);
    bits.delete();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (!(cyc < 200)) begin failures++; $display("FAIL no done"); return; end
    ref_tc = 0;
    for (int i = 0; i < 16; i++) if (raster[i] != 0) ref_tc++;
    checks++;
    if (int'(total_coeff) != ref_tc) begin
      failures++;
      $display("FAIL total_coeff %0d exp %0d", total_coeff, ref_tc);
    end
    decode(got, tc_got);
    checks++;
    if (tc_got != ref_tc) failures++;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (got[i] != raster[i]) begin
        failures++;
        if (failures < 10) $display("FAIL blk %0d pos %0d got %0d exp %0d", b, i, got[i], raster[i]);
      end
    end
    checks++;
    if (bits.size() != 0) begin failures++; $display("FAIL %0d extra bits", bits.size()); end
  endtask

  initial begin
    #20000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int blk [16];
    int v, r, mode;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // worked example, scan order 5 2 -3 0 0 4 0 0 0 0 2 0 1 -1 0 0
    begin
      int sc [16];
      sc = '{5, 2, -3, 0, 0, 4, 0, 0, 0, 0, 2, 0, 1, -1, 0, 0};
      for (int i = 0; i < 16; i++) blk[zz[i]] = sc[i];
      run_block(0, blk);
      checks++;
    end
    for (int i = 0; i < 16; i++) blk[i] = 0;
    run_block(3, blk);
    for (int i = 0; i < 16; i++) blk[i] = (i % 3 == 0) ? -(i + 1) : i + 1;
    run_block(5, blk);
    for (int i = 0; i < 16; i++) blk[i] = 0;
    blk[0] = 1900; blk[1] = -1500; blk[4] = 700; blk[5] = 1;
    run_block(7, blk);
    for (int n = 0; n < 1500; n++) begin
      mode = $urandom_range(0, 3);
      for (int i = 0; i < 16; i++) begin
        r = $urandom_range(0, 99);
        v = 0;
        if (mode == 0 && r < 20) v = $urandom_range(1, 2);
        else if (mode == 1 && r < 50) v = $urandom_range(1, 12);
        else if (mode == 2 && r < 90) v = $urandom_range(1, 200);
        else if (mode == 3 && r < 30) v = $urandom_range(1, 2000);
        if (v != 0 && $urandom_range(0, 1) == 1) v = -v;
        blk[i] = v;
      end
      run_block($urandom_range(0, 23), blk);
    end
    checks++;
    if (bad_reads != 0) begin failures++; $display("FAIL %0d reads outside the block", bad_reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
