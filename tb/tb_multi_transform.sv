// tb_multi_transform: self-checking test of the 2-D multitransform engine.
// A stream of random 4x4 blocks, each with its own transform (DCT, IDCT or
// Hadamard), is pushed in back to back, one row per cycle, then four dummy
// rows flush the last block. Every output vector is compared with a 2-D
// reference (rows first, then columns) computed here, and the latency of
// four cycles from a block's first row to its first output is checked.
// One gap cycle (en low) in the middle checks the stall path.
module tb_multi_transform;
  import intra_pkg::*;

  localparam int NBLK = 40;
  logic clk = 0, rst_n = 0;
  logic en, de, oe;
  tr_sel_e sel;
  logic signed [15:0] x_in [4];
  logic signed [15:0] y_out [4];
  logic [1:0] out_idx;
  int checks = 0, failures = 0;

  multi_transform #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  int blk [NBLK][4][4];
  int expy [NBLK][4][4];
  tr_sel_e bsel [NBLK];
  int in_cycle [NBLK];

  function automatic int t1(tr_sel_e s, int v[4], int k);
    case (s)
      TR_IDCT: case (k)
        0: return v[0] + v[1] + v[2] + (v[3] >>> 1);
        1: return v[0] + (v[1] >>> 1) - v[2] - v[3];
        2: return v[0] - (v[1] >>> 1) - v[2] + v[3];
        default: return v[0] - v[1] + v[2] - (v[3] >>> 1);
      endcase
      TR_HAD: case (k)
        0: return v[0] + v[1] + v[2] + v[3];
        1: return v[0] + v[1] - v[2] - v[3];
        2: return v[0] - v[1] - v[2] + v[3];
        default: return v[0] - v[1] + v[2] - v[3];
      endcase
      default: case (k)
        0: return v[0] + v[1] + v[2] + v[3];
        1: return 2 * v[0] + v[1] - v[2] - 2 * v[3];
        2: return v[0] - v[1] - v[2] + v[3];
        default: return v[0] - 2 * v[1] + 2 * v[2] - v[3];
      endcase
    endcase
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  int ob = 0, orow = 0;
  always @(posedge clk) begin
    if (rst_n && oe) begin
      checks++;
      if (orow == 0 && cyc - in_cycle[ob] != 4 && ob != NBLK/2) begin
        failures++;
        $display("latency of block %0d is %0d", ob, cyc - in_cycle[ob]);
      end
      if (out_idx != 2'(orow)) begin failures++; $display("out_idx wrong"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(y_out[i]) != expy[ob][i][orow]) begin
          failures++;
          if (failures < 10) $display("blk %0d col %0d row %0d got %0d exp %0d", ob, orow, i, y_out[i], expy[ob][i][orow]);
        end
      end
      orow++;
      if (orow == 4) begin orow = 0; ob++; end
    end
  end

  initial begin
    int tmp [4][4];
    int v[4];
    for (int b = 0; b < NBLK; b++) begin
      bsel[b] = tr_sel_e'($urandom_range(0, 2));
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) blk[b][r][c] = int'($urandom_range(0, 510)) - 255;
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 4; c++) v[c] = blk[b][r][c];
        for (int c = 0; c < 4; c++) tmp[r][c] = t1(bsel[b], v, c);
      end
      for (int c = 0; c < 4; c++) begin
        for (int r = 0; r < 4; r++) v[r] = tmp[r][c];
        for (int r = 0; r < 4; r++) expy[b][r][c] = t1(bsel[b], v, r);
      end
    end
    en = 0; de = 0; sel = TR_DCT;
    for (int i = 0; i < 4; i++) x_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < NBLK + 1; b++) begin
      for (int r = 0; r < 4; r++) begin
        if (b == NBLK/2 && r == 2) begin
          en = 0; de = 0; @(negedge clk);
        end
        en = 1;
        de = (b < NBLK);
        sel = (b < NBLK) ? bsel[b] : TR_DCT;
        for (int i = 0; i < 4; i++) x_in[i] = (b < NBLK) ? 16'(blk[b][r][i]) : '0;
        if (r == 0 && b < NBLK) in_cycle[b] = cyc + 1;
        @(negedge clk);
      end
    end
    en = 0; de = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (ob != NBLK) begin failures++; $display("only %0d blocks out", ob); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
