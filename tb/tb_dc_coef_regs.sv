// tb_dc_coef_regs: self-checking test of the I16MB dc register file.
// Random writes to (mode, block), reads of every row of every mode against
// a shadow copy, and the clear function.
module tb_dc_coef_regs;
  import intra_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic clear, wr_en;
  logic [1:0] wr_mode, rd_mode, rd_row;
  logic [3:0] wr_blk;
  coef_t wr_data, rd_data [4];

  dc_coef_regs dut (.*);
  coef_t sh [4][16];

  task automatic check_all();
    for (int m = 0; m < 4; m++)
      for (int r = 0; r < 4; r++) begin
        rd_mode = 2'(m); rd_row = 2'(r);
        #1;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (rd_data[c] != sh[m][4*r+c]) failures++;
        end
      end
    @(negedge clk);
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_mode = 0; wr_blk = 0; wr_data = 0; rd_mode = 0; rd_row = 0;
    for (int m = 0; m < 4; m++) for (int b = 0; b < 16; b++) sh[m][b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 50; n++) begin
        wr_en = ($urandom_range(0, 4) != 0); wr_mode = 2'($urandom); wr_blk = 4'($urandom);
        wr_data = coef_t'($urandom);
        @(negedge clk);
        if (wr_en) sh[wr_mode][wr_blk] = wr_data;
      end
      wr_en = 0;
      check_all();
      if (t % 5 == 4) begin
        clear = 1; @(negedge clk); clear = 0;
        for (int m = 0; m < 4; m++) for (int b = 0; b < 16; b++) sh[m][b] = 0;
        check_all();
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
