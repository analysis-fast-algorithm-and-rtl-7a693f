// tb_coef_buffer: self-checking test of the four-bank coefficient buffer.
// A whole macroblock of random levels is written column by column (with
// some bank enables off), then read back one coefficient per cycle in
// random order while new writes go on, checking the one-cycle latency.
module tb_coef_buffer;
  import intra_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0] wr_en;
  logic [6:0] wr_addr, rd_addr;
  coef_t wr_data [4], rd_data;
  logic rd_en;
  logic [1:0] rd_bank;

  coef_buffer dut (.*);

  coef_t sh [4][96];
  coef_t exp_prev;

  initial begin
    wr_en = 0; wr_addr = 0; rd_en = 0; rd_bank = 0; rd_addr = 0;
    for (int b = 0; b < 4; b++) wr_data[b] = 0;
    @(negedge clk);
    for (int w = 0; w < 96; w++) begin
      wr_en = 4'hf; wr_addr = 7'(w);
      for (int b = 0; b < 4; b++) begin wr_data[b] = coef_t'($urandom); sh[b][w] = wr_data[b]; end
      @(negedge clk);
    end
    for (int n = 0; n < 3000; n++) begin
      // issue a new read; the previous one must still be on rd_data
      rd_en = 1; rd_bank = 2'($urandom); rd_addr = 7'($urandom_range(0, 95));
      wr_en = 4'($urandom); wr_addr = 7'($urandom_range(0, 95));
      if (wr_addr == rd_addr) wr_en = 0;
      for (int b = 0; b < 4; b++) wr_data[b] = coef_t'($urandom);
      #1;
      if (n > 0) begin
        checks++;
        if (rd_data != exp_prev) begin
          failures++;
          if (failures < 10) $display("read %0d got %0d exp %0d", n, rd_data, exp_prev);
        end
      end
      exp_prev = sh[rd_bank][rd_addr];
      @(negedge clk);
      for (int b = 0; b < 4; b++) if (wr_en[b]) sh[b][wr_addr] = wr_data[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
