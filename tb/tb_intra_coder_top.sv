// tb_intra_coder_top: end-to-end testbench of intra_coder_top on a small frame.
//
// Instantiates the coder at its default parameters and the frame harness
// (intra_frame_harness), which drives a 96x64 frame (6x4 macroblocks) through it at QP 16,
// decodes the produced bitstream with a reference decoder and checks modes,
// reconstruction, plane predictors, quality, cycle count and that every
// mechanism of the design occurred. A watchdog ends a hung run as failed.
module tb_intra_coder_top;
  import intra_pkg::*;

  logic        clk = 0;
  logic        rst_n;
  logic [5:0]  qp;
  logic [7:0]  lambda;
  logic        ld_en;
  logic [1:0]  ld_sel;
  logic [6:0]  ld_addr;
  logic [31:0] ld_data;
  logic        mb_start, mb_left_avail, mb_top_avail, mb_topright_avail;
  logic        busy, mb_done;
  pred_mode_e  mb_modes [16];
  logic [23:0] i4_cost, i16_cost;
  pred_mode_e  i16_mode;
  logic        i16_better;
  logic        rec_rd_en;
  logic [6:0]  rec_rd_addr;
  logic [31:0] rec_rd_data;
  logic        pp_rd_en;
  logic [5:0]  pp_rd_addr;
  logic [31:0] pp_rd_data;
  logic        flush_req, bs_busy, bs_valid;
  logic [31:0] bs_word;
  logic [5:0]  bs_bits;

  always #5 clk = ~clk;

  intra_coder_top dut (.*);

  intra_frame_harness #(.MBW(6), .MBH(4), .QP(16), .LAMBDA(8), .MAX_MB_CYCLES(1300)) harness (.*);

  initial begin
    #100000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", harness.checks, harness.failures + 1);
    $finish;
  end

endmodule
