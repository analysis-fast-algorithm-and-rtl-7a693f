// tb_quant_iq: self-checking test of the quantizer / inverse quantizer.
// Random coefficient vectors at random QP (0..51) and column index are
// quantized; the levels and dequantized values are compared with the
// H.264/AVC formulas evaluated here from the standard's MF and V tables,
// and the one-cycle latency is checked.
module tb_quant_iq;
  import intra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [5:0] qp;
  logic in_valid, out_valid;
  logic [1:0] idx, out_idx;
  coef_t w_in [4], z_out [4], w_out [4];
  int checks = 0, failures = 0;

  quant_iq dut (.*);
  always #5 clk = ~clk;

  localparam int MF [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                               '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  localparam int VV [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                               '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  initial begin
    int ez [4], ew [4];
    int q, cls, qb, f, m;
    in_valid = 0; qp = 0; idx = 0;
    for (int i = 0; i < 4; i++) w_in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      q = $urandom_range(0, 51);
      qp = 6'(q);
      idx = 2'($urandom);
      in_valid = 1;
      qb = 15 + q / 6;
      f = (1 << qb) / 3;
      for (int i = 0; i < 4; i++) begin
        int w;
        w = int'($urandom_range(0, 9000)) - 4500;
        if (n % 7 == 0) w = int'($urandom_range(0, 60)) - 30;
        w_in[i] = coef_t'(w);
        cls = ((i % 2) == 0 && (idx % 2) == 0) ? 0 : ((i % 2) == 1 && (idx % 2) == 1) ? 1 : 2;
        m = w < 0 ? -w : w;
        ez[i] = int'((longint'(m) * MF[q % 6][cls] + longint'(f)) >> qb);
        if (w < 0) ez[i] = -ez[i];
        ew[i] = (ez[i] * VV[q % 6][cls]) << (q / 6);
        ew[i] = int'(coef_t'(ew[i]));
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_idx != idx) begin failures++; $display("valid/idx wrong"); end
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(z_out[i]) != ez[i] || int'(w_out[i]) != ew[i]) begin
          failures++;
          if (failures < 10) $display("qp %0d i %0d w %0d: z %0d/%0d w' %0d/%0d", q, i, w_in[i], z_out[i], ez[i], w_out[i], ew[i]);
        end
      end
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
