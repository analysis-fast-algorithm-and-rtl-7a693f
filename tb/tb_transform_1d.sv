// tb_transform_1d: self-checking test of the merged 1-D butterfly.
// Random 4-point vectors are pushed through each of the three transforms
// and compared with the matrix form of H.264/AVC forward DCT and Hadamard
// and the standard's inverse-DCT equations, written out here directly.
module tb_transform_1d;
  import intra_pkg::*;

  tr_sel_e sel;
  logic signed [15:0] x [4];
  logic signed [15:0] y [4];
  int checks = 0, failures = 0;

  transform_1d #(.W(16)) dut (.sel(sel), .x(x), .y(y));

  localparam int CF [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  localparam int HD [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};

  function automatic int ref_out(tr_sel_e s, int v[4], int k);
    int acc = 0;
    if (s == TR_IDCT) begin
      case (k)
        0: return v[0] + v[1] + v[2] + (v[3] >>> 1);
        1: return v[0] + (v[1] >>> 1) - v[2] - v[3];
        2: return v[0] - (v[1] >>> 1) - v[2] + v[3];
        default: return v[0] - v[1] + v[2] - (v[3] >>> 1);
      endcase
    end
    for (int j = 0; j < 4; j++) acc += (s == TR_HAD ? HD[k][j] : CF[k][j]) * v[j];
    return acc;
  endfunction

  initial begin
    int v[4];
    for (int n = 0; n < 600; n++) begin
      sel = tr_sel_e'(n % 3);
      for (int j = 0; j < 4; j++) begin
        v[j] = int'($urandom_range(0, 1000)) - 500;
        x[j] = 16'(v[j]);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(y[k]) != ref_out(sel, v, k)) begin
          failures++;
          if (failures < 10) $display("mismatch sel=%0d k=%0d got %0d exp %0d", sel, k, y[k], ref_out(sel, v, k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
