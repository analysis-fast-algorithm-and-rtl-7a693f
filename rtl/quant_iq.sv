// quant_iq: four-parallel H.264/AVC quantizer and inverse quantizer for
// 4x4 residual blocks.
//
// Each cycle with in_valid a vector of four forward-transform coefficients
// W (one column of the 4x4 result, element i = row i, idx = column) is
// quantized and, in the same stage, inverse quantized:
//   Z  = sign(W) * ((|W| * MF(qp%6, pos) + f) >> (15 + qp/6)),
//        f = 2^(15 + qp/6) / 3 (intra rounding, no dead zone)
//   W' = Z * V(qp%6, pos) << (qp/6)
// pos is the class of the coefficient position: both indices even, both
// odd, or mixed (classes 0, 1, 2). MF and V are the standard's scaling
// tables, which fold the transform's norm into the quantizer. Results are
// registered: out_valid, z and w follow in_valid by one cycle. W' is the
// input of the inverse transform, whose (x + 32) >> 6 rounding completes
// the scaling.
//
// The document gives the function (scalar quantization, QP 0..51, scaling
// folded into Q) and places Q and IQ after the transform; the tables, the
// formula details, the single-stage timing and the four lanes (matching the
// four-parallel transform) come from the H.264/AVC standard and this
// design. The special dc paths of I16MB and chroma are not included.
module quant_iq
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  qp,          // 0..51
  input  logic        in_valid,
  input  logic [1:0]  idx,         // column index of the vector
  input  coef_t       w_in  [4],
  output logic        out_valid,
  output logic [1:0]  out_idx,
  output coef_t       z_out [4],   // quantized levels
  output coef_t       w_out [4]    // dequantized coefficients
);

  function automatic logic [13:0] mf(logic [2:0] r, logic [1:0] c);
    unique case (r)
      3'd0: return (c == 0) ? 14'd13107 : (c == 1) ? 14'd5243 : 14'd8066;
      3'd1: return (c == 0) ? 14'd11916 : (c == 1) ? 14'd4660 : 14'd7490;
      3'd2: return (c == 0) ? 14'd10082 : (c == 1) ? 14'd4194 : 14'd6554;
      3'd3: return (c == 0) ? 14'd9362  : (c == 1) ? 14'd3647 : 14'd5825;
      3'd4: return (c == 0) ? 14'd8192  : (c == 1) ? 14'd3355 : 14'd5243;
      default: return (c == 0) ? 14'd7282 : (c == 1) ? 14'd2893 : 14'd4559;
    endcase
  endfunction

  function automatic logic [4:0] vs(logic [2:0] r, logic [1:0] c);
    unique case (r)
      3'd0: return (c == 0) ? 5'd10 : (c == 1) ? 5'd16 : 5'd13;
      3'd1: return (c == 0) ? 5'd11 : (c == 1) ? 5'd18 : 5'd14;
      3'd2: return (c == 0) ? 5'd13 : (c == 1) ? 5'd20 : 5'd16;
      3'd3: return (c == 0) ? 5'd14 : (c == 1) ? 5'd23 : 5'd18;
      3'd4: return (c == 0) ? 5'd16 : (c == 1) ? 5'd25 : 5'd20;
      default: return (c == 0) ? 5'd18 : (c == 1) ? 5'd29 : 5'd23;
    endcase
  endfunction

  logic [3:0]  qp_div;
  logic [2:0]  qp_mod;
  logic [4:0]  qbits;
  logic [31:0] fq;

  always_comb begin
    qp_div = 4'd0;
    for (int d = 1; d <= 8; d++)
      if (qp >= 6'(6 * d)) qp_div = 4'(d);
    qp_mod = 3'(qp - 6'(6 * qp_div));
    qbits  = 5'd15 + 5'(qp_div);
    fq     = (32'd1 << qbits) / 32'd3;
  end

  coef_t z_c [4], w_c [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0]  cls;
      logic [15:0] mag;
      logic [31:0] prod;
      logic [15:0] zm;
      cls  = (i[0] == idx[0]) ? (i[0] ? 2'd1 : 2'd0) : 2'd2;
      mag  = w_in[i][15] ? 16'(-w_in[i]) : 16'(w_in[i]);
      prod = 32'(mag) * 32'(mf(qp_mod, cls)) + fq;
      zm   = 16'(prod >> qbits);
      z_c[i] = w_in[i][15] ? -coef_t'(zm) : coef_t'(zm);
      w_c[i] = coef_t'((32'(signed'(z_c[i])) * 32'(signed'({1'b0, vs(qp_mod, cls)}))) <<< qp_div);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      for (int i = 0; i < 4; i++) begin
        z_out[i] <= '0;
        w_out[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= idx;
        z_out   <= z_c;
        w_out   <= w_c;
      end
    end
  end

endmodule
