// intra_pred_gen: four-parallel reconfigurable intra predictor generator.
//
// Four identical processing elements (PEs) each produce one predictor per
// cycle, so a 4x1 row of a 4x4 block is predicted every cycle. Every PE is
// a small adder tree: a multiplexer picks four operands, two first-level
// adders and one second-level adder sum them, a round-and-shift stage and
// a clip to 0..255 follow, and a final multiplexer chooses between that
// result and a bypass pixel. One register "D" per PE closes an
// accumulation loop. How the PEs are configured per mode:
//   * I4MB/I16MB/chroma vertical and horizontal: bypass path.
//   * I4MB directional modes 3..8: each PE filters a window of three
//     neighbours (a + 2b + c + 2) >> 2 or two neighbours (a + b + 1) >> 1,
//     taken from the edge L K J I M A B C D E F G H (Table VII of the
//     H.264/AVC predictor definitions).
//   * I4MB dc (also used per 4x4 block for chroma dc): PE1 sums A..D, PE2
//     sums I..L and PE0 adds both and rounds, all in one cycle.
//   * I16MB dc: a four-cycle set-up whose first cycle is the one
//     with dc16_start high. PEk accumulates
//     T(k,k+4,k+8,k+12), then L(k,k+4,k+8), then L(k+12); in the fourth
//     cycle PE0 adds the four partial sums and rounds. The value is kept in
//     a register and bypassed out while mode is I16_DC.
//   * I16MB/chroma plane: plane_load with a seed value S (which already
//     holds a + b*(x0-7) + c*(y0-7) + 16 for the block's first pixel) makes
//     PEi compute S + i*b; every later cycle with plane_step adds c to D.
//     Output is Clip1(D >> 5).
// Interface: combinational from mode/row/nb to pred, except the plane and
// I16 dc paths, which use the registers described above. top_avail and
// left_avail select the dc formula; 128 when neither side exists.
//
// Four PEs, the adder-tree PE, the bypass, the PE sharing for dc, the
// four-cycle I16MB dc set-up and the seed/accumulate plane decomposition
// follow the document. The separate dc16 result register, the 20-bit plane
// arithmetic and the port layout are this design's choices.
module intra_pred_gen
  import intra_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  pred_mode_e          mode,
  input  logic [1:0]          row,          // row y inside the 4x4 block
  input  nb4_t                nb,           // block neighbours (A..H, I..L, M)
  input  logic                top_avail,
  input  logic                left_avail,
  input  logic                dc16_start,   // start the I16MB dc set-up
  input  pix_t                mb_top  [16], // T00..T15
  input  pix_t                mb_left [16], // L00..L15
  input  logic                plane_load,   // first row of a plane column group
  input  logic                plane_step,   // following rows
  input  logic signed [19:0]  plane_seed,
  input  logic signed [19:0]  plane_b,
  input  logic signed [19:0]  plane_c,
  output pix_row_t            pred,
  output logic                dc16_busy
);

  typedef logic signed [19:0] op_t;

  // edge e[0..12] = L K J I M A B C D E F G H
  pix_t e [13];
  always_comb begin
    e[0] = nb.left[3];
    e[1] = nb.left[2];
    e[2] = nb.left[1];
    e[3] = nb.left[0];
    e[4] = nb.corner;
    for (int i = 0; i < 8; i++) e[5+i] = nb.top[i];
  end

  // PE configuration
  op_t        op   [4][4];
  logic [3:0] rnd  [4];
  logic [2:0] sh   [4];
  logic       byp  [4];
  pix_t       bpix [4];
  op_t        sum  [4];
  op_t        shifted [4];
  pix_t       clipped [4];

  op_t        d_q [4];          // the PEs' D registers
  logic [1:0] dc_cnt;
  logic       dc_run;
  logic       dc_act;           // a set-up cycle is being executed
  logic [1:0] dc_ph;            // its number, 0..3
  pix_t       dc16_q;

  function automatic op_t px(pix_t p);
    return op_t'({12'd0, p});
  endfunction

  // operand sets for the two filter shapes
  task automatic tap3(logic [1:0] pe, int k);
    op[pe][0] = px(e[k-1]);
    op[pe][1] = px(e[k]);
    op[pe][2] = px(e[k]);
    op[pe][3] = px(e[k+1]);
    rnd[pe] = 4'd2;
    sh[pe]  = 3'd2;
  endtask

  task automatic tap2(logic [1:0] pe, int k);
    op[pe][0] = px(e[k]);
    op[pe][1] = px(e[k+1]);
    op[pe][2] = '0;
    op[pe][3] = '0;
    rnd[pe] = 4'd1;
    sh[pe]  = 3'd1;
  endtask

  always_comb begin
    int y, z, t;
    y = int'(row);
    z = 0;
    t = 0;
    for (int pe = 0; pe < 4; pe++) begin
      for (int j = 0; j < 4; j++) op[pe][j] = '0;
      rnd[pe]  = '0;
      sh[pe]   = '0;
      byp[pe]  = 1'b0;
      bpix[pe] = '0;
    end
    for (int x = 0; x < 4; x++) begin
      unique case (mode)
        I4_V, I16_V: begin
          byp[x] = 1'b1; bpix[x] = nb.top[x];
        end
        I4_H, I16_H: begin
          byp[x] = 1'b1; bpix[x] = nb.left[y];
        end
        I16_DC: begin
          byp[x] = 1'b1; bpix[x] = dc16_q;
        end
        I4_DDL: begin
          if (x == 3 && y == 3) begin
            tap3(2'(x), 11);                   // (G + 3H + 2) >> 2
            op[x][0] = px(e[11]);
            op[x][1] = px(e[12]);
            op[x][2] = px(e[12]);
            op[x][3] = px(e[12]);
          end else tap3(2'(x), 6 + x + y);
        end
        I4_DDR: tap3(2'(x), 4 + x - y);
        I4_VR: begin
          z = 2 * x - y;
          t = x - (y >> 1);
          if (z >= 0 && (z % 2) == 0) tap2(2'(x), 4 + t);
          else if (z > 0)             tap3(2'(x), 4 + t);
          else if (z == -1)           tap3(2'(x), 4);
          else                        tap3(2'(x), 5 - y);
        end
        I4_HD: begin
          z = 2 * y - x;
          t = y - (x >> 1);
          if (z >= 0 && (z % 2) == 0) tap2(2'(x), 3 - t);
          else if (z > 0)             tap3(2'(x), 4 - t);
          else if (z == -1)           tap3(2'(x), 4);
          else                        tap3(2'(x), 3 + x);
        end
        I4_VL: begin
          if ((y % 2) == 0) tap2(2'(x), 5 + x + (y >> 1));
          else              tap3(2'(x), 6 + x + (y >> 1));
        end
        I4_HU: begin
          z = x + 2 * y;
          t = y + (x >> 1);
          if (z > 5) begin
            byp[x] = 1'b1; bpix[x] = nb.left[3];
          end else if (z == 5) begin
            tap3(2'(x), 1);                    // (K + 3L + 2) >> 2
            op[x][0] = px(e[1]);
            op[x][1] = px(e[0]);
            op[x][2] = px(e[0]);
            op[x][3] = px(e[0]);
          end else if ((z % 2) == 0) tap2(2'(x), 2 - t);
          else                       tap3(2'(x), 2 - t);
        end
        I16_PL: begin
          sh[x]  = 3'd5;
          rnd[x] = 4'd0;
          if (plane_load) begin
            op[x][0] = plane_seed;
            op[x][1] = (x >= 1) ? plane_b : '0;
            op[x][2] = (x >= 2) ? plane_b : '0;
            op[x][3] = (x >= 3) ? plane_b : '0;
          end else begin
            op[x][0] = d_q[x];
            op[x][3] = plane_c;
          end
        end
        default: ;   // I4_DC handled below
      endcase
    end

    // I4MB / chroma dc: PE1 sums the top, PE2 the left, PE0 combines.
    if (mode == I4_DC) begin
      for (int j = 0; j < 4; j++) begin
        op[1][j] = top_avail  ? px(nb.top[j])  : '0;
        op[2][j] = left_avail ? px(nb.left[j]) : '0;
      end
    end

    // I16MB dc set-up (overrides the PEs while running)
    if (dc_act) begin
      for (int k = 0; k < 4; k++) begin
        unique case (dc_ph)
          2'd0: for (int j = 0; j < 4; j++)
                  op[k][j] = top_avail ? px(mb_top[k + 4*j]) : '0;
          2'd1: begin
                  op[k][0] = d_q[k];
                  for (int j = 0; j < 3; j++)
                    op[k][j+1] = left_avail ? px(mb_left[k + 4*j]) : '0;
                end
          2'd2: begin
                  op[k][0] = d_q[k];
                  op[k][1] = left_avail ? px(mb_left[k + 12]) : '0;
                  op[k][2] = '0;
                  op[k][3] = '0;
                end
          default: for (int j = 0; j < 4; j++) op[k][j] = (k == 0) ? d_q[j] : '0;
        endcase
      end
    end
  end

  // PE adder trees
  always_comb begin
    logic [3:0] r0;
    logic [2:0] s0;
    for (int pe = 0; pe < 4; pe++)
      sum[pe] = (op[pe][0] + op[pe][1]) + (op[pe][2] + op[pe][3]);
    r0 = rnd[0];
    s0 = sh[0];
    // dc: PE0 takes the PE1 and PE2 sums
    if (mode == I4_DC && !dc_act) begin
      sum[0] = sum[1] + sum[2];
      unique case ({top_avail, left_avail})
        2'b11:   begin r0 = 4'd4; s0 = 3'd3; end
        2'b10,
        2'b01:   begin r0 = 4'd2; s0 = 3'd2; end
        default: begin r0 = 4'd0; s0 = 3'd0; end
      endcase
    end
    for (int pe = 0; pe < 4; pe++) begin
      if (pe == 0) shifted[pe] = (sum[pe] + op_t'(r0)) >>> s0;
      else         shifted[pe] = (sum[pe] + op_t'(rnd[pe])) >>> sh[pe];
      if (shifted[pe] < 0)        clipped[pe] = 8'd0;
      else if (shifted[pe] > 255) clipped[pe] = 8'd255;
      else                        clipped[pe] = shifted[pe][7:0];
    end
    for (int x = 0; x < 4; x++) begin
      if (mode == I4_DC)
        pred[x] = (top_avail || left_avail) ? clipped[0] : 8'd128;
      else if (byp[x])
        pred[x] = bpix[x];
      else
        pred[x] = clipped[x];
    end
  end

  // D registers, I16MB dc sequencing and result register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) d_q[k] <= '0;
      dc_cnt <= '0;
      dc_run <= 1'b0;
      dc16_q <= 8'd128;
    end else begin
      if (dc_act) begin
        for (int k = 0; k < 4; k++) d_q[k] <= sum[k];
        dc_cnt <= dc_ph + 2'd1;
        dc_run <= (dc_ph != 2'd3);
        if (dc_ph == 2'd3) begin
          unique case ({top_avail, left_avail})
            2'b11:   dc16_q <= 8'((sum[0] + 20'sd16) >>> 5);
            2'b10,
            2'b01:   dc16_q <= 8'((sum[0] + 20'sd8) >>> 4);
            default: dc16_q <= 8'd128;
          endcase
        end
      end else if (mode == I16_PL && (plane_load || plane_step)) begin
        for (int k = 0; k < 4; k++) d_q[k] <= sum[k];
      end
    end
  end

  assign dc_act    = dc_run | dc16_start;
  assign dc_ph     = dc_run ? dc_cnt : 2'd0;
  assign dc16_busy = dc_act;

endmodule
