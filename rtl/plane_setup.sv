// plane_setup: parameter and seed generation for the I16MB and chroma
// plane prediction modes.
//
// Computes, from the reconstructed row above and column left of the
// macroblock, the plane parameters
//   H = sum (k+1)*(p[N+k,-1] - p[N-2-k,-1]),  V likewise on the left column
//   a = 16*(p[-1,M] + p[M,-1]),  b = (s*H + 32) >> 6,  c = (s*V + 32) >> 6
// (luma: N = 8, k = 0..7, M = 15, s = 5; chroma 8x8: N = 4, k = 0..3, M = 7,
// s = 34) and the seed values A0..A3, the pre-rounded plane value of the top
// pixel of each four-column group: A_g = a + b*(4g - o) + c*(-o) + 16 with
// o = 7 (luma) or 3 (chroma). The weighted sums are formed without
// multipliers: a suffix sum S accumulates the differences from the outer
// end inward and H accumulates S, so (k+1)*d_k appears as d_k added k+1
// times. The scalings by 5, 34, 7 and 4 are shift-and-add.
//
// Timing: start (one cycle) begins an 8-cycle (chroma: 4-cycle)
// accumulation, one cycle for a, b, c and one for the seeds; done pulses in
// the cycle after, when all outputs are valid, and the results hold until the next start. seed_blk is
// combinational: the seed of the first row of the 4x4 block at (blk_x,
// blk_y), A_blk_x + 4*blk_y*c, used to start the predictor generator's
// accumulation at any block row.
//
// Equations (4)-(9), the idea of replacing the multiplications by repeated
// accumulation, the extra set-up adders and the four seeds follow the
// document; the suffix-sum schedule, the per-block seed output, the chroma
// constants (from the H.264/AVC plane equations) and the widths are this
// design's choices. All results share one 20-bit signed width, so a few
// output bits are constant: a = 16 x (sum of two pixels) is never negative
// and stays below 2^13, which leaves the top bits of plane_a at zero.
module plane_setup
  import intra_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               chroma,        // 8x8 chroma block instead of 16x16 luma
  input  pix_t               top_px  [17],  // [0] = p[-1,-1], [i+1] = p[i,-1]
  input  pix_t               left_px [17],  // [0] = p[-1,-1], [i+1] = p[-1,i]
  input  logic [1:0]         blk_x,
  input  logic [1:0]         blk_y,
  output logic               busy,
  output logic               done,
  output logic signed [19:0] plane_a,
  output logic signed [19:0] plane_b,
  output logic signed [19:0] plane_c,
  output logic signed [19:0] seed [4],
  output logic signed [19:0] seed_blk
);

  typedef logic signed [19:0] val_t;

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_ABC, S_SEED} state_e;
  state_e     state;
  logic [2:0] k;                 // accumulation step
  logic       chroma_q;
  val_t       sh_q, hh_q, sv_q, vv_q;   // suffix sums and weighted sums
  val_t       dh, dv;
  val_t       seed0_q;             // A0

  function automatic val_t px(pix_t p);
    return val_t'({12'd0, p});
  endfunction

  // differences of step k, taken from the outer end inward
  always_comb begin
    int j, n;
    n = chroma_q ? 4 : 8;
    j = n - 1 - int'(k);                    // weight of this difference is j+1
    dh = px(top_px[n + 1 + j])  - px(top_px[n - 1 - j]);
    dv = px(left_px[n + 1 + j]) - px(left_px[n - 1 - j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k        <= '0;
      chroma_q <= 1'b0;
      sh_q     <= '0;
      hh_q     <= '0;
      sv_q     <= '0;
      vv_q     <= '0;
      plane_a  <= '0;
      plane_b  <= '0;
      plane_c  <= '0;
      seed0_q  <= '0;
      done     <= 1'b0;
    end else begin
      done <= (state == S_SEED);
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_ACC;
          chroma_q <= chroma;
          k        <= '0;
          sh_q     <= '0;
          hh_q     <= '0;
          sv_q     <= '0;
          vv_q     <= '0;
        end
        S_ACC: begin
          sh_q <= sh_q + dh;
          hh_q <= hh_q + sh_q + dh;
          sv_q <= sv_q + dv;
          vv_q <= vv_q + sv_q + dv;
          k    <= k + 3'd1;
          if ((chroma_q && k == 3'd3) || k == 3'd7) state <= S_ABC;
        end
        S_ABC: begin
          if (chroma_q) begin
            plane_a <= (px(left_px[8])  + px(top_px[8]))  <<< 4;
            plane_b <= ((hh_q <<< 5) + (hh_q <<< 1) + 20'sd32) >>> 6;
            plane_c <= ((vv_q <<< 5) + (vv_q <<< 1) + 20'sd32) >>> 6;
          end else begin
            plane_a <= (px(left_px[16]) + px(top_px[16])) <<< 4;
            plane_b <= ((hh_q <<< 2) + hh_q + 20'sd32) >>> 6;
            plane_c <= ((vv_q <<< 2) + vv_q + 20'sd32) >>> 6;
          end
          state <= S_SEED;
        end
        S_SEED: begin
          // A0 = a - o*b - o*c + 16, A_(g+1) = A_g + 4b
          if (chroma_q)
            seed0_q <= plane_a - ((plane_b <<< 1) + plane_b)
                               - ((plane_c <<< 1) + plane_c) + 20'sd16;
          else
            seed0_q <= plane_a - ((plane_b <<< 3) - plane_b)
                               - ((plane_c <<< 3) - plane_c) + 20'sd16;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // remaining seeds follow A0 by steps of 4b
  always_comb begin
    val_t yc;
    seed[0] = seed0_q;
    for (int g = 1; g < 4; g++) seed[g] = seed[g-1] + (plane_b <<< 2);
    yc = (blk_y[1] ? (plane_c <<< 1) : '0) + (blk_y[0] ? plane_c : '0);
    seed_blk = seed[blk_x] + (yc <<< 2);
  end

  assign busy = (state != S_IDLE) || start;

endmodule
