// intra_pkg: types and constants shared by the H.264/AVC intra frame coder.
//
// Prediction modes are numbered as in H.264/AVC: I4MB modes 0..8 keep the
// standard's numbers, the four 16x16 (and chroma) modes follow as 9..12.
// Chroma prediction reuses the 16x16 codes together with a separate
// "chroma" flag on the predictor generator. Transform selection codes and
// pixel/coefficient widths used across the design live here as well.
package intra_pkg;

  typedef enum logic [3:0] {
    I4_V     = 4'd0,
    I4_H     = 4'd1,
    I4_DC    = 4'd2,
    I4_DDL   = 4'd3,
    I4_DDR   = 4'd4,
    I4_VR    = 4'd5,
    I4_HD    = 4'd6,
    I4_VL    = 4'd7,
    I4_HU    = 4'd8,
    I16_V    = 4'd9,
    I16_H    = 4'd10,
    I16_DC   = 4'd11,
    I16_PL   = 4'd12
  } pred_mode_e;

  // Transform selection of the multitransform engine.
  typedef enum logic [1:0] {
    TR_DCT  = 2'd0,
    TR_IDCT = 2'd1,
    TR_HAD  = 2'd2
  } tr_sel_e;

  localparam int PIX_W  = 8;   // pixel width
  localparam int COEF_W = 16;  // transform / coefficient width

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef pix_t  [3:0]               pix_row_t;   // one 4x1 row, [0] = leftmost
  typedef coef_t [3:0]               coef_row_t;

  // Neighbouring reconstructed pixels of a 4x4 block (labels of Fig. 3):
  // top[0..7] = A..H, left[0..3] = I..L, corner = M.
  typedef struct packed {
    pix_t [7:0] top;
    pix_t [3:0] left;
    pix_t       corner;
  } nb4_t;

endpackage
