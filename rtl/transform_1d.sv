// transform_1d: merged 4-point 1-D butterfly for the H.264/AVC integer
// forward DCT, inverse DCT and Hadamard transform.
//
// The three fast algorithms share one two-stage butterfly (four adders per
// stage, eight in all); only the scaling in front of the adders changes:
//   forward DCT : e = {x0+x3, x1+x2, x1-x2, x0-x3}
//                 y = {e0+e1, 2*e3+e2, e0-e1, e3-2*e2}
//   Hadamard    : same first stage, y = {e0+e1, e3+e2, e0-e1, e3-e2}
//   inverse DCT : e = {x0+x2, x0-x2, (x1>>>1)-x3, x1+(x3>>>1)}
//                 y = {e0+e3, e1+e2, e1-e2, e0-e3}
// Outputs are in natural order y[0..3]. The unit is purely combinational
// so a row is transformed in the cycle it is presented. The butterfly and
// its coefficient set {1,-1,2,-2,1/2,-1/2} follow the document; the data
// width W (default 16 bits, enough for 9-bit residues) is this design's
// choice, and results wrap to W bits.
module transform_1d
  import intra_pkg::*;
#(
  parameter int W = 16
) (
  input  tr_sel_e               sel,
  input  logic signed [W-1:0]   x [4],
  output logic signed [W-1:0]   y [4]
);

  logic signed [W-1:0] a0, a1, b0, b1;   // operands of the first stage
  logic signed [W-1:0] e0, e1, e2, e3;   // first-stage results

  always_comb begin
    // first stage: select and scale operand pairs
    if (sel == TR_IDCT) begin
      a0 = x[0];
      a1 = x[2];
      b0 = x[1] >>> 1;
      b1 = x[3] >>> 1;
      e0 = a0 + a1;
      e1 = a0 - a1;
      e2 = b0 - x[3];
      e3 = x[1] + b1;
    end else begin
      a0 = x[0];
      a1 = x[3];
      b0 = x[1];
      b1 = x[2];
      e0 = a0 + a1;
      e1 = b0 + b1;
      e2 = b0 - b1;
      e3 = a0 - a1;
    end
    // second stage
    unique case (sel)
      TR_IDCT: begin
        y[0] = e0 + e3;
        y[1] = e1 + e2;
        y[2] = e1 - e2;
        y[3] = e0 - e3;
      end
      TR_HAD: begin
        y[0] = e0 + e1;
        y[1] = e3 + e2;
        y[2] = e0 - e1;
        y[3] = e3 - e2;
      end
      default: begin
        y[0] = e0 + e1;
        y[1] = (e3 <<< 1) + e2;
        y[2] = e0 - e1;
        y[3] = e3 - (e2 <<< 1);
      end
    endcase
  end

endmodule
