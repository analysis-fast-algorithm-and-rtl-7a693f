// mode_decision: DCT-based Lagrangian cost generation and best-mode
// selection for one 4x4 block.
//
// The candidates' forward-DCT coefficients arrive four per cycle, tagged
// with their prediction mode; in_last marks the fourth (last) vector of a
// candidate. The unit accumulates the distortion D = sum |Y| over the 16
// coefficients (the dc coefficient is left out when ac_only is set, as for
// the I16MB modes whose dc terms are costed after the dc Hadamard
// transform), adds the rate term lambda * R with R = 1 bit when an I4MB
// mode equals the most probable mode and 4 bits otherwise (R = 0 for other
// modes), and keeps the smallest J = D + lambda*R. A tie keeps the earlier
// candidate. start (with or before the first vector) clears the best.
//
// Timing: the candidate's cost appears on cand_cost with cand_valid in the
// cycle after its last vector; best_mode/best_cost are updated at the same
// time.
//
// The Lagrangian cost (1), the use of DCT coefficients instead of Hadamard
// ones for the distortion and the mode-information rate follow the
// document; the unscaled sum of magnitudes, the 1/4-bit rate values
// (those of H.264/AVC mode signalling) and the tie rule are this design's
// choices.
module mode_decision
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  lambda,
  input  pred_mode_e  mpm,          // most probable I4MB mode
  input  logic        in_valid,
  input  pred_mode_e  in_mode,
  input  logic        in_first,     // first vector of a candidate
  input  logic        in_last,      // last vector of a candidate
  input  logic        ac_only,      // skip the dc coefficient (first element of first vector)
  input  coef_t       coef [4],
  output logic        cand_valid,
  output pred_mode_e  cand_mode,
  output logic [19:0] cand_cost,
  output pred_mode_e  best_mode,
  output logic [19:0] best_cost
);

  logic [19:0] acc_q;
  logic [19:0] vec_sum;
  logic [19:0] total;
  logic [11:0] rate_term;

  always_comb begin
    vec_sum = '0;
    for (int i = 0; i < 4; i++) begin
      if (!(ac_only && in_first && i == 0))
        vec_sum += 20'(coef[i][15] ? 16'(-coef[i]) : 16'(coef[i]));
    end
    if (in_mode <= I4_HU)
      rate_term = (in_mode == mpm) ? 12'(lambda) : 12'(lambda) << 2;
    else
      rate_term = '0;
    total = (in_first ? 20'd0 : acc_q) + vec_sum + 20'(rate_term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      cand_valid <= 1'b0;
      cand_mode  <= I4_V;
      cand_cost  <= '0;
      best_mode  <= I4_V;
      best_cost  <= '1;
    end else begin
      cand_valid <= in_valid && in_last;
      if (start) best_cost <= '1;
      if (in_valid) begin
        acc_q <= (in_first ? 20'd0 : acc_q) + vec_sum;
        if (in_last) begin
          cand_mode <= in_mode;
          cand_cost <= total;
          if (total < (start ? 20'hFFFFF : best_cost)) begin
            best_cost <= total;
            best_mode <= in_mode;
          end
        end
      end
    end
  end

endmodule
