// tb_mode_decision: self-checking test of cost generation and mode choice.
// Each round feeds nine I4MB candidates (four coefficient vectors each,
// back to back) and then four I16MB candidates with ac_only set, with a
// random lambda and most probable mode. Every candidate cost and the final
// best mode/cost are compared with sums computed here.
module tb_mode_decision;
  import intra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_first, in_last, ac_only, cand_valid;
  logic [7:0] lambda;
  pred_mode_e mpm, in_mode, cand_mode, best_mode;
  coef_t coef [4];
  logic [19:0] cand_cost, best_cost;
  int checks = 0, failures = 0;

  mode_decision dut (.*);
  always #5 clk = ~clk;

  int exp_cost [13];
  int ncand = 0;
  always @(posedge clk) begin
    if (rst_n && cand_valid) begin
      checks++;
      if (int'(cand_cost) != exp_cost[cand_mode]) begin
        failures++;
        if (failures < 10) $display("mode %0d cost %0d exp %0d", cand_mode, cand_cost, exp_cost[cand_mode]);
      end
      ncand++;
    end
  end

  initial begin
    int bm, bc, v, s;
    start = 0; in_valid = 0; in_first = 0; in_last = 0; ac_only = 0;
    lambda = 0; mpm = I4_DC; in_mode = I4_V;
    for (int i = 0; i < 4; i++) coef[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      lambda = 8'($urandom_range(0, 60));
      mpm = pred_mode_e'($urandom_range(0, 8));
      bm = 0; bc = 32'h7fffffff;
      for (int m = 0; m < 13; m++) begin
        s = 0;
        in_mode = pred_mode_e'(m);
        ac_only = (m >= 9);
        for (int r = 0; r < 4; r++) begin
          start = (m == 0 && r == 0);
          in_valid = 1; in_first = (r == 0); in_last = (r == 3);
          for (int i = 0; i < 4; i++) begin
            v = int'($urandom_range(0, 400)) - 200;
            if ((n % 5) == 0) v = (i + r) % 3 - 1;
            coef[i] = coef_t'(v);
            if (!(m >= 9 && r == 0 && i == 0)) s += (v < 0 ? -v : v);
          end
          if (m < 9) begin
            if (r == 3) s += (m == int'(mpm)) ? int'(lambda) : 4 * int'(lambda);
          end
          if (r == 3) begin
            exp_cost[m] = s;
            if (s < bc) begin bc = s; bm = m; end
          end
          @(negedge clk);
        end
      end
      in_valid = 0; start = 0;
      @(negedge clk);
      checks++;
      if (int'(best_mode) != bm || int'(best_cost) != bc) begin
        failures++;
        if (failures < 10) $display("best %0d/%0d exp %0d/%0d", best_mode, best_cost, bm, bc);
      end
    end
    checks++;
    if (ncand != 200 * 13) begin failures++; $display("candidates %0d", ncand); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
