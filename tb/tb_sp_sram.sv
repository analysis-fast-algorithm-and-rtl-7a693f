// tb_sp_sram: self-checking test of the single-port SRAM at both sizes
// used in the design (96 x 32 and 64 x 32). Random writes and reads are
// checked against a shadow array, including the one-cycle read latency
// and that rdata holds during a write.
module tb_sp_sram;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic ce96, we96, ce64, we64;
  logic [6:0] a96;
  logic [5:0] a64;
  logic [31:0] wd96, rd96, wd64, rd64;

  sp_sram #(.DEPTH(96), .WIDTH(32)) u96 (.clk, .ce(ce96), .we(we96), .addr(a96), .wdata(wd96), .rdata(rd96));
  sp_sram #(.DEPTH(64), .WIDTH(32)) u64 (.clk, .ce(ce64), .we(we64), .addr(a64), .wdata(wd64), .rdata(rd64));

  logic [31:0] sh96 [96], sh64 [64];

  initial begin
    logic [31:0] last96, last64;
    ce96 = 0; we96 = 0; ce64 = 0; we64 = 0; a96 = 0; a64 = 0; wd96 = 0; wd64 = 0;
    @(negedge clk);
    for (int i = 0; i < 96; i++) begin
      ce96 = 1; we96 = 1; a96 = 7'(i); wd96 = $urandom; sh96[i] = wd96;
      ce64 = (i < 64); we64 = 1; a64 = 6'(i); wd64 = $urandom; if (i < 64) sh64[i] = wd64;
      @(negedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      ce96 = 1; we96 = ($urandom_range(0, 3) == 0); a96 = 7'($urandom_range(0, 95)); wd96 = $urandom;
      ce64 = ($urandom_range(0, 4) != 0); we64 = ($urandom_range(0, 3) == 0); a64 = 6'($urandom); wd64 = $urandom;
      last96 = rd96; last64 = rd64;
      @(negedge clk);
      checks += 2;
      if (we96) begin
        if (rd96 != last96) failures++;
        sh96[a96] = wd96;
      end else if (rd96 != sh96[a96]) failures++;
      if (ce64 && we64) begin
        if (rd64 != last64) failures++;
        sh64[a64] = wd64;
      end else if (!ce64) begin
        if (rd64 != last64) failures++;
      end else if (rd64 != sh64[a64]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
