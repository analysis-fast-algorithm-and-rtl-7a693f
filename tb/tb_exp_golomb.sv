// tb_exp_golomb: self-checking test of the Exp-Golomb coder. Each codeword
// is parsed back here bit by bit (count leading zeros, read the info bits)
// and must return the value, for all small values and random large ones,
// unsigned and signed.
module tb_exp_golomb;
  logic is_signed;
  logic signed [15:0] value;
  logic [31:0] codeword;
  logic [4:0] codelen;
  int checks = 0, failures = 0;

  exp_golomb dut (.*);

  function automatic int parse(logic [31:0] cw, int len, bit sgn);
    int lz = 0, info = 0, k;
    while (lz < len && cw[len - 1 - lz] == 1'b0) lz++;
    if (2 * lz + 1 != len) return -99999;
    for (int i = 0; i < lz; i++) info = (info << 1) | int'(cw[lz - 1 - i]);
    k = (1 << lz) - 1 + info;
    if (!sgn) return k;
    return (k % 2 == 1) ? (k + 1) / 2 : -(k / 2);
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int v;
      is_signed = n[0];
      if (n < 1000) v = is_signed ? (n / 2) - 250 : n / 2;
      else v = is_signed ? int'($urandom_range(0, 32766)) - 16383 : int'($urandom_range(0, 32766));
      value = 16'(v);
      #1;
      checks++;
      if (parse(codeword, int'(codelen), is_signed) != v) begin
        failures++;
        if (failures < 10) $display("v %0d signed %0d cw %h len %0d", v, is_signed, codeword, codelen);
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
