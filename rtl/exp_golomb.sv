// exp_golomb: Exp-Golomb codeword generator for macroblock-header syntax
// elements.
//
// An unsigned value v (ue) is coded as M zeros, a one and the M low bits
// of v+1, where M = floor(log2(v+1)); in other words v+1 written in 2M+1
// bits. A signed value k (se) is first mapped to 2k-1 (k > 0) or -2k
// (k <= 0). The codeword is right-aligned in a 32-bit word and its length
// (1..31) is given in five bits, the packer's input format. Values are
// limited to 15 bits so the length stays within 31. Combinational. The
// document names Exp-Golomb coding of the header; the code itself is the
// H.264/AVC one. With 15-bit values the codeword, numerically v+1 or the
// mapped signed value plus one, is below 2^16, so codeword[31:16] is always
// zero; the port stays 32 bits wide to match the packer's input.
module exp_golomb (
  input  logic               is_signed,
  input  logic signed [15:0] value,      // ue: 0..32766, se: -16383..16383
  output logic [31:0]        codeword,
  output logic [4:0]         codelen
);

  logic [15:0] code_num;
  logic [16:0] v1;
  logic [3:0]  m;

  always_comb begin
    if (!is_signed)        code_num = 16'(value);
    else if (value > 0)    code_num = 16'((value <<< 1) - 16'sd1);
    else                   code_num = 16'(-(value <<< 1));
    v1 = 17'(code_num) + 17'd1;
    m  = '0;
    for (int b = 1; b < 16; b++)
      if (v1[b]) m = 4'(b);
    codeword = 32'(v1);
    codelen  = 5'({m, 1'b1});      // 2M + 1
  end

endmodule
