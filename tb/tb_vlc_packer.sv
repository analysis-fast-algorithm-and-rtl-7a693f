// tb_vlc_packer: self-checking test of the 32-bit packer. Random codewords
// of random length (1..32, with gaps between them) are appended to a
// reference bit list; the words the packer emits, and the final flushed
// partial word, must reproduce that list bit for bit.
module tb_vlc_packer;
  logic clk = 0, rst_n = 0;
  logic in_valid, flush, oe;
  logic [31:0] codeword, out_buf;
  logic [4:0] codelen;
  logic [5:0] out_bits;
  int checks = 0, failures = 0;

  vlc_packer dut (.*);
  always #5 clk = ~clk;

  bit ref_bits [$];
  int nout = 0;
  int pos = 0;

  always @(posedge clk) begin
    if (rst_n && oe) begin
      for (int i = 0; i < int'(out_bits); i++) begin
        checks++;
        if (pos >= ref_bits.size() || out_buf[31 - i] != ref_bits[pos]) begin
          failures++;
          if (failures < 10) $display("bit %0d wrong", pos);
        end
        pos++;
      end
      nout++;
    end
  end

  initial begin
    in_valid = 0; flush = 0; codeword = 0; codelen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int len;
      len = (n % 50 == 7) ? 32 : $urandom_range(1, 31);
      in_valid = ($urandom_range(0, 5) != 0);
      codeword = $urandom;
      if (len < 32) codeword &= (32'd1 << len) - 1;
      codelen = 5'(len);
      if (in_valid) for (int i = len - 1; i >= 0; i--) ref_bits.push_back(codeword[i]);
      @(negedge clk);
    end
    in_valid = 0; flush = 1;
    @(negedge clk);
    flush = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (pos != ref_bits.size()) begin failures++; $display("got %0d of %0d bits", pos, ref_bits.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
