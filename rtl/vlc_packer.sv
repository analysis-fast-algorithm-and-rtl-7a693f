// vlc_packer: 32-bit bitstream packer with two ping-pong buffers.
//
// Variable-length codewords (right-aligned in 32 bits, length 1..31 on five
// bits, 0 meaning 32) are appended MSB first to the current 32-bit buffer.
// l_buf counts the bits already in it. If the codeword fits, it is shifted
// left by 32 - l_buf - len and ORed in. If it overflows, its upper part
// (codeword >> (l_buf + len - 32)) completes the current buffer, its
// remainder (codeword << (64 - l_buf - len)) starts the other buffer, the
// two buffers swap roles and the full one is offered on out_buf with oe
// for one cycle. One codeword per cycle, no back-pressure. flush emits the
// partly filled buffer (zero padded, out_bits = number of valid bits) and
// empties the packer; flush must come in a cycle without a codeword.
// Codeword bits above the given length must be zero.
//
// The ping-pong buffers, the right/left shifters by l_buf and 32 - l_buf,
// the remainder-length arithmetic and the OE signal follow the document's
// packer; flush, out_bits and the 0 = 32 length convention are this
// design's additions.
module vlc_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] codeword,
  input  logic [4:0]  codelen,
  input  logic        flush,
  output logic        oe,
  output logic [31:0] out_buf,
  output logic [5:0]  out_bits
);

  logic [31:0] buf_q [2];
  logic        sel_q;            // buffer being filled
  logic [5:0]  l_buf_q;          // bits already in it (0..31)

  logic [5:0]  len;
  logic [6:0]  total;
  logic [31:0] cur_next, oth_next;
  logic        full;

  always_comb begin
    len      = (codelen == 5'd0) ? 6'd32 : {1'b0, codelen};
    total    = 7'(l_buf_q) + (in_valid ? 7'(len) : 7'd0);
    full     = in_valid && (total >= 7'd32);
    cur_next = buf_q[sel_q];
    oth_next = '0;
    if (in_valid) begin
      if (!full)
        cur_next = buf_q[sel_q] | (codeword << (7'd32 - total));
      else begin
        cur_next = buf_q[sel_q] | 32'(64'(codeword) >> (total - 7'd32));
        oth_next = (total == 7'd32) ? 32'd0 : 32'(64'(codeword) << (7'd64 - total));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q[0] <= '0;
      buf_q[1] <= '0;
      sel_q    <= 1'b0;
      l_buf_q  <= '0;
      oe       <= 1'b0;
      out_buf  <= '0;
      out_bits <= '0;
    end else begin
      oe <= 1'b0;
      if (full) begin
        out_buf        <= cur_next;
        out_bits       <= 6'd32;
        oe             <= 1'b1;
        buf_q[sel_q]   <= '0;
        buf_q[~sel_q]  <= oth_next;
        sel_q          <= ~sel_q;
        l_buf_q        <= 6'(total - 7'd32);
      end else if (flush) begin
        if (total != 7'd0) begin
          out_buf  <= cur_next;
          out_bits <= 6'(total);
          oe       <= 1'b1;
        end
        buf_q[sel_q] <= '0;
        l_buf_q      <= '0;
      end else begin
        buf_q[sel_q] <= cur_next;
        if (in_valid) l_buf_q <= 6'(total);
      end
    end
  end

endmodule
