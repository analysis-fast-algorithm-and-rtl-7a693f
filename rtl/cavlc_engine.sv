// cavlc_engine: sequential CAVLC coder for one 4x4 block of quantized
// levels, reading the coefficient buffer and producing codewords for the
// packer.
//
// Scan phase (16 reads, 17 cycles): the address generator reads the block
// in reverse zig-zag order, one level per cycle. Level detection pushes
// every nonzero level into the level FIFO and, from the second nonzero on,
// the number of zeros since the previous nonzero into the run FIFO (that
// is run_before of the previous one). Counters track the total number of
// coefficients, the trailing ones (up to three +-1 at the high-frequency
// end) and the total zeros below the last nonzero coefficient.
// Coding phase, one codeword per cycle:
//   coeff_token  TotalCoeff and TrailingOnes as a 6-bit fixed-length code
//                (TotalCoeff-1 on 4 bits, TrailingOnes on 2; 000011 when
//                the block is empty)
//   signs        of the trailing ones in one codeword, 1 = negative
//   levels       the remaining levels, each with the adaptive level VLC
//                (prefix/suffix, suffixLength 0..6 raised as levels grow)
//   total_zeros  4-bit fixed-length code, when TotalCoeff < 16
//   run_before   one code per coefficient while zeros are left, from the
//                zerosLeft-dependent run_before tables
// Codewords are right-aligned on codeword with their length (1..31) on
// codelen and cw_valid. done pulses after the last one; total_coeff then
// holds the block's nonzero count (for the neighbouring blocks' context).
//
// The scan/detect/FIFO/counter structure and the order of the symbols
// follow the document. The level code and run_before tables are those of
// H.264/AVC. The document does not list the coeff_token (VLC0-VLC2) or
// total_zeros tables; this engine uses the fixed-length codes described
// above for those two symbols, so its output is a complete, decodable
// CAVLC-structured code but not the exact H.264/AVC bitstream.
module cavlc_engine
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [6:0]  blk_word,     // word address of column 0 of the block
  // coefficient buffer read port
  output logic        rd_en,
  output logic [1:0]  rd_bank,
  output logic [6:0]  rd_addr,
  input  coef_t       rd_data,
  // codeword output
  output logic        cw_valid,
  output logic [31:0] codeword,
  output logic [4:0]  codelen,
  output logic        busy,
  output logic        done,
  output logic [4:0]  total_coeff
);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_CTOK, S_SIGN, S_LEVEL, S_TZ, S_RUN} state_e;
  state_e state;

  // zig-zag scan: raster position of scan index s
  function automatic logic [3:0] zigzag(logic [3:0] s);
    unique case (s)
      4'd0:  return 4'd0;   4'd1:  return 4'd1;   4'd2:  return 4'd4;   4'd3:  return 4'd8;
      4'd4:  return 4'd5;   4'd5:  return 4'd2;   4'd6:  return 4'd3;   4'd7:  return 4'd6;
      4'd8:  return 4'd9;   4'd9:  return 4'd12;  4'd10: return 4'd13;  4'd11: return 4'd10;
      4'd12: return 4'd7;   4'd13: return 4'd11;  4'd14: return 4'd14;  default: return 4'd15;
    endcase
  endfunction

  logic [4:0]  scan_cnt;          // reads issued
  logic        rd_pend;           // a read result arrives this cycle
  coef_t       lvl_fifo [16];
  logic [3:0]  run_fifo [16];
  logic [4:0]  tc_q;              // TotalCoeff
  logic [1:0]  t1_q;              // TrailingOnes
  logic        t1_open;
  logic [4:0]  tz_q;              // TotalZeros
  logic [4:0]  zc_q;              // zeros since the last nonzero
  logic [4:0]  idx_q;             // coding-phase index
  logic [2:0]  sl_q;              // suffixLength
  logic [4:0]  zl_q;              // zerosLeft
  logic        first_lvl_q;       // next level is the first non-trailing-one

  // ---------------- level VLC ----------------
  logic [31:0] lv_cw;
  logic [4:0]  lv_len;
  logic [2:0]  sl_next;
  always_comb begin
    coef_t       lv;
    logic [15:0] mag;
    logic [16:0] lcode;
    logic [4:0]  prefix;
    logic [3:0]  ssize;
    logic [16:0] suffix;
    lv     = lvl_fifo[idx_q[3:0]];
    mag    = lv[15] ? 16'(-lv) : 16'(lv);
    lcode  = lv[15] ? (17'(mag) << 1) - 17'd1 : (17'(mag) << 1) - 17'd2;
    if (first_lvl_q && t1_q < 2'd3) lcode = lcode - 17'd2;
    if (sl_q == 3'd0) begin
      if (lcode < 17'd14)      begin prefix = 5'(lcode); ssize = 4'd0;  suffix = '0; end
      else if (lcode < 17'd30) begin prefix = 5'd14; ssize = 4'd4;  suffix = lcode - 17'd14; end
      else                     begin prefix = 5'd15; ssize = 4'd12; suffix = lcode - 17'd30; end
    end else begin
      if (lcode < (17'd15 << sl_q)) begin
        prefix = 5'(lcode >> sl_q);
        ssize  = 4'(sl_q);
        suffix = lcode & ((17'd1 << sl_q) - 17'd1);
      end else begin
        prefix = 5'd15;
        ssize  = 4'd12;
        suffix = lcode - (17'd15 << sl_q);
      end
    end
    lv_cw  = (32'd1 << ssize) | 32'(suffix & 17'hFFF);
    lv_len = prefix + 5'd1 + 5'(ssize);
    // suffixLength adaptation
    sl_next = (sl_q == 3'd0) ? 3'd1 : sl_q;
    if (sl_next < 3'd6 && 17'(mag) > (17'd3 << (sl_next - 3'd1))) sl_next = sl_next + 3'd1;
  end

  // ---------------- run_before VLC ----------------
  logic [31:0] rb_cw;
  logic [4:0]  rb_len;
  always_comb begin
    logic [3:0] run;
    run = run_fifo[idx_q[3:0]];
    rb_cw = '0;
    rb_len = 5'd1;
    unique case (zl_q)
      5'd1: begin rb_len = 5'd1; rb_cw = (run == 0) ? 32'd1 : 32'd0; end
      5'd2: begin
        rb_len = (run == 0) ? 5'd1 : 5'd2;
        rb_cw  = (run == 0) ? 32'd1 : (run == 1) ? 32'd1 : 32'd0;
      end
      5'd3: begin rb_len = 5'd2; rb_cw = 32'(3 - run); end
      5'd4: begin
        rb_len = (run < 3) ? 5'd2 : 5'd3;
        rb_cw  = (run < 3) ? 32'(3 - run) : 32'(4 - run);
      end
      5'd5: begin
        rb_len = (run < 2) ? 5'd2 : 5'd3;
        rb_cw  = (run < 2) ? 32'(3 - run) : 32'(5 - run);
      end
      5'd6: begin
        rb_len = (run == 0) ? 5'd2 : 5'd3;
        unique case (run)
          4'd0: rb_cw = 32'b11;
          4'd1: rb_cw = 32'b000;
          4'd2: rb_cw = 32'b001;
          4'd3: rb_cw = 32'b011;
          4'd4: rb_cw = 32'b010;
          4'd5: rb_cw = 32'b101;
          default: rb_cw = 32'b100;
        endcase
      end
      default: begin
        if (run < 4'd7) begin rb_len = 5'd3; rb_cw = 32'(7 - run); end
        else            begin rb_len = 5'(run) - 5'd3; rb_cw = 32'd1; end
      end
    endcase
  end

  // signs of the trailing ones, 1 = negative
  logic [2:0] sg;
  always_comb for (int i = 0; i < 3; i++) sg[i] = lvl_fifo[i][15];

  // ---------------- control ----------------
  coef_t cur;
  assign cur = rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      scan_cnt    <= '0;
      rd_pend     <= 1'b0;
      tc_q        <= '0;
      t1_q        <= '0;
      t1_open     <= 1'b1;
      tz_q        <= '0;
      zc_q        <= '0;
      idx_q       <= '0;
      sl_q        <= '0;
      zl_q        <= '0;
      first_lvl_q <= 1'b0;
      cw_valid    <= 1'b0;
      codeword    <= '0;
      codelen     <= '0;
      done        <= 1'b0;
      total_coeff <= '0;
      for (int i = 0; i < 16; i++) begin
        lvl_fifo[i] <= '0;
        run_fifo[i] <= '0;
      end
    end else begin
      cw_valid <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_SCAN;
          scan_cnt <= '0;
          rd_pend  <= 1'b0;
          tc_q     <= '0;
          t1_q     <= '0;
          t1_open  <= 1'b1;
          tz_q     <= '0;
          zc_q     <= '0;
        end
        S_SCAN: begin
          if (scan_cnt != 5'd16) scan_cnt <= scan_cnt + 5'd1;
          rd_pend <= (scan_cnt != 5'd16);
          if (rd_pend) begin
            if (cur != 0) begin
              lvl_fifo[tc_q[3:0]] <= cur;
              if (tc_q != 0) begin
                run_fifo[4'(tc_q - 5'd1)] <= 4'(zc_q);
                tz_q <= tz_q + zc_q;
              end
              tc_q <= tc_q + 5'd1;
              if (t1_open && (cur == 1 || cur == -1) && t1_q != 2'd3) t1_q <= t1_q + 2'd1;
              else t1_open <= 1'b0;
              zc_q <= '0;
            end else if (tc_q != 0) begin
              zc_q <= zc_q + 5'd1;
            end
          end
          if (scan_cnt == 5'd16 && !rd_pend) begin
            state <= S_CTOK;
            tz_q  <= tz_q + zc_q;      // zeros below the lowest nonzero
          end
        end
        S_CTOK: begin
          cw_valid    <= 1'b1;
          codelen     <= 5'd6;
          codeword    <= (tc_q == 0) ? 32'b000011 : 32'({4'(tc_q - 5'd1), t1_q});
          total_coeff <= tc_q;
          idx_q       <= '0;
          sl_q        <= (tc_q > 5'd10 && t1_q < 2'd3) ? 3'd1 : 3'd0;
          first_lvl_q <= 1'b1;
          if (tc_q == 0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (t1_q != 0) state <= S_SIGN;
          else if (tc_q != 0)     state <= S_LEVEL;
        end
        S_SIGN: begin
          cw_valid <= 1'b1;
          codelen  <= 5'(t1_q);
          unique case (t1_q)
            2'd1:    codeword <= 32'(sg[0]);
            2'd2:    codeword <= 32'({sg[0], sg[1]});
            default: codeword <= 32'({sg[0], sg[1], sg[2]});
          endcase
          idx_q <= 5'(t1_q);
          state <= (5'(t1_q) == tc_q) ? S_TZ : S_LEVEL;
        end
        S_LEVEL: begin
          cw_valid    <= 1'b1;
          codeword    <= lv_cw;
          codelen     <= lv_len;
          sl_q        <= sl_next;
          first_lvl_q <= 1'b0;
          idx_q       <= idx_q + 5'd1;
          if (idx_q + 5'd1 == tc_q) state <= S_TZ;
        end
        S_TZ: begin
          idx_q <= '0;
          zl_q  <= tz_q;
          if (tc_q != 5'd16) begin
            cw_valid <= 1'b1;
            codeword <= 32'(tz_q);
            codelen  <= 5'd4;
          end
          if (tc_q == 5'd16 || tz_q == 0 || tc_q == 5'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_RUN;
        end
        S_RUN: begin
          cw_valid <= 1'b1;
          codeword <= rb_cw;
          codelen  <= rb_len;
          zl_q     <= zl_q - 5'(run_fifo[idx_q[3:0]]);
          idx_q    <= idx_q + 5'd1;
          if (zl_q == 5'(run_fifo[idx_q[3:0]]) || idx_q + 5'd2 == tc_q) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // reverse zig-zag address generation
  logic [3:0] pos;
  assign pos     = zigzag(4'(5'd15 - scan_cnt));
  assign rd_en   = (state == S_SCAN) && (scan_cnt != 5'd16);
  assign rd_bank = pos[3:2];                     // row
  assign rd_addr = blk_word + 7'(pos[1:0]);      // column
  assign busy    = (state != S_IDLE) || start;

endmodule
