// intra_coder_top: H.264/AVC intra macroblock coder core (luma I4MB coding
// with I16MB evaluation), two-stage macroblock pipeline.
//
// Stage 1, the encoding loop, processes the macroblock whose pixels have
// been loaded into the current-macroblock buffer. It runs on 4-cycle slots
// aligned to the multitransform engine's block phase; in every slot one
// 4x4 block passes the engine as four rows, and its results leave during
// the next slot. For each 4x4 luma block, in coding order:
//   slots 0..8    the nine I4MB predictions (one 4x1 row per cycle from the
//                 four-PE predictor generator), residue, forward DCT; the
//                 coefficients go to the mode decision unit (cost
//                 sum|Y| + lambda * R, R = 1 or 4 bits from the most
//                 probable mode; modes whose neighbours are missing are
//                 not considered)
//   slots 9..12   the four I16MB predictions of the same 4x4 area (vertical,
//                 horizontal, dc, plane), DCT; their AC cost is summed per
//                 mode over the macroblock and their dc coefficients go to
//                 the dc coefficient registers; plane predictors are also
//                 written to the plane predictor buffer. These slots fill
//                 the latency of the I4MB decision, interleaving the two
//                 macroblock types
//   slot 13       the chosen I4MB mode again, DCT
//   slot 14       quantization / inverse quantization (one cycle); levels to
//                 the coefficient buffer, dequantized values to the best
//                 coefficient registers
//   slot 16       those registers read out by rows through the inverse DCT
//   slot 17       reconstruction (x + 32) >> 6 plus prediction, clipped,
//                 written to the neighbour registers and to the
//                 reconstructed-macroblock buffer
// After the 16 blocks, the 16 dc coefficients of each I16MB mode pass the
// Hadamard transform (five slots) and complete the I16MB costs; the best
// I16MB mode and whether it would beat the I4MB choice are reported.
// A macroblock takes about 16 x 18 x 4 + 40 = 1200 cycles.
//
// Stage 2, the bitstream unit, codes the previous macroblock while stage 1
// works on the next: a macroblock header (mb_type and mb_qp_delta as
// Exp-Golomb codes, then per 4x4 block the mode as a "same as most
// probable" flag or a 3-bit remaining-mode code), then the 16 blocks'
// residuals by the CAVLC engine reading the coefficient buffer. The packer
// emits 32-bit words; flush_req writes out the last partial word once the
// stage is idle.
//
// Interface: load the current macroblock (ld_sel 0, words 0..63: pixel row
// y, columns 4w..4w+3 at word 4y + w, pixel x in byte x), the upper
// neighbours (ld_sel 1, see dbbh) and the upper block modes (ld_sel 2,
// block column i in ld_data[4i +: 4]) while busy is low, then pulse
// mb_start with the availability of the left, upper and upper-right
// macroblocks. mb_done pulses when the reconstruction (rec_rd_*, word
// 4*blk + col holds column col of block blk in coding order, row i in
// byte i), the plane predictors (pp_rd_*, word 4*y + w), the modes and
// the costs are ready; they may be read while busy is low.
//
// What follows the document: the partition into encoding loop and
// bitstream unit with macroblock pipelining through a four-bank
// coefficient buffer, the I4MB/I16MB interleaving, the four-parallel
// predictor/transform/quantizer datapath, the transposition before the
// inverse transform, the DCT-based cost, dc registers with Hadamard, the
// memories (96x32 current and reconstructed buffers, 64x32 plane buffer,
// 4 x 96x16 coefficient banks) and the 32-bit packer. This design's own
// choices: the slot schedule, header layout, coding I4MB only (the I16MB
// result is evaluated and reported but not coded), no chroma processing,
// and the fixed-length coeff_token/total_zeros codes of the CAVLC engine.
//
// Some outputs of the sub-blocks are left open on purpose: the plane
// parameter a and the full seed array (the predictor generator takes the
// per-block seed), the mode decision unit's per-candidate cost trace, and
// the CAVLC engine's busy flag and coefficient count (stage 2 sequences on
// its done pulse, and no nC context is kept).
module intra_coder_top
  import intra_pkg::*;
#(
  parameter int CUR_WORDS   = 96,   // current macroblock buffer, 32-bit words
  parameter int REC_WORDS   = 96,   // reconstructed macroblock buffer
  parameter int PLANE_WORDS = 64,   // plane predictor buffer
  parameter int COEF_WORDS  = 96    // words per coefficient bank
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  qp,
  input  logic [7:0]  lambda,
  // bus loads
  input  logic        ld_en,
  input  logic [1:0]  ld_sel,
  input  logic [6:0]  ld_addr,
  input  logic [31:0] ld_data,
  // macroblock control
  input  logic        mb_start,
  input  logic        mb_left_avail,
  input  logic        mb_top_avail,
  input  logic        mb_topright_avail,
  output logic        busy,
  output logic        mb_done,
  // results of the last finished macroblock
  output pred_mode_e  mb_modes [16],    // raster order of 4x4 blocks
  output logic [23:0] i4_cost,
  output pred_mode_e  i16_mode,
  output logic [23:0] i16_cost,
  output logic        i16_better,
  input  logic        rec_rd_en,
  input  logic [6:0]  rec_rd_addr,
  output logic [31:0] rec_rd_data,
  input  logic        pp_rd_en,
  input  logic [5:0]  pp_rd_addr,
  output logic [31:0] pp_rd_data,
  // bitstream
  input  logic        flush_req,
  output logic        bs_busy,
  output logic        bs_valid,
  output logic [31:0] bs_word,
  output logic [5:0]  bs_bits
);

  // ======================= stage 1: encoding loop =======================
  typedef enum logic [2:0] {E_IDLE, E_INIT, E_BLK, E_HAD, E_DONE} est_e;
  est_e        est;
  logic [4:0]  slot;
  logic [3:0]  blk;              // coding-order block index
  logic [3:0]  init_cnt;
  logic [1:0]  phase;            // row within the slot (= engine phase)
  logic [1:0]  bx, by;
  logic        slot_end;

  assign bx = {blk[2], blk[0]};
  assign by = {blk[3], blk[1]};

  // ---------------- neighbours ----------------
  nb4_t  nb_blk, nb_pred;
  logic  blk_top_ok, blk_left_ok;
  pix_t  mb_top [16], mb_left [16], mb_corner;
  logic  mb_top_ok, mb_left_ok;
  logic  rec_we;
  pix_row_t rec_col;
  logic  [1:0] rec_c;

  dbbh u_dbbh (
    .clk, .rst_n,
    .ld_en(ld_en && ld_sel == 2'd1 && !busy), .ld_word(ld_addr[2:0]), .ld_data,
    .mb_start(mb_start && !busy), .mb_left_avail, .mb_top_avail, .mb_topright_avail,
    .blk_x(bx), .blk_y(by), .nb(nb_blk), .top_avail(blk_top_ok), .left_avail(blk_left_ok),
    .wr_en(rec_we), .wr_bx(bx), .wr_by(by), .wr_col(rec_c), .wr_pix(rec_col),
    .mb_top, .mb_left, .mb_corner, .mb_top_ok, .mb_left_ok
  );

  // ---------------- plane set-up ----------------
  pix_t top_px [17], left_px [17];
  logic plane_start, plane_busy, plane_done;
  logic signed [19:0] pl_b, pl_c, pl_seed_blk;
  always_comb begin
    top_px[0]  = mb_corner;
    left_px[0] = mb_corner;
    for (int i = 0; i < 16; i++) begin
      top_px[i+1]  = mb_top[i];
      left_px[i+1] = mb_left[i];
    end
  end

  plane_setup u_plane (
    .clk, .rst_n, .start(plane_start), .chroma(1'b0),
    .top_px, .left_px, .blk_x(bx), .blk_y(by),
    .busy(plane_busy), .done(plane_done),
    .plane_a(), .plane_b(pl_b), .plane_c(pl_c), .seed(), .seed_blk(pl_seed_blk)
  );

  // ---------------- prediction ----------------
  pred_mode_e  cur_mode, best4;
  logic        i16_slot;
  logic        pg_top_ok, pg_left_ok;
  logic        dc16_start, dc16_busy;
  pix_row_t    pred;

  assign i16_slot = (est == E_BLK) && slot >= 5'd9 && slot <= 5'd12;

  always_comb begin
    cur_mode = I4_V;
    if (est == E_BLK) begin
      if (slot <= 5'd8)       cur_mode = pred_mode_e'(slot[3:0]);
      else if (i16_slot)      cur_mode = pred_mode_e'(4'(slot) - 4'd9 + 4'(I16_V));
      else                    cur_mode = best4;
    end
    // I16MB modes take their edges from the macroblock's neighbours
    nb_pred = nb_blk;
    if (i16_slot)
      for (int i = 0; i < 4; i++) begin
        nb_pred.top[i]  = mb_top[{bx, 2'(i)}];
        nb_pred.left[i] = mb_left[{by, 2'(i)}];
      end
    pg_top_ok  = (est == E_BLK && !i16_slot) ? blk_top_ok  : mb_top_ok;
    pg_left_ok = (est == E_BLK && !i16_slot) ? blk_left_ok : mb_left_ok;
  end

  intra_pred_gen u_pred (
    .clk, .rst_n, .mode(cur_mode), .row(phase), .nb(nb_pred),
    .top_avail(pg_top_ok), .left_avail(pg_left_ok),
    .dc16_start, .mb_top, .mb_left,
    .plane_load(est == E_BLK && slot == 5'd12 && phase == 2'd0),
    .plane_step(est == E_BLK && slot == 5'd12 && phase != 2'd0),
    .plane_seed(pl_seed_blk), .plane_b(pl_b), .plane_c(pl_c),
    .pred, .dc16_busy
  );

  // ---------------- current macroblock buffer ----------------
  logic        cur_ce, cur_we;
  logic [6:0]  cur_addr;
  logic [31:0] cur_rdata;
  logic [3:0]  nxt_blk;
  logic [1:0]  nxt_row;
  always_comb begin
    nxt_row = phase + 2'd1;
    nxt_blk = (slot == 5'd17 && phase == 2'd3) ? blk + 4'd1 : blk;
    if (est == E_INIT) nxt_blk = 4'd0;
    cur_we   = ld_en && ld_sel == 2'd0 && !busy;
    cur_ce   = cur_we || est == E_INIT || est == E_BLK;
    cur_addr = cur_we ? ld_addr : {1'b0, nxt_blk[3], nxt_blk[1], nxt_row, nxt_blk[2], nxt_blk[0]};
  end

  sp_sram #(.DEPTH(CUR_WORDS), .WIDTH(32)) u_cur (
    .clk, .ce(cur_ce), .we(cur_we), .addr(cur_addr[$clog2(CUR_WORDS)-1:0]),
    .wdata(ld_data), .rdata(cur_rdata)
  );

  // ---------------- transform engine ----------------
  logic        tr_de;
  tr_sel_e     tr_sel;
  coef_t       tr_x [4], tr_y [4];
  logic        tr_oe;
  logic [1:0]  tr_idx;
  coef_t       bcr [4][4];         // best coefficient registers [row][col]
  coef_t       dc_rd [4];
  logic [2:0]  had_slot;

  always_comb begin
    tr_de  = 1'b0;
    tr_sel = TR_DCT;
    for (int i = 0; i < 4; i++) tr_x[i] = '0;
    if (est == E_BLK) begin
      if (slot <= 5'd13) begin
        tr_de = 1'b1;
        for (int i = 0; i < 4; i++)
          tr_x[i] = coef_t'({8'd0, cur_rdata[8*i +: 8]}) - coef_t'({8'd0, pred[i]});
      end else if (slot == 5'd16) begin
        tr_de  = 1'b1;
        tr_sel = TR_IDCT;
        for (int i = 0; i < 4; i++) tr_x[i] = bcr[phase][i];
      end
    end else if (est == E_HAD && had_slot < 3'd4) begin
      tr_de  = 1'b1;
      tr_sel = TR_HAD;
      for (int i = 0; i < 4; i++) tr_x[i] = dc_rd[i];
    end
  end

  multi_transform #(.W(16)) u_tr (
    .clk, .rst_n, .en(1'b1), .de(tr_de), .sel(tr_sel), .x_in(tr_x),
    .oe(tr_oe), .out_idx(tr_idx), .y_out(tr_y)
  );

  assign phase = tr_idx;          // the engine advances every cycle
  assign slot_end = (phase == 2'd3);

  // ---------------- mode decision ----------------
  pred_mode_e  mode_q [16];        // chosen modes, raster order
  pred_mode_e  left_modes [4], up_modes [4];
  pred_mode_e  mpm;
  logic [8:0]  allowed;
  logic        md_valid;
  pred_mode_e  md_mode;
  logic [19:0] md_best_cost;

  always_comb begin
    pred_mode_e ma, mbm;
    logic       a_ok, b_ok;
    if (bx != 2'd0)      begin ma = mode_q[{by, bx - 2'd1}]; a_ok = 1'b1; end
    else                 begin ma = left_modes[by];          a_ok = mb_left_ok; end
    if (by != 2'd0)      begin mbm = mode_q[{by - 2'd1, bx}]; b_ok = 1'b1; end
    else                 begin mbm = up_modes[bx];            b_ok = mb_top_ok; end
    if (!a_ok || !b_ok)  mpm = I4_DC;
    else                 mpm = (ma < mbm) ? ma : mbm;
    allowed[I4_V]   = blk_top_ok;
    allowed[I4_H]   = blk_left_ok;
    allowed[I4_DC]  = 1'b1;
    allowed[I4_DDL] = blk_top_ok;
    allowed[I4_DDR] = blk_top_ok && blk_left_ok;
    allowed[I4_VR]  = blk_top_ok && blk_left_ok;
    allowed[I4_HD]  = blk_top_ok && blk_left_ok;
    allowed[I4_VL]  = blk_top_ok;
    allowed[I4_HU]  = blk_left_ok;
    md_mode  = pred_mode_e'(4'(slot) - 4'd1);
    md_valid = (est == E_BLK) && tr_oe && slot >= 5'd1 && slot <= 5'd9 && allowed[4'(slot) - 4'd1];
  end

  mode_decision u_md (
    .clk, .rst_n, .start(est == E_BLK && slot == 5'd0 && phase == 2'd0),
    .lambda, .mpm, .in_valid(md_valid), .in_mode(md_mode),
    .in_first(tr_idx == 2'd0), .in_last(tr_idx == 2'd3), .ac_only(1'b0), .coef(tr_y),
    .cand_valid(), .cand_mode(), .cand_cost(),
    .best_mode(best4), .best_cost(md_best_cost)
  );

  // ---------------- I16MB costs and dc registers ----------------
  logic [23:0] ac16 [4], had16 [4];
  logic [19:0] vsum;
  logic        dc_we;
  logic [1:0]  dc_wmode;
  always_comb begin
    vsum = '0;
    for (int i = 0; i < 4; i++)
      if (!(est == E_BLK && tr_idx == 2'd0 && i == 0))
        vsum += 20'(tr_y[i][15] ? 16'(-tr_y[i]) : 16'(tr_y[i]));
    dc_we    = (est == E_BLK) && tr_oe && slot >= 5'd10 && slot <= 5'd13 && tr_idx == 2'd0;
    dc_wmode = 2'(slot - 5'd10);
  end

  dc_coef_regs u_dc (
    .clk, .rst_n, .clear(mb_start && !busy),
    .wr_en(dc_we), .wr_mode(dc_wmode), .wr_blk({by, bx}), .wr_data(tr_y[0]),
    .rd_mode(had_slot[1:0]), .rd_row(phase), .rd_data(dc_rd)
  );

  // ---------------- plane predictor buffer ----------------
  logic pp_we;
  assign pp_we = (est == E_BLK) && slot == 5'd12;
  sp_sram #(.DEPTH(PLANE_WORDS), .WIDTH(32)) u_pp (
    .clk, .ce(pp_we || pp_rd_en), .we(pp_we),
    .addr(pp_we ? {by, phase, bx} : pp_rd_addr),
    .wdata({pred[3], pred[2], pred[1], pred[0]}), .rdata(pp_rd_data)
  );

  // ---------------- quantization ----------------
  logic        q_valid;
  logic [1:0]  q_idx;
  coef_t       q_z [4], q_w [4];
  quant_iq u_q (
    .clk, .rst_n, .qp,
    .in_valid((est == E_BLK) && tr_oe && slot == 5'd14), .idx(tr_idx), .w_in(tr_y),
    .out_valid(q_valid), .out_idx(q_idx), .z_out(q_z), .w_out(q_w)
  );

  // coefficient buffer: bank = row, word = 4*block + column
  logic       cb_rd_en;
  logic [1:0] cb_rd_bank;
  logic [6:0] cb_rd_addr;
  coef_t      cb_rd_data;
  coef_buffer #(.WORDS(COEF_WORDS)) u_cb (
    .clk, .wr_en({4{q_valid}}), .wr_addr({1'b0, blk, q_idx}), .wr_data(q_z),
    .rd_en(cb_rd_en), .rd_bank(cb_rd_bank), .rd_addr(cb_rd_addr), .rd_data(cb_rd_data)
  );

  // ---------------- reconstruction ----------------
  pix_row_t    predbuf [4];
  logic [31:0] rec_wdata;
  always_comb begin
    rec_we = (est == E_BLK) && tr_oe && slot == 5'd17;
    rec_c  = tr_idx;
    for (int i = 0; i < 4; i++) begin
      logic signed [16:0] r;
      r = signed'(17'({9'd0, predbuf[i][rec_c]})) + ((17'(tr_y[i]) + 17'sd32) >>> 6);
      if (r < 0)          rec_col[i] = 8'd0;
      else if (r > 255)   rec_col[i] = 8'd255;
      else                rec_col[i] = r[7:0];
    end
    rec_wdata = {rec_col[3], rec_col[2], rec_col[1], rec_col[0]};
  end

  sp_sram #(.DEPTH(REC_WORDS), .WIDTH(32)) u_rec (
    .clk, .ce(rec_we || rec_rd_en), .we(rec_we),
    .addr(rec_we ? {1'b0, blk, rec_c} : rec_rd_addr[$clog2(REC_WORDS)-1:0]),
    .wdata(rec_wdata), .rdata(rec_rd_data)
  );

  // ---------------- I16MB decision ----------------
  logic [23:0] c16 [4];
  logic [23:0] bc;
  pred_mode_e  bm;
  always_comb begin
    for (int m = 0; m < 4; m++) c16[m] = ac16[m] + (had16[m] >> 2);
    bm = I16_DC;
    bc = c16[2];
    if (mb_top_ok && c16[0] < bc)                 begin bm = I16_V;  bc = c16[0]; end
    if (mb_left_ok && c16[1] < bc)                begin bm = I16_H;  bc = c16[1]; end
    if (mb_top_ok && mb_left_ok && c16[3] < bc)   begin bm = I16_PL; bc = c16[3]; end
  end

  // ---------------- encoding-loop sequencer ----------------
  logic [23:0] i4_acc;
  logic        hdr_flag_q [16];       // coding order
  logic [2:0]  hdr_rem_q  [16];
  logic        cur_flag   [16];
  logic [2:0]  cur_rem    [16];
  logic        cav_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est         <= E_IDLE;
      slot        <= '0;
      blk         <= '0;
      init_cnt    <= '0;
      had_slot    <= '0;
      plane_start <= 1'b0;
      dc16_start  <= 1'b0;
      mb_done     <= 1'b0;
      i4_acc      <= '0;
      i4_cost     <= '0;
      i16_cost    <= '0;
      i16_mode    <= I16_DC;
      i16_better  <= 1'b0;
      cav_req     <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        ac16[i]       <= '0;
        had16[i]      <= '0;
        left_modes[i] <= I4_DC;
        up_modes[i]   <= I4_DC;
        predbuf[i]    <= '0;
        for (int j = 0; j < 4; j++) bcr[i][j] <= '0;
      end
      for (int i = 0; i < 16; i++) begin
        mode_q[i]     <= I4_DC;
        mb_modes[i]   <= I4_DC;
        cur_flag[i]   <= 1'b0;
        cur_rem[i]    <= '0;
        hdr_flag_q[i] <= 1'b0;
        hdr_rem_q[i]  <= '0;
      end
    end else begin
      plane_start <= 1'b0;
      dc16_start  <= 1'b0;
      mb_done     <= 1'b0;
      cav_req     <= 1'b0;
      if (ld_en && ld_sel == 2'd2 && !busy)
        for (int i = 0; i < 4; i++) up_modes[i] <= pred_mode_e'(ld_data[4*i +: 4]);
      // results of the quantizer into the best coefficient registers
      if (q_valid)
        for (int i = 0; i < 4; i++) bcr[i][q_idx] <= q_w[i];
      unique case (est)
        E_IDLE: if (mb_start) begin
          est      <= E_INIT;
          init_cnt <= '0;
          i4_acc   <= '0;
          blk      <= '0;
          for (int i = 0; i < 4; i++) begin
            ac16[i]  <= '0;
            had16[i] <= '0;
          end
        end
        E_INIT: begin
          if (init_cnt != 4'd15) init_cnt <= init_cnt + 4'd1;
          if (init_cnt == 4'd0) begin
            plane_start <= 1'b1;
            dc16_start  <= 1'b1;
          end
          if (init_cnt > 4'd2 && !plane_busy && !plane_done && !dc16_busy && slot_end) begin
            est  <= E_BLK;
            slot <= '0;
          end
        end
        E_BLK: begin
          // I16MB AC costs of slots 9..12, visible one slot later
          if (tr_oe && slot >= 5'd10 && slot <= 5'd13)
            ac16[2'(slot - 5'd10)] <= ac16[2'(slot - 5'd10)] + 24'(vsum);
          if (slot == 5'd13) begin
            predbuf[phase] <= pred;
            if (phase == 2'd0) begin
              mode_q[{by, bx}] <= best4;
              cur_flag[blk]    <= (best4 == mpm);
              cur_rem[blk]     <= (best4 < mpm) ? 3'(best4) : 3'(4'(best4) - 4'd1);
              i4_acc           <= i4_acc + 24'(md_best_cost);
            end
          end
          if (slot_end) begin
            if (slot == 5'd17) begin
              slot <= '0;
              blk  <= blk + 4'd1;
              if (blk == 4'd15) begin
                est      <= E_HAD;
                had_slot <= '0;
              end
            end else slot <= slot + 5'd1;
          end
        end
        E_HAD: begin
          if (tr_oe && had_slot >= 3'd1)
            had16[2'(had_slot - 3'd1)] <= had16[2'(had_slot - 3'd1)] + 24'(vsum);
          if (slot_end) begin
            had_slot <= had_slot + 3'd1;
            if (had_slot == 3'd4) est <= E_DONE;
          end
        end
        E_DONE: begin
          i16_mode   <= bm;
          i16_cost   <= bc;
          i16_better <= bc < i4_acc;
          i4_cost    <= i4_acc;
          for (int i = 0; i < 16; i++) begin
            mb_modes[i]   <= mode_q[i];
            hdr_flag_q[i] <= cur_flag[i];
            hdr_rem_q[i]  <= cur_rem[i];
          end
          for (int i = 0; i < 4; i++) left_modes[i] <= mode_q[{2'(i), 2'd3}];
          mb_done <= 1'b1;
          cav_req <= 1'b1;
          est     <= E_IDLE;
        end
        default: est <= E_IDLE;
      endcase
    end
  end

  assign busy = (est != E_IDLE);

  // ======================= stage 2: bitstream unit =======================
  typedef enum logic [2:0] {C_IDLE, C_TYPE, C_MODES, C_QPD, C_START, C_WAIT, C_FLUSH} cst_e;
  cst_e        cst;
  logic [3:0]  cblk;
  logic        flush_pend;
  logic        cav_start, cav_done;
  logic        cav_cw_valid;
  logic [31:0] cav_cw;
  logic [4:0]  cav_len;
  logic [31:0] eg_cw;
  logic [4:0]  eg_len;
  logic        pk_valid, pk_flush;
  logic [31:0] pk_cw;
  logic [4:0]  pk_len;

  exp_golomb u_eg (
    .is_signed(cst == C_QPD), .value(16'sd0), .codeword(eg_cw), .codelen(eg_len)
  );

  cavlc_engine u_cavlc (
    .clk, .rst_n, .start(cav_start), .blk_word({1'b0, cblk, 2'b00}),
    .rd_en(cb_rd_en), .rd_bank(cb_rd_bank), .rd_addr(cb_rd_addr), .rd_data(cb_rd_data),
    .cw_valid(cav_cw_valid), .codeword(cav_cw), .codelen(cav_len),
    .busy(), .done(cav_done), .total_coeff()
  );

  assign cav_start = (cst == C_START);

  always_comb begin
    pk_valid = 1'b0;
    pk_cw    = '0;
    pk_len   = 5'd1;
    unique case (cst)
      C_TYPE, C_QPD: begin pk_valid = 1'b1; pk_cw = eg_cw; pk_len = eg_len; end
      C_MODES: begin
        pk_valid = 1'b1;
        if (hdr_flag_q[cblk]) begin pk_cw = 32'd1; pk_len = 5'd1; end
        else begin pk_cw = 32'({1'b0, hdr_rem_q[cblk]}); pk_len = 5'd4; end
      end
      default: begin
        pk_valid = cav_cw_valid;
        pk_cw    = cav_cw;
        pk_len   = cav_len;
      end
    endcase
    pk_flush = (cst == C_FLUSH);
  end

  vlc_packer u_pack (
    .clk, .rst_n, .in_valid(pk_valid), .codeword(pk_cw), .codelen(pk_len),
    .flush(pk_flush), .oe(bs_valid), .out_buf(bs_word), .out_bits(bs_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst        <= C_IDLE;
      cblk       <= '0;
      flush_pend <= 1'b0;
    end else begin
      if (flush_req) flush_pend <= 1'b1;
      unique case (cst)
        C_IDLE: begin
          cblk <= '0;
          if (cav_req)         cst <= C_TYPE;
          else if (flush_pend && !busy) cst <= C_FLUSH;
        end
        C_TYPE:  cst <= C_MODES;
        C_MODES: begin
          cblk <= cblk + 4'd1;
          if (cblk == 4'd15) cst <= C_QPD;
        end
        C_QPD:   cst <= C_START;
        C_START: cst <= C_WAIT;
        C_WAIT: if (cav_done) begin
          cblk <= cblk + 4'd1;
          cst  <= (cblk == 4'd15) ? C_IDLE : C_START;
        end
        C_FLUSH: begin
          flush_pend <= 1'b0;
          cst        <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  assign bs_busy = (cst != C_IDLE) || cav_req || flush_pend;

endmodule
