// hevc_encoder_top: all-intra HEVC encoder core for one 32x32 luma block
// (with its two 16x16 4:2:0 chroma blocks) at a time.
//
// Stage 1, early mode decision: early_mode_decision works on a 65x65 window
// of original luma (the block plus one row above and one column to the left)
// and returns the coding-unit tree as a list of (x, y, size, mode) records in
// z-order. The list is kept in cu_mem.
// Stage 2, reconstruction loop: for every coding unit the controller runs
// one luma transform block of the unit's size and two chroma blocks of half
// the size (for 4x4 units, one 4x4 chroma pair after the fourth unit, with
// the first unit's mode). Each transform block goes
//   rec_intra_pred -> forward transform_2d -> quantizer -> inverse
//   transform_2d -> reconstruction -> picture_memory,
// one 4x4 sub-block per cycle, and the next block starts after the last
// reconstructed sub-block is written back (intra prediction of a block needs
// the reconstructed samples of the previous one).
// Stage 3, entropy coding: the quantised levels of each transform block are
// committed to coeff_memory; coeff_syntax_gen (with block_ordering) turns
// them into residual syntax elements, binary_parser into bins,
// cabac_encoder into bytes and emulation_preventer into the payload. finish
// appends end_of_slice_segment_flag and flushes the coder.
// Interface: win_* loads the 65x65 luma window of early_mode_decision;
// raw_* loads the original samples of the block as 4x4 units (plane, unit
// address ((y mod 32)/4)*8 + (x mod 32)/4 in plane samples, samples);
// ctu_x/ctu_y give the block position in luma samples, qp the quantisation
// parameter. start runs one block and done pulses when its last transform
// block is reconstructed and its levels have been coded. rec_* shows every
// reconstructed sub-block (plane sample coordinates), cu_* every decided
// coding unit, bs_* the output bytes (bs_last on the slice's last byte).
// Timing: the stages work one after the other on a block, so a 32x32 block
// takes several thousand cycles (see the README), more than the document's
// pipelined encoder.
// Not built: the prediction-unit syntax (split flags, partition, intra
// modes) and its ordering with the residual syntax, so the byte stream holds
// the residual syntax only and is not a decodable HEVC slice.
// Following the document: the three stages and their order, the block
// chain of stage 2 and the modules within stage 3. This design's choices:
// stages run one after the other on a block (no overlap between blocks),
// one transform block per coding unit, chroma mode = luma mode (DM).
module hevc_encoder_top
  import hevc_pkg::*;
#(
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        win_we,
  input  logic [6:0]  win_row,
  input  logic [6:0]  win_col,
  input  pix_t        win_data,
  input  logic        raw_we,
  input  logic [1:0]  raw_plane,
  input  logic [5:0]  raw_addr,
  input  blk4_t       raw_blk,
  input  logic [10:0] ctu_x,
  input  logic [10:0] ctu_y,
  input  logic [5:0]  qp,
  input  logic        start,
  input  logic        finish,
  output logic        busy,
  output logic        done,
  output logic        cu_valid,
  output logic [2:0]  cu_x,
  output logic [2:0]  cu_y,
  output logic [2:0]  cu_log2,
  output logic [5:0]  cu_mode,
  output logic        rec_valid,
  output logic [1:0]  rec_plane,
  output logic [10:0] rec_x,
  output logic [10:0] rec_y,
  output blk4_t       rec_blk,
  output logic        bs_valid,
  output logic [7:0]  bs_byte,
  output logic        bs_last
);
  localparam int HW = $clog2(PIC_W / 4);
  localparam int VW = $clog2((PIC_H + 3) / 4);

  // ---------------------------------------------------------------- stage 1
  logic emd_start, emd_busy, emd_done;
  early_mode_decision u_emd (
    .clk, .rst_n, .win_we, .win_row, .win_col, .win_data,
    .start(emd_start), .busy(emd_busy),
    .cu_valid, .cu_x, .cu_y, .cu_log2, .cu_mode, .done(emd_done));

  typedef struct packed {
    logic [2:0] x;
    logic [2:0] y;
    logic [2:0] log2;
    logic [5:0] mode;
  } cu_rec_t;
  cu_rec_t    cu_mem [64];
  logic [6:0] cu_cnt;

  // ---------------------------------------------------------------- stage 2
  typedef enum logic [2:0] {S_IDLE, S_EMD, S_TU, S_WAIT, S_NEXT, S_DRAIN} state_e;
  state_e     state;
  logic [6:0] cu_i;
  logic [1:0] ph;            // 0 luma, 1 Cb, 2 Cr
  logic [5:0] first_mode;    // mode of the first 4x4 unit of an 8x8
  logic [6:0] rec_cnt;

  // current transform block
  logic        tu_go;
  logic [10:0] tx, ty;
  logic [2:0]  tlog2;
  logic [5:0]  tmode;
  logic        t_luma;
  logic        tu_skip;      // chroma of a 4x4 unit that is not the last of its 8x8
  always_comb begin
    cu_rec_t c;
    c       = cu_mem[cu_i[5:0]];
    t_luma  = (ph == 2'd0);
    tu_skip = 1'b0;
    tmode   = c.mode;
    if (ph == 2'd0) begin
      tx = ctu_x + 11'({c.x, 2'b0});
      ty = ctu_y + 11'({c.y, 2'b0});
      tlog2 = c.log2;
    end else if (c.log2 == 3'd2) begin
      tx = (ctu_x + 11'({c.x[2:1], 3'b0})) >> 1;
      ty = (ctu_y + 11'({c.y[2:1], 3'b0})) >> 1;
      tlog2 = 3'd2;
      tmode = first_mode;
      tu_skip = !(c.x[0] && c.y[0]);
    end else begin
      tx = (ctu_x + 11'({c.x, 2'b0})) >> 1;
      ty = (ctu_y + 11'({c.y, 2'b0})) >> 1;
      tlog2 = c.log2 - 3'd1;
    end
  end
  logic [6:0] tu_nsb;
  assign tu_nsb = 7'(1 << (2 * (int'(tlog2) - 2)));

  // picture memory and its users
  logic [1:0]  m_plane;
  logic [HW-1:0] h_raddr, h_waddr, c_rx, c_wx;
  logic [VW-1:0] v_raddr, v_waddr;
  pix_t        h_rdata [4], v_rdata [4], h_wdata [4], v_wdata [4];
  pix_t        c_rdata, c_wdata;
  logic [3:0]  c_ry, c_wy;
  logic        h_we, v_we, c_we;
  logic [1:0]  w_plane;
  logic [5:0]  raw_raddr;
  blk4_t       raw_rdata_l, raw_rdata;
  blk4_t       craw [2][64];
  blk4_t       craw_q;
  logic        raw_sel_q;

  picture_memory #(.PIC_W(PIC_W), .PIC_H(PIC_H), .PLANES(3)) u_pm (
    .clk,
    .h_rplane(m_plane), .h_raddr, .h_rdata,
    .h_we, .h_wplane(w_plane), .h_waddr, .h_wdata,
    .v_rplane(m_plane), .v_raddr, .v_rdata,
    .v_we, .v_wplane(w_plane), .v_waddr, .v_wdata,
    .c_rplane(m_plane), .c_rx, .c_ry, .c_rdata,
    .c_we, .c_wplane(w_plane), .c_wx, .c_wy, .c_wdata,
    .raw_we(raw_we && raw_plane == 2'd0), .raw_waddr(raw_addr), .raw_wdata(raw_blk),
    .raw_raddr, .raw_rdata(raw_rdata_l));

  // original chroma samples of the block, same registered read as luma
  always_ff @(posedge clk) begin
    if (raw_we && raw_plane != 2'd0) craw[raw_plane[1]][raw_addr] <= raw_blk;
    craw_q    <= craw[m_plane[1]][raw_raddr];
    raw_sel_q <= (m_plane != 2'd0);
  end
  assign raw_rdata = raw_sel_q ? craw_q : raw_rdata_l;

  logic        p_busy, p_valid, p_done;
  logic [5:0]  p_idx;
  blk4_t       p_pred;
  rblk4_t      p_resid;
  rec_intra_pred #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_pred (
    .clk, .rst_n, .start(tu_go), .x0(tx), .y0(ty), .log2n(tlog2), .mode(tmode),
    .is_luma(t_luma), .plane(ph), .busy(p_busy), .m_plane,
    .h_raddr, .h_rdata, .v_raddr, .v_rdata, .c_rx, .c_ry, .c_rdata,
    .raw_raddr, .raw_rdata,
    .out_valid(p_valid), .out_idx(p_idx), .pred(p_pred), .resid(p_resid), .done(p_done));

  cblk4_t      p_res_c;
  always_comb
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) p_res_c[i][j] = coef_t'(p_resid[i][j]);

  logic        use_dst;
  assign use_dst = t_luma && (tlog2 == 3'd2);

  logic        f_busy, f_valid, f_done;
  logic [5:0]  f_idx;
  cblk4_t      f_blk;
  transform_2d u_fwd (
    .clk, .rst_n, .start(tu_go), .log2n(tlog2), .inverse(1'b0), .use_dst,
    .busy(f_busy), .in_valid(p_valid), .in_idx(p_idx), .in_blk(p_res_c),
    .out_valid(f_valid), .out_idx(f_idx), .out_blk(f_blk), .done(f_done));

  logic        q_valid;
  logic [5:0]  q_idx;
  cblk4_t      q_level, q_deq;
  logic [1:0]  tscan;
  assign tscan = scan_idx(tmode, tlog2, t_luma);
  quantizer u_quant (
    .clk, .rst_n, .in_valid(f_valid), .in_idx(f_idx), .in_blk(f_blk),
    .qp, .log2n(tlog2), .scan(tscan), .sbh_en(1'b1),
    .out_valid(q_valid), .out_idx(q_idx), .level(q_level), .dequant(q_deq));

  logic        i_busy, i_valid, i_done;
  logic [5:0]  i_idx;
  cblk4_t      i_blk;
  transform_2d u_inv (
    .clk, .rst_n, .start(tu_go), .log2n(tlog2), .inverse(1'b1), .use_dst,
    .busy(i_busy), .in_valid(q_valid), .in_idx(q_idx), .in_blk(q_deq),
    .out_valid(i_valid), .out_idx(i_idx), .out_blk(i_blk), .done(i_done));

  logic        r_valid;
  logic [5:0]  r_idx;
  reconstruction #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_rec (
    .clk, .rst_n, .start(tu_go), .x0(tx), .y0(ty), .log2n(tlog2), .plane(ph),
    .pred_we(p_valid), .pred_idx(p_idx), .pred_blk(p_pred),
    .res_valid(i_valid), .res_idx(i_idx), .res_blk(i_blk),
    .rec_valid(r_valid), .rec_idx(r_idx), .rec_blk, .w_plane,
    .h_we, .h_waddr, .h_wdata, .v_we, .v_waddr, .v_wdata,
    .c_we, .c_wx, .c_wy, .c_wdata);

  // reconstructed sub-block position for observers
  logic [10:0] tx_q, ty_q;
  logic [2:0]  tlog2_q;
  always_comb begin
    int nsb;
    nsb       = 1 << (int'(tlog2_q) - 2);
    rec_valid = r_valid;
    rec_plane = w_plane;
    rec_x     = tx_q + 11'((int'(r_idx) % nsb) * 4);
    rec_y     = ty_q + 11'((int'(r_idx) / nsb) * 4);
  end

  // ---------------------------------------------------------------- stage 3
  logic        cm_wr_ready, cm_avail, cm_release, cm_nz;
  logic [15:0] cm_desc;
  logic [5:0]  cm_addr;
  cblk4_t      cm_blk;
  logic        ec_ready, tu_commit;
  assign ec_ready = cm_wr_ready;
  coeff_memory #(.DESC_W(16)) u_cmem (
    .clk, .rst_n, .wr_ready(cm_wr_ready), .wr_start(tu_go),
    .wr_valid(q_valid), .wr_idx(q_idx), .wr_blk(q_level),
    .wr_commit(tu_commit), .wr_desc({10'd0, tscan, t_luma, tlog2}),
    .rd_avail(cm_avail), .rd_desc(cm_desc), .rd_addr(cm_addr), .rd_blk(cm_blk),
    .rd_nz(cm_nz), .rd_release(cm_release));

  logic        se_valid, se_ready, tu_coded;
  syn_elem_t   se;
  coeff_syntax_gen u_csg (
    .clk, .rst_n, .rd_avail(cm_avail), .rd_desc(cm_desc), .rd_addr(cm_addr),
    .rd_blk(cm_blk), .rd_nz(cm_nz), .rd_release(cm_release),
    .se_valid, .se_ready, .se, .tu_done(tu_coded));

  // end of slice: end_of_slice_segment_flag = 1 after the last block
  logic        cm_coder_idle;
  logic        bin_valid, bin_ready;
  assign cm_coder_idle = !cm_avail && !bin_valid;
  logic        eos_pending;
  logic        bp_valid, bp_ready;
  syn_elem_t   bp_se;
  always_comb begin
    bp_valid = se_valid;
    bp_se    = se;
    if (eos_pending && !se_valid && cm_coder_idle) begin
      bp_valid = 1'b1;
      bp_se    = '{kind: SE_TERM, value: 16'd1, nbits: 5'd0, ctx: 8'd0, ctx_max_inc: 3'd0};
    end
  end
  assign se_ready = bp_ready;

  bin_t        bin;
  binary_parser u_bp (.clk, .rst_n, .se_valid(bp_valid), .se_ready(bp_ready), .se(bp_se),
                      .bin_valid, .bin_ready, .bin_out(bin));

  logic        cb_valid, cb_last, cb_idle;
  logic [7:0]  cb_byte;
  logic        cabac_init;
  cabac_encoder u_cabac (.clk, .rst_n, .init(cabac_init), .qp, .bin_valid, .bin_ready,
                         .bin_in(bin), .byte_valid(cb_valid), .byte_out(cb_byte),
                         .byte_last(cb_last), .idle(cb_idle));

  // the coder emits at most one byte every eight cycles, so the preventer's
  // single-cycle stall on an insertion never loses a byte
  logic        ep_in_ready, ep_inserted;
  emulation_preventer u_ep (.clk, .rst_n, .in_valid(cb_valid), .in_ready(ep_in_ready),
                            .in_byte(cb_byte), .in_last(cb_last),
                            .out_valid(bs_valid), .out_ready(1'b1), .out_byte(bs_byte),
                            .out_last(bs_last), .inserted(ep_inserted));

  // ---------------------------------------------------------------- control
  logic [6:0] q_cnt;
  logic       slice_open;
  assign tu_commit = q_valid && (q_cnt + 7'd1 == tu_nsb);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; emd_start <= 1'b0; tu_go <= 1'b0; done <= 1'b0;
      cu_cnt <= '0; cu_i <= '0; ph <= '0; rec_cnt <= '0; first_mode <= '0;
      q_cnt <= '0; slice_open <= 1'b0; eos_pending <= 1'b0; cabac_init <= 1'b0;
      tx_q <= '0; ty_q <= '0; tlog2_q <= 3'd2;
    end else begin
      emd_start <= 1'b0; tu_go <= 1'b0; done <= 1'b0; cabac_init <= 1'b0;
      if (q_valid) q_cnt <= tu_commit ? 7'd0 : q_cnt + 7'd1;
      if (finish && slice_open) eos_pending <= 1'b1;
      if (eos_pending && bp_valid && bp_ready && bp_se.kind == SE_TERM) begin
        eos_pending <= 1'b0; slice_open <= 1'b0;
      end
      if (cu_valid) begin
        cu_mem[cu_cnt[5:0]] <= '{x: cu_x, y: cu_y, log2: cu_log2, mode: cu_mode};
        cu_cnt <= cu_cnt + 7'd1;
      end
      if (r_valid) rec_cnt <= rec_cnt + 7'd1;
      case (state)
        S_IDLE: if (start) begin
          emd_start <= 1'b1; cu_cnt <= '0; state <= S_EMD;
          if (!slice_open) begin cabac_init <= 1'b1; slice_open <= 1'b1; end
        end
        S_EMD: if (emd_done) begin
          cu_i <= '0; ph <= '0; state <= S_TU;
        end
        S_TU: begin
          if (ph == 2'd0 && cu_mem[cu_i[5:0]].x[0] == 1'b0 && cu_mem[cu_i[5:0]].y[0] == 1'b0)
            first_mode <= cu_mem[cu_i[5:0]].mode;
          if (tu_skip) state <= S_NEXT;
          else if (ec_ready) begin
            tu_go <= 1'b1; rec_cnt <= '0;
            tx_q <= tx; ty_q <= ty; tlog2_q <= tlog2;
            state <= S_WAIT;
          end
        end
        S_WAIT: if (rec_cnt == tu_nsb) state <= S_NEXT;
        S_NEXT: begin
          if (ph == 2'd2 || (ph == 2'd0 && cu_mem[cu_i[5:0]].log2 == 3'd2 &&
                             !(cu_mem[cu_i[5:0]].x[0] && cu_mem[cu_i[5:0]].y[0]))) begin
            ph <= '0;
            if (cu_i + 7'd1 == cu_cnt) state <= S_DRAIN;
            else begin cu_i <= cu_i + 7'd1; state <= S_TU; end
          end else begin
            ph <= ph + 2'd1; state <= S_TU;
          end
        end
        S_DRAIN: if (cm_coder_idle) begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state != S_IDLE);

  a_one_tu: assert property (@(posedge clk) disable iff (!rst_n) tu_go |-> !p_busy && !f_busy && !i_busy);
endmodule
