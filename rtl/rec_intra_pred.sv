// rec_intra_pred: intra prediction inside the reconstruction loop. Given the
// position, size (4..32), mode and plane of a transform block, it gathers the
// reconstructed neighbours from picture_memory, prepares them as the HEVC
// standard requires, and produces the prediction and the residual
// (original - prediction) one 4x4 sub-block per cycle.
//
// Phases after start:
//   LOAD   N/2+1 cycles: one 4-sample word from the horizontal buffer (above,
//          above-right) and one from the vertical buffer (left, below-left)
//          per cycle, plus the corner sample; availability of each 4-sample
//          group is derived from the picture edges and the z-order of the
//          32x32 (luma) / 16x16 (chroma) block.
//   SUBST  1 cycle: substitution of unavailable references.
//   FILTER 1 cycle: [1 2 1] smoothing or, for 32x32 luma, strong bilinear
//          smoothing, luma only, decided by mode and size as in HEVC.
//   EXT    1 cycle: main reference selection / projection for negative angles
//          and the DC value (adder tree).
//   PRED   one 4x4 sub-block per cycle in raster order, through a 6-stage
//          pipeline: sub-block address and raw-block read; sample weights;
//          planar / angular / DC prediction; DC and horizontal/vertical edge
//          post-filters (luma, N < 32); clip; residual. Latency 6 cycles.
// Interface: start with x0/y0 (plane samples), log2n, mode, is_luma, plane;
// busy until done. out_valid carries out_idx (raster sub-block index),
// pred and resid. The raw block must be in picture_memory at unit address
// (y/4)*8 + x/4 of the block's position inside its 32x32 area.
// Phases, 4x4-per-cycle output and 6-cycle latency follow the encoder; the
// single-cycle substitution and filtering (the encoder spreads them over
// cycles at 8 samples per cycle) and the use of multipliers for the planar
// weights are this design's simplifications.
module rec_intra_pred
  import hevc_pkg::*;
#(
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [10:0] x0,
  input  logic [10:0] y0,
  input  logic [2:0]  log2n,
  input  logic [5:0]  mode,
  input  logic        is_luma,
  input  logic [1:0]  plane,
  output logic        busy,
  // picture memory read side
  output logic [1:0]  m_plane,
  output logic [$clog2(PIC_W/4)-1:0] h_raddr,
  input  pix_t        h_rdata [4],
  output logic [$clog2((PIC_H+3)/4)-1:0] v_raddr,
  input  pix_t        v_rdata [4],
  output logic [$clog2(PIC_W/4)-1:0] c_rx,
  output logic [3:0]  c_ry,
  input  pix_t        c_rdata,
  output logic [5:0]  raw_raddr,
  input  blk4_t       raw_rdata,
  // output
  output logic        out_valid,
  output logic [5:0]  out_idx,
  output blk4_t       pred,
  output rblk4_t      resid,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SUBST, S_FILTER, S_EXT, S_PRED, S_DRAIN} state_e;
  state_e state;

  logic [10:0] bx, by;
  logic [2:0]  lg;
  logic [5:0]  md;
  logic        lum;
  logic [5:0]  k;          // load word / sub-block counter
  int          nn;         // block size
  assign nn = 1 << lg;

  pix_t T [65];            // T[0] corner, T[1..2N] above row
  pix_t L [65];            // L[0] corner, L[1..2N] left column
  logic avT [65], avL [65];
  pix_t refm [-32:64];     // main reference after projection
  logic [7:0] dcv;

  // ---------------------------------------------------------------- availability
  function automatic logic [5:0] zidx(input int x, input int y);
    logic [2:0] ux, uy;
    ux = 3'(x >> 2); uy = 3'(y >> 2);
    return {uy[2], ux[2], uy[1], ux[1], uy[0], ux[0]};
  endfunction

  function automatic logic avail(input int nx, input int ny, input int cx, input int cy,
                                 input logic luma);
    int ctu, pw, ph;
    ctu = luma ? 32 : 16;
    pw  = luma ? PIC_W : PIC_W / 2;
    ph  = luma ? PIC_H : PIC_H / 2;
    if (nx < 0 || ny < 0 || nx >= pw || ny >= ph) return 1'b0;
    if (ny / ctu < cy / ctu) return 1'b1;
    if (ny / ctu > cy / ctu) return 1'b0;
    if (nx / ctu < cx / ctu) return 1'b1;
    if (nx / ctu > cx / ctu) return 1'b0;
    return zidx(nx % ctu, ny % ctu) < zidx(cx % ctu, cy % ctu);
  endfunction

  // ---------------------------------------------------------------- substitution
  pix_t sT [65], sL [65];
  always_comb begin
    logic any;
    pix_t last;
    any = 1'b0;
    last = 8'd128;
    for (int i = 0; i < 65; i++) begin sT[i] = T[i]; sL[i] = L[i]; end
    for (int i = 64; i >= 1; i--)
      if (i <= 2*nn && avL[i] && !any) begin any = 1'b1; last = L[i]; end
    if (!any && avT[0]) begin any = 1'b1; last = T[0]; end
    for (int i = 1; i <= 64; i++)
      if (i <= 2*nn && avT[i] && !any) begin any = 1'b1; last = T[i]; end
    // 'last' is now the first available sample in scan order (or 128)
    for (int i = 64; i >= 1; i--)
      if (i <= 2*nn) begin
        if (avL[i]) last = L[i];
        sL[i] = last;
      end
    if (avT[0]) last = T[0];
    sT[0] = last; sL[0] = last;
    for (int i = 1; i <= 64; i++)
      if (i <= 2*nn) begin
        if (avT[i]) last = T[i];
        sT[i] = last;
      end
  end

  // ---------------------------------------------------------------- filtering
  pix_t fT [65], fL [65];
  always_comb begin
    int d, thr;
    logic filt, strong_f;
    d = (int'(md) > 26) ? int'(md) - 26 : 26 - int'(md);
    if (((int'(md) > 10) ? int'(md) - 10 : 10 - int'(md)) < d)
      d = (int'(md) > 10) ? int'(md) - 10 : 10 - int'(md);
    thr  = (lg == 3'd3) ? 7 : (lg == 3'd4) ? 1 : 0;
    filt = lum && md != 6'd1 && lg != 3'd2 && d > thr;
    strong_f = filt && lg == 3'd5 &&
      ((int'(T[0]) + int'(T[64]) - 2*int'(T[32])) < 8) && ((int'(T[0]) + int'(T[64]) - 2*int'(T[32])) > -8) &&
      ((int'(L[0]) + int'(L[64]) - 2*int'(L[32])) < 8) && ((int'(L[0]) + int'(L[64]) - 2*int'(L[32])) > -8);
    for (int i = 0; i < 65; i++) begin fT[i] = T[i]; fL[i] = L[i]; end
    if (strong_f) begin
      for (int i = 1; i < 64; i++) begin
        fT[i] = pix_t'(((64 - i) * int'(T[0]) + i * int'(T[64]) + 32) >> 6);
        fL[i] = pix_t'(((64 - i) * int'(L[0]) + i * int'(L[64]) + 32) >> 6);
      end
    end else if (filt) begin
      fT[0] = pix_t'((int'(L[1]) + 2*int'(T[0]) + int'(T[1]) + 2) >> 2);
      fL[0] = fT[0];
      for (int i = 1; i < 64; i++)
        if (i < 2*nn) begin
          fT[i] = pix_t'((int'(T[i-1]) + 2*int'(T[i]) + int'(T[i+1]) + 2) >> 2);
          fL[i] = pix_t'((int'(L[i-1]) + 2*int'(L[i]) + int'(L[i+1]) + 2) >> 2);
        end
    end
  end

  // ---------------------------------------------------------------- projection
  int ang, inva;
  assign ang  = intra_angle(int'(md));
  assign inva = inv_angle(ang);
  pix_t xref [-32:64];
  pix_t xside [65];
  logic [7:0] xdc;
  always_comb begin
    int s, lim, si;
    s = 0;
    si = 0;
    for (int i = 1; i <= 32; i++) if (i <= nn) s += int'(T[i]) + int'(L[i]);
    xdc = 8'((s + nn) >> (lg + 3'd1));
    for (int i = 0; i <= 64; i++) begin
      xref[i]  = (md >= 6'd18) ? T[i] : L[i];
      xside[i] = (md >= 6'd18) ? L[i] : T[i];
    end
    for (int i = -32; i < 0; i++) xref[i] = xref[0];
    lim = (nn * ang) >>> 5;
    if (lim < -1)
      for (int i = -32; i < 0; i++)
        if (i >= lim) begin
          si = ((i * inva) + 128) >>> 8;
          xref[i] = xside[(si > 64) ? 64 : si];
        end
  end

  // ---------------------------------------------------------------- prediction pipeline
  logic       v1, v2, v3, v4, v5;
  logic [5:0] i1, i2, i3, i4, i5;
  blk4_t      p2, p3, p4, p5;
  blk4_t      o3, o4, o5;
  logic [2:0] sx1, sy1;

  // stage 2 (combinational on stage-1 registers): raw prediction
  blk4_t praw;
  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int x, y, pos, ii, ff, a, b, v, dm;
        pos = 0; ii = 0; ff = 0; a = 0; b = 0; dm = 0;
        x = int'(sx1) * 4 + j;
        y = int'(sy1) * 4 + i;
        if (md == 6'd0) begin
          v = ((nn - 1 - x) * int'(L[y+1]) + (x + 1) * int'(T[nn+1]) +
               (nn - 1 - y) * int'(T[x+1]) + (y + 1) * int'(L[nn+1]) + nn) >> (lg + 3'd1);
        end else if (md == 6'd1) begin
          v = int'(dcv);
        end else begin
          dm  = (md >= 6'd18) ? x : y;
          pos = (((md >= 6'd18) ? y : x) + 1) * ang;
          ii  = pos >>> 5;
          ff  = pos & 31;
          a   = int'(refm[dm + ii + 1]);
          b   = (dm + ii + 2 <= 64) ? int'(refm[dm + ii + 2]) : a;
          v   = ((32 - ff) * a + ff * b + 16) >> 5;
        end
        praw[i][j] = pix_t'(v);
      end
  end

  // stage 3: post-filters on the registered raw prediction
  blk4_t pflt;
  logic [2:0] sx2, sy2;
  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int x, y, v;
        x = int'(sx2) * 4 + j;
        y = int'(sy2) * 4 + i;
        v = int'(p2[i][j]);
        if (lum && lg != 3'd5) begin
          if (md == 6'd1) begin
            if (x == 0 && y == 0) v = (int'(L[1]) + 2*int'(dcv) + int'(T[1]) + 2) >> 2;
            else if (y == 0)      v = (int'(T[x+1]) + 3*int'(dcv) + 2) >> 2;
            else if (x == 0)      v = (int'(L[y+1]) + 3*int'(dcv) + 2) >> 2;
          end else if (md == 6'd26 && x == 0) begin
            v = int'(T[1]) + ((int'(L[y+1]) - int'(L[0])) >>> 1);
          end else if (md == 6'd10 && y == 0) begin
            v = int'(L[1]) + ((int'(T[x+1]) - int'(T[0])) >>> 1);
          end
        end
        pflt[i][j] = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
  end

  logic [5:0] nsub;
  assign nsub = 6'((nn / 4) * (nn / 4) - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0; v5 <= 1'b0;
      out_valid <= 1'b0;
      done <= 1'b0;
      k <= '0;
      lg <= 3'd2;
      md <= '0;
      lum <= 1'b1;
    end else begin
      done <= 1'b0;
      v1 <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          bx <= x0; by <= y0; lg <= log2n; md <= mode; lum <= is_luma; m_plane <= plane;
          k <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          // data of word k-1 arrives now
          if (k != 0) begin
            for (int q = 0; q < 4; q++) begin
              T[int'(k) * 4 - 3 + q]   <= h_rdata[q];
              L[int'(k) * 4 - 3 + q]   <= v_rdata[q];
              avT[int'(k) * 4 - 3 + q] <= avail(int'(bx) + int'(k) * 4 - 4, int'(by) - 1, int'(bx), int'(by), lum);
              avL[int'(k) * 4 - 3 + q] <= avail(int'(bx) - 1, int'(by) + int'(k) * 4 - 4, int'(bx), int'(by), lum);
            end
          end else begin
            for (int q = 0; q < 65; q++) begin avT[q] <= 1'b0; avL[q] <= 1'b0; end
          end
          if (k == 6'd1) begin
            T[0] <= c_rdata; L[0] <= c_rdata;
            avT[0] <= avail(int'(bx) - 1, int'(by) - 1, int'(bx), int'(by), lum);
          end
          k <= k + 6'd1;
          if (int'(k) == nn / 2) state <= S_SUBST;
        end
        S_SUBST: begin
          T <= sT; L <= sL;
          state <= S_FILTER;
        end
        S_FILTER: begin
          T <= fT; L <= fL;
          state <= S_EXT;
        end
        S_EXT: begin
          refm  <= xref;
          dcv   <= xdc;
          k     <= '0;
          state <= S_PRED;
        end
        S_PRED: begin
          v1  <= 1'b1;
          i1  <= k;
          sx1 <= 3'(int'(k) % (nn / 4));
          sy1 <= 3'(int'(k) / (nn / 4));
          k   <= k + 6'd1;
          if (k == nsub) state <= S_DRAIN;
        end
        S_DRAIN: if (!v1 && !v2 && !v3 && !v4 && !v5) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      // pipeline: s1 -> s2 (raw prediction, raw read data) -> s3 (filters)
      //           -> s4, s5 -> s6 residual
      v2 <= v1; i2 <= i1; p2 <= praw; sx2 <= sx1; sy2 <= sy1;
      v3 <= v2; i3 <= i2; p3 <= pflt; o3 <= raw_rdata;
      v4 <= v3; i4 <= i3; p4 <= p3;   o4 <= o3;
      v5 <= v4; i5 <= i4; p5 <= p4;   o5 <= o4;
      out_valid <= v5;
      out_idx   <= i5;
      pred      <= p5;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          resid[i][j] <= res_t'(int'(o5[i][j]) - int'(p5[i][j]));
    end
  end

  // memory addresses
  always_comb begin
    int hx, vy;
    hx = int'(bx) / 4 + int'(k);
    vy = int'(by) / 4 + int'(k);
    h_raddr = ($bits(h_raddr))'((hx >= PIC_W / 4) ? PIC_W / 4 - 1 : hx);
    v_raddr = ($bits(v_raddr))'((vy >= (PIC_H + 3) / 4) ? (PIC_H + 3) / 4 - 1 : vy);
    c_rx    = ($bits(c_rx))'((bx >= 11'd4) ? int'(bx) / 4 - 1 : 0);
    c_ry    = 4'((int'(by) / 4 + 15) % 16);
  end
  // raw block read issued in stage 1, data used in stage 2 (registered into o3)
  assign raw_raddr = 6'((int'(by % 11'd32) / 4 + int'(sy1)) * 8 + int'(bx % 11'd32) / 4 + int'(sx1));

  assign busy = (state != S_IDLE);
endmodule
