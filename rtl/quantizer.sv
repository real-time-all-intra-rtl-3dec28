// quantizer: quantisation, sign bit hiding and dequantisation of one 4x4
// coefficient group per cycle, between the forward and inverse transforms.
//
// Stage 1 quantises each coefficient with the HEVC flat scaling:
//   level = (|c| * Q[qp%6] + off) >> qbits,  qbits = 14 + qp/6 + 7 - log2N,
// with the intra rounding offset off = 171 << (qbits - 9), and keeps the
// remainder of each coefficient (scaled to 8 bits) for stage 2.
// Stage 2 applies sign bit hiding: when the distance in scan order between
// the first and last non-zero level of the group is at least 4, the sign of
// the first non-zero level is carried by the parity of the sum of levels; if
// the parity is wrong, the non-zero level with the largest remainder is
// increased by one. It then dequantises:
//   d = (level * 16 * S[qp%6] << qp/6 + 2^(log2N+2)) >> (log2N + 3), clipped.
// Interface: in_valid/in_blk/in_idx with qp, log2n, scan and sbh_en;
// out_valid/out_idx/level/dequant two cycles later (one group per cycle).
// The three functions follow the encoder's transform module; the rule for
// choosing the level to change is this design's simplification of the
// reference encoder's rate-distortion choice.
module quantizer
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [5:0] in_idx,
  input  cblk4_t     in_blk,
  input  logic [5:0] qp,
  input  logic [2:0] log2n,
  input  logic [1:0] scan,
  input  logic       sbh_en,
  output logic       out_valid,
  output logic [5:0] out_idx,
  output cblk4_t     level,
  output cblk4_t     dequant
);
  // stage 1
  logic        v1;
  logic [5:0]  i1;
  int          lv1 [4][4];     // signed level
  logic [7:0]  du1 [4][4];     // scaled remainder
  logic [5:0]  qp1;
  logic [2:0]  lg1;
  logic [1:0]  sc1;
  logic        sbh1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else begin
      v1 <= in_valid;
      i1 <= in_idx; qp1 <= qp; lg1 <= log2n; sc1 <= scan; sbh1 <= sbh_en;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          longint a, p, l;
          int qb;
          qb = 14 + int'(qp) / 6 + 7 - int'(log2n);
          a  = longint'(in_blk[y][x] < 0 ? -int'(in_blk[y][x]) : int'(in_blk[y][x]));
          p  = a * longint'(quant_scale(int'(qp) % 6));
          l  = (p + (longint'(171) << (qb - 9))) >>> qb;
          if (l > 32767) l = 32767;
          lv1[y][x] <= (in_blk[y][x] < 0) ? -int'(l) : int'(l);
          du1[y][x] <= 8'((p - (l << qb)) >>> (qb - 8));
        end
    end
  end

  // stage 2: sign bit hiding
  int lv2 [4][4];
  always_comb begin
    int first, last, sum, by, bx, p;
    logic [7:0] best;
    logic neg, found;
    first = 16; last = -1; sum = 0; neg = 1'b0;
    by = 0; bx = 0; best = '0; found = 1'b0; p = 0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        lv2[y][x] = lv1[y][x];
 if (lv1[y][x] != 0) begin
          p = int'(scan_pos(sc1, y, x));
          sum += (lv1[y][x] < 0) ? -lv1[y][x] : lv1[y][x];
          if (p < first) begin first = p; neg = lv1[y][x] < 0; end
          if (p > last) last = p;
          if (!found || du1[y][x] > best) begin found = 1'b1; best = du1[y][x]; by = y; bx = x; end
        end
      end
    if (sbh1 && last - first >= 4 && (sum[0] != neg))
      lv2[by][bx] = (lv1[by][bx] < 0) ? lv1[by][bx] - 1 : lv1[by][bx] + 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else begin
      out_valid <= v1;
      out_idx   <= i1;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          longint d;
          int bd;
          bd = int'(lg1) + 3;
          d = ((longint'(lv2[y][x]) * 16 * dequant_scale(int'(qp1) % 6)) << (int'(qp1) / 6))
              + (longint'(1) << (bd - 1));
          d = d >>> bd;
          level[y][x]   <= coef_t'(lv2[y][x]);
          dequant[y][x] <= coef_t'((d > 32767) ? 32767 : (d < -32768) ? -32768 : d);
        end
    end
  end
endmodule
