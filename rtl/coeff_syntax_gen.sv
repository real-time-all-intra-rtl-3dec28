// coeff_syntax_gen: residual syntax generator of the entropy coder. Reads a
// transform block of quantised levels from coeff_memory and produces its
// syntax elements in coding order:
//   cbf (luma or chroma), last_sig_coeff_x/y_prefix (truncated unary,
//   context-coded) and their suffixes (bypass), then for each 4x4 group
//   from the last significant one down to the first:
//   coded_sub_block_flag (groups between the first and the last), the
//   significance flags, up to eight greater1 flags, one greater2 flag, the
//   sign bits (the first coefficient's sign is left out when sign data
//   hiding applies: last and first significant scan positions 4 or more
//   apart) and coeff_abs_level_remaining with the Rice parameter update.
// Context indices follow the standard's derivations (significance context
// from position and neighbouring coded groups, greater1 context sets,
// last-position context offsets and shifts), added to the offsets in
// hevc_pkg. block_ordering gives the group order; the coefficient order
// inside a group comes from hevc_pkg::scan_pos.
// Interface: rd_* to coeff_memory (one-cycle read), se_valid/se_ready/se
// to binary_parser, tu_done pulses after the last element of a block.
// The descriptor is {scan[1:0], is_luma, log2n[2:0]} in the low 6 bits.
// Timing: sequential, one element (or one skipped zero coefficient) per
// cycle, plus a few cycles per group to read it.
// The syntax and its contexts are the standard's; the document's pipeline
// for this unit is replaced by this sequential machine (this design's
// choice).
module coeff_syntax_gen
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_avail,
  input  logic [15:0] rd_desc,
  output logic [5:0] rd_addr,
  input  cblk4_t     rd_blk,
  input  logic       rd_nz,
  output logic       rd_release,
  output logic       se_valid,
  input  logic       se_ready,
  output syn_elem_t  se,
  output logic       tu_done
);
  typedef enum logic [3:0] {
    S_IDLE, S_FIND, S_FIND2, S_CBF, S_LX, S_LY, S_LXS, S_LYS,
    S_READ, S_READ2, S_CSBF, S_SIG, S_GT1, S_GT2, S_SIGN, S_REM
  } state_e;
  state_e state;

  logic [2:0]  lg;
  logic        luma;
  logic [1:0]  scan;
  logic [5:0]  k, last_k;
  logic [3:0]  last_pos;
  logic [4:0]  last_x, last_y;
  logic [63:0] coded;          // coded groups (raster address)
  coef_t       gs [16];        // current group in scan order
  logic [4:0]  n;              // coefficient scan position being handled
  logic [1:0]  c1;             // greater1 context state
  logic [1:0]  ctx_set;
  logic [3:0]  n_gt1;          // greater1 flags coded in this group
  logic [4:0]  first_gt1;      // scan position of the greater2 candidate
  logic [2:0]  rice;
  logic [4:0]  num_sig;        // significant coefficients handled in REM
  logic        sig_any;        // significance seen in a group besides DC

  // group order
  logic [2:0] sb_x, sb_y;
  logic [5:0] sb_addr;
  logic [1:0] unused_cx, unused_cy;
  block_ordering u_order (.log2n(lg), .scan, .sb_k(k), .pos(4'd0),
                          .sb_x, .sb_y, .sb_addr, .c_x(unused_cx), .c_y(unused_cy));
  assign rd_addr = sb_addr;

  // the group just read, in scan order, and its last significant position
  coef_t       rs [16];
  logic [3:0]  r_last;
  logic [1:0]  r_lx, r_ly;
  always_comb begin
    r_last = '0; r_lx = '0; r_ly = '0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) rs[scan_pos(scan, y, x)] = rd_blk[y][x];
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        if (rd_blk[y][x] != 0 && scan_pos(scan, y, x) >= r_last) begin
          r_last = scan_pos(scan, y, x); r_lx = 2'(x); r_ly = 2'(y);
        end
  end

  // first and last significant positions of the current group
  logic [3:0] g_first, g_last;
  logic       hide;
  always_comb begin
    g_first = 4'd15; g_last = 4'd0;
    for (int i = 15; i >= 0; i--) if (gs[i] != 0) g_first = 4'(i);
    for (int i = 0; i < 16; i++)  if (gs[i] != 0) g_last = 4'(i);
    hide = (int'(g_last) - int'(g_first)) > 3;
  end

  // coordinates of scan position n in the group
  logic [1:0] nx, ny;
  always_comb begin
    nx = '0; ny = '0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) if (5'(scan_pos(scan, y, x)) == n) begin nx = 2'(x); ny = 2'(y); end
  end

  // significance context
  logic [7:0] sig_ctx;
  always_comb begin
    int s, xc, yc, prev, w;
    w  = 1 << (int'(lg) - 2);
    xc = int'(sb_x) * 4 + int'(nx);
    yc = int'(sb_y) * 4 + int'(ny);
    prev = 0;
    if (int'(sb_x) + 1 < w && coded[int'(sb_y) * w + int'(sb_x) + 1]) prev += 1;
    if (int'(sb_y) + 1 < w && coded[(int'(sb_y) + 1) * w + int'(sb_x)]) prev += 2;
    if (lg == 3'd2) begin
      case (int'(ny) * 4 + int'(nx))
        0: s = 0; 1: s = 1; 2: s = 4; 3: s = 5; 4: s = 2; 5: s = 3; 6: s = 4; 7: s = 5;
        8: s = 6; 9: s = 6; 10: s = 8; 11: s = 8; 12: s = 7; 13: s = 7; default: s = 8;
      endcase
    end else if (xc + yc == 0) s = 0;
    else begin
      case (prev)
        0: s = (nx + ny == 0) ? 2 : (int'(nx) + int'(ny) < 3) ? 1 : 0;
        1: s = (ny == 0) ? 2 : (ny == 1) ? 1 : 0;
        2: s = (nx == 0) ? 2 : (nx == 1) ? 1 : 0;
        default: s = 2;
      endcase
      if (luma) begin
        if (sb_x != 0 || sb_y != 0) s += 3;
        s += (lg == 3'd3) ? ((scan == 2'd0) ? 9 : 15) : 21;
      end else s += (lg == 3'd3) ? 9 : 12;
    end
    sig_ctx = 8'(CTX_SIG + (luma ? s : 27 + s));
  end

  // last position prefix/suffix
  function automatic void last_code(input int p, output int pre, output int sl, output int sv);
    int g, lo;
    if (p < 4) begin g = p; lo = p; end
    else begin
      int b; b = 0;
      for (int i = 0; i < 5; i++) if ((p >> i) != 0) b = i;
      g  = 2 * b + ((p >> (b - 1)) & 1);
      lo = (2 + (g & 1)) << ((g >> 1) - 1);
    end
    pre = g;
    sl  = (g > 3) ? (g >> 1) - 1 : 0;
    sv  = p - lo;
  endfunction

  logic [4:0] lpx, lpy;   // last position in the coded orientation
  assign lpx = (scan == 2'd2) ? last_y : last_x;
  assign lpy = (scan == 2'd2) ? last_x : last_y;

  logic [7:0] last_off;
  logic [2:0] last_shift;
  assign last_off   = luma ? 8'(3 * (int'(lg) - 2) + ((int'(lg) - 1) >> 2)) : 8'd15;
  assign last_shift = luma ? 3'((int'(lg) + 1) >> 2) : 3'(int'(lg) - 2);

  coef_t cur_c;
  logic [15:0] cur_abs;
  assign cur_c   = gs[n[3:0]];
  assign cur_abs = (cur_c < 0) ? 16'(-cur_c) : 16'(cur_c);

  logic emit, advance;
  logic rd_nz_q;
  always_comb begin
    int pre, sl, sv, base, w, r;
    se = '0; emit = 1'b0;
    pre = 0; sl = 0; sv = 0; base = 0; w = 0; r = 0;
    case (state)
      S_CBF: begin
        emit = 1'b1; se.kind = SE_CTX_FLAG; se.value = 16'(last_k != 6'h3f);
        se.ctx = luma ? 8'(CTX_CBF_LUMA) : 8'(CTX_CBF_CHROMA);
      end
      S_LX, S_LY: begin
        last_code((state == S_LX) ? int'(lpx) : int'(lpy), pre, sl, sv);
        emit = 1'b1; se.kind = SE_TU_CTX; se.value = 16'(pre);
        se.nbits = 5'(2 * int'(lg) - 1);
        se.ctx = 8'(state == S_LX ? CTX_LAST_X : CTX_LAST_Y) + last_off;
        se.ctx_max_inc = last_shift;
      end
      S_LXS, S_LYS: begin
        last_code((state == S_LXS) ? int'(lpx) : int'(lpy), pre, sl, sv);
        emit = (sl > 0); se.kind = SE_BYP_BITS; se.value = 16'(sv); se.nbits = 5'(sl);
      end
      S_CSBF: begin
        w = 1 << (int'(lg) - 2);
        r = 0;
        if (int'(sb_x) + 1 < w && coded[int'(sb_y) * w + int'(sb_x) + 1]) r = 1;
        if (int'(sb_y) + 1 < w && coded[(int'(sb_y) + 1) * w + int'(sb_x)]) r = 1;
        emit = (k != 6'd0) && (k != last_k);
        se.kind = SE_CTX_FLAG; se.value = 16'(rd_nz_q);
        se.ctx  = 8'(CTX_CSBF + r + (luma ? 0 : 2));
      end
      S_SIG: begin
        // skip the last position itself and an inferred DC flag
        emit = !(k == last_k && n[3:0] == last_pos) &&
               !(n == 5'd0 && k != 6'd0 && k != last_k && !sig_any);
        se.kind = SE_CTX_FLAG; se.value = 16'(cur_c != 0); se.ctx = sig_ctx;
      end
      S_GT1: begin
        emit = (cur_c != 0) && (n_gt1 < 4'd8);
        se.kind = SE_CTX_FLAG; se.value = 16'(cur_abs > 1);
        se.ctx = 8'(CTX_GT1 + int'(ctx_set) * 4 + int'(c1) + (luma ? 0 : 16));
      end
      S_GT2: begin
        emit = (first_gt1 != 5'h1f);
        se.kind = SE_CTX_FLAG; se.value = 16'(gs[first_gt1[3:0]] > 2 || gs[first_gt1[3:0]] < -2);
        se.ctx = 8'(CTX_GT2 + int'(ctx_set) + (luma ? 0 : 4));
      end
      S_SIGN: begin
        emit = (cur_c != 0) && !(hide && n[3:0] == g_first);
        se.kind = SE_BYP_BITS; se.value = 16'(cur_c < 0); se.nbits = 5'd1;
      end
      S_REM: begin
        base = (num_sig < 5'd8) ? (2 + ((n == first_gt1) ? 1 : 0)) : 1;
        emit = (cur_c != 0) && (int'(cur_abs) >= base);
        se.kind = SE_COEF_REM; se.value = 16'(int'(cur_abs) - base); se.nbits = 5'(rice);
      end
      default: ;
    endcase
    se_valid = emit;
    advance  = !emit || se_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; rd_release <= 1'b0; tu_done <= 1'b0;
      k <= '0; last_k <= '0; n <= '0; coded <= '0; rd_nz_q <= 1'b0;
      lg <= 3'd2; luma <= 1'b1; scan <= '0; last_pos <= '0; last_x <= '0; last_y <= '0;
      c1 <= 2'd1; ctx_set <= '0; n_gt1 <= '0; first_gt1 <= 5'h1f;
      rice <= '0; num_sig <= '0; sig_any <= 1'b0;
      for (int i = 0; i < 16; i++) gs[i] <= '0;
    end else begin
      rd_release <= 1'b0; tu_done <= 1'b0;
      case (state)
        S_IDLE: if (rd_avail && !rd_release) begin
          lg <= rd_desc[2:0]; luma <= rd_desc[3]; scan <= rd_desc[5:4];
          k <= 6'((1 << (2 * (int'(rd_desc[2:0]) - 2))) - 1);
          coded <= '0; c1 <= 2'd1;
          state <= S_FIND;
        end
        S_FIND: state <= S_FIND2;     // group address settles, read issued
        S_FIND2: if (rd_nz) begin
          last_k <= k; last_pos <= r_last;
          last_x <= 5'({sb_x, r_lx}); last_y <= 5'({sb_y, r_ly});
          state <= S_CBF;
        end else if (k == 6'd0) begin
          last_k <= 6'h3f; state <= S_CBF;
        end else begin
          k <= k - 6'd1; state <= S_FIND;
        end
        S_CBF: if (advance) begin
          if (last_k == 6'h3f) begin rd_release <= 1'b1; tu_done <= 1'b1; state <= S_IDLE; end
          else begin k <= last_k; state <= S_LX; end
        end
        S_LX:  if (advance) state <= S_LY;
        S_LY:  if (advance) state <= S_LXS;
        S_LXS: if (advance) state <= S_LYS;
        S_LYS: if (advance) state <= S_READ;
        S_READ: state <= S_READ2;
        S_READ2: begin
          for (int i = 0; i < 16; i++) gs[i] <= rs[i];
          rd_nz_q <= rd_nz;
          state <= S_CSBF;
        end
        S_CSBF: if (advance) begin
          if (rd_nz_q) begin
            coded[sb_addr] <= 1'b1;
            n <= (k == last_k) ? 5'(last_pos) : 5'd15;
            sig_any <= (k == last_k);
            state <= S_SIG;
          end else if (k == 6'd0) begin
            rd_release <= 1'b1; tu_done <= 1'b1; state <= S_IDLE;
          end else begin
            k <= k - 6'd1; state <= S_READ;
          end
        end
        S_SIG: if (advance) begin
          if (cur_c != 0 && n != 5'd0) sig_any <= 1'b1;
          if (n == 5'd0) begin
            n <= 5'd15; n_gt1 <= '0; first_gt1 <= 5'h1f;
            ctx_set <= 2'((k == 6'd0 || !luma) ? 0 : 2) + 2'(c1 == 2'd0);
            c1 <= 2'd1;
            state <= S_GT1;
          end else n <= n - 5'd1;
        end
        S_GT1: if (advance) begin
          if (emit) begin
            n_gt1 <= n_gt1 + 4'd1;
            if (cur_abs > 1) begin
              c1 <= 2'd0;
              if (first_gt1 == 5'h1f) first_gt1 <= n;
            end else if (c1 != 2'd0 && c1 != 2'd3) c1 <= c1 + 2'd1;
          end
          if (n == 5'd0) state <= S_GT2;
          else n <= n - 5'd1;
        end
        S_GT2: if (advance) begin n <= 5'd15; state <= S_SIGN; end
        S_SIGN: if (advance) begin
          if (n == 5'd0) begin n <= 5'd15; rice <= '0; num_sig <= '0; state <= S_REM; end
          else n <= n - 5'd1;
        end
        S_REM: if (advance) begin
          if (cur_c != 0) begin
            num_sig <= num_sig + 5'd1;
            if (int'(cur_abs) > 3 * (1 << int'(rice)) && rice != 3'd4) rice <= rice + 3'd1;
          end
          if (n == 5'd0) begin
            if (k == 6'd0) begin rd_release <= 1'b1; tu_done <= 1'b1; state <= S_IDLE; end
            else begin k <= k - 6'd1; state <= S_READ; end
          end else n <= n - 5'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
