// Self-checking test of rec_intra_pred together with picture_memory (at a
// reduced 128x64 picture). The line buffers, corner store and raw block are
// filled with random samples; blocks of every size, many modes, luma and
// chroma, at picture edges and inside, are predicted and compared sample by
// sample with a behavioural model of HEVC intra prediction (availability by
// z-order, substitution, filtering, projection, planar/DC/angular, edge
// filters). Also checks the start-to-first-output cycle count (N/2 + 10),
// one sub-block per cycle, and that both filter kinds and substitution ran.
module tb_rec_intra_pred;
  import hevc_pkg::*;
  localparam int PW = 128, PH = 64;
  logic clk = 0, rst_n = 0;
  logic start = 0; logic [10:0] x0 = 0, y0 = 0; logic [2:0] log2n = 2; logic [5:0] mode = 0;
  logic is_luma = 1; logic [1:0] plane = 0;
  logic busy, out_valid, done; logic [5:0] out_idx; blk4_t pred; rblk4_t resid;
  logic [1:0] m_plane;
  logic [$clog2(PW/4)-1:0] h_raddr, c_rx; logic [$clog2(PH/4)-1:0] v_raddr; logic [3:0] c_ry;
  pix_t h_rdata [4], v_rdata [4], c_rdata; logic [5:0] raw_raddr; blk4_t raw_rdata;
  // memory write side (testbench)
  logic h_we = 0, v_we = 0, c_we = 0, raw_we = 0;
  logic [1:0] wpl = 0;
  logic [$clog2(PW/4)-1:0] h_waddr = 0, c_wx = 0; logic [$clog2(PH/4)-1:0] v_waddr = 0; logic [3:0] c_wy = 0;
  pix_t h_wdata [4], v_wdata [4], c_wdata; logic [5:0] raw_waddr = 0; blk4_t raw_wdata;

  int checks = 0, failures = 0;
  int HB [3][PW], VB [3][PH], CB [3][16][PW/4], RAW [32][32];
  int n_strong = 0, n_filt = 0, n_subst = 0;

  picture_memory #(.PIC_W(PW), .PIC_H(PH)) u_mem (
    .clk, .h_rplane(m_plane), .h_raddr, .h_rdata, .h_we, .h_wplane(wpl), .h_waddr, .h_wdata,
    .v_rplane(m_plane), .v_raddr, .v_rdata, .v_we, .v_wplane(wpl), .v_waddr, .v_wdata,
    .c_rplane(m_plane), .c_rx, .c_ry, .c_rdata, .c_we, .c_wplane(wpl), .c_wx, .c_wy, .c_wdata,
    .raw_we, .raw_waddr, .raw_wdata, .raw_raddr, .raw_rdata);
  rec_intra_pred #(.PIC_W(PW), .PIC_H(PH)) dut (.*);
  always #5 clk = ~clk;
  int cyc = 0; always @(posedge clk) cyc <= cyc + 1;

  function automatic int ang(int m);
    int t [35] = '{0,0,32,26,21,17,13,9,5,2,0,-2,-5,-9,-13,-17,-21,-26,-32,
                   -26,-21,-17,-13,-9,-5,-2,0,2,5,9,13,17,21,26,32};
    return t[m];
  endfunction
  function automatic int inv(int a);
    case (a) -32: return -256; -26: return -315; -21: return -390; -17: return -482;
      -13: return -630; -9: return -910; -5: return -1638; -2: return -4096; default: return 0; endcase
  endfunction
  function automatic int zo(int x, int y);   // z-order of 4x4 unit inside a 32/16 block
    int z = 0;
    for (int b = 0; b < 3; b++) z |= (((x >> (2+b)) & 1) << (2*b)) | (((y >> (2+b)) & 1) << (2*b+1));
    return z;
  endfunction
  function automatic bit av(int nx, int ny, int cx, int cy, bit lu);
    int c = lu ? 32 : 16, pw = lu ? PW : PW/2, ph = lu ? PH : PH/2;
    if (nx < 0 || ny < 0 || nx >= pw || ny >= ph) return 0;
    if (ny/c != cy/c) return ny/c < cy/c;
    if (nx/c != cx/c) return nx/c < cx/c;
    return zo(nx % c, ny % c) < zo(cx % c, cy % c);
  endfunction
  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction

  int EP [32][32];
  task automatic model(int pl, int x, int y, int lg, int m, bit lu);
    int n = 1 << lg, p [-1:63][-1:63], pa [-1:63][-1:63], seq [129], sa [129], cnt, last, f [129];
    int Tt [0:64], Ll [0:64], r [-32:64], dc, d, thr, filt, strongf, a, ii, ff, v, s;
    // gather and availability; seq: L[2n-1]..L[0], corner, T[0]..T[2n-1]
    for (int k = 0; k < 2*n; k++) begin
      seq[2*n-1-k] = VB[pl][(y+k < PH) ? y+k : PH-1]; sa[2*n-1-k] = av(x-1, y+k - (k%4), x, y, lu);
      seq[2*n+1+k] = HB[pl][(x+k < PW) ? x+k : PW-1]; sa[2*n+1+k] = av(x+k - (k%4), y-1, x, y, lu);
    end
    seq[2*n] = CB[pl][((y/4)+15)%16][(x >= 4) ? x/4-1 : 0]; sa[2*n] = av(x-1, y-1, x, y, lu);
    cnt = 0; for (int k = 0; k <= 4*n; k++) cnt += sa[k];
    if (cnt != 4*n + 1) n_subst++;
    if (cnt == 0) for (int k = 0; k <= 4*n; k++) seq[k] = 128;
    else begin
      if (!sa[0]) begin int k = 0; while (!sa[k]) k++; seq[0] = seq[k]; end
      for (int k = 1; k <= 4*n; k++) if (!sa[k]) seq[k] = seq[k-1];
    end
    d = (m > 26 ? m-26 : 26-m); if ((m > 10 ? m-10 : 10-m) < d) d = (m > 10 ? m-10 : 10-m);
    thr = (n == 8) ? 7 : (n == 16) ? 1 : 0;
    filt = lu && m != 1 && n != 4 && d > thr;
    strongf = filt && n == 32 &&
      (seq[2*n] + seq[4*n] - 2*seq[3*n] < 8) && (seq[2*n] + seq[4*n] - 2*seq[3*n] > -8) &&
      (seq[2*n] + seq[0] - 2*seq[n] < 8) && (seq[2*n] + seq[0] - 2*seq[n] > -8);
    for (int k = 0; k <= 4*n; k++) f[k] = seq[k];
    if (strongf) begin
      n_strong++;
      for (int k = 1; k < 64; k++) begin
        f[2*n+k] = ((64-k)*seq[2*n] + k*seq[4*n] + 32) >> 6;
        f[2*n-k] = ((64-k)*seq[2*n] + k*seq[0] + 32) >> 6;
      end
    end else if (filt) begin
      n_filt++;
      for (int k = 1; k < 4*n; k++) f[k] = (seq[k-1] + 2*seq[k] + seq[k+1] + 2) >> 2;
    end
    for (int k = 0; k <= 2*n; k++) begin Tt[k] = f[2*n+k]; Ll[k] = f[2*n-k]; end
    dc = n; for (int k = 1; k <= n; k++) dc += Tt[k] + Ll[k]; dc = dc >> (lg+1);
    a = ang(m);
    for (int k = -32; k <= 64; k++) r[k] = 0;
    for (int k = 0; k <= 2*n; k++) r[k] = (m >= 18) ? Tt[k] : Ll[k];
    if (((n*a) >>> 5) < -1)
      for (int k = (n*a) >>> 5; k <= -1; k++) r[k] = (m >= 18) ? Ll[(k*inv(a)+128) >>> 8] : Tt[(k*inv(a)+128) >>> 8];
    for (int yy = 0; yy < n; yy++) for (int xx = 0; xx < n; xx++) begin
      if (m == 0) v = ((n-1-xx)*Ll[yy+1] + (xx+1)*Tt[n+1] + (n-1-yy)*Tt[xx+1] + (yy+1)*Ll[n+1] + n) >> (lg+1);
      else if (m == 1) begin
        v = dc;
        if (lu && n < 32) begin
          if (xx == 0 && yy == 0) v = (Ll[1] + 2*dc + Tt[1] + 2) >> 2;
          else if (yy == 0) v = (Tt[xx+1] + 3*dc + 2) >> 2;
          else if (xx == 0) v = (Ll[yy+1] + 3*dc + 2) >> 2;
        end
      end else begin
        int dd = (m >= 18) ? xx : yy;
        ii = ((((m >= 18) ? yy : xx) + 1) * a) >>> 5; ff = ((((m >= 18) ? yy : xx) + 1) * a) & 31;
        v = ((32-ff)*r[dd+ii+1] + ((ff != 0) ? ff*r[dd+ii+2] : 0) + 16) >> 5;
        if (lu && n < 32 && m == 26 && xx == 0) v = clip(Tt[1] + ((Ll[yy+1] - Ll[0]) >>> 1));
        if (lu && n < 32 && m == 10 && yy == 0) v = clip(Ll[1] + ((Tt[xx+1] - Tt[0]) >>> 1));
      end
      EP[yy][xx] = v;
    end
  endtask

  int cur_n, first_out, n_out, start_cyc, cur_x, cur_y;
  always @(posedge clk) if (rst_n && out_valid) begin
    int sx, sy;
    if (n_out == 0) first_out = cyc;
    n_out++;
    sx = int'(out_idx) % (cur_n/4); sy = int'(out_idx) / (cur_n/4);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      int e, o;
      e = EP[sy*4+i][sx*4+j];
      o = RAW[(cur_y % 32) + sy*4+i][(cur_x % 32) + sx*4+j];
      checks += 2;
      if (int'(pred[i][j]) != e) begin failures++; if (failures < 10) $display("FAIL pred n%0d m%0d (%0d,%0d) got %0d exp %0d", cur_n, mode, sx*4+j, sy*4+i, pred[i][j], e); end
      if (int'(resid[i][j]) != o - e) begin failures++; if (failures < 10) $display("FAIL resid"); end
    end
  end

  initial begin
    #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fill(int flat);
    for (int pl = 0; pl < 3; pl++) begin
      for (int a = 0; a < PW/4; a++) begin
        @(negedge clk); h_we = 1; wpl = 2'(pl); h_waddr = 5'(a);
        for (int q = 0; q < 4; q++) begin HB[pl][a*4+q] = flat ? 100 + (a*4+q)/8 : $urandom_range(0,255); h_wdata[q] = pix_t'(HB[pl][a*4+q]); end
      end
      @(negedge clk); h_we = 0;
      for (int a = 0; a < PH/4; a++) begin
        @(negedge clk); v_we = 1; wpl = 2'(pl); v_waddr = 4'(a);
        for (int q = 0; q < 4; q++) begin VB[pl][a*4+q] = flat ? 100 + (a*4+q)/8 : $urandom_range(0,255); v_wdata[q] = pix_t'(VB[pl][a*4+q]); end
      end
      @(negedge clk); v_we = 0;
      for (int ry = 0; ry < 16; ry++) for (int rx = 0; rx < PW/4; rx++) begin
        @(negedge clk); c_we = 1; wpl = 2'(pl); c_wx = 5'(rx); c_wy = 4'(ry);
        CB[pl][ry][rx] = flat ? 100 : $urandom_range(0,255); c_wdata = pix_t'(CB[pl][ry][rx]);
      end
      @(negedge clk); c_we = 0;
    end
    for (int u = 0; u < 64; u++) begin
      @(negedge clk); raw_we = 1; raw_waddr = 6'(u);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        RAW[(u/8)*4+i][(u%8)*4+j] = $urandom_range(0,255); raw_wdata[i][j] = pix_t'(RAW[(u/8)*4+i][(u%8)*4+j]); end
    end
    @(negedge clk); raw_we = 0;
  endtask

  initial begin
    int lgs, ms, xs, ys;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      if (t % 100 == 0) fill(t == 100);
      lgs = 2 + (t % 4);
      ms = (t % 7 == 0) ? (t/7) % 2 : (t % 11 == 0) ? 10 + 16*((t/11)%2) : $urandom_range(0, 34);
      is_luma = (t % 5 != 4);
      if (!is_luma && lgs == 5) lgs = 4;
      xs = ($urandom_range(0, (is_luma ? PW : PW/2) / (1 << lgs) - 1)) << lgs;
      ys = ($urandom_range(0, (is_luma ? PH : PH/2) / (1 << lgs) - 1)) << lgs;
      if (t % 13 == 0) begin xs = 0; ys = 0; end
      plane = is_luma ? 2'd0 : 2'(1 + t % 2);
      model(int'(plane), xs, ys, lgs, ms, is_luma);
      cur_n = 1 << lgs; n_out = 0; cur_x = xs; cur_y = ys;
      @(negedge clk);
      x0 = 11'(xs); y0 = 11'(ys); log2n = 3'(lgs); mode = 6'(ms); start = 1; start_cyc = cyc + 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (n_out != (cur_n/4)*(cur_n/4)) begin failures++; $display("FAIL count %0d", n_out); end
      if (first_out - start_cyc != cur_n/2 + 10) begin failures++; $display("FAIL latency %0d", first_out - start_cyc); end
    end
    checks += 3;
    if (n_strong == 0) begin failures++; $display("FAIL strong filter never used"); end
    if (n_filt == 0) begin failures++; $display("FAIL filter never used"); end
    if (n_subst == 0) begin failures++; $display("FAIL substitution never used"); end
    $display("strong=%0d filt=%0d subst=%0d", n_strong, n_filt, n_subst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
