// Self-checking test of early_mode_decision: several 65x65 windows (noise,
// smooth gradient, quadrants of different texture, edges) are decided by the
// DUT and by a behavioural model of the same method (subsample, 35-mode 4x4
// prediction, Hadamard cost, area-scaled bottom-up split). The coding-unit
// records must match exactly. Also counts that splits at every level and
// unsplit 32x32 blocks both occur.
module tb_early_mode_decision;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic win_we = 0; logic [6:0] win_row = 0, win_col = 0; pix_t win_data = 0;
  logic start = 0, busy, cu_valid, done;
  logic [2:0] cu_x, cu_y, cu_log2; logic [5:0] cu_mode;
  int checks = 0, failures = 0;
  int W [65][65];
  int exp_q [$];   // packed records {x,y,log2,mode}
  int n_split32 = 0, n_nosplit32 = 0, n_split16 = 0, n_split8 = 0;

  early_mode_decision dut (.*);
  always #5 clk = ~clk;

  function automatic int ang(int m);
    int t [35] = '{0,0,32,26,21,17,13,9,5,2,0,-2,-5,-9,-13,-17,-21,-26,-32,
                   -26,-21,-17,-13,-9,-5,-2,0,2,5,9,13,17,21,26,32};
    return t[m];
  endfunction
  function automatic int inv(int a);
    case (a) -32: return -256; -26: return -315; -21: return -390; -17: return -482;
      -13: return -630; -9: return -910; -5: return -1638; -2: return -4096; default: return 0; endcase
  endfunction

  // prediction of mode m for refs T (top, 0 = corner) and L (left)
  function automatic int pred(int m, int T[9], int L[9], int y, int x);
    int a, r [-4:8], i, f, d, dc;
    if (m == 0) return ((3-x)*L[y+1] + (x+1)*T[5] + (3-y)*T[x+1] + (y+1)*L[5] + 4) >> 3;
    if (m == 1) begin dc = 4; for (int k = 1; k <= 4; k++) dc += T[k] + L[k]; return dc >> 3; end
    a = ang(m);
    for (int k = -4; k <= 8; k++) r[k] = 0;
    for (int k = 0; k <= 8; k++) r[k] = (m >= 18) ? T[k] : L[k];
    if (((4*a) >>> 5) < -1)
      for (int k = (4*a) >>> 5; k <= -1; k++)
        r[k] = (m >= 18) ? L[(k*inv(a)+128) >>> 8] : T[(k*inv(a)+128) >>> 8];
    d = (m >= 18) ? x : y;
    i = ((((m >= 18) ? y : x) + 1) * a) >>> 5;
    f = ((((m >= 18) ? y : x) + 1) * a) & 31;
    return ((32-f)*r[d+i+1] + ((f != 0) ? f*r[d+i+2] : 0) + 16) >> 5;
  endfunction

  function automatic int satd(int R [4][4]);
    int h [4][4] = '{'{1,1,1,1},'{1,-1,1,-1},'{1,1,-1,-1},'{1,-1,-1,1}};
    int t [4][4]; int s = 0; int v;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0; for (int k = 0; k < 4; k++) t[i][j] += h[i][k] * R[k][j]; end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      v = 0; for (int k = 0; k < 4; k++) v += t[i][k] * h[j][k]; s += (v < 0) ? -v : v; end
    return s;
  endfunction

  // best mode/cost of candidate at (bx,by) sample position, size 4<<lv
  task automatic eval(int bx, int by, int lg, output int bm, output int bc);
    int st, off, T[9], L[9], O[4][4], R[4][4], c, order[35];
    st = 1 << (lg - 2); off = st >> 1;
    T[0] = W[by][bx]; L[0] = W[by][bx];
    for (int k = 0; k < 8; k++) begin
      T[k+1] = W[by][bx + 1 + k*st + off]; L[k+1] = W[by + 1 + k*st + off][bx]; end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) O[i][j] = W[by+1+i*st+off][bx+1+j*st+off];
    for (int k = 0; k < 17; k++) order[k] = 2 + k;
    order[17] = 0; order[18] = 1;
    for (int k = 0; k < 16; k++) order[19+k] = 34 - k;
    bc = -1; bm = 0;
    for (int k = 0; k < 35; k++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) R[i][j] = O[i][j] - pred(order[k], T, L, i, j);
      c = satd(R);
      if (bc < 0 || c < bc) begin bc = c; bm = order[k]; end
    end
  endtask

  task automatic model();
    int m4[64], m8[16], m16[4], m32, s8[16], s16[4], s32, sum4, sum8, sum16, bm, bc, a, ch;
    sum16 = 0;
    for (int q16 = 0; q16 < 4; q16++) begin
      sum8 = 0;
      for (int q8 = 0; q8 < 4; q8++) begin
        sum4 = 0;
        for (int q4 = 0; q4 < 4; q4++) begin
          eval((q16%2)*16 + (q8%2)*8 + (q4%2)*4, (q16/2)*16 + (q8/2)*8 + (q4/2)*4, 2, bm, bc);
          m4[q16*16+q8*4+q4] = bm; sum4 += bc;
        end
        eval((q16%2)*16 + (q8%2)*8, (q16/2)*16 + (q8/2)*8, 3, bm, bc);
        a = bc * 4; m8[q16*4+q8] = bm; s8[q16*4+q8] = (sum4 < a);
        sum8 += (sum4 < a) ? sum4 : a;
      end
      eval((q16%2)*16, (q16/2)*16, 4, bm, bc);
      a = bc * 16; m16[q16] = bm; s16[q16] = (sum8 < a);
      sum16 += (sum8 < a) ? sum8 : a;
    end
    eval(0, 0, 5, bm, bc);
    a = bc * 64; m32 = bm; s32 = (sum16 < a);
    if (!s32) begin exp_q.push_back((0<<16)|(0<<12)|(5<<8)|m32); n_nosplit32++; end
    else begin
      n_split32++;
      for (int z = 0; z < 64; z++) begin
        int x, y;
        x = ((z>>4)&1)*4 + ((z>>2)&1)*2 + (z&1);
        y = ((z>>5)&1)*4 + ((z>>3)&1)*2 + ((z>>1)&1);
        if (!s16[z>>4]) begin if (z % 16 == 0) exp_q.push_back((x<<16)|(y<<12)|(4<<8)|m16[z>>4]); end
        else if (!s8[z>>2]) begin if (z % 4 == 0) exp_q.push_back((x<<16)|(y<<12)|(3<<8)|m8[z>>2]); end
        else exp_q.push_back((x<<16)|(y<<12)|(2<<8)|m4[z]);
      end
      for (int q = 0; q < 4; q++) n_split16 += s16[q];
      for (int q = 0; q < 16; q++) n_split8 += s16[q/4] & s8[q];
    end
  endtask

  always @(posedge clk) if (rst_n && cu_valid) begin
    int e, g;
    g = (int'(cu_x)<<16)|(int'(cu_y)<<12)|(int'(cu_log2)<<8)|int'(cu_mode);
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL extra record %h", g); end
    else begin
      e = exp_q.pop_front();
      if (e != g) begin failures++; $display("FAIL record got %h exp %h", g, e); end
    end
  end

  initial begin
    #3000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 8; t++) begin
      for (int r = 0; r < 65; r++) for (int c = 0; c < 65; c++) begin
        case (t % 4)
          0: W[r][c] = $urandom_range(0, 255);
          1: W[r][c] = 40 + r + c;
          2: W[r][c] = (r < 33 && c < 33) ? $urandom_range(0, 255) : (r < 33 ? 80 + c : ((c/3) % 2) * 200);
          default: W[r][c] = (r >= 17 && r < 25 && c >= 17 && c < 25) ? $urandom_range(0,255) : ((r + 2*c) % 16) * 8;
        endcase
      end
      for (int r = 0; r < 65; r++) for (int c = 0; c < 65; c++) begin
        @(negedge clk); win_we = 1; win_row = 7'(r); win_col = 7'(c); win_data = pix_t'(W[r][c]);
      end
      @(negedge clk); win_we = 0;
      model();
      start = 1; @(negedge clk); start = 0;
      @(posedge done);
      repeat (2) @(negedge clk);
      checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d records missing", exp_q.size()); exp_q.delete(); end
    end
    checks++; if (n_split32 == 0) begin failures++; $display("FAIL no 32x32 split"); end
    checks++; if (n_nosplit32 == 0) begin failures++; $display("FAIL no unsplit 32x32"); end
    checks++; if (n_split16 == 0) begin failures++; $display("FAIL no 16x16 split"); end
    checks++; if (n_split8 == 0) begin failures++; $display("FAIL no 8x8 NxN split"); end
    $display("splits: 32=%0d no32=%0d 16=%0d 8=%0d", n_split32, n_nosplit32, n_split16, n_split8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
