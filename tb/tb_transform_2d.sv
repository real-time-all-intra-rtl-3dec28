// Self-checking test of transform_2d (with dct_core and dst4 inside): random
// residual blocks of every size, forward and inverse, DCT and DST, compared
// with a direct matrix model using the HEVC shifts; checks a round trip
// (forward then inverse) reproduces the residual within +-8 and that the
// 4-point matrix has its standard values. Also checks cycle counts.
module tb_transform_2d;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, inverse = 0, use_dst = 0, busy, in_valid = 0;
  logic [2:0] log2n = 2; logic [5:0] in_idx = 0; cblk4_t in_blk;
  logic out_valid, done; logic [5:0] out_idx; cblk4_t out_blk;
  int checks = 0, failures = 0;
  int X [32][32], Y [32][32], R [32][32], G [32][32];
  int cyc = 0; always @(posedge clk) cyc <= cyc + 1;

  transform_2d dut (.*);
  always #5 clk = ~clk;

  function automatic int cf(int lg, int k, int n);   // HEVC DCT matrix entry
    int mag [33] = '{64,90,90,90,89,88,87,85,83,82,80,78,75,73,70,67,64,61,57,54,50,46,43,38,36,31,25,22,18,13,9,4,0};
    int a, s;
    if (k == 0) return 64;
    a = (k * (32 >> lg) * (2*n+1)) % 128; s = 1;
    if (a > 64) a = 128 - a;
    if (a > 32) begin a = 64 - a; s = -1; end
    return s * mag[a];
  endfunction
  function automatic int ds(int k, int n);
    int t [4][4] = '{'{29,55,74,84},'{74,74,0,-74},'{84,-29,-74,55},'{55,-84,74,-29}};
    return t[k][n];
  endfunction
  function automatic int rs(int v, int s); return (v + (1 << (s-1))) >>> s; endfunction
  function automatic int c16(int v); return v > 32767 ? 32767 : v < -32768 ? -32768 : v; endfunction
  function automatic int m(bit d, int lg, int k, int n); return d ? ds(k,n) : cf(lg,k,n); endfunction

  task automatic ref2d(bit inv, bit d, int lg);
    int n = 1 << lg, t [32][32], v;
    for (int k = 0; k < n; k++) for (int c = 0; c < n; c++) begin
      v = 0;
      for (int i = 0; i < n; i++) v += inv ? m(d,lg,i,k) * X[i][c] : m(d,lg,k,i) * X[i][c];
      t[k][c] = c16(rs(v, inv ? 7 : lg - 1));
    end
    for (int r = 0; r < n; r++) for (int k = 0; k < n; k++) begin
      v = 0;
      for (int i = 0; i < n; i++) v += inv ? m(d,lg,i,k) * t[r][i] : m(d,lg,k,i) * t[r][i];
      Y[r][k] = c16(rs(v, inv ? 12 : lg + 6));
    end
  endtask

  int nout;
  always @(posedge clk) if (rst_n && out_valid) begin
    int n;
    n = 1 << log2n;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      G[(int'(out_idx)/(n/4))*4+i][(int'(out_idx)%(n/4))*4+j] = int'(out_blk[i][j]);
    nout++;
  end

  task automatic run(bit inv, bit d, int lg, output int cycles);
    int n = 1 << lg, t0;
    @(negedge clk); log2n = 3'(lg); inverse = inv; use_dst = d; start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    for (int b = 0; b < (n/4)*(n/4); b++) begin
      in_valid = 1; in_idx = 6'(b);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) in_blk[i][j] = coef_t'(X[(b/(n/4))*4+i][(b%(n/4))*4+j]);
      @(negedge clk);
    end
    in_valid = 0; nout = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
  endtask

  initial begin
    #50000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cy, n, E [32][32], exp_cy;
    checks += 4;
    if (cf(2,1,0) != 83 || cf(2,1,1) != 36 || cf(2,3,0) != 36 || cf(3,1,0) != 89) begin failures++; $display("FAIL matrix"); end
    if (cf(5,1,15) != 4 || cf(4,1,7) != 9 || cf(2,2,1) != -64) failures++;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 24; t++) begin
      int lg; bit d;
      lg = 2 + (t % 4); d = (lg == 2) && (t % 8 == 0);
      n = 1 << lg;
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin X[i][j] = (t % 3 == 2) ? 255 * ((i+j)%2 ? 1 : -1) : int'($urandom_range(0, 510)) - 255; R[i][j] = X[i][j]; end
      ref2d(0, d, lg); E = Y;
      run(0, d, lg, cy);
      exp_cy = 1 + (n/4)*(n/4) + (d ? 2 : 2 * ((n >= 8 ? n * n/8 : 1) + 1)) + (n/4)*(n/4);
      checks++; if (cy != exp_cy) begin failures++; $display("FAIL fwd cycles %0d exp %0d", cy, exp_cy); end
      checks++; if (nout != (n/4)*(n/4)) begin failures++; $display("FAIL nout"); end
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
        checks++; if (G[i][j] != E[i][j]) begin failures++; if (failures < 10) $display("FAIL fwd n%0d d%0d [%0d][%0d] %0d exp %0d", n, d, i, j, G[i][j], E[i][j]); end
      end
      // inverse of the forward result
      X = E; ref2d(1, d, lg); E = Y;
      run(1, d, lg, cy);
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
        checks++; if (G[i][j] != E[i][j]) begin failures++; if (failures < 10) $display("FAIL inv n%0d [%0d][%0d] %0d exp %0d", n, i, j, G[i][j], E[i][j]); end
        checks++; if (G[i][j] - R[i][j] > 8 || R[i][j] - G[i][j] > 8) begin failures++; if (failures < 10) $display("FAIL roundtrip n%0d %0d vs %0d", n, G[i][j], R[i][j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
