// Self-checking test of emd_intra_pred (and its 17 emd_angular_unit
// instances): random and flat blocks, every residual row of both passes is
// compared with a direct model of HEVC 4x4 intra prediction (no filtering),
// written in the standard's own orientation for horizontal and vertical modes.
module tb_emd_intra_pred;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t top [9], left [9];
  blk4_t orig;
  logic busy, res_valid, res_pass;
  logic [1:0] res_row;
  res_t res_rows [19][4];
  logic unit_ok [19];
  int checks = 0, failures = 0;
  int P [35][4][4];   // [mode][y][x]
  int O [4][4];
  int cyc = 0, t_start = 0;

  emd_intra_pred dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ang(int m);
    int t [35] = '{0,0,32,26,21,17,13,9,5,2,0,-2,-5,-9,-13,-17,-21,-26,-32,
                   -26,-21,-17,-13,-9,-5,-2,0,2,5,9,13,17,21,26,32};
    return t[m];
  endfunction
  function automatic int inv(int a);
    case (a) -32: return -256; -26: return -315; -21: return -390; -17: return -482;
      -13: return -630; -9: return -910; -5: return -1638; -2: return -4096; default: return 0; endcase
  endfunction

  // p(x,y) with x,y in -1..7
  function automatic int p(int x, int y);
    if (x == -1 && y == -1) return int'(top[0]);
    if (y == -1) return int'(top[x+1]);
    return int'(left[y+1]);
  endfunction

  task automatic model();
    int dc = 4;
    for (int i = 0; i < 4; i++) dc += p(i,-1) + p(-1,i);
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
      P[0][y][x] = ((3-x)*p(-1,y) + (x+1)*p(4,-1) + (3-y)*p(x,-1) + (y+1)*p(-1,4) + 4) >> 3;
      P[1][y][x] = dc >> 3;
    end
    for (int m = 2; m <= 34; m++) begin
      int a; int r [-4:8];
      a = ang(m);
      for (int k = -4; k <= 8; k++) r[k] = 0;
      for (int k = 0; k <= 8; k++) r[k] = (m >= 18) ? p(-1+k,-1) : p(-1,-1+k);
      if (a < 0 && ((4*a) >>> 5) < -1)
        for (int k = (4*a) >>> 5; k <= -1; k++)
          r[k] = (m >= 18) ? p(-1, -1 + ((k*inv(a)+128) >>> 8)) : p(-1 + ((k*inv(a)+128) >>> 8), -1);
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        int i, f, d;
        d = (m >= 18) ? x : y;
        i = (((m >= 18) ? y : x) + 1) * a >>> 5;
        f = ((((m >= 18) ? y : x) + 1) * a) & 31;
        P[m][y][x] = ((32-f)*r[d+i+1] + ((f != 0) ? f*r[d+i+2] : 0) + 16) >> 5;
      end
    end
  endtask

  // expected residual of unit u, pass ps, output row rw, column x
  function automatic int expect_res(int u, int ps, int rw, int x);
    int m;
    if (ps == 1) return O[rw][x] - P[34-u][rw][x];
    m = (u == 17) ? 0 : (u == 18) ? 1 : 2 + u;
    return O[x][rw] - P[m][x][rw];   // transposed
  endfunction

  int nrows = 0;
  always @(posedge clk) if (rst_n && res_valid) begin
    nrows++;
    for (int u = 0; u < 19; u++) begin
      checks++;
      if (unit_ok[u] != (res_pass ? (u < 16) : 1'b1)) begin failures++; $display("FAIL ok u%0d", u); end
      if (unit_ok[u]) for (int x = 0; x < 4; x++) begin
        int e;
        e = expect_res(u, int'(res_pass), int'(res_row), x);
        checks++;
        if (int'(res_rows[u][x]) != e) begin
          failures++;
          if (failures < 400 && (failures % 20 == 0)) $display("FAIL u%0d pass%0d row%0d x%0d got %0d exp %0d", u, res_pass, res_row, x, res_rows[u][x], e);
        end
      end
    end
  end

  initial begin
    #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int b = 0; b < 300; b++) begin
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin
        top[i]  = pix_t'((b % 5 == 0) ? 100 + i : $urandom_range(0, 255));
        left[i] = pix_t'((b % 5 == 0) ? 100 - i : $urandom_range(0, 255));
      end
      top[0] = pix_t'($urandom_range(0,255)); left[0] = top[0];
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        orig[y][x] = pix_t'($urandom_range(0, 255)); O[y][x] = int'(orig[y][x]);
      end
      model();
      start = 1; t_start = cyc;
      @(negedge clk); start = 0;
      repeat (9) @(negedge clk);
      checks++; if (nrows != 8*(b+1)) begin failures++; $display("FAIL rows %0d", nrows); end
      checks++; if (busy) begin failures++; $display("FAIL busy after 8 cycles"); end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
