// Self-checking test of block_ordering: for every block size and scan it
// walks all groups and coefficients and checks that each group and each
// coefficient position is visited exactly once, that the orders agree with
// independently written scan rules (up-right diagonal: anti-diagonals from
// bottom-left to top-right; horizontal: row by row; vertical: column by
// column; diagonal group order above 8x8), and that sb_addr is the raster
// address of the group.
module tb_block_ordering;
  import hevc_pkg::*;
  logic [2:0] log2n = 2; logic [1:0] scan = 0; logic [5:0] sb_k = 0; logic [3:0] pos = 0;
  logic [2:0] sb_x, sb_y; logic [5:0] sb_addr; logic [1:0] c_x, c_y;
  int checks = 0, failures = 0;
  block_ordering dut (.*);
  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reference order: k-th element of a w x w grid in scan s
  function automatic void ref_pos(int w, int s, int k, output int x, output int y);
    int c; c = 0; x = 0; y = 0;
    if (s == 1) begin x = k % w; y = k / w; end
    else if (s == 2) begin y = k % w; x = k / w; end
    else
      for (int d = 0; d < 2 * w - 1; d++)
        for (int yy = d; yy >= 0; yy--) if (yy < w && d - yy < w) begin
          if (c == k) begin x = d - yy; y = yy; end
          c++;
        end
  endfunction
  initial begin
    int w, gs, x, y;
    int seen [64];
    for (int lg = 2; lg <= 5; lg++)
      for (int s = 0; s < 3; s++) begin
        w = 1 << (lg - 2);
        gs = (lg == 3) ? s : 0;
        for (int i = 0; i < 64; i++) seen[i] = 0;
        for (int k = 0; k < w * w; k++) begin
          log2n = 3'(lg); scan = 2'(s); sb_k = 6'(k); pos = 0; #1;
          ref_pos(w, gs, k, x, y);
          chk(int'(sb_x) == x && int'(sb_y) == y, $sformatf("group lg%0d s%0d k%0d", lg, s, k));
          chk(int'(sb_addr) == y * w + x, "raster address");
          seen[sb_addr]++;
        end
        for (int i = 0; i < w * w; i++) chk(seen[i] == 1, "group visited once");
        for (int i = 0; i < 16; i++) seen[i] = 0;
        for (int p = 0; p < 16; p++) begin
          pos = 4'(p); #1;
          ref_pos(4, s, p, x, y);
          chk(int'(c_x) == x && int'(c_y) == y, $sformatf("coef s%0d p%0d", s, p));
          chk(scan_pos(2'(s), int'(c_y), int'(c_x)) == 4'(p), "inverse of scan_pos");
          seen[int'(c_y) * 4 + int'(c_x)]++;
        end
        for (int i = 0; i < 16; i++) chk(seen[i] == 1, "coefficient visited once");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
