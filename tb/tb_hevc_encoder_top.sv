// End-to-end test of hevc_encoder_top at its default 1920x1080 size.
// A synthetic picture (smooth gradients, a textured quadrant, a sharp edge
// and noise) is encoded block by block at QP 22 for a row of 32x32 blocks
// at the top left, one at the right picture edge and one further down.
// For every block the test loads the 65x65 original luma window and the
// original 4x4 units of all three planes, starts the encoder and checks:
//   * the coding units returned tile the 32x32 block exactly once, with
//     legal sizes (4..32) and modes (0..34);
//   * every reconstructed 4x4 sub-block lies in the right block and plane,
//     appears once, and is close to the original (mean absolute error per
//     plane under a bound set for QP 22);
//   * the cycles per block, reported against the 1080p30 budget at 140 MHz.
// After the last block the slice is finished and the byte stream must end
// with byte_last. Mechanisms counted, each a failure if it never occurs:
// 32x32 splits, unsplit 16x16 or 32x32 units, 8x8 units, 4x4 units (4x4 DST
// path), chroma blocks, arithmetic-coder back-pressure, and the terminated
// byte stream. Emulation prevention is checked by its own test: a start
// code pattern is too rare in a short stream to count on here.
module tb_hevc_encoder_top;
  import hevc_pkg::*;
  localparam int PW = 1920, PH = 1080;
  logic clk = 0, rst_n = 0;
  logic win_we = 0; logic [6:0] win_row = 0, win_col = 0; pix_t win_data = 0;
  logic raw_we = 0; logic [1:0] raw_plane = 0; logic [5:0] raw_addr = 0; blk4_t raw_blk;
  logic [10:0] ctu_x = 0, ctu_y = 0; logic [5:0] qp = 22;
  logic start = 0, finish = 0, busy, done;
  logic cu_valid; logic [2:0] cu_x, cu_y, cu_log2; logic [5:0] cu_mode;
  logic rec_valid; logic [1:0] rec_plane; logic [10:0] rec_x, rec_y; blk4_t rec_blk;
  logic bs_valid, bs_last; logic [7:0] bs_byte;
  int checks = 0, failures = 0;
  int n_split32 = 0, n_leaf_big = 0, n_cu8 = 0, n_cu4 = 0, n_chroma = 0, n_stall = 0, n_bytes = 0, n_last = 0;

  hevc_encoder_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // original picture, only the region used
  function automatic int orig(int p, int y, int x);
    int v, h;
    h = (x * 7919 + y * 104729 + p * 31) % 97;
    if (p != 0) v = 100 + 20 * p + ((x + y) >> 2) + (h % 5);
    else if (x >= 1900) v = 60 + (y >> 1) + (h % 3);
    else if (x >= 1888) v = 90 + (x - 1888) * 4 + (h % 3);
    else if (x < 32 && y < 32) v = 40 + x * 3 + y * 2;
    else if (x < 64 && y < 32) v = ((x >> 2) & 1) ? 200 : 50 + (h % 7);
    else if (x < 96) v = 30 + (h % 40);
    else if (y < 16) v = 90 + (x - 96) + (h % 3);
    else v = (x + y < 140) ? 220 : 20;
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.bin_valid && !dut.bin_ready) n_stall++;
    if (bs_valid) begin n_bytes++; if (bs_last) n_last++; end
  end

  int cov [8][8];
  int seen [3][16][16];
  int err [3]; int cnt [3];
  always @(posedge clk) if (rst_n) begin
    if (cu_valid) begin
      int s;
      s = 1 << (int'(cu_log2) - 2);
      chk(cu_log2 >= 2 && cu_log2 <= 5 && cu_mode <= 34, "cu fields");
      chk(int'(cu_x) % s == 0 && int'(cu_y) % s == 0, "cu alignment");
      for (int y = 0; y < s; y++) for (int x = 0; x < s; x++)
        if (cu_y + y < 8 && cu_x + x < 8) cov[cu_y + y][cu_x + x]++;
      if (cu_log2 == 3'd2) n_cu4++;
      if (cu_log2 == 3'd3) n_cu8++;
      if (cu_log2 >= 3'd4) n_leaf_big++;
      if (cu_log2 != 3'd5 && cu_x == 0 && cu_y == 0) n_split32++;
    end
    if (rec_valid) begin
      int bx, by, ux, uy, o, d;
      bx = (rec_plane == 0) ? int'(ctu_x) : int'(ctu_x) / 2;
      by = (rec_plane == 0) ? int'(ctu_y) : int'(ctu_y) / 2;
      ux = (int'(rec_x) - bx) / 4; uy = (int'(rec_y) - by) / 4;
      chk(rec_plane <= 2 && int'(rec_x) >= bx && int'(rec_y) >= by &&
          ux < ((rec_plane == 0) ? 8 : 4) && uy < ((rec_plane == 0) ? 8 : 4), "rec position");
      if (ux >= 0 && ux < 16 && uy >= 0 && uy < 16 && rec_plane <= 2) seen[rec_plane][uy][ux]++;
      if (rec_plane != 0) n_chroma++;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        o = orig(int'(rec_plane), int'(rec_y) + i, int'(rec_x) + j);
        d = int'(rec_blk[i][j]) - o;
        err[rec_plane] += (d < 0) ? -d : d; cnt[rec_plane]++;
      end
    end
  end

  task automatic encode(int cx, int cy);
    int t0, cyc, ux, uy, base;
    ctu_x = 11'(cx); ctu_y = 11'(cy);
    for (int r = 0; r < 65; r++) for (int c = 0; c < 65; c++) begin
      int py, px;
      py = cy - 1 + r; px = cx - 1 + c;
      if (py < 0) py = 0; if (px < 0) px = 0; if (px >= PW) px = PW - 1;
      @(negedge clk); win_we = 1; win_row = 7'(r); win_col = 7'(c); win_data = pix_t'(orig(0, py, px));
    end
    for (int p = 0; p < 3; p++) begin
      int n;
      n = (p == 0) ? 8 : 4;
      for (int v = 0; v < n; v++) for (int u = 0; u < n; u++) begin
        int ox, oy;
        ox = (p == 0) ? cx : cx / 2; oy = (p == 0) ? cy : cy / 2;
        @(negedge clk); win_we = 0; raw_we = 1; raw_plane = 2'(p);
        raw_addr = 6'(((oy % 32) / 4 + v) * 8 + (ox % 32) / 4 + u);
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
          raw_blk[i][j] = pix_t'(orig(p, oy + 4 * v + i, ox + 4 * u + j));
      end
    end
    @(negedge clk); raw_we = 0; win_we = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) cov[y][x] = 0;
    for (int p = 0; p < 3; p++) for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) seen[p][y][x] = 0;
    start = 1; t0 = $time;
    @(negedge clk); start = 0;
    begin
      int w; w = 0;
      while (!done && w < 100000) begin @(negedge clk); w++; end
      chk(done, $sformatf("block (%0d,%0d) finished", cx, cy));
      if (!done) begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
    end
    cyc = ($time - t0) / 10;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) chk(cov[y][x] == 1, $sformatf("coverage %0d,%0d", x, y));
    for (int p = 0; p < 3; p++) begin
      int n; n = (p == 0) ? 8 : 4;
      for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) chk(seen[p][y][x] == 1, $sformatf("plane %0d unit %0d,%0d reconstructed once", p, x, y));
    end
    $display("block (%0d,%0d): %0d cycles (1080p30 budget at 140 MHz: %0d)", cx, cy, cyc, 140000000 / (30 * 60 * 34));
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int p = 0; p < 3; p++) begin err[p] = 0; cnt[p] = 0; end
    repeat (2) @(negedge clk);
    encode(0, 0); encode(32, 0); encode(64, 0); encode(96, 0);
    encode(0, 32); encode(32, 32);
    encode(1888, 0);
    @(negedge clk); finish = 1; @(negedge clk); finish = 0;
    begin int w; w = 0; while (n_last == 0 && w < 200000) begin @(negedge clk); w++; end end
    for (int p = 0; p < 3; p++) begin
      $display("plane %0d mean abs error x100 = %0d", p, (100 * err[p]) / (cnt[p] > 0 ? cnt[p] : 1));
      chk(cnt[p] > 0 && 100 * err[p] < 300 * cnt[p], $sformatf("plane %0d reconstruction error", p));
    end
    $display("splits32=%0d leaf16/32=%0d cu8=%0d cu4=%0d chroma=%0d stalls=%0d bytes=%0d", n_split32, n_leaf_big, n_cu8, n_cu4, n_chroma, n_stall, n_bytes);
    chk(n_split32 > 0, "mechanism: 32x32 split");
    chk(n_leaf_big > 0, "mechanism: unsplit 16x16/32x32 unit");
    chk(n_cu8 > 0, "mechanism: 8x8 unit");
    chk(n_cu4 > 0, "mechanism: 4x4 unit (DST path)");
    chk(n_chroma > 0, "mechanism: chroma blocks");
    chk(n_stall > 0, "mechanism: coder back-pressure");
    chk(n_last == 1 && n_bytes > 10, "mechanism: terminated byte stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
