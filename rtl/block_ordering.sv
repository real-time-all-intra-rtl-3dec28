// block_ordering: scan-order address generator of the entropy coder. For
// the k-th 4x4 coefficient group of a transform block in coding order and
// the n-th coefficient of a group, it returns the group's position (and its
// raster address in coefficient memory) and the coefficient's row/column.
// Groups and coefficients both follow the block's scan: up-right diagonal,
// horizontal or vertical. Horizontal and vertical group orders apply to 8x8
// blocks only; larger blocks always order their groups diagonally, as the
// standard does.
// Interface: purely combinational; log2n (2..5), scan (0 diagonal,
// 1 horizontal, 2 vertical), sb_k (0..63), pos (0..15) in; sb_x, sb_y,
// sb_addr (= sb_y * N/4 + sb_x), c_x, c_y out.
// The orders are the standard's; computing them by search over the small
// scan tables instead of storing every order is this design's choice.
module block_ordering
  import hevc_pkg::*;
(
  input  logic [2:0] log2n,
  input  logic [1:0] scan,
  input  logic [5:0] sb_k,
  input  logic [3:0] pos,
  output logic [2:0] sb_x,
  output logic [2:0] sb_y,
  output logic [5:0] sb_addr,
  output logic [1:0] c_x,
  output logic [1:0] c_y
);
  always_comb begin
    int w, k, sx, sy, gx;
    logic [1:0] gscan;
    k = 0; gx = 0;
    w  = 1 << (int'(log2n) - 2);
    gscan = (log2n == 3'd3) ? scan : 2'd0;
    sx = 0; sy = 0;
    // group order
    if (gscan == 2'd1) begin sx = int'(sb_k) % w; sy = int'(sb_k) / w; end
    else if (gscan == 2'd2) begin sy = int'(sb_k) % w; sx = int'(sb_k) / w; end
    else begin
      for (int d = 0; d < 15; d++)
        for (int y = 7; y >= 0; y--) begin
          gx = d - y;
          if (gx >= 0 && gx < w && y < w) begin
            if (k == int'(sb_k)) begin sx = gx; sy = y; end
            k++;
          end
        end
    end
    sb_x    = 3'(sx);
    sb_y    = 3'(sy);
    sb_addr = 6'(sy * w + sx);
    // coefficient order inside the group
    c_x = '0; c_y = '0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        if (scan_pos(scan, y, x) == pos) begin c_x = 2'(x); c_y = 2'(y); end
  end
endmodule
