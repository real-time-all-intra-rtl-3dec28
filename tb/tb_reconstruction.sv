// Self-checking test of reconstruction: random predictions and residuals for
// blocks of every size; checks the clipped sum, and the addresses and data of
// the horizontal, vertical and corner write-backs, one cycle after each
// residual sub-block.
module tb_reconstruction;
  import hevc_pkg::*;
  localparam int PW = 256, PH = 128;
  logic clk = 0, rst_n = 0, start = 0; logic [10:0] x0 = 0, y0 = 0; logic [2:0] log2n = 2; logic [1:0] plane = 0;
  logic pred_we = 0; logic [5:0] pred_idx = 0; blk4_t pred_blk;
  logic res_valid = 0; logic [5:0] res_idx = 0; cblk4_t res_blk;
  logic rec_valid; logic [5:0] rec_idx; blk4_t rec_blk; logic [1:0] w_plane;
  logic h_we, v_we, c_we; logic [5:0] h_waddr, c_wx; logic [4:0] v_waddr; logic [3:0] c_wy;
  pix_t h_wdata [4], v_wdata [4], c_wdata;
  int checks = 0, failures = 0;
  int P [64][16];
  reconstruction #(.PIC_W(PW), .PIC_H(PH)) dut (.*);
  always #5 clk = ~clk;

  function automatic int clip(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, nsb, xs, ys, r [16], sx, sy, e;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 40; t++) begin
      n = 4 << (t % 4); nsb = n / 4;
      xs = $urandom_range(0, PW/n - 1) * n; ys = $urandom_range(0, PH/n - 1) * n;
      @(negedge clk); start = 1; x0 = 11'(xs); y0 = 11'(ys); log2n = 3'(2 + t % 4); plane = 2'(t % 3);
      @(negedge clk); start = 0;
      for (int b = 0; b < nsb*nsb; b++) begin
        pred_we = 1; pred_idx = 6'(b);
        for (int k = 0; k < 16; k++) begin P[b][k] = $urandom_range(0, 255); pred_blk[k/4][k%4] = pix_t'(P[b][k]); end
        @(negedge clk);
      end
      pred_we = 0;
      for (int b = 0; b < nsb*nsb; b++) begin
        res_valid = 1; res_idx = 6'(b);
        for (int k = 0; k < 16; k++) begin r[k] = int'($urandom_range(0, 700)) - 350; res_blk[k/4][k%4] = coef_t'(r[k]); end
        @(posedge clk); #1;
        res_valid = 0;
        sx = b % nsb; sy = b / nsb;
        chk(rec_valid && rec_idx == 6'(b) && w_plane == 2'(t % 3), "valid/idx");
        for (int k = 0; k < 16; k++) begin
          e = clip(P[b][k] + r[k]);
          chk(int'(rec_blk[k/4][k%4]) == e, "sum");
        end
        chk(h_we == (sy == nsb-1), "h_we");
        chk(v_we == (sx == nsb-1), "v_we");
        chk(c_we && int'(c_wx) == xs/4 + sx && int'(c_wy) == (ys/4 + sy) % 16, "corner addr");
        chk(int'(c_wdata) == clip(P[b][15] + r[15]), "corner data");
        if (h_we) begin
          chk(int'(h_waddr) == xs/4 + sx, "h addr");
          for (int k = 0; k < 4; k++) chk(int'(h_wdata[k]) == clip(P[b][12+k] + r[12+k]), "h data");
        end
        if (v_we) begin
          chk(int'(v_waddr) == ys/4 + sy, "v addr");
          for (int k = 0; k < 4; k++) chk(int'(v_wdata[k]) == clip(P[b][k*4+3] + r[k*4+3]), "v data");
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
