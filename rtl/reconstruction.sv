// reconstruction: closes the reconstruction loop. It keeps the prediction of
// the current transform block (written one 4x4 sub-block per cycle by
// rec_intra_pred), adds the inverse-transformed residual as it returns from
// transform_2d, clips to 8 bits, and writes the samples later blocks need as
// references back to picture_memory:
//   * the bottom row of each sub-block on the block's bottom edge to the
//     horizontal buffer,
//   * the right column of each sub-block on the block's right edge to the
//     vertical buffer,
//   * the bottom-right sample of every sub-block to the corner store.
// Interface: start latches x0/y0 (plane samples), log2n and plane; pred_we/
// pred_idx/pred_blk fill the prediction buffer (64 sub-blocks); res_valid/
// res_idx/res_blk deliver the residual; rec_valid/rec_idx/rec_blk and the
// memory write ports follow one cycle later.
// The write-back to the line buffers follows the encoder's picture memory;
// the corner store is this design's addition.
module reconstruction
  import hevc_pkg::*;
#(
  parameter int PIC_W = 1920,
  parameter int PIC_H = 1080
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [10:0] x0,
  input  logic [10:0] y0,
  input  logic [2:0] log2n,
  input  logic [1:0] plane,
  input  logic       pred_we,
  input  logic [5:0] pred_idx,
  input  blk4_t      pred_blk,
  input  logic       res_valid,
  input  logic [5:0] res_idx,
  input  cblk4_t     res_blk,
  output logic       rec_valid,
  output logic [5:0] rec_idx,
  output blk4_t      rec_blk,
  output logic [1:0] w_plane,
  output logic       h_we,
  output logic [$clog2(PIC_W/4)-1:0] h_waddr,
  output pix_t       h_wdata [4],
  output logic       v_we,
  output logic [$clog2((PIC_H+3)/4)-1:0] v_waddr,
  output pix_t       v_wdata [4],
  output logic       c_we,
  output logic [$clog2(PIC_W/4)-1:0] c_wx,
  output logic [3:0] c_wy,
  output pix_t       c_wdata
);
  blk4_t      pbuf [64];
  logic [10:0] bx, by;
  logic [2:0] lg;

  always_ff @(posedge clk) if (pred_we) pbuf[pred_idx] <= pred_blk;

  blk4_t rec;
  int    sx, sy, nsb;
  always_comb begin
    nsb = (1 << lg) / 4;
    sx  = int'(res_idx) % nsb;
    sy  = int'(res_idx) / nsb;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int v;
        v = int'(pbuf[res_idx][i][j]) + int'(res_blk[i][j]);
        rec[i][j] = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rec_valid <= 1'b0;
      h_we <= 1'b0; v_we <= 1'b0; c_we <= 1'b0;
      lg <= 3'd2; bx <= '0; by <= '0; w_plane <= '0;
    end else begin
      if (start) begin bx <= x0; by <= y0; lg <= log2n; w_plane <= plane; end
      rec_valid <= res_valid;
      rec_idx   <= res_idx;
      rec_blk   <= rec;
      h_we <= res_valid && (sy == nsb - 1);
      v_we <= res_valid && (sx == nsb - 1);
      c_we <= res_valid;
      h_waddr <= ($bits(h_waddr))'(int'(bx) / 4 + sx);
      v_waddr <= ($bits(v_waddr))'(int'(by) / 4 + sy);
      c_wx    <= ($bits(c_wx))'(int'(bx) / 4 + sx);
      c_wy    <= 4'((int'(by) / 4 + sy) % 16);
      c_wdata <= rec[3][3];
      for (int k = 0; k < 4; k++) begin
        h_wdata[k] <= rec[3][k];
        v_wdata[k] <= rec[k][3];
      end
    end
  end
endmodule
