// picture_memory: reference and raw-sample store between the early decision
// stage and the reconstruction loop.
//
// Per colour plane it holds
//   * the horizontal buffer: one reconstructed row of PIC_W samples, the
//     bottom row of the most recently reconstructed block in each column,
//     which gives the references above and above-right of a block;
//   * the vertical buffer: one reconstructed column of PIC_H samples, the
//     right column of the most recent block in each row, which gives the
//     references left and below-left;
//   * the corner store: the bottom-right sample of every 4x4 unit of the last
//     two 32-sample block rows, which gives the above-left corner sample
//     (neither line buffer keeps it once the left neighbour is written);
// and, shared, one 32x32 block of raw samples kept as 64 4x4 units.
// Line buffers are organised as 4-sample words: each of them can be read and
// written 4 samples per cycle, and the raw block one 4x4 unit per cycle.
// All reads are registered (1-cycle latency). The two line buffers, their
// sizes and the access widths follow the encoder's picture memory; the corner
// store and the per-plane copies are this design's choices.
module picture_memory
  import hevc_pkg::*;
#(
  parameter int PIC_W  = 1920,
  parameter int PIC_H  = 1080,
  parameter int PLANES = 3
)(
  input  logic       clk,
  // horizontal buffer
  input  logic [1:0] h_rplane,
  input  logic [$clog2(PIC_W/4)-1:0] h_raddr,
  output pix_t       h_rdata [4],
  input  logic       h_we,
  input  logic [1:0] h_wplane,
  input  logic [$clog2(PIC_W/4)-1:0] h_waddr,
  input  pix_t       h_wdata [4],
  // vertical buffer
  input  logic [1:0] v_rplane,
  input  logic [$clog2((PIC_H+3)/4)-1:0] v_raddr,
  output pix_t       v_rdata [4],
  input  logic       v_we,
  input  logic [1:0] v_wplane,
  input  logic [$clog2((PIC_H+3)/4)-1:0] v_waddr,
  input  pix_t       v_wdata [4],
  // corner store: unit column, unit row modulo 16
  input  logic [1:0] c_rplane,
  input  logic [$clog2(PIC_W/4)-1:0] c_rx,
  input  logic [3:0] c_ry,
  output pix_t       c_rdata,
  input  logic       c_we,
  input  logic [1:0] c_wplane,
  input  logic [$clog2(PIC_W/4)-1:0] c_wx,
  input  logic [3:0] c_wy,
  input  pix_t       c_wdata,
  // raw 32x32 block, 64 units of 4x4
  input  logic       raw_we,
  input  logic [5:0] raw_waddr,
  input  blk4_t      raw_wdata,
  input  logic [5:0] raw_raddr,
  output blk4_t      raw_rdata
);
  localparam int HW = PIC_W / 4;
  localparam int VW = (PIC_H + 3) / 4;

  logic [31:0] hbuf [PLANES * HW];
  logic [31:0] vbuf [PLANES * VW];
  pix_t        cbuf [PLANES * 16 * HW];
  logic [127:0] rbuf [64];

  function automatic logic [31:0] pack4(input pix_t p [4]);
    return {p[3], p[2], p[1], p[0]};
  endfunction

  always_ff @(posedge clk) begin
    logic [31:0]  hw, vw;
    logic [127:0] rw;
    if (h_we) hbuf[int'(h_wplane) * HW + int'(h_waddr)] <= pack4(h_wdata);
    if (v_we) vbuf[int'(v_wplane) * VW + int'(v_waddr)] <= pack4(v_wdata);
    if (c_we) cbuf[(int'(c_wplane) * 16 + int'(c_wy)) * HW + int'(c_wx)] <= c_wdata;
    if (raw_we) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) rw[(i*4+j)*8 +: 8] = raw_wdata[i][j];
      rbuf[raw_waddr] <= rw;
    end
    hw = hbuf[int'(h_rplane) * HW + int'(h_raddr)];
    vw = vbuf[int'(v_rplane) * VW + int'(v_raddr)];
    for (int k = 0; k < 4; k++) begin
      h_rdata[k] <= hw[k*8 +: 8];
      v_rdata[k] <= vw[k*8 +: 8];
    end
    c_rdata <= cbuf[(int'(c_rplane) * 16 + int'(c_ry)) * HW + int'(c_rx)];
    rw = rbuf[raw_raddr];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) raw_rdata[i][j] <= rw[(i*4+j)*8 +: 8];
  end
endmodule
