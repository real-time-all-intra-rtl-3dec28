// coeff_memory: ping-pong buffer of quantised levels between the
// reconstruction loop and the entropy coder. Each of the two banks holds one
// transform block as 64 groups of 4x4 levels, a non-zero flag per group and
// the block's descriptor. The quantizer fills one bank while the syntax
// generator reads the other.
// Interface: wr_start claims the free write bank (wr_ready says one is
// free) and clears its group flags; wr_valid/wr_idx/wr_blk write a group;
// wr_commit with wr_desc hands the bank to the reader. rd_avail says a
// committed bank waits, rd_desc is its descriptor, rd_addr reads a group
// (rd_blk and rd_nz valid the next cycle) and rd_release frees the bank.
// The two-bank organisation is this design's reading of the document's
// coefficient memory between the stages.
module coeff_memory
  import hevc_pkg::*;
#(
  parameter int DESC_W = 16
)(
  input  logic              clk,
  input  logic              rst_n,
  output logic              wr_ready,
  input  logic              wr_start,
  input  logic              wr_valid,
  input  logic [5:0]        wr_idx,
  input  cblk4_t            wr_blk,
  input  logic              wr_commit,
  input  logic [DESC_W-1:0] wr_desc,
  output logic              rd_avail,
  output logic [DESC_W-1:0] rd_desc,
  input  logic [5:0]        rd_addr,
  output cblk4_t            rd_blk,
  output logic              rd_nz,
  input  logic              rd_release
);
  cblk4_t            mem  [2][64];
  logic [63:0]       nz   [2];
  logic [DESC_W-1:0] desc [2];
  logic [1:0]        full;
  logic              wb, rb;   // write bank, read bank

  assign wr_ready = !full[wb];
  assign rd_avail = full[rb];
  assign rd_desc  = desc[rb];

  logic wr_nz;
  always_comb begin
    wr_nz = 1'b0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) wr_nz |= (wr_blk[i][j] != '0);
  end

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wb][wr_idx] <= wr_blk;
    rd_blk <= mem[rb][rd_addr];
    rd_nz  <= nz[rb][rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0;
      nz[0] <= '0; nz[1] <= '0;
    end else begin
      if (wr_start) nz[wb] <= '0;
      else if (wr_valid) nz[wb][wr_idx] <= wr_nz;
      if (wr_commit) begin full[wb] <= 1'b1; desc[wb] <= wr_desc; wb <= ~wb; end
      if (rd_release) begin full[rb] <= 1'b0; rb <= ~rb; end
    end
  end

  a_write_free: assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> !full[wb]);
  a_release_full: assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> full[rb]);
endmodule
