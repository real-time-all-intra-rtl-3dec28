// hadamard4: sum of absolute 4x4 Hadamard-transformed differences (SATD) of a
// residual block that arrives one 4-sample row per cycle.
//
// Each incoming row is transformed at once (4-point Hadamard butterfly) and
// stored in an intermediate row buffer. When the fourth row has arrived the
// buffer is handed to a second register set and the column transform runs one
// column per cycle for the next four cycles, accumulating absolute values.
// Because the two halves work on different blocks, a new block may start on
// the cycle after the previous block's fourth row: one block per 4 cycles.
//
// Interface: row_valid/row (row order 0..3, back to back or with gaps).
// satd_valid pulses for one cycle with the raw sum (not halved), 4 cycles
// after the fourth row is accepted. The two-stage row/column split follows the encoder's
// early-decision architecture; the unhalved sum is this design's choice.
module hadamard4
  import hevc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        row_valid,
  input  res_t        row [4],
  output logic        satd_valid,
  output logic [17:0] satd
);
  typedef logic signed [11:0] rt_t;   // after row transform
  typedef logic signed [13:0] ct_t;   // after column transform

  rt_t        rbuf [3][4];   // rows 0..2 of the block being received
  rt_t        cbuf [4][4];   // complete row-transformed block
  logic [1:0] row_cnt;
  logic [1:0] col_cnt;
  logic       col_busy;
  logic [17:0] acc;
  rt_t        rt [4];

  always_comb begin
    rt_t a0, a1, b0, b1;
    a0 = rt_t'(row[0]) + rt_t'(row[1]);
    a1 = rt_t'(row[0]) - rt_t'(row[1]);
    b0 = rt_t'(row[2]) + rt_t'(row[3]);
    b1 = rt_t'(row[2]) - rt_t'(row[3]);
    rt[0] = a0 + b0;
    rt[1] = a1 + b1;
    rt[2] = a0 - b0;
    rt[3] = a1 - b1;
  end

  // column transform of the current column and its absolute sum
  logic [15:0] col_abs;
  always_comb begin
    ct_t a0, a1, b0, b1, c [4];
    a0 = ct_t'(cbuf[0][col_cnt]) + ct_t'(cbuf[1][col_cnt]);
    a1 = ct_t'(cbuf[0][col_cnt]) - ct_t'(cbuf[1][col_cnt]);
    b0 = ct_t'(cbuf[2][col_cnt]) + ct_t'(cbuf[3][col_cnt]);
    b1 = ct_t'(cbuf[2][col_cnt]) - ct_t'(cbuf[3][col_cnt]);
    c[0] = a0 + b0;
    c[1] = a1 + b1;
    c[2] = a0 - b0;
    c[3] = a1 - b1;
    col_abs = '0;
    for (int i = 0; i < 4; i++)
      col_abs += 16'(c[i] < 0 ? -c[i] : c[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_cnt    <= '0;
      col_cnt    <= '0;
      col_busy   <= 1'b0;
      acc        <= '0;
      satd_valid <= 1'b0;
      satd       <= '0;
    end else begin
      satd_valid <= 1'b0;
      if (row_valid) begin
        row_cnt <= row_cnt + 2'd1;
        if (row_cnt != 2'd3) rbuf[row_cnt] <= rt;
      end
      if (col_busy) begin
        col_cnt <= col_cnt + 2'd1;
        if (col_cnt == 2'd3) begin
          satd_valid <= 1'b1;
          satd       <= acc + 18'(col_abs);
          acc        <= '0;
          col_busy   <= 1'b0;
        end else begin
          acc <= acc + 18'(col_abs);
        end
      end
      if (row_valid && row_cnt == 2'd3) begin
        cbuf[0]  <= rbuf[0];
        cbuf[1]  <= rbuf[1];
        cbuf[2]  <= rbuf[2];
        cbuf[3]  <= rt;
        col_busy <= 1'b1;
        col_cnt  <= '0;
        acc      <= '0;
      end
    end
  end

  // a new block may only complete once the previous column phase is done
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (row_valid && row_cnt == 2'd3) |-> (!col_busy || col_cnt == 2'd3));
endmodule
