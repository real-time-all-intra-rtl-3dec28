// transform_2d: 2-D forward or inverse transform of one transform block
// (4x4 to 32x32), built around the combined pass unit dct_core and the 4x4
// DST unit dst4, so the same hardware serves forward and inverse transforms
// of luma and chroma.
//
// The block arrives as 4x4 sub-blocks (raster order, any index order is
// accepted) and is stored in a block buffer. The column transform runs first:
// each dct_core pass takes one column (all four for 4x4) and writes its
// outputs, rounded and shifted by the stage-1 shift, into a second buffer.
// The row transform then applies the same passes to the rows of that buffer
// (the transpose of the column step) with the stage-2 shift, back into the
// block buffer, from which the result leaves as 4x4 sub-blocks in raster
// order, one per cycle. Shifts are log2N-1 and log2N+6 forward (8-bit video)
// and 7 and 12 inverse. A 4x4 luma intra block (use_dst) goes through dst4
// instead, both stages in one step.
// Cycles per block: (N/4)^2 in, N*max(1,N/8) per stage (+1), (N/4)^2 out.
// The column-then-row order, the shared forward/inverse unit and the pass
// slicing follow the encoder's transform architecture.
module transform_2d
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] log2n,
  input  logic       inverse,
  input  logic       use_dst,
  output logic       busy,
  input  logic       in_valid,
  input  logic [5:0] in_idx,
  input  cblk4_t     in_blk,
  output logic       out_valid,
  output logic [5:0] out_idx,
  output cblk4_t     out_blk,
  output logic       done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COL, S_ROW, S_DST, S_OUT} state_e;
  state_e state;

  coef_t bbuf [32][32];
  coef_t tbuf [32][32];
  logic [2:0] lg;
  logic       inv, dst;
  logic [7:0] cnt;       // load / pass / output counter
  logic       wv;        // dct_core result valid (write-back pending)
  logic [7:0] wcnt;      // pass number of the pending result
  logic       wrow;      // pending result belongs to the row stage
  int         nsz, nsub, npass, nparts;

  assign nsz    = 1 << lg;
  assign nsub   = (nsz / 4) * (nsz / 4);
  assign nparts = (nsz >= 8) ? nsz / 8 : 1;
  assign npass  = (nsz >= 8) ? nsz * nparts : 1;

  // dct_core inputs for pass cnt
  coef_t vin [32];
  coef_t vout [16];
  logic [1:0] part;
  logic [4:0] shamt;
  always_comb begin
    int c, q;
    c = (nsz >= 8) ? int'(cnt) / nparts : 0;
    q = (nsz >= 8) ? int'(cnt) % nparts : 0;
    part = 2'(q);
    for (int i = 0; i < 32; i++) vin[i] = '0;
    if (nsz == 4) begin
      for (int v = 0; v < 4; v++)
        for (int n = 0; n < 4; n++)
          vin[v*4+n] = (state == S_ROW) ? tbuf[v][n] : bbuf[n][v];
    end else begin
      for (int n = 0; n < 32; n++)
        vin[n] = (state == S_ROW) ? tbuf[c][n] : bbuf[n][c];
    end
    if (!inv) shamt = (state == S_ROW) ? 5'(int'(lg) + 6) : 5'(int'(lg) - 1);
    else      shamt = (state == S_ROW) ? 5'd12 : 5'd7;
  end

  dct_core u_core (.clk, .log2n(lg), .inverse(inv), .part, .shift(shamt), .vec_in(vin), .vec_out(vout));

  cblk4_t dst_in, dst_fwd, dst_inv;
  always_comb
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) dst_in[i][j] = bbuf[i][j];
  dst4 u_dst (.clk, .fwd_in(dst_in), .fwd_out(dst_fwd), .inv_in(dst_in), .inv_out(dst_inv));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      done      <= 1'b0;
      wv        <= 1'b0;
      cnt       <= '0;
      lg        <= 3'd2;
      inv       <= 1'b0;
      dst       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      wv        <= 1'b0;
      // write-back of the previous pass
      if (wv) begin
        int c, q;
        c = (nsz >= 8) ? int'(wcnt) / nparts : 0;
        q = (nsz >= 8) ? int'(wcnt) % nparts : 0;
        if (nsz == 4) begin
          for (int v = 0; v < 4; v++)
            for (int k = 0; k < 4; k++)
              if (wrow) bbuf[v][k] <= vout[v*4+k];
              else      tbuf[k][v] <= vout[v*4+k];
        end else begin
          for (int j = 0; j < 8; j++)
            if (wrow) bbuf[c][q*8+j] <= vout[j];
            else      tbuf[q*8+j][c] <= vout[j];
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          lg  <= log2n;
          inv <= inverse;
          dst <= use_dst && log2n == 3'd2;
          cnt <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              bbuf[(int'(in_idx) / (nsz/4)) * 4 + i][(int'(in_idx) % (nsz/4)) * 4 + j] <= in_blk[i][j];
          cnt <= cnt + 8'd1;
          if (int'(cnt) == nsub - 1) begin
            cnt   <= '0;
            state <= dst ? S_DST : S_COL;
          end
        end
        S_DST: begin
          // dst4 output is registered: present the block, take it next cycle
          cnt <= cnt + 8'd1;
          if (cnt == 8'd1) begin
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++)
                bbuf[i][j] <= inv ? dst_inv[i][j] : dst_fwd[i][j];
            cnt   <= '0;
            state <= S_OUT;
          end
        end
        S_COL, S_ROW: begin
          if (int'(cnt) < npass) begin
            wv   <= 1'b1;
            wcnt <= cnt;
            wrow <= (state == S_ROW);
            cnt  <= cnt + 8'd1;
          end else begin
            // last result is written this cycle
            cnt   <= '0;
            state <= (state == S_COL) ? S_ROW : S_OUT;
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= 6'(cnt);
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              out_blk[i][j] <= bbuf[(int'(cnt) / (nsz/4)) * 4 + i][(int'(cnt) % (nsz/4)) * 4 + j];
          cnt <= cnt + 8'd1;
          if (int'(cnt) == nsub - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
