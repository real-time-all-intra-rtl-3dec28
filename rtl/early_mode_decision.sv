// early_mode_decision: first pipeline stage of the encoder. For one 32x32
// block it chooses the coding-unit quad-tree (32x32 down to 8x8, with 8x8
// units optionally split into four 4x4 prediction units) and one intra mode
// per unit, using only original samples, so the reconstruction loop never has
// to feed back into the decision.
//
// Every candidate block of size N (85 per 32x32: 64 of 4x4, 16 of 8x8, 4 of
// 16x16, one of 32x32) is subsampled to 4x4 by taking the sample nearest the
// centre of each (N/4)x(N/4) cell; its references are subsampled the same way
// from the original row above and column to the left. emd_intra_pred predicts
// all 35 modes, 19 hadamard4 units measure the residuals and emd_select picks
// the cheapest mode. Blocks are visited bottom-up (post-order), and a block is
// split when the sum of its children's chosen costs is lower than its own
// cost. Costs are scaled by the area each subsampled sample stands for,
// (N/4)^2, so that levels can be compared.
//
// Interface: the 65x65 window of original samples (row -1..63 and column
// -1..63 around the block, samples outside the picture given as 128) is
// written through win_we/win_row/win_col/win_data before start. After the
// decision, one record per coding unit (or per 4x4 prediction unit of a split
// 8x8 unit) leaves on cu_valid in z-order: position in 4-sample units, log2
// size (2 = 4x4 PU of an 8x8 NxN unit) and mode; done pulses after the last.
// Processing is sequential, about 14 cycles per candidate block. The
// subsampling, the Hadamard cost and the split rule follow the encoder's
// early decision method; cell centre, area scaling and the record format are
// this design's choices.
module early_mode_decision
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       win_we,
  input  logic [6:0] win_row,
  input  logic [6:0] win_col,
  input  pix_t       win_data,
  input  logic       start,
  output logic       busy,
  output logic       cu_valid,
  output logic [2:0] cu_x,
  output logic [2:0] cu_y,
  output logic [2:0] cu_log2,
  output logic [5:0] cu_mode,
  output logic       done
);
  typedef enum logic [2:0] {S_IDLE, S_GATHER, S_WAIT, S_DECIDE, S_EMIT} state_e;
  state_e state;

  pix_t win [65][65];
  always_ff @(posedge clk)
    if (win_we && win_row < 7'd65 && win_col < 7'd65) win[win_row][win_col] <= win_data;

  // post-order position: c16 == 4 -> 32x32, c8 == 4 -> 16x16, c4 == 4 -> 8x8
  logic [2:0] c4, c8, c16;
  logic [2:0] lvl;          // log2 size of the current candidate
  logic [5:0] bx, by;       // sample position in the 32x32 block
  always_comb begin
    bx = '0; by = '0;
    if (c16 == 3'd4) lvl = 3'd5;
    else if (c8 == 3'd4) lvl = 3'd4;
    else if (c4 == 3'd4) lvl = 3'd3;
    else lvl = 3'd2;
    if (lvl <= 3'd4) begin bx += {1'b0, c16[0], 4'b0}; by += {1'b0, c16[1], 4'b0}; end
    if (lvl <= 3'd3) begin bx += {2'b0, c8[0], 3'b0};  by += {2'b0, c8[1], 3'b0};  end
    if (lvl == 3'd2) begin bx += {3'b0, c4[0], 2'b0};  by += {3'b0, c4[1], 2'b0};  end
  end

  // subsampling of the candidate and its references
  pix_t  s_top [9], s_left [9];
  blk4_t s_blk;
  always_comb begin
    int st, off;
    st  = 1 << (int'(lvl) - 2);
    off = st >> 1;
    s_top[0]  = win[by][bx];
    s_left[0] = win[by][bx];
    for (int k = 0; k < 8; k++) begin
      s_top[k+1]  = win[by][int'(bx) + 1 + k*st + off];
      s_left[k+1] = win[int'(by) + 1 + k*st + off][bx];
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        s_blk[i][j] = win[int'(by) + 1 + i*st + off][int'(bx) + 1 + j*st + off];
  end

  // mode-cost datapath
  logic  ip_start, ip_busy, res_valid, res_pass;
  logic [1:0] res_row;
  res_t  res_rows [19][4];
  logic  unit_ok [19];
  pix_t  q_top [9], q_left [9];
  blk4_t q_blk;

  emd_intra_pred u_pred (
    .clk, .rst_n, .start(ip_start), .top(q_top), .left(q_left), .orig(q_blk),
    .busy(ip_busy), .res_valid, .res_pass, .res_row, .res_rows, .unit_ok);

  logic        h_valid [19];
  logic [17:0] h_satd  [19];
  for (genvar u = 0; u < 19; u++) begin : g_had
    hadamard4 u_had (.clk, .rst_n, .row_valid(res_valid), .row(res_rows[u]),
                     .satd_valid(h_valid[u]), .satd(h_satd[u]));
  end

  logic       sel_pass;
  logic       cost_ok [19];
  logic       best_valid;
  logic [5:0] best_mode;
  logic [17:0] best_cost;
  always_comb for (int u = 0; u < 19; u++) cost_ok[u] = sel_pass ? (u < 16) : 1'b1;

  emd_select u_sel (.clk, .rst_n, .cost_valid(h_valid[0]), .cost_pass(sel_pass),
    .cost(h_satd), .cost_ok, .best_valid, .best_mode, .best_cost);

  // decision state
  logic [5:0]  mode4 [64];
  logic [5:0]  mode8 [16];
  logic [5:0]  mode16 [4];
  logic [5:0]  mode32;
  logic        split8 [16];
  logic        split16 [4];
  logic        split32;
  logic [29:0] sum4, sum8, sum16;   // children's chosen area costs
  logic [29:0] area_cost, chosen;
  logic [5:0]  z;

  always_comb begin
    area_cost = 30'(best_cost) << (2 * (int'(lvl) - 2));
    unique case (lvl)
      3'd3:    chosen = (sum4  < area_cost) ? sum4  : area_cost;
      3'd4:    chosen = (sum8  < area_cost) ? sum8  : area_cost;
      3'd5:    chosen = (sum16 < area_cost) ? sum16 : area_cost;
      default: chosen = area_cost;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ip_start <= 1'b0;
      cu_valid <= 1'b0;
      done     <= 1'b0;
      sel_pass <= 1'b0;
      c4 <= '0; c8 <= '0; c16 <= '0;
      sum4 <= '0; sum8 <= '0; sum16 <= '0;
      z <= '0;
    end else begin
      ip_start <= 1'b0;
      cu_valid <= 1'b0;
      done     <= 1'b0;
      if (h_valid[0]) sel_pass <= ~sel_pass;
      unique case (state)
        S_IDLE: if (start) begin
          c4 <= '0; c8 <= '0; c16 <= '0;
          sum4 <= '0; sum8 <= '0; sum16 <= '0;
          state <= S_GATHER;
        end
        S_GATHER: begin
          q_top    <= s_top;
          q_left   <= s_left;
          q_blk    <= s_blk;
          ip_start <= 1'b1;
          sel_pass <= 1'b0;
          state    <= S_WAIT;
        end
        S_WAIT: if (best_valid) state <= S_DECIDE;
        S_DECIDE: begin
          unique case (lvl)
            3'd2: begin
              mode4[{c16[1:0], c8[1:0], c4[1:0]}] <= best_mode;
              sum4 <= sum4 + chosen;
            end
            3'd3: begin
              mode8[{c16[1:0], c8[1:0]}]  <= best_mode;
              split8[{c16[1:0], c8[1:0]}] <= sum4 < area_cost;
              sum8 <= sum8 + chosen;
              sum4 <= '0;
            end
            3'd4: begin
              mode16[c16[1:0]]  <= best_mode;
              split16[c16[1:0]] <= sum8 < area_cost;
              sum16 <= sum16 + chosen;
              sum8  <= '0;
            end
            default: begin
              mode32  <= best_mode;
              split32 <= sum16 < area_cost;
            end
          endcase
          state <= S_GATHER;
          if (c16 == 3'd4) begin state <= S_EMIT; z <= '0; end
          else if (c8 == 3'd4) begin c16 <= c16 + 3'd1; c8 <= '0; c4 <= '0; end
          else if (c4 == 3'd4) begin c8 <= c8 + 3'd1; c4 <= '0; end
          else c4 <= c4 + 3'd1;
        end
        S_EMIT: begin
          cu_x <= {z[4], z[2], z[0]};
          cu_y <= {z[5], z[3], z[1]};
          if (!split32) begin
            cu_valid <= (z == 6'd0); cu_log2 <= 3'd5; cu_mode <= mode32;
          end else if (!split16[z[5:4]]) begin
            cu_valid <= (z[3:0] == 4'd0); cu_log2 <= 3'd4; cu_mode <= mode16[z[5:4]];
          end else if (!split8[z[5:2]]) begin
            cu_valid <= (z[1:0] == 2'd0); cu_log2 <= 3'd3; cu_mode <= mode8[z[5:2]];
          end else begin
            cu_valid <= 1'b1; cu_log2 <= 3'd2; cu_mode <= mode4[z];
          end
          z <= z + 6'd1;
          if (z == 6'd63) begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
