// emd_intra_pred: early-decision intra predictor for one subsampled 4x4 block,
// all 35 HEVC modes, feeding 19 Hadamard cost units.
//
// Nineteen prediction units work in parallel: 17 angular units (one per
// angle of modes 2..18), one planar and one DC unit. Each produces one row of
// four samples per cycle, and the unit subtracts it from the matching row of
// the original block, so 19 residual rows leave per cycle.
// A block takes two passes of four rows (8 cycles):
//   pass 0: main reference = left column, side = top row, original block
//           transposed. Angular unit u gives (transposed) mode 2+u; planar
//           and DC are valid in this pass only (they are symmetric).
//   pass 1: main reference = top row, side = left column, block as is.
//           Angular unit u gives mode 34-u; unit 16 (mode 18) is marked
//           invalid because pass 0 already produced it.
// Interface: start with top[]/left[] (index 0 = corner, 1..8 = neighbours)
// and orig[][]; busy while the 8 cycles run (a new start is accepted on the
// cycle the last row leaves). res_valid/res_rows/res_pass/res_row/unit_ok
// are registered. The reference arrangement and the 8-cycle throughput follow
// the encoder's early-decision architecture; no reference or edge filters are
// applied here, which is this design's choice for a cost estimator.
module emd_intra_pred
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pix_t       top  [9],
  input  pix_t       left [9],
  input  blk4_t      orig,
  output logic       busy,
  output logic       res_valid,
  output logic       res_pass,
  output logic [1:0] res_row,
  output res_t       res_rows [19][4],
  output logic       unit_ok  [19]
);
  pix_t  top_q [9], left_q [9];
  blk4_t orig_q;
  logic  run, pass;
  logic [1:0] row;

  pix_t main_s [9], side_s [9];
  pix_t orow [4];
  pix_t pred [19][4];

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      main_s[i] = pass ? top_q[i]  : left_q[i];
      side_s[i] = pass ? left_q[i] : top_q[i];
    end
    for (int x = 0; x < 4; x++) orow[x] = pass ? orig_q[row][x] : orig_q[x][row];
  end

  for (genvar u = 0; u < 17; u++) begin : g_ang
    emd_angular_unit #(.ANGLE(intra_angle(2 + u))) u_ang (
      .main(main_s), .side(side_s), .y(row), .pred(pred[u]));
  end

  // planar (unit 17) and DC (unit 18), vertical orientation on main/side
  always_comb begin
    int dc;
    dc = 4;
    for (int i = 1; i <= 4; i++) dc += int'(main_s[i]) + int'(side_s[i]);
    for (int x = 0; x < 4; x++) begin
      pred[17][x] = pix_t'(((3 - x) * int'(side_s[int'(row) + 1]) + (x + 1) * int'(main_s[5]) +
                           (3 - int'(row)) * int'(main_s[x + 1]) + (int'(row) + 1) * int'(side_s[5]) + 4) >>> 3);
      pred[18][x] = pix_t'(dc >>> 3);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run       <= 1'b0;
      pass      <= 1'b0;
      row       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= run;
      if (run) begin
        res_pass <= pass;
        res_row  <= row;
        for (int u = 0; u < 19; u++) begin
          unit_ok[u] <= pass ? (u < 16) : 1'b1;
          for (int x = 0; x < 4; x++)
            res_rows[u][x] <= res_t'(int'(orow[x]) - int'(pred[u][x]));
        end
        row <= row + 2'd1;
        if (row == 2'd3) begin
          pass <= ~pass;
          if (pass) run <= 1'b0;
        end
      end
      if (start && (!run || (pass && row == 2'd3))) begin
        top_q  <= top;
        left_q <= left;
        orig_q <= orig;
        run    <= 1'b1;
        pass   <= 1'b0;
        row    <= '0;
      end
    end
  end

  assign busy = run && !(pass && row == 2'd3);
endmodule
