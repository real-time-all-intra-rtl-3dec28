// emd_angular_unit: one HEVC angular intra predictor for a 4x4 block,
// dedicated to a single prediction angle, producing one row of 4 samples per
// cycle (combinational; the caller registers it).
//
// The block is predicted in "vertical" orientation: main[] is the reference
// row above the block (main[0] is the corner sample, main[1..8] the eight
// samples above and above-right) and side[] the column to the left (side[0]
// the corner, side[1..8] the samples left and below-left). For row y the unit
// uses the reference row shifted by ((y+1)*ANGLE)>>5 and a fixed weight
// ((y+1)*ANGLE)&31, so the only multiplications are by the four row weights,
// which are constants of the unit. With main and side swapped and the block
// transposed, the same unit gives the mirrored horizontal mode.
// For negative angles the main reference is extended to the left with side
// samples chosen by the standard's inverse angle. No reference filtering is
// applied here; the unit serves cost estimation only.
module emd_angular_unit
  import hevc_pkg::*;
#(
  parameter int ANGLE = 32
)(
  input  pix_t       main [9],
  input  pix_t       side [9],
  input  logic [1:0] y,
  output pix_t       pred [4]
);
  localparam int INV = inv_angle(ANGLE);

  pix_t refx [-4:8];

  always_comb begin
    for (int i = 0; i <= 8; i++) refx[i] = main[i];
    for (int i = -4; i < 0; i++) refx[i] = main[0];
    if (((4 * ANGLE) >>> 5) < -1) begin
      for (int x = -1; x >= -4; x--)
        if (x >= ((4 * ANGLE) >>> 5))
          refx[x] = side[(((x * INV) + 128) >>> 8) > 8 ? 8 : (((x * INV) + 128) >>> 8)];
    end
  end

  int pos, idx, fr;
  assign pos = (int'(y) + 1) * ANGLE;
  assign idx = pos >>> 5;
  assign fr  = pos & 31;

  for (genvar x = 0; x < 4; x++) begin : g_px
    int i1, i2;
    logic [15:0] acc;
    assign i1  = x + idx + 1;
    assign i2  = (i1 >= 8) ? 8 : i1 + 1;   // weight is 0 when i1 = 8
    assign acc = 16'((32 - fr) * int'(refx[i1]) + fr * int'(refx[i2]) + 16);
    assign pred[x] = acc[12:5];
  end
endmodule
