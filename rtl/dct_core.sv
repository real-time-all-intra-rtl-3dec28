// dct_core: one pass of the combined forward/inverse HEVC DCT. A pass is one
// stage (column or row) of the 2-D transform over a slice of the block:
//   4x4   : all four vectors of the block (16 outputs),
//   8x8   : one whole vector (8 outputs),
//   16x16 : half of one vector (8 outputs, part 0..1),
//   32x32 : a quarter of one vector (8 outputs, part 0..3).
// Forward passes compute out[k] = sum_n C[k][n]*in[n], inverse passes
// out[n] = sum_k C[k][n]*in[k], on the same multiplier array, with C the
// N-point HEVC matrix. The result is rounded, shifted right by 'shift' and
// clipped to 16 bits.
// Interface: log2n (2..5), inverse, part, shift and vec_in (for 4x4: vector v
// in elements 4v..4v+3; otherwise element n of the vector) are sampled every
// cycle; vec_out is registered (latency 1, one pass per cycle).
// The pass slicing follows the encoder's combined transform; computing the
// products with a general multiplier array instead of butterflies is this
// design's simplification.
module dct_core
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic [2:0] log2n,
  input  logic       inverse,
  input  logic [1:0] part,
  input  logic [4:0] shift,
  input  coef_t      vec_in  [32],
  output coef_t      vec_out [16]
);
  coef_t nxt [16];
  always_comb begin
    int n_sz, acc, row, col, c, rnd;
    n_sz = 1 << log2n;
    rnd  = (shift == 0) ? 0 : (1 << (shift - 5'd1));
    row  = 0;
    col  = 0;
    for (int j = 0; j < 16; j++) begin
      acc = 0;
      for (int i = 0; i < 32; i++) begin
        c = 0;
        if (log2n == 3'd2) begin
          // vector j/4, output j%4, input i%4 of vector i/4
          if (i / 4 == j / 4) begin
            row = inverse ? i % 4 : j % 4;
            col = inverse ? j % 4 : i % 4;
            c = dct_coef(2, row, col);
          end
        end else if (j < 8 && i < n_sz) begin
          row = inverse ? i : int'(part) * 8 + j;
          col = inverse ? int'(part) * 8 + j : i;
          c = dct_coef(int'(log2n), row, col);
        end
        acc += c * int'(vec_in[i]);
      end
      acc = (acc + rnd) >>> shift;
      nxt[j] = coef_t'((acc > 32767) ? 32767 : (acc < -32768) ? -32768 : acc);
    end
  end

  always_ff @(posedge clk) vec_out <= nxt;
endmodule
