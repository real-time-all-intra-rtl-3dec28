// dst4: 4x4 integer DST-VII transforms for 4x4 luma intra residuals, with a
// forward and an inverse datapath built separately (each a full 2-D
// transform of one 4x4 block per cycle, one register stage).
//
// Forward: column transform D*X, shift by 1 (log2(4) - 1 for 8-bit video),
// then row transform and shift by 8 (log2(4) + 6), as the HEVC reference
// encoder does. Inverse: column transform D'*Y with shift 7 and 16-bit clip,
// then row transform with shift 12, as the HEVC standard specifies. Both use
// rounding offsets of half the shift.
// Interface: fwd_in -> fwd_out and inv_in -> inv_out, registered, latency 1.
// Separate forward and inverse DST units follow the encoder; the single
// cycle per block is this design's choice.
module dst4
  import hevc_pkg::*;
(
  input  logic   clk,
  input  cblk4_t fwd_in,
  output cblk4_t fwd_out,
  input  cblk4_t inv_in,
  output cblk4_t inv_out
);
  function automatic int clip16(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  cblk4_t f_n, i_n;
  always_comb begin
    int t [4][4];
    int v;
    // forward: columns then rows
    for (int k = 0; k < 4; k++)
      for (int c = 0; c < 4; c++) begin
        v = 0;
        for (int n = 0; n < 4; n++) v += dst_coef(k, n) * int'(fwd_in[n][c]);
        t[k][c] = (v + 1) >>> 1;
      end
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++) begin
        v = 0;
        for (int n = 0; n < 4; n++) v += dst_coef(k, n) * t[r][n];
        f_n[r][k] = coef_t'(clip16((v + 128) >>> 8));
      end
    // inverse: columns then rows
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < 4; c++) begin
        v = 0;
        for (int k = 0; k < 4; k++) v += dst_coef(k, n) * int'(inv_in[k][c]);
        t[n][c] = clip16((v + 64) >>> 7);
      end
    for (int r = 0; r < 4; r++)
      for (int n = 0; n < 4; n++) begin
        v = 0;
        for (int k = 0; k < 4; k++) v += dst_coef(k, n) * t[r][k];
        i_n[r][n] = coef_t'(clip16((v + 2048) >>> 12));
      end
  end

  always_ff @(posedge clk) begin
    fwd_out <= f_n;
    inv_out <= i_n;
  end
endmodule
