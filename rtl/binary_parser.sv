// binary_parser: binariser of the entropy coder. Turns each syntax element
// (hevc_pkg::syn_elem_t) into its bins, one bin per cycle, with the context
// index of every context-coded bin:
//   SE_CTX_FLAG  one bin = value[0], context ctx
//   SE_BYP_BITS  nbits bypass bins of value, MSB first
//   SE_TU_CTX    truncated unary of value with cMax = nbits; bin i uses
//                context ctx + (i >> ctx_max_inc)
//   SE_TU_BYP    truncated unary, bypass
//   SE_COEF_REM  coeff_abs_level_remaining with Rice parameter nbits:
//                prefix of ones, a zero, then a suffix (Rice or Exp-Golomb
//                escape above 3 << k), all bypass
//   SE_TERM      one terminating bin = value[0]
// Interface: se_valid/se_ready in, bin_valid/bin_ready/bin_out out. An
// element is loaded in one cycle (its prefix length, suffix length and
// suffix value are computed then) and its bins follow back to back; the
// next element loads on the cycle of the last bin.
// The binarisations are the standard's; the element kinds and the
// one-bin-per-cycle organisation are this design's.
module binary_parser
  import hevc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      se_valid,
  output logic      se_ready,
  input  syn_elem_t se,
  output logic      bin_valid,
  input  logic      bin_ready,
  output bin_t      bin_out
);
  syn_elem_t   cur;
  logic        have;
  logic [5:0]  idx, total, npre, nsuf;
  logic        zero_sep;  // a zero bin follows the prefix of ones
  logic [15:0] suf;

  // lengths of the element being loaded
  logic [5:0]  l_total, l_npre, l_nsuf;
  logic        l_zero;
  logic [15:0] l_suf;
  always_comb begin
    int v, k, r, len;
    v = int'(se.value); k = int'(se.nbits);
    l_npre = '0; l_nsuf = '0; l_zero = 1'b0; l_suf = '0; r = 0; len = 0;
    case (se.kind)
      SE_BYP_BITS: begin l_nsuf = 6'(se.nbits); l_suf = se.value; end
      SE_TU_CTX, SE_TU_BYP: begin
        l_npre = 6'((v < k) ? v : k);
        l_zero = (v < k);
      end
      SE_COEF_REM: begin
        if (v < (3 << k)) begin
          l_npre = 6'(v >> k); l_zero = 1'b1; l_nsuf = 6'(k); l_suf = 16'(v & ((1 << k) - 1));
        end else begin
          r = v - (3 << k); len = k;
          for (int i = 0; i < 16; i++) if (r >= (1 << len)) begin r -= (1 << len); len++; end
          l_npre = 6'(3 + len - k); l_zero = 1'b1; l_nsuf = 6'(len); l_suf = 16'(r);
        end
      end
      default: begin l_npre = '0; l_nsuf = 6'd1; l_suf = 16'(se.value[0]); end
    endcase
    l_total = l_npre + 6'(l_zero) + l_nsuf;
  end

  logic last_bin;
  assign bin_valid = have;
  assign last_bin  = have && bin_ready && (idx == total - 6'd1);
  assign se_ready  = !have || last_bin;

  logic [5:0] sbit;
  always_comb begin
    bin_out = '0;
    bin_out.bypass = (cur.kind != SE_CTX_FLAG) && (cur.kind != SE_TU_CTX) && (cur.kind != SE_TERM);
    bin_out.term   = (cur.kind == SE_TERM);
    bin_out.ctx    = (cur.kind == SE_TU_CTX) ? cur.ctx + 8'(idx >> cur.ctx_max_inc) : cur.ctx;
    sbit = nsuf - 6'd1 - (idx - npre - 6'(zero_sep));
    if (idx < npre)                      bin_out.bin = 1'b1;
    else if (zero_sep && idx == npre)    bin_out.bin = 1'b0;
    else                                 bin_out.bin = suf[4'(sbit)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have <= 1'b0; idx <= '0;
    end else begin
      if (have && bin_ready) idx <= idx + 6'd1;
      if (se_valid && se_ready) begin
        have <= 1'b1; idx <= '0; cur <= se;
        total <= l_total; npre <= l_npre; nsuf <= l_nsuf; zero_sep <= l_zero; suf <= l_suf;
      end else if (last_bin) have <= 1'b0;
    end
  end

  a_nonempty: assert property (@(posedge clk) disable iff (!rst_n) se_valid |-> l_total != 0);
endmodule
