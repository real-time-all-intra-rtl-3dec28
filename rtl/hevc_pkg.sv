// hevc_pkg: types, constants and pure functions shared by the all-intra HEVC
// encoder blocks. Sample depth is 8 bits and the largest coding unit is 32x32,
// as in the encoder this RTL implements. The functions give the constant
// tables of the HEVC standard: intra prediction angles, the integer DCT
// matrix (computed from its 31 distinct magnitudes), the 4x4 DST matrix, the
// quantisation scales and the CABAC state tables.
package hevc_pkg;

  localparam int BIT_DEPTH = 8;
  localparam int MAX_CU    = 32;

  typedef logic [7:0]         pix_t;   // one sample
  typedef logic signed [9:0]  res_t;   // prediction residual
  typedef logic signed [15:0] coef_t;  // transform coefficient / level

  typedef pix_t        blk4_t  [4][4];  // 4x4 samples  [row][col]
  typedef res_t        rblk4_t [4][4];  // 4x4 residual [row][col]
  typedef coef_t       cblk4_t [4][4];  // 4x4 coefficients [row][col]

  // HEVC intraPredAngle for modes 2..34 (0 for planar/DC)
  function automatic int intra_angle(input int mode);
    int t [33] = '{32,26,21,17,13,9,5,2,0,-2,-5,-9,-13,-17,-21,-26,-32,
                   -26,-21,-17,-13,-9,-5,-2,0,2,5,9,13,17,21,26,32};
    if (mode < 2 || mode > 34) return 0;
    return t[mode-2];
  endfunction

  // HEVC invAngle for negative angles
  function automatic int inv_angle(input int angle);
    case (angle)
      -2:  return -4096;
      -5:  return -1638;
      -9:  return -910;
      -13: return -630;
      -17: return -482;
      -21: return -390;
      -26: return -315;
      -32: return -256;
      default: return 0;
    endcase
  endfunction

  // Magnitude of 64*sqrt(2)*cos(m*pi/64), m = 0..32, as tabulated by HEVC.
  function automatic int dct_mag(input int m);
    int t [33] = '{64,90,90,90,89,88,87,85,83,82,80,78,75,73,70,67,
                   64,61,57,54,50,46,43,38,36,31,25,22,18,13,9,4,0};
    return t[m];
  endfunction

  // Entry [k][n] of the N-point HEVC DCT matrix, N = 1 << log2n (2..5).
  function automatic int dct_coef(input int log2n, input int k, input int n);
    int m, s;
    if (k == 0) return 64;
    m = ((k << (5 - log2n)) * (2*n + 1)) % 128;   // angle in units of pi/64
    s = 1;
    if (m > 64) m = 128 - m;                       // cos symmetric about pi
    if (m > 32) begin m = 64 - m; s = -1; end      // cos(pi - a) = -cos(a)
    return s * dct_mag(m);
  endfunction

  // 4x4 DST-VII matrix [k][n]
  function automatic int dst_coef(input int k, input int n);
    int t [4][4] = '{'{29,55,74,84},'{74,74,0,-74},'{84,-29,-74,55},'{55,-84,74,-29}};
    return t[k][n];
  endfunction

  function automatic int quant_scale(input int r);
    int t [6] = '{26214,23302,20560,18396,16384,14564};
    return t[r];
  endfunction

  function automatic int dequant_scale(input int r);
    int t [6] = '{40,45,51,57,64,72};
    return t[r];
  endfunction

  // CABAC rangeTabLps[pStateIdx][qRangeIdx]
  function automatic logic [7:0] range_lps(input logic [5:0] s, input logic [1:0] q);
    logic [7:0] t [64][4] = '{
      '{128,176,208,240},'{128,167,197,227},'{128,158,187,216},'{123,150,178,205},
      '{116,142,169,195},'{111,135,160,185},'{105,128,152,175},'{100,122,144,166},
      '{ 95,116,137,158},'{ 90,110,130,150},'{ 85,104,123,142},'{ 81, 99,117,135},
      '{ 77, 94,111,128},'{ 73, 89,105,122},'{ 69, 85,100,116},'{ 66, 80, 95,110},
      '{ 62, 76, 90,104},'{ 59, 72, 86, 99},'{ 56, 69, 81, 94},'{ 53, 65, 77, 89},
      '{ 51, 62, 73, 85},'{ 48, 59, 69, 80},'{ 46, 56, 66, 76},'{ 43, 53, 63, 72},
      '{ 41, 50, 59, 69},'{ 39, 48, 56, 65},'{ 37, 45, 54, 62},'{ 35, 43, 51, 59},
      '{ 33, 41, 48, 56},'{ 32, 39, 46, 53},'{ 30, 37, 43, 50},'{ 29, 35, 41, 48},
      '{ 27, 33, 39, 45},'{ 26, 31, 37, 43},'{ 24, 30, 35, 41},'{ 23, 28, 33, 39},
      '{ 22, 27, 32, 37},'{ 21, 26, 30, 35},'{ 20, 24, 29, 33},'{ 19, 23, 27, 31},
      '{ 18, 22, 26, 30},'{ 17, 21, 25, 28},'{ 16, 20, 23, 27},'{ 15, 19, 22, 25},
      '{ 14, 18, 21, 24},'{ 14, 17, 20, 23},'{ 13, 16, 19, 22},'{ 12, 15, 18, 21},
      '{ 12, 14, 17, 20},'{ 11, 14, 16, 19},'{ 11, 13, 15, 18},'{ 10, 12, 15, 17},
      '{ 10, 12, 14, 16},'{  9, 11, 13, 15},'{  9, 11, 12, 14},'{  8, 10, 12, 14},
      '{  8,  9, 11, 13},'{  7,  9, 11, 12},'{  7,  9, 10, 12},'{  7,  8, 10, 11},
      '{  6,  8,  9, 11},'{  6,  7,  9, 10},'{  6,  7,  8,  9},'{  2,  2,  2,  2}};
    return t[s][q];
  endfunction

  function automatic logic [5:0] trans_lps(input logic [5:0] s);
    logic [5:0] t [64] = '{0,0,1,2,2,4,4,5,6,7,8,9,9,11,11,12,13,13,15,15,16,16,18,18,
      19,19,21,21,22,22,23,24,24,25,26,26,27,27,28,29,29,30,30,30,31,32,32,33,33,33,
      34,34,35,35,35,36,36,36,37,37,37,38,38,63};
    return t[s];
  endfunction

  function automatic logic [5:0] trans_mps(input logic [5:0] s);
    return (s >= 6'd62) ? s : s + 6'd1;
  endfunction

  // Syntax element handed from syntax ordering to the binary parser.
  typedef enum logic [2:0] {
    SE_CTX_FLAG  = 3'd0,  // one context-coded bin: value[0], context ctx
    SE_BYP_BITS  = 3'd1,  // nbits bypass bins, MSB first
    SE_TU_CTX    = 3'd2,  // truncated unary, cMax = nbits, bin i uses ctx + min(i, ctx_max_inc)
    SE_TU_BYP    = 3'd3,  // truncated unary, cMax = nbits, bypass
    SE_COEF_REM  = 3'd4,  // coeff_abs_level_remaining, Rice parameter = nbits
    SE_TERM      = 3'd5   // end_of_slice_segment_flag (terminating bin), value[0]
  } se_kind_e;

  typedef struct packed {
    se_kind_e     kind;
    logic [15:0]  value;
    logic [4:0]   nbits;
    logic [7:0]   ctx;
    logic [2:0]   ctx_max_inc;
  } syn_elem_t;

  // One bin for the arithmetic coder
  typedef struct packed {
    logic       bin;
    logic       bypass;
    logic       term;
    logic [7:0] ctx;
  } bin_t;

  // position in scan order (0..15) of coefficient (row y, column x) of a 4x4
  // group; scan 0 = up-right diagonal, 1 = horizontal, 2 = vertical
  function automatic logic [3:0] scan_pos(input logic [1:0] scan, input int y, input int x);
    int d [4][4] = '{'{0,2,5,9},'{1,4,8,12},'{3,7,11,14},'{6,10,13,15}};  // [y][x]
    if (scan == 2'd1) return 4'(y * 4 + x);
    if (scan == 2'd2) return 4'(x * 4 + y);
    return 4'(d[y][x]);
  endfunction

  // mode-dependent scan: 4x4 and 8x8 luma, 4x4 chroma
  function automatic logic [1:0] scan_idx(input logic [5:0] mode, input logic [2:0] log2n,
                                          input logic is_luma);
    if (log2n == 3'd2 || (log2n == 3'd3 && is_luma)) begin
      if (mode >= 6'd6 && mode <= 6'd14) return 2'd2;
      if (mode >= 6'd22 && mode <= 6'd30) return 2'd1;
    end
    return 2'd0;
  endfunction

  // context index allocation of this encoder (one table of NUM_CTX entries)
  localparam int CTX_SIG       = 0;    // 42: 27 luma + 15 chroma
  localparam int CTX_GT1       = 48;   // 24: 16 luma + 8 chroma
  localparam int CTX_GT2       = 72;   // 6:  4 luma + 2 chroma
  localparam int CTX_CSBF      = 80;   // 4:  2 luma + 2 chroma
  localparam int CTX_LAST_X    = 88;   // 18: 15 luma + 3 chroma
  localparam int CTX_LAST_Y    = 108;  // 18
  localparam int CTX_SPLIT_CU  = 128;  // 3
  localparam int CTX_PART_MODE = 132;  // 1
  localparam int CTX_PREV_LUMA = 134;  // 1
  localparam int CTX_CHROMA_PM = 136;  // 1
  localparam int CTX_CBF_LUMA  = 138;  // 2
  localparam int CTX_CBF_CHROMA= 140;  // 4
  localparam int NUM_CTX       = 256;

endpackage
