// cabac_encoder: binary arithmetic coder of HEVC (CABAC), one bin per cycle.
//
// Stages:
//   1  context stage: reads the probability state (valMps, pStateIdx) of the
//      bin's context, decides MPS/LPS and writes the updated state back in
//      the same cycle, so back-to-back bins of one context need no stall.
//   2  the four candidate LPS ranges of the state (one per qRangeIdx) are
//      looked up before the current range is known.
//   3  range/low update with the renormalisation pre-computed: the new range
//      and low after renormalisation come out of one step (shift count from
//      the leading zeros of the new range), so the next bin never waits for
//      the renormaliser. Bypass bins (low = 2*low + bin*range) and the
//      terminating bin with its flush use the same step. The bits that leave
//      the 10-bit low register, plus the carry out of the addition, go to a
//      chunk FIFO.
//   4  bit writer: resolves carries with an outstanding-bit counter (one
//      pending bit followed by k ones), hands resolved runs to a run FIFO,
//      and a serialiser turns runs into bits, drops the very first bit as the
//      standard's encoder does, and packs bytes MSB first.
// Emulation prevention (stage 5) is the separate module emulation_preventer.
// Interface: bin_valid/bin_ready carry a bin_t (bin, bypass, term, ctx).
// A terminating bin with value 1 flushes the coder: the last bits and the
// stop bit are written, the last byte is zero-padded and byte_last marks it.
// init (one cycle, coder idle) loads every context with the state derived
// from INIT_VALUE at slice QP qp and resets range and low.
// Throughput: one bin per cycle into stage 1; the writer emits one bit per
// cycle, the chunk FIFO absorbs bursts and bin_ready drops when it is nearly
// full.
// The stages follow the document's entropy coder; the FIFOs, the bit-serial
// writer and one initialisation value for all contexts are this design's
// choices.
module cabac_encoder
  import hevc_pkg::*;
#(
  parameter int INIT_VALUE = 154,
  parameter int FIFO_DEPTH = 16
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [5:0] qp,
  input  logic       bin_valid,
  output logic       bin_ready,
  input  bin_t       bin_in,
  output logic       byte_valid,
  output logic [7:0] byte_out,
  output logic       byte_last,
  output logic       idle
);
  localparam int AW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------ stage 1
  logic [5:0] pst [NUM_CTX];
  logic       mps [NUM_CTX];
  logic [5:0] init_state;
  logic       init_mps;
  always_comb begin
    int m, n, pre, q;
    m = ((INIT_VALUE >> 4) * 5) - 45;
    n = ((INIT_VALUE & 15) << 3) - 16;
    q = (int'(qp) > 51) ? 51 : int'(qp);
    pre = ((m * q) >>> 4) + n;
    pre = (pre < 1) ? 1 : (pre > 126) ? 126 : pre;
    init_mps   = (pre > 63);
    init_state = 6'(init_mps ? pre - 64 : 63 - pre);
  end

  logic       take;
  assign take = bin_valid && bin_ready;

  logic       v1, lps1, byp1, term1, b1;
  logic [5:0] st1;
  always_ff @(posedge clk) begin
    if (init) begin
      for (int c = 0; c < NUM_CTX; c++) begin pst[c] <= init_state; mps[c] <= init_mps; end
    end else if (take && !bin_in.bypass && !bin_in.term) begin
      if (bin_in.bin == mps[bin_in.ctx]) pst[bin_in.ctx] <= trans_mps(pst[bin_in.ctx]);
      else begin
        if (pst[bin_in.ctx] == 6'd0) mps[bin_in.ctx] <= ~mps[bin_in.ctx];
        pst[bin_in.ctx] <= trans_lps(pst[bin_in.ctx]);
      end
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= take;
    lps1  <= bin_in.bin != mps[bin_in.ctx];
    st1   <= pst[bin_in.ctx];
    byp1  <= bin_in.bypass;
    term1 <= bin_in.term;
    b1    <= bin_in.bin;
  end

  // ------------------------------------------------------------ stage 2
  logic       v2, lps2, byp2, term2, b2;
  logic [7:0] rl2 [4];
  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    lps2 <= lps1; byp2 <= byp1; term2 <= term1; b2 <= b1;
    for (int q = 0; q < 4; q++) rl2[q] <= range_lps(st1, 2'(q));
  end

  // ------------------------------------------------------------ stage 3
  typedef struct packed {
    logic       carry;
    logic [2:0] n;      // number of new bits, first one in bits[n-1]
    logic [6:0] bits;
    logic       flush;  // the three flush bits in fbits follow
    logic [2:0] fbits;
  } chunk_t;

  logic [8:0] range_q, r_next;
  logic [9:0] low_q, low_next;
  chunk_t     ch;
  always_comb begin
    logic [8:0]  r, rmps, rlps;
    logic [10:0] s;
    logic [11:0] bp;
    logic [17:0] full;
    int          n;
    rlps = {1'b0, rl2[range_q[7:6]]};
    rmps = range_q - rlps;
    r    = rmps;
    s    = {1'b0, low_q};
    n    = 0;
    ch   = '0;
    bp   = {1'b0, low_q, 1'b0} + (b2 ? {3'b0, range_q} : 12'd0);
    full = '0;
    if (term2) begin
      r = range_q - 9'd2;
      if (b2) begin s = {1'b0, low_q} + {2'b0, r}; r = 9'd2; end
    end else if (lps2) begin
      s = {1'b0, low_q} + {2'b0, rmps};
      r = rlps;
    end
    for (int i = 0; i < 8; i++) if (!r[8]) begin r = r << 1; n++; end
    if (byp2) begin
      r_next   = range_q;
      low_next = bp[9:0];
      ch.carry = bp[11];
      ch.n     = 3'd1;
      ch.bits  = {6'b0, bp[10]};
    end else begin
      full     = 18'(s) << n;
      r_next   = r;
      low_next = full[9:0];
      ch.carry = full[10 + n];
      ch.n     = 3'(n);
      ch.bits  = 7'((full >> 10) & 18'((1 << n) - 1));
    end
    ch.flush = term2 && b2;
    ch.fbits = {low_next[9], low_next[8], 1'b1};
  end

  // chunk FIFO
  chunk_t        cf_mem [FIFO_DEPTH];
  logic [AW:0]   cf_cnt;
  logic [AW-1:0] cf_wp, cf_rp;
  logic          cf_pop;
  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      range_q <= 9'd510;
      low_q   <= '0;
      cf_wp   <= '0; cf_rp <= '0; cf_cnt <= '0;
    end else begin
      if (v2) begin
        range_q <= r_next;
        low_q   <= low_next;
        cf_mem[cf_wp] <= ch;
        cf_wp <= cf_wp + 1'b1;
      end
      if (cf_pop) cf_rp <= cf_rp + 1'b1;
      cf_cnt <= cf_cnt + (AW+1)'(v2) - (AW+1)'(cf_pop);
    end
  end
  assign bin_ready = (int'(cf_cnt) + int'(v1) + int'(v2) + 1 < FIFO_DEPTH) && !init;

  // ------------------------------------------------------------ stage 4
  // carry resolution, one event (carry, one bit or the final commit) per cycle
  typedef struct packed {
    logic        lead;
    logic        follow;
    logic [15:0] count;
    logic        last;
  } run_t;
  run_t          rf_mem [FIFO_DEPTH];
  logic [AW:0]   rf_cnt;
  logic [AW-1:0] rf_wp, rf_rp;
  logic          rf_push, rf_pop;
  run_t          rf_in;

  logic [3:0]  ev;        // event index inside the current chunk
  logic        pv, p;     // pending bit
  logic [15:0] k;         // outstanding ones after it
  chunk_t      cur;
  logic [3:0]  nev;
  assign cur = cf_mem[cf_rp];
  assign nev = 4'd1 + 4'(cur.n) + (cur.flush ? 4'd4 : 4'd0);

  always_comb begin
    logic b;
    int   e;
    rf_push = 1'b0;
    rf_in   = '0;
    cf_pop  = 1'b0;
    b = 1'b0;
    e = int'(ev);
    if (cf_cnt != 0 && rf_cnt < (AW+1)'(FIFO_DEPTH)) begin
      if (ev == nev - 4'd1) cf_pop = 1'b1;
      if (e == 0) begin
        if (cur.carry && pv) begin
          if (k != 0) begin rf_push = 1'b1; rf_in = '{lead: 1'b1, follow: 1'b0, count: k - 16'd1, last: 1'b0}; end
        end
      end else if (e <= int'(cur.n) + (cur.flush ? 3 : 0)) begin
        if (e <= int'(cur.n)) b = cur.bits[int'(cur.n) - e];
        else                  b = cur.fbits[2 - (e - int'(cur.n) - 1)];
        if (pv && !b) begin rf_push = 1'b1; rf_in = '{lead: p, follow: 1'b1, count: k, last: 1'b0}; end
      end else begin
        rf_push = 1'b1; rf_in = '{lead: p, follow: 1'b1, count: k, last: 1'b1};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      ev <= '0; pv <= 1'b0; p <= 1'b0; k <= '0;
    end else if (cf_cnt != 0 && rf_cnt < (AW+1)'(FIFO_DEPTH)) begin
      ev <= cf_pop ? 4'd0 : ev + 4'd1;
      if (ev == 4'd0) begin
        if (cur.carry && pv) begin
          if (k != 0) begin p <= 1'b0; k <= '0; end
          else p <= 1'b1;
        end
      end else if (int'(ev) <= int'(cur.n) + (cur.flush ? 3 : 0)) begin
        logic b;
        b = (int'(ev) <= int'(cur.n)) ? cur.bits[int'(cur.n) - int'(ev)]
                                      : cur.fbits[2 - (int'(ev) - int'(cur.n) - 1)];
        if (!pv) begin pv <= 1'b1; p <= b; k <= '0; end
        else if (b) k <= k + 16'd1;
        else begin p <= 1'b0; k <= '0; end
      end else begin
        pv <= 1'b0; k <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      rf_wp <= '0; rf_rp <= '0; rf_cnt <= '0;
    end else begin
      if (rf_push) begin rf_mem[rf_wp] <= rf_in; rf_wp <= rf_wp + 1'b1; end
      if (rf_pop) rf_rp <= rf_rp + 1'b1;
      rf_cnt <= rf_cnt + (AW+1)'(rf_push) - (AW+1)'(rf_pop);
    end
  end

  // serialiser and byte packer, one bit per cycle
  logic        s_act, s_lead_done, first_done;
  run_t        s_run;
  logic [15:0] s_left;
  logic [7:0]  sh;
  logic [2:0]  nb;
  logic        pad;
  assign rf_pop = !s_act && rf_cnt != 0 && !pad;

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      s_act <= 1'b0; first_done <= 1'b0; nb <= '0; pad <= 1'b0;
      byte_valid <= 1'b0; byte_last <= 1'b0; byte_out <= '0;
    end else begin
      byte_valid <= 1'b0; byte_last <= 1'b0;
      if (pad) begin
        byte_valid <= 1'b1; byte_last <= 1'b1;
        byte_out   <= sh << (8 - int'(nb));
        nb <= '0; pad <= 1'b0;
      end else if (rf_pop) begin
        s_run <= rf_mem[rf_rp]; s_act <= 1'b1; s_lead_done <= 1'b0;
        s_left <= rf_mem[rf_rp].count;
      end else if (s_act) begin
        logic bit_v, emit, fin;
        bit_v = s_lead_done ? s_run.follow : s_run.lead;
        emit  = first_done;
        fin   = s_lead_done ? (s_left == 16'd1) : (s_run.count == 0);
        first_done <= 1'b1;
        if (s_lead_done) s_left <= s_left - 16'd1;
        s_lead_done <= 1'b1;
        if (fin) s_act <= 1'b0;
        if (emit) begin
          sh <= {sh[6:0], bit_v};
          nb <= nb + 3'd1;
          if (nb == 3'd7) begin
            byte_valid <= 1'b1; byte_out <= {sh[6:0], bit_v};
            byte_last  <= fin && s_run.last;
          end else if (fin && s_run.last) pad <= 1'b1;
        end else if (fin && s_run.last && nb != 0) pad <= 1'b1;
      end
    end
  end

  assign idle = !v1 && !v2 && cf_cnt == 0 && rf_cnt == 0 && !s_act && !pad;

  a_no_cf_overflow: assert property (@(posedge clk) disable iff (!rst_n) v2 |-> cf_cnt < (AW+1)'(FIFO_DEPTH));
endmodule
