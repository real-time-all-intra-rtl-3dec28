// Self-checking test of quantizer: random coefficient groups at many QPs,
// sizes and scans, compared with a direct model of the quantisation, sign
// bit hiding rule and dequantisation; checks independently that every hidden
// sign matches the level parity, counts that hiding changed levels, and
// checks the 2-cycle latency at one group per cycle.
module tb_quantizer;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, sbh_en = 1;
  logic [5:0] in_idx = 0, qp = 22; logic [2:0] log2n = 2; logic [1:0] scan = 0;
  cblk4_t in_blk, level, dequant; logic out_valid; logic [5:0] out_idx;
  int checks = 0, failures = 0, n_hidden = 0, n_fix = 0, cyc = 0;
  int EL [$], ED [$], ET [$];
  quantizer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int spos(int sc, int y, int x);
    int d [16] = '{0,2,5,9,1,4,8,12,3,7,11,14,6,10,13,15};
    return sc == 1 ? y*4+x : sc == 2 ? x*4+y : d[y*4+x];
  endfunction

  task automatic model(int c [16], int q, int lg, int sc);
    int qs [6] = '{26214,23302,20560,18396,16384,14564};
    int ds [6] = '{40,45,51,57,64,72};
    int qb, l [16], du [16], f, la, s, bi, bd; longint a, d; bit ng;
    qb = 21 + q/6 - lg;
    for (int k = 0; k < 16; k++) begin
      a = (c[k] < 0) ? -c[k] : c[k];
      l[k] = int'((a * qs[q%6] + (longint'(171) << (qb-9))) >> qb);
      if (l[k] > 32767) l[k] = 32767;
      du[k] = int'(((a * qs[q%6]) - (longint'(l[k]) << qb)) >> (qb-8)) & 255;
      if (c[k] < 0) l[k] = -l[k];
    end
    f = 99; la = -1; s = 0; bi = -1; ng = 0;
    for (int k = 0; k < 16; k++) if (l[k] != 0) begin
      int p;
      p = spos(sc, k/4, k%4);
      s += l[k] < 0 ? -l[k] : l[k];
      if (p < f) begin f = p; ng = l[k] < 0; end
      if (p > la) la = p;
      if (bi < 0 || du[k] > du[bi]) bi = k;
    end
    if (la - f >= 4) begin
      n_hidden++;
      if ((s % 2) != ng) begin n_fix++; l[bi] += (l[bi] < 0) ? -1 : 1; end
    end
    for (int k = 0; k < 16; k++) EL.push_back(l[k]);
    bd = lg + 3;
    for (int k = 0; k < 16; k++) begin
      d = ((longint'(l[k]) * 16 * ds[q%6]) << (q/6)) + (longint'(1) << (bd-1));
      d = d >>> bd;
      l[k] = d > 32767 ? 32767 : d < -32768 ? -32768 : int'(d);
    end
    for (int k = 0; k < 16; k++) ED.push_back(l[k]);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int el [16], ed [16], t;
    for (int k = 0; k < 16; k++) begin el[k] = EL.pop_front(); ed[k] = ED.pop_front(); end
    t = ET.pop_front();
    checks++; if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
    for (int k = 0; k < 16; k++) begin
      checks += 2;
      if (int'(level[k/4][k%4]) != el[k]) begin failures++; if (failures < 10) $display("FAIL level %0d got %0d exp %0d", k, level[k/4][k%4], el[k]); end
      if (int'(dequant[k/4][k%4]) != ed[k]) begin failures++; if (failures < 10) $display("FAIL deq %0d got %0d exp %0d", k, dequant[k/4][k%4], ed[k]); end
    end
  end

  initial begin
    #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c [16];
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      qp = 6'($urandom_range(0, 51)); log2n = 3'($urandom_range(2, 5)); scan = 2'($urandom_range(0, 2));
      for (int k = 0; k < 16; k++) begin
        c[k] = (t % 4 == 0) ? int'($urandom_range(0, 60000)) - 30000 : int'($urandom_range(0, 4000)) - 2000;
        in_blk[k/4][k%4] = coef_t'(c[k]);
      end
      in_valid = 1; in_idx = 6'(t);
      model(c, int'(qp), int'(log2n), int'(scan));
      ET.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (n_fix == 0) begin failures++; $display("FAIL no parity fix"); end
    if (EL.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("hidden=%0d fixed=%0d", n_hidden, n_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
