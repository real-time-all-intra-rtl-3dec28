// Self-checking test of cabac_encoder. A reference model in the testbench
// encodes the same bins with the standard's serial procedure (renormalisation
// loop with PutBit, outstanding bits, first bit dropped, flush with the stop
// bit, zero padding). Several slices of random bins (context-coded with
// skewed probabilities, bypass, terminating 0) at random QPs are compared
// byte for byte, including the byte_last marker. It also checks that the
// coder sustains one bin per cycle while the FIFO has room, and counts
// back-pressure stalls.
module tb_cabac_encoder;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0, init = 0; logic [5:0] qp = 32;
  logic bin_valid = 0, bin_ready; bin_t bin_in = '0;
  logic byte_valid, byte_last, idle; logic [7:0] byte_out;
  int checks = 0, failures = 0, stalls = 0;
  cabac_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model
  int m_pst [NUM_CTX]; int m_mps [NUM_CTX];
  int low, range, outst, first, nbits; int cur_byte;
  int exp_q [$];
  function automatic void put1(int b);
    nbits++; cur_byte = (cur_byte << 1) | b;
    if (nbits == 8) begin exp_q.push_back(cur_byte & 255); nbits = 0; cur_byte = 0; end
  endfunction
  function automatic void put_bit(int b);
    if (first) first = 0; else put1(b);
    while (outst > 0) begin put1(1 - b); outst--; end
  endfunction
  function automatic void renorm();
    while (range < 256) begin
      if (low < 256) put_bit(0);
      else if (low >= 512) begin low -= 512; put_bit(1); end
      else begin low -= 256; outst++; end
      range <<= 1; low <<= 1;
    end
  endfunction
  function automatic void m_init(int q);
    int m, n, pre;
    m = ((154 >> 4) * 5) - 45; n = ((154 & 15) << 3) - 16;
    pre = ((m * q) >>> 4) + n; pre = pre < 1 ? 1 : pre > 126 ? 126 : pre;
    for (int c = 0; c < NUM_CTX; c++) begin m_mps[c] = pre > 63; m_pst[c] = m_mps[c] ? pre - 64 : 63 - pre; end
    low = 0; range = 510; outst = 0; first = 1; nbits = 0; cur_byte = 0;
  endfunction
  function automatic void m_bin(bin_t b);
    int rl;
    if (b.term) begin
      range -= 2;
      if (b.bin) begin
        low += range;
        range = 2; renorm();
        put_bit((low >> 9) & 1);
        put1((low >> 8) & 1); put1(1);
        if (nbits != 0) begin while (nbits != 0) put1(0); end
      end else renorm();
    end else if (b.bypass) begin
      low <<= 1; if (b.bin) low += range;
      if (low >= 1024) begin put_bit(1); low -= 1024; end
      else if (low < 512) put_bit(0);
      else begin low -= 512; outst++; end
    end else begin
      rl = int'(range_lps(6'(m_pst[b.ctx]), 2'((range >> 6) & 3)));
      range -= rl;
      if (int'(b.bin) != m_mps[b.ctx]) begin
        low += range; range = rl;
        if (m_pst[b.ctx] == 0) m_mps[b.ctx] = 1 - m_mps[b.ctx];
        m_pst[b.ctx] = int'(trans_lps(6'(m_pst[b.ctx])));
      end else m_pst[b.ctx] = int'(trans_mps(6'(m_pst[b.ctx])));
      renorm();
    end
  endfunction

  int got_q [$]; logic got_last [$];
  always @(posedge clk) if (rst_n && byte_valid) begin got_q.push_back(int'(byte_out)); got_last.push_back(byte_last); end

  initial begin
    bin_t b; int nb, gap, full_rate, sent_cycles;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int s = 0; s < 12; s++) begin
      @(negedge clk); qp = 6'($urandom_range(10, 45)); init = 1;
      @(negedge clk); init = 0;
      m_init(int'(qp)); exp_q.delete(); got_q.delete(); got_last.delete();
      nb = $urandom_range(200, 3000);
      gap = (s % 3 == 0);
      full_rate = 0; sent_cycles = 0;
      for (int i = 0; i <= nb; i++) begin
        int u; u = $urandom_range(0, 99);
        b = '0;
        if (i == nb) begin b.term = 1; b.bin = 1; end
        else if (u < 25) begin b.bypass = 1; b.bin = $urandom_range(0, 1); end
        else if (u < 27) begin b.term = 1; b.bin = 0; end
        else begin
          b.ctx = 8'($urandom_range(0, 11));
          b.bin = ($urandom_range(0, 99) < (b.ctx < 6 ? 85 : 30));
        end
        if (gap) while ($urandom_range(0, 2) == 0) @(negedge clk);
        bin_in = b; bin_valid = 1;
        @(posedge clk); #1;
        while (!bin_ready) begin stalls++; @(posedge clk); #1; end
        // accepted on the edge where bin_ready was high
        m_bin(b);
        @(negedge clk); bin_valid = 0;
      end
      while (!(got_last.size() > 0 && got_last[got_last.size()-1])) @(negedge clk);
      repeat (3) @(negedge clk);
      chk(idle, "idle after flush");
      chk(got_q.size() == exp_q.size(), $sformatf("byte count %0d vs %0d", got_q.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) chk(got_q[i] == exp_q[i], $sformatf("slice %0d byte %0d", s, i));
      for (int i = 0; i < got_last.size(); i++) chk(got_last[i] == (i == got_last.size() - 1), "byte_last");
    end
    // rate: bypass-free context bins against an empty FIFO are accepted every cycle
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    begin
      int acc; acc = 0;
      bin_valid = 1;
      for (int i = 0; i < 8; i++) begin
        bin_in = '0; bin_in.ctx = 8'd1; bin_in.bin = 1'b1;
        @(posedge clk); #1; if (bin_ready) acc++;
      end
      bin_valid = 0;
      chk(acc == 8, "one bin per cycle");
    end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
