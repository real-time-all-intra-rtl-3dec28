// Self-checking test of hadamard4: random residual blocks, back to back and
// with gaps, against a direct H*R*H' reference; checks the 4-cycle latency.
module tb_hadamard4;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic row_valid = 0;
  res_t row [4];
  logic satd_valid;
  logic [17:0] satd;
  int checks = 0, failures = 0;
  int exp_q [$];
  int tlast_q [$];
  int cyc = 0;

  hadamard4 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_satd(int r [4][4]);
    int h [4][4] = '{'{1,1,1,1},'{1,-1,1,-1},'{1,1,-1,-1},'{1,-1,-1,1}};
    int t [4][4]; int s = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0; for (int k = 0; k < 4; k++) t[i][j] += h[i][k] * r[k][j];
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      int v = 0; for (int k = 0; k < 4; k++) v += t[i][k] * h[j][k];
      s += (v < 0) ? -v : v;
    end
    return s;
  endfunction

  always @(posedge clk) if (rst_n && satd_valid) begin
    int e, tl;
    e = exp_q.pop_front(); tl = tlast_q.pop_front();
    checks++;
    if (int'(satd) != e) begin failures++; $display("FAIL satd %0d exp %0d", satd, e); end
    checks++;
    if (cyc - tl != 4) begin failures++; $display("FAIL latency %0d", cyc - tl); end
  end

  initial begin
    #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r [4][4];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 200; b++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        r[i][j] = (b % 7 == 0) ? ((i+j)%2 ? 255 : -255) : int'($urandom_range(0, 510)) - 255;
      exp_q.push_back(ref_satd(r));
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        row_valid = 1;
        for (int j = 0; j < 4; j++) row[j] = res_t'(r[i][j]);
        if (i == 3) tlast_q.push_back(cyc + 1);
      end
      if (b % 3 == 0) begin
        @(negedge clk); row_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk); row_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
