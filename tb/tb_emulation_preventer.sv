// Self-checking test of emulation_preventer: random byte streams rich in
// zeros, with random output back-pressure and NAL unit ends. The output is
// compared with a reference insertion model, and the test checks that no
// 00 00 0x (x <= 3) pattern survives and that insertions are counted.
module tb_emulation_preventer;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last, inserted;
  logic [7:0] in_byte = 0, out_byte;
  int checks = 0, failures = 0, ins = 0;
  emulation_preventer dut (.*);
  always #5 clk = ~clk;
  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int exp_q [$]; int got_q [$]; int z;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) got_q.push_back(int'(out_byte) | (out_last ? 256 : 0));
    if (inserted) ins++;
  end
  initial begin
    int nsent, b, l, zz;
    repeat (3) @(posedge clk); rst_n <= 1;
    z = 0;
    for (int i = 0; i < 4000; i++) begin
      b = ($urandom_range(0, 2) != 0) ? 0 : $urandom_range(0, 5);
      if ($urandom_range(0, 9) == 0) b = $urandom_range(0, 255);
      l = ($urandom_range(0, 199) == 0);
      if (z >= 2 && b <= 3) begin exp_q.push_back(3); z = 0; end
      exp_q.push_back(b | (l ? 256 : 0));
      z = l ? 0 : (b == 0) ? z + 1 : 0;
      @(negedge clk); in_valid = 1; in_byte = 8'(b); in_last = l[0]; out_ready = ($urandom_range(0, 3) != 0);
      #1;
      while (!in_ready) begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); #1; end
      @(posedge clk);
      @(negedge clk); in_valid = 0; out_ready = ($urandom_range(0, 3) != 0);
    end
    out_ready = 1;
    repeat (10) @(negedge clk);
    chk(got_q.size() == exp_q.size(), $sformatf("count %0d vs %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) chk(got_q[i] == exp_q[i], $sformatf("byte %0d", i));
    zz = 0;
    for (int i = 0; i < got_q.size(); i++) begin
      if (zz >= 2) chk((got_q[i] & 255) > 2, "start code emulated");
      zz = (got_q[i] >= 256) ? 0 : ((got_q[i] & 255) == 0) ? zz + 1 : 0;
    end
    chk(ins > 0, "insertions happened");
    $display("insertions=%0d", ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
