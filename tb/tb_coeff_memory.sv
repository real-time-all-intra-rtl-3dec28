// Self-checking test of coeff_memory: a writer and a reader with random
// pacing exchange random blocks (sizes 4..32, many all-zero groups) through
// the two banks. Checks every group read back and its non-zero flag, the
// descriptors, that blocks come out in the order they were committed, that
// the writer is refused while both banks are full, and that writing and
// reading overlap (both banks in use at once).
module tb_coeff_memory;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_ready, wr_start = 0, wr_valid = 0, wr_commit = 0; logic [5:0] wr_idx = 0; cblk4_t wr_blk;
  logic [15:0] wr_desc = 0;
  logic rd_avail, rd_nz, rd_release = 0; logic [15:0] rd_desc; logic [5:0] rd_addr = 0; cblk4_t rd_blk;
  int checks = 0, failures = 0, n_full = 0, n_overlap = 0;
  coeff_memory #(.DESC_W(16)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int data_q [$];   // flattened samples of committed blocks
  int desc_q [$];
  always @(posedge clk) if (rst_n) begin
    if (!wr_ready) n_full++;
    if (rd_avail && dut.full == 2'b11) n_overlap++;
  end
  initial begin : writer
    int nsb, v;
    for (int i = 0; i < 16; i++) wr_blk[i/4][i%4] = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      nsb = 1 << (2 * (t % 4));
      @(negedge clk); while (!wr_ready) @(negedge clk);
      wr_start = 1; @(negedge clk); wr_start = 0;
      for (int b = 0; b < nsb; b++) begin
        wr_valid = 1; wr_idx = 6'(b);
        for (int i = 0; i < 16; i++) begin
          v = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 200)) - 100 : 0;
          if (b % 3 == 1) v = 0;
          wr_blk[i/4][i%4] = coef_t'(v); data_q.push_back(v);
        end
        @(negedge clk);
      end
      wr_valid = 0;
      wr_commit = 1; wr_desc = 16'(t * 7 + nsb); desc_q.push_back(t * 7 + nsb); @(negedge clk); wr_commit = 0;
    end
  end
  initial begin : reader
    int nsb, d, e, nz;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      nsb = 1 << (2 * (t % 4));
      @(negedge clk); while (!rd_avail) @(negedge clk);
      repeat ($urandom_range(0, 40)) @(negedge clk);
      d = desc_q.pop_front();
      chk(int'(rd_desc) == d, "descriptor");
      for (int b = 0; b < nsb; b++) begin
        rd_addr = 6'(b); @(negedge clk);
        nz = 0;
        for (int i = 0; i < 16; i++) begin
          e = data_q.pop_front(); if (e != 0) nz = 1;
          chk(int'(rd_blk[i/4][i%4]) == e, $sformatf("block %0d group %0d sample %0d", t, b, i));
        end
        chk(rd_nz == nz[0], "non-zero flag");
      end
      rd_release = 1; @(negedge clk); rd_release = 0;
    end
    chk(n_full > 0, "writer held off while both banks full");
    chk(n_overlap > 0, "both banks in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
