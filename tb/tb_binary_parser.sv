// Self-checking test of binary_parser: random syntax elements of every kind
// (context flags, bypass bit strings, truncated unary with contexts and
// context shifts, truncated unary bypass, coeff_abs_level_remaining with
// Rice parameters 0..4 including escapes, terminating bins) are fed with
// random gaps and random bin back-pressure. A reference binariser in the
// testbench predicts every bin, its bypass/term flags and its context.
// Also checks one bin per cycle for a long element without back-pressure.
module tb_binary_parser;
  import hevc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic se_valid = 0, se_ready, bin_valid, bin_ready = 1;
  syn_elem_t se = '0; bin_t bin_out;
  int checks = 0, failures = 0, n_escape = 0;
  binary_parser dut (.*);
  always #5 clk = ~clk;
  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int exp_q [$];   // {term, bypass, ctx, bin}
  function automatic void push(int b, int byp, int term, int ctx);
    exp_q.push_back((term << 10) | (byp << 9) | ((ctx & 255) << 1) | b);
  endfunction
  function automatic void model(syn_elem_t e);
    int v, k, r, len;
    v = int'(e.value); k = int'(e.nbits);
    case (e.kind)
      SE_CTX_FLAG: push(v & 1, 0, 0, int'(e.ctx));
      SE_TERM:     push(v & 1, 0, 1, int'(e.ctx));
      SE_BYP_BITS: for (int i = k - 1; i >= 0; i--) push((v >> i) & 1, 1, 0, int'(e.ctx));
      SE_TU_CTX, SE_TU_BYP: begin
        for (int i = 0; i < ((v < k) ? v + 1 : k); i++)
          push(i < v, e.kind == SE_TU_BYP, 0, (e.kind == SE_TU_CTX) ? int'(e.ctx) + (i >> e.ctx_max_inc) : int'(e.ctx));
      end
      default: begin
        if (v < (3 << k)) begin
          for (int i = 0; i < (v >> k); i++) push(1, 1, 0, int'(e.ctx));
          push(0, 1, 0, int'(e.ctx));
          for (int i = k - 1; i >= 0; i--) push((v >> i) & 1, 1, 0, int'(e.ctx));
        end else begin
          n_escape++;
          r = v - (3 << k); len = k;
          while (r >= (1 << len)) begin r -= (1 << len); len++; end
          for (int i = 0; i < 3 + len - k; i++) push(1, 1, 0, int'(e.ctx));
          push(0, 1, 0, int'(e.ctx));
          for (int i = len - 1; i >= 0; i--) push((r >> i) & 1, 1, 0, int'(e.ctx));
        end
      end
    endcase
  endfunction
  always @(posedge clk) if (rst_n && bin_valid && bin_ready) begin
    int e, g;
    g = (int'(bin_out.term) << 10) | (int'(bin_out.bypass) << 9) | (int'(bin_out.ctx) << 1) | int'(bin_out.bin);
    if (exp_q.size() == 0) chk(0, "unexpected bin");
    else begin
      e = exp_q.pop_front();
      if (e[9]) chk((g | 510) == (e | 510), "bypass bin");   // context not used
      else      chk(g == e, $sformatf("bin %h vs %h", g, e));
    end
  end
  always @(negedge clk) bin_ready = ($urandom_range(0, 4) != 0);
  initial begin
    syn_elem_t e;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      e = '0;
      e.kind = se_kind_e'($urandom_range(0, 5));
      e.ctx = 8'($urandom_range(0, 200));
      e.ctx_max_inc = 3'($urandom_range(0, 2));
      case (e.kind)
        SE_BYP_BITS: begin e.nbits = 5'($urandom_range(1, 16)); e.value = 16'($urandom); end
        SE_TU_CTX, SE_TU_BYP: begin e.nbits = 5'($urandom_range(1, 9)); e.value = 16'($urandom_range(0, int'(e.nbits))); end
        SE_COEF_REM: begin e.nbits = 5'($urandom_range(0, 4)); e.value = 16'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 3000) : $urandom_range(0, 20)); end
        default: e.value = 16'($urandom_range(0, 1));
      endcase
      model(e);
      @(negedge clk); se = e; se_valid = 1;
      #1; while (!se_ready) begin @(negedge clk); #1; end
      @(posedge clk); @(negedge clk); se_valid = 0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    while (exp_q.size() != 0) @(negedge clk);
    // rate: 16 bypass bits in 16 consecutive cycles
    @(negedge clk); se = '0; se.kind = SE_BYP_BITS; se.nbits = 5'd16; se.value = 16'hA5C3; se_valid = 1;
    model(se);
    force bin_ready = 1'b1;
    @(posedge clk); @(negedge clk); se_valid = 0;
    begin int c; c = 0; while (bin_valid) begin c++; @(negedge clk); end chk(c == 16, $sformatf("one bin per cycle (%0d)", c)); end
    release bin_ready;
    chk(n_escape > 0, "escape codes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
