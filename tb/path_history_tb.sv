// path_history_tb: random speculative shifts, committed shifts and restores (also in
// the same cycle) against a model of both copies of H and A, checked every cycle.
module path_history_tb;
  import anp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic spec_shift = 0, spec_taken = 0, com_shift = 0, com_taken = 0, restore = 0;
  logic [A_BITS-1:0] spec_addr = '0, com_addr = '0;
  logic [HIST_LEN-1:0] spec_h, com_h;
  logic [A_LEN-1:0][A_BITS-1:0] spec_a, com_a;

  path_history dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit mh_s [HIST_LEN], mh_c [HIST_LEN];
  int ma_s [A_LEN], ma_c [A_LEN];
  int n_restore = 0;

  initial begin
    foreach (mh_s[i]) begin mh_s[i] = 0; mh_c[i] = 0; end
    foreach (ma_s[i]) begin ma_s[i] = 0; ma_c[i] = 0; end
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    @(negedge clk);
    for (int it = 0; it < 4000; it++) begin
      spec_shift = 1'($urandom % 2); spec_taken = 1'($urandom % 2); spec_addr = A_BITS'($urandom);
      com_shift  = 1'($urandom % 2); com_taken  = 1'($urandom % 2); com_addr  = A_BITS'($urandom);
      restore    = 1'($urandom % 8 == 0);
      if (com_shift) begin
        for (int i = HIST_LEN - 1; i > 0; i--) mh_c[i] = mh_c[i-1];
        mh_c[0] = com_taken;
        for (int i = A_LEN - 1; i > 0; i--) ma_c[i] = ma_c[i-1];
        ma_c[0] = int'(com_addr);
      end
      if (restore) begin
        mh_s = mh_c; ma_s = ma_c; n_restore++;
      end else if (spec_shift) begin
        for (int i = HIST_LEN - 1; i > 0; i--) mh_s[i] = mh_s[i-1];
        mh_s[0] = spec_taken;
        for (int i = A_LEN - 1; i > 0; i--) ma_s[i] = ma_s[i-1];
        ma_s[0] = int'(spec_addr);
      end
      @(negedge clk);
      for (int i = 0; i < HIST_LEN; i++) begin
        checks += 2;
        if (spec_h[i] != mh_s[i]) begin failures++; if (failures < 10) $display("FAIL: spec H[%0d]", i); end
        if (com_h[i]  != mh_c[i]) begin failures++; if (failures < 10) $display("FAIL: com H[%0d]", i); end
      end
      for (int i = 0; i < A_LEN; i++) begin
        checks += 2;
        if (int'(spec_a[i]) != ma_s[i]) begin failures++; if (failures < 10) $display("FAIL: spec A[%0d]", i); end
        if (int'(com_a[i])  != ma_c[i]) begin failures++; if (failures < 10) $display("FAIL: com A[%0d]", i); end
      end
    end
    $display("restores=%0d", n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
