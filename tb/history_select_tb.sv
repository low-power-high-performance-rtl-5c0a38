// history_select_tb: random 40-bit histories. Expected selection written in closed
// form: odd tables t take H[1..8]; even tables take H[1+2t .. 8+2t] (H[1] is the most
// recent outcome, bit 0). Also checks that the bias position reads 1 and that
// H[37..40] are never selected, and that every one of H[1..36] is.
module history_select_tb;
  import anp_pkg::*;

  logic [HIST_LEN-1:0] h;
  logic [N_COLS-1:0]   q;

  history_select dut (.h(h), .q(q));

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 2000; it++) begin
      h = {$urandom, $urandom};
      if (it < 40) h = HIST_LEN'(1) << it;  // one-hot sweeps
      #1;
      checks++;
      if (q[0] != 1'b1) begin failures++; $display("FAIL: bias input"); end
      for (int t = 0; t < 16; t++) begin
        int start;
        start = (t % 2 == 1) ? 1 : 1 + 2 * t;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (q[8*t + 1 + k] != h[start + k - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL: table %0d weight %0d", t, k);
          end
        end
      end
      if (it < 40) begin
        checks++;
        if ((it >= 36) != (q[128:1] == '0)) begin
          failures++;
          $display("FAIL: history bit H[%0d] use", it + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
