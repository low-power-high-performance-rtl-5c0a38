// dac_scan_test_tb: loads random test vectors through the scan chain and checks that
// in test mode the DAC inputs are exactly the scanned weights and history (bias input
// 1), that in functional mode they are the functional inputs, that a captured decision
// is the first bit shifted out and that every bit shifted in leaves the chain
// SCAN_LEN + 1 shifts later, and that the mismatch counter counts captures that
// disagree with the scanned expected bit.
module dac_scan_test_tb;
  import anp_pkg::*;

  localparam int L = 1 + H_LEN + N_COLS * 7;

  logic clk = 1'b0, rst_n = 1'b1;
  logic test_mode = 0, scan_en = 0, scan_in = 0, capture = 0, taken_d = 0;
  logic scan_out;
  weight_t [N_COLS-1:0] func_w, dac_w;
  logic    [N_COLS-1:0] func_hist, dac_hist;
  logic [15:0] mismatches;

  dac_scan_test dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_mis = 0;
  logic [L-1:0] vec, prev_vec;
  bit prev_res;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    @(negedge clk);
    prev_vec = '0;
    prev_res = 0;
    for (int v = 0; v < 20; v++) begin
      for (int i = 0; i < L; i += 32) vec[i +: 32] = $urandom;
      // Shift the vector in, bit 0 first, and watch what comes out.
      test_mode = 1'($urandom % 2);
      scan_en = 1;
      for (int i = 0; i < L; i++) begin
        scan_in = vec[i];
        #1;
        if (i == 0) chk(scan_out == prev_res, "captured result is first out");
        else        chk(scan_out == prev_vec[i-1], "previous vector shifts out");
        @(negedge clk);
      end
      scan_en = 0;
      for (int c = 0; c < N_COLS; c++) func_w[c] = weight_t'($urandom);
      func_hist = {$urandom, $urandom, $urandom, $urandom, $urandom};
      test_mode = 1;
      #1;
      chk(dac_w == vec[N_COLS*7-1:0], "scanned weights drive the DACs");
      chk(dac_hist == {vec[L-2:N_COLS*7], 1'b1}, "scanned history drives the DACs");
      test_mode = 0;
      #1;
      chk(dac_w == func_w && dac_hist == func_hist, "functional inputs in functional mode");
      test_mode = 1;
      // Capture a decision.
      taken_d = 1'($urandom % 2);
      if (taken_d != vec[L-1]) n_mis++;
      capture = 1;
      @(negedge clk);
      capture = 0;
      chk(int'(mismatches) == n_mis, "mismatch count");
      chk(scan_out == taken_d, "capture");
      prev_res = taken_d;
      prev_vec = vec;
    end
    chk(n_mis > 0, "some mismatches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
