// dac_array_tb: random weights and history bits on all 129 DACs; the positive and
// negative line totals are compared with sums computed here from the full-scale
// currents S(c) (linear between the published anchor columns, rounded to quarter
// units) and width = round(S * 2^b / 32). Also checks the extremes: all weights at
// positive full scale with all history bits taken, and the same with the bias and
// history flipped.
module dac_array_tb;
  import anp_pkg::*;

  weight_t  [N_COLS-1:0] w;
  logic     [N_COLS-1:0] hist;
  current_t              sp, sn;

  dac_array dut (.w(w), .hist(hist), .sum_pos(sp), .sum_neg(sn));

  int checks = 0, failures = 0;
  int wtab [129][6];

  function automatic real scale_full(int c);
    real xs [7] = '{0, 1, 2, 3, 10, 20, 128};
    real ys [7] = '{32.0, 30.0, 26.25, 21.25, 13.75, 9.25, 8.0};
    real s;
    s = ys[0];
    for (int k = 1; k < 7; k++) begin
      if (c <= xs[k]) begin
        s = ys[k-1] - (ys[k-1] - ys[k]) * (c - xs[k-1]) / (xs[k] - xs[k-1]);
        break;
      end
    end
    return $floor(s * 4.0 + 0.5) / 4.0;
  endfunction

  task automatic check();
    int ep, en;
    ep = 0; en = 0;
    #1;
    for (int c = 0; c < N_COLS; c++) begin
      int cur;
      bit q;
      cur = 0;
      for (int b = 0; b < 6; b++) if (w[c].mag[b]) cur += wtab[c][b];
      q = (c == 0) ? 1'b1 : hist[c];
      if (w[c].sign ^ q) ep += cur; else en += cur;
    end
    checks++;
    if (int'(sp) != ep || int'(sn) != en) begin
      failures++;
      if (failures < 10) $display("FAIL: pos=%0d neg=%0d expected %0d %0d", sp, sn, ep, en);
    end
  endtask

  initial begin
    for (int c = 0; c <= 128; c++)
      for (int b = 0; b < 6; b++)
        wtab[c][b] = $rtoi($floor(scale_full(c) * (2.0 ** b) / 32.0 + 0.5));
    for (int c = 0; c < N_COLS; c++) w[c] = 7'h3f;
    hist = '1;
    check();
    for (int c = 0; c < N_COLS; c++) w[c] = 7'h7f;
    hist = '0;
    check();
    for (int it = 0; it < 3000; it++) begin
      for (int c = 0; c < N_COLS; c++) w[c] = weight_t'($urandom % 128);
      for (int c = 0; c < N_COLS; c++) hist[c] = 1'($urandom % 2);
      check();
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
