// pred_comparator_tb: random line currents and thresholds, including ties and
// differences exactly at the threshold. Checks the tracking outputs (taken when
// positive >= negative, train when |difference| <= theta) and that latch captures
// them at the clock edge, with valid high for exactly the following cycle.
module pred_comparator_tb;
  import anp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, latch = 1'b0;
  current_t sp = '0, sn = '0;
  logic [THETA_BITS-1:0] theta = '0;
  logic taken_d, train_d, valid, taken, train;

  pred_comparator dut (.clk, .rst_n, .latch, .sum_pos(sp), .sum_neg(sn), .theta,
                       .taken_d, .train_d, .valid, .taken, .train);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s pos=%0d neg=%0d theta=%0d", what, sp, sn, theta);
    end
  endtask

  initial begin
    bit et, er, l;
    int d;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    @(negedge clk);
    for (int it = 0; it < 5000; it++) begin
      sp    = current_t'($urandom % 3000);
      sn    = (it % 7 == 0) ? sp : current_t'($urandom % 3000);
      theta = THETA_BITS'($urandom % 400);
      if (it % 5 == 0) sn = (sp > current_t'(theta)) ? sp - current_t'(theta) : sp + current_t'(theta);
      l = 1'($urandom % 2);
      latch = l;
      #1;
      et = (int'(sp) >= int'(sn));
      d  = int'(sp) - int'(sn);
      if (d < 0) d = -d;
      er = (d <= int'(theta));
      chk(taken_d == et, "taken_d");
      chk(train_d == er, "train_d");
      @(negedge clk);
      chk(valid == l, "valid");
      if (l) begin
        chk(taken == et, "latched taken");
        chk(train == er, "latched train");
      end
    end
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
