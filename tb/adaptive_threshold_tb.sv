// adaptive_threshold_tb: drives runs of mispredictions, of weak correct predictions
// and random mixes, and compares theta (and the inc / dec pulses) every cycle with a
// counter model: +1 per misprediction, -1 per weak correct prediction, theta moving
// by one and the counter restarting at 0 when it would pass +63 or -64.
module adaptive_threshold_tb;
  import anp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic upd = 0, mispred = 0, low_margin = 0;
  logic [THETA_BITS-1:0] theta;
  logic inc, dec;

  adaptive_threshold dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_theta = 70, m_tc = 0, n_inc = 0, n_dec = 0;

  task automatic step(bit u, bit m, bit l);
    bit ei, ed;
    upd = u; mispred = m; low_margin = l;
    ei = 0; ed = 0;
    if (u && m) begin
      if (m_tc == 63) begin m_tc = 0; m_theta++; ei = 1; n_inc++; end else m_tc++;
    end else if (u && l) begin
      if (m_tc == -64) begin m_tc = 0; m_theta--; ed = 1; n_dec++; end else m_tc--;
    end
    #1;
    checks++;
    if (inc != ei || dec != ed) begin failures++; if (failures < 10) $display("FAIL: inc/dec"); end
    @(negedge clk);
    checks++;
    if (int'(theta) != m_theta) begin
      failures++;
      if (failures < 10) $display("FAIL: theta %0d expected %0d", theta, m_theta);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (theta != 70) begin failures++; $display("FAIL: reset value %0d", theta); end
    repeat (200) step(1, 1, 0);          // two increases
    repeat (300) step(1, 0, 1);          // back down
    repeat (100) step(0, 1, 1);          // no update: nothing moves
    repeat (100) step(1, 0, 0);          // strong correct predictions: nothing moves
    repeat (5000) step(1'($urandom % 4 != 0), 1'($urandom % 2), 1'($urandom % 2));
    checks++;
    if (n_inc < 2 || n_dec < 2) begin failures++; $display("FAIL: too few moves"); end
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
