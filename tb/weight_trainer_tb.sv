// weight_trainer_tb: checks a row of eight 7-bit counters and a row of eight 6-bit
// counters. Random sign-magnitude weights (including both zeros and the saturation
// values), history bits and outcomes; expected values computed here as integers:
// +1 when the history bit equals the outcome, -1 otherwise, clamped to +/-63 or
// +/-31, and written back without a negative zero.
module weight_trainer_tb;

  logic [7:0][6:0] wi7, wo7;
  logic [7:0][5:0] wi6, wo6;
  logic [7:0]      h;
  logic            tk;

  weight_trainer #(.PER_ROW(8), .WBITS(7)) u7 (.w_in(wi7), .hist(h), .taken(tk), .w_out(wo7));
  weight_trainer #(.PER_ROW(8), .WBITS(6)) u6 (.w_in(wi6), .hist(h), .taken(tk), .w_out(wo6));

  int checks = 0, failures = 0;

  function automatic int to_int(logic [6:0] w, int bits);
    int m;
    m = int'(w) & ((1 << (bits - 1)) - 1);
    return w[bits-1] ? -m : m;
  endfunction

  function automatic logic [6:0] expect_w(int v, bit up, int bits);
    int maxv, r;
    maxv = (1 << (bits - 1)) - 1;
    r = up ? v + 1 : v - 1;
    if (r > maxv) r = maxv;
    if (r < -maxv) r = -maxv;
    return (r < 0) ? ((7'(1) << (bits - 1)) | 7'(-r)) : 7'(r);
  endfunction

  initial begin
    for (int it = 0; it < 4000; it++) begin
      for (int j = 0; j < 8; j++) begin
        int sel;
        sel = int'($urandom % 6);
        wi7[j] = (sel == 0) ? 7'h3f : (sel == 1) ? 7'h7f : (sel == 2) ? 7'h40 : 7'($urandom);
        wi6[j] = (sel == 0) ? 6'h1f : (sel == 1) ? 6'h3f : (sel == 2) ? 6'h20 : 6'($urandom);
      end
      h  = 8'($urandom);
      tk = 1'($urandom % 2);
      #1;
      for (int j = 0; j < 8; j++) begin
        logic [6:0] e7, e6;
        e7 = expect_w(to_int(wi7[j], 7), h[j] == tk, 7);
        e6 = expect_w(to_int({1'b0, wi6[j]}, 6), h[j] == tk, 6);
        checks += 2;
        if (wo7[j] != e7) begin
          failures++;
          if (failures < 10) $display("FAIL: 7-bit %h h=%0d t=%0d -> %h expected %h", wi7[j], h[j], tk, wo7[j], e7);
        end
        if ({1'b0, wo6[j]} != e6) begin
          failures++;
          if (failures < 10) $display("FAIL: 6-bit %h h=%0d t=%0d -> %h expected %h", wi6[j], h[j], tk, wo6[j], e6);
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
