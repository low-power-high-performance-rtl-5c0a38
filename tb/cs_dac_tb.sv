// cs_dac_tb: checks the DAC of each column whose transistor widths are published
// (columns 0, 1, 2, 3, 10, 20 and 128) against those widths, typed in here as a
// table, for random sign-magnitude weights and history bits. Exactly one line must
// carry the current; the positive line is used when sign XOR history is 1.
module cs_dac_tb;
  import anp_pkg::*;

  localparam int NC = 7;
  localparam int COLS [NC] = '{0, 1, 2, 3, 10, 20, 128};
  // Published widths, bit 0 .. bit 5 (a missing transistor is width 0).
  localparam int WID [NC][6] = '{
    '{1, 2, 4, 8, 16, 32},
    '{1, 2, 4, 8, 15, 30},
    '{1, 2, 3, 7, 13, 26},
    '{1, 1, 3, 5, 11, 21},
    '{0, 1, 2, 3, 7, 14},
    '{0, 1, 1, 2, 5, 9},
    '{0, 1, 1, 2, 4, 8}
  };

  weight_t  w [NC];
  logic     h [NC];
  current_t ip [NC];
  current_t in_ [NC];

  for (genvar k = 0; k < NC; k++) begin : g
    cs_dac #(.COL(COLS[k])) u (.weight(w[k]), .hist(h[k]), .i_pos(ip[k]), .i_neg(in_[k]));
  end

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int k = 0; k < NC; k++) begin
        w[k] = weight_t'($urandom % 128);
        if (it < 2) w[k] = (it == 0) ? 7'h3f : 7'h7f;  // full scale, both signs
        h[k] = 1'($urandom % 2);
      end
      #1;
      for (int k = 0; k < NC; k++) begin
        int e;
        e = 0;
        for (int b = 0; b < 6; b++) if (w[k].mag[b]) e += WID[k][b];
        checks++;
        if ((w[k].sign ^ h[k]) ? (int'(ip[k]) != e || in_[k] != 0)
                               : (int'(in_[k]) != e || ip[k] != 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: col %0d w=%h h=%0d pos=%0d neg=%0d expected %0d",
                     COLS[k], w[k], h[k], ip[k], in_[k], e);
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
