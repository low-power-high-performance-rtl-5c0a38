// index_hash_tb: random pc and address histories. For each table the expected index
// is assembled here bit by bit: bits 0..7 are the lowest address bit of the eight
// entries A[8t+1] .. A[8t+8] (most recent first), bit 8 (512-row table 0 only) is the
// second address bit of A[8t+1]; the result is XORed with pc and cut to the table's
// row count. The bias index is pc modulo 2048.
module index_hash_tb;
  import anp_pkg::*;

  logic [31:0] pc;
  logic [A_LEN-1:0][A_BITS-1:0] a;
  logic [BIAS_AW-1:0] bias_idx;
  logic [N_TABLES-1:0][MAX_AW-1:0] idx;

  index_hash dut (.pc(pc), .a_hist(a), .bias_idx(bias_idx), .idx(idx));

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 3000; it++) begin
      pc = $urandom;
      for (int i = 0; i < A_LEN; i++) a[i] = A_BITS'($urandom);
      #1;
      checks++;
      if (int'(bias_idx) != int'(pc % 2048)) begin failures++; $display("FAIL: bias index"); end
      for (int t = 0; t < 16; t++) begin
        int h, rows, e;
        h = 0;
        for (int k = 0; k < 8; k++) h |= int'(a[8*t + k][0]) << k;
        if (t == 0) h |= int'(a[0][1]) << 8;
        rows = (t == 0) ? 512 : 256;
        e = (h ^ int'(pc[8:0])) & (rows - 1);
        checks++;
        if (int'(idx[t]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: table %0d index %0d expected %0d", t, idx[t], e);
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
