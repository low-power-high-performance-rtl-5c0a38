// weight_table_tb: fills a 256-row table of eight 7-bit weights with random rows
// through the write port, then reads random rows on both read ports, checking the
// one-cycle read latency, that a row read in the cycle it is written returns the old
// contents, and that a port without its enable holds its last output.
module weight_table_tb;

  localparam int ROWS = 256;
  localparam int DW   = 56;

  logic          clk = 1'b0;
  logic          ra_en = 0, rb_en = 0, w_en = 0;
  logic [7:0]    ra_addr = '0, rb_addr = '0, w_addr = '0;
  logic [DW-1:0] ra_data, rb_data, w_data = '0;

  weight_table #(.ROWS(ROWS), .PER_ROW(8), .WBITS(7)) dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      w_en = 1; w_addr = 8'(r);
      w_data = {$urandom, $urandom};
      ref_mem[r] = w_data;
      @(negedge clk);
    end
    w_en = 0;
    for (int it = 0; it < 3000; it++) begin
      logic [DW-1:0] ea, eb, old_a, old_b;
      bit ena, enb;
      ena = 1'($urandom % 4 != 0);
      enb = 1'($urandom % 4 != 0);
      ra_en = ena; rb_en = enb;
      ra_addr = 8'($urandom); rb_addr = 8'($urandom);
      old_a = ra_data; old_b = rb_data;
      ea = ena ? ref_mem[ra_addr] : old_a;
      eb = enb ? ref_mem[rb_addr] : old_b;
      // Sometimes write the row being read on port A in the same cycle.
      w_en = 1'($urandom % 2);
      w_addr = (it % 3 == 0) ? ra_addr : 8'($urandom);
      w_data = {$urandom, $urandom};
      @(negedge clk);
      if (w_en) ref_mem[w_addr] = w_data;
      checks += 2;
      if (ra_data != ea) begin failures++; if (failures < 10) $display("FAIL: port A row %0d", ra_addr); end
      if (rb_data != eb) begin failures++; if (failures < 10) $display("FAIL: port B row %0d", rb_addr); end
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
