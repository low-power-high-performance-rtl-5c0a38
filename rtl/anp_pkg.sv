// anp_pkg: geometry, types and constant functions shared by the analog-assisted
// neural branch predictor.
//
// The predictor computes a dot product of 1 bias weight and H_LEN = 128 correlating
// weights. The correlating weights are grouped in blocks of 8, one block per table,
// so there are N_TABLES = 16 correlating tables plus one bias table. Table sizes and
// weight widths follow the tuned 32 KB geometry: the bias table has 2048 rows, table 0
// (columns 1..8) has 512 rows, tables 1..15 have 256 rows; columns 0..56 hold 7-bit
// weights and columns 57..128 hold 6-bit weights.
//
// Weights are sign-magnitude: the top bit is the sign (1 = negative), the rest is the
// magnitude. A 6-bit weight (sign + 5-bit magnitude) is presented to its DAC as a
// 7-bit weight whose magnitude LSB is 0, i.e. the 5 stored bits drive DAC bits 1..5;
// this mapping is a choice of this design.
//
// dac_width() gives the transistor width (in units of the unit current I_u) of each
// DAC bit, which is how the coefficient f(i) enters the dot product. Seven columns
// have published widths; they are reproduced exactly by width = round(S(i) * 2^b / 32)
// with the full-scale values S(0)=32, S(1)=30, S(2)=26.25, S(3)=21.25, S(10)=13.75,
// S(20)=9.25, S(128)=8. Other columns interpolate S linearly between those anchors
// (this interpolation is a choice of this design). S is handled in quarter units.
package anp_pkg;

  localparam int unsigned H_LEN      = 128;            // correlating weights (h)
  localparam int unsigned N_COLS     = H_LEN + 1;      // with the bias weight
  localparam int unsigned BLOCK      = 8;              // weights per table row
  localparam int unsigned N_TABLES   = H_LEN / BLOCK;  // 16 correlating tables
  localparam int unsigned HIST_LEN   = H_LEN / 4 + 8;  // 40 outcome bits in H
  localparam int unsigned A_LEN      = H_LEN;          // 128 address entries in A
  localparam int unsigned A_BITS     = 2;              // address bits kept per entry
  localparam int unsigned BIAS_ROWS  = 2048;
  localparam int unsigned BIAS_AW    = $clog2(BIAS_ROWS);
  localparam int unsigned MAX_AW     = 9;              // widest correlating index
  localparam int unsigned WMAX_BITS  = 7;              // widest weight
  localparam int unsigned MAG_BITS   = WMAX_BITS - 1;  // DAC bits per weight
  localparam int unsigned WIDE_COLS  = 56;             // columns 0..56 are 7-bit
  localparam int unsigned SUM_BITS   = 14;             // line current range, units of I_u
  localparam int unsigned THETA_BITS = 12;

  // A weight as seen by a DAC.
  typedef struct packed {
    logic                sign;  // 1 = negative
    logic [MAG_BITS-1:0] mag;
  } weight_t;

  typedef logic [SUM_BITS-1:0] current_t;

  // Rows of correlating table t.
  function automatic int unsigned tbl_rows(input int unsigned t);
    return (t == 0) ? 512 : 256;
  endfunction

  function automatic int unsigned tbl_aw(input int unsigned t);
    return (t == 0) ? 9 : 8;  // log2 of tbl_rows(t)
  endfunction

  // Stored bits per weight in column c (c = 0 is the bias column).
  function automatic int unsigned col_wbits(input int unsigned c);
    return (c <= WIDE_COLS) ? 7 : 6;
  endfunction

  // Stored bits per weight in correlating table t (columns 8t+1 .. 8t+8).
  function automatic int unsigned tbl_wbits(input int unsigned t);
    return col_wbits(BLOCK * t + BLOCK);
  endfunction

  // Full-scale DAC current of column c in quarter units of I_u.
  function automatic int unsigned dac_scale_q(input int unsigned c);
    int unsigned xa, xb, ya, yb;
    if (c <= 1)       begin xa = 0;  xb = 1;   ya = 128; yb = 120; end
    else if (c <= 2)  begin xa = 1;  xb = 2;   ya = 120; yb = 105; end
    else if (c <= 3)  begin xa = 2;  xb = 3;   ya = 105; yb = 85;  end
    else if (c <= 10) begin xa = 3;  xb = 10;  ya = 85;  yb = 55;  end
    else if (c <= 20) begin xa = 10; xb = 20;  ya = 55;  yb = 37;  end
    else              begin xa = 20; xb = 128; ya = 37;  yb = 32;  end
    // ya >= yb everywhere: round the decreasing interpolation to nearest.
    return ya - ((ya - yb) * (c - xa) + (xb - xa) / 2) / (xb - xa);
  endfunction

  // Transistor width of DAC bit b in column c, units of I_u.
  function automatic int unsigned dac_width(input int unsigned c, input int unsigned b);
    return (dac_scale_q(c) * (1 << b) + 64) >> 7;
  endfunction

  // Largest current one DAC can put on a line.
  function automatic int unsigned dac_full_scale(input int unsigned c);
    int unsigned s;
    s = 0;
    for (int unsigned b = 0; b < MAG_BITS; b++) s += dac_width(c, b);
    return s;
  endfunction

endpackage
