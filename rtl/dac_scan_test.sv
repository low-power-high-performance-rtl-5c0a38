// dac_scan_test: scan access to the analog dot-product unit for manufacturing test.
//
// A chain of SCAN_LEN registers holds a test vector: 129 weights (7 bits each), 128
// history bits and the expected prediction. With test_mode = 1 the vector, not the
// tables and history, drives the DAC array. Shifting (scan_en = 1) moves scan_in into
// the top of the chain and the chain down by one bit per clock, so a vector is
// loaded bit 0 first; the bit leaving the chain goes into the result register, whose
// value is scan_out. A capture cycle (capture = 1, scan_en = 0) stores the
// comparator's decision in the result register, to be shifted out first with the next
// vector, and counts a mismatch when it differs from the expected bit. The mismatch
// count serves as the on-chip pass/fail signal: a part is judged good when its
// predictions agree with the expected ones often enough.
//
// Loading weights through a chain, capturing the one-bit prediction, and comparing
// with stored expected outputs follow the published test approach; the chain order,
// the capture protocol and the mismatch counter are choices of this design.
module dac_scan_test
  import anp_pkg::*;
#(
  parameter int unsigned CNT_BITS = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  test_mode,
  input  logic                  scan_en,
  input  logic                  scan_in,
  input  logic                  capture,
  output logic                  scan_out,
  // functional inputs and the muxed DAC inputs
  input  weight_t [N_COLS-1:0]  func_w,
  input  logic    [N_COLS-1:0]  func_hist,
  output weight_t [N_COLS-1:0]  dac_w,
  output logic    [N_COLS-1:0]  dac_hist,
  // comparator decision (tracking output)
  input  logic                  taken_d,
  output logic [CNT_BITS-1:0]   mismatches
);

  typedef struct packed {
    logic                 expected;
    logic [H_LEN:1]       hist;
    weight_t [N_COLS-1:0] w;
  } scan_vec_t;

  localparam int unsigned SCAN_LEN = $bits(scan_vec_t);

  scan_vec_t sr;
  logic      res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      res        <= 1'b0;
      mismatches <= '0;
    end else if (scan_en) begin
      sr  <= scan_vec_t'({scan_in, sr[SCAN_LEN-1:1]});
      res <= sr[0];
    end else if (capture) begin
      res <= taken_d;
      if (taken_d != sr.expected && mismatches != '1) mismatches <= mismatches + 1'b1;
    end
  end

  assign scan_out = res;
  assign dac_w    = test_mode ? sr.w : func_w;
  assign dac_hist = test_mode ? {sr.hist, 1'b1} : func_hist;

endmodule
