// dac_array: the analog dot-product array, modelled digitally.
//
// One cs_dac per weight position: the bias DAC (column 0, history input tied to 1)
// and 128 correlating DACs (columns 1..128). All DACs share a positive and a negative
// line, on which their currents add by Kirchhoff's current law; here the lines are
// two integer sums in units of I_u. sum_pos - sum_neg is the coefficient-weighted
// perceptron output. Purely combinational: in the circuit the array settles within
// one cycle of the table read.
//
// Interface: w[c] is the weight of column c (7-bit sign-magnitude form), hist[c] the
// bipolar history bit multiplying column c (hist[0] is ignored, the bias uses +1).
module dac_array
  import anp_pkg::*;
(
  input  weight_t [N_COLS-1:0] w,
  input  logic    [N_COLS-1:0] hist,
  output current_t             sum_pos,
  output current_t             sum_neg
);

  current_t [N_COLS-1:0] ip, in_;

  for (genvar c = 0; c < N_COLS; c++) begin : g_dac
    cs_dac #(.COL(c)) u_dac (
      .weight (w[c]),
      .hist   ((c == 0) ? 1'b1 : hist[c]),
      .i_pos  (ip[c]),
      .i_neg  (in_[c])
    );
  end

  // The two shared summing lines.
  always_comb begin
    sum_pos = '0;
    sum_neg = '0;
    for (int c = 0; c < N_COLS; c++) begin
      sum_pos += ip[c];
      sum_neg += in_[c];
    end
  end

endmodule
