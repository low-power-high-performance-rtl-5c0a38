// pred_comparator: the track-and-latch comparators at the end of the analog array.
//
// The prediction comparator decides taken when the positive line is at least the
// negative line (perceptron output >= 0). The training comparator raises the training
// signal when the output magnitude |sum_pos - sum_neg| does not exceed the threshold
// theta. In the circuit both currents pass through equal resistors and a preamplifier
// first; that conversion is monotonic, so the model compares the currents directly.
//
// Timing: taken_d / train_d are the comparators while tracking (combinational); at a
// clock edge with latch = 1 they are latched into taken / train and valid goes high
// for one cycle.
module pred_comparator
  import anp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  latch,
  input  current_t              sum_pos,
  input  current_t              sum_neg,
  input  logic [THETA_BITS-1:0] theta,
  output logic                  taken_d,
  output logic                  train_d,
  output logic                  valid,
  output logic                  taken,
  output logic                  train
);

  current_t diff;

  always_comb begin
    taken_d = (sum_pos >= sum_neg);
    diff    = taken_d ? (sum_pos - sum_neg) : (sum_neg - sum_pos);
    train_d = (32'(diff) <= 32'(theta));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      taken <= 1'b0;
      train <= 1'b0;
    end else begin
      valid <= latch;
      if (latch) begin
        taken <= taken_d;
        train <= train_d;
      end
    end
  end

endmodule
