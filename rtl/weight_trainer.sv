// weight_trainer: a row of saturating up/down counters for sign-magnitude weights.
//
// Training rule of the perceptron family: each weight whose history bit agrees with
// the branch outcome is incremented, each that disagrees is decremented, saturating
// at +/-(2^(WBITS-1)-1). For the bias row hist is tied to 1, so the bias moves toward
// the outcome. Weights are sign-magnitude (sign in the top bit, 1 = negative); a
// "negative zero" counts as zero and results are never negative zero.
//
// Interface: w_in (PER_ROW weights), hist (one bit per weight), taken; w_out is the
// trained row. Purely combinational; the caller decides whether to write it back.
module weight_trainer #(
  parameter int unsigned PER_ROW = 8,
  parameter int unsigned WBITS   = 7
) (
  input  logic [PER_ROW-1:0][WBITS-1:0] w_in,
  input  logic [PER_ROW-1:0]            hist,
  input  logic                          taken,
  output logic [PER_ROW-1:0][WBITS-1:0] w_out
);

  localparam int MAXV = (1 << (WBITS - 1)) - 1;

  always_comb begin
    for (int j = 0; j < PER_ROW; j++) begin
      int v;
      v = int'(w_in[j][WBITS-2:0]);
      if (w_in[j][WBITS-1]) v = -v;
      if (hist[j] == taken) begin
        if (v < MAXV) v = v + 1;
      end else begin
        if (v > -MAXV) v = v - 1;
      end
      if (v < 0) w_out[j] = {1'b1, (WBITS-1)'(-v)};
      else       w_out[j] = {1'b0, (WBITS-1)'(v)};
    end
  end

endmodule
