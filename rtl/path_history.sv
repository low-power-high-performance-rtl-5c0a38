// path_history: the branch outcome history H and the branch address history A, each
// kept in a speculative and a committed copy.
//
// H is a shift register of HIST_LEN outcome bits (1 = taken, 0 = not taken; bit 0 is
// the most recent outcome, called H[1] in the algorithm). A is a shift register of
// A_LEN entries holding the A_BITS lowest-order address bits of the branch whose
// outcome sits at the same position. The speculative copy is shifted with the
// predicted outcome when a prediction is made; the committed copy is shifted with the
// actual outcome when a branch resolves. On a misprediction the speculative copy is
// restored from the committed copy (including the branch just resolved), which
// discards the wrong-path history. A restore wins over a speculative shift in the
// same cycle. Both copies reset to all zeros. All updates take effect at the clock
// edge.
module path_history
  import anp_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            spec_shift,
  input  logic                            spec_taken,
  input  logic [A_BITS-1:0]               spec_addr,
  input  logic                            com_shift,
  input  logic                            com_taken,
  input  logic [A_BITS-1:0]               com_addr,
  input  logic                            restore,
  output logic [HIST_LEN-1:0]             spec_h,
  output logic [A_LEN-1:0][A_BITS-1:0]    spec_a,
  output logic [HIST_LEN-1:0]             com_h,
  output logic [A_LEN-1:0][A_BITS-1:0]    com_a
);

  logic [HIST_LEN-1:0]          com_h_nx;
  logic [A_LEN-1:0][A_BITS-1:0] com_a_nx;

  always_comb begin
    com_h_nx = com_h;
    com_a_nx = com_a;
    if (com_shift) begin
      com_h_nx = {com_h[HIST_LEN-2:0], com_taken};
      com_a_nx = {com_a[A_LEN-2:0], com_addr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spec_h <= '0;
      spec_a <= '0;
      com_h  <= '0;
      com_a  <= '0;
    end else begin
      com_h <= com_h_nx;
      com_a <= com_a_nx;
      if (restore) begin
        spec_h <= com_h_nx;
        spec_a <= com_a_nx;
      end else if (spec_shift) begin
        spec_h <= {spec_h[HIST_LEN-2:0], spec_taken};
        spec_a <= {spec_a[A_LEN-2:0], spec_addr};
      end
    end
  end

endmodule
