// history_select: routes branch outcome history bits to the 128 correlating weights.
//
// For the block of weights starting at position i = 8t+1 (table t), eight consecutive
// history bits H[j] .. H[j+7] are chosen, with j = i mod 8 = 1 when t = i/8 is odd and
// j = i mod 8 + i/4 when t is even (integer division). So odd tables reuse the eight
// most recent outcomes and even tables see a window that slides back through the
// history: redundant history, which lets 128 weights work from only HIST_LEN = 40
// outcome bits. H[1] is the most recent outcome (bit 0 of h). No logic, only wiring.
//
// Interface: h (HIST_LEN bits); q[c] is the history bit multiplying weight column c,
// c = 1..128 (q[0] is unused and driven 1, the bias input).
module history_select
  import anp_pkg::*;
(
  input  logic [HIST_LEN-1:0] h,
  output logic [N_COLS-1:0]   q
);

  always_comb begin
    q = '0;
    q[0] = 1'b1;
    for (int unsigned t = 0; t < N_TABLES; t++) begin
      int unsigned i, j;
      i = BLOCK * t + 1;
      j = ((i / BLOCK) % 2 == 1) ? (i % BLOCK) : (i % BLOCK + i / 4);
      for (int unsigned k = 0; k < BLOCK; k++) q[i + k] = h[j + k - 1];
    end
  end

endmodule
