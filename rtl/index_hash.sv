// index_hash: row indices of the 17 weight tables for the branch at address pc.
//
// The bias table is indexed by pc modulo its row count. Correlating table t (weight
// columns 8t+1 .. 8t+8) is indexed by hash(A[8t+1 .. 8t+8]) XOR pc, modulo its row
// count, where A[1] is the most recent entry of the address history. The hash only
// routes bits: index bit b takes address bit b/8 of entry A[8t+1 + b mod 8], so
// eight bits come from the lowest address bit of the eight entries and a ninth (for
// the 512-row table) from the next bit of the most recent one. Which bits the hash
// picks is a choice of this design; the XOR with pc and the modulo follow the
// algorithm. Purely combinational; indices wider than a table are zero above its
// width.
module index_hash
  import anp_pkg::*;
#(
  parameter int unsigned PC_W = 32
) (
  input  logic [PC_W-1:0]                       pc,
  input  logic [A_LEN-1:0][A_BITS-1:0]          a_hist,
  output logic [BIAS_AW-1:0]                    bias_idx,
  output logic [N_TABLES-1:0][MAX_AW-1:0]       idx
);

  assign bias_idx = pc[BIAS_AW-1:0];

  always_comb begin
    for (int unsigned t = 0; t < N_TABLES; t++) begin
      logic [MAX_AW-1:0] h;
      h = '0;
      for (int unsigned b = 0; b < MAX_AW; b++) begin
        if (b < tbl_aw(t)) h[b] = a_hist[BLOCK * t + (b % BLOCK)][b / BLOCK] ^ pc[b];
      end
      idx[t] = h;
    end
  end

endmodule
