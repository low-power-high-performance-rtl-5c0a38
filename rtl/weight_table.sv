// weight_table: one SRAM of predictor weights (a bias table or a table of correlating
// weights).
//
// Each row holds PER_ROW weights of WBITS bits (sign-magnitude, sign in the top bit).
// The row count is a power of two so that indexing modulo the row count is just a
// choice of low-order index bits. Two synchronous read ports and one write port:
//   - port A is the prediction read: ra_addr sampled when ra_en is 1, row on ra_data
//     the next cycle;
//   - port B is the training read with the same timing;
//   - the write port stores w_data at w_addr at the clock edge when w_en is 1.
// A read in the same cycle as a write to the same row returns the old row. The array
// has no reset; the predictor clears it with a sweep after reset. Port count and
// read-during-write behaviour are choices of this design.
module weight_table #(
  parameter int unsigned ROWS    = 256,
  parameter int unsigned PER_ROW = 8,
  parameter int unsigned WBITS   = 7,
  localparam int unsigned AW     = $clog2(ROWS),
  localparam int unsigned DW     = PER_ROW * WBITS
) (
  input  logic          clk,
  input  logic          ra_en,
  input  logic [AW-1:0] ra_addr,
  output logic [DW-1:0] ra_data,
  input  logic          rb_en,
  input  logic [AW-1:0] rb_addr,
  output logic [DW-1:0] rb_data,
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  logic [DW-1:0] w_data
);

  logic [DW-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (ra_en) ra_data <= mem[ra_addr];
    if (rb_en) rb_data <= mem[rb_addr];
    if (w_en)  mem[w_addr] <= w_data;
  end

endmodule
