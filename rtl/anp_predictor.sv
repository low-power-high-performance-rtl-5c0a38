// anp_predictor: analog-assisted path-based neural branch predictor (digital model).
//
// Prediction of the branch at pc is the sign of a dot product of 129 weights: a bias
// weight from a 2048-row table indexed by pc, and 128 correlating weights read as 16
// rows of 8 from 16 tables, each indexed by a hash of recent branch addresses XOR pc.
// Each correlating weight is multiplied by a history bit picked by history_select and
// by a fixed coefficient f(i) built into its DAC. In the circuit the products are
// currents summed on a positive and a negative line and compared; here dac_array and
// pred_comparator model that with integer currents. A second comparison against the
// adaptive threshold theta yields the training signal.
//
// Pipeline (one prediction in flight):
//   cycle 0  pred_req && pred_ready: indices from the speculative history, tables read.
//   cycle 1  weights drive the DAC array; the comparators latch at the end of the
//            cycle and the speculative history shifts in the predicted outcome.
//   cycle 2  pred_valid with pred_taken and pred_train.
// pred_ready is low in cycle 1 (the next prediction needs the shifted history), while
// the tables are being cleared, while trained weights are being written back, in test
// mode, and in a cycle where a mispredicted branch resolves.
//
// Update (one per cycle, two when the weights are trained):
//   cycle 0  upd_valid && upd_ready: the committed history takes the outcome, the
//            threshold adapts, a misprediction restores the speculative history, and
//            if training is due (misprediction, or upd_train returned from the
//            prediction) the indices are recomputed from the committed history and the
//            rows are read on the training port.
//   cycle 1  the rows pass through the saturating counters and are written back;
//            upd_ready is low.
// Branches must be updated in program order, each with the pred_taken and pred_train
// it was given. After reset the tables are swept to zero (2048 cycles, init_done low).
//
// Test: with test_mode = 1 a vector scanned into dac_scan_test drives the DAC array
// instead of the tables; scan_capture records the comparator's decision, which is
// shifted out on scan_out, and counts disagreements with the expected bit.
//
// Table sizes, weight widths, the history lengths, the redundant history selection,
// sign-magnitude weights with sign XOR history steering, and threshold training follow
// the published design. The handshakes, the pipeline, the reset sweep and the
// recomputation of indices at update time are choices of this design.
module anp_predictor
  import anp_pkg::*;
#(
  parameter int unsigned PC_W       = 32,
  parameter int unsigned TC_BITS    = 7,
  parameter int unsigned THETA_INIT = 70
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  init_done,
  // prediction
  input  logic                  pred_req,
  input  logic [PC_W-1:0]       pred_pc,
  output logic                  pred_ready,
  output logic                  pred_valid,
  output logic                  pred_taken,
  output logic                  pred_train,
  // update
  input  logic                  upd_valid,
  input  logic [PC_W-1:0]       upd_pc,
  input  logic                  upd_taken,
  input  logic                  upd_pred_taken,
  input  logic                  upd_train,
  output logic                  upd_ready,
  // manufacturing test of the analog unit
  input  logic                  test_mode,
  input  logic                  scan_en,
  input  logic                  scan_in,
  input  logic                  scan_capture,
  output logic                  scan_out,
  output logic [15:0]           scan_mismatches,
  // status
  output logic [THETA_BITS-1:0] theta
);

  // ---------------------------------------------------------------- reset sweep
  logic [BIAS_AW-1:0] clr_idx;
  logic               clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_idx  <= '0;
      clearing <= 1'b1;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == '1) clearing <= 1'b0;
    end
  end
  assign init_done = !clearing;

  // ---------------------------------------------------------------- history
  logic [HIST_LEN-1:0]          spec_h, com_h;
  logic [A_LEN-1:0][A_BITS-1:0] spec_a, com_a;
  logic                         spec_shift, taken_d;
  logic [A_BITS-1:0]            s1_addr;
  logic                         upd_fire, mispred, do_train;

  path_history u_hist (
    .clk, .rst_n,
    .spec_shift (spec_shift),
    .spec_taken (taken_d),
    .spec_addr  (s1_addr),
    .com_shift  (upd_fire),
    .com_taken  (upd_taken),
    .com_addr   (upd_pc[A_BITS-1:0]),
    .restore    (upd_fire && mispred),
    .spec_h, .spec_a, .com_h, .com_a
  );

  // ---------------------------------------------------------------- handshakes
  logic s1_valid, t1_valid;

  assign mispred    = (upd_taken != upd_pred_taken);
  assign do_train   = mispred || upd_train;
  assign upd_ready  = !clearing && !t1_valid;
  assign upd_fire   = upd_valid && upd_ready;
  assign pred_ready = !clearing && !test_mode && !s1_valid && !t1_valid && !(upd_fire && mispred);

  logic pred_fire;
  assign pred_fire  = pred_req && pred_ready;
  assign spec_shift = s1_valid;

  // ---------------------------------------------------------------- indices
  logic [BIAS_AW-1:0]                 p_bias_idx, u_bias_idx, t1_bias_idx;
  logic [N_TABLES-1:0][MAX_AW-1:0]    p_idx, u_idx, t1_idx;
  logic [N_COLS-1:0]                  p_q, u_q, s1_q, t1_q;
  logic                               t1_taken;

  index_hash #(.PC_W(PC_W)) u_pidx (.pc(pred_pc), .a_hist(spec_a), .bias_idx(p_bias_idx), .idx(p_idx));
  index_hash #(.PC_W(PC_W)) u_uidx (.pc(upd_pc),  .a_hist(com_a),  .bias_idx(u_bias_idx), .idx(u_idx));
  history_select u_psel (.h(spec_h), .q(p_q));
  history_select u_usel (.h(com_h),  .q(u_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1_addr     <= '0;
      s1_q        <= '0;
      t1_valid    <= 1'b0;
      t1_taken    <= 1'b0;
      t1_q        <= '0;
      t1_idx      <= '0;
      t1_bias_idx <= '0;
    end else begin
      s1_valid <= pred_fire;
      if (pred_fire) begin
        s1_addr <= pred_pc[A_BITS-1:0];
        s1_q    <= p_q;
      end
      t1_valid <= upd_fire && do_train;
      if (upd_fire && do_train) begin
        t1_taken    <= upd_taken;
        t1_q        <= u_q;
        t1_idx      <= u_idx;
        t1_bias_idx <= u_bias_idx;
      end
    end
  end

  // ---------------------------------------------------------------- weight tables
  weight_t [N_COLS-1:0] w;
  logic                 t_rd;
  assign t_rd = upd_fire && do_train;

  // Bias table with its counters.
  logic [6:0] bias_rd, bias_tr, bias_new;
  weight_table #(.ROWS(BIAS_ROWS), .PER_ROW(1), .WBITS(7)) u_bias (
    .clk,
    .ra_en (pred_fire), .ra_addr (p_bias_idx), .ra_data (w[0]),
    .rb_en (t_rd),      .rb_addr (u_bias_idx), .rb_data (bias_rd),
    .w_en  (clearing || t1_valid),
    .w_addr(clearing ? clr_idx : t1_bias_idx),
    .w_data(clearing ? '0 : bias_new)
  );
  weight_trainer #(.PER_ROW(1), .WBITS(7)) u_bias_tr (
    .w_in(bias_rd), .hist(1'b1), .taken(t1_taken), .w_out(bias_tr)
  );
  assign bias_new = bias_tr;

  // Correlating tables.
  for (genvar t = 0; t < N_TABLES; t++) begin : g_tbl
    localparam int unsigned ROWS = tbl_rows(t);
    localparam int unsigned AW   = tbl_aw(t);
    localparam int unsigned WB   = tbl_wbits(t);
    logic [BLOCK-1:0][WB-1:0] rd_a, rd_b, tr;

    weight_table #(.ROWS(ROWS), .PER_ROW(BLOCK), .WBITS(WB)) u_tbl (
      .clk,
      .ra_en (pred_fire), .ra_addr (p_idx[t][AW-1:0]), .ra_data (rd_a),
      .rb_en (t_rd),      .rb_addr (u_idx[t][AW-1:0]), .rb_data (rd_b),
      .w_en  (clearing || t1_valid),
      .w_addr(clearing ? clr_idx[AW-1:0] : t1_idx[t][AW-1:0]),
      .w_data(clearing ? '0 : tr)
    );

    weight_trainer #(.PER_ROW(BLOCK), .WBITS(WB)) u_tr (
      .w_in(rd_b), .hist(t1_q[BLOCK*t+1 +: BLOCK]), .taken(t1_taken), .w_out(tr)
    );

    // Present each weight to its DAC in 7-bit form; narrow weights drive DAC bits 1..5.
    for (genvar j = 0; j < BLOCK; j++) begin : g_w
      if (WB == WMAX_BITS) begin : g_full
        assign w[BLOCK*t + 1 + j] = rd_a[j];
      end else begin : g_narrow
        assign w[BLOCK*t + 1 + j] = {rd_a[j], {(WMAX_BITS-WB){1'b0}}};
      end
    end
  end

  // ---------------------------------------------------------------- analog dot product
  current_t             sum_pos, sum_neg;
  weight_t [N_COLS-1:0] dac_w;
  logic    [N_COLS-1:0] dac_hist;

  dac_scan_test #(.CNT_BITS(16)) u_scan (
    .clk, .rst_n,
    .test_mode, .scan_en, .scan_in,
    .capture    (scan_capture),
    .scan_out,
    .func_w     (w),
    .func_hist  (s1_q),
    .dac_w, .dac_hist,
    .taken_d,
    .mismatches (scan_mismatches)
  );

  dac_array u_dac (.w(dac_w), .hist(dac_hist), .sum_pos(sum_pos), .sum_neg(sum_neg));

  pred_comparator u_cmp (
    .clk, .rst_n,
    .latch   (s1_valid),
    .sum_pos, .sum_neg,
    .theta   (theta),
    .taken_d (taken_d),
    .train_d (),
    .valid   (pred_valid),
    .taken   (pred_taken),
    .train   (pred_train)
  );

  // ---------------------------------------------------------------- threshold
  adaptive_threshold #(.TC_BITS(TC_BITS), .THETA_INIT(THETA_INIT)) u_th (
    .clk, .rst_n,
    .upd        (upd_fire),
    .mispred    (mispred),
    .low_margin (upd_train),
    .theta      (theta),
    .inc        (),
    .dec        ()
  );

  // ---------------------------------------------------------------- protocol checks
  a_no_pred_when_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> !pred_fire);
  a_one_train_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    t1_valid |-> !upd_fire);

endmodule
