// anp_predictor_tb: end-to-end test of the predictor at its default geometry.
//
// A synthetic program of 16 static branches (loop-like, history-correlated, biased and
// random branches) is run through the predictor. Every prediction is checked against
// a reference model written here from the algorithm: its own weight arrays, indices,
// history selection, DAC widths (computed in real arithmetic from the full-scale
// anchors), training rule and threshold adaptation. The stimulus mixes three orders:
// predict-then-update, a prediction issued before the previous branch is updated
// (speculative history, squashed on a misprediction), and an update issued in the same
// cycle as the next prediction. The test counts how often each mechanism happened
// (stall of either port, misprediction restore, wrong-path squash, both reasons for
// training, threshold increase and decrease, weight saturation, reset sweep) and
// fails if any never did. At the end the analog unit is tested through the scan
// chain, with vectors whose expected prediction is computed here. In the first half of the run the random branches behave
// like loops, so the threshold first falls and then rises again.
module anp_predictor_tb;
  import anp_pkg::*;

  localparam int NBR     = 80000;
  localparam int BODY    = 16;
  localparam int WARM    = 4096;   // warm-up branches
  localparam int MAXCYC  = 2_000_000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        init_done;
  logic        pred_req = 1'b0;
  logic [31:0] pred_pc = '0;
  logic        pred_ready, pred_valid, pred_taken, pred_train;
  logic        upd_valid = 1'b0;
  logic [31:0] upd_pc = '0;
  logic        upd_taken = 1'b0, upd_pred_taken = 1'b0, upd_train = 1'b0;
  logic        upd_ready;
  logic [THETA_BITS-1:0] theta;
  logic        test_mode = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_capture = 1'b0;
  logic        scan_out;
  logic [15:0] scan_mismatches;

  anp_predictor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ------------------------------------------------------------ reference model
  int mb [2048];
  int mt [16][512][8];
  logic [39:0] m_spec_h, m_com_h;
  logic [1:0]  m_spec_a [128];
  logic [1:0]  m_com_a  [128];
  int m_theta, m_tc;
  int wtab [129][6];

  // Mechanism counters.
  int n_pred_stall, n_upd_stall, n_restore, n_squash, n_train_mis, n_train_low;
  int n_th_inc, n_th_dec, n_sat, n_pred, n_mis, n_scan, n_scan_bad;

  function automatic real scale_full(int c);
    // Full-scale current S(c) in units of I_u, quantised to quarters.
    real xs [7] = '{0, 1, 2, 3, 10, 20, 128};
    real ys [7] = '{32.0, 30.0, 26.25, 21.25, 13.75, 9.25, 8.0};
    real s;
    int k;
    s = ys[0];
    for (k = 1; k < 7; k++) begin
      if (c <= xs[k]) begin
        s = ys[k-1] - (ys[k-1] - ys[k]) * (c - xs[k-1]) / (xs[k] - xs[k-1]);
        break;
      end
    end
    return $floor(s * 4.0 + 0.5) / 4.0;
  endfunction

  function automatic int m_idx(int t, logic [31:0] pc, bit use_com);
    int aw, r;
    aw = (t == 0) ? 9 : 8;
    r = 0;
    for (int b = 0; b < aw; b++) begin
      logic [1:0] a;
      a = use_com ? m_com_a[8*t + (b % 8)] : m_spec_a[8*t + (b % 8)];
      r |= int'(a[b/8] ^ pc[b]) << b;
    end
    return r;
  endfunction

  function automatic bit m_hsel(logic [39:0] h, int c);
    int t, k, i, j;
    t = (c - 1) / 8;
    k = (c - 1) % 8;
    i = 8*t + 1;
    j = (t % 2 == 1) ? 1 : 1 + i / 4;
    return h[j + k - 1];  // H[1] is bit 0
  endfunction

  function automatic int m_cur(int c, int w, bit q, output bit pos);
    int mag, cur;
    mag = (w < 0) ? -w : w;
    if (c > 56) mag = mag * 2;
    cur = 0;
    for (int b = 0; b < 6; b++) if ((mag >> b) & 1) cur += wtab[c][b];
    pos = (w < 0) ^ q;
    return cur;
  endfunction

  function automatic void m_sums(logic [31:0] pc, output int sp, output int sn);
    bit pos;
    int cur;
    sp = 0; sn = 0;
    cur = m_cur(0, mb[pc[10:0]], 1'b1, pos);
    if (pos) sp += cur; else sn += cur;
    for (int c = 1; c <= 128; c++) begin
      int t;
      t = (c - 1) / 8;
      cur = m_cur(c, mt[t][m_idx(t, pc, 1'b0)][(c-1)%8], m_hsel(m_spec_h, c), pos);
      if (pos) sp += cur; else sn += cur;
    end
  endfunction

  function automatic int sat_step(int w, bit up, int maxv);
    int r;
    r = up ? w + 1 : w - 1;
    if (r > maxv)  begin r = maxv;  n_sat++; end
    if (r < -maxv) begin r = -maxv; n_sat++; end
    return r;
  endfunction

  function automatic void m_update(logic [31:0] pc, bit taken, bit ptaken, bit ptrain);
    bit mis;
    mis = (taken != ptaken);
    if (mis) n_mis++;
    if (mis || ptrain) begin
      if (mis) n_train_mis++; else n_train_low++;
      mb[pc[10:0]] = sat_step(mb[pc[10:0]], taken, 63);
      for (int c = 1; c <= 128; c++) begin
        int t, r;
        t = (c - 1) / 8;
        r = m_idx(t, pc, 1'b1);
        mt[t][r][(c-1)%8] = sat_step(mt[t][r][(c-1)%8], m_hsel(m_com_h, c) == taken,
                                     (c > 56) ? 31 : 63);
      end
    end
    if (mis) begin
      if (m_tc == 63) begin m_tc = 0; if (m_theta < 4095) begin m_theta++; n_th_inc++; end end
      else m_tc++;
    end else if (ptrain) begin
      if (m_tc == -64) begin m_tc = 0; if (m_theta > 0) begin m_theta--; n_th_dec++; end end
      else m_tc--;
    end
    m_com_h = {m_com_h[38:0], taken};
    for (int k = 127; k > 0; k--) m_com_a[k] = m_com_a[k-1];
    m_com_a[0] = pc[1:0];
    if (mis) begin
      n_restore++;
      m_spec_h = m_com_h;
      m_spec_a = m_com_a;
    end
  endfunction

  // ------------------------------------------------------------ monitor
  int          exp_q_taken [$];
  int          exp_q_train [$];
  bit          got_taken [$];
  bit          got_train [$];
  bit          latch_pending = 0;
  int          lp_pos, lp_neg;
  logic [31:0] lp_pc;
  int          mon_cyc = 0;
  int          fire_cyc [$];

  always @(posedge clk) if (rst_n && init_done) begin
    bit pf, uf;
    pf = pred_req && pred_ready;
    uf = upd_valid && upd_ready;
    mon_cyc++;
    if (pred_valid) begin
      // Latency: result valid two cycles after the request was accepted.
      checks++;
      if (fire_cyc.size() == 0 || mon_cyc - fire_cyc.pop_front() != 2) begin
        failures++;
        if (failures < 10) $display("FAIL: prediction latency");
      end
      checks++;
      if (exp_q_taken.size() == 0) begin
        failures++;
        $display("FAIL: unexpected prediction at cycle %0d", cyc);
      end else begin
        int et, er;
        et = exp_q_taken.pop_front();
        er = exp_q_train.pop_front();
        if (pred_taken !== et[0] || pred_train !== er[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: prediction %0d got taken=%0b train=%0b expected %0d %0d",
                     n_pred, pred_taken, pred_train, et, er);
        end
      end
      got_taken.push_back(pred_taken);
      got_train.push_back(pred_train);
    end
    if (latch_pending) begin
      int d;
      bit tk;
      tk = (lp_pos >= lp_neg);
      d = tk ? lp_pos - lp_neg : lp_neg - lp_pos;
      exp_q_taken.push_back(int'(tk));
      exp_q_train.push_back(int'(d <= m_theta));
      m_spec_h = {m_spec_h[38:0], tk};
      for (int k = 127; k > 0; k--) m_spec_a[k] = m_spec_a[k-1];
      m_spec_a[0] = lp_pc[1:0];
      latch_pending = 0;
      if (pf) begin failures++; $display("FAIL: prediction accepted while one is latching"); end
    end
    if (pf) begin
      m_sums(pred_pc, lp_pos, lp_neg);
      lp_pc = pred_pc;
      latch_pending = 1;
      fire_cyc.push_back(mon_cyc);
      n_pred++;
    end
    if (uf) m_update(upd_pc, upd_taken, upd_pred_taken, upd_train);
    if (pred_req && !pred_ready) n_pred_stall++;
    if (upd_valid && !upd_ready) n_upd_stall++;
  end

  // Threshold register against the model.
  always @(negedge clk) if (rst_n && init_done) begin
    checks++;
    if (int'(theta) != m_theta) begin
      failures++;
      if (failures < 10) $display("FAIL: theta %0d expected %0d", theta, m_theta);
    end
  end

  // ------------------------------------------------------------ program
  logic [31:0] body_pc  [BODY];
  int          body_typ [BODY];
  int          body_par [BODY];
  int          iter_of  [BODY];
  logic [63:0] ghist = '0;

  function automatic logic [31:0] pc_of(int n);
    if (n < WARM) return 32'h0080_0000 + 32'(n % 256);
    return body_pc[n % BODY];
  endfunction

  // The first and last thirds of the run are calm (well predictable); the middle
  // third has random branches.
  function automatic bit calm(int n);
    return (n < NBR / 3) || (n >= 2 * NBR / 3);
  endfunction

  function automatic bit outcome_of(int n);
    int i, p;
    bit r;
    if (n < WARM) return 1'b1;
    i = n % BODY;
    p = body_par[i];
    case (body_typ[i])
      0: r = ((n / BODY) % p) != 0;                       // loop-like, period p
      1: r = ghist[p % 8] ^ ghist[(p / 8) % 8 + 1];        // correlated with history
      2: r = (($urandom % 100) < (calm(n) ? 99 : 92)) ? p[0] : !p[0];  // biased
      default: r = calm(n) ? ((n / BODY) % p) != 0           // calm phases: loop-like
                           : 1'($urandom % 2);                // middle phase: random
    endcase
    return r;
  endfunction

  // Issue a prediction and/or an update; each request is held until accepted.
  // Called at a falling edge; returns at a falling edge.
  task automatic issue(bit dp, logic [31:0] ppc, bit du, logic [31:0] upc, bit ut, bit upt, bit upr);
    pred_req = dp; pred_pc = ppc;
    upd_valid = du; upd_pc = upc; upd_taken = ut; upd_pred_taken = upt; upd_train = upr;
    while (pred_req || upd_valid) begin
      bit pf, uf;
      #1;
      pf = pred_req && pred_ready;
      uf = upd_valid && upd_ready;
      @(negedge clk);
      if (pf) pred_req = 1'b0;
      if (uf) upd_valid = 1'b0;
    end
  endtask

  task automatic get_result(output bit tk, output bit tr);
    while (got_taken.size() == 0) @(posedge clk);
    tk = got_taken.pop_front();
    tr = got_train.pop_front();
    @(negedge clk);
  endtask

  task automatic commit(int n, bit actual);
    ghist = {ghist[62:0], actual};
  endtask

  initial begin
    int n, init_cycles, mode;
    bit have, tk, tr, tk1, tr1, act, act1;
    for (int c = 0; c <= 128; c++)
      for (int b = 0; b < 6; b++)
        wtab[c][b] = $rtoi($floor(scale_full(c) * (2.0 ** b) / 32.0 + 0.5));
    foreach (mb[i]) mb[i] = 0;
    foreach (mt[t, r, j]) mt[t][r][j] = 0;
    m_spec_h = '0; m_com_h = '0;
    foreach (m_spec_a[i]) begin m_spec_a[i] = '0; m_com_a[i] = '0; end
    m_theta = 70; m_tc = 0;
    for (int i = 0; i < BODY; i++) begin
      body_pc[i]  = 32'h0040_0000 + 32'($urandom % 65536) * 4 + 32'(i);
      body_typ[i] = (i < 5) ? 0 : (i < 10) ? 1 : (i < 14) ? 2 : 3;
      body_par[i] = 3 + int'($urandom % 60);
    end

    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    init_cycles = 0;
    while (!init_done) begin @(posedge clk); init_cycles++; end
    checks++;
    if (init_cycles < 2040 || init_cycles > 2060) begin
      failures++;
      $display("FAIL: reset sweep took %0d cycles", init_cycles);
    end

    @(negedge clk);
    n = 0;
    have = 0;
    while (n < NBR) begin
      if (!have) begin
        issue(1, pc_of(n), 0, '0, 0, 0, 0);
        get_result(tk, tr);
      end
      have = 0;
      mode = int'($urandom % 10);
      act = outcome_of(n);
      if (mode < 3 && n + 1 < NBR) begin
        // Speculative: predict n+1 before n is resolved.
        issue(1, pc_of(n + 1), 0, '0, 0, 0, 0);
        get_result(tk1, tr1);
        issue(0, '0, 1, pc_of(n), act, tk, tr);
        commit(n, act);
        if (act != tk) begin
          n_squash++;           // n+1 was predicted on the wrong path
          n = n + 1;
        end else begin
          act1 = outcome_of(n + 1);
          issue(0, '0, 1, pc_of(n + 1), act1, tk1, tr1);
          commit(n + 1, act1);
          n = n + 2;
        end
      end else if (mode < 6 && n + 1 < NBR) begin
        // Update n in the same cycle as the prediction of n+1.
        issue(1, pc_of(n + 1), 1, pc_of(n), act, tk, tr);
        commit(n, act);
        get_result(tk, tr);
        have = 1;
        n = n + 1;
      end else begin
        issue(0, '0, 1, pc_of(n), act, tk, tr);
        commit(n, act);
        n = n + 1;
      end
    end
    repeat (5) @(posedge clk);

    // Scan test of the analog unit: random vectors, some with a wrong expected bit.
    @(negedge clk);
    test_mode = 1'b1;
    begin
      localparam int L = 1 + 128 + 129 * 7;
      logic [L-1:0] vec;
      bit prev, first;
      first = 1;
      for (int v = 0; v < 40; v++) begin
        int sp, sn, cur;
        bit exp_t, pos;
        for (int i = 0; i < L; i += 32) vec[i +: 32] = $urandom;
        sp = 0; sn = 0;
        for (int c = 0; c < 129; c++) begin
          logic [6:0] wb;
          wb = vec[7*c +: 7];
          cur = 0;
          for (int b = 0; b < 6; b++) if (wb[b]) cur += wtab[c][b];
          pos = wb[6] ^ ((c == 0) ? 1'b1 : vec[129*7 + c - 1]);
          if (pos) sp += cur; else sn += cur;
        end
        exp_t = (sp >= sn);
        vec[L-1] = (v % 5 == 3) ? !exp_t : exp_t;
        if (v % 5 == 3) n_scan_bad++;
        scan_en = 1'b1;
        for (int i = 0; i < L; i++) begin
          scan_in = vec[i];
          if (i == 0 && !first) begin
            checks++;
            if (scan_out != prev) begin failures++; $display("FAIL: scanned-out prediction"); end
          end
          @(negedge clk);
        end
        scan_en = 1'b0;
        scan_capture = 1'b1;
        @(negedge clk);
        scan_capture = 1'b0;
        prev = exp_t;
        first = 0;
        n_scan++;
      end
      checks++;
      if (int'(scan_mismatches) != n_scan_bad) begin
        failures++;
        $display("FAIL: scan mismatches %0d expected %0d", scan_mismatches, n_scan_bad);
      end
    end
    test_mode = 1'b0;

    checks++;
    if (exp_q_taken.size() != 0) begin failures++; $display("FAIL: predictions missing"); end
    $display("predictions=%0d mispredictions=%0d (%0d%%) theta=%0d", n_pred, n_mis,
             100 * n_mis / NBR, theta);
    $display("mechanisms: pred_stall=%0d upd_stall=%0d restore=%0d squash=%0d train_mis=%0d train_low=%0d theta_inc=%0d theta_dec=%0d saturate=%0d",
             n_pred_stall, n_upd_stall, n_restore, n_squash, n_train_mis, n_train_low,
             n_th_inc, n_th_dec, n_sat);
    $display("scan vectors=%0d with wrong expected bit=%0d", n_scan, n_scan_bad);
    checks += 10;
    if (n_scan_bad   == 0) begin failures++; $display("FAIL: no scan mismatch"); end
    if (n_pred_stall == 0) begin failures++; $display("FAIL: no prediction stall"); end
    if (n_upd_stall  == 0) begin failures++; $display("FAIL: no update stall"); end
    if (n_restore    == 0) begin failures++; $display("FAIL: no history restore"); end
    if (n_squash     == 0) begin failures++; $display("FAIL: no wrong-path squash"); end
    if (n_train_mis  == 0) begin failures++; $display("FAIL: no training on misprediction"); end
    if (n_train_low  == 0) begin failures++; $display("FAIL: no training on low margin"); end
    if (n_th_inc     == 0) begin failures++; $display("FAIL: threshold never increased"); end
    if (n_th_dec     == 0) begin failures++; $display("FAIL: threshold never decreased"); end
    if (n_sat        == 0) begin failures++; $display("FAIL: no weight saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
