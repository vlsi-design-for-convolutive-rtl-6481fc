// tb_cbss_top: end-to-end test of the two-source, two-sensor separation
// network at its default parameters (6 taps per filter, mu = 2^-8).
//
// Two super-Gaussian (Laplacian) sources are mixed convolutively into the
// sensor samples x1, x2:
//     x1(t) = 0.6 s1(t) + 0.3 s2(t-1) + 0.1 s2(t-2)
//     x2(t) = 0.3 s1(t-1) + 0.6 s2(t) + 0.1 s1(t-2)
// Phase A, learning, one sample every SPACING cycles: an algorithmic model of
// the whole network (filtering, output adders, five-segment 1-2y, Infomax
// update including the 2x2 inverse-transpose term) predicts u1, u2, g1, g2
// and all 24 weights for every sample; the latencies of u (4 cycles) and of
// g (6 cycles) are checked. The samples are spaced so that the D-term in use
// always belongs to the weights left by the previous sample, which makes the
// per-sample model exact.
// Phase B, frozen weights (adapt_en = 0), one sample per clock: checks full
// throughput and that the frozen network's outputs match the model.
// Phase C, learning at one sample per clock: checks that the weights keep
// moving while the pipeline is full.
// Mechanisms counted (each must occur): learning held off until the first
// D-term result, D-term refreshes, every line segment ls1..ls5, weight
// updates, frozen samples, back-to-back samples.
module tb_cbss_top;
  import cbss_pkg::*;

  localparam int TAPS    = TAPS_DEFAULT;
  localparam int MU      = MU_SHIFT_DEFAULT;
  localparam int SPACING = 100;
  localparam int NA      = 5000;   // phase A samples
  localparam int NB      = 400;    // phase B samples
  localparam int NC      = 400;    // phase C samples

  int checks = 0, failures = 0;
  int seg_hits [1:5];
  int n_held = 0, n_refresh = 0, n_upd = 0, n_frozen = 0, n_b2b = 0, n_c_moves = 0;

  logic clk = 0, rst_n = 0, adapt_en = 0, x_valid = 0;
  x_t   x1 = '0, x2 = '0;
  logic u_valid, g_valid, learning, dterm_done;
  u_t   u1, u2;
  g_t   g1, g2;
  seg_e seg1, seg2;
  w_t   w [2][2][TAPS];

  cbss_top dut (
    .clk(clk), .rst_n(rst_n), .adapt_en(adapt_en), .x_valid(x_valid),
    .x1(x1), .x2(x2), .u_valid(u_valid), .u1(u1), .u2(u2), .g_valid(g_valid),
    .g1(g1), .g2(g2), .seg1(seg1), .seg2(seg2), .learning(learning),
    .dterm_done(dterm_done), .w(w));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && dterm_done) n_refresh++;

  // ---------------- reference model ----------------
  longint mw [2][2][TAPS];
  longint hx [2][TAPS];     // hx[j][k] = x_j(t-k)
  longint src_hist [2][3];

  function automatic longint sat(input longint v, input int bits);
    longint mx = (longint'(1) << (bits - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic void pwl(input longint n, output int s, output longint gv);
    longint a, b;
    if (n < -6784)      begin s = 1; a = -53;   b = 15542;  end
    else if (n < -3072) begin s = 2; a = -2705; b = 6756;   end
    else if (n <= 3072) begin s = 3; a = -7209; b = 0;      end
    else if (n <= 6784) begin s = 4; a = -2705; b = -6756;  end
    else                begin s = 5; a = -53;   b = -15542; end
    gv = sat(((a * n) >>> 11) + b, 16);
  endfunction

  function automatic longint model_u(input int i);
    longint acc = 0;
    for (int j = 0; j < 2; j++)
      for (int k = 0; k < TAPS; k++) acc += mw[i][j][k] * hx[j][k];
    return sat(acc >>> (7 + 12 - 11), 16);
  endfunction

  // mu * d_ij from the current zero-lag weights
  function automatic longint model_d(input int i, input int j);
    longint det, mag, q, r, cof;
    det = mw[0][0][0] * mw[1][1][0] - mw[0][1][0] * mw[1][0][0];
    mag = det < 0 ? -det : det;
    q   = (mag == 0) ? (longint'(1) << 37) - 1 : (longint'(1) << 36) / mag;
    r   = q > (1 << 23) - 1 ? (1 << 23) - 1 : q;
    if (det < 0) r = -r;
    case ({i[0], j[0]})
      2'b00: cof =  mw[1][1][0];
      2'b01: cof = -mw[1][0][0];
      2'b10: cof = -mw[0][1][0];
      default: cof = mw[0][0][0];
    endcase
    return sat((cof * r + (longint'(1) << (11 + MU))) >>> (12 + MU), 16);
  endfunction

  function automatic real laplace();
    real v;
    v = -$ln((real'($urandom_range(1, 1000000))) / 1000000.0) * 0.3;
    return ($urandom_range(0, 1) == 1) ? v : -v;
  endfunction

  // new source pair -> mixed, quantised sensor pair
  task automatic next_mix(output longint xa, output longint xb);
    real s1, s2, m1, m2;
    s1 = laplace(); s2 = laplace();
    for (int k = 2; k > 0; k--) begin
      src_hist[0][k] = src_hist[0][k-1];
      src_hist[1][k] = src_hist[1][k-1];
    end
    src_hist[0][0] = longint'(s1 * 128.0);
    src_hist[1][0] = longint'(s2 * 128.0);
    m1 = 0.6 * src_hist[0][0] + 0.3 * src_hist[1][1] + 0.1 * src_hist[1][2];
    m2 = 0.3 * src_hist[0][1] + 0.6 * src_hist[1][0] + 0.1 * src_hist[0][2];
    xa = sat(longint'(m1), 8);
    xb = sat(longint'(m2), 8);
  endtask

  function automatic void push_x(input longint xa, input longint xb);
    for (int k = TAPS - 1; k > 0; k--) begin
      hx[0][k] = hx[0][k-1];
      hx[1][k] = hx[1][k-1];
    end
    hx[0][0] = xa;
    hx[1][0] = xb;
  endfunction

  task automatic check_weights(input string tag);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        for (int k = 0; k < TAPS; k++) begin
          checks++;
          if (longint'(w[i][j][k]) !== mw[i][j][k]) begin
            failures++;
            if (failures < 12)
              $display("FAIL %s w[%0d][%0d][%0d]=%0d expected %0d", tag, i, j, k,
                       w[i][j][k], mw[i][j][k]);
          end
        end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        for (int k = 0; k < TAPS; k++) mw[i][j][k] = (i == j && k == 0) ? 4096 : 0;
    for (int j = 0; j < 2; j++) begin
      for (int k = 0; k < TAPS; k++) hx[j][k] = 0;
      for (int k = 0; k < 3; k++) src_hist[j][k] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1; adapt_en = 1;

    // learning must wait for the first D-term result
    checks++;
    if (learning) begin failures++; $display("FAIL learning before the first D-term"); end
    else n_held++;
    repeat (60) @(posedge clk);
    #1;
    checks++;
    if (!learning) begin failures++; $display("FAIL learning not enabled after the D-term"); end

    // ---------------- phase A ----------------
    for (int s = 0; s < NA; s++) begin
      longint xa, xb, eu [2], eg [2], dd [2][2];
      int es [2];
      bit got_u, got_g;
      next_mix(xa, xb);
      push_x(xa, xb);
      for (int i = 0; i < 2; i++) begin
        eu[i] = model_u(i);
        pwl(eu[i], es[i], eg[i]);
      end
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) dd[i][j] = model_d(i, j);
      x_valid = 1; x1 = x_t'(xa); x2 = x_t'(xb);
      got_u = 0; got_g = 0;
      for (int c = 1; c < SPACING; c++) begin
        @(posedge clk);
        #1;
        x_valid = 0;
        if (u_valid) begin
          checks += 2;
          if (c !== 4 || got_u) begin failures++; $display("FAIL sample %0d u latency %0d", s, c); end
          if (longint'(u1) !== eu[0] || longint'(u2) !== eu[1]) begin
            failures++;
            if (failures < 12) $display("FAIL sample %0d u=(%0d,%0d) expected (%0d,%0d)", s, u1, u2, eu[0], eu[1]);
          end
          got_u = 1;
        end
        if (g_valid) begin
          checks += 2;
          if (c !== 6 || got_g) begin failures++; $display("FAIL sample %0d g latency %0d", s, c); end
          if (longint'(g1) !== eg[0] || longint'(g2) !== eg[1] ||
              int'(seg1) !== es[0] || int'(seg2) !== es[1]) begin
            failures++;
            if (failures < 12) $display("FAIL sample %0d g=(%0d,%0d) expected (%0d,%0d)", s, g1, g2, eg[0], eg[1]);
          end
          seg_hits[es[0]]++;
          seg_hits[es[1]]++;
          got_g = 1;
        end
      end
      checks++;
      if (!got_u || !got_g) begin failures++; $display("FAIL sample %0d produced no output", s); end
      // model the update of this sample
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          for (int k = 0; k < TAPS; k++)
            mw[i][j][k] = sat(mw[i][j][k] + ((((eg[i] + (1 << (MU - 1))) >>> MU) * hx[j][k] + 256) >>> 9)
                              + ((k == 0) ? dd[i][j] : 0), 16);
      n_upd++;
      check_weights("phase A");
    end
    $display("after learning: W0 = [%0d %0d; %0d %0d] (Q4.12)",
             w[0][0][0], w[0][1][0], w[1][0][0], w[1][1][0]);

    // ---------------- phase B: frozen, one sample per clock ----------------
    adapt_en = 0;
    begin
      longint eub [$];
      int nout = 0, last_out = -1;
      for (int c = 0; c < NB + 10; c++) begin
        if (c < NB) begin
          longint xa, xb;
          next_mix(xa, xb);
          push_x(xa, xb);
          eub.push_back(model_u(0));
          eub.push_back(model_u(1));
          x_valid = 1; x1 = x_t'(xa); x2 = x_t'(xb);
          n_frozen++;
          if (c > 0) n_b2b++;
        end else x_valid = 0;
        @(posedge clk);
        #1;
        if (u_valid) begin
          longint e1, e2;
          checks++;
          e1 = eub.pop_front(); e2 = eub.pop_front();
          if (longint'(u1) !== e1 || longint'(u2) !== e2) begin
            failures++;
            if (failures < 12) $display("FAIL frozen u=(%0d,%0d) expected (%0d,%0d)", u1, u2, e1, e2);
          end
          if (last_out >= 0 && c !== last_out + 1) begin
            failures++; $display("FAIL frozen output gap at %0d", c);
          end
          last_out = c;
          nout++;
        end
      end
      checks += 2;
      if (nout !== NB) begin failures++; $display("FAIL frozen outputs %0d of %0d", nout, NB); end
      check_weights("phase B frozen");
    end

    // ---------------- phase C: learning, one sample per clock ----------------
    adapt_en = 1;
    for (int c = 0; c < NC; c++) begin
      longint xa, xb;
      w_t w_prev;
      next_mix(xa, xb);
      x_valid = 1; x1 = x_t'(xa); x2 = x_t'(xb);
      w_prev = w[0][1][1];
      @(posedge clk);
      #1;
      if (w[0][1][1] !== w_prev) n_c_moves++;
    end
    x_valid = 0;
    repeat (20) @(posedge clk);

    // ---------------- mechanisms ----------------
    for (int s = 1; s <= 5; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin failures++; $display("FAIL segment ls%0d never used", s); end
    end
    checks++;
    if (n_held == 0 || n_refresh == 0 || n_upd == 0 || n_frozen == 0 || n_b2b == 0 || n_c_moves == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("segments ls1..ls5: %0d %0d %0d %0d %0d", seg_hits[1], seg_hits[2], seg_hits[3],
             seg_hits[4], seg_hits[5]);
    $display("held=%0d dterm refreshes=%0d updates=%0d frozen samples=%0d back-to-back=%0d pipelined moves=%0d",
             n_held, n_refresh, n_upd, n_frozen, n_b2b, n_c_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
