// tb_cbss_separation: does the network actually separate? Two independent
// Laplacian sources are mixed convolutively,
//     x1(t) = 0.6 s1(t) + 0.3 s2(t-1) + 0.1 s2(t-2)
//     x2(t) = 0.3 s1(t-1) + 0.6 s2(t) + 0.1 s1(t-2),
// and fed to cbss_top (default parameters) at one sample pair per clock with
// learning on for NLEARN samples. The weights are then frozen and, over
// NMEAS further samples, the cross-correlations of each output with each
// source at lags 0..LAGS-1 are accumulated. Because the sources are white,
// these estimate the taps of the global (mixing * separating) filters; the
// signal-to-interference ratio (SIR) of an output is the energy of its
// stronger source path over the weaker one. The same measure is taken on the
// sensor signals. The test requires every output SIR to exceed the sensors'
// by MIN_GAIN_DB, and the two outputs to pick different sources.
module tb_cbss_separation;
  import cbss_pkg::*;

  localparam int  NLEARN      = 300000;
  localparam int  NMEAS       = 20000;
  localparam int  LAGS        = 10;
  localparam real MIN_GAIN_DB = 12.0;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, adapt_en = 0, x_valid = 0;
  x_t   x1 = '0, x2 = '0;
  logic u_valid, g_valid, learning, dterm_done;
  u_t   u1, u2;
  g_t   g1, g2;
  seg_e seg1, seg2;
  w_t   w [2][2][TAPS_DEFAULT];

  cbss_top dut (
    .clk(clk), .rst_n(rst_n), .adapt_en(adapt_en), .x_valid(x_valid),
    .x1(x1), .x2(x2), .u_valid(u_valid), .u1(u1), .u2(u2), .g_valid(g_valid),
    .g1(g1), .g2(g2), .seg1(seg1), .seg2(seg2), .learning(learning),
    .dterm_done(dterm_done), .w(w));

  always #5 clk = ~clk;

  real src [2][$];          // source history, index = sample number
  real xs  [2][$];          // sensor history
  real cu  [2][2][LAGS];    // cu[i][a][l] = sum u_i(t) s_a(t-l)
  real cx  [2][2][LAGS];
  int  n_out = 0;           // outputs seen so far
  bit  measuring = 0;

  function automatic real laplace();
    real v;
    v = -$ln((real'($urandom_range(1, 1000000))) / 1000000.0) * 0.3;
    return ($urandom_range(0, 1) == 1) ? v : -v;
  endfunction

  function automatic real at(input int a, input int t);
    return (t < 0) ? 0.0 : src[a][t];
  endfunction

  function automatic int q8(input real v);
    int r = int'(v * 128.0);
    return r > 127 ? 127 : (r < -128 ? -128 : r);
  endfunction

  // per-output SIR in dB and the index of the dominant source
  function automatic real sir_db(input real c [2][LAGS], output int best);
    real e [2];
    for (int a = 0; a < 2; a++) begin
      e[a] = 0.0;
      for (int l = 0; l < LAGS; l++) e[a] += c[a][l] * c[a][l];
    end
    best = (e[0] >= e[1]) ? 0 : 1;
    return 10.0 * $log10((best == 0 ? e[0] : e[1]) / (best == 0 ? e[1] : e[0]) + 1e-30);
  endfunction

  // collect outputs: u_valid comes 4 cycles after its sample
  always @(posedge clk) begin
    if (rst_n && u_valid) begin
      if (measuring && n_out >= NLEARN) begin
        real uv [2];
        uv[0] = real'(u1); uv[1] = real'(u2);
        for (int i = 0; i < 2; i++)
          for (int a = 0; a < 2; a++)
            for (int l = 0; l < LAGS; l++) begin
              cu[i][a][l] += uv[i] * at(a, n_out - l);
              cx[i][a][l] += xs[i][n_out] * at(a, n_out - l);
            end
      end
      n_out++;
    end
  end

  initial begin
    #5000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++)
      for (int a = 0; a < 2; a++)
        for (int l = 0; l < LAGS; l++) begin cu[i][a][l] = 0.0; cx[i][a][l] = 0.0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1; adapt_en = 1;
    repeat (60) @(posedge clk);
    #1;
    measuring = 1;
    for (int t = 0; t < NLEARN + NMEAS; t++) begin
      real m1, m2;
      src[0].push_back(laplace());
      src[1].push_back(laplace());
      m1 = 0.6 * at(0, t) + 0.3 * at(1, t - 1) + 0.1 * at(1, t - 2);
      m2 = 0.3 * at(0, t - 1) + 0.6 * at(1, t) + 0.1 * at(0, t - 2);
      xs[0].push_back(real'(q8(m1)));
      xs[1].push_back(real'(q8(m2)));
      if (t == NLEARN) adapt_en = 0;
      x_valid = 1; x1 = x_t'(q8(m1)); x2 = x_t'(q8(m2));
      @(posedge clk);
      #1;
    end
    x_valid = 0;
    repeat (10) @(posedge clk);
    begin
      int bu [2], bx [2];
      real su [2], sx [2];
      for (int i = 0; i < 2; i++) begin
        su[i] = sir_db(cu[i], bu[i]);
        sx[i] = sir_db(cx[i], bx[i]);
        $display("output %0d: SIR %6.2f dB (source %0d); sensor %0d: SIR %6.2f dB",
                 i + 1, su[i], bu[i] + 1, i + 1, sx[i]);
        checks++;
        if (su[i] < sx[i] + MIN_GAIN_DB) begin
          failures++;
          $display("FAIL output %0d separation gain %0.2f dB below %0.1f dB", i + 1,
                   su[i] - sx[i], MIN_GAIN_DB);
        end
      end
      checks++;
      if (bu[0] == bu[1]) begin failures++; $display("FAIL both outputs follow source %0d", bu[0] + 1); end
      checks++;
      if (n_out !== NLEARN + NMEAS) begin failures++; $display("FAIL %0d outputs", n_out); end
    end
    $display("W11 taps: %0d %0d %0d %0d %0d %0d", w[0][0][0], w[0][0][1], w[0][0][2], w[0][0][3], w[0][0][4], w[0][0][5]);
    $display("W12 taps: %0d %0d %0d %0d %0d %0d", w[0][1][0], w[0][1][1], w[0][1][2], w[0][1][3], w[0][1][4], w[0][1][5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
