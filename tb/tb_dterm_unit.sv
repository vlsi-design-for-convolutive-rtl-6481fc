// tb_dterm_unit: holds a zero-lag weight matrix W0 on the D-term unit,
// waits for a result computed entirely from it, and compares mu*d_ij with a
// reference 2x2 inverse-transpose computed here in integer arithmetic
// (reciprocal 2^36/|det| floored and saturated to Q12.12, then cofactor times
// reciprocal, scaled by 2^-(12+MU_SHIFT) with rounding to nearest, and
// saturated). Covers the identity,
// random matrices, negative determinants, a singular matrix and near-singular
// matrices whose inverse saturates. Also checks that valid stays low until
// the first result and the refresh period of REFRESH cycles.
module tb_dterm_unit;
  import cbss_pkg::*;

  localparam int MU = 8;
  localparam int REFRESH = 41;
  int checks = 0, failures = 0;
  int n_sat = 0, n_sing = 0, n_neg = 0;

  logic clk = 0, rst_n = 0;
  w_t   w0 [2][2];
  d_t   d  [2][2];
  logic valid, done;

  dterm_unit #(.MU_SHIFT(MU)) dut (.clk(clk), .rst_n(rst_n), .w0(w0), .d(d),
                                   .valid(valid), .done(done));

  always #5 clk = ~clk;

  longint cyc = 0, last_done = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && done) begin
      if (last_done >= 0) begin
        checks++;
        if (cyc - last_done !== REFRESH) begin
          failures++;
          $display("FAIL refresh period %0d, expected %0d", cyc - last_done, REFRESH);
        end
      end
      last_done = cyc;
    end
  end

  function automatic longint sat(input longint v, input int bits);
    longint mx = (longint'(1) << (bits - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  task automatic check_matrix(input int a, input int b, input int c, input int e);
    longint det, mag, q, r, cof [2][2], expd;
    bit sat_seen;
    w0[0][0] = w_t'(a); w0[0][1] = w_t'(b); w0[1][0] = w_t'(c); w0[1][1] = w_t'(e);
    // let a whole refresh start after the change
    @(posedge clk iff done);
    @(posedge clk iff done);
    #1;
    det = longint'(a) * e - longint'(b) * c;
    mag = det < 0 ? -det : det;
    q   = (mag == 0) ? (longint'(1) << 37) - 1 : (longint'(1) << 36) / mag;
    r   = q > (1 << 23) - 1 ? (1 << 23) - 1 : q;
    if (det < 0) r = -r;
    cof[0][0] = e; cof[0][1] = -c; cof[1][0] = -b; cof[1][1] = a;
    if (det == 0) n_sing++;
    if (det < 0) n_neg++;
    sat_seen = 0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        longint p = (cof[i][j] * r + (longint'(1) << (11 + MU))) >>> (12 + MU);
        expd = sat(p, 16);
        if (expd !== p) sat_seen = 1;
        checks++;
        if (longint'(d[i][j]) !== expd) begin
          failures++;
          $display("FAIL W0=[%0d %0d; %0d %0d] d[%0d][%0d]=%0d expected %0d",
                   a, b, c, e, i, j, d[i][j], expd);
        end
      end
    if (sat_seen) n_sat++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w0[0][0] = W_ONE; w0[0][1] = '0; w0[1][0] = '0; w0[1][1] = W_ONE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // valid must stay low until the first result
    repeat (REFRESH - 5) begin
      @(posedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL valid before first result"); end
    end
    @(posedge clk iff done);
    #1;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid low after first result"); end
    // identity: d = mu * I = 16
    check_matrix(4096, 0, 0, 4096);
    check_matrix(0, 4096, 4096, 0);            // negative determinant
    check_matrix(2048, 2048, 2048, 2048);      // singular
    check_matrix(100, 3, 7, 60);               // small determinant: 1/det saturates
    check_matrix(4096, 4095, 4095, 4096);      // nearly singular: d saturates
    check_matrix(-32768, 32767, 32767, -32768);
    for (int t = 0; t < 200; t++) begin
      int a, b, c, e;
      a = int'($urandom_range(0, 16383)) - 8192;
      b = int'($urandom_range(0, 16383)) - 8192;
      c = int'($urandom_range(0, 16383)) - 8192;
      e = int'($urandom_range(0, 16383)) - 8192;
      if (t % 10 == 0) begin a = 4096 + (a >>> 6); e = 4096 + (e >>> 6); b = b >>> 6; c = c >>> 6; end
      check_matrix(a, b, c, e);
    end
    checks++;
    if (n_sat == 0 || n_sing == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage sat=%0d singular=%0d negative=%0d", n_sat, n_sing, n_neg);
    end
    $display("saturated=%0d singular=%0d negative det=%0d", n_sat, n_sing, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
