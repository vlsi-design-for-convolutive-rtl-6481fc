// tb_infomax_filter: runs one Infomax filter (6 taps) cycle by cycle against
// a reference model kept in this testbench. Samples arrive on random cycles,
// back to back at times; the scaling factor of each sample is returned
// exactly SF_DELAY cycles later with a random value, a random D-term and a
// random update enable. The model keeps its own upper and lower sample chains
// and weights and, every cycle, the testbench checks:
//   - u_valid and u = sum_k w^k x(t-k) three cycles after each sample, with
//     the weights as they stood when the sample was filtered,
//   - all six weights after each update (w^k += sf*x(t-k)/2^9 rounded to nearest, plus the
//     D-term on tap 0, saturated to 16 bits).
// Large D-terms drive the weights into saturation; the test counts updates,
// skipped updates and saturations and fails if any never happened.
module tb_infomax_filter;
  import cbss_pkg::*;

  localparam int TAPS = 6;
  localparam int SFD  = 6;
  localparam int NCYC = 6000;
  int checks = 0, failures = 0;
  int n_upd = 0, n_skip = 0, n_sat = 0, n_b2b = 0;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0, sf_valid = 0, upd_en = 0;
  x_t   x = '0;
  g_t   sf = '0;
  d_t   dterm = '0;
  logic u_valid;
  logic signed [facc_w(TAPS)-1:0] u;
  w_t   w [TAPS];

  infomax_filter #(.TAPS(TAPS), .SF_DELAY(SFD), .TAP0_INIT(W_ONE)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x), .sf_valid(sf_valid),
    .sf(sf), .dterm(dterm), .upd_en(upd_en), .u_valid(u_valid), .u(u), .w(w));

  always #5 clk = ~clk;

  // reference state
  longint mw [TAPS];
  longint mxu [TAPS];
  longint mxl [TAPS];
  bit     hv [$];       // x_valid history, one entry per cycle
  longint hx [$];       // x history
  longint exp_u [$];
  int     exp_due [$];

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      mw[k] = (k == 0) ? 4096 : 0;
      mxu[k] = 0;
      mxl[k] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NCYC; i++) begin
      bit     xv, sv, ue;
      longint xs, sfs, ds;
      // ---- drive cycle i ----
      xv = ($urandom_range(0, 99) < ((i / 1000) % 2 ? 90 : 40));
      if (i > NCYC - 20) xv = 0;
      xs = longint'($urandom_range(0, 255)) - 128;
      sv = (i >= SFD) ? hv[i - SFD] : 0;
      sfs = longint'($urandom_range(0, 65535)) - 32768;
      sfs = sfs >>> $urandom_range(3, 8);
      ds  = ($urandom_range(0, 19) == 0) ? ((i % 2) ? 32767 : -32768)
                                         : longint'($urandom_range(0, 511)) - 256;
      ue  = ($urandom_range(0, 9) !== 0);
      if (xv && i > 0 && hv[i - 1]) n_b2b++;
      hv.push_back(xv);
      hx.push_back(xs);
      x_valid = xv; x = x_t'(xs);
      sf_valid = sv; sf = g_t'(sfs); dterm = d_t'(ds); upd_en = ue;
      @(posedge clk);
      // ---- model the edge that ends cycle i ----
      if (sv) begin
        for (int k = TAPS - 1; k > 0; k--) mxl[k] = mxl[k-1];
        mxl[0] = hx[i - SFD];
        if (ue) begin
          n_upd++;
          for (int k = 0; k < TAPS; k++) begin
            longint acc;
            acc = mw[k] + ((sfs * mxl[k] + 256) >>> 9) + ((k == 0) ? ds : 0);
            if (sat16(acc) !== acc) n_sat++;
            mw[k] = sat16(acc);
          end
        end else n_skip++;
      end
      if (xv) begin
        longint acc;
        for (int k = TAPS - 1; k > 0; k--) mxu[k] = mxu[k-1];
        mxu[0] = xs;
        acc = 0;
        for (int k = 0; k < TAPS; k++) acc += mxu[k] * mw[k];
        exp_u.push_back(acc);
        exp_due.push_back(i + 3);
      end
      // ---- check what is visible in cycle i+1 ----
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (longint'(w[k]) !== mw[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d w[%0d]=%0d expected %0d", i + 1, k, w[k], mw[k]);
        end
      end
      if (u_valid) begin
        checks++;
        if (exp_u.size() == 0) begin
          failures++;
          $display("FAIL unexpected u_valid at cycle %0d", i + 1);
        end else begin
          longint eu; int due;
          eu = exp_u.pop_front(); due = exp_due.pop_front();
          if (due !== i + 1 || longint'(u) !== eu) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d u=%0d expected %0d due %0d", i + 1, u, eu, due);
          end
        end
      end
    end
    checks++;
    if (exp_u.size() !== 0) begin failures++; $display("FAIL %0d outputs missing", exp_u.size()); end
    checks++;
    if (n_upd == 0 || n_skip == 0 || n_sat == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("updates=%0d skipped=%0d saturations=%0d back-to-back samples=%0d",
             n_upd, n_skip, n_sat, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
