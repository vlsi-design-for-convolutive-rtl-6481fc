// tb_scaling_factor: drives random network outputs u (with gaps in in_valid)
// into the scaling factor module and checks, for every sample:
//   - out_valid arrives exactly two cycles after in_valid,
//   - the segment and g = 1-2y match a reference five-segment evaluation,
//   - sf = g / 2^MU_SHIFT rounded to nearest,
//   - g is within 0.035 of the exact 1 - 2/(1+exp(-u)),
// and that every one of the five segments was used.
module tb_scaling_factor;
  import cbss_pkg::*;

  localparam int MU = 8;
  int checks = 0, failures = 0;
  int seg_hits [1:5];

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  u_t   u = '0;
  logic out_valid;
  seg_e seg;
  g_t   g, sf;

  scaling_factor #(.MU_SHIFT(MU)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u(u),
    .out_valid(out_valid), .seg(seg), .g(g), .sf(sf));

  always #5 clk = ~clk;

  // expected results, queued with the cycle they are due
  int   exp_seg [$];
  int   exp_g   [$];
  real  exact_g [$];
  longint due   [$];
  longint cyc = 0;
  int bp [4] = '{-6785, -3073, 3072, 6784};   // last n of each segment

  always @(posedge clk) cyc <= cyc + 1;

  function automatic void reference(input int n, output int s, output int gv);
    // break points 1.5 and 3.3125 in Q5.11; coefficients in Q2.14
    int a, b;
    if (n < -6784)      begin s = 1; a = -53;   b = 15542;  end
    else if (n < -3072) begin s = 2; a = -2705; b = 6756;   end
    else if (n <= 3072) begin s = 3; a = -7209; b = 0;      end
    else if (n <= 6784) begin s = 4; a = -2705; b = -6756;  end
    else                begin s = 5; a = -53;   b = -15542; end
    gv = int'((longint'(a) * n) >>> 11) + b;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int es, eg;
      real ex;
      longint dc;
      checks++;
      if (exp_seg.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        es = exp_seg.pop_front(); eg = exp_g.pop_front();
        ex = exact_g.pop_front(); dc = due.pop_front();
        if (dc !== cyc) begin
          failures++;
          $display("FAIL latency: due cycle %0d, came %0d", dc, cyc);
        end
        if (int'(seg) !== es || int'(g) !== eg || int'(sf) !== ((eg + (1 << (MU - 1))) >>> MU)) begin
          failures++;
          $display("FAIL seg %0d g %0d sf %0d, expected seg %0d g %0d sf %0d",
                   seg, g, sf, es, eg, (eg + (1 << (MU - 1))) >>> MU);
        end
        if ((real'(g) / 16384.0 - ex) > 0.035 || (ex - real'(g) / 16384.0) > 0.035) begin
          failures++;
          $display("FAIL approximation error g=%f exact=%f", real'(g) / 16384.0, ex);
        end
        seg_hits[es]++;
      end
    end
  end

  initial begin
    // the segments must meet at their connection points (the DUT is compared
    // with this reference exactly, so this makes the DUT continuous too)
    foreach (bp[b]) begin
      int s0, s1, g0, g1;
      reference(bp[b], s0, g0);
      reference(bp[b] + 1, s1, g1);
      checks++;
      if (s0 == s1 || (g0 - g1) > 40 || (g1 - g0) > 40) begin
        failures++;
        $display("FAIL segments do not meet at %0d: %0d vs %0d", bp[b], g0, g1);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      int n, s, gv;
      if (i % 5 == 3) begin
        in_valid <= 0;
        @(posedge clk);
        continue;
      end
      case (i % 4)
        0: n = int'($urandom_range(0, 65535)) - 32768;   // whole range
        default: n = int'($urandom_range(0, 16383)) - 8192;  // near the break points
      endcase
      if (i == 1) n = -32768;
      if (i == 2) n = 32767;
      if (i == 6) n = 3072;
      if (i == 7) n = -3072;
      reference(n, s, gv);
      exp_seg.push_back(s);
      exp_g.push_back(gv);
      exact_g.push_back(1.0 - 2.0 / (1.0 + $exp(-real'(n) / 2048.0)));
      due.push_back(cyc + 3);  // sampled at the next edge, out two edges later
      in_valid <= 1;
      u <= u_t'(n);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    for (int s = 1; s <= 5; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin
        failures++;
        $display("FAIL segment ls%0d never used", s);
      end
    end
    checks++;
    if (exp_seg.size() !== 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_seg.size());
    end
    $display("segments used: ls1=%0d ls2=%0d ls3=%0d ls4=%0d ls5=%0d",
             seg_hits[1], seg_hits[2], seg_hits[3], seg_hits[4], seg_hits[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
