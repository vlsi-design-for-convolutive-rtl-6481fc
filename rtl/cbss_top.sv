// cbss_top: convolutive blind source separation network for two sources and
// two sensors, with on-line Infomax learning.
//
// Structure (follows the published block diagram): the sensor samples x1 and
// x2 feed four adaptive FIR filters W_ij (infomax_filter), filter W_ij
// filtering x_j. Two small carry-save adders form the separated outputs
//     u_i(t) = (W_i1 * x1)(t) + (W_i2 * x2)(t),   i = 1, 2.
// Two scaling factor modules turn u_i into 1-2y_i and mu*(1-2y_i), which is
// fed back to filters W_i1 and W_i2 to update their taps. The D-term unit
// reads the zero-lag taps of all four filters and returns mu*cofactor(w_ij)/
// det(W0), added to the zero-lag tap update of W_ij.
//
// Own choices: the number formats of cbss_pkg; u_i is the sum of the two
// filter outputs rounded down to Q5.11 and saturated; the filters start as
// the identity (tap 0 of W11 and W22 = 1.0, all other taps 0); learning is
// enabled by adapt_en and starts only once the D-term unit has produced its
// first result.
//
// Timing: one sample pair per clock at most, taken when x_valid is high.
// u1/u2 appear with u_valid OUT_LAT (4) cycles later; g1/g2 (= 1-2y) appear
// with g_valid SF_LAT (6) cycles after the sample, the cycle in which that
// sample's weight update is applied. Every pipeline stage has a fixed
// latency, so there is no back-pressure.
module cbss_top
  import cbss_pkg::*;
#(
  parameter int unsigned TAPS     = TAPS_DEFAULT,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adapt_en,        // 1: weights learn, 0: weights frozen
  input  logic x_valid,
  input  x_t   x1,
  input  x_t   x2,
  output logic u_valid,
  output u_t   u1,
  output u_t   u2,
  output logic g_valid,
  output g_t   g1,              // 1 - 2*y1
  output g_t   g2,              // 1 - 2*y2
  output seg_e seg1,            // line segment used for g1
  output seg_e seg2,            // line segment used for g2
  output logic learning,        // weight updates are being applied
  output logic dterm_done,      // pulses when the D-term unit refreshes
  output w_t   w [2][2][TAPS]   // w[i][j][k] = tap k of filter W_(i+1)(j+1)
);

  localparam int unsigned FACC_W = facc_w(TAPS);
  localparam int unsigned SUM_W  = FACC_W + 1;
  localparam int unsigned SH     = X_F + W_F - U_F;   // filter scale -> u scale
  localparam logic signed [SUM_W-1:0] U_MAX = SUM_W'(2**(U_W-1) - 1);
  localparam logic signed [SUM_W-1:0] U_MIN = -SUM_W'(2**(U_W-1));

  x_t                      xin  [2];
  logic                    fu_v [2][2];
  logic signed [FACC_W-1:0] fu  [2][2];
  logic                    sf_v [2];
  g_t                      sf   [2];
  g_t                      g    [2];
  seg_e                    seg  [2];
  logic                    sc_v [2];
  u_t                      u_q  [2];
  logic                    u_v;
  w_t                      w0   [2][2];
  d_t                      dm   [2][2];
  logic                    d_valid;
  logic                    upd_en;

  assign xin[0] = x1;
  assign xin[1] = x2;
  assign upd_en = adapt_en & d_valid;
  assign learning = upd_en;

  // four Infomax filters
  for (genvar i = 0; i < 2; i++) begin : g_row
    for (genvar j = 0; j < 2; j++) begin : g_col
      infomax_filter #(
        .TAPS     (TAPS),
        .SF_DELAY (SF_LAT),
        .TAP0_INIT((i == j) ? W_ONE : W_ZERO)
      ) u_filt (
        .clk     (clk),
        .rst_n   (rst_n),
        .x_valid (x_valid),
        .x       (xin[j]),
        .sf_valid(sf_v[i]),
        .sf      (sf[i]),
        .dterm   (dm[i][j]),
        .upd_en  (upd_en),
        .u_valid (fu_v[i][j]),
        .u       (fu[i][j]),
        .w       (w[i][j])
      );
      assign w0[i][j] = w[i][j][0];
    end
  end

  // two small carry-save adders and the output format register
  for (genvar i = 0; i < 2; i++) begin : g_sum
    logic [SUM_W-1:0] ops [2];
    logic [SUM_W-1:0] s;
    logic signed [SUM_W-1:0] sc;
    assign ops[0] = SUM_W'(fu[i][0]);
    assign ops[1] = SUM_W'(fu[i][1]);
    csa_tree #(.N(2), .W(SUM_W)) u_csa (.op(ops), .sum(s));
    assign sc = signed'(s) >>> SH;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          u_q[i] <= '0;
      else if (fu_v[i][0]) u_q[i] <= (sc > U_MAX) ? U_W'(U_MAX) :
                                     (sc < U_MIN) ? U_W'(U_MIN) : U_W'(sc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_v <= 1'b0;
    else        u_v <= fu_v[0][0];
  end

  // two scaling factor modules
  for (genvar i = 0; i < 2; i++) begin : g_scale
    scaling_factor #(.MU_SHIFT(MU_SHIFT)) u_sc (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (u_v),
      .u        (u_q[i]),
      .out_valid(sc_v[i]),
      .seg      (seg[i]),
      .g        (g[i]),
      .sf       (sf[i])
    );
    assign sf_v[i] = sc_v[i];
  end

  // D-term unit
  dterm_unit #(.MU_SHIFT(MU_SHIFT)) u_dterm (
    .clk  (clk),
    .rst_n(rst_n),
    .w0   (w0),
    .d    (dm),
    .valid(d_valid),
    .done (dterm_done)
  );

  assign u_valid = u_v;
  assign u1      = u_q[0];
  assign u2      = u_q[1];
  assign g_valid = sc_v[0];
  assign g1      = g[0];
  assign g2      = g[1];
  assign seg1    = seg[0];
  assign seg2    = seg[1];

  // all four filters run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fu_v[0][0] == fu_v[0][1] && fu_v[0][0] == fu_v[1][0] && fu_v[0][0] == fu_v[1][1])
    else $error("filters out of step");

endmodule
