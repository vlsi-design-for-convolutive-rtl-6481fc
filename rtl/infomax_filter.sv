// infomax_filter: one adaptive causal FIR filter W_ij of the separation
// network, with its Infomax stochastic weight update.
//
// Filtering (follows the published filtering module): each new sample x_j(t)
// enters the upper register chain. Every tap multiplies its chain sample by
// its weight w^k_ij; the products of each two successive taps are added by a
// carry-lookahead adder and registered; the TAPS/2 pair sums are added by a
// carry-save adder and registered as the filter output
//     u_ij(t) = sum_k w^k_ij * x_j(t-k)    (full precision, FACC_W bits).
//
// Learning (follows the published design: a lower register chain of samples is
// multiplied by the scaling factor, and d_ij(t) enters the first tap only):
// when the scaling factor sf = mu*(1-2y_i) of sample t arrives, SF_DELAY
// cycles after the sample, the sample is shifted into the lower chain and
//     w^k_ij += sf * x_j(t-k)            for every tap k
//     w^0_ij += dterm                    (dterm = mu*d_ij from the D-term unit)
// with the result saturated to the weight format. The update of a sample
// lands after later samples have already been filtered (a delayed gradient).
//
// Own choices: the number formats (see cbss_pkg), rounding the update to
// the nearest weight LSB, saturating weights, the reset value of the weights
// (TAP0_INIT on tap 0, zero elsewhere) and the SF_DELAY-deep delay line that
// carries each sample to the lower chain, so that the module accepts one
// sample per clock.
//
// Timing: x is taken when x_valid is high; u_valid rises FILT_LAT (3) cycles
// later with that sample's output. sf_valid must come exactly SF_DELAY cycles
// after the matching x_valid (checked by an assertion). The weights are
// updated at the clock edge that sees sf_valid && upd_en.
module infomax_filter
  import cbss_pkg::*;
#(
  parameter int unsigned TAPS      = TAPS_DEFAULT,
  parameter int unsigned SF_DELAY  = SF_LAT,
  parameter w_t          TAP0_INIT = W_ONE,
  localparam int unsigned FACC_W   = facc_w(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  x_t                       x,
  input  logic                     sf_valid,
  input  g_t                       sf,
  input  d_t                       dterm,
  input  logic                     upd_en,
  output logic                     u_valid,
  output logic signed [FACC_W-1:0] u,
  output w_t                       w [TAPS]
);

  localparam int unsigned NP    = TAPS / 2;            // tap pairs
  localparam int unsigned PR_W  = X_W + W_W;           // product width
  localparam int unsigned PS_W  = PR_W + 1;            // pair sum width
  localparam int unsigned UPD_SH = G_F + X_F - W_F;    // sf*x -> weight scale
  localparam int unsigned UPD_W = G_W + X_W;           // sf*x width
  localparam int unsigned ACC_W = UPD_W + 2;           // weight + two increments
  localparam int unsigned RND   = 1 << (UPD_SH - 1);   // half an LSB of the shift
  localparam logic signed [ACC_W-1:0] W_MAX = ACC_W'(2**(W_W-1) - 1);
  localparam logic signed [ACC_W-1:0] W_MIN = -ACC_W'(2**(W_W-1));

  initial begin
    assert (TAPS >= 2 && TAPS % 2 == 0) else $error("TAPS must be even");
    assert (SF_DELAY >= 1) else $error("SF_DELAY must be at least 1");
  end

  // ---------------- upper chain and filtering ----------------
  x_t                      xu [TAPS];     // upper register chain
  logic                    v_chain;
  logic signed [PR_W-1:0]  prod [TAPS];
  logic [PS_W-1:0]         pair_sum [NP];
  logic signed [PS_W-1:0]  pair_q [NP];
  logic                    v_pair;
  logic [FACC_W-1:0]       pair_ext [NP];
  logic [FACC_W-1:0]       csa_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) xu[k] <= '0;
      v_chain <= 1'b0;
    end else begin
      v_chain <= x_valid;
      if (x_valid) begin
        xu[0] <= x;
        for (int k = 1; k < int'(TAPS); k++) xu[k] <= xu[k-1];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < int'(TAPS); k++) prod[k] = PR_W'(xu[k]) * PR_W'(w[k]);
  end

  for (genvar m = 0; m < int'(NP); m++) begin : g_pair
    logic unused_cout;
    cla_adder #(.W(PS_W)) u_cla (
      .a   (PS_W'(prod[2*m])),
      .b   (PS_W'(prod[2*m+1])),
      .cin (1'b0),
      .s   (pair_sum[m]),
      .cout(unused_cout)
    );
    assign pair_ext[m] = FACC_W'(pair_q[m]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(NP); m++) pair_q[m] <= '0;
      v_pair <= 1'b0;
    end else begin
      v_pair <= v_chain;
      if (v_chain)
        for (int m = 0; m < int'(NP); m++) pair_q[m] <= signed'(pair_sum[m]);
    end
  end

  csa_tree #(.N(NP), .W(FACC_W)) u_csa (
    .op (pair_ext),
    .sum(csa_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u       <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= v_pair;
      if (v_pair) u <= signed'(csa_sum);
    end
  end

  // ---------------- lower chain and weight update ----------------
  x_t   xd   [SF_DELAY];   // sample delay line towards the lower chain
  logic xd_v [SF_DELAY];
  x_t   xl   [TAPS];       // lower register chain
  x_t   xl_next [TAPS];
  w_t   w_next  [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(SF_DELAY); i++) begin
        xd[i]   <= '0;
        xd_v[i] <= 1'b0;
      end
    end else begin
      xd[0]   <= x;
      xd_v[0] <= x_valid;
      for (int i = 1; i < int'(SF_DELAY); i++) begin
        xd[i]   <= xd[i-1];
        xd_v[i] <= xd_v[i-1];
      end
    end
  end

  always_comb begin
    xl_next[0] = xd[SF_DELAY-1];
    for (int k = 1; k < int'(TAPS); k++) xl_next[k] = xl[k-1];
    for (int k = 0; k < int'(TAPS); k++) begin
      logic signed [UPD_W-1:0] upd;
      logic signed [ACC_W-1:0] acc;
      upd = UPD_W'(sf) * UPD_W'(xl_next[k]);
      // round to nearest: a truncating shift would bias every update by half
      // a weight LSB, comparable to the update itself
      acc = ACC_W'(w[k]) + ((ACC_W'(upd) + signed'(ACC_W'(RND))) >>> UPD_SH);
      if (k == 0) acc = acc + ACC_W'(dterm);
      if (acc > W_MAX)
        w_next[k] = W_W'(W_MAX);
      else if (acc < W_MIN)
        w_next[k] = W_W'(W_MIN);
      else
        w_next[k] = W_W'(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) begin
        xl[k] <= '0;
        w[k]  <= (k == 0) ? TAP0_INIT : W_ZERO;
      end
    end else if (xd_v[SF_DELAY-1]) begin
      for (int k = 0; k < int'(TAPS); k++) begin
        xl[k] <= xl_next[k];
        if (sf_valid && upd_en) w[k] <= w_next[k];
      end
    end
  end

  // The scaling factor must arrive together with its sample at the end of
  // the delay line.
  a_sf_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    sf_valid == xd_v[SF_DELAY-1])
    else $error("sf_valid out of step with the sample delay line");

endmodule
