// scaling_factor: scaling factor computation module. From the network output
// u_i it computes 1-2y_i, where y_i = 1/(1+exp(-u_i)) is the logistic
// sigmoid, and the scaling factor mu*(1-2y_i) that drives the weight update.
//
// Following the published design, 1-2y is approximated by five line segments
// ls1..ls5, each evaluated as the single-variable linear equation a*n + b
// with n = u_i. The outer segments ls1 and ls5 share the slope a1, ls2 and
// ls4 share the slope a2 and use the biases +b2 and -b2, and the odd symmetry
// of 1-2y makes the middle segment ls3 pass through the origin. So one
// multiplier and one adder serve all segments; only the selected (a, b)
// changes.
//
// As in the published design, the segments meet at their connection points c_i, so
// the approximation is continuous. The break points and coefficients are
// this design's own fit (the published design gives no numbers): connection points
// at |n| = 1.5 and |n| = 3.3125, and the outer segments reach -1 at n = 16,
// the end of the input range. a1 = -0.00321, b1 = 0.9486, a2 = -0.1651,
// b2 = 0.4123, a3 = -0.44; the largest error against 1-2y is about 0.03.
// Coefficients are Q2.14 values, break points Q5.11.
//
// Timing: two register stages. The sample taken when in_valid is high leaves
// with out_valid two cycles later. Stage 1 compares n with the break points
// and registers the segment and its (a, b); stage 2 multiplies, adds and
// registers g = 1-2y and sf = mu*g (mu = 2^-MU_SHIFT), rounded to nearest
// (ties towards +infinity).
module scaling_factor
  import cbss_pkg::*;
#(
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEFAULT,
  parameter u_t C1 = u_t'(3072),    // |n| break point between ls3 and ls2/ls4 (1.5)
  parameter u_t C2 = u_t'(6784),    // |n| break point between ls2/ls4 and ls1/ls5 (3.3125)
  parameter g_t A1 = -g_t'(53),     // slope of ls1 and ls5
  parameter g_t B1 = g_t'(15542),   // bias of ls1 (+b1) and ls5 (-b1)
  parameter g_t A2 = -g_t'(2705),   // slope of ls2 and ls4
  parameter g_t B2 = g_t'(6756),    // bias of ls2 (+b2) and ls4 (-b2)
  parameter g_t A3 = -g_t'(7209)    // slope of ls3 (no bias)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  u_t   u,
  output logic out_valid,
  output seg_e seg,   // segment used for the sample now at the output
  output g_t   g,     // 1 - 2y
  output g_t   sf     // mu * (1 - 2y)
);

  localparam int unsigned M_W = G_W + U_W;   // a*n product width

  initial assert (MU_SHIFT >= 1) else $error("MU_SHIFT must be at least 1");

  // stage 1
  seg_e seg_c, seg_q1;
  g_t   a_c, b_c, a_q, b_q;
  u_t   n_q;
  logic v_q;

  always_comb begin
    if (u < -C2) begin
      seg_c = LS1; a_c = A1; b_c = B1;
    end else if (u < -C1) begin
      seg_c = LS2; a_c = A2; b_c = B2;
    end else if (u <= C1) begin
      seg_c = LS3; a_c = A3; b_c = '0;
    end else if (u <= C2) begin
      seg_c = LS4; a_c = A2; b_c = -B2;
    end else begin
      seg_c = LS5; a_c = A1; b_c = -B1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= 1'b0;
      seg_q1 <= LS3;
      a_q    <= '0;
      b_q    <= '0;
      n_q    <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        seg_q1 <= seg_c;
        a_q    <= a_c;
        b_q    <= b_c;
        n_q    <= u;
      end
    end
  end

  // stage 2: m = a*n + b, saturated to the G format
  logic signed [M_W-1:0] prod;
  logic signed [M_W-1:0] m;
  g_t                    m_sat;
  g_t                    sf_c;
  localparam logic signed [M_W-1:0] G_MAX = M_W'(2**(G_W-1) - 1);
  localparam logic signed [M_W-1:0] G_MIN = -M_W'(2**(G_W-1));

  always_comb begin
    prod = M_W'(a_q) * M_W'(n_q);
    m    = (prod >>> U_F) + M_W'(b_q);
    if (m > G_MAX)      m_sat = G_W'(G_MAX);
    else if (m < G_MIN) m_sat = G_W'(G_MIN);
    else                m_sat = G_W'(m);
    // mu scaling, rounded to nearest (one bit of headroom for the rounding)
    sf_c = G_W'((M_W'(m_sat) + M_W'(1 << (MU_SHIFT - 1))) >>> MU_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      seg       <= LS3;
      g         <= '0;
      sf        <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        seg <= seg_q1;
        g   <= m_sat;
        sf  <= sf_c;
      end
    end
  end

endmodule
