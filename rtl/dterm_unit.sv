// dterm_unit: D-term unit. For the 2x2 matrix W0 of zero-lag tap weights
// (tap 0 of the four Infomax filters) it computes
//     d_ij = cofactor(w_ij) / det(W0),
// the (i,j) entry of the inverse transpose of W0, which the Infomax rule adds
// to the zero-lag weight update. The outputs are already multiplied by the
// step size mu = 2^-MU_SHIFT, so they can be added to a weight directly.
//
// The published design gives the formula and says the unit contains a determinant
// circuit; the rest is this design's choice. A determinant circuit (two
// multipliers and a subtractor) forms det = w11*w22 - w12*w21; a sequential
// restoring divider forms the reciprocal r = 1/det once; four multipliers
// scale the cofactors (w22, -w21, -w12, w11) by r. The reciprocal saturates
// to the Q12.12 range, a zero determinant giving the largest reciprocal with
// the sign of +0, and each mu*d_ij is rounded to nearest and saturates to
// the weight format.
//
// Timing: the unit runs continuously. It samples W0, spends REFRESH (41)
// cycles on one result, pulses done and updates d, then samples W0 again.
// valid rises with the first result after reset and stays high; d is zero
// until then. The weight update therefore uses the inverse of a W0 at most
// two refresh periods old.
module dterm_unit
  import cbss_pkg::*;
#(
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  w_t   w0 [2][2],   // w0[i][j] = tap 0 of filter W_ij
  output d_t   d  [2][2],   // mu * d_ij
  output logic valid,
  output logic done
);

  localparam int unsigned DET_W = 2 * W_W + 1;                 // det width
  localparam int unsigned NUM_W = 2 * W_F + R_F + 1;           // 2^(2*W_F+R_F)
  localparam int unsigned DIV_W = 2 * W_W;                     // |det| width
  localparam int unsigned CF_W  = W_W + 1;                     // cofactor width
  localparam int unsigned P_W   = CF_W + R_W;                  // cofactor*r width
  localparam int unsigned P_SH  = W_F + R_F - D_F;             // cofactor*r -> d scale
  localparam longint      RND   = longint'(1) << (P_SH + MU_SHIFT - 1);
  localparam logic [NUM_W-1:0] NUMER = NUM_W'(1) << (2 * W_F + R_F);
  localparam logic signed [R_W-1:0] R_MAX = R_W'(2**(R_W-1) - 1);
  localparam logic signed [P_W-1:0] D_MAX = P_W'(2**(D_W-1) - 1);
  localparam logic signed [P_W-1:0] D_MIN = -P_W'(2**(D_W-1));

  typedef enum logic [1:0] {S_DET, S_START, S_DIV, S_MUL} state_e;
  state_e state;

  logic signed [DET_W-1:0] det;
  logic                    det_neg;
  logic signed [CF_W-1:0]  cof [2][2];
  logic                    div_start, div_busy, div_done;
  logic [NUM_W-1:0]        quo;
  logic [DIV_W-1:0]        unused_rem;
  logic [DIV_W-1:0]        det_mag;
  logic signed [R_W-1:0]   recip;

  // determinant circuit
  logic signed [DET_W-1:0] det_c;
  always_comb begin
    det_c = DET_W'(w0[0][0]) * DET_W'(w0[1][1]) - DET_W'(w0[0][1]) * DET_W'(w0[1][0]);
  end

  assign det_mag   = det_neg ? DIV_W'(-det) : DIV_W'(det);
  assign div_start = (state == S_START);

  seq_divider #(.NW(NUM_W), .DW(DIV_W)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(div_start),
    .n    (NUMER),
    .d    (det_mag),
    .busy (div_busy),
    .done (div_done),
    .q    (quo),
    .r    (unused_rem)
  );

  // saturated, signed reciprocal
  always_comb begin
    logic signed [R_W-1:0] mag;
    mag   = (quo > NUM_W'(R_MAX)) ? R_MAX : R_W'(quo);
    recip = det_neg ? -mag : mag;
  end

  // cofactor scaling
  d_t d_c [2][2];
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        logic signed [P_W-1:0] p;
        p = P_W'(cof[i][j]) * P_W'(recip);
        p = (p + P_W'(RND)) >>> (P_SH + MU_SHIFT);   // round to nearest
        if (p > D_MAX)      d_c[i][j] = D_W'(D_MAX);
        else if (p < D_MIN) d_c[i][j] = D_W'(D_MIN);
        else                d_c[i][j] = D_W'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_DET;
      det     <= '0;
      det_neg <= 1'b0;
      valid   <= 1'b0;
      done    <= 1'b0;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          cof[i][j] <= '0;
          d[i][j]   <= '0;
        end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_DET: begin
          det       <= det_c;
          det_neg   <= det_c < 0;
          cof[0][0] <=  CF_W'(w0[1][1]);
          cof[0][1] <= -CF_W'(w0[1][0]);
          cof[1][0] <= -CF_W'(w0[0][1]);
          cof[1][1] <=  CF_W'(w0[0][0]);
          state     <= S_START;
        end
        S_START: state <= S_DIV;
        S_DIV:   if (div_done) state <= S_MUL;
        S_MUL: begin
          d     <= d_c;
          valid <= 1'b1;
          done  <= 1'b1;
          state <= S_DET;
        end
        default: state <= S_DET;
      endcase
    end
  end

  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy)
    else $error("divider started while busy");

endmodule
