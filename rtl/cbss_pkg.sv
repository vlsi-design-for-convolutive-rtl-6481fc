// cbss_pkg: number formats and constants shared by the convolutive blind
// source separation (CBSS) datapath.
//
// All values are two's-complement fixed point. The formats are this design's
// own choice; the only hint on widths is that the reference waveforms show
// 8-bit sample values, so sensor samples are 8 bits wide.
//
//   x  : sensor sample          X_W=8,  X_F=7   (Q1.7,  range [-1, 1))
//   w  : filter tap weight      W_W=16, W_F=12  (Q4.12, range [-8, 8))
//   u  : network output u_i     U_W=16, U_F=11  (Q5.11, range [-16, 16))
//   g  : 1-2y and mu*(1-2y)     G_W=16, G_F=14  (Q2.14, range [-2, 2))
//   d  : mu*d_ij (D-term)       D_W=16, D_F=12  (same scale as a weight)
//   r  : 1/det(W0)              R_W=24, R_F=12  (Q12.12)
//
// The step size mu is a power of two, 2^-MU_SHIFT, so that every mu
// multiplication is an arithmetic shift.
package cbss_pkg;

  localparam int unsigned X_W = 8;
  localparam int unsigned X_F = 7;
  localparam int unsigned W_W = 16;
  localparam int unsigned W_F = 12;
  localparam int unsigned U_W = 16;
  localparam int unsigned U_F = 11;
  localparam int unsigned G_W = 16;
  localparam int unsigned G_F = 14;
  localparam int unsigned D_W = 16;
  localparam int unsigned D_F = 12;
  localparam int unsigned R_W = 24;
  localparam int unsigned R_F = 12;

  // Default step size mu = 2^-8.
  localparam int unsigned MU_SHIFT_DEFAULT = 8;

  // Taps per Infomax filter (the filtering module is shown with six taps).
  localparam int unsigned TAPS_DEFAULT = 6;

  // Pipeline depths in clock cycles, used to align the weight update with
  // the sample that produced it.
  localparam int unsigned FILT_LAT  = 3;  // x_valid -> filter u_valid
  localparam int unsigned SUM_LAT   = 1;  // output CSA + format register
  localparam int unsigned SCALE_LAT = 2;  // scaling factor module
  localparam int unsigned SF_LAT    = FILT_LAT + SUM_LAT + SCALE_LAT;

  typedef logic signed [X_W-1:0] x_t;
  typedef logic signed [W_W-1:0] w_t;
  typedef logic signed [U_W-1:0] u_t;
  typedef logic signed [G_W-1:0] g_t;
  typedef logic signed [D_W-1:0] d_t;

  localparam w_t W_ONE  = w_t'(1 << W_F);
  localparam w_t W_ZERO = '0;

  // Line segment that the scaling factor module used for a sample,
  // ordered from the most negative input to the most positive one.
  typedef enum logic [2:0] {LS1 = 3'd1, LS2 = 3'd2, LS3 = 3'd3, LS4 = 3'd4, LS5 = 3'd5} seg_e;

  // Width of one filter's full-precision output: tap product, one bit for
  // the pair sum, and the growth of summing TAPS/2 pair sums.
  function automatic int unsigned facc_w(int unsigned taps);
    return X_W + W_W + 1 + $clog2(taps / 2);
  endfunction

endpackage
