// scaler_pkg: types, default sizes and coefficient arithmetic shared by the
// adaptive video scaler.
//
// The scaler interpolates each output pixel from R = 4 input pixels with one
// of two cubic-convolution kernels, both written as Keys kernels with a free
// parameter a:
//   |x| < 1      : (a+2)|x|^3 - (a+3)|x|^2 + 1
//   1 <= |x| < 2 : a|x|^3 - 5a|x|^2 + 8a|x| - 4a
//   otherwise    : 0
// Filter A (used in ringing areas) has a = 0: a smooth-step interpolator with
// no overshoot at all. Filter B (used everywhere else) has a = -0.75: sharper
// than the common bicubic (a = -0.5) and therefore with visible overshoot
// next to strong edges. Which kernels the two filters are is this design's
// choice; the requirement that A barely rings and B has a steep transition is
// the scaler's concept.
//
// Coefficients are signed fixed point with COEF_FRAC fractional bits,
// rounded half up, and the four taps of one phase are forced to sum to exactly
// 1.0 by adding the rounding residue to the tap nearest the output position.
// The fractional position is quantised to 2^PHASE_BITS phases.
package scaler_pkg;

  localparam int PIX_W      = 8;   // bits per pixel (one luma/colour component)
  localparam int TAPS       = 4;   // R, taps of one polyphase phase (Eq. (2) case R = 4)
  localparam int PHASE_BITS = 6;   // 64 stored phases
  localparam int COEF_FRAC  = 10;  // coefficient fraction bits
  localparam int COEF_W     = 12;  // signed coefficient width
  localparam int SCALE_W    = 8;   // width of the L (up) and M (down) factors

  // Keys parameter a, in quarters, of the two filters.
  localparam longint KEYS_A_QUARTERS [2] = '{-3, 0};  // index 0: filter B, 1: filter A

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Filter selection; the ringing map bit drives it directly.
  typedef enum logic {
    FILT_B_SHARP  = 1'b0,
    FILT_A_SMOOTH = 1'b1
  } filt_sel_e;

  // Floor division for a positive divisor.
  function automatic longint floor_div(longint num, longint den);
    if (num >= 0) return num / den;
    return -((-num + den - 1) / den);
  endfunction

  // Kernel value at distance xs/p (xs >= 0), scaled by 2^frac, rounded half up.
  function automatic longint keys_weight(longint a_q, longint xs, longint p, int frac);
    longint num, den;
    den = 4 * p * p * p;
    if (xs < p)
      num = (a_q + 8) * xs * xs * xs - (a_q + 12) * xs * xs * p + 4 * p * p * p;
    else if (xs < 2 * p)
      num = a_q * (xs * xs * xs - 5 * xs * xs * p + 8 * xs * p * p - 4 * p * p * p);
    else
      num = 0;
    return floor_div(2 * num * (longint'(1) << frac) + den, 2 * den);
  endfunction

  // Coefficient of tap `tap` (0..3, pixels k-1, k, k+1, k+2) for phase `ph`
  // of 2^pbits phases, filter `sel` (0 = B, 1 = A).
  function automatic int coef_value(int sel, longint ph, int tap, int pbits, int frac);
    longint p, w [4], sum;
    int adj;
    p = longint'(1) << pbits;
    w[0] = keys_weight(KEYS_A_QUARTERS[sel], p + ph, p, frac);
    w[1] = keys_weight(KEYS_A_QUARTERS[sel], ph, p, frac);
    w[2] = keys_weight(KEYS_A_QUARTERS[sel], p - ph, p, frac);
    w[3] = keys_weight(KEYS_A_QUARTERS[sel], 2 * p - ph, p, frac);
    sum = w[0] + w[1] + w[2] + w[3];
    adj = (ph < p / 2) ? 1 : 2;
    w[adj] = w[adj] + ((longint'(1) << frac) - sum);
    return int'(w[tap]);
  endfunction

endpackage
