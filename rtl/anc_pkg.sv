// anc_pkg: number formats and arithmetic shared by every adaptive noise
// canceller in this design.
//
// Every filter variant (plain/delayed LMS, pipelined DLMS, unfolded DLMS)
// does exactly the same per-sample arithmetic; only where the registers sit
// differs. Keeping that arithmetic here makes the variants bit-exact
// equivalent, so each one can be checked against the others.
//
// Formats (this design's choice; the algorithm itself fixes none):
//   samples x, d, e, y : DATA_W = 16 bit two's complement, Q1.15
//   weights w          : COEF_W = 24 bit two's complement, Q2.22
//   tap products w*x   : 40 bit, 37 fraction bits; the sum of the taps is
//                        kept in ACC_W = 44 bits (room for 16 taps)
// Step size: the update w += 2*mu*e*u uses 2*mu = 2^-mu_shift, so the
// multiplication by 2*mu is an arithmetic right shift.
// Rounding: every right shift truncates toward minus infinity. The error is
// saturated to the sample range; the weights wrap (the step size keeps them
// far from +/-2 in normal use).
package anc_pkg;

  localparam int DATA_W    = 16;
  localparam int DATA_FRAC = 15;
  localparam int COEF_W    = 24;
  localparam int COEF_FRAC = 22;
  localparam int PROD_W    = DATA_W + COEF_W;
  localparam int ACC_W     = PROD_W + 4;
  // e*x has 2*DATA_FRAC fraction bits; the weights have COEF_FRAC.
  localparam int UPD_ALIGN = 2 * DATA_FRAC - COEF_FRAC;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Filter tap product w*x, full precision.
  function automatic prod_t tap_product(coef_t w, sample_t x);
    return prod_t'(w) * prod_t'(x);
  endfunction

  // Saturate a wide value to the sample range.
  function automatic sample_t sat_sample(acc_t v);
    localparam acc_t MAXV = acc_t'((1 <<< (DATA_W - 1)) - 1);
    localparam acc_t MINV = -acc_t'(1 <<< (DATA_W - 1));
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

  // Filter output y in sample format, from the tap sum.
  function automatic sample_t output_of(acc_t sum);
    return sat_sample(sum >>> COEF_FRAC);
  endfunction

  // Error e = d - y, computed at full width from the tap sum, then saturated.
  function automatic sample_t error_of(sample_t d, acc_t sum);
    return sat_sample(acc_t'(d) - (sum >>> COEF_FRAC));
  endfunction

  // Weight increment 2*mu*e*u for one tap.
  function automatic coef_t weight_delta(sample_t e, sample_t x, int unsigned mu_shift);
    logic signed [2*DATA_W-1:0] p;
    p = (2 * DATA_W)'(e) * (2 * DATA_W)'(x);
    return coef_t'(p >>> (UPD_ALIGN + mu_shift));
  endfunction

endpackage
