// dwt_pkg: constants and filter coefficients shared by the distributed-arithmetic
// (DA) wavelet filter bank.
//
// The filter bank is built around one 8-tap FIR filter whose coefficients are
// a parameter. Coefficients are signed 8-bit integers that stand for the real
// tap value times 2**COEF_FRAC. The four sets below are the Daubechies-4 (db4)
// orthogonal wavelet, rounded to integers at a scale of 64:
//   lowpass analysis  h = round(64 * db4)
//   highpass analysis g[k] = (-1)**k * h[7-k]        (quadrature mirror)
//   synthesis filters = time reverse of the analysis filters
// The 8-tap count and 8-bit samples follow the source design; the choice of
// wavelet and the coefficient scale are this implementation's own.
package dwt_pkg;

  localparam int unsigned N_TAPS    = 8;  // filter length
  localparam int unsigned COEF_W    = 8;  // coefficient width (signed)
  localparam int unsigned COEF_FRAC = 6;  // coefficient scale 2**6
  localparam int unsigned LUT_IN    = 4;  // address bits of one partial LUT

  localparam int unsigned SAMPLE_W  = 8;  // sample width (two's complement)

  // Element k is the coefficient applied to x(n-k), a two's-complement
  // COEF_W-bit value.
  typedef logic [N_TAPS-1:0][COEF_W-1:0] coefs_t;

  // Builds a coefficient set from a list c0, c1, ..., c7.
  function automatic coefs_t make_coefs(int c [N_TAPS]);
    coefs_t r;
    for (int k = 0; k < N_TAPS; k++) r[k] = COEF_W'(c[k]);
    return r;
  endfunction

  localparam coefs_t LP_ANALYSIS  = make_coefs('{15, 46, 40, -2, -12, 2, 2, -1});
  localparam coefs_t HP_ANALYSIS  = make_coefs('{-1, -2, 2, 12, -2, -40, 46, -15});
  localparam coefs_t LP_SYNTHESIS = make_coefs('{-1, 2, 2, -12, -2, 40, 46, 15});
  localparam coefs_t HP_SYNTHESIS = make_coefs('{-15, 46, -40, -2, 12, 2, -2, -1});

endpackage
