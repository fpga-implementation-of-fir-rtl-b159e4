// dwt_ref_pkg: reference models for the testbenches of the DA wavelet filter
// bank. They compute with plain integer multiply-and-add, independently of
// the bit-serial hardware:
//   fir_model.step_full(x) = sum_k c_k * x(n-k) over the last 8 samples
//   requant(v)             = v >>> COEF_FRAC, saturated to 8-bit two's complement
// plus the analysis (filter then keep even outputs) and synthesis (zero
// insertion then filter) stages built on them.
package dwt_ref_pkg;

  function automatic int requant(int v);
    int s = v >>> dwt_pkg::COEF_FRAC;
    if (s > 127)  return 127;
    if (s < -128) return -128;
    return s;
  endfunction

  function automatic int coef(dwt_pkg::coefs_t c, int k);
    return int'($signed(c[k]));
  endfunction

  class fir_model;
    dwt_pkg::coefs_t c;
    int hist[8];

    function new(dwt_pkg::coefs_t coefs);
      c = coefs;
      foreach (hist[i]) hist[i] = 0;
    endfunction

    function int step_full(int x);
      int acc = 0;
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      for (int k = 0; k < 8; k++) acc += coef(c, k) * hist[k];
      return acc;
    endfunction

    function int step(int x);
      return requant(step_full(x));
    endfunction
  endclass

  // Filter then decimate by 2 (keep filter outputs 0, 2, 4, ...).
  class dec_model;
    fir_model f;
    bit       odd;
    function new(dwt_pkg::coefs_t coefs);
      f   = new(coefs);
      odd = 0;
    endfunction
    // Returns 1 and the output in y when this input yields a kept output.
    function bit step(int x, output int y);
      bit keep = !odd;
      y   = f.step(x);
      odd = !odd;
      return keep;
    endfunction
  endclass

  // Zero insertion then filter: two outputs per input.
  class int_model;
    fir_model f;
    function new(dwt_pkg::coefs_t coefs);
      f = new(coefs);
    endfunction
    function void step(int x, output int y0, output int y1);
      y0 = f.step(x);
      y1 = f.step(0);
    endfunction
  endclass

endpackage
