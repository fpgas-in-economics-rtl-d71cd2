// tb_util_pkg: conversions between real numbers and the Q15.16 fixed-point
// format of the accelerator, shared by the testbenches.
package tb_util_pkg;
  import vfi_pkg::*;

  function automatic fx_t r2fx(input real r);
    real s;
    s = r * (2.0 ** FX_FRAC);
    if (s >= 2147483647.0) return FX_MAX;
    if (s <= -2147483648.0) return FX_MIN;
    return fx_t'($rtoi(s));
  endfunction

  function automatic real fx2r(input fx_t v);
    return real'(v) / (2.0 ** FX_FRAC);
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // Uniform real in [lo, hi).
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction
endpackage
