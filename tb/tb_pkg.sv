// tb_pkg: helpers shared by the testbenches: conversions between real numbers
// and the fx_t fixed-point format, computed with simulator real arithmetic so
// that they are independent of the design's own conversion logic, and a
// uniform random real.
package tb_pkg;
  import fx_pkg::*;

  localparam real LSB = 1.0 / (2.0 ** FX_F);

  function automatic real fx2r(fx_t v);
    return real'(longint'(v)) * LSB;
  endfunction

  function automatic fx_t r2fx(real v);
    return fx_t'(longint'(v * (2.0 ** FX_F)));
  endfunction

  // Uniform random real in [lo, hi).
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
