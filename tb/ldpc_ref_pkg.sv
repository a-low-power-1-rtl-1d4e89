// ldpc_ref_pkg: reference arithmetic for the LDPC testbenches.
//
// An independent model of the decoder's message arithmetic: the correction
// tables are computed here from their defining formulas with real-valued
// math (4 * ln(1 + e^-x/4), -4 * ln(1 - e^-x/4), rounded, 3 bits), not copied
// from the RTL tables. Also holds a layered-decoding reference for whole
// codes (arrays sized for the largest code).
package ldpc_ref_pkg;

  localparam int LMAX = 127;

  function automatic int rsat(input int v);
    if (v > LMAX) return LMAX;
    if (v < -LMAX) return -LMAX;
    return v;
  endfunction

  localparam int AMAX = 255;   // a-posteriori messages have one bit more

  function automatic int rsat_app(input int v);
    if (v > AMAX) return AMAX;
    if (v < -AMAX) return -AMAX;
    return v;
  endfunction

  function automatic int rabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int rfc(input int x);
    real v;
    v = 4.0 * $ln(1.0 + $exp(-real'(x) / 4.0));
    return int'($floor(v + 0.5));
  endfunction

  function automatic int rgc(input int x);
    real v;
    if (x == 0) return 7;
    v = -4.0 * $ln(1.0 - $exp(-real'(x) / 4.0));
    v = $floor(v + 0.5);
    return (v > 7.0) ? 7 : int'(v);
  endfunction

  // boxplus and boxminus on saturated integers (LSB = 1/4)
  function automatic int ref_f(input int a, input int b);
    int ma, mb, m;
    ma = rabs(rsat(a)); mb = rabs(rsat(b));
    m  = ((ma < mb) ? ma : mb) + rfc(ma + mb) - rfc(rabs(ma - mb));
    if (m < 1) m = 1;
    if (m > LMAX) m = LMAX;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // message that enters f() and g(): lambda saturated, zero taken as +1
  function automatic int ref_msg(input int lam);
    int v;
    v = rsat(lam);
    return (v == 0) ? 1 : v;
  endfunction

  function automatic int ref_g(input int a, input int b);
    int ma, mb, m;
    ma = rabs(rsat(a)); mb = rabs(rsat(b));
    m  = ((ma < mb) ? ma : mb) - rgc(ma + mb) + rgc(rabs(ma - mb));
    if (m < 0) m = 0;
    if (m > LMAX) m = LMAX;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

endpackage
