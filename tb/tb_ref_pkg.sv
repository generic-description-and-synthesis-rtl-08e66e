// tb_ref_pkg: reference arithmetic for the testbenches, written apart from
// the RTL. f_ref evaluates f(x) = -ln(tanh(x/2)) in floating point on the
// 5-bit, 2-fractional-bit magnitude grid and rounds it, saturating at 31;
// star_ref is the check function on two LLRs built on f_ref.
package tb_ref_pkg;
  function automatic int f_ref(input int k);
    real x, v;
    int r;
    if (k <= 0) return 31;
    if (k > 31) k = 31;
    x = k / 4.0;
    v = -$ln((1.0 - $exp(-x)) / (1.0 + $exp(-x))) * 4.0;   // tanh(x/2) = (1-e^-x)/(1+e^-x)
    r = int'($floor(v + 0.5));
    return (r > 31) ? 31 : r;
  endfunction

  function automatic int sat31(input int v);
    if (v < 0) v = -v;
    return (v > 31) ? 31 : v;
  endfunction

  function automatic int star_ref(input int a, input int b);
    int m;
    m = f_ref(sat31(f_ref(sat31(a)) + f_ref(sat31(b))));
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction
endpackage
