// ddsm_pkg: constants and helper functions shared by the error feedback
// modulator (EFM) blocks.
//
// An l-th order EFM feeds its truncation error back through
// H(z) = 1 - (1 - z^-1)^l, i.e. the tap on z^-i has the weight
// h_i = (-1)^(i+1) * C(l, i)   (i = 1..l).
// For l = 1 this is z^-1, for l = 2 it is 2z^-1 - z^-2 and for l = 3 it is
// 3z^-1 - 3z^-2 + z^-3. The functions below are evaluated at elaboration
// time only and produce no hardware of their own.
package ddsm_pkg;

  // Highest loop-filter order any EFM in this library is built for.
  localparam int unsigned MAX_ORDER = 3;

  // Binomial coefficient C(n, k).
  function automatic int binom(input int n, input int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  // Weight of the z^-i tap of H(z) = 1 - (1 - z^-1)^order.
  function automatic int efm_tap(input int order, input int i);
    return ((i % 2) == 1) ? binom(order, i) : -binom(order, i);
  endfunction

  function automatic int unsigned umax(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Output width of an l-th order EFM: a (l+1)-bit truncator keeps an
  // FIR-NTF EFM of order l free of quantizer overload.
  function automatic int unsigned efm_out_width(input int unsigned order);
    return order + 1;
  endfunction

endpackage
