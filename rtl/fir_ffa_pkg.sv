// fir_ffa_pkg: widths shared by the parallel symmetric FIR filters.
//
// Every filter in this library keeps full precision. For an N-tap filter
// with XW-bit samples and CW-bit coefficients the exact output
// y(n) = sum h(i) x(n-i) is bounded by N * 2^(XW-1) * 2^(CW-1), so it fits in
// out_width() bits. Inside the fast-FIR structures the sub-filters see
// pre-added samples (one extra bit) and pre-added coefficients (one extra bit)
// and the post-adders form sums of two such outputs before halving them, so
// the internal word gets three guard bits (int_width()). All results are
// exact; the final outputs are truncated back to out_width() without loss.
// The sample and coefficient widths themselves are this library's choice:
// the source structure does not fix them.
package fir_ffa_pkg;

  // Width of an exact N-tap convolution of XW-bit samples and CW-bit taps.
  function automatic int out_width(int xw, int cw, int n);
    return xw + cw + $clog2(n);
  endfunction

  // Width used for sub-filter outputs and post-processing sums.
  function automatic int int_width(int xw, int cw, int n);
    return out_width(xw, cw, n) + 3;
  endfunction

endpackage
