// fft_pkg: constants and twiddle-factor functions shared by the FFT blocks.
//
// A twiddle factor W_N^k = exp(-j*2*pi*k/N) = C + jS is held in two's
// complement fixed point with TW bits, FRAC of them fractional (Q1.14 by
// default). The complex multiplier needs C, C+S and C-S, so the package gives
// a constant function for each; they are evaluated at elaboration time, which
// replaces a stored twiddle table. Entries are rounded to nearest.
//
// The twiddle definition follows the DFT equations of the design; the word
// width, the number of fractional bits and the rounding are this design's own
// choices (no widths are specified for the datapath).
package fft_pkg;

  parameter int TW   = 16;  // twiddle word width
  parameter int FRAC = 14;  // fractional bits of a twiddle (1.0 = 2**FRAC)

  localparam real PI = 3.14159265358979323846;

  // Round a real to the nearest integer, halves away from zero.
  function automatic int round_real(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  // Real part C of W_N^k, scaled by 2**FRAC.
  function automatic int tw_c(int k, int n);
    return round_real($cos(2.0 * PI * real'(k) / real'(n)) * real'(1 << FRAC));
  endfunction

  // Imaginary part S of W_N^k (S = -sin), scaled by 2**FRAC.
  function automatic int tw_s(int k, int n);
    return round_real(-$sin(2.0 * PI * real'(k) / real'(n)) * real'(1 << FRAC));
  endfunction

  // Coefficients of the three-multiplier complex multiplier.
  function automatic int tw_cps(int k, int n);
    return tw_c(k, n) + tw_s(k, n);
  endfunction

  function automatic int tw_cms(int k, int n);
    return tw_c(k, n) - tw_s(k, n);
  endfunction

  // sqrt(3)/2 scaled by 2**FRAC: the constant of the 3-point DFT.
  function automatic int sqrt3_half();
    return round_real($sqrt(3.0) / 2.0 * real'(1 << FRAC));
  endfunction

endpackage
