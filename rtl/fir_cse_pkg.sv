// fir_cse_pkg: shared sizes of the 6-tap symmetric low-pass FIR filter built
// around a common-subexpression multiplier block.
//
// The filter has N = 6 taps, a 16-bit two's-complement input and coefficients
// written as 16-digit canonical signed-digit (CSD) fractions, so every
// coefficient is an integer multiple of 2^-16. The RTL keeps products exact:
// a right shift by j of the input is realised as a left shift by FRAC - j of
// the input, so every internal value is the true value scaled by 2^FRAC.
// Tap count, input width and the 16 fractional digits follow the design;
// the guard-bit choice (GUARD) is this implementation's own.
package fir_cse_pkg;

  // number of filter taps
  localparam int unsigned NTAPS = 6;
  // number of distinct coefficients of the symmetric filter
  localparam int unsigned NHALF = NTAPS / 2;
  // input word length
  localparam int unsigned W_DEF = 16;
  // number of fractional CSD digits of every coefficient (shifts 1..16)
  localparam int unsigned FRAC = 16;
  // extra integer bits of the products and of the output sum
  localparam int unsigned GUARD = 2;

endpackage
