// cse_mult_block: shift-and-add multiplier block of the 6-tap symmetric FIR
// filter. It forms the three products h(0)*x, h(1)*x and h(2)*x of one input
// sample with constant coefficients, using no multiplier: only shifts and
// ten adders/subtractors that share common subexpressions.
//
// Coefficients, in canonical signed-digit form (digit j weighs 2^-j):
//   h(0) = 2^-2 + 2^-6 - 2^-8 + 2^-10 + 2^-12 + 2^-14 - 2^-16
//   h(1) = 2^-2 - 2^-4 + 2^-8 + 2^-10 + 2^-12 - 2^-14 - 2^-16
//   h(2) = 2^-2 - 2^-5 + 2^-9 - 2^-15
// h(3..5) equal h(2..0); the delay block reuses these three products.
//
// Subexpressions (x1 is the input; "@j" is a right shift by j):
//   x2 = x1 + x1@2   horizontal pattern [1 0 1]
//   x3 = x1 - x1@2   horizontal pattern [1 0 -1]
//   x4 = x1 - x1@3   horizontal pattern [1 0 0 -1]
//   g  = x2 + x3@4   pair (x2, x3 four digits apart) that occurs in h(0) at
//                    shift 10 and in h(1) at shift 8, built once and shared
// Products:
//   h(0)*x1 = (x1@2 + x3@6) + g@10
//   h(1)*x1 = (x3@2 - x1@16) + g@8
//   h(2)*x1 = x4@2 + (x1@9 - x1@15)
// That is ten adders with a logic depth of three adder-steps.
//
// Number format: the outputs are the exact products scaled by 2^FRAC, so no
// bit is lost; every right shift above is realised as a left shift of an
// integer-scaled subexpression. PW = W + FRAC + GUARD bits hold any product
// of a W-bit input.
//
// Interface and timing: purely combinational; p[k] is h(k) times x_in.
//
// What follows the design: the coefficients, the subexpression patterns
// [1 0 1], [1 0 -1], [1 0 0 -1] and the sharing of a subexpression pair that
// occurs with identical spacing in two coefficients. This implementation's
// own: the exact adder network above (the published optimised network uses
// eight adders with vertical subexpressions and could not be reproduced),
// and keeping full precision instead of truncating.
module cse_mult_block
  import fir_cse_pkg::*;
#(
  parameter int unsigned W  = W_DEF,
  parameter int unsigned PW = W + FRAC + GUARD
) (
  input  logic signed [W-1:0]  x_in,
  output logic signed [PW-1:0] p [NHALF]
);

  typedef logic signed [PW-1:0] acc_t;

  acc_t x1;       // sign-extended input, weight 1 (not scaled)
  acc_t x2i;      // 4 * x2
  acc_t x3i;      // 4 * x3
  acc_t x4i;      // 8 * x4
  acc_t gi;       // 64 * g
  acc_t h0a, h1a, h2a;

  always_comb begin
    x1  = acc_t'(x_in);
    // first adder-step: horizontal subexpressions
    x2i = (x1 <<< 2) + x1;                  // A1
    x3i = (x1 <<< 2) - x1;                  // A2
    x4i = (x1 <<< 3) - x1;                  // A3
    // second adder-step
    gi  = (x2i <<< 4) + x3i;                // A4: 64*(x2 + x3@4)
    h0a = (x1 <<< 14) + (x3i <<< 8);        // A5: (x1@2 + x3@6) * 2^16
    h1a = (x3i <<< 12) - x1;                // A6: (x3@2 - x1@16) * 2^16
    h2a = (x1 <<< 7) - (x1 <<< 1);          // A7: (x1@9 - x1@15) * 2^16
    // third adder-step: products scaled by 2^16
    p[0] = h0a + gi;                        // A8: + g@10
    p[1] = h1a + (gi <<< 2);                // A9: + g@8
    p[2] = (x4i <<< 11) + h2a;              // A10: + x4@2
  end

endmodule
