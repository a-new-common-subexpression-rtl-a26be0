// fir_cse_top: 6-tap symmetric low-pass FIR filter whose constant multiplier
// is replaced by a shift-and-add multiplier block with shared common
// subexpressions.
//
// Structure: the input sample x_in enters the multiplier block
// (cse_mult_block), which forms h(0)*x, h(1)*x and h(2)*x. Because the
// coefficients are symmetric (h(5)=h(0), h(4)=h(1), h(3)=h(2)), the same three
// products also feed the second half of the filter, so taps 0..5 of the delay
// block (fir_delay_block) receive p0, p1, p2, p2, p1, p0. The delay block is
// a transposed direct form: five registers and five structural adders.
//
// Interface and timing: one sample per clock cycle in which en is high.
// y_out = sum of h(k) * x(n-k) for k = 0..5, exact and scaled by 2^16 (so
// y_out / 65536 is the filter output in units of the input). y_out is
// combinational from x_in, i.e. the response to x(n) appears in the same
// cycle; registers update at the rising edge of clk when en is high. rst_n is
// an asynchronous active-low reset that clears the delay line.
//
// What follows the design: tap count, input width, coefficients, the split
// into multiplier block and delay block, and the reuse of the half-filter
// products for the symmetric taps. This implementation's own: en, rst_n,
// full-precision output of YW = W + 16 + 2 bits, and the multiplier block's
// adder network (see cse_mult_block).
module fir_cse_top
  import fir_cse_pkg::*;
#(
  parameter int unsigned W  = W_DEF,
  parameter int unsigned YW = W + FRAC + GUARD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [W-1:0]  x_in,
  output logic signed [YW-1:0] y_out
);

  logic signed [YW-1:0] p    [NHALF];
  logic signed [YW-1:0] prod [NTAPS];

  cse_mult_block #(.W(W), .PW(YW)) u_mb (
    .x_in (x_in),
    .p    (p)
  );

  // symmetric sharing: tap k and tap NTAPS-1-k use the same product
  always_comb begin
    for (int k = 0; k < int'(NTAPS); k++)
      prod[k] = (k < int'(NHALF)) ? p[k] : p[int'(NTAPS) - 1 - k];
  end

  fir_delay_block #(.N(NTAPS), .PW(YW), .YW(YW)) u_db (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .prod  (prod),
    .y     (y_out)
  );

endmodule
