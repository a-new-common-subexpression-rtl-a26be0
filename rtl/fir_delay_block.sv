// fir_delay_block: delay line and structural adders of a transposed-form FIR
// filter. Given the products prod[k] = h(k)*x(n) of the current sample, it
// produces y(n) = sum over k of prod[k] taken k samples ago, i.e.
// y(n) = h(0)x(n) + h(1)x(n-1) + ... + h(N-1)x(n-N+1).
//
// How it works: a chain of N-1 registers runs from the last tap towards the
// output. The register next to the output is fed prod[1] plus the register
// behind it, and so on; the last register takes prod[N-1] alone. The output
// adder adds prod[0] to the first register. So there are N-1 structural
// adders and N-1 registers, as in a transposed direct-form filter.
//
// Interface and timing: y is combinational from prod[0] (zero latency: the
// response to an input appears in the same cycle as the input). The
// registers advance on the rising clock edge when en is high and hold when it
// is low, so en marks the cycles that carry a new sample. rst_n clears the
// registers asynchronously.
//
// What follows the design: the transposed chain of delays and structural
// adders. This implementation's own: the sample enable, the reset, and the
// accumulator width YW (wide enough that no sum of N products overflows when
// the coefficients' absolute sum is below 2^GUARD).
module fir_delay_block
  import fir_cse_pkg::*;
#(
  parameter int unsigned N  = NTAPS,
  parameter int unsigned PW = W_DEF + FRAC + GUARD,
  parameter int unsigned YW = PW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [PW-1:0] prod [N],
  output logic signed [YW-1:0] y
);

  typedef logic signed [YW-1:0] acc_t;

  // s[k] holds the partial sum of taps k..N-1, delayed so that it lines up
  // with the output one sample later; s[0] is unused.
  acc_t s [N];
  acc_t s_next [N];

  always_comb begin
    s_next[0] = '0;
    for (int k = 1; k < N - 1; k++)
      s_next[k] = acc_t'(prod[k]) + s[k+1];
    s_next[N-1] = acc_t'(prod[N-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) s[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < N; k++) s[k] <= s_next[k];
    end
  end

  assign y = acc_t'(prod[0]) + s[1];

  initial assert (N >= 2) else $fatal(1, "fir_delay_block needs at least two taps");

endmodule
