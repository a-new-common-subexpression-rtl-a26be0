// tb_fir_cse_top: end-to-end test of the 6-tap symmetric FIR filter at its
// default sizes (16-bit input, 34-bit exact output).
//
// The reference is a direct-form convolution y(n) = sum h(k) x(n-k) whose six
// coefficients come from the canonical signed-digit table of the filter (all
// six rows, h(3..5) written out rather than mirrored), computed with ordinary
// multiplications. Every cycle the output is compared with it.
//
// Phases: reset; a unit impulse and a full-scale impulse, whose responses
// must read back h(0)..h(5) starting in the same cycle as the impulse (zero
// latency) and end after six samples; a full-scale step in both directions,
// which drives the output to its largest magnitude (checks that the output
// width does not overflow); random samples with en low in about one cycle of
// four (the filter must hold its state); a reset in the middle of the
// stream; and a low-frequency and a near-Nyquist tone, which the low-pass
// filter passes and attenuates. Each of these events is counted and a
// failure is counted for any that never happened.
module tb_fir_cse_top;
  import fir_cse_pkg::*;

  localparam int unsigned W  = W_DEF;
  localparam int unsigned YW = W + FRAC + GUARD;

  localparam int CSD [NTAPS][FRAC] = '{
    '{0, 1, 0, 0, 0, 1, 0, -1, 0, 1, 0, 1, 0, 1, 0, -1},
    '{0, 1, 0, -1, 0, 0, 0, 1, 0, 1, 0, 1, 0, -1, 0, -1},
    '{0, 1, 0, 0, -1, 0, 0, 0, 1, 0, 0, 0, 0, 0, -1, 0},
    '{0, 1, 0, 0, -1, 0, 0, 0, 1, 0, 0, 0, 0, 0, -1, 0},
    '{0, 1, 0, -1, 0, 0, 0, 1, 0, 1, 0, 1, 0, -1, 0, -1},
    '{0, 1, 0, 0, 0, 1, 0, -1, 0, 1, 0, 1, 0, 1, 0, -1}
  };

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [W-1:0]  x = '0;
  logic signed [YW-1:0] y;

  longint h [NTAPS];
  longint xh [NTAPS];      // xh[d] = input accepted d samples ago (d >= 1)
  int checks = 0, failures = 0;
  int n_impulse = 0, n_fullscale = 0, n_hold = 0, n_reset = 0;
  int n_tone_lo = 0, n_tone_hi = 0, n_zero_latency = 0;
  longint max_abs_y = 0;
  longint tone_lo_peak, tone_hi_peak;

  fir_cse_top dut (.clk(clk), .rst_n(rst_n), .en(en), .x_in(x), .y_out(y));

  always #5 clk = ~clk;

  function automatic longint model_y();
    longint acc = longint'(x) * h[0];
    for (int k = 1; k < int'(NTAPS); k++) acc += xh[k] * h[k];
    return acc;
  endfunction

  function automatic longint labs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic clear_model();
    for (int d = 0; d < int'(NTAPS); d++) xh[d] = 0;
  endtask

  task automatic compare(longint e, string what);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s t=%0t y=%0d expected %0d", what, $time, y, e);
    end
  endtask

  // apply one sample at the falling edge, check, clock it in
  task automatic sample(logic signed [W-1:0] v, logic e = 1'b1);
    @(negedge clk);
    x  = v;
    en = e;
    #1 compare(model_y(), "stream");
    if (labs(longint'(y)) > max_abs_y) max_abs_y = labs(longint'(y));
    @(posedge clk);
    if (en) begin
      for (int d = int'(NTAPS) - 1; d > 1; d--) xh[d] = xh[d-1];
      xh[1] = longint'(x);
    end else n_hold++;
  endtask

  // impulse of height a: y must read a*h(k) in the k-th sample after it
  task automatic impulse(logic signed [W-1:0] a);
    for (int k = 0; k < int'(NTAPS) + 2; k++) begin
      @(negedge clk);
      x  = (k == 0) ? a : '0;
      en = 1'b1;
      #1 compare((k < int'(NTAPS)) ? longint'(a) * h[k] : 0, "impulse");
      if (k == 0 && longint'(y) == longint'(a) * h[0] && a != 0) n_zero_latency++;
      @(posedge clk);
      for (int d = int'(NTAPS) - 1; d > 1; d--) xh[d] = xh[d-1];
      xh[1] = longint'(x);
    end
    n_impulse++;
  endtask

  // sine tone of the given period in samples; returns the peak |y| after the
  // filter has filled
  task automatic tone(real period, output longint peak);
    peak = 0;
    for (int i = 0; i < 64; i++) begin
      sample(W'($rtoi(20000.0 * $sin(2.0 * 3.14159265358979 * i / period))));
      if (i > int'(NTAPS) && labs(longint'(y)) > peak) peak = labs(longint'(y));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(NTAPS); k++) begin
      h[k] = 0;
      for (int c = 0; c < int'(FRAC); c++)
        h[k] += longint'(CSD[k][c]) * (longint'(1) << (int'(FRAC) - 1 - c));
    end
    clear_model();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // impulse responses
    impulse(16'sd1);
    impulse(16'sh7fff);
    impulse(16'sh8000);

    // full-scale steps: all coefficients are positive, so a run of the
    // largest (smallest) input drives y to its largest (smallest) value
    repeat (10) sample(16'sh7fff);
    if (longint'(y) == 32767 * (2 * (h[0] + h[1] + h[2]))) n_fullscale++;
    repeat (10) sample(16'sh8000);
    if (longint'(y) == -32768 * (2 * (h[0] + h[1] + h[2]))) n_fullscale++;

    // random stream with en low about one cycle in four
    for (int i = 0; i < 4000; i++) begin
      if (i == 2000) begin
        @(negedge clk);
        rst_n = 1'b0;
        #1 clear_model();
        rst_n = 1'b1;
        n_reset++;
      end
      sample(W'($urandom), ($urandom % 4) != 0);
    end

    // low-pass behaviour: period 32 (0.0625 pi) against period 2.2 (0.9 pi)
    tone(32.0, tone_lo_peak);
    tone(2.2, tone_hi_peak);
    if (tone_lo_peak > 20000 * 65536) n_tone_lo++;
    if (tone_hi_peak < 4 * 20000 * 65536 / 10) n_tone_hi++;
    $display("tone peaks (x 2^-16): low %0d high %0d; max |y| %0d", tone_lo_peak,
             tone_hi_peak, max_abs_y);

    $display("impulses=%0d zero_latency=%0d fullscale=%0d holds=%0d resets=%0d tone_pass=%0d tone_stop=%0d",
             n_impulse, n_zero_latency, n_fullscale, n_hold, n_reset, n_tone_lo, n_tone_hi);
    if (n_impulse == 0)      begin failures++; $display("no impulse response checked"); end
    if (n_zero_latency == 0) begin failures++; $display("zero latency never seen"); end
    if (n_fullscale != 2)    begin failures++; $display("full-scale output not reached"); end
    if (n_hold == 0)         begin failures++; $display("en never held the filter"); end
    if (n_reset == 0)        begin failures++; $display("no reset in the stream"); end
    if (n_tone_lo == 0)      begin failures++; $display("low tone not passed"); end
    if (n_tone_hi == 0)      begin failures++; $display("high tone not attenuated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
