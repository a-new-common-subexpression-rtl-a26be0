// tb_fir_delay_block: self-checking test of the transposed delay line.
//
// Random products drive all taps; a reference keeps the last N sets of
// products that were accepted (cycles with en high) and forms
// y = sum over k of prod[k] from k accepted samples ago, which is what the
// delay block must output. The test covers reset, cycles with en low (the
// line must hold) and an asynchronous reset in the middle of the stream, and
// checks the zero-latency path from prod[0] to y in the same cycle.
module tb_fir_delay_block;
  import fir_cse_pkg::*;

  localparam int unsigned N  = NTAPS;
  localparam int unsigned PW = W_DEF + FRAC + GUARD;
  localparam int unsigned YW = PW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [PW-1:0] prod [N];
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0;
  int holds = 0, resets = 0;

  // hist[d][k]: prod[k] of the sample accepted d samples ago (d >= 1)
  longint hist [N][N];

  fir_delay_block dut (.clk(clk), .rst_n(rst_n), .en(en), .prod(prod), .y(y));

  always #5 clk = ~clk;

  function automatic longint model_y();
    longint acc = longint'(prod[0]);
    for (int k = 1; k < int'(N); k++) acc += hist[k][k];
    return acc;
  endfunction

  task automatic clear_hist();
    for (int d = 0; d < int'(N); d++)
      for (int k = 0; k < int'(N); k++) hist[d][k] = 0;
  endtask

  // products kept below 2^24 in magnitude so no sum can overflow YW bits
  task automatic drive_random();
    for (int k = 0; k < int'(N); k++)
      prod[k] = PW'($signed($urandom) >>> 8);
  endtask

  task automatic check_now();
    longint e = model_y();
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("MISMATCH t=%0t y=%0d expected %0d", $time, y, e);
    end
  endtask

  // one clock: check before the edge, then shift the model if accepted
  task automatic step();
    #1 check_now();
    @(posedge clk);
    if (en) begin
      for (int d = int'(N) - 1; d > 0; d--) hist[d] = hist[d-1];
      for (int k = 0; k < int'(N); k++) hist[1][k] = longint'(prod[k]);
    end else begin
      holds++;
    end
    #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_hist();
    for (int k = 0; k < int'(N); k++) prod[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // zero-latency path: y follows prod[0] within the cycle
    @(negedge clk);
    prod[0] = 123456;
    #1 checks++;
    if (longint'(y) != 123456) begin
      failures++;
      $display("MISMATCH combinational path y=%0d", y);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      drive_random();
      en = ($urandom % 4) != 0;
      // asynchronous reset once in the middle of the run
      if (i == 1500) begin
        rst_n = 1'b0;
        #1 clear_hist();
        resets++;
        rst_n = 1'b1;
      end
      step();
    end
    if (holds == 0 || resets == 0) failures++;
    $display("holds=%0d resets=%0d", holds, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
