// tb_cse_mult_block: self-checking test of the shift-and-add multiplier block.
//
// The expected products come from the coefficient table in canonical
// signed-digit form (one row of 16 digits per coefficient, digit j weighing
// 2^-j), turned into integers scaled by 2^16 and multiplied with the input by
// an ordinary multiplication, independent of the block's adder network. The
// test drives the corner values of a 16-bit input, a walking one and many
// random samples, and checks each of the three products.
module tb_cse_mult_block;
  import fir_cse_pkg::*;

  localparam int unsigned W  = W_DEF;
  localparam int unsigned PW = W + FRAC + GUARD;

  // CSD digits of h(0), h(1), h(2); column c is the digit of weight 2^-(c+1)
  localparam int CSD [NHALF][FRAC] = '{
    '{0, 1, 0, 0, 0, 1, 0, -1, 0, 1, 0, 1, 0, 1, 0, -1},
    '{0, 1, 0, -1, 0, 0, 0, 1, 0, 1, 0, 1, 0, -1, 0, -1},
    '{0, 1, 0, 0, -1, 0, 0, 0, 1, 0, 0, 0, 0, 0, -1, 0}
  };

  logic signed [W-1:0]  x;
  logic signed [PW-1:0] p [NHALF];
  longint coef [NHALF];
  int checks = 0, failures = 0;

  cse_mult_block dut (.x_in(x), .p(p));

  function automatic longint csd_value(int k);
    longint v = 0;
    for (int c = 0; c < int'(FRAC); c++)
      v += longint'(CSD[k][c]) * (longint'(1) << (int'(FRAC) - 1 - c));
    return v;
  endfunction

  task automatic check(logic signed [W-1:0] v);
    x = v;
    #1;
    for (int k = 0; k < int'(NHALF); k++) begin
      longint exp_v = longint'(v) * coef[k];
      checks++;
      if (longint'(p[k]) != exp_v) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH x=%0d h%0d: got %0d expected %0d", v, k, p[k], exp_v);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(NHALF); k++) coef[k] = csd_value(k);
    // coefficient values as printed in decimal for reference
    $display("h0=%0d h1=%0d h2=%0d (x 2^-16)", coef[0], coef[1], coef[2]);
    check('0);
    check(16'sd1);
    check(-16'sd1);
    check(16'sh7fff);
    check(16'sh8000);
    for (int b = 0; b < int'(W); b++) check(16'(1 << b));
    for (int i = 0; i < 2000; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
