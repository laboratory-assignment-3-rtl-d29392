// fpcvt_lzc_tb: exhaustive check of the leading-zero counter.
//
// Every 11-bit magnitude is applied. The test counts leading zeroes of the
// 12-bit word {0, magnitude} bit by bit (the sign bit included) and maps the
// count to the exponent with the table of the format: 1 -> 7, 2 -> 6, ...,
// 7 -> 1, 8 or more -> 0. Combinational: outputs are sampled one time unit
// after each input.
module fpcvt_lzc_tb;
  import fpcvt_pkg::*;

  mag_t mag;
  exp_t exp;

  int checks = 0;
  int failures = 0;

  fpcvt_lzc dut (.mag(mag), .exp(exp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zeros;
    int expected;
    logic [LIN_W-1:0] word;
    for (int i = 0; i < (1 << MAG_W); i++) begin
      mag = mag_t'(i);
      #1;
      word  = {1'b0, mag_t'(i)};
      zeros = 0;
      while (zeros < LIN_W && word[LIN_W-1-zeros] == 1'b0) zeros++;
      expected = (zeros >= 8) ? 0 : 8 - zeros;
      checks++;
      if (int'(exp) != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL mag=%0d: got exp=%0d, expected %0d", i, exp, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
