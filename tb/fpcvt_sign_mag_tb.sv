// fpcvt_sign_mag_tb: exhaustive check of the two's-complement to
// sign-magnitude stage.
//
// Every 12-bit input is applied. The expected sign and magnitude are worked
// out with signed integer arithmetic (the absolute value of the sample), not
// with the bit inversion the block uses. For -2048, which has no 11-bit
// magnitude, the expected output is sign 1 and magnitude 0. The stage is
// combinational, so outputs are sampled one time unit after each input.
module fpcvt_sign_mag_tb;
  import fpcvt_pkg::*;

  lin_t d;
  logic s;
  mag_t mag;

  int checks = 0;
  int failures = 0;

  fpcvt_sign_mag dut (.d(d), .s(s), .mag(mag));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int value;
    int expected_mag;
    logic expected_s;
    for (int i = 0; i < (1 << LIN_W); i++) begin
      d = lin_t'(i);
      #1;
      value        = (i >= 2048) ? i - 4096 : i;
      expected_s   = (value < 0);
      expected_mag = (value < 0) ? -value : value;
      if (expected_mag == 2048) expected_mag = 0;
      checks++;
      if (s !== expected_s || int'(mag) != expected_mag) begin
        failures++;
        if (failures < 10)
          $display("FAIL d=%0d: got s=%0b mag=%0d, expected s=%0b mag=%0d",
                   value, s, mag, expected_s, expected_mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
