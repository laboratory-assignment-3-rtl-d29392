// fpcvt_extract_tb: exhaustive check of the significand/fifth-bit selector.
//
// Every pair of 11-bit magnitude and 3-bit exponent is applied. The expected
// significand is (magnitude / 2^exp) mod 16 and the expected fifth bit is
// (magnitude / 2^(exp-1)) mod 2, or 0 for exponent 0, computed with integer
// division. Combinational: outputs are sampled one time unit after each input.
module fpcvt_extract_tb;
  import fpcvt_pkg::*;

  mag_t mag;
  exp_t exp;
  sig_t sig;
  logic fifth;

  int checks = 0;
  int failures = 0;

  fpcvt_extract dut (.mag(mag), .exp(exp), .sig(sig), .fifth(fifth));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected_sig;
    int expected_fifth;
    for (int e = 0; e < 8; e++) begin
      for (int i = 0; i < (1 << MAG_W); i++) begin
        mag = mag_t'(i);
        exp = exp_t'(e);
        #1;
        expected_sig   = (i / (2 ** e)) % 16;
        expected_fifth = (e == 0) ? 0 : (i / (2 ** (e - 1))) % 2;
        checks++;
        if (int'(sig) != expected_sig || int'(fifth) != expected_fifth) begin
          failures++;
          if (failures < 10)
            $display("FAIL mag=%0d exp=%0d: got sig=%0d fifth=%0d, expected %0d %0d",
                     i, e, sig, fifth, expected_sig, expected_fifth);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
