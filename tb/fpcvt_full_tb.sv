// fpcvt_full_tb: the compressor at its default parameters, all 4096 inputs.
//
// Each 12-bit input is applied to one fpcvt with no parameter overrides, and
// the byte it produces is compared with a value computed independently by
// integer arithmetic: take the absolute value, find the highest set bit to
// get the exponent, divide by 2^exponent, round half up on the remainder, and
// on reaching 16 halve the significand and raise the exponent. In the default
// mode an exponent that would reach 8 wraps to 0. The design is
// combinational: outputs are sampled one time unit after each input change.
module fpcvt_full_tb;
  import fpcvt_pkg::*;

  lin_t d;
  logic s;
  exp_t e;
  sig_t f;

  int checks = 0;
  int failures = 0;

  fpcvt dut (.D(d), .S(s), .E(e), .F(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, k, ex, q, rem, step;
    logic exp_s;
    for (int value = -2048; value < 2048; value++) begin
      d = lin_t'(value);
      #1;
      exp_s = (value < 0);
      m = (value < 0) ? -value : value;
      if (m == 2048) m = 0;
      if (m < 16) begin
        ex = 0;
        q  = m;
      end else begin
        k = 4;
        while ((2 ** (k + 1)) <= m) k++;
        ex   = k - 3;
        step = 2 ** ex;
        q    = m / step;
        rem  = m % step;
        if (2 * rem >= step) q++;
        if (q == 16) begin
          q = 8;
          ex++;
        end
        ex = ex % 8;
      end
      checks++;
      if (s !== exp_s || int'(e) != ex || int'(f) != q) begin
        failures++;
        if (failures < 10)
          $display("FAIL D=%0d: got %0b|%03b|%04b, expected %0b|%0d|%0d",
                   value, s, e, f, exp_s, ex, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
