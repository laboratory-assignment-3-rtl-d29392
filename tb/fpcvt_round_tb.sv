// fpcvt_round_tb: exhaustive check of the rounding stage in both overflow
// modes.
//
// Two instances are driven with the same inputs: one with the default
// SATURATE = 0 (exponent wraps from 7 to 0) and one with SATURATE = 1
// (clamp to 111/1111). For every exponent, significand and fifth bit the
// expected result is computed as the integer value (sig + fifth) * 2^exp,
// re-encoded: if sig + fifth reaches 16 it is halved and the exponent grows
// by one. The test also counts how often rounding up, significand overflow
// and exponent overflow happened and fails if any never did.
module fpcvt_round_tb;
  import fpcvt_pkg::*;

  exp_t exp_in;
  sig_t sig_in;
  logic fifth;
  exp_t exp_wrap, exp_sat;
  sig_t sig_wrap, sig_sat;

  int checks = 0;
  int failures = 0;
  int n_up = 0, n_sig_ovf = 0, n_exp_ovf = 0;

  fpcvt_round dut_wrap (
    .exp_in(exp_in), .sig_in(sig_in), .fifth(fifth),
    .exp_out(exp_wrap), .sig_out(sig_wrap)
  );

  fpcvt_round #(.SATURATE(1'b1)) dut_sat (
    .exp_in(exp_in), .sig_in(sig_in), .fifth(fifth),
    .exp_out(exp_sat), .sig_out(sig_sat)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string mode, input exp_t got_e, input sig_t got_f,
                       input int exp_e, input int exp_f);
    checks++;
    if (int'(got_e) != exp_e || int'(got_f) != exp_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s e=%0d f=%0d r=%0b: got %0d/%0d, expected %0d/%0d",
                 mode, exp_in, sig_in, fifth, got_e, got_f, exp_e, exp_f);
    end
  endtask

  initial begin
    int total;
    int e_new;
    int f_new;
    for (int e = 0; e < 8; e++) begin
      for (int f = 0; f < 16; f++) begin
        for (int r = 0; r < 2; r++) begin
          exp_in = exp_t'(e);
          sig_in = sig_t'(f);
          fifth  = 1'(r);
          #1;
          total = f + r;
          e_new = e;
          f_new = total;
          if (r == 1) n_up++;
          if (total == 16) begin
            n_sig_ovf++;
            f_new = total / 2;
            e_new = e + 1;
          end
          if (e_new == 8) n_exp_ovf++;
          check("wrap", exp_wrap, sig_wrap, e_new % 8, f_new);
          if (e_new == 8) check("sat", exp_sat, sig_sat, 7, 15);
          else            check("sat", exp_sat, sig_sat, e_new, f_new);
        end
      end
    end
    if (n_up == 0 || n_sig_ovf == 0 || n_exp_ovf == 0) begin
      failures++;
      $display("FAIL a rounding case never occurred");
    end
    $display("round up %0d, significand overflow %0d, exponent overflow %0d",
             n_up, n_sig_ovf, n_exp_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
