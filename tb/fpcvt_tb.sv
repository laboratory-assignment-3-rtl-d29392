// fpcvt_tb: end-to-end test of the compressor in both exponent-overflow modes.
//
// Two compressors see the same input: one with the default SATURATE = 0 and
// one with SATURATE = 1. All 4096 inputs are applied, and each output byte is
// checked three ways:
//   - against a reference conversion written with integer arithmetic
//     (absolute value, highest set bit, divide, round half up, renormalize);
//   - for the value it stands for: it must be one of the representable values
//     nearest to the input (found by searching all 128 exponent/significand
//     pairs), except where the exponent would need an eighth value and the
//     default mode wraps;
//   - at the worked examples of the format description (422, 125, -40, 56,
//     the 44..47 rounding series, 0 and 2047).
// It counts how often each mechanism occurred (negative input, denormalized
// result, truncation, rounding up, significand overflow, exponent wrap,
// saturation) and fails if any never did. The design is combinational:
// outputs are sampled one time unit after each input change.
module fpcvt_tb;
  import fpcvt_pkg::*;

  lin_t d;
  fp_byte_t out_wrap, out_sat;

  int checks = 0;
  int failures = 0;

  int n_neg = 0, n_denorm = 0, n_down = 0, n_up = 0;
  int n_sig_ovf = 0, n_wrap = 0, n_sat = 0;

  fpcvt dut_wrap (.D(d), .S(out_wrap.s), .E(out_wrap.e), .F(out_wrap.f));

  fpcvt #(.SATURATE(1'b1)) dut_sat (
    .D(d), .S(out_sat.s), .E(out_sat.e), .F(out_sat.f)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Signed value represented by a byte: (1 - 2S) * F * 2^E.
  function automatic int expand(fp_byte_t b);
    int v;
    v = int'(b.f) * (2 ** int'(b.e));
    return b.s ? -v : v;
  endfunction

  // Distance from magnitude m to the nearest representable magnitude.
  function automatic int nearest_dist(int m);
    int best;
    int gap;
    best = 1 << 30;
    for (int e = 0; e < 8; e++)
      for (int f = 0; f < 16; f++) begin
        gap = f * (2 ** e) - m;
        if (gap < 0) gap = -gap;
        if (gap < best) best = gap;
      end
    return best;
  endfunction

  // Reference compression of a signed value; sat selects the overflow mode.
  // Also reports which mechanisms the conversion went through.
  function automatic fp_byte_t reference(int value, bit sat, output bit up,
                                         output bit sig_ovf, output bit exp_ovf);
    fp_byte_t r;
    int m, k, e, step, q, rem;
    r.s = (value < 0);
    m = (value < 0) ? -value : value;
    if (m == 2048) m = 0;  // -2048 has no 11-bit magnitude
    up = 0;
    sig_ovf = 0;
    exp_ovf = 0;
    if (m < 16) begin
      e = 0;
      q = m;
    end else begin
      k = 4;
      while ((2 ** (k + 1)) <= m) k++;
      e = k - 3;
      step = 2 ** e;
      q = m / step;
      rem = m % step;
      if (2 * rem >= step) begin
        up = 1;
        q++;
      end
      if (q == 16) begin
        sig_ovf = 1;
        q = 8;
        e++;
      end
      if (e == 8) begin
        exp_ovf = 1;
        if (sat) begin
          e = 7;
          q = 15;
        end else begin
          e = 0;
        end
      end
    end
    r.e = exp_t'(e);
    r.f = sig_t'(q);
    return r;
  endfunction

  task automatic check_byte(string what, int value, fp_byte_t got, fp_byte_t exp_b);
    checks++;
    if (got !== exp_b) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s D=%0d: got %0b|%03b|%04b, expected %0b|%03b|%04b",
                 what, value, got.s, got.e, got.f, exp_b.s, exp_b.e, exp_b.f);
    end
  endtask

  task automatic apply(int value);
    d = lin_t'(value);
    #1;
  endtask

  // Worked examples: input and expected byte {S,E,F} in each mode.
  task automatic example(int value, logic [7:0] wrap_b, logic [7:0] sat_b);
    apply(value);
    check_byte("example", value, out_wrap, fp_byte_t'(wrap_b));
    check_byte("example sat", value, out_sat, fp_byte_t'(sat_b));
  endtask

  initial begin
    fp_byte_t ref_wrap, ref_sat;
    bit up, sig_ovf, exp_ovf;
    int m, gap;

    example(422,   8'b0_101_1101, 8'b0_101_1101);
    example(44,    8'b0_010_1011, 8'b0_010_1011);
    example(45,    8'b0_010_1011, 8'b0_010_1011);
    example(46,    8'b0_010_1100, 8'b0_010_1100);
    example(47,    8'b0_010_1100, 8'b0_010_1100);
    example(125,   8'b0_100_1000, 8'b0_100_1000);
    example(-40,   8'b1_010_1010, 8'b1_010_1010);
    example(56,    8'b0_010_1110, 8'b0_010_1110);
    example(0,     8'b0_000_0000, 8'b0_000_0000);
    example(2047,  8'b0_000_1000, 8'b0_111_1111);
    example(-2047, 8'b1_000_1000, 8'b1_111_1111);

    for (int value = -2048; value < 2048; value++) begin
      apply(value);
      ref_wrap = reference(value, 1'b0, up, sig_ovf, exp_ovf);
      ref_sat  = reference(value, 1'b1, up, sig_ovf, exp_ovf);
      check_byte("sweep", value, out_wrap, ref_wrap);
      check_byte("sweep sat", value, out_sat, ref_sat);

      // Nearest-value property of the result.
      m = (value < 0) ? -value : value;
      if (m != 2048) begin
        checks++;
        gap = expand(out_sat) - value;
        if (gap < 0) gap = -gap;
        if (gap != nearest_dist(m) || (m != 0 && out_sat.s != (value < 0))) begin
          failures++;
          if (failures < 20)
            $display("FAIL nearest D=%0d: byte stands for %0d", value, expand(out_sat));
        end
        if (!exp_ovf) begin
          checks++;
          if (expand(out_wrap) != expand(out_sat)) begin
            failures++;
            if (failures < 20)
              $display("FAIL modes differ without overflow at D=%0d", value);
          end
        end
      end

      if (value < 0) n_neg++;
      if (m < 16) n_denorm++;
      if (m >= 16 && !up) n_down++;
      if (up) n_up++;
      if (sig_ovf) n_sig_ovf++;
      if (exp_ovf && out_wrap.e == 3'd0) n_wrap++;
      if (exp_ovf && out_sat.e == 3'd7 && out_sat.f == 4'hf) n_sat++;
    end

    $display("negative %0d, denormalized %0d, truncated %0d, rounded up %0d",
             n_neg, n_denorm, n_down, n_up);
    $display("significand overflow %0d, exponent wrap %0d, saturation %0d",
             n_sig_ovf, n_wrap, n_sat);
    if (n_neg == 0 || n_denorm == 0 || n_down == 0 || n_up == 0 ||
        n_sig_ovf == 0 || n_wrap == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
