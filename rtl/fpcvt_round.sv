// fpcvt_round: rounding stage of the compressor.
//
// The fifth bit is added to the 4-bit significand (round half up). When the
// sum no longer fits in four bits (1111 + 1 = 10000) the significand is
// shifted right one place, giving 1000, and the exponent is incremented to
// compensate. These are the "Add 1" and "Shift 0 or 1" units of the reference
// block diagram; the significand adder's carry drives both the shifter and
// the exponent incrementer.
//
// When the exponent is already 7 the increment has no room. With
// SATURATE = 0 (the default, and the reference method's "ignore the problem")
// the 3-bit exponent simply wraps to 0. With SATURATE = 1 the result is
// clamped to the largest magnitude, exponent 111 and significand 1111; the
// sign is left to the caller.
//
// Interface: exp_in, sig_in, fifth in; exp_out, sig_out out.
// Timing: purely combinational, no clock.
module fpcvt_round
  import fpcvt_pkg::*;
#(
  parameter bit SATURATE = 1'b0
) (
  input  exp_t exp_in,
  input  sig_t sig_in,
  input  logic fifth,
  output exp_t exp_out,
  output sig_t sig_out
);

  logic [SIG_W:0] sum;      // significand + fifth bit, one bit wider
  exp_t           exp_inc;  // exponent + 1, wraps from 7 to 0
  logic           carry;    // significand overflow
  logic           exp_ovf;  // exponent overflow

  always_comb begin
    sum     = {1'b0, sig_in} + (SIG_W + 1)'(fifth);
    carry   = sum[SIG_W];
    exp_inc = exp_in + exp_t'(1);
    exp_ovf = carry && (exp_in == EXP_MAX);

    // Shift 0 or 1 place, and add the carry to the exponent.
    sig_out = carry ? sum[SIG_W:1] : sum[SIG_W-1:0];
    exp_out = carry ? exp_inc : exp_in;

    if (SATURATE && exp_ovf) begin
      sig_out = '1;
      exp_out = EXP_MAX;
    end
  end

endmodule
