// fpcvt: combinational compressor from a 12-bit two's-complement linear sample
// to an 8-bit floating-point byte (1 sign, 3 exponent, 4 significand bits).
//
// Three stages in a row, as in the reference block diagram:
//   1. fpcvt_sign_mag splits D into the sign S and an 11-bit magnitude.
//   2. fpcvt_lzc counts the magnitude's leading zeroes into the exponent,
//      and fpcvt_extract uses that exponent to select the four significand
//      bits and the fifth (rounding) bit below them.
//   3. fpcvt_round adds the fifth bit, and on significand overflow shifts the
//      significand right and increments the exponent.
// The result represents (1 - 2S) * F * 2^E and is the nearest such value to D
// (ties round away from zero).
//
// Two inputs have no exact answer in three exponent bits. For D = -2048 the
// magnitude 2048 does not fit in 11 bits and the output is 1|000|0000; for
// magnitudes 1984..2047 rounding needs exponent 8, and the output depends on
// SATURATE: 0 (default, the reference method) lets the exponent wrap to 0,
// giving F = 1000 and E = 000; 1 clamps to E = 111, F = 1111 with the input's
// sign. The SATURATE option and the -2048 result are this design's choices.
//
// Interface: D[11:0] in; S, E[2:0], F[3:0] out, named as on the reference
// logic symbol. S is D[11] itself: the sign needs no logic.
// Timing: purely combinational, no clock and no latency in cycles.
module fpcvt
  import fpcvt_pkg::*;
#(
  parameter bit SATURATE = 1'b0
) (
  input  lin_t D,
  output logic S,
  output exp_t E,
  output sig_t F
);

  mag_t mag;
  exp_t exp_raw;
  sig_t sig_raw;
  logic fifth;

  fpcvt_sign_mag u_sign_mag (
    .d   (D),
    .s   (S),
    .mag (mag)
  );

  fpcvt_lzc u_lzc (
    .mag (mag),
    .exp (exp_raw)
  );

  fpcvt_extract u_extract (
    .mag   (mag),
    .exp   (exp_raw),
    .sig   (sig_raw),
    .fifth (fifth)
  );

  fpcvt_round #(
    .SATURATE (SATURATE)
  ) u_round (
    .exp_in  (exp_raw),
    .sig_in  (sig_raw),
    .fifth   (fifth),
    .exp_out (E),
    .sig_out (F)
  );

endmodule
