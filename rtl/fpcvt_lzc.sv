// fpcvt_lzc: leading-zero counter that yields the floating-point exponent.
//
// The exponent encodes how many leading zeroes the 12-bit sign-magnitude word
// has, the (always zero) sign bit counted: one leading zero gives exponent 7,
// two give 6, and so on down to seven leading zeroes, exponent 1; eight or more
// give exponent 0. Counted on the 11-bit magnitude this means: the exponent is
// the position of the highest 1 minus 3 when that 1 is at bit 4 or above, and
// 0 otherwise. The block is a priority encoder over magnitude bits 10 down
// to 4; bits 3 to 0 never change the exponent.
//
// Interface: mag (11 bits) in; exp (3 bits) out.
// Timing: purely combinational, no clock.
module fpcvt_lzc
  import fpcvt_pkg::*;
(
  input  mag_t mag,
  output exp_t exp
);

  // Scan from the least to the most significant candidate bit so that the
  // highest 1 found wins.
  always_comb begin
    exp = '0;
    for (int unsigned pos = SIG_W; pos < MAG_W; pos++) begin
      if (mag[pos]) exp = exp_t'(pos - (SIG_W - 1));
    end
  end

endmodule
