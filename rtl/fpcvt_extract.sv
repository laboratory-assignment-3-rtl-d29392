// fpcvt_extract: picks the significand and the rounding bit out of the
// magnitude.
//
// The significand is the four bits right after the last leading zero, that is
// magnitude bits [exp+3:exp]; for exponent 0 these are the four low bits (a
// denormalized result). The "fifth bit", the one just below the significand,
// is magnitude bit exp-1 and decides rounding; for exponent 0 there is no such
// bit and it reads as 0. Each of the five outputs is one 8-to-1 multiplexer
// whose select is the exponent, which amounts to a right shift of the
// magnitude by 0 to 7 places.
//
// Interface: mag (11 bits) and exp (3 bits, from fpcvt_lzc) in; sig (4 bits)
// and fifth out.
// Timing: purely combinational, no clock.
module fpcvt_extract
  import fpcvt_pkg::*;
(
  input  mag_t mag,
  input  exp_t exp,
  output sig_t sig,
  output logic fifth
);

  localparam int unsigned NSEL = 1 << EXP_W;  // 8 multiplexer inputs

  // Multiplexer data inputs: sig_in[k][i] is what significand bit i becomes
  // when the exponent is k; fifth_in[k] likewise for the rounding bit.
  sig_t [NSEL-1:0] sig_in;
  logic [NSEL-1:0] fifth_in;

  always_comb begin
    for (int unsigned k = 0; k < NSEL; k++) begin
      for (int unsigned i = 0; i < SIG_W; i++) begin
        sig_in[k][i] = mag[k + i];
      end
      fifth_in[k] = (k == 0) ? 1'b0 : mag[(k == 0) ? 0 : k - 1];
    end
    sig   = sig_in[exp];
    fifth = fifth_in[exp];
  end

endmodule
