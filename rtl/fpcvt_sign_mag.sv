// fpcvt_sign_mag: two's-complement to sign-magnitude conversion, the first
// stage of the compressor.
//
// The sign output is the input's top bit. A non-negative input passes through
// unchanged; a negative one is replaced by its absolute value, found by
// inverting every bit and adding one. Only the low 11 bits take part, since
// every magnitude from 0 to 2047 fits there. The one input without a
// positive counterpart, -2048, is left unhandled as in the reference method;
// with this choice it comes out as sign 1, magnitude 0.
//
// Interface: d (12 bits, two's complement) in; s and mag (11 bits) out.
// Timing: purely combinational, no clock.
module fpcvt_sign_mag
  import fpcvt_pkg::*;
(
  input  lin_t d,
  output logic s,
  output mag_t mag
);

  mag_t inverted;
  mag_t negated;

  always_comb begin
    s        = d[LIN_W-1];
    inverted = ~d[MAG_W-1:0];
    negated  = inverted + mag_t'(1);
    mag      = s ? negated : d[MAG_W-1:0];
  end

endmodule
