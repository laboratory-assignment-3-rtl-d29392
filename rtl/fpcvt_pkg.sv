// fpcvt_pkg: widths and the byte layout shared by the linear-to-floating-point
// compressor.
//
// The compressor turns a 12-bit two's-complement sample into an 8-bit byte
// made of a sign bit S (bit 7), a 3-bit exponent E (bits 6:4) and a 4-bit
// significand F (bits 3:0). The byte stands for the value (1 - 2S) * F * 2^E.
// The widths and the bit layout are the ones of the reference format; the
// packed struct is this design's way of carrying them.
package fpcvt_pkg;

  localparam int unsigned LIN_W = 12;         // linear sample, sign bit included
  localparam int unsigned MAG_W = LIN_W - 1;  // magnitude after sign removal
  localparam int unsigned EXP_W = 3;          // exponent field
  localparam int unsigned SIG_W = 4;          // significand field

  // Largest exponent the field holds (7).
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  typedef logic [LIN_W-1:0] lin_t;
  typedef logic [MAG_W-1:0] mag_t;
  typedef logic [EXP_W-1:0] exp_t;
  typedef logic [SIG_W-1:0] sig_t;

  // One compressed byte: S in bit 7, E in bits 6:4, F in bits 3:0.
  typedef struct packed {
    logic s;
    exp_t e;
    sig_t f;
  } fp_byte_t;

endpackage
