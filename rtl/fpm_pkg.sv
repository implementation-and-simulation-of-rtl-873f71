// fpm_pkg: constants and types shared by the floating-point multiplier.
//
// The number format follows IEEE 754 single precision: one sign bit, an
// 8-bit exponent biased by 127 and a 23-bit fraction with a hidden leading
// one. The fraction width is a parameter of the datapath modules (default
// 23); the exponent field stays 8 bits wide with bias 127 in every
// configuration, as in the reduced-mantissa worked example of the design.
// The exponent datapath works in 10-bit two's complement, wide enough for
// the intermediate exponent range -125 .. 381 plus the normalisation
// increment.
package fpm_pkg;

  localparam int unsigned EXP_W  = 8;    // exponent field width
  localparam int unsigned FRAC_W = 23;   // default fraction field width
  localparam int unsigned BIAS   = 127;  // exponent bias
  localparam int unsigned EI_W   = 10;   // internal signed exponent width

  localparam logic [EXP_W-1:0] EXP_MAX = '1;  // 255: Inf / NaN

  // -BIAS in EI_W-bit two's complement, added to subtract the bias
  localparam logic [EI_W-1:0] NEG_BIAS = EI_W'(-int'(BIAS));

  // Outcome of one multiplication, as decided by the exception unit.
  typedef enum logic [2:0] {
    RES_NORMAL    = 3'd0,  // normalised result within exponent range 1..254
    RES_ZERO      = 3'd1,  // an operand was exactly zero
    RES_INF       = 3'd2,  // an operand was infinite (and the other nonzero)
    RES_INVALID   = 3'd3,  // NaN operand, or zero times infinity
    RES_OVERFLOW  = 3'd4,  // exponent above 254: result is +-Inf
    RES_UNDERFLOW = 3'd5,  // exponent below 1 or denormal operand: +-0
    RES_DENORM_IN = 3'd6   // denormal operand flushed to zero (underflow)
  } res_kind_e;

endpackage
