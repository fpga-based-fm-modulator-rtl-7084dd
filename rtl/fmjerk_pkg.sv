// fmjerk_pkg: number formats and constants shared by the jerk-oscillator FM modulator.
//
// The solver computes in IEEE 754 single precision (binary32): a sign bit, an 8-bit
// biased exponent and a 23-bit fraction, the layout written float(8 downto -23) in
// VHDL-2008. Samples leave the design as signed fixed point with 16 integer and 16
// fractional bits, sfixed(15 downto -16), i.e. Q16.16 in 32 bits.
//
// The floating-point operators of this design support normal numbers, signed zeros,
// infinities and NaN, with round-to-nearest-even. Subnormal inputs are read as zero and
// results below the smallest normal number are flushed to zero (a simplification of
// this design; the solver's values never come near 2^-126).
package fmjerk_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  // Q16.16 fixed-point sample.
  localparam int SFIX_W = 32;
  localparam int SFIX_F = 16;
  typedef logic signed [SFIX_W-1:0] sfix_t;

  localparam logic [7:0] FP_EXP_MAX = 8'hFF;
  localparam fp32_t FP_ZERO   = 32'h0000_0000;
  localparam fp32_t FP_ONE    = 32'h3F80_0000;   // 1.0
  localparam fp32_t FP_HALF   = 32'h3F00_0000;   // 0.5
  localparam fp32_t FP_INV6   = 32'h3E2A_AAAB;   // 1/6, rounded to nearest
  localparam fp32_t FP_INV24  = 32'h3D2A_AAAB;   // 1/24, rounded to nearest
  localparam fp32_t FP_QNAN   = 32'h7FC0_0000;   // canonical quiet NaN
  localparam fp32_t FP_TENTH  = 32'h3DCC_CCCD;   // 0.1, rounded to nearest

  // Message range 0.02 .. 0.06 in Q16.16 (1310.72 and 3932.16, rounded to nearest).
  localparam sfix_t MSG_MIN_Q16 = sfix_t'(1311);
  localparam sfix_t MSG_MAX_Q16 = sfix_t'(3932);

  function automatic logic fp_is_nan(input fp32_t a);
    return a.exp == FP_EXP_MAX && a.frac != '0;
  endfunction

  function automatic logic fp_is_inf(input fp32_t a);
    return a.exp == FP_EXP_MAX && a.frac == '0;
  endfunction

  // Zero or subnormal: read as zero.
  function automatic logic fp_is_zero(input fp32_t a);
    return a.exp == '0;
  endfunction

endpackage
