// fp32_mul: IEEE 754 single-precision multiplier, combinational.
//
// The 24-bit significands (hidden one restored) are multiplied into a 48-bit product,
// which is normalised by at most one place; the exponents are added and the bias taken
// off. The product is rounded to 24 bits, nearest even, using the guard bit and the OR
// of all lower bits; a carry out of rounding bumps the exponent. Exponents above 254
// give infinity, below 1 give a signed zero (flush to zero). Zero or subnormal inputs
// give a signed zero, infinity times zero gives NaN, NaN propagates as the canonical
// quiet NaN.
//
// Interface: a, b in, p = a*b out, all binary32. No clock; one multiply per cycle of the
// enclosing logic.
module fp32_mul
  import fmjerk_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sign;
  logic [47:0] prod;
  logic [22:0] mant;
  logic        guard, sticky, round_up;
  logic [23:0] mant_r;
  logic signed [10:0] e;

  always_comb begin
    sign = a.sign ^ b.sign;
    prod = {1'b1, a.frac} * {1'b1, b.frac};
    e = 11'(signed'({3'b000, a.exp})) + 11'(signed'({3'b000, b.exp})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e      = e + 11'sd1;
    end else begin
      mant   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {23'b0, round_up};
    if (mant_r[23]) e = e + 11'sd1;   // mantissa rounded to 2.0: fraction is all zero

    if (fp_is_nan(a) || fp_is_nan(b)) begin
      p = FP_QNAN;
    end else if (fp_is_inf(a) || fp_is_inf(b)) begin
      if (fp_is_zero(a) || fp_is_zero(b)) p = FP_QNAN;
      else p = '{sign: sign, exp: FP_EXP_MAX, frac: '0};
    end else if (fp_is_zero(a) || fp_is_zero(b)) begin
      p = '{sign: sign, exp: '0, frac: '0};
    end else if (e >= 11'sd255) begin
      p = '{sign: sign, exp: FP_EXP_MAX, frac: '0};
    end else if (e <= 11'sd0) begin
      p = '{sign: sign, exp: '0, frac: '0};
    end else begin
      p = '{sign: sign, exp: e[7:0], frac: mant_r[22:0]};
    end
  end

endmodule
