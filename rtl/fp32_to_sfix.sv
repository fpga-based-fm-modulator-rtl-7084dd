// fp32_to_sfix: converts an IEEE 754 single-precision number to Q16.16 signed fixed point.
//
// The significand (hidden one restored) is shifted so that its weight becomes 2^-16:
// left by e-134 places when the exponent e is at least 134, otherwise right, rounding
// to nearest with ties away from zero. The sign is applied last. Magnitudes of 2^15 and
// more, and infinities, saturate to the most positive or most negative Q16.16 value;
// zeros, subnormals and NaN give 0.
//
// Interface: f in (binary32), q out (Q16.16, 32 bits). No clock.
module fp32_to_sfix
  import fmjerk_pkg::*;
(
  input  fp32_t f,
  output sfix_t q
);

  localparam int BIAS_SHIFT = 127 + 23 - SFIX_F;   // 134: exponent of weight 2^-16

  logic [23:0] mag;
  logic [31:0] magq;
  logic [49:0] wide;
  int          sh;

  always_comb begin
    mag  = {1'b1, f.frac};
    sh   = int'(f.exp) - BIAS_SHIFT;
    magq = '0;
    wide = '0;
    if (sh >= 0) begin
      if (sh <= 7) magq = 32'(mag) << sh;
    end else if (sh >= -25) begin
      wide = {2'b00, mag, 24'b0} + (50'd1 << (23 - sh));   // add one half of the output LSB
      magq = 32'(wide >> (24 - sh));
    end

    if (fp_is_nan(f) || fp_is_zero(f)) begin
      q = '0;
    end else if (fp_is_inf(f) || sh > 7) begin
      q = f.sign ? {1'b1, {(SFIX_W-1){1'b0}}} : {1'b0, {(SFIX_W-1){1'b1}}};
    end else begin
      q = f.sign ? -sfix_t'(magq) : sfix_t'(magq);
    end
  end

endmodule
