// sfix_to_fp32: converts a Q16.16 signed fixed-point number to IEEE 754 single precision.
//
// The magnitude is taken, its leading one located, and the bits below it become the
// fraction; the exponent is the leading-one position minus 16 plus the bias. Magnitudes
// wider than 24 bits are rounded to nearest even. Zero gives +0. Every Q16.16 value is
// in the normal range, so no overflow or underflow can occur.
//
// Interface: q in (Q16.16, 32 bits), f out (binary32). No clock.
module sfix_to_fp32
  import fmjerk_pkg::*;
(
  input  sfix_t q,
  output fp32_t f
);

  logic [32:0] mag;
  logic [4:0]  p;
  logic [31:0] norm;
  logic [24:0] mant_r;
  logic        guard, sticky, round_up;
  logic [7:0]  e;

  always_comb begin
    mag = q[SFIX_W-1] ? -{q[SFIX_W-1], q} : {1'b0, q};
    p = '0;
    for (int i = 0; i < 32; i++) if (mag[i]) p = 5'(i);
    norm     = mag[31:0] << (5'd31 - p);          // leading one at bit 31
    guard    = norm[7];
    sticky   = |norm[6:0];
    round_up = guard & (sticky | norm[8]);
    mant_r   = {1'b0, norm[31:8]} + {24'b0, round_up};
    e        = 8'(p) + 8'd111;                    // p - 16 + 127
    if (mant_r[24]) e = e + 8'd1;

    if (mag == '0) f = FP_ZERO;
    else           f = '{sign: q[SFIX_W-1], exp: e, frac: mant_r[22:0]};
  end

endmodule
