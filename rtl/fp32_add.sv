// fp32_add: IEEE 754 single-precision adder, combinational.
//
// The operand of larger magnitude is taken as the base; the other's significand is
// shifted right by the exponent difference into a 27-bit field (24 bits plus guard,
// round and sticky, the sticky bit collecting everything shifted out). The two are added
// or, for opposite signs, subtracted. A carry renormalises one place right; a
// cancellation is renormalised left by the leading-zero count. The result is rounded to
// nearest even. An exact zero difference gives +0 (-0 only for -0 + -0). Exponent
// overflow gives infinity, results below the normal range are flushed to zero, subnormal
// inputs are read as zero, inf - inf gives NaN and NaN propagates as the canonical quiet
// NaN. A subtraction is done by flipping the sign of b outside this block.
//
// Interface: a, b in, s = a + b out, all binary32. No clock.
module fp32_add
  import fmjerk_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  fp32_t hi_op, lo_op;
  logic [7:0]  d;
  logic [26:0] mb, ms, shifted;
  logic        sticky;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        found;
  logic signed [9:0] e;
  logic        round_up;
  logic [24:0] mant_r;
  logic        bz, sz;

  always_comb begin
    // order by magnitude (exponent, then fraction)
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      hi_op = a; lo_op = b;
    end else begin
      hi_op = b; lo_op = a;
    end
    bz = fp_is_zero(hi_op);
    sz = fp_is_zero(lo_op);
    d  = hi_op.exp - lo_op.exp;
    mb = {1'b1, hi_op.frac, 3'b000};
    ms = sz ? 27'd0 : {1'b1, lo_op.frac, 3'b000};
    if (d >= 8'd27) begin
      shifted = 27'd0;
      sticky  = |ms;
    end else begin
      shifted = ms >> d;
      sticky  = |(ms & ((27'd1 << d) - 27'd1));
    end
    shifted[0] = shifted[0] | sticky;

    e = 10'(signed'({2'b00, hi_op.exp}));
    if (hi_op.sign == lo_op.sign) sum = {1'b0, mb} + {1'b0, shifted};
    else                        sum = {1'b0, mb} - {1'b0, shifted};

    // normalise
    lz = '0;
    found = 1'b0;
    norm = '0;
    if (sum[27]) begin
      norm = sum[27:1];
      norm[0] = sum[1] | sum[0];
      e = e + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz = 5'(26 - i);
        end
      end
      norm = sum[26:0] << lz;
      e = e - 10'(signed'({5'b0, lz}));
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[26:3]} + {24'b0, round_up};
    if (mant_r[24]) e = e + 10'sd1;   // rounded up to 2.0: fraction is all zero

    if (fp_is_nan(a) || fp_is_nan(b)) begin
      s = FP_QNAN;
    end else if (fp_is_inf(a) && fp_is_inf(b) && (a.sign != b.sign)) begin
      s = FP_QNAN;
    end else if (fp_is_inf(hi_op)) begin
      s = hi_op;
    end else if (bz) begin
      // both zero
      s = '{sign: a.sign & b.sign, exp: '0, frac: '0};
    end else if (sum == '0) begin
      s = FP_ZERO;
    end else if (e >= 10'sd255) begin
      s = '{sign: hi_op.sign, exp: FP_EXP_MAX, frac: '0};
    end else if (e <= 10'sd0) begin
      s = '{sign: hi_op.sign, exp: '0, frac: '0};
    end else begin
      s = '{sign: hi_op.sign, exp: e[7:0], frac: mant_r[22:0]};
    end
  end

endmodule
