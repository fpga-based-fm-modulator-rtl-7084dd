// fp_ref_pkg: reference arithmetic for the testbenches, built on double precision.
//
// real_to_fp rounds a double to IEEE 754 single precision (nearest even), flushing
// results below the normal range to a signed zero as the design does. fp_to_real widens
// a binary32 word to double, reading subnormals as zero. Because a double holds the
// exact product of two binary32 significands, and rounding a binary32 sum or product
// first to double and then to binary32 gives the same result as rounding it once
// (53 >= 2*24 + 2), real_to_fp(fp_to_real(a) OP fp_to_real(b)) is the correctly rounded
// binary32 result of OP, independent of the design's own operators. fmul, fadd, fsub
// and to_q16 package these for the models of the larger blocks.
package fp_ref_pkg;

  function automatic real fp_to_real(input logic [31:0] f);
    real m;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return f[31] ? -0.0 : 0.0;
    m = 1.0 + $itor(f[22:0]) / 8388608.0;
    m = m * (2.0 ** (e - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real_to_fp(input real v);
    logic [63:0] b;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] keep;
    logic        guard, sticky;
    b = $realtobits(v);
    s = b[63];
    if (b[62:52] == 11'h7FF) return b[51:0] != 0 ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (b[62:52] == 11'd0) return {s, 31'd0};
    e = int'(b[62:52]) - 1023 + 127;
    m = {1'b1, b[51:0]};
    keep   = {1'b0, m[52:29]};
    guard  = m[28];
    sticky = |m[27:0];
    if (guard && (sticky || keep[0])) keep = keep + 25'd1;
    if (keep[24]) begin
      keep = keep >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), keep[22:0]};
  endfunction

  function automatic logic is_nan(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != 0;
  endfunction

  // Random normal binary32 with exponent field in [elo, ehi] and random sign.
  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    return {1'($urandom), 8'($urandom_range(elo, ehi)), 23'($urandom)};
  endfunction

  // Correctly rounded binary32 operations (operands read with subnormals as zero).
  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) * fp_to_real(b));
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) + fp_to_real(b));
  endfunction

  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) - fp_to_real(b));
  endfunction

  // binary32 to Q16.16: nearest, ties away from zero, saturating.
  function automatic longint to_q16(input logic [31:0] f);
    real v, w;
    v = fp_to_real(f) * 65536.0;
    w = v < 0.0 ? -v : v;
    w = $floor(w + 0.5);
    if (v < 0.0) w = -w;
    if (w > 2147483647.0) return 64'sd2147483647;
    if (w < -2147483648.0) return -64'sd2147483648;
    return longint'(w);
  endfunction

endpackage
