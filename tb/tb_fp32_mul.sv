// tb_fp32_mul: checks the single-precision multiplier bit for bit.
//
// Every result is compared with the product formed in double precision (exact for two
// binary32 operands) and rounded once to binary32 by the reference package. Stimuli:
// directed values (ones, halves, the solver constants, exact and inexact products, a
// product whose rounding carries into the exponent, exact ties), specials (zeros, infinity, NaN,
// inf*0, overflow, underflow to zero), 40000 random operands over a wide and a narrow
// exponent range, and 10000 operands with 14-bit significands, whose products often fall
// exactly halfway between two binary32 numbers.
module tb_fp32_mul;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, p;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_v;
    a = x; b = y;
    #1;
    if (is_nan(x) || is_nan(y) ||
        ((x[30:23] == 8'hFF) && (y[30:23] == 0)) || ((y[30:23] == 8'hFF) && (x[30:23] == 0)))
      exp_v = 32'h7FC0_0000;
    else if (x[30:23] == 8'hFF || y[30:23] == 8'hFF)
      exp_v = {x[31] ^ y[31], 8'hFF, 23'd0};
    else if (x[30:23] == 0 || y[30:23] == 0)
      exp_v = {x[31] ^ y[31], 31'd0};
    else
      exp_v = real_to_fp(fp_to_real(x) * fp_to_real(y));
    checks++;
    if (p !== fp32_t'(exp_v)) begin
      failures++;
      if (failures < 20) $display("%h * %h: got %h expected %h", x, y, p, exp_v);
    end
  endtask

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000);   // 1 * 1
    check(32'h3F00_0000, 32'h3DCC_CCCD);   // 0.5 * 0.1
    check(32'h3D4C_CCCD, 32'h3D4C_CCCD);   // 0.05^2
    check(32'h3E2A_AAAB, 32'h4040_0000);   // 1/6 * 3
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // rounding carries into the exponent
    check(32'h3F80_0001, 32'h3F80_0001);
    check(32'hBF80_0000, 32'h4000_0000);   // -1 * 2
    check(32'h0000_0000, 32'h4000_0000);   // 0 * 2
    check(32'h8000_0000, 32'h4000_0000);   // -0 * 2
    check(32'h7F80_0000, 32'h4000_0000);   // inf * 2
    check(32'h7F80_0000, 32'h0000_0000);   // inf * 0
    check(32'h7FC0_0000, 32'h3F80_0000);   // NaN * 1
    check(32'h7F00_0000, 32'h7F00_0000);   // overflow
    check(32'h0080_0000, 32'h0080_0000);   // underflow to zero
    check(32'h1F80_0000, 32'h2000_0000);   // 2^-64 * 2^-63 = 2^-127: flushed
    check(32'h3F80_0800, 32'h3F80_0800);   // exact tie, rounds down to even
    check(32'h3F80_0800, 32'h3F80_1800);   // exact tie, rounds up to even
    for (int i = 0; i < 20000; i++) check(rand_fp(1, 254), rand_fp(1, 254));
    // short significands: products of at most 28 bits, many exact ties
    for (int i = 0; i < 10000; i++)
      check({1'($urandom), 8'($urandom_range(110, 135)), 13'($urandom), 10'd0},
            {1'($urandom), 8'($urandom_range(110, 135)), 13'($urandom), 10'd0});
    for (int i = 0; i < 20000; i++) check(rand_fp(110, 135), rand_fp(110, 135));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
