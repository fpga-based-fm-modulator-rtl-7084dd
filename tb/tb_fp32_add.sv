// tb_fp32_add: checks the single-precision adder bit for bit.
//
// Every result is compared with the sum formed in double precision and rounded once to
// binary32 by the reference package (a correct rounding, see fp_ref_pkg). Stimuli:
// directed values (the solver's 1 - t^2/2 form, exact cancellation, cancellation of many
// leading bits, a sum that rounds up into the next binade, far-apart exponents, ties),
// specials (zeros of both signs, infinities, inf - inf, NaN, overflow) and 60000 random
// pairs: any exponents, exponents at most 3 apart (deep cancellation), and values of
// similar size with opposite signs.
module tb_fp32_add;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, s;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_v;
    real rx, ry;
    a = x; b = y;
    #1;
    if (is_nan(x) || is_nan(y) ||
        (x[30:23] == 8'hFF && y[30:23] == 8'hFF && x[31] != y[31] && x[22:0] == 0 && y[22:0] == 0))
      exp_v = 32'h7FC0_0000;
    else if (x[30:23] == 8'hFF) exp_v = x;
    else if (y[30:23] == 8'hFF) exp_v = y;
    else if (x[30:23] == 0 && y[30:23] == 0) exp_v = {x[31] & y[31], 31'd0};
    else begin
      rx = fp_to_real(x);
      ry = fp_to_real(y);
      exp_v = real_to_fp(rx + ry);
    end
    checks++;
    if (s !== fp32_t'(exp_v)) begin
      failures++;
      if (failures < 20) $display("%h + %h: got %h expected %h", x, y, s, exp_v);
    end
  endtask

  initial begin
    logic [31:0] r;
    check(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1
    check(32'h3F80_0000, 32'hBA83_126F);   // 1 - 0.001
    check(32'h3DCC_CCCD, 32'hBDCC_CCCD);   // x - x = +0
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0 = -0
    check(32'h0000_0000, 32'h8000_0000);   // +0 + -0 = +0
    check(32'h0000_0000, 32'h3DCC_CCCD);   // 0 + x
    check(32'h3F80_0001, 32'hBF80_0000);   // cancellation down to one ulp
    check(32'h3FFF_FFFF, 32'h3400_0000);   // rounds up into the next binade
    check(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1: tie, stays even
    check(32'h4B80_0001, 32'h3F80_0000);   // tie rounding up to even
    check(32'h3F80_0000, 32'h2F80_0000);   // exponents 32 apart
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    check(32'h7F80_0000, 32'hFF80_0000);   // inf - inf
    check(32'h7F80_0000, 32'h3F80_0000);   // inf + 1
    check(32'h7FC0_0000, 32'h3F80_0000);   // NaN
    check(32'h0100_0000, 32'h8080_0000);   // 2^-125 - 2^-126 = 2^-126
    check(32'h0100_0000, 32'h80FF_FFFF);   // result below 2^-126: flushed
    for (int i = 0; i < 20000; i++) check(rand_fp(1, 254), rand_fp(1, 254));
    for (int i = 0; i < 20000; i++) begin
      r = rand_fp(100, 150);
      check(r, rand_fp(int'(r[30:23]) - 3, int'(r[30:23]) + 3));
    end
    for (int i = 0; i < 20000; i++) begin
      r = rand_fp(100, 150);
      check(r, {~r[31], r[30:23], 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
