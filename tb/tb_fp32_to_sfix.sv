// tb_fp32_to_sfix: checks binary32 to Q16.16 conversion.
//
// The expected value is worked out in double precision: v * 2^16 rounded to the
// nearest integer with ties away from zero, saturated to the 32-bit range; zeros,
// subnormals and NaN give 0, infinities saturate. Stimuli: directed values (0.1, ties at
// half an LSB, the largest in-range magnitudes, the first out-of-range ones, values below
// half an LSB) and 30000 random numbers with exponents around the Q16.16 range.
module tb_fp32_to_sfix;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  fp32_t f;
  sfix_t q;
  int checks = 0, failures = 0;

  fp32_to_sfix dut (.f(f), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x);
    real v, w;
    longint exp_v;
    f = x;
    #1;
    if (is_nan(x)) exp_v = 0;
    else if (x[30:23] == 8'hFF) exp_v = x[31] ? -64'sd2147483648 : 64'sd2147483647;
    else begin
      v = fp_to_real(x) * 65536.0;
      w = v < 0.0 ? -v : v;
      w = $floor(w + 0.5);
      if (v < 0.0) w = -w;
      if (w > 2147483647.0) exp_v = 64'sd2147483647;
      else if (w < -2147483648.0) exp_v = -64'sd2147483648;
      else exp_v = longint'(w);
    end
    checks++;
    if (longint'(q) != exp_v) begin
      failures++;
      if (failures < 20) $display("%h: got %0d expected %0d", x, q, exp_v);
    end
  endtask

  initial begin
    check(32'h3DCC_CCCD);   // 0.1
    check(32'hBDCC_CCCD);   // -0.1
    check(32'h3780_0000);   // 2^-16: one LSB
    check(32'h3700_0000);   // 2^-17: half an LSB, rounds away from zero
    check(32'hB700_0000);
    check(32'h3680_0000);   // 2^-18: rounds to 0
    check(32'h46FF_FFFF);   // largest below 2^15
    check(32'hC700_0000);   // -2^15: saturates to the most negative
    check(32'h4700_0000);   // 2^15: saturates
    check(32'h7F80_0000);   // inf
    check(32'hFF80_0000);   // -inf
    check(32'h7FC0_0000);   // NaN
    check(32'h0000_0000);
    check(32'h8000_0000);
    check(32'h0000_1234);   // subnormal
    for (int i = 0; i < 30000; i++) check(rand_fp(100, 145));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
