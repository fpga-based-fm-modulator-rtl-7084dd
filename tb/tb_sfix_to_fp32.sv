// tb_sfix_to_fp32: checks Q16.16 to binary32 conversion.
//
// The expected result is the input divided by 2^16 in double precision (exact for any
// 32-bit integer) and rounded once to binary32 by the reference package. Stimuli: the
// message ends 1311 and 3932, zero, +-1 LSB, the extreme values, values needing
// rounding (more than 24 significant bits, including ties) and 30000 random words.
module tb_sfix_to_fp32;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  sfix_t q;
  fp32_t f;
  int checks = 0, failures = 0;

  sfix_to_fp32 dut (.q(q), .f(f));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x);
    logic [31:0] exp_v;
    int xi;
    xi = int'(x);
    q = x;
    #1;
    exp_v = real_to_fp($itor(xi) / 65536.0);
    if (x == 0) exp_v = 32'h0;
    checks++;
    if (f !== fp32_t'(exp_v)) begin
      failures++;
      if (failures < 20) $display("%h: got %h expected %h", x, f, exp_v);
    end
  endtask

  initial begin
    check(32'd1311);
    check(32'd3932);
    check(32'd0);
    check(32'd1);
    check(32'hFFFF_FFFF);
    check(32'h7FFF_FFFF);
    check(32'h8000_0000);
    check(32'h0100_0001);   // 25 significant bits, tie: stays even
    check(32'h0100_0003);   // tie: rounds up to even
    check(32'h01FF_FFFF);   // rounds up into the next power of two
    check(32'h0000_6666);
    for (int i = 0; i < 15000; i++) check($urandom);
    for (int i = 0; i < 15000; i++) check(32'($urandom) >>> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
