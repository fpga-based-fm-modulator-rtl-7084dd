// tb_rk4_coef: checks the RK4 step coefficients.
//
// Two kinds of check for each t. Bit for bit: a1 and a2 must equal the same sequence of
// correctly rounded binary32 operations (t2 = t*t, t3 = t2*t, t4 = t2*t2,
// a1 = (1 - t2*0.5) + t4*(1/24), a2 = t - t3*(1/6)) computed by the reference package.
// Against the mathematics: a1 and a2 must be within 4e-7 * (1 + t^4) of
// 1 - t^2/2 + t^4/24 and t - t^3/6 evaluated in double precision. Stimuli: the message
// range ends, 0.01 and 0.05 (the standalone settings), values up to 3.5 including both
// zeros of a1, negative values, and 6000 random values. The block is combinational; a
// delay of 1 time unit separates stimulus and sampling.
module tb_rk4_coef;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  fp32_t t, a1, a2;
  int checks = 0, failures = 0;

  rk4_coef dut (.t(t), .a1(a1), .a2(a2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check_t(input real tr);
    logic [31:0] tb_t, t2, t3, t4, e1, e2;
    real tq, m1, m2, tol;
    tb_t = real_to_fp(tr);
    t = tb_t;
    #1;
    t2 = fmul(tb_t, tb_t);
    t3 = fmul(t2, tb_t);
    t4 = fmul(t2, t2);
    e1 = fadd(fsub(32'h3F80_0000, fmul(t2, 32'h3F00_0000)), fmul(t4, 32'h3D2A_AAAB));
    e2 = fsub(tb_t, fmul(t3, 32'h3E2A_AAAB));
    checks += 2;
    if (a1 !== fp32_t'(e1)) begin
      failures++;
      if (failures < 20) $display("a1(t=%f): got %h expected %h", tr, a1, e1);
    end
    if (a2 !== fp32_t'(e2)) begin
      failures++;
      if (failures < 20) $display("a2(t=%f): got %h expected %h", tr, a2, e2);
    end
    tq = fp_to_real(tb_t);
    m1 = 1.0 - tq*tq/2.0 + tq*tq*tq*tq/24.0;
    m2 = tq - tq*tq*tq/6.0;
    tol = 4.0e-7 * (1.0 + tq*tq*tq*tq);
    checks += 2;
    if (absr(fp_to_real(a1) - m1) > tol) begin
      failures++;
      $display("a1(t=%f) = %.9f, formula gives %.9f", tq, fp_to_real(a1), m1);
    end
    if (absr(fp_to_real(a2) - m2) > tol) begin
      failures++;
      $display("a2(t=%f) = %.9f, formula gives %.9f", tq, fp_to_real(a2), m2);
    end
  endtask

  initial begin
    check_t(0.0);
    check_t(0.01);
    check_t(0.02);
    check_t(0.04);
    check_t(0.05);
    check_t(0.06);
    check_t(0.5);
    check_t(1.0);
    check_t(1.5924);   // near the first zero of a1
    check_t(2.45);
    check_t(3.0777);   // near the second zero of a1
    check_t(3.5);
    check_t(-0.05);
    check_t(-2.0);
    for (int i = 0; i < 3000; i++) check_t(3.5 * $itor($urandom_range(0, 1000000)) / 1.0e6);
    for (int i = 0; i < 3000; i++) check_t(0.02 + 0.04 * $itor($urandom_range(0, 1000000)) / 1.0e6);
    // a1 is positive at 1.5 and negative at 2.45, between its two zeros
    t = real_to_fp(1.5); #1;
    checks++; if (a1.sign) begin failures++; $display("a1 not positive at 1.5"); end
    t = real_to_fp(2.45); #1;
    checks++; if (!a1.sign) begin failures++; $display("a1 not negative at 2.45"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
