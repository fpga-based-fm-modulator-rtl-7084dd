// rk4_coef: step-matrix coefficients of the fourth-order Runge-Kutta solver.
//
// One classical RK4 step of size h applied to the harmonic pair x2' = g*x3,
// x3' = -g*x2 is the linear map x2 <- a1*x2 + a2*x3, x3 <- -a2*x2 + a1*x3 with, for
// t = g*h,
//     a1 = 1 - t^2/2 + t^4/24          a2 = t - t^3/6,
// the truncated Taylor series of cos t and sin t. This block evaluates both in IEEE 754
// single precision with six multipliers and three adders, in this order:
//     t2 = t*t   t3 = t2*t   t4 = t2*t2
//     a1 = (1 - t2*0.5) + t4*(1/24)      a2 = t - t3*(1/6)
// The divisions are multiplications by the binary32 constants 1/6 and 1/24; each
// operation rounds to nearest even.
//
// Interface: t in, a1 and a2 out, all binary32. Purely combinational, so the
// coefficients follow t within the same clock cycle, as the modulator needs when its
// control word changes every step.
//
// The formulas are the source's RK4 expansion. The operation order and the use of
// constant reciprocals are this design's choice.
module rk4_coef
  import fmjerk_pkg::*;
(
  input  fp32_t t,
  output fp32_t a1,
  output fp32_t a2
);

  fp32_t t2, t3, t4, h2, q3, q4, d1;

  fp32_mul u_t2 (.a(t),  .b(t),  .p(t2));
  fp32_mul u_t3 (.a(t2), .b(t),  .p(t3));
  fp32_mul u_t4 (.a(t2), .b(t2), .p(t4));
  fp32_mul u_h2 (.a(t2), .b(FP_HALF),  .p(h2));
  fp32_mul u_q4 (.a(t4), .b(FP_INV24), .p(q4));
  fp32_mul u_q3 (.a(t3), .b(FP_INV6),  .p(q3));

  fp32_add u_d1 (.a(FP_ONE), .b('{sign: ~h2.sign, exp: h2.exp, frac: h2.frac}), .s(d1));
  fp32_add u_a1 (.a(d1), .b(q4), .s(a1));
  fp32_add u_a2 (.a(t),  .b('{sign: ~q3.sign, exp: q3.exp, frac: q3.frac}), .s(a2));

endmodule
