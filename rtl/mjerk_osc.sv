// mjerk_osc: frequency-controlled sine/cosine oscillator derived from the modified jerk circuit.
//
// The modified single op-amp jerk circuit, with its diode nonlinearity linearised and
// its very small diode constant neglected, reduces to the harmonic pair x2' = g*x3,
// x3' = -g*x2. One fourth-order Runge-Kutta step of size h per clock turns it into
//     x2[n+1] =  a1*x2[n] + a2*x3[n]
//     x3[n+1] = -a2*x2[n] + a1*x3[n]
// with a1, a2 from t = g*h (rk4_coef). The step is a rotation by about t radians, so
// the output frequency is t/(2*pi) times the clock rate and follows the input gam
// directly; the amplitude is set by the initial conditions. The exact per-step gain of
// the RK4 map is sqrt(a1^2 + a2^2) = 1 - t^6/144 + ..., i.e. 1 within 1e-10 for
// t <= 0.06; in practice the binary32 rounding of a1 and a2 dominates and makes the
// amplitude creep slowly, by a few percent per million clocks (see the README).
//
// The state is held as two binary32 registers; the update uses four multipliers and two
// adders, all combinational between the registers. The state is converted to Q16.16
// for the outputs.
//
// Interface: gam (t = g*h, binary32) is read every clock; x and y are x2 and x3 in
// Q16.16. Timing: one solver step per clock, no pipeline; x and y change one clock after
// the edge that updates the state, combinationally from the state registers. reset is
// synchronous and active high and loads X0, Y0; the first cycle after reset shows
// them. Each later rising edge applies the rotation set by the gam present before it.
//
// From the source: the recurrence, binary32 arithmetic, the clk/reset/gam/x/y interface
// and the Q16.16 outputs. This design's own choices: synchronous reset, the initial
// conditions (x2, x3) = (0, 0.1), which give the 0.1 amplitude of the published
// waveforms, and rounding to nearest on the output conversion.
module mjerk_osc
  import fmjerk_pkg::*;
#(
  parameter fp32_t X0 = FP_ZERO,    // initial x2 = 0.0
  parameter fp32_t Y0 = FP_TENTH    // initial x3 = 0.1
) (
  input  logic  clk,
  input  logic  reset,
  input  fp32_t gam,
  output sfix_t x,
  output sfix_t y
);

  fp32_t a1, a2;
  fp32_t xs, ys;
  fp32_t p_a1x, p_a2y, p_a1y, p_a2x;
  fp32_t xs_next, ys_next;

  rk4_coef u_coef (.t(gam), .a1(a1), .a2(a2));

  fp32_mul u_m1 (.a(a1), .b(xs), .p(p_a1x));
  fp32_mul u_m2 (.a(a2), .b(ys), .p(p_a2y));
  fp32_mul u_m3 (.a(a1), .b(ys), .p(p_a1y));
  fp32_mul u_m4 (.a(a2), .b(xs), .p(p_a2x));

  fp32_add u_ax (.a(p_a1x), .b(p_a2y), .s(xs_next));
  fp32_add u_ay (.a(p_a1y), .b('{sign: ~p_a2x.sign, exp: p_a2x.exp, frac: p_a2x.frac}),
                 .s(ys_next));

  always_ff @(posedge clk) begin
    if (reset) begin
      xs <= X0;
      ys <= Y0;
    end else begin
      xs <= xs_next;
      ys <= ys_next;
    end
  end

  fp32_to_sfix u_ox (.f(xs), .q(x));
  fp32_to_sfix u_oy (.f(ys), .q(y));

endmodule
