// fm_modulator: digital FM modulator whose carrier is the RK4 jerk-derived oscillator.
//
// FM makes the instantaneous carrier frequency follow the message. Here the carrier is
// the oscillator mjerk_osc, whose frequency is proportional to its control word
// t = g*h (t/(2*pi) cycles per clock). Feeding the message straight into t therefore
// modulates the frequency with no phase accumulator and no sine table: the triangular
// message from triangular_wave sweeps t between 0.02 and 0.06, so the carrier swings
// between about 1/314 and 1/105 of the clock rate.
//
// Interface: clk, reset (synchronous, active high); y is the FM signal (x3 of the
// oscillator), x its quadrature companion (x2), z the message, all Q16.16. These are the
// words a digital-to-analog converter outside this design turns into analog signals.
// The message reaches the oscillator combinationally: the rotation applied at a clock
// edge uses the message value held before that edge.
//
// The structure (message generator into the g*h input of the solver, y and z out) and
// the instance names follow the source's top-level schematic; bringing x out as well
// follows its experiment, which displays both oscillator states.
module fm_modulator
  import fmjerk_pkg::*;
#(
  parameter sfix_t MSG_MIN  = MSG_MIN_Q16,
  parameter sfix_t MSG_MAX  = MSG_MAX_Q16,
  parameter sfix_t MSG_STEP = sfix_t'(2),
  parameter fp32_t X0       = FP_ZERO,
  parameter fp32_t Y0       = FP_TENTH
) (
  input  logic  clk,
  input  logic  reset,
  output sfix_t x,
  output sfix_t y,
  output sfix_t z
);

  fp32_t gam;

  triangular_wave #(.MIN(MSG_MIN), .MAX(MSG_MAX), .STEP(MSG_STEP)) utri (
    .clk(clk), .reset(reset), .x(gam), .z(z)
  );

  mjerk_osc #(.X0(X0), .Y0(Y0)) uosc (
    .clk(clk), .reset(reset), .gam(gam), .x(x), .y(y)
  );

endmodule
