// triangular_wave: triangular message generator for the FM modulator.
//
// An up/down counter in Q16.16 sweeps the message linearly from MIN to MAX and back,
// moving by STEP every clock. When a step would reach or pass an end, the value is set
// to that end and the direction turns, so both extremes are always hit exactly and the
// period is 2*ceil((MAX-MIN)/STEP) clocks. The same value leaves twice: as z in Q16.16,
// the copy that is displayed next to the FM signal, and as x converted to binary32,
// the control word g*h of the oscillator.
//
// Interface: clk; reset synchronous, active high (value MIN, sweeping upward); x
// (binary32) and z (Q16.16) out, both one register after the clock edge, x through a
// combinational converter.
//
// From the source: the triangular shape, the range 0.02 .. 0.06 of g*h, the
// clk/reset/x/z interface with x in binary32 and z in Q16.16. This design's own choices:
// the counter, the counting grid of 2^-16, and the default slope STEP = 2 LSB per clock
// (a 2622-clock message period, about 17 carrier cycles per period).
module triangular_wave
  import fmjerk_pkg::*;
#(
  parameter sfix_t MIN  = MSG_MIN_Q16,   // 0.02
  parameter sfix_t MAX  = MSG_MAX_Q16,   // 0.06
  parameter sfix_t STEP = sfix_t'(2)     // slope, Q16.16 LSB per clock
) (
  input  logic  clk,
  input  logic  reset,
  output fp32_t x,
  output sfix_t z
);

  typedef enum logic {DIR_UP, DIR_DOWN} dir_t;

  dir_t  dir;
  sfix_t val;

  always_ff @(posedge clk) begin
    if (reset) begin
      val <= MIN;
      dir <= DIR_UP;
    end else if (dir == DIR_UP) begin
      if (val >= MAX - STEP) begin
        val <= MAX;
        dir <= DIR_DOWN;
      end else begin
        val <= val + STEP;
      end
    end else begin
      if (val <= MIN + STEP) begin
        val <= MIN;
        dir <= DIR_UP;
      end else begin
        val <= val - STEP;
      end
    end
  end

  sfix_to_fp32 u_cvt (.q(val), .f(x));
  assign z = val;

endmodule
