// tb_fm_modulator: end-to-end test of the FM modulator at its default parameters.
//
// A bit-exact model of the whole chain runs beside the design. The message is the
// closed-form triangle (Q16.16 from 1311 to 3932, i.e. 0.02 .. 0.06, 2 LSB per clock,
// period 2622 clocks), converted to binary32 as the control word; the carrier state is
// advanced with correctly rounded binary32 operations in the order of the RK4 recurrence,
// using the message of the same clock. x, y and z must match the model exactly in every
// clock. The run covers three message periods, a reset in mid-sweep and one more period.
//
// Frequency modulation itself is checked against the mathematics: for every carrier
// cycle of y (between rising zero crossings) the rotation angles atan2(a2, a1) summed
// over its clocks must equal 2*pi within 0.12 rad (two steps at the highest frequency),
// and the shortest carrier cycle, at the top of the message, must be under half the
// longest, at the bottom (the message spans a factor of 3). The test counts the design's
// mechanisms and fails if one never happened: the message turning at its upper end and
// at its lower end, complete carrier cycles, and a restart by reset.
module tb_fm_modulator;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  localparam real TWO_PI = 6.283185307179586;
  localparam int  PERIOD = 2622;

  logic  clk = 0;
  logic  reset = 1;
  sfix_t x, y, z;
  int checks = 0, failures = 0;
  int n_top = 0, n_bottom = 0, n_cycles = 0, n_resets = 0;
  int min_cyc = 1000000, max_cyc = 0;

  fm_modulator dut (.clk(clk), .reset(reset), .x(x), .y(y), .z(z));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // message in Q16.16 units, k clocks after reset
  function automatic longint msg_ref(input longint k);
    longint mn, mx, st, u, m, v;
    mn = 1311; mx = 3932; st = 2;
    u = (mx - mn + st - 1) / st;
    m = k % (2 * u);
    if (m <= u) begin
      v = mn + m * st;
      if (v > mx) v = mx;
    end else begin
      v = mx - (m - u) * st;
      if (v < mn) v = mn;
    end
    return v;
  endfunction

  task automatic run(input int clocks);
    logic [31:0] mx, my, nx, t, t2, a1, a2;
    longint mv;
    real angle, yprev;
    int last_cross;
    mx = 32'h0000_0000;
    my = 32'h3DCC_CCCD;
    angle = 0.0; yprev = 0.0; last_cross = -1;
    for (int k = 0; k < clocks; k++) begin
      mv = msg_ref(longint'(k));
      checks += 3;
      if (longint'(x) != to_q16(mx) || longint'(y) != to_q16(my) || longint'(z) != mv) begin
        failures++;
        if (failures < 20)
          $display("clock %0d: got x=%0d y=%0d z=%0d expected x=%0d y=%0d z=%0d",
                   k, x, y, z, to_q16(mx), to_q16(my), mv);
      end
      if (mv == 3932) n_top++;
      if (mv == 1311 && k > 0) n_bottom++;
      // carrier cycles, on the design's own output
      if (k > 0 && yprev < 0.0 && $itor(y) >= 0.0) begin
        if (last_cross >= 0) begin
          n_cycles++;
          checks++;
          if (absr(angle - TWO_PI) > 0.12) begin
            failures++;
            $display("carrier cycle ending at clock %0d spans %f rad", k, angle);
          end
          if (k - last_cross < min_cyc) min_cyc = k - last_cross;
          if (k - last_cross > max_cyc) max_cyc = k - last_cross;
        end
        last_cross = k;
        angle = 0.0;
      end
      yprev = $itor(y);
      // model step with this clock's message
      t  = real_to_fp($itor(mv) / 65536.0);
      t2 = fmul(t, t);
      a1 = fadd(fsub(32'h3F80_0000, fmul(t2, 32'h3F00_0000)), fmul(fmul(t2, t2), 32'h3D2A_AAAB));
      a2 = fsub(t, fmul(fmul(t2, t), 32'h3E2A_AAAB));
      angle += $atan2(fp_to_real(a2), fp_to_real(a1));
      nx = fadd(fmul(a1, mx), fmul(a2, my));
      my = fsub(fmul(a1, my), fmul(a2, mx));
      mx = nx;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    #1 reset = 0;
    run(3 * PERIOD);
    // reset in mid-sweep: everything restarts from its initial state
    repeat (777) @(posedge clk);
    reset = 1;
    @(posedge clk); #1 reset = 0;
    checks++;
    if (y != sfix_t'(6554) || x != 0 || z != sfix_t'(1311)) begin
      failures++;
      $display("restart after reset: x=%0d y=%0d z=%0d", x, y, z);
    end else n_resets++;
    run(PERIOD + 10);

    checks++;
    if (!(min_cyc * 2 < max_cyc)) begin
      failures++;
      $display("no frequency deviation: carrier cycles %0d .. %0d clocks", min_cyc, max_cyc);
    end
    $display("message top %0d, bottom %0d, carrier cycles %0d (%0d..%0d clocks), resets %0d",
             n_top, n_bottom, n_cycles, min_cyc, max_cyc, n_resets);
    checks += 4;
    if (n_top == 0)    begin failures++; $display("message never reached its upper end"); end
    if (n_bottom == 0) begin failures++; $display("message never reached its lower end"); end
    if (n_cycles == 0) begin failures++; $display("no carrier cycle seen"); end
    if (n_resets == 0) begin failures++; $display("reset restart not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
