// tb_mjerk_osc: self-checking test of the RK4 oscillator.
//
// A bit-exact model runs beside the design: the state is kept as binary32 words and
// advanced with the same correctly rounded operations as the recurrence
// x2 <- a1*x2 + a2*x3, x3 <- a1*x3 - a2*x2 (a1, a2 from the reference evaluation of the
// RK4 coefficients), and converted to Q16.16 by the reference rounding. x and y must
// match it exactly in every clock.
//
// Parts 1 and 2 hold g*h at 0.05 and 0.01, the two settings shown for the standalone
// oscillator, for 20000 clocks each. They also check what the model cannot vouch for:
// that the first sample after reset is the initial condition (0, 0.1); that the solver
// takes one step per clock, i.e. rising zero crossings of x are 2*pi/phi clocks apart on
// average, with phi = atan2(a2, a1) the rotation per step; and that the amplitude stays
// at 0.1 within 0.5 %. Part 3 drives a random g*h in the message range, changed every 50
// clocks, for 30000 clocks.
module tb_mjerk_osc;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  localparam real TWO_PI = 6.283185307179586;

  logic  clk = 0;
  logic  reset = 1;
  fp32_t gam;
  sfix_t x, y;
  int checks = 0, failures = 0;

  mjerk_osc dut (.clk(clk), .reset(reset), .gam(gam), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic logic [31:0] ref_a1(input logic [31:0] t);
    logic [31:0] t2;
    t2 = fmul(t, t);
    return fadd(fsub(32'h3F80_0000, fmul(t2, 32'h3F00_0000)), fmul(fmul(t2, t2), 32'h3D2A_AAAB));
  endfunction

  function automatic logic [31:0] ref_a2(input logic [31:0] t);
    return fsub(t, fmul(fmul(fmul(t, t), t), 32'h3E2A_AAAB));
  endfunction

  logic [31:0] mx, my;   // model state, binary32

  task automatic cmp(input string what, input int n);
    checks += 2;
    if (longint'(x) != to_q16(mx) || longint'(y) != to_q16(my)) begin
      failures++;
      if (failures < 20) $display("%s step %0d: got x=%0d y=%0d expected x=%0d y=%0d",
                                  what, n, x, y, to_q16(mx), to_q16(my));
    end
  endtask

  task automatic model_step(input logic [31:0] t);
    logic [31:0] a1, a2, nx;
    a1 = ref_a1(t);
    a2 = ref_a2(t);
    nx = fadd(fmul(a1, mx), fmul(a2, my));
    my = fsub(fmul(a1, my), fmul(a2, mx));
    mx = nx;
  endtask

  task automatic start(input logic [31:0] t);
    gam = t;
    reset = 1;
    @(posedge clk); @(posedge clk);
    #1 reset = 0;
    mx = 32'h0000_0000;
    my = 32'h3DCC_CCCD;
    checks++;
    if (x != 0 || y != sfix_t'(6554)) begin
      failures++;
      $display("after reset x=%0d y=%0d, expected 0 and 6554", x, y);
    end
  endtask

  task automatic run_const(input real tr, input int steps);
    logic [31:0] t;
    real phi, first_up, last_up, peak, xprev;
    int ups;
    t = real_to_fp(tr);
    phi = $atan2(fp_to_real(ref_a2(t)), fp_to_real(ref_a1(t)));
    start(t);
    ups = 0; first_up = 0.0; last_up = 0.0; peak = 0.0; xprev = 0.0;
    for (int n = 0; n < steps; n++) begin
      cmp("const", n);
      if (n > 0 && xprev < 0.0 && $itor(x) >= 0.0) begin
        if (ups == 0) first_up = n; else last_up = n;
        ups++;
      end
      xprev = $itor(x);
      if (absr($itor(y)) > peak) peak = absr($itor(y));
      model_step(t);
      @(posedge clk); #1;
    end
    checks++;
    if (ups < 3 || absr((last_up - first_up) / (ups - 1) - TWO_PI / phi) > 1.0) begin
      failures++;
      $display("period at t=%f: measured %f clocks, expected %f", tr,
               (last_up - first_up) / (ups - 1), TWO_PI / phi);
    end
    checks++;
    if (absr(peak / 65536.0 - 0.1) > 0.0005) begin
      failures++;
      $display("amplitude at t=%f is %f, expected 0.1", tr, peak / 65536.0);
    end
    $display("t=%f: period %f clocks (2*pi/phi = %f), peak %f", tr,
             (last_up - first_up) / (ups - 1), TWO_PI / phi, peak / 65536.0);
  endtask

  initial begin
    gam = '0;
    run_const(0.05, 20000);
    run_const(0.01, 20000);
    // part 3: time-varying control word
    start(real_to_fp(0.02));
    for (int n = 0; n < 30000; n++) begin
      cmp("varying", n);
      if (n % 50 == 0) gam = real_to_fp(0.02 + 0.04 * $itor($urandom_range(0, 1000000)) / 1.0e6);
      model_step(gam);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
