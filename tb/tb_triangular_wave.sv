// tb_triangular_wave: self-checking test of the triangular message generator.
//
// The expected z is worked out in closed form: with U = ceil((MAX-MIN)/STEP) the period
// is 2U clocks, and m = k mod 2U clocks after reset the value is min(MIN + m*STEP, MAX)
// for m <= U and max(MAX - (m-U)*STEP, MIN) otherwise. x must be z/2^16 rounded to
// binary32 by the reference package. Two instances are checked every clock: the default
// one (0.02 .. 0.06, STEP 2, which does not divide the range 2621, so the last step up
// and the last step down are shortened to land on the ends) and a small one whose STEP
// divides its range exactly and which crosses zero. The test also counts how often each
// end is reached, checks the period of the default instance (2622 clocks) and a restart
// by reset in mid-sweep.
module tb_triangular_wave;
  import fmjerk_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 0;
  logic  reset = 1;
  fp32_t xa, xb;
  sfix_t za, zb;
  int checks = 0, failures = 0;

  localparam sfix_t B_MIN  = sfix_t'(-40);
  localparam sfix_t B_MAX  = sfix_t'(60);
  localparam sfix_t B_STEP = sfix_t'(10);

  triangular_wave dut_a (.clk(clk), .reset(reset), .x(xa), .z(za));
  triangular_wave #(.MIN(B_MIN), .MAX(B_MAX), .STEP(B_STEP)) dut_b (
    .clk(clk), .reset(reset), .x(xb), .z(zb));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tri_ref(input longint mn, input longint mx, input longint st,
                                     input longint k);
    longint u, m, v;
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

  task automatic expect_pair(input string what, input int k, input longint exp_z,
                             input sfix_t z, input fp32_t x);
    logic [31:0] exp_x;
    exp_x = real_to_fp($itor(exp_z) / 65536.0);
    checks += 2;
    if (longint'(z) != exp_z) begin
      failures++;
      if (failures < 20) $display("%s: z at clock %0d is %0d, expected %0d", what, k, z, exp_z);
    end
    if (x !== fp32_t'(exp_x)) begin
      failures++;
      if (failures < 20) $display("%s: x at clock %0d is %h, expected %h", what, k, x, exp_x);
    end
  endtask

  initial begin
    int tops, bottoms, last_top, period;
    tops = 0; bottoms = 0; last_top = -1; period = 0;
    @(posedge clk); @(posedge clk);
    #1 reset = 0;
    for (int k = 0; k < 12000; k++) begin
      expect_pair("a", k, tri_ref(1311, 3932, 2, longint'(k)), za, xa);
      expect_pair("b", k, tri_ref(-40, 60, 10, longint'(k)), zb, xb);
      if (za == MSG_MAX_Q16) begin
        if (last_top >= 0) period = k - last_top;
        last_top = k;
        tops++;
      end
      if (za == MSG_MIN_Q16 && k > 0) bottoms++;
      @(posedge clk); #1;
    end
    checks++;
    if (period != 2622) begin failures++; $display("period %0d, expected 2622", period); end
    checks++;
    if (tops < 4 || bottoms < 4) begin failures++; $display("ends reached %0d/%0d times", tops, bottoms); end
    // reset in mid-sweep restarts at MIN going up
    reset = 1; @(posedge clk); #1 reset = 0;
    expect_pair("a after reset", 0, 1311, za, xa);
    @(posedge clk); #1;
    expect_pair("a after reset", 1, 1313, za, xa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
