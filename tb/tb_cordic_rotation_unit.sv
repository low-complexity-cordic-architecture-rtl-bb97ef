// tb_cordic_rotation_unit: self-checking test of the CORDIC rotation unit.
// 1) Unit vector (1,0) rotated by angles across -45..+45 degrees: cos and sin
//    must be within 0.0008 of the exact values (0.037 degree of angle error
//    plus fixed-point rounding).
// 2) Random vectors of magnitude up to 2 rotated by random angles within
//    +/-pi/4 against the exact rotation, same tolerance scaled by magnitude.
// 3) Unit vector rotated in 0.05 degree steps over -45..+45 degrees: the
//    angle of the result must be within 0.037 degree (the target accuracy,
//    here including the rounding of the Q3.13 output) of the quantised input
//    angle.
// 4) Hyperbolic mode: (1,0) rotated by -1.1..1.1 gives cosh/sinh, and random
//    vectors against the exact hyperbolic rotation.
// 5) The latency is N_ITER + 2 cycles from the start cycle to the done cycle.
module tb_cordic_rotation_unit;
  import mimo_pkg::*;
  localparam int N_ITER = 11;
  logic clk = 0, rst_n = 0, start = 0, hyp = 0, busy, done;
  real_t x0, y0, z0, xn, yn;
  int checks = 0, failures = 0, cyc = 0;
  real maxerr = 0.0, maxdev = 0.0;
  int n_hyp = 0;
  // the target accuracy of the rotation unit, in degrees
  localparam real DEV_LIMIT = 0.037;

  cordic_rotation_unit #(.N_ITER(N_ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rot(real xr, real yr, real ang, bit h = 1'b0);
    int t0;
    real ex, ey, tol, e;
    x0 = real_t'($rtoi(xr * 8192.0));
    y0 = real_t'($rtoi(yr * 8192.0));
    z0 = real_t'($rtoi(ang * 8192.0));
    @(negedge clk);
    start = 1; hyp = h; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != N_ITER + 2) begin failures++; $display("latency %0d", cyc - t0); end
    // exact rotation of the quantised inputs
    if (h) begin
      ex = (real'(x0) * $cosh(real'(z0) / 8192.0) + real'(y0) * $sinh(real'(z0) / 8192.0)) / 8192.0;
      ey = (real'(x0) * $sinh(real'(z0) / 8192.0) + real'(y0) * $cosh(real'(z0) / 8192.0)) / 8192.0;
      // residual hyperbolic angle <= atanh(2^-10) ~ 0.001, times the output size
      tol = 0.0012 * ($sqrt(xr * xr + yr * yr) * $cosh(ang) * 1.2 + 0.3);
      n_hyp++;
    end else begin
      ex = (real'(x0) * $cos(real'(z0) / 8192.0) - real'(y0) * $sin(real'(z0) / 8192.0)) / 8192.0;
      ey = (real'(x0) * $sin(real'(z0) / 8192.0) + real'(y0) * $cos(real'(z0) / 8192.0)) / 8192.0;
      tol = 0.0008 * ($sqrt(xr * xr + yr * yr) + 0.3);
    end
    e = ((real'(xn) / 8192.0 - ex) ** 2 + (real'(yn) / 8192.0 - ey) ** 2) ** 0.5;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > tol) begin
      failures++;
      $display("rot (%f,%f) by %f: got (%f,%f) exp (%f,%f)", xr, yr, ang,
               real'(xn) / 8192.0, real'(yn) / 8192.0, ex, ey);
    end
  endtask

  initial begin
    x0 = 0; y0 = 0; z0 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = -45; d <= 45; d++) rot(1.0, 0.0, real'(d) * 3.14159265358979 / 180.0);
    // angular deviation of the rotated unit vector, every 0.05 degree
    for (int d = -900; d <= 900; d++) begin
      real dev;
      rot(1.0, 0.0, real'(d) * 0.05 * 3.14159265358979 / 180.0);
      dev = ($atan2(real'(yn), real'(xn)) - real'(z0) / 8192.0) * 180.0 / 3.14159265358979;
      if (dev < 0) dev = -dev;
      if (dev > maxdev) maxdev = dev;
      checks++;
      if (dev > DEV_LIMIT) begin failures++; $display("deviation %f degree at %f", dev, real'(d) * 0.05); end
    end
    for (int n = 0; n < 200; n++) begin
      real xr, yr, ang;
      xr  = (real'($urandom_range(0, 32000)) - 16000.0) / 8000.0;
      yr  = (real'($urandom_range(0, 32000)) - 16000.0) / 8000.0;
      ang = (real'($urandom_range(0, 20000)) - 10000.0) / 10000.0 * 0.7853;
      rot(xr, yr, ang);
    end
    // hyperbolic: cosh/sinh of the unit vector, and random vectors
    for (int d = -110; d <= 110; d++) rot(1.0, 0.0, real'(d) / 100.0, 1'b1);
    for (int n = 0; n < 200; n++) begin
      real xr, yr, ang;
      xr  = (real'($urandom_range(0, 16000)) - 8000.0) / 8000.0;
      yr  = (real'($urandom_range(0, 16000)) - 8000.0) / 8000.0;
      ang = (real'($urandom_range(0, 20000)) - 10000.0) / 10000.0 * 1.1;
      rot(xr, yr, ang, 1'b1);
    end
    checks++;
    if (n_hyp == 0) failures++;
    $display("max error %f, max angular deviation %f degree", maxerr, maxdev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
