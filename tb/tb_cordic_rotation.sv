// tb_cordic_rotation: self-checking test of the CORDIC rotation unit.
//
// Rotates random vectors by random angles in [-pi/2, pi/2] and compares
// (x_out, y_out) with X cos(theta) - Y sin(theta) and X sin(theta) +
// Y cos(theta) computed in floating point from the same Q.14 angle. The
// tolerance, 4 LSB plus 1e-4 of the vector length, covers the CORDIC's
// residual angle (about atan(2^-14)) and the rounding of the 1/K constant.
// Also checks saturation-free growth: a full-scale diagonal vector rotated by
// pi/4 needs the extra output bit.
module tb_cordic_rotation;
  import svd_pkg::*;

  localparam int IN_W  = DATA_W;
  localparam int OUT_W = DATA_W + 1;

  logic signed [IN_W-1:0]  x, y;
  logic signed [ANG_W-1:0] th;
  logic signed [OUT_W-1:0] xo, yo;
  int checks = 0, failures = 0;
  int n_grow = 0;
  real max_err = 0.0;

  cordic_rotation dut (.x_in(x), .y_in(y), .theta(th), .x_out(xo), .y_out(yo));

  task automatic check(int xi, int yi, int ti);
    real t, ex, ey, tol, e1, e2, len;
    x = IN_W'(xi);
    y = IN_W'(yi);
    th = ANG_W'(ti);
    #1;
    t = real'(ti) / real'(1 << ANG_FRAC);
    ex = real'(xi) * $cos(t) - real'(yi) * $sin(t);
    ey = real'(xi) * $sin(t) + real'(yi) * $cos(t);
    len = $sqrt(real'(xi) * real'(xi) + real'(yi) * real'(yi));
    tol = 4.0 + 1.0e-4 * len;
    e1 = real'(xo) - ex; if (e1 < 0) e1 = -e1;
    e2 = real'(yo) - ey; if (e2 < 0) e2 = -e2;
    if (e1 > max_err) max_err = e1;
    if (e2 > max_err) max_err = e2;
    if (ex > real'((1 << (IN_W - 1))) || ex < -real'((1 << (IN_W - 1))) ||
        ey > real'((1 << (IN_W - 1))) || ey < -real'((1 << (IN_W - 1)))) n_grow++;
    checks += 2;
    if (e1 > tol) begin
      failures++;
      $display("FAIL x: in (%0d,%0d) th=%0d got %0d exp %f", xi, yi, ti, xo, ex);
    end
    if (e2 > tol) begin
      failures++;
      $display("FAIL y: in (%0d,%0d) th=%0d got %0d exp %f", xi, yi, ti, yo, ey);
    end
  endtask

  function automatic int rnd(int range);
    return int'($urandom_range(2 * range, 0)) - range;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim, hp;
    lim = (1 << (IN_W - 1)) - 1;
    hp  = 25736;                         // pi/2 in Q.14
    check(1000, 0, 0);
    check(1000, 0, hp);
    check(1000, 0, -hp);
    check(0, 1000, 12868);               // pi/4
    check(lim, lim, 12868);              // grows to sqrt(2) * lim
    check(-lim, -lim, 12868);
    check(lim, -lim, -12868);
    check(0, 0, 5000);
    repeat (3000) check(rnd(lim), rnd(lim), rnd(hp));
    if (n_grow == 0) begin
      failures++;
      $display("FAIL: no rotation needed the extra output bit");
    end
    $display("max error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
