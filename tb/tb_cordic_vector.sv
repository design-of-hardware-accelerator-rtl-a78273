// tb_cordic_vector: self-checking test of the CORDIC vectoring unit.
//
// Drives random vectors (all four quadrants, X = 0, Y = 0, tiny and full-scale
// vectors) and compares theta with atan(Y/X) computed in floating point.
// theta is Q.14 radians; the tolerance is 0.0005 rad for vectors whose larger
// coordinate is at least 64 LSB and 0.02 rad below that, where the input
// itself only resolves the angle coarsely.
module tb_cordic_vector;
  import svd_pkg::*;

  localparam int IN_W = DATA_W + 1;
  localparam real PI = 3.14159265358979323846;

  logic signed [IN_W-1:0]  x, y;
  logic signed [ANG_W-1:0] theta;
  int checks = 0, failures = 0;
  int n_left = 0, n_xzero = 0;
  real max_err = 0.0;

  cordic_vector dut (.x_in(x), .y_in(y), .theta(theta));

  function automatic real ref_atan(int xi, int yi);
    if (xi == 0) begin
      if (yi > 0) return PI / 2.0;
      if (yi < 0) return -PI / 2.0;
      return 0.0;
    end
    return $atan(real'(yi) / real'(xi));
  endfunction

  task automatic check(int xi, int yi);
    real e, got, tol;
    int mx;
    x = IN_W'(xi);
    y = IN_W'(yi);
    #1;
    got = real'(theta) / real'(1 << ANG_FRAC);
    e = got - ref_atan(xi, yi);
    if (e < 0) e = -e;
    mx = (xi < 0 ? -xi : xi) > (yi < 0 ? -yi : yi) ? (xi < 0 ? -xi : xi) : (yi < 0 ? -yi : yi);
    tol = (mx >= 64) ? 0.0005 : 0.02;
    if (mx >= 64 && e > max_err) max_err = e;
    if (xi < 0) n_left++;
    if (xi == 0 && yi != 0) n_xzero++;
    checks++;
    if (e > tol) begin
      failures++;
      $display("FAIL x=%0d y=%0d theta=%0d (%f) ref=%f", xi, yi, theta, got, ref_atan(xi, yi));
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
    int lim;
    lim = (1 << (IN_W - 1)) - 1;
    // Axes and diagonals.
    check(1000, 0);    check(-1000, 0);   check(0, 1000);   check(0, -1000);
    check(0, 0);       check(500, 500);   check(-500, 500); check(500, -500);
    check(lim, lim);   check(-lim, -lim); check(lim, -lim); check(1, lim);
    check(-lim, 1);    check(3, 4);       check(-3, -4);
    repeat (3000) check(rnd(lim), rnd(lim));
    repeat (1000) check(rnd(300), rnd(300));
    if (n_left == 0 || n_xzero == 0) begin
      failures++;
      $display("FAIL: left half-plane or X=0 case never driven");
    end
    $display("max angle error %f rad over %0d vectors", max_err, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
