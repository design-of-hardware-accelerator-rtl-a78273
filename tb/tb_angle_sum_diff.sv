// tb_angle_sum_diff: self-checking test of the rotation-angle solver.
// For random angle pairs in [-pi/2, pi/2] (Q.14) checks
// theta_r = floor((sum - diff) / 2) and theta_l = floor((sum + diff) / 2),
// and that theta_r + theta_l and theta_l - theta_r return sum and diff to
// within one LSB.
module tb_angle_sum_diff;
  import svd_pkg::*;

  localparam int W = ANG_W;
  logic signed [W-1:0] theta_sum, theta_diff, theta_r, theta_l;
  int checks = 0, failures = 0;

  angle_sum_diff dut (.*);

  function automatic int fdiv2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic check(int s, int df);
    int er, el, d1, d2;
    theta_sum = W'(s);
    theta_diff = W'(df);
    #1;
    er = fdiv2(s - df);
    el = fdiv2(s + df);
    checks += 4;
    if (int'(theta_r) != er) begin failures++; $display("FAIL r: s=%0d d=%0d got %0d exp %0d", s, df, theta_r, er); end
    if (int'(theta_l) != el) begin failures++; $display("FAIL l: s=%0d d=%0d got %0d exp %0d", s, df, theta_l, el); end
    d1 = int'(theta_r) + int'(theta_l) - s;
    d2 = int'(theta_l) - int'(theta_r) - df;
    if (d1 < -1 || d1 > 1) begin failures++; $display("FAIL sum: s=%0d d=%0d", s, df); end
    if (d2 < -1 || d2 > 1) begin failures++; $display("FAIL diff: s=%0d d=%0d", s, df); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int HP = 25736;   // pi/2 in Q.14
    check(HP, HP); check(-HP, -HP); check(HP, -HP); check(-HP, HP);
    check(0, 0); check(1, 0); check(-1, 0); check(0, -1);
    repeat (3000) check(int'($urandom_range(2 * HP, 0)) - HP, int'($urandom_range(2 * HP, 0)) - HP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
