// tb_svd2x2: self-checking test of the 2x2 SVD core.
//
// Every result is checked against values worked out in floating point,
// independently of the CORDIC algorithm:
//   - {|sv1|, |sv2|} against the singular values
//       s_max,min = (sqrt((a+d)^2 + (c-b)^2) +- sqrt((a-d)^2 + (b+c)^2)) / 2,
//   - sv1 * sv2 against the determinant ad - bc (sign preserved by rotations),
//   - off12 and off21 against zero,
//   - theta_r and theta_l against (S -+ D)/2 with S = atan((c+b)/(d-a)),
//     D = atan((c-b)/(d+a)), where both denominators are clearly nonzero.
// Tolerance: 8 LSB plus 4e-4 of s_max (Q.6 entries, Q.14 angles).
// Latency is checked as exactly one clock, and a back-to-back stream checks
// one result per clock.
module tb_svd2x2;
  import svd_pkg::*;

  localparam int DW = DATA_W;
  localparam real SC = real'(1 << ANG_FRAC);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] a, b, c, d;
  logic out_valid;
  logic signed [DW+1:0] sv1, sv2, off12, off21;
  logic signed [ANG_W-1:0] theta_r, theta_l;
  int checks = 0, failures = 0;
  real max_sv_err = 0.0, max_off = 0.0;

  svd2x2 dut (.*);

  always #5 clk = ~clk;

  typedef struct { int a, b, c, d; } mat_t;
  mat_t q[$];

  function automatic real fabs(real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic fail(string msg, mat_t m);
    failures++;
    $display("FAIL %s: A=[%0d %0d; %0d %0d] sv=%0d,%0d off=%0d,%0d th_r=%0d th_l=%0d",
             msg, m.a, m.b, m.c, m.d, sv1, sv2, off12, off21, theta_r, theta_l);
  endtask

  task automatic check_result(mat_t m);
    real ra, rb, rc, rd, p, r, smax, smin, g1, g2, tol, det, s, df, er, el;
    ra = m.a; rb = m.b; rc = m.c; rd = m.d;
    p = $sqrt((ra + rd) ** 2 + (rc - rb) ** 2);
    r = $sqrt((ra - rd) ** 2 + (rb + rc) ** 2);
    smax = (p + r) / 2.0;
    smin = fabs(p - r) / 2.0;
    tol = 8.0 + 4.0e-4 * smax;
    g1 = fabs(real'(sv1));
    g2 = fabs(real'(sv2));
    if (g1 < g2) begin real t; t = g1; g1 = g2; g2 = t; end
    if (fabs(g1 - smax) > max_sv_err) max_sv_err = fabs(g1 - smax);
    if (fabs(g2 - smin) > max_sv_err) max_sv_err = fabs(g2 - smin);
    if (fabs(real'(off12)) > max_off) max_off = fabs(real'(off12));
    if (fabs(real'(off21)) > max_off) max_off = fabs(real'(off21));
    checks++; if (fabs(g1 - smax) > tol) fail("s_max", m);
    checks++; if (fabs(g2 - smin) > tol) fail("s_min", m);
    checks++; if (fabs(real'(off12)) > tol) fail("off12", m);
    checks++; if (fabs(real'(off21)) > tol) fail("off21", m);
    det = ra * rd - rb * rc;
    if (fabs(det) > 4.0 * tol * smax) begin
      checks++;
      if ((real'(sv1) * real'(sv2) > 0) != (det > 0)) fail("det sign", m);
    end
    if (fabs(rd - ra) > 256 && fabs(rd + ra) > 256) begin
      s = $atan((rc + rb) / (rd - ra));
      df = $atan((rc - rb) / (rd + ra));
      er = (s - df) / 2.0;
      el = (s + df) / 2.0;
      checks++; if (fabs(real'(theta_r) / SC - er) > 0.002) fail("theta_r", m);
      checks++; if (fabs(real'(theta_l) / SC - el) > 0.002) fail("theta_l", m);
    end
  endtask

  // Compare each result against the oldest matrix sent; out_valid must come
  // exactly one clock after in_valid.
  logic in_valid_q;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== in_valid_q) begin
        failures++;
        $display("FAIL latency: out_valid=%0b, in_valid one clock earlier=%0b", out_valid, in_valid_q);
      end
      if (out_valid) begin
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else check_result(q.pop_front());
      end
    end
  end
  always @(posedge clk) in_valid_q <= in_valid;

  task automatic send(int ai, int bi, int ci, int di);
    mat_t m;
    m = '{ai, bi, ci, di};
    @(negedge clk);
    a = DW'(ai); b = DW'(bi); c = DW'(ci); d = DW'(di);
    in_valid = 1'b1;
    q.push_back(m);
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  function automatic int rnd(int range);
    return int'($urandom_range(2 * range, 0)) - range;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim;
    lim = (1 << (DW - 1)) - 1;
    a = '0; b = '0; c = '0; d = '0;
    in_valid_q = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Single matrices with gaps: latency.
    send(640, 0, 0, -320);   idle(3);     // already diagonal
    send(0, 0, 0, 0);        idle(2);     // zero matrix
    send(500, 300, 300, 500); idle(2);    // d - a = 0
    send(500, 300, -300, -500); idle(2);  // d + a = 0
    send(64, 128, 32, 64);   idle(2);     // rank one
    send(lim, lim, lim, -lim); idle(2);   // full scale
    send(-lim, lim, -lim, -lim); idle(2);
    // Back-to-back stream: one result per clock.
    repeat (2000) send(rnd(lim), rnd(lim), rnd(lim), rnd(lim));
    repeat (500) send(rnd(200), rnd(200), rnd(200), rnd(200));
    idle(4);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("max singular value error %f LSB, max off-diagonal %f LSB", max_sv_err, max_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
