// tb_svd_top: end-to-end test of the SVD accelerator at its default size.
//
// Pulses start twice and follows each run: the generator's table (recomputed
// here with the testbench's own model of its recurrence) must come out in
// order, and every result must diagonalise its matrix. Checks per result:
// the matrix and index, |sv1|, |sv2| against the closed-form singular values
// (sqrt((a+d)^2 + (c-b)^2) +- sqrt((a-d)^2 + (b+c)^2)) / 2, off-diagonal
// residue near zero, sv1 * sv2 against the determinant's sign. Timing: the
// first result three clocks after start, then one result per clock with no
// gap (the one-cycle-per-matrix rate), 'last' on the final one.
// Mechanisms counted, each of which must occur: results delivered, runs
// completed, vectoring inputs with X < 0 (d - a < 0 and d + a < 0, the
// half-plane fold), and a start ignored while busy.
module tb_svd_top;
  import svd_pkg::*;

  localparam int DW = DATA_W;
  localparam int N  = 16;        // default NUM_MAT of svd_top
  localparam int SEED = 20180401;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, out_valid, out_last;
  logic [$clog2(N)-1:0] out_index;
  logic signed [DW-1:0] out_a, out_b, out_c, out_d;
  logic signed [DW+1:0] sv1, sv2, off12, off21;
  logic signed [ANG_W-1:0] theta_r, theta_l;
  int checks = 0, failures = 0;
  int model [4*N];
  int n_results = 0, n_runs = 0, n_fold_sum = 0, n_fold_diff = 0, n_ignored_start = 0;

  svd_top dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (index %0d, A=[%0d %0d; %0d %0d], sv=%0d,%0d off=%0d,%0d)",
               what, out_index, out_a, out_b, out_c, out_d, sv1, sv2, off12, off21);
    end
  endtask

  task automatic build_model();
    longint unsigned s;
    int v;
    s = SEED;
    for (int n = 0; n < 4 * N; n++) begin
      s = (s * 1103515245 + 12345) % (64'd1 << 31);
      v = int'((s >> (31 - DW)) & ((64'd1 << DW) - 1));
      if (v >= (1 << (DW - 1))) v -= (1 << DW);
      if (v == -(1 << (DW - 1))) v += 1;
      model[n] = v;
    end
  endtask

  task automatic check_result(int k);
    real ra, rb, rc, rd, p, r, smax, smin, g1, g2, tol, det;
    expect_true("index", int'(out_index) == k);
    expect_true("matrix", int'(out_a) == model[4*k] && int'(out_b) == model[4*k+1] &&
                          int'(out_c) == model[4*k+2] && int'(out_d) == model[4*k+3]);
    ra = out_a; rb = out_b; rc = out_c; rd = out_d;
    if (rd - ra < 0) n_fold_sum++;
    if (rd + ra < 0) n_fold_diff++;
    p = $sqrt((ra + rd) ** 2 + (rc - rb) ** 2);
    r = $sqrt((ra - rd) ** 2 + (rb + rc) ** 2);
    smax = (p + r) / 2.0;
    smin = fabs(p - r) / 2.0;
    tol = 8.0 + 4.0e-4 * smax;
    g1 = fabs(real'(sv1));
    g2 = fabs(real'(sv2));
    if (g1 < g2) begin real t; t = g1; g1 = g2; g2 = t; end
    expect_true("s_max", fabs(g1 - smax) <= tol);
    expect_true("s_min", fabs(g2 - smin) <= tol);
    expect_true("off12", fabs(real'(off12)) <= tol);
    expect_true("off21", fabs(real'(off21)) <= tol);
    det = ra * rd - rb * rc;
    if (fabs(det) > 4.0 * tol * smax)
      expect_true("det sign", (real'(sv1) * real'(sv2) > 0) == (det > 0));
    expect_true("last", out_last == (k == N - 1));
  endtask

  task automatic run(bit poke_start);
    int cyc, first, k;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    first = -1;
    k = 0;
    while (k < N && cyc < 200) begin
      @(posedge clk); #1;
      cyc++;
      if (poke_start && cyc == 6) begin
        start = 1'b1;
        if (busy) n_ignored_start++;
      end
      if (poke_start && cyc == 7) start = 1'b0;
      if (out_valid) begin
        if (first < 0) begin
          first = cyc;
          expect_true("first result three clocks after start", cyc == 3);
        end
        expect_true("one result per clock", cyc - first == k);
        check_result(k);
        k++;
        n_results++;
      end
    end
    expect_true("all matrices of the run", k == N);
    repeat (5) begin
      @(posedge clk); #1;
      expect_true("no result after the run", !out_valid);
    end
    n_runs++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_model();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(1'b1);
    run(1'b0);
    $display("results %0d, runs %0d, folds d-a<0 %0d, folds d+a<0 %0d, ignored starts %0d",
             n_results, n_runs, n_fold_sum, n_fold_diff, n_ignored_start);
    expect_true("results delivered", n_results == 2 * N);
    expect_true("runs completed", n_runs == 2);
    expect_true("half-plane fold in the angle-sum unit", n_fold_sum > 0);
    expect_true("half-plane fold in the angle-difference unit", n_fold_diff > 0);
    expect_true("start ignored while busy", n_ignored_start > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
