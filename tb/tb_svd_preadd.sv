// tb_svd_preadd: self-checking test of the four input adders.
// Random and extreme entries; each output is compared with the sum or
// difference computed in 32-bit integer arithmetic.
module tb_svd_preadd;
  import svd_pkg::*;

  localparam int W = DATA_W;
  logic signed [W-1:0] a, b, c, d;
  logic signed [W:0]   sum_y, sum_x, diff_y, diff_x;
  int checks = 0, failures = 0;

  svd_preadd dut (.*);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%0d b=%0d c=%0d d=%0d)", what, got, exp, a, b, c, d);
    end
  endtask

  task automatic apply(int ai, int bi, int ci, int di);
    a = W'(ai); b = W'(bi); c = W'(ci); d = W'(di);
    #1;
    expect_eq("c+b", int'(sum_y),  int'(c) + int'(b));
    expect_eq("d-a", int'(sum_x),  int'(d) - int'(a));
    expect_eq("c-b", int'(diff_y), int'(c) - int'(b));
    expect_eq("d+a", int'(diff_x), int'(d) + int'(a));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, mn;
    mx = (1 << (W - 1)) - 1;
    mn = -(1 << (W - 1));
    apply(mx, mx, mx, mx);
    apply(mn, mn, mn, mn);
    apply(mn, mx, mx, mx);
    apply(mx, mn, mn, mn);
    apply(0, 0, 0, 0);
    repeat (2000) apply($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
