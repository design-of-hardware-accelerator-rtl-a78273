// tb_matrix_gen: self-checking test of the look-up-table matrix generator.
//
// Recomputes the table with its own model of the recurrence given in matrix_gen
// (s(n+1) = 1103515245 s(n) + 12345 mod 2^31, entry = the top DW bits of the
// 31-bit state, most negative value moved up by one) and checks that after a
// start pulse the generator emits all NUM_MAT matrices on consecutive cycles,
// in order, with the right index, 'last' on the final one only, busy for the
// run, a start during the run ignored, and that a second run repeats the
// first.
module tb_matrix_gen;
  import svd_pkg::*;

  localparam int DW = DATA_W;
  localparam int N  = 16;
  localparam int SEED = 20180401;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, valid, last;
  logic [$clog2(N)-1:0] index;
  logic signed [DW-1:0] a, b, c, d;
  int checks = 0, failures = 0;
  int model [4*N];

  matrix_gen dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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

  task automatic run(bit poke_start);
    int seen, first_cycle, cyc;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    expect_eq("busy after start", int'(busy), 1);
    seen = 0;
    cyc = 0;
    first_cycle = -1;
    while (seen < N && cyc < 100) begin
      @(posedge clk); #1;
      cyc++;
      if (poke_start && cyc == 4) start = 1'b1;
      if (poke_start && cyc == 5) start = 1'b0;
      if (valid) begin
        if (first_cycle < 0) first_cycle = cyc;
        expect_eq("consecutive", cyc - first_cycle, seen);
        expect_eq("index", int'(index), seen);
        expect_eq("a", int'(a), model[4*seen]);
        expect_eq("b", int'(b), model[4*seen+1]);
        expect_eq("c", int'(c), model[4*seen+2]);
        expect_eq("d", int'(d), model[4*seen+3]);
        expect_eq("last", int'(last), (seen == N - 1) ? 1 : 0);
        seen++;
      end
    end
    expect_eq("matrices in run", seen, N);
    repeat (4) begin
      @(posedge clk); #1;
      expect_eq("idle valid", int'(valid), 0);
      expect_eq("idle busy", int'(busy), 0);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_model();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk); #1;
    expect_eq("valid after reset", int'(valid), 0);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
