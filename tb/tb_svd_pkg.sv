// tb_svd_pkg: checks the constants shared by the CORDIC units.
// The arctangent table against round(atan(2^-i) * 2^30) computed in floating
// point, atan_entry's rounding to Q.14 and to other formats (to half an LSB;
// exact ties may round either way), and the gain
// constant against 2^16 / prod sqrt(1 + 2^-2i) over ITER steps.
module tb_svd_pkg;
  import svd_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_near(string what, real got, real exp, real tol);
    real e;
    e = got - exp;
    if (e < 0) e = -e;
    checks++;
    if (e > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k;
    for (int i = 0; i < ATAN_ENTRIES; i++) begin
      real t;
      t = $atan(1.0 / real'(longint'(1) << i));
      expect_near($sformatf("ATAN_Q30[%0d]", i), real'(ATAN_Q30[i]), t * real'(longint'(1) << 30), 0.5);
      expect_near($sformatf("atan_entry(%0d, 14)", i), real'(atan_entry(i, 14)), t * 16384.0, 0.5001);
      expect_near($sformatf("atan_entry(%0d, 10)", i), real'(atan_entry(i, 10)), t * 1024.0, 0.5001);
    end
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 1.0 / real'(longint'(1) << (2 * i)));
    expect_near("INV_GAIN_Q16", real'(INV_GAIN_Q16), 65536.0 / k, 0.5);
    checks++;
    if (ITER > ATAN_ENTRIES) begin
      failures++;
      $display("FAIL ITER exceeds the table");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
