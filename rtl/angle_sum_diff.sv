// angle_sum_diff: left and right rotation angles from angle sum and difference.
//
// The vectoring units deliver theta_sum = theta_r + theta_l and
// theta_diff = theta_l - theta_r. Solving for the two angles:
//   theta_r = (theta_sum - theta_diff) / 2
//   theta_l = (theta_sum + theta_diff) / 2.
// Sum and difference are taken one bit wider and halved by an arithmetic
// shift (rounding towards minus infinity, at most half an LSB of error).
// With both inputs in [-pi/2, pi/2] both outputs are too, inside the reach of
// the CORDIC rotation units. Purely combinational.
module angle_sum_diff
  import svd_pkg::*;
#(
  parameter int unsigned W = ANG_W
) (
  input  logic signed [W-1:0] theta_sum,
  input  logic signed [W-1:0] theta_diff,
  output logic signed [W-1:0] theta_r,
  output logic signed [W-1:0] theta_l
);

  logic signed [W:0] r2, l2;   // twice the angles

  assign r2 = (W+1)'(theta_sum) - (W+1)'(theta_diff);
  assign l2 = (W+1)'(theta_sum) + (W+1)'(theta_diff);
  assign theta_r = W'(r2 >>> 1);
  assign theta_l = W'(l2 >>> 1);

endmodule
