// svd_preadd: input adders of the 2x2 SVD core.
//
// For the matrix [a b; c d] the two rotation angles follow from
//   theta_sum  = atan((c + b) / (d - a))
//   theta_diff = atan((c - b) / (d + a)),
// so four adders form the numerators and denominators that the two CORDIC
// vectoring units take as Y and X. The results are one bit wider than the
// entries, so no sum can overflow. Purely combinational.
module svd_preadd
  import svd_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] d,
  output logic signed [W:0]   sum_y,   // c + b
  output logic signed [W:0]   sum_x,   // d - a
  output logic signed [W:0]   diff_y,  // c - b
  output logic signed [W:0]   diff_x   // d + a
);

  assign sum_y  = (W+1)'(c) + (W+1)'(b);
  assign sum_x  = (W+1)'(d) - (W+1)'(a);
  assign diff_y = (W+1)'(c) - (W+1)'(b);
  assign diff_x = (W+1)'(d) + (W+1)'(a);

endmodule
