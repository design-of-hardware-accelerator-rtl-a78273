// svd2x2: 2x2 singular value decomposition core, one matrix per clock.
//
// Two-sided Jacobi step with CORDIC arithmetic. For A = [a b; c d] it finds
// theta_r and theta_l such that R(theta_r)^T * A * R(theta_l) is diagonal,
// R(t) = [cos t  sin t; -sin t  cos t]:
//   1. four adders form c+b, d-a, c-b, d+a                      (svd_preadd)
//   2. two vectoring units give theta_sum = atan((c+b)/(d-a)) and
//      theta_diff = atan((c-b)/(d+a))                          (cordic_vector)
//   3. theta_r = (sum - diff)/2, theta_l = (sum + diff)/2      (angle_sum_diff)
//   4. two rotation units turn the rows (a,b) and (c,d) by theta_l, which is
//      A * R(theta_l); two more turn the resulting columns by theta_r, which
//      is R(theta_r)^T * (A * R(theta_l))                      (cordic_rotation)
// The diagonal of the result holds the singular values (with sign: sv1 or sv2
// may be negative, and they are not sorted); the off-diagonal outputs are the
// residue, a few LSBs from zero.
//
// The block structure (adders, two vectoring units, angle sum/difference,
// four rotation units) follows the original design, as does the one-cycle result.
// This design's own choices: the datapath between the input and the output
// register is combinational; in_valid is registered into out_valid; entries
// are DATA_W-bit signed Q.6, results DATA_W+2 bits in the same Q.6 format,
// angles ANG_W-bit signed Q.14 radians. The original design's formula for the angle
// difference is written with the opposite sign; this core uses the sign for
// which the product above is diagonal.
//
// Timing: a matrix presented with in_valid in one cycle appears on the outputs
// after the next rising edge, with out_valid high for one cycle.
module svd2x2
  import svd_pkg::*;
#(
  parameter int unsigned DW      = DATA_W,
  parameter int unsigned AW      = ANG_W,
  parameter int unsigned AF      = ANG_FRAC,
  parameter int unsigned N_ITER  = ITER,
  parameter int unsigned GUARD_B = GUARD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [DW-1:0] c,
  input  logic signed [DW-1:0] d,
  output logic                 out_valid,
  output logic signed [DW+1:0] sv1,      // result (1,1)
  output logic signed [DW+1:0] sv2,      // result (2,2)
  output logic signed [DW+1:0] off12,    // result (1,2), ~0
  output logic signed [DW+1:0] off21,    // result (2,1), ~0
  output logic signed [AW-1:0] theta_r,
  output logic signed [AW-1:0] theta_l
);

  logic signed [DW:0]   sum_y, sum_x, diff_y, diff_x;
  logic signed [AW-1:0] th_sum, th_diff, th_r, th_l;
  logic signed [DW:0]   a1, b1, c1, d1;          // A * R(theta_l)
  logic signed [DW+1:0] m11, m12, m21, m22;      // R(theta_r)^T * A * R(theta_l)

  svd_preadd #(.W(DW)) u_preadd (
    .a, .b, .c, .d, .sum_y, .sum_x, .diff_y, .diff_x
  );

  cordic_vector #(.IN_W(DW+1), .ANG_W_P(AW), .ANG_FR(AF), .N_ITER(N_ITER), .GUARD_B(GUARD_B))
    u_vec_sum  (.x_in(sum_x),  .y_in(sum_y),  .theta(th_sum));
  cordic_vector #(.IN_W(DW+1), .ANG_W_P(AW), .ANG_FR(AF), .N_ITER(N_ITER), .GUARD_B(GUARD_B))
    u_vec_diff (.x_in(diff_x), .y_in(diff_y), .theta(th_diff));

  angle_sum_diff #(.W(AW)) u_angles (
    .theta_sum(th_sum), .theta_diff(th_diff), .theta_r(th_r), .theta_l(th_l)
  );

  // Rows turned by theta_l.
  cordic_rotation #(.IN_W(DW), .OUT_W(DW+1), .ANG_W_P(AW), .ANG_FR(AF), .N_ITER(N_ITER), .GUARD_B(GUARD_B))
    u_rot_row1 (.x_in(a), .y_in(b), .theta(th_l), .x_out(a1), .y_out(b1));
  cordic_rotation #(.IN_W(DW), .OUT_W(DW+1), .ANG_W_P(AW), .ANG_FR(AF), .N_ITER(N_ITER), .GUARD_B(GUARD_B))
    u_rot_row2 (.x_in(c), .y_in(d), .theta(th_l), .x_out(c1), .y_out(d1));

  // Columns turned by theta_r.
  cordic_rotation #(.IN_W(DW+1), .OUT_W(DW+2), .ANG_W_P(AW), .ANG_FR(AF), .N_ITER(N_ITER), .GUARD_B(GUARD_B))
    u_rot_col1 (.x_in(a1), .y_in(c1), .theta(th_r), .x_out(m11), .y_out(m21));
  cordic_rotation #(.IN_W(DW+1), .OUT_W(DW+2), .ANG_W_P(AW), .ANG_FR(AF), .N_ITER(N_ITER), .GUARD_B(GUARD_B))
    u_rot_col2 (.x_in(b1), .y_in(d1), .theta(th_r), .x_out(m12), .y_out(m22));

  // The rotation units converge for |theta| up to the sum of the angle table,
  // 1.743 rad; the solved angles must stay inside that reach.
  localparam logic signed [AW-1:0] REACH = AW'(longint'(1.7433 * real'(longint'(1) <<< AF)));
  a_reach: assert property (@(posedge clk) disable iff (!rst_n)
                            in_valid |-> (th_r <= REACH && th_r >= -REACH && th_l <= REACH && th_l >= -REACH))
    else $error("svd2x2: rotation angle outside the CORDIC reach");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sv1       <= '0;
      sv2       <= '0;
      off12     <= '0;
      off21     <= '0;
      theta_r   <= '0;
      theta_l   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sv1     <= m11;
        sv2     <= m22;
        off12   <= m12;
        off21   <= m21;
        theta_r <= th_r;
        theta_l <= th_l;
      end
    end
  end

endmodule
