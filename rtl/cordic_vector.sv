// cordic_vector: CORDIC vectoring unit, theta = atan(Y / X).
//
// The vector (X, Y) is turned towards the X axis by ITER micro-rotations. At
// step i the unit looks at the sign of Y: if Y is not negative it rotates
// clockwise, X += Y >>> i, Y -= X >>> i, and adds atan(2^-i) from the angle
// table to the angle sum; if Y is negative it rotates the other way and
// subtracts the table entry. Only shifts and adds are used. After the last
// step Y is close to zero and the angle sum is the angle of the input vector.
//
// The shift-add recurrence and the angle table follow the original design. This
// design's own choices: the recurrence is fully unrolled into combinational
// logic (the whole 2x2 SVD completes in one clock); a vector with X < 0 is
// first negated, which leaves Y/X unchanged, so theta is atan(Y/X) in
// [-pi/2, pi/2] and the iterations always converge; X = Y = 0 gives theta = 0.
// Inputs are IN_W-bit signed numbers of any scale (only their ratio matters);
// theta is ANG_W-bit signed radians with ANG_FRAC fraction bits (Q.14 by
// default). Inside, GUARD extra fraction bits and two extra integer bits
// (for the CORDIC growth of 1.65 * sqrt(2)) keep the steps exact enough.
//
// Interface: x_in, y_in -> theta, purely combinational.
module cordic_vector
  import svd_pkg::*;
#(
  parameter int unsigned IN_W     = DATA_W + 1,
  parameter int unsigned ANG_W_P  = ANG_W,
  parameter int unsigned ANG_FR   = ANG_FRAC,
  parameter int unsigned N_ITER   = ITER,
  parameter int unsigned GUARD_B  = GUARD
) (
  input  logic signed [IN_W-1:0]    x_in,
  input  logic signed [IN_W-1:0]    y_in,
  output logic signed [ANG_W_P-1:0] theta
);

  localparam int unsigned IW = IN_W + 2 + GUARD_B;  // internal datapath width
  localparam int unsigned ZW = ANG_W_P + 1;         // angle accumulator width

  logic signed [IW-1:0] x0, y0;   // input after the half-plane fold

  // Fold the left half-plane onto the right one: (-X, -Y) has the same Y/X.
  always_comb begin
    logic signed [IW-1:0] xe, ye;
    xe = IW'(x_in) <<< GUARD_B;
    ye = IW'(y_in) <<< GUARD_B;
    if (x_in < 0) begin
      x0 = -xe;
      y0 = -ye;
    end else begin
      x0 = xe;
      y0 = ye;
    end
  end

  // One generate block per micro-rotation; each takes the previous block's
  // result (or the folded input) and produces its own.
  for (genvar i = 0; i < N_ITER; i++) begin : g_step
    localparam logic signed [ZW-1:0] ATAN_I = ZW'(atan_entry(i, ANG_FR));
    logic signed [IW-1:0] xp, yp, xn, yn;
    logic signed [ZW-1:0] zp, zn;
    if (i == 0) begin : g_first
      assign xp = x0;
      assign yp = y0;
      assign zp = '0;
    end else begin : g_next
      assign xp = g_step[i-1].xn;
      assign yp = g_step[i-1].yn;
      assign zp = g_step[i-1].zn;
    end
    // cw: Y not negative, rotate clockwise and add the table angle
    wire cw = (yp >= 0);
    assign xn = cw ? xp + (yp >>> i) : xp - (yp >>> i);
    assign yn = cw ? yp - (xp >>> i) : yp + (xp >>> i);
    assign zn = cw ? zp + ATAN_I     : zp - ATAN_I;
  end

  // The zero vector has no angle; it is given 0. Otherwise |angle sum| stays
  // below the sum of the table (1.74 rad), which fits ANG_W_P bits.
  assign theta = (x_in == 0 && y_in == 0) ? '0 : ANG_W_P'(g_step[N_ITER-1].zn);

  initial begin
    assert (N_ITER <= MAX_ITER) else $error("cordic_vector: N_ITER exceeds the angle table");
  end

endmodule
