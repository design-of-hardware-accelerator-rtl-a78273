// cordic_rotation: CORDIC rotation unit, (X0, Y0) = R(theta) * (X, Y).
//
// The reverse of the vectoring unit: the residual angle starts at theta and
// is driven to zero by ITER shift-add micro-rotations. At step i, if the
// residual is not negative the vector turns anticlockwise by atan(2^-i)
// (X -= Y >>> i, Y += X >>> i) and the table entry is subtracted from the
// residual; otherwise it turns clockwise and the entry is added. The result is
//   X0 = X cos(theta) - Y sin(theta),  Y0 = X sin(theta) + Y cos(theta).
//
// Following the original design: the same iteration count and angle table as the
// vectoring unit, shift-add steps only, Q.6 data and Q.14 angles. This
// design's own choices: the steps are unrolled into combinational logic; the
// CORDIC growth K = 1.64676 is removed at the end by multiplying with the
// constant 1/K (a constant, so it reduces to shifts and adds), then the result
// is rounded to the input format and saturated. |theta| must not exceed
// 1.74 rad, the reach of the iterations; the SVD core only uses |theta| <= pi/2.
// The output is one bit wider than the input, since a rotated vector's
// coordinates can grow by sqrt(2).
//
// Interface: x_in, y_in, theta -> x_out, y_out, purely combinational.
module cordic_rotation
  import svd_pkg::*;
#(
  parameter int unsigned IN_W    = DATA_W,
  parameter int unsigned OUT_W   = IN_W + 1,
  parameter int unsigned ANG_W_P = ANG_W,
  parameter int unsigned ANG_FR  = ANG_FRAC,
  parameter int unsigned N_ITER  = ITER,
  parameter int unsigned GUARD_B = GUARD
) (
  input  logic signed [IN_W-1:0]    x_in,
  input  logic signed [IN_W-1:0]    y_in,
  input  logic signed [ANG_W_P-1:0] theta,
  output logic signed [OUT_W-1:0]   x_out,
  output logic signed [OUT_W-1:0]   y_out
);

  localparam int unsigned IW = IN_W + 2 + GUARD_B;  // internal datapath width
  localparam int unsigned ZW = ANG_W_P + 1;         // residual angle width
  localparam int unsigned PW = IW + 17;             // product with 1/K (Q16)
  localparam int unsigned SH = 16 + GUARD_B;        // back to input format

  // One generate block per micro-rotation; each takes the previous block's
  // result (or the input) and produces its own.
  for (genvar i = 0; i < N_ITER; i++) begin : g_step
    localparam logic signed [ZW-1:0] ATAN_I = ZW'(atan_entry(i, ANG_FR));
    logic signed [IW-1:0] xp, yp, xn, yn;
    logic signed [ZW-1:0] zp, zn;
    if (i == 0) begin : g_first
      assign xp = IW'(x_in) <<< GUARD_B;
      assign yp = IW'(y_in) <<< GUARD_B;
      assign zp = ZW'(theta);
    end else begin : g_next
      assign xp = g_step[i-1].xn;
      assign yp = g_step[i-1].yn;
      assign zp = g_step[i-1].zn;
    end
    // ccw: residual not negative, rotate anticlockwise and take off the angle
    wire ccw = (zp >= 0);
    assign xn = ccw ? xp - (yp >>> i) : xp + (yp >>> i);
    assign yn = ccw ? yp + (xp >>> i) : yp - (xp >>> i);
    assign zn = ccw ? zp - ATAN_I     : zp + ATAN_I;
  end

  // Gain compensation, rounding to nearest and saturation to OUT_W bits.
  function automatic logic signed [OUT_W-1:0] scale(input logic signed [IW-1:0] v);
    logic signed [PW-1:0] p;
    logic signed [PW-1:0] r;
    p = PW'(v) * PW'(INV_GAIN_Q16);
    r = (p + (PW'(1) <<< (SH - 1))) >>> SH;
    if (r > PW'((longint'(1) <<< (OUT_W - 1)) - 1))
      return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -PW'(longint'(1) <<< (OUT_W - 1)))
      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  assign x_out = scale(g_step[N_ITER-1].xn);
  assign y_out = scale(g_step[N_ITER-1].yn);

  initial begin
    assert (N_ITER <= MAX_ITER) else $error("cordic_rotation: N_ITER exceeds the angle table");
  end

endmodule
