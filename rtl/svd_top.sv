// svd_top: 2x2 SVD accelerator system, matrix generator driving the SVD core.
//
// The generator's look-up table supplies one matrix per clock after a start
// pulse; the SVD core turns each into its diagonal form one clock later. The
// input matrix, its index and the last-matrix flag are delayed by one register
// so that every result leaves together with the matrix it came from.
//
// The pairing of generator and core follows the original design. Output alignment
// and the start/busy interface are this design's choices.
//
// Timing: start in cycle 0 -> generator output from cycle 2 -> first result
// (out_valid) from cycle 3, then one result per cycle for NUM_MAT cycles.
module svd_top
  import svd_pkg::*;
#(
  parameter int unsigned DW      = DATA_W,
  parameter int unsigned NUM_MAT = 16,
  localparam int unsigned IDX_W  = (NUM_MAT > 1) ? $clog2(NUM_MAT) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  out_valid,
  output logic                  out_last,
  output logic [IDX_W-1:0]      out_index,
  output logic signed [DW-1:0]  out_a,     // the matrix this result belongs to
  output logic signed [DW-1:0]  out_b,
  output logic signed [DW-1:0]  out_c,
  output logic signed [DW-1:0]  out_d,
  output logic signed [DW+1:0]  sv1,
  output logic signed [DW+1:0]  sv2,
  output logic signed [DW+1:0]  off12,
  output logic signed [DW+1:0]  off21,
  output logic signed [ANG_W-1:0] theta_r,
  output logic signed [ANG_W-1:0] theta_l
);

  logic                 g_valid, g_last;
  logic [IDX_W-1:0]     g_index;
  logic signed [DW-1:0] g_a, g_b, g_c, g_d;

  matrix_gen #(.DW(DW), .NUM_MAT(NUM_MAT)) u_gen (
    .clk, .rst_n, .start, .busy,
    .valid(g_valid), .last(g_last), .index(g_index),
    .a(g_a), .b(g_b), .c(g_c), .d(g_d)
  );

  svd2x2 #(.DW(DW)) u_svd (
    .clk, .rst_n,
    .in_valid(g_valid), .a(g_a), .b(g_b), .c(g_c), .d(g_d),
    .out_valid, .sv1, .sv2, .off12, .off21, .theta_r, .theta_l
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_last  <= 1'b0;
      out_index <= '0;
      out_a     <= '0;
      out_b     <= '0;
      out_c     <= '0;
      out_d     <= '0;
    end else begin
      out_last <= g_valid & g_last;
      if (g_valid) begin
        out_index <= g_index;
        out_a     <= g_a;
        out_b     <= g_b;
        out_c     <= g_c;
        out_d     <= g_d;
      end
    end
  end

endmodule
