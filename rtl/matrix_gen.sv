// matrix_gen: random 2x2 matrix generator feeding the SVD core.
//
// A look-up table holds NUM_MAT test matrices. After a start pulse a counter
// steps through the table, one matrix per clock, and a multiplexer selects the
// entries of the matrix the counter points at; the count of matrices to
// generate sets the counter's range. The table, counter and multiplexer follow
// the original design. Its table was filled offline with random numbers; here the
// table is filled at elaboration with a fixed pseudo-random sequence, so no
// data file is needed:
//   s(0) = SEED, s(n+1) = (1103515245 * s(n) + 12345) mod 2^31,
//   entry n = bits [30 -: DW] of s(n+1) as a signed number (the most
//   negative value is replaced by its neighbour so that -x never overflows),
//   matrix k = {a, b, c, d} = entries 4k, 4k+1, 4k+2, 4k+3.
// Table size and seed are this design's choice.
//
// Interface: start (a pulse while idle) begins a run; busy is high while the
// run lasts. Outputs are registered: valid is high for NUM_MAT consecutive
// cycles, index numbers the matrix on a..d, and last marks the final one.
// A start while busy is ignored.
module matrix_gen
  import svd_pkg::*;
#(
  parameter int unsigned DW      = DATA_W,
  parameter int unsigned NUM_MAT = 16,
  parameter int unsigned SEED    = 20180401,
  localparam int unsigned IDX_W  = (NUM_MAT > 1) ? $clog2(NUM_MAT) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   valid,
  output logic                   last,
  output logic [IDX_W-1:0]       index,
  output logic signed [DW-1:0]   a,
  output logic signed [DW-1:0]   b,
  output logic signed [DW-1:0]   c,
  output logic signed [DW-1:0]   d
);

  typedef logic signed [DW-1:0] entry_t;
  typedef entry_t table_t [4*NUM_MAT];

  function automatic table_t make_table();
    table_t t;
    logic [30:0] s;
    entry_t v;
    s = 31'(SEED);
    for (int n = 0; n < 4 * NUM_MAT; n++) begin
      s = 31'(64'd1103515245 * 64'(s) + 64'd12345);
      v = entry_t'(s[30 -: DW]);
      if (v == {1'b1, {(DW-1){1'b0}}}) v = v + 1'b1;
      t[n] = v;
    end
    return t;
  endfunction

  localparam table_t LUT = make_table();

  logic [IDX_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      valid <= 1'b0;
      last  <= 1'b0;
      index <= '0;
      a     <= '0;
      b     <= '0;
      c     <= '0;
      d     <= '0;
    end else begin
      valid <= busy;
      last  <= 1'b0;
      if (busy) begin
        // Multiplexer: the counter selects one matrix of the table.
        a     <= LUT[4*cnt];
        b     <= LUT[4*cnt + 1];
        c     <= LUT[4*cnt + 2];
        d     <= LUT[4*cnt + 3];
        index <= cnt;
        if (cnt == IDX_W'(NUM_MAT - 1)) begin
          busy <= 1'b0;
          last <= 1'b1;
          cnt  <= '0;
        end else begin
          cnt  <= cnt + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end

  // Handshake rules: 'last' only on a valid matrix, and a matrix only after a
  // cycle in which the generator was busy.
  a_last_valid: assert property (@(posedge clk) disable iff (!rst_n) last |-> valid)
    else $error("matrix_gen: last without valid");
  a_valid_busy: assert property (@(posedge clk) disable iff (!rst_n) valid |-> $past(busy))
    else $error("matrix_gen: valid without a busy cycle before it");

  initial begin
    assert (DW <= 31) else $error("matrix_gen: DW must not exceed 31");
  end

endmodule
