// compressor_group: one 4-2 compression step for a group of four rows.
//
// The four input rows (x1 = rows_in[0] .. x4 = rows_in[3]) are reduced
// column by column into a sum row and a carry row (the carry row is already
// shifted: the carry of column k lands in bit k+1). The compressor used in a
// column depends on its region (see mult_pkg):
//   - truncated columns hold no bits and produce nothing;
//   - approximate columns use approx_compressor42 (no carry-in/out);
//   - accurate columns use exact_compressor42, chained cout(k) -> cin(k+1).
//     The carry-in of the lowest accurate column (column N) is er_cin, the
//     error-recovery carry; groups that get none tie it to 0.
// det_x3 / det_x4 are the x3 and x4 inputs of the compressor in column N-1,
// the most significant approximate column, for error detection.
// Anything leaving column 2N-1 is dropped: the product is taken modulo 2^2N.
// The outputs of the truncated columns are constant 0 by construction. Using
// an exact compressor in every accurate column (absent inputs tied to 0)
// rather than hand-placed full and half adders is this design's choice; it
// gives the same sum.
// Purely combinational.
module compressor_group
  import mult_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned TRUNC = N / 2
) (
  input  logic [3:0][2*N-1:0] rows_in,
  input  logic                er_cin,
  output logic [2*N-1:0]      sum_row,
  output logic [2*N-1:0]      carry_row,
  output logic                det_x3,
  output logic                det_x4
);
  localparam int unsigned W = 2 * N;

  logic [W-1:0] sum_c;     // sum output per column
  logic [W-1:0] car_c;     // carry output per column (weight k+1)
  logic [W:0]   chain;     // exact-compressor carry chain, chain[k] = cin of column k

  assign chain[N] = er_cin;

  for (genvar k = 0; k < W; k++) begin : g_col
    if (col_region(k, N, TRUNC) == REG_TRUNC) begin : g_trunc
      assign sum_c[k] = 1'b0;
      assign car_c[k] = 1'b0;
    end else if (col_region(k, N, TRUNC) == REG_APPROX) begin : g_approx
      approx_compressor42 u_cmp (
        .x1   (rows_in[0][k]),
        .x2   (rows_in[1][k]),
        .x3   (rows_in[2][k]),
        .x4   (rows_in[3][k]),
        .carry(car_c[k]),
        .sum  (sum_c[k])
      );
    end else begin : g_exact
      exact_compressor42 u_cmp (
        .x1   (rows_in[0][k]),
        .x2   (rows_in[1][k]),
        .x3   (rows_in[2][k]),
        .x4   (rows_in[3][k]),
        .cin  (chain[k]),
        .sum  (sum_c[k]),
        .carry(car_c[k]),
        .cout (chain[k+1])
      );
    end
  end

  // Unused chain bits below the accurate region.
  assign chain[N-1:0] = '0;

  assign sum_row   = sum_c;
  assign carry_row = {car_c[W-2:0], 1'b0};
  assign det_x3    = rows_in[2][N-1];
  assign det_x4    = rows_in[3][N-1];
endmodule
