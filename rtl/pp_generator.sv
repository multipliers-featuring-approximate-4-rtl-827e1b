// pp_generator: partial products of an unsigned N x N multiplication.
//
// Row i is (a AND b[i]) shifted left by i, laid out on a 2N-bit column grid.
// Bits that fall into the truncated region (columns below TRUNC) are not
// generated at all; they are the cheapest place to save hardware since their
// weight is lowest. Output bits outside row i's span and in the truncated
// columns are constant 0 by construction. Purely combinational.
module pp_generator #(
  parameter int unsigned N     = 8,
  parameter int unsigned TRUNC = N / 2
) (
  input  logic [N-1:0]             a,
  input  logic [N-1:0]             b,
  output logic [N-1:0][2*N-1:0]    pp
);
  localparam logic [2*N-1:0] KEEP = ~((2*N)'((64'(1) << TRUNC) - 1));

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = (((2*N)'(a & {N{b[i]}})) << i) & KEEP;
    end
  end
endmodule
