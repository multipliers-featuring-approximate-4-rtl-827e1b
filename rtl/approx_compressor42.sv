// approx_compressor42: the proposed approximate 4-2 compressor.
//
// Compresses four equal-weight bits into a carry (weight 2) and a sum
// (weight 1) with no carry-in and no carry-out:
//   carry = x1 x2 + x1 x3 + x1 x4 + x2 x3 + x2 x4
//   sum   = (x1 ^ x2) ^ (x3 | x4)
// It is exact for every input with x3 & x4 = 0. Whenever x3 = x4 = 1 the
// output 2*carry + sum is exactly one less than x1 + x2 + x3 + x4, so the
// error is always -1 and is flagged by the single AND x3 & x4 (used by the
// error-recovery logic of the multiplier). The x3 x4 product term of the
// earlier majority-style carry is removed; that is the whole change.
// Purely combinational.
module approx_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic carry,
  output logic sum
);
  always_comb begin
    carry = (x1 & x2) | (x1 & x3) | (x1 & x4) | (x2 & x3) | (x2 & x4);
    sum   = (x1 ^ x2) ^ (x3 | x4);
  end
endmodule
