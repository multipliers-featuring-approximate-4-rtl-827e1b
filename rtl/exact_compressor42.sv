// exact_compressor42: exact 4-2 compressor of the accurate region.
//
// Adds five bits of equal weight, x1..x4 and cin, and returns them as
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// The structure is the usual XOR/XNOR-and-multiplexer form: cout depends only
// on x1..x3, never on cin, so a row of these compressors chained cout -> cin
// settles in one compressor delay (the carry moves only one column). The
// standard exact compressor is what the design uses in the accurate region;
// this gate-level form is a common textbook one.
// Purely combinational.
module exact_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x1234;

  always_comb begin
    x12   = x1 ^ x2;
    x1234 = x12 ^ x3 ^ x4;
    sum   = x1234 ^ cin;
    cout  = x12 ? x3 : x1;
    carry = x1234 ? cin : x4;
  end
endmodule
