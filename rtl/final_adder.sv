// final_adder: carry-propagate adder that turns the last two rows of the
// compression tree into the product (phase 3 of the multiplier). The sum is
// taken modulo 2^W. Purely combinational; a synthesis tool maps the '+' to
// whatever adder architecture meets timing.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  assign s = a + b;
endmodule
