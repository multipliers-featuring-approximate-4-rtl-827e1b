// tb_approx_compressor42: exhaustive test of the proposed approximate 4-2
// compressor against its truth table (carry, sum for inputs x4x3x2x1), and
// of its error profile: the result 2*carry + sum equals the input count
// except when x3 = x4 = 1, where it is exactly one less.
module tb_approx_compressor42;
  logic x1, x2, x3, x4, carry, sum;
  int checks = 0, failures = 0;

  // {carry, sum} for x4x3x2x1 = 0000 .. 1111.
  localparam logic [1:0] TABLE [16] = '{
    2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10, 2'b11,
    2'b01, 2'b10, 2'b10, 2'b11, 2'b01, 2'b10, 2'b10, 2'b11};

  approx_compressor42 dut (.*);

  initial begin
    #10000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int diff;
      {x4, x3, x2, x1} = 4'(v);
      #1;
      checks++;
      if ({carry, sum} != TABLE[v]) begin
        failures++;
        $display("FAIL table: x4x3x2x1=%b got %b%b expected %b", 4'(v), carry, sum, TABLE[v]);
      end
      diff = 2 * int'(carry) + int'(sum) - $countones(4'(v));
      checks++;
      if (diff != ((x3 && x4) ? -1 : 0)) begin
        failures++;
        $display("FAIL error profile: x4x3x2x1=%b difference %0d", 4'(v), diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
