// tb_compressor_group: random test of one 4-row to 2-row compression step
// for the 8-bit multiplier (4 truncated columns, approximate columns 4..7,
// accurate columns 8..15). For random rows (zero in the truncated columns)
// and random er_cin it checks
//   - nothing appears in the truncated columns of the outputs;
//   - each approximate column k gives the truth-table value of the
//     proposed compressor in sum_row[k] and carry_row[k+1];
//   - sum_row + carry_row equals the sum of the four rows, plus er_cin at
//     weight 2^8, minus 2^k for each approximate column k with x3 = x4 = 1
//     (modulo 2^16);
//   - det_x3 / det_x4 are rows 2 and 3 at column 7.
module tb_compressor_group;
  localparam int N = 8, T = 4, W = 16;
  localparam int CMP_VALUE [16] = '{0, 1, 1, 2, 1, 2, 2, 3, 1, 2, 2, 3, 1, 2, 2, 3};

  logic [3:0][W-1:0] rows_in;
  logic              er_cin;
  logic [W-1:0]      sum_row, carry_row;
  logic              det_x3, det_x4;
  int checks = 0, failures = 0;

  compressor_group #(.N(N), .TRUNC(T)) dut (.*);

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s: rows=%h er_cin=%b sum=%h carry=%h", what, rows_in, er_cin, sum_row, carry_row);
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 20000; v++) begin
      int unsigned expected, got;
      for (int r = 0; r < 4; r++) rows_in[r] = W'($urandom()) & ~W'((1 << T) - 1);
      er_cin = 1'($urandom());
      #1;
      expected = 0;
      for (int r = 0; r < 4; r++) expected += rows_in[r];
      expected += int'(er_cin) << N;
      for (int k = T; k < N; k++) begin
        int idx;
        idx = {rows_in[3][k], rows_in[2][k], rows_in[1][k], rows_in[0][k]};
        if (rows_in[3][k] && rows_in[2][k]) expected -= 1 << k;
        checks++;
        if ({carry_row[k+1], sum_row[k]} != 2'(CMP_VALUE[idx])) fail($sformatf("approximate column %0d", k));
      end
      got = sum_row + carry_row;
      checks++;
      if ((got & 32'hFFFF) != (expected & 32'hFFFF)) fail("total value");
      checks++;
      if (sum_row[T-1:0] != '0 || carry_row[T:0] != '0) fail("truncated columns");
      checks++;
      if (det_x3 != rows_in[2][N-1] || det_x4 != rows_in[3][N-1]) fail("detection outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
