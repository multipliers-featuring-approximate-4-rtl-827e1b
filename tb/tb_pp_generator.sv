// tb_pp_generator: exhaustive test of the 8-bit partial-product generator
// with 4 truncated columns. Checks every bit of every row against
// a[k-i] & b[i] (zero outside the row and in the truncated columns), and
// that the rows plus the dropped bits add up to a*b.
module tb_pp_generator;
  localparam int N = 8, T = 4;
  logic [N-1:0]          a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  pp_generator #(.N(N), .TRUNC(T)) dut (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int bad, total, dropped;
        a = N'(x); b = N'(y); #1;
        bad = 0; total = 0; dropped = 0;
        for (int i = 0; i < N; i++) begin
          for (int k = 0; k < 2 * N; k++) begin
            int bit_exp;
            bit_exp = (k - i >= 0 && k - i < N) ? ((x >> (k - i)) & (y >> i) & 1) : 0;
            if (k < T) begin
              dropped += bit_exp << k;
              bit_exp = 0;
            end
            if (int'(pp[i][k]) != bit_exp) bad++;
            total += int'(pp[i][k]) << k;
          end
        end
        checks++;
        if (bad != 0 || total + dropped != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d bad bits=%0d", x, y, bad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
