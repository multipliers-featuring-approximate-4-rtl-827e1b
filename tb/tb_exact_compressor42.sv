// tb_exact_compressor42: exhaustive test of the exact 4-2 compressor.
// For all 32 input combinations it checks that sum + 2*(carry + cout) equals
// the number of ones among x1..x4, cin, and that cout does not depend on cin
// (so a chained row settles without a rippling carry).
module tb_exact_compressor42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  exact_compressor42 dut (.*);

  initial begin
    #10000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0 [16];
    for (int v = 0; v < 32; v++) begin
      {cin, x4, x3, x2, x1} = 5'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(5'(v))) begin
        failures++;
        $display("FAIL value: in=%b sum=%b carry=%b cout=%b", 5'(v), sum, carry, cout);
      end
      if (cin == 1'b0) cout0[v] = cout;
      else begin
        checks++;
        if (cout != cout0[v-16]) begin
          failures++;
          $display("FAIL cout depends on cin: in=%b", 5'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
