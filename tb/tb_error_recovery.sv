// tb_error_recovery: exhaustive test of the error detection and recovery
// logic with 8 groups (the 32-bit multiplier): err_detect[g] = x3[g] & x4[g],
// er_carry[p] = err_detect[2p] | err_detect[2p+1].
module tb_error_recovery;
  localparam int G = 8;
  logic [G-1:0]   x3, x4, err_detect;
  logic [G/2-1:0] er_carry;
  int checks = 0, failures = 0;

  error_recovery #(.NGROUPS(G)) dut (.*);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * G)); v++) begin
      logic [G-1:0]   e;
      logic [G/2-1:0] c;
      {x3, x4} = (2*G)'(v);
      #1;
      for (int g = 0; g < G; g++) e[g] = (x3[g] == 1'b1) && (x4[g] == 1'b1);
      for (int p = 0; p < G / 2; p++) c[p] = e[2*p] || e[2*p+1];
      checks++;
      if (err_detect != e || er_carry != c) begin
        failures++;
        if (failures < 10)
          $display("FAIL x3=%b x4=%b detect=%b carry=%b expected %b %b", x3, x4, err_detect, er_carry, e, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
