// tb_final_adder: random and corner-case test of the final carry-propagate
// adder at 16 bits (sum modulo 2^16).
module tb_final_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.*);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 5000; v++) begin
      int unsigned x, y;
      if (v < 4) begin
        x = (v & 1) ? 32'hFFFF : 0;
        y = (v & 2) ? 32'hFFFF : 1;
      end else begin
        x = $urandom() & 32'hFFFF;
        y = $urandom() & 32'hFFFF;
      end
      a = W'(x); b = W'(y); #1;
      checks++;
      if (int'(s) != int'((x + y) & 32'hFFFF)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d = %0d", x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
