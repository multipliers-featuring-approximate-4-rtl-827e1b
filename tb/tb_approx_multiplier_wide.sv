// tb_approx_multiplier_wide: the 16-bit and 32-bit versions of the
// approximate multiplier (8 and 16 truncated columns), with random operands
// and operands with many ones, against the reference model. Counts
// error-recovery carries and compressor errors, which must both occur.
module tb_approx_multiplier_wide;
  import approx_mult_ref_pkg::*;

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  int checks = 0, failures = 0;
  int n_er16 = 0, n_er32 = 0, n_cmp = 0;

  approx_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .product(p16));
  approx_multiplier #(.N(32)) dut32 (.a(a32), .b(b32), .product(p32));

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_result_t r16, r32;
    for (int v = 0; v < 20000; v++) begin
      if (v % 4 == 0) begin
        a16 = 16'($urandom() | $urandom()); b16 = 16'($urandom() | $urandom());
        a32 = $urandom() | $urandom();      b32 = $urandom() | $urandom();
      end else begin
        a16 = 16'($urandom()); b16 = 16'($urandom());
        a32 = $urandom();      b32 = $urandom();
      end
      #1;
      r16 = ref_multiply(64'(a16), 64'(b16), 16, 8);
      r32 = ref_multiply(64'(a32), 64'(b32), 32, 16);
      n_er16 += (r16.er_carries > 0);
      n_er32 += (r32.er_carries > 0);
      n_cmp  += (r32.cmp_errors > 0);
      checks += 2;
      if (64'(p16) != r16.product) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit a=%h b=%h got %h expected %h", a16, b16, p16, r16.product);
      end
      if (p32 != r32.product) begin
        failures++;
        if (failures < 10) $display("FAIL 32-bit a=%h b=%h got %h expected %h", a32, b32, p32, r32.product);
      end
    end
    $display("mechanisms: error_recovery16=%0d error_recovery32=%0d compressor_error32=%0d", n_er16, n_er32, n_cmp);
    checks++; if (n_er16 == 0) failures++;
    checks++; if (n_er32 == 0) failures++;
    checks++; if (n_cmp == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
