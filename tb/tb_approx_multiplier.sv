// tb_approx_multiplier: end-to-end test of the 8-bit approximate multiplier
// at its default parameters.
//
// Runs all 65536 operand pairs through the multiplier and compares each
// product with the reference model of approx_mult_ref_pkg. It also checks
// directed cases whose result is known in closed form (a multiplier of 0,
// a multiplicand of 1 where only truncation acts, operands whose partial
// products all sit in the accurate region) and counts how often each
// mechanism of the design acts: truncation dropping a 1, an approximate
// compressor error, an error-recovery carry. A mechanism that never acts
// counts as a failure. Also reports the error statistics of the exhaustive
// run: mean error distance, maximum error distance, exact outputs, mean
// and RMS of the signed error and its distribution. The multiplier is combinational; each vector is given 1 time unit.
module tb_approx_multiplier;
  import approx_mult_ref_pkg::*;

  localparam int N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;
  int n_er = 0, n_cmp = 0, n_trunc = 0, n_exact = 0;
  longint sum_ed = 0;
  longint max_ed = 0;
  real    sum_err = 0.0, sum_err2 = 0.0;   // signed error approx - exact
  int     hist [10];                       // signed error: < -256, eight bins of 64 over -256..255, > 255

  approx_multiplier dut (.a(a), .b(b), .product(product));

  task automatic check(input longint unsigned expected, input string what);
    checks++;
    if (longint'(product) != expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, product, expected);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_result_t r;
    longint ed;
    foreach (hist[h]) hist[h] = 0;
    // Directed cases.
    for (int v = 0; v < 256; v++) begin
      a = N'(v); b = '0; #1; check(0, "b=0");
      a = 8'd1;  b = N'(v); #1; check(longint'(v & 32'hF0), "a=1 keeps bits above the truncated region");
    end
    // 8'h80 * 8'h80 and similar: only accurate columns hold partial products.
    a = 8'h80; b = 8'h80; #1; check(64'h4000, "msb*msb");
    a = 8'hF0; b = 8'hF0; #1; check(64'hE100, "high nibbles");
    // Exhaustive comparison with the reference.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = N'(i); b = N'(j); #1;
        r = ref_multiply(longint'(i), longint'(j), N, N / 2);
        check(r.product, "exhaustive");
        n_er    += (r.er_carries > 0);
        n_cmp   += (r.cmp_errors > 0);
        n_trunc += (r.trunc_bits > 0);
        ed = longint'(i * j) - longint'(product);
        sum_err  += real'(-ed);
        sum_err2 += real'(ed * ed);
        if (-ed < -256)     hist[0]++;
        else if (-ed > 255) hist[9]++;
        else                hist[1 + int'((-ed + 256) / 64)]++;
        if (ed < 0) ed = -ed;
        sum_ed += ed;
        if (ed > max_ed) max_ed = ed;
        if (ed == 0) n_exact++;
      end
    end
    $display("mechanisms: truncation=%0d compressor_error=%0d error_recovery=%0d (vectors)",
             n_trunc, n_cmp, n_er);
    $display("8-bit error metrics: MED=%0.3f max ED=%0d exact outputs=%0d of 65536",
             real'(sum_ed) / 65536.0, max_ed, n_exact);
    $display("signed error: mean=%0.3f, RMS=%0.3f", sum_err / 65536.0, $sqrt(sum_err2 / 65536.0));
    $display("error distribution (approx - exact): below -256: %0d", hist[0]);
    for (int h = 1; h <= 8; h++)
      $display("  %5d .. %5d : %0d", -256 + 64 * (h - 1), -256 + 64 * h - 1, hist[h]);
    $display("  above 255: %0d", hist[9]);
    checks++; if (n_trunc == 0) begin failures++; $display("FAIL truncation never acted"); end
    checks++; if (n_cmp == 0)   begin failures++; $display("FAIL compressor error never happened"); end
    checks++; if (n_er == 0)    begin failures++; $display("FAIL error recovery never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
