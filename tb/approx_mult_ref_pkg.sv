// approx_mult_ref_pkg: software reference of the approximate multiplier,
// written independently of the RTL structure for the testbenches.
//
// The accurate region (columns >= N) only ever adds exactly, so it is
// modelled as an integer sum. Only the approximate region (columns
// TRUNC..N-1) is reduced bit by bit, with the compressor taken from its
// truth table (value = 2*carry + sum for inputs x4x3x2x1) rather than from
// its equations. Carries leaving column N-1 and error-recovery carries are
// added at weight 2^N.
package approx_mult_ref_pkg;

  // 2*carry + sum of the proposed compressor, indexed by {x4,x3,x2,x1}.
  localparam int CMP_VALUE [16] = '{0, 1, 1, 2, 1, 2, 2, 3, 1, 2, 2, 3, 1, 2, 2, 3};

  typedef struct {
    longint unsigned product;
    int              er_carries;     // error-recovery carries that were 1
    int              cmp_errors;     // approximate-compressor error events (all steps)
    int              trunc_bits;     // nonzero partial-product bits dropped
  } ref_result_t;

  function automatic ref_result_t ref_multiply(input longint unsigned a, input longint unsigned b,
                                               input int n, input int trunc);
    ref_result_t r;
    bit rows [64][65];
    bit nrow [64][65];
    int nrows;
    longint unsigned hi;
    r.product = 0; r.er_carries = 0; r.cmp_errors = 0; r.trunc_bits = 0;
    hi = 0;
    foreach (rows[i, k]) rows[i][k] = 1'b0;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        bit p;
        p = a[j] & b[i];
        if (i + j >= n)          hi += longint'(p) << (i + j);
        else if (i + j >= trunc) rows[i][i+j] = p;
        else                     r.trunc_bits += int'(p);
      end
    end
    // Error recovery from the first step, column n-1.
    for (int p = 0; p < n / 8; p++) begin
      bit e0, e1;
      e0 = rows[8*p+2][n-1] & rows[8*p+3][n-1];
      e1 = rows[8*p+6][n-1] & rows[8*p+7][n-1];
      if (e0 | e1) begin
        hi += longint'(1) << n;
        r.er_carries++;
      end
    end
    nrows = n;
    while (nrows > 2) begin
      foreach (nrow[i, k]) nrow[i][k] = 1'b0;
      for (int g = 0; g < nrows / 4; g++) begin
        for (int k = trunc; k < n; k++) begin
          int idx, v;
          idx = int'({rows[4*g+3][k], rows[4*g+2][k], rows[4*g+1][k], rows[4*g][k]});
          v = CMP_VALUE[idx];
          if (rows[4*g+3][k] && rows[4*g+2][k]) r.cmp_errors++;
          nrow[2*g][k] = v[0];
          if (k + 1 == n) hi += longint'(v[1]) << n;
          else            nrow[2*g+1][k+1] = v[1];
        end
      end
      rows = nrow;
      nrows = nrows / 2;
    end
    r.product = hi;
    for (int k = trunc; k < n; k++)
      r.product += (longint'(rows[0][k]) + longint'(rows[1][k])) << k;
    if (n < 32) r.product &= (longint'(1) << (2 * n)) - 1;
    return r;
  endfunction

endpackage
