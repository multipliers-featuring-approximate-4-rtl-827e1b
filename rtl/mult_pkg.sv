// mult_pkg: shared constants and helpers of the approximate multiplier.
//
// The partial-product array of an N x N unsigned multiplier has 2N columns
// (weights 2^0 .. 2^(2N-1)). The multiplier splits them into three regions:
//   - truncated region:   columns 0 .. TRUNC-1, partial products there are dropped;
//   - approximate region: columns TRUNC .. N-1, reduced by the proposed
//                         approximate 4-2 compressor;
//   - accurate region:    columns N .. 2N-1, reduced by exact 4-2 compressors.
// For N = 8 this gives the 4/4/7 split of the 8-bit design (the 16th column only
// receives carries). For other N the accurate region still starts at column N
// (the error-recovery carries enter there) and the truncated width defaults to
// N/2, which scales the 8-bit split; that default is this design's choice.
package mult_pkg;

  typedef enum logic [1:0] {
    REG_TRUNC  = 2'd0,
    REG_APPROX = 2'd1,
    REG_EXACT  = 2'd2
  } region_e;

  // Region of column k for an N-bit multiplier with TRUNC truncated columns.
  function automatic region_e col_region(input int k, input int n, input int trunc);
    if (k < trunc)  return REG_TRUNC;
    else if (k < n) return REG_APPROX;
    else            return REG_EXACT;
  endfunction

  // Number of 4-2 compression steps that take N rows down to 2: log2(N) - 1.
  function automatic int num_stages(input int n);
    return $clog2(n) - 1;
  endfunction

endpackage
