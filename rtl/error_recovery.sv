// error_recovery: error detection and recovery for the approximate region.
//
// The first compression step has NGROUPS compressors in the most significant
// column of the approximate region (column N-1), one per group of four
// partial-product rows. Each of them is wrong, by exactly -1, when its inputs
// x3 and x4 are both 1, so detection is one 2-input AND per compressor
// (err_detect). Detections are taken in pairs (groups 2p and 2p+1) and OR'ed;
// each OR gives one carry, er_carry[p], that the multiplier feeds into the
// least significant column of the accurate region (column N). The whole
// module is a two-level AND-OR. For N = 8 there are 2 detections and 1 carry,
// for N = 16 4 and 2, for N = 32 8 and 4. Which detections share an OR is
// not fixed by the method; adjacent groups are paired here.
// Purely combinational.
module error_recovery #(
  parameter int unsigned NGROUPS = 2   // first-step groups = N/4, must be even
) (
  input  logic [NGROUPS-1:0]   x3,
  input  logic [NGROUPS-1:0]   x4,
  output logic [NGROUPS-1:0]   err_detect,
  output logic [NGROUPS/2-1:0] er_carry
);
  always_comb begin
    err_detect = x3 & x4;
    for (int p = 0; p < NGROUPS / 2; p++) begin
      er_carry[p] = err_detect[2*p] | err_detect[2*p+1];
    end
  end
endmodule
