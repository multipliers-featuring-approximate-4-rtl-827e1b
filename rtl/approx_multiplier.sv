// approx_multiplier: unsigned N x N approximate multiplier built from the
// proposed approximate 4-2 compressor and an error-recovery module.
//
// Phase 1: pp_generator forms the N partial-product rows and drops the
// truncated region (columns 0..TRUNC-1).
// Phase 2: log2(N)-1 steps of 4-2 compression. Step s takes N>>(s-1) rows in
// groups of four (rows 4g..4g+3) and gives two rows per group (sum row 2g,
// carry row 2g+1). Approximate compressors are used in columns TRUNC..N-1,
// exact ones in columns N..2N-1, in every step. In the first step, the
// compressors in column N-1 report x3 & x4 (their only error case, always
// -1); error_recovery ORs these in pairs, and the OR of groups 2p and 2p+1
// becomes the carry-in of column N of group 2p+1.
// Phase 3: final_adder adds the last two rows.
// Interface: a, b in, product out, all combinational (no clock, no latency).
// Grouping consecutive rows, using approximate compressors in every step and
// correcting only the first step are this design's reading of the method.
// N must be a power of two, at least 8. N = 8 with TRUNC = 4 is the
// 8-bit design; the TRUNC = N/2 default for other N is this design's choice.
module approx_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned TRUNC = N / 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] product
);
  localparam int unsigned W       = 2 * N;
  localparam int unsigned STAGES  = num_stages(N);
  localparam int unsigned NGROUPS = N / 4;   // groups in the first step

  logic [N-1:0][W-1:0]  pp;
  logic [NGROUPS-1:0]   det_x3, det_x4;
  logic [NGROUPS-1:0]   err_detect;
  logic [NGROUPS/2-1:0] er_carry;

  pp_generator #(.N(N), .TRUNC(TRUNC)) u_pp (
    .a (a),
    .b (b),
    .pp(pp)
  );

  error_recovery #(.NGROUPS(NGROUPS)) u_er (
    .x3        (det_x3),
    .x4        (det_x4),
    .err_detect(err_detect),
    .er_carry  (er_carry)
  );

  // Step s reduces the N>>(s-1) rows of rows_in to the N>>s rows of rows_out.
  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    localparam int unsigned G = N >> (s + 1);   // groups in this step
    logic [W-1:0] rows_in  [4*G];
    logic [W-1:0] rows_out [2*G];

    for (genvar r = 0; r < 4 * G; r++) begin : g_in
      if (s == 1) begin : g_pp
        assign rows_in[r] = pp[r];
      end else begin : g_prev
        assign rows_in[r] = g_stage[s-1].rows_out[r];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_grp
      logic cin;
      if (s == 1 && (g % 2) == 1) begin : g_er
        assign cin = er_carry[g/2];
      end else begin : g_noer
        assign cin = 1'b0;
      end
      logic x3, x4;   // inputs x3, x4 of this group's column N-1 compressor
      compressor_group #(.N(N), .TRUNC(TRUNC)) u_grp (
        .rows_in  ({rows_in[4*g+3], rows_in[4*g+2], rows_in[4*g+1], rows_in[4*g]}),
        .er_cin   (cin),
        .sum_row  (rows_out[2*g]),
        .carry_row(rows_out[2*g+1]),
        .det_x3   (x3),
        .det_x4   (x4)
      );
      if (s == 1) begin : g_det   // only the first step feeds error recovery
        assign det_x3[g] = x3;
        assign det_x4[g] = x4;
      end
    end
  end

  final_adder #(.W(W)) u_add (
    .a(g_stage[STAGES].rows_out[0]),
    .b(g_stage[STAGES].rows_out[1]),
    .s(product)
  );
endmodule
