// cska_stage: one stage j >= 2 of the concatenation-incrementation carry skip
// adder.
//
// The stage does not wait for the carry of the stage below. Its Kogge-Stone
// adder adds the stage's slices of A and B with carry in 0 (the concatenation
// scheme), giving the intermediate result Z_j and the block carry C_j, in
// parallel with every other stage. When the previous stage's carry CO_{j-1}
// arrives, two things happen:
//   - skip_logic forms this stage's carry CO_j = C_j | (&Z_j & CO_{j-1}),
//     one compound gate delay after CO_{j-1};
//   - incrementation_block adds CO_{j-1} to Z_j to give the final sum bits
//     (the incrementation scheme).
// GATE selects the polarity of the carry chain at this stage:
//   SKIP_AOI: co_prev is CO_{j-1}, co is ~CO_j; the block carry enters as is.
//   SKIP_OAI: co_prev is ~CO_{j-1}, co is CO_j; the block carry enters
//             complemented (the bubble on the adder's carry output in the
//             block diagram) and co_prev is inverted once more for the incrementer.
// The structure is the published one; how the complemented signals are
// wired in the OAI stages is this design's reading of the block diagram.
//
// Combinational.
module cska_stage
  import cska_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter skip_gate_e  GATE = SKIP_AOI
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         co_prev,
  output logic [M-1:0] sum,
  output logic         co
);

  logic [M-1:0] z;        // intermediate result Z_j
  logic         c_j;      // carry out of the stage's adder, C_j
  logic         c_blk;    // C_j in the polarity the skip gate takes
  logic         co_true;  // CO_{j-1} in true polarity, for the incrementer

  ks_adder #(.W(M)) u_ka (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (z),
    .cout(c_j)
  );

  if (GATE == SKIP_AOI) begin : g_aoi_pol
    assign c_blk   = c_j;
    assign co_true = co_prev;
  end else begin : g_oai_pol
    assign c_blk   = ~c_j;
    assign co_true = ~co_prev;
  end

  skip_logic #(.M(M), .GATE(GATE)) u_skip (
    .z      (z),
    .c_blk  (c_blk),
    .co_prev(co_prev),
    .co     (co)
  );

  // The incrementer's own carry out is not used: the stage carry comes from
  // the skip gate.
  incrementation_block #(.W(M)) u_inc (
    .z   (z),
    .cin (co_true),
    .sum (sum),
    .cout()
  );

endmodule
