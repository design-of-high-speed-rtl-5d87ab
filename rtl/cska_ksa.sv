// cska_ksa: N-bit concatenation-incrementation carry skip adder (CI-CSKA)
// with Kogge-Stone adders in its stages, fixed stage size M.
//
// sum = a + b + cin (N bits), cout = carry out of the top bit.
//
// The N bits are split into Q = N/M stages of M bits. Stage 1 (bits
// M-1..0) is a Kogge-Stone adder with the external carry in; its carry out
// is CO_1. Each stage j = 2..Q (cska_stage) adds its slices with carry in 0,
// all stages at the same time, and then corrects its result with an
// incrementer driven by CO_{j-1}. The carries CO_j run along a chain of one
// compound gate per stage, alternating AOI (even j, output complemented) and
// OAI (odd j, output true), so the worst-case path is: stage 1 adder, Q-1
// skip gates, one incrementer. When the last stage is an AOI stage (Q even)
// its complemented carry is inverted once to give cout; at the default Q = 5
// the last stage is OAI and cout comes straight from its gate.
//
// The defaults, a 20-bit adder in five 4-bit stages, are those of the
// published design (the stage size read from its simulation waveform); the
// split into equal stages is its fixed stage size form. N must be a
// multiple of M. Purely combinational: no clock, no reset, no latency.
module cska_ksa
  import cska_pkg::*;
#(
  parameter int unsigned N = 20,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned Q = N / M;

  // Elaboration-time checks on the configuration.
  if (M == 0 || N % M != 0 || Q < 1) begin : g_bad_cfg
    $error("cska_ksa: N (%0d) must be a positive multiple of M (%0d)", N, M);
  end

  // chain[j-1] is the carry out of stage j in the polarity its gate gives:
  // true after stage 1 and after OAI stages, complemented after AOI stages.
  logic [Q-1:0] chain;

  ks_adder #(.W(M)) u_stage1 (
    .a   (a[M-1:0]),
    .b   (b[M-1:0]),
    .cin (cin),
    .sum (sum[M-1:0]),
    .cout(chain[0])
  );

  for (genvar j = 2; j <= Q; j++) begin : g_stage
    cska_stage #(.M(M), .GATE(skip_gate_of(j))) u_stage (
      .a      (a[j*M-1 -: M]),
      .b      (b[j*M-1 -: M]),
      .co_prev(chain[j-2]),
      .sum    (sum[j*M-1 -: M]),
      .co     (chain[j-1])
    );
  end

  if (Q >= 2 && skip_gate_of(Q) == SKIP_AOI) begin : g_out_inv
    assign cout = ~chain[Q-1];
  end else begin : g_out_true
    assign cout = chain[Q-1];
  end

endmodule
