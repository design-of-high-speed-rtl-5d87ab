// skip_logic: carry skip gate of one stage, built as AND/NAND plus an AOI or
// OAI compound gate.
//
// The stage's carry out is CO_j = C_j | (&Z_j & CO_{j-1}): a carry generated
// inside the stage (C_j) passes out directly, and when every bit of the
// stage's intermediate result Z_j is one the incoming carry skips over the
// stage. The logic avoids inverters by alternating polarity along the chain,
// as in the published block diagram:
//   GATE = SKIP_AOI: inputs C_j and CO_{j-1} true, product &Z_j from an AND
//                    gate, co = ~(C_j | (&Z_j & CO_{j-1}))  (complemented out)
//   GATE = SKIP_OAI: inputs ~C_j and ~CO_{j-1}, product from a NAND gate,
//                    co = ~(~C_j & (~CO_{j-1} | ~&Z_j))     (true out)
// Both give the same carry function; only the polarity differs.
//
// Combinational: one AND/NAND level and one compound gate.
module skip_logic
  import cska_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter skip_gate_e  GATE = SKIP_AOI
) (
  input  logic [M-1:0] z,        // intermediate result Z_j of the stage
  input  logic         c_blk,    // C_j (AOI) or ~C_j (OAI)
  input  logic         co_prev,  // CO_{j-1} (AOI) or ~CO_{j-1} (OAI)
  output logic         co        // ~CO_j (AOI) or CO_j (OAI)
);

  if (GATE == SKIP_AOI) begin : g_aoi
    logic z_and;
    assign z_and = &z;
    assign co    = ~(c_blk | (z_and & co_prev));
  end else begin : g_oai
    logic z_nand;
    assign z_nand = ~&z;
    assign co     = ~(c_blk & (co_prev | z_nand));
  end

endmodule
