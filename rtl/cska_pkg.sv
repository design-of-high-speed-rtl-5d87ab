// cska_pkg: types shared by the carry skip adder modules.
//
// The skip chain of the adder alternates between two compound gates. An
// AND-OR-Invert (AOI) gate takes the carry in true polarity and hands the next
// stage its complement; an OR-AND-Invert (OAI) gate takes the complement and
// hands on the true carry. Stage 2 uses AOI, stage 3 OAI, and so on. The enum
// below names the gate a stage uses; skip_gate_of() gives it for a stage
// number (1-based, stage 1 has no skip gate).
package cska_pkg;

  typedef enum logic {
    SKIP_AOI = 1'b0,  // carry in true, carry out complemented
    SKIP_OAI = 1'b1   // carry in complemented, carry out true
  } skip_gate_e;

  // Gate used by stage j (j >= 2): AOI on even stages, OAI on odd ones.
  function automatic skip_gate_e skip_gate_of(int unsigned j);
    return (j % 2 == 0) ? SKIP_AOI : SKIP_OAI;
  endfunction

endpackage
