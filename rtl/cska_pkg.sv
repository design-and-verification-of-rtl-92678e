// cska_pkg: types shared by the CI-CSKA carry-skip adder.
//
// skip_gate_e names the two compound gates that form the skip logic. The
// skip chain alternates between them: an AND-OR-Invert (AOI) gate takes the
// true carry and delivers its complement, and the OR-AND-Invert (OAI) gate
// of the next stage takes that complement and delivers the true carry again,
// so no inverter sits in the skip path. Stage 2 uses AOI, stage 3 OAI, and so
// on: even stages hand on the complemented carry.
package cska_pkg;

  typedef enum logic {
    SKIP_AOI = 1'b0,  // true carry in, complemented carry out
    SKIP_OAI = 1'b1   // complemented carry in, true carry out
  } skip_gate_e;

  // Skip gate of stage j (stages counted from 1; stage 1 has no skip gate).
  function automatic skip_gate_e skip_gate_of_stage(int unsigned j);
    return (j % 2 == 0) ? SKIP_AOI : SKIP_OAI;
  endfunction

endpackage
