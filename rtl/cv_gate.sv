// cv_gate: controlled-V gate (DAGGER = 0) or controlled-V+ gate (DAGGER = 1).
//
// When the classical control input is 0 the target passes unchanged; when it
// is 1 the target receives V (square root of NOT) or its inverse V+. The target
// is carried as rev_pkg::qturn_t, the number of V quarter turns applied to |0>
// modulo 4, so V adds 1 and V+ subtracts 1. Two V gates in series therefore
// act as NOT, and a V followed by a V+ acts as the identity, as the gate
// algebra requires. The control line is passed through as ctrl_out (P = A).
// Quantum cost 1, delay 1. Purely combinational.
//
// The gate behaviour follows its standard definition; representing the target
// state as a quarter-turn count is this design's own choice.
module cv_gate
  import rev_pkg::*;
#(
  parameter bit DAGGER = 1'b0  // 0: controlled-V, 1: controlled-V+
) (
  input  logic   ctrl,      // control line A (classical)
  input  qturn_t tin,       // target line B
  output logic   ctrl_out,  // P = A
  output qturn_t tout       // Q = A ? V(B) (or V+(B)) : B
);
  localparam qturn_t STEP = DAGGER ? 2'd3 : 2'd1;  // +1 for V, -1 (mod 4) for V+

  assign ctrl_out = ctrl;
  assign tout     = ctrl ? qturn_t'(tin + STEP) : tin;
endmodule
