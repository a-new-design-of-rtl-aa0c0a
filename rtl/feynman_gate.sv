// feynman_gate: the 2x2 Feynman gate, also called controlled-NOT (CNOT).
//
// Maps (A, B) to (P = A, Q = A xor B): the control line A passes through and
// the target line B is inverted when A is 1. It is reversible (applying it
// twice restores B) and counts as quantum cost 1 and delay 1 (one unit of
// logic depth). Purely combinational, no clock.
//
// The mapping is the one the circuit literature defines for this gate; in this
// design it is used only with classical values on both lines.
module feynman_gate (
  input  logic a,  // control
  input  logic b,  // target
  output logic p,  // P = A
  output logic q   // Q = A xor B
);
  assign p = a;
  assign q = a ^ b;
endmodule
