// tr_gate: the 3x3 TR reversible gate, as a Boolean mapping.
//
// (A, B, C) -> (P = A, Q = A xor B, R = (A and not B) xor C).
// With C = 0 the gate alone gives the borrow of a half subtractor, which is
// what it was devised for. The mapping is one-to-one on the eight input
// vectors; its inverse is the Peres gate (see peres_gate). Purely
// combinational. This is the gate's function only; tr_gate_q builds the same
// gate from controlled-V, controlled-V+ and CNOT gates.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // A
  output logic q,  // A xor B
  output logic r   // (A and not B) xor C
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
