// peres_gate: the 3x3 Peres reversible gate, as a Boolean mapping.
//
// (A, B, C) -> (P = A, Q = A xor B, R = (A and B) xor C).
// Working the TR gate backwards (A = P, B = P xor Q, C = R xor (P and Q))
// gives exactly this mapping, so a Peres gate placed after a TR gate returns
// the TR gate's inputs. Purely combinational; peres_gate_q builds the same
// gate from controlled-V, controlled-V+ and CNOT gates.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // A
  output logic q,  // A xor B
  output logic r   // (A and B) xor C
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
