// peres_gate_q: the Peres gate built from four 2x2 quantum gates.
//
// Lines, top to bottom: A, B and the target line C. The gates, in order:
//   1. controlled-V+ : control A, target C
//   2. controlled-V+ : control B, target C
//   3. CNOT          : control A, target B      (B line becomes A xor B)
//   4. controlled-V  : control A xor B, target C
// The C line receives -A - B + (A xor B) quarter turns: 2 (a NOT) when
// A = B = 1, and 0 otherwise, so R = (A and B) xor C. Quantum cost 4, delay 4.
// The Peres gate is the inverse of the TR gate, so placing this module after
// tr_gate_q restores A, B and C.
//
// Interface as tr_gate_q: A and B classical, C and R carried as
// rev_pkg::qturn_t, P = A, Q = A xor B. Purely combinational. Gate order and
// controls follow the published realisation of the Peres gate.
module peres_gate_q
  import rev_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  qturn_t c,
  output logic   p,  // A
  output logic   q,  // A xor B
  output qturn_t r   // (A and B) xor C
);
  localparam int QUANTUM_COST = 4;
  localparam int DELAY        = 4;

  logic   a1, b2, a3, q4;
  logic   bx;
  qturn_t c1, c2;

  cv_gate #(.DAGGER(1'b1)) g1_cvdag (.ctrl(a),  .tin(c),  .ctrl_out(a1), .tout(c1));
  cv_gate #(.DAGGER(1'b1)) g2_cvdag (.ctrl(b),  .tin(c1), .ctrl_out(b2), .tout(c2));
  feynman_gate             g3_cnot  (.a(a1),    .b(b2),   .p(a3),        .q(bx));
  cv_gate #(.DAGGER(1'b0)) g4_cv    (.ctrl(bx), .tin(c2), .ctrl_out(q4), .tout(r));

  assign p = a3;
  assign q = q4;
endmodule
