// tr_gate_q: the TR gate built from four 2x2 quantum gates.
//
// Lines, top to bottom: A, B and the target line C. The gates, in order:
//   1. controlled-V+ : control B, target C
//   2. CNOT          : control A, target B      (B line becomes A xor B)
//   3. controlled-V  : control A, target C
//   4. controlled-V  : control A xor B, target C
// The C line thus receives -B + A + (A xor B) quarter turns. That sum is 2
// (a NOT) exactly when A = 1 and B = 0, and 0 otherwise, so the line leaves as
// R = (A and not B) xor C; for A = B = 1 the V+ of gate 1 and the V of gate 3
// cancel. Quantum cost 4, delay 4 (four gates in sequence).
//
// Interface: A and B are classical; C and R are rev_pkg::qturn_t so that the
// target line can be chained straight into further V gates, as the full
// subtractor does. P = A, Q = A xor B. Purely combinational.
// The gate order and controls follow the published quantum realisation of the
// TR gate; the quarter-turn encoding of the target line is this design's own.
module tr_gate_q
  import rev_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  qturn_t c,
  output logic   p,  // A
  output logic   q,  // A xor B
  output qturn_t r   // (A and not B) xor C
);
  localparam int QUANTUM_COST = 4;
  localparam int DELAY        = 4;

  logic   b1, a2;      // control lines after gates 1 and 2
  logic   a3, q4;      // control lines after gates 3 and 4
  logic   bx;          // B line after the CNOT: A xor B
  qturn_t c1, c3;      // target line after gates 1 and 3

  cv_gate #(.DAGGER(1'b1)) g1_cvdag (.ctrl(b),  .tin(c),  .ctrl_out(b1), .tout(c1));
  feynman_gate             g2_cnot  (.a(a),     .b(b1),   .p(a2),        .q(bx));
  cv_gate #(.DAGGER(1'b0)) g3_cv    (.ctrl(a2), .tin(c1), .ctrl_out(a3), .tout(c3));
  cv_gate #(.DAGGER(1'b0)) g4_cv    (.ctrl(bx), .tin(c3), .ctrl_out(q4), .tout(r));

  assign p = a3;
  assign q = q4;
endmodule
