// full_sub_opt: optimised reversible full subtractor, 6 quantum gates.
//
// full_sub_q has a controlled-V and a controlled-V+ in series on the target
// line with the same control (A xor B); V followed by V+ is the identity, so
// both are dropped. What is left, lines C, B, A and a target starting at 0:
//   1. controlled-V+ : control A,             target
//   2. CNOT          : control B, target A    (A line becomes A xor B)
//   3. controlled-V  : control B,             target
//   4. CNOT          : control C, target A    (A line becomes A xor B xor C)
//   5. controlled-V  : control C,             target
//   6. controlled-V  : control A xor B xor C, target
// The target receives -A + B + C + (A xor B xor C) quarter turns, which is
// 2 (a 1) exactly when the borrow of A - B - C is 1 and 0 otherwise.
// Outputs: Q = C, P = B, R = A xor B xor C (difference), S = borrow.
// Quantum cost 6, delay 6, no garbage outputs.
//
// Interface: a, b, c in; diff, borr, p, q out. Purely combinational. An
// assertion checks that the target ends in a basis state. Gate order and
// controls are the published ones; the encoding is this design's own.
module full_sub_opt
  import rev_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,     // regenerated B
  output logic q,     // regenerated C
  output logic diff,  // A xor B xor C
  output logic borr   // borrow out
);
  localparam int QUANTUM_COST = 6;
  localparam int DELAY        = 6;

  logic   a1, b2, axb, b3, c4, axbxc, c5, x6;
  qturn_t t1, t3, t5, t6;

  cv_gate #(.DAGGER(1'b1)) g1_cvdag (.ctrl(a),     .tin(QT_ZERO), .ctrl_out(a1), .tout(t1));
  feynman_gate             g2_cnot  (.a(b),        .b(a1),        .p(b2),        .q(axb));
  cv_gate #(.DAGGER(1'b0)) g3_cv    (.ctrl(b2),    .tin(t1),      .ctrl_out(b3), .tout(t3));
  feynman_gate             g4_cnot  (.a(c),        .b(axb),       .p(c4),        .q(axbxc));
  cv_gate #(.DAGGER(1'b0)) g5_cv    (.ctrl(c4),    .tin(t3),      .ctrl_out(c5), .tout(t5));
  cv_gate #(.DAGGER(1'b0)) g6_cv    (.ctrl(axbxc), .tin(t5),      .ctrl_out(x6), .tout(t6));

  assign p    = b3;
  assign q    = c5;
  assign diff = x6;
  assign borr = qt_to_bit(t6);

  always_comb begin
    assert final (qt_is_basis(t6))
      else $error("full_sub_opt: target line left in a non-basis state %0d", t6);
  end
endmodule
