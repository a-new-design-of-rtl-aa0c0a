// full_sub: reversible full subtractor made of two TR gates (block level).
//
// Computes A - B - C for single bits: Diff = A xor B xor C and
// Borr = (not A and B) or (C and not (A xor B)).
//   TR gate 1, inputs (B, A, 0): P = B, Q = A xor B, R = (not A) and B
//   TR gate 2, inputs (C, A xor B, (not A) and B):
//       P = C, Q = A xor B xor C,
//       R = (C and not (A xor B)) xor ((not A) and B)
// The two terms of the final R are never 1 together (the first needs A = B,
// the second A != B), so the xor equals the or of the usual borrow equation.
// No garbage outputs: B and C are regenerated, Diff and Borr are used.
//
// Interface: a, b, c in; diff, borr out, plus p = b and q = c. Purely
// combinational. This module uses the Boolean tr_gate; full_sub_q is the same
// circuit at quantum-gate level and full_sub_opt its optimised form.
module full_sub (
  input  logic a,     // minuend
  input  logic b,     // subtrahend
  input  logic c,     // borrow in
  output logic p,     // regenerated B
  output logic q,     // regenerated C
  output logic diff,  // A xor B xor C
  output logic borr   // borrow out
);
  logic axb, nab;

  tr_gate u_tr1 (.a(b), .b(a),   .c(1'b0), .p(p), .q(axb),  .r(nab));
  tr_gate u_tr2 (.a(c), .b(axb), .c(nab),  .p(q), .q(diff), .r(borr));
endmodule
