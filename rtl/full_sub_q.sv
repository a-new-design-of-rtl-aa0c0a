// full_sub_q: the two-TR full subtractor at quantum-gate level, 8 gates.
//
// Lines, top to bottom: C, B, A and a target line starting at 0. Two tr_gate_q
// instances in series, the second taking the first's target line directly:
//   1. controlled-V+ : control A,             target
//   2. CNOT          : control B, target A    (A line becomes A xor B)
//   3. controlled-V  : control B,             target
//   4. controlled-V  : control A xor B,       target
//   5. controlled-V+ : control A xor B,       target
//   6. CNOT          : control C, target A    (A line becomes A xor B xor C)
//   7. controlled-V  : control C,             target
//   8. controlled-V  : control A xor B xor C, target
// Outputs: Q = C, P = B, R = A xor B xor C (difference) and
// S = (C and not (A xor B)) xor ((not A) and B) (borrow). Quantum cost 8,
// delay 8. Gates 4 and 5 share a control and cancel; full_sub_opt removes them.
//
// Interface: a, b, c in; diff, borr, p, q out. Purely combinational. An
// assertion checks that the target line ends in a basis state. The structure
// is the published one; the quarter-turn encoding is this design's own.
module full_sub_q
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
  localparam int QUANTUM_COST = 8;
  localparam int DELAY        = 8;

  logic   axb;
  qturn_t t_mid, t_out;

  tr_gate_q u_tr1 (.a(b), .b(a),   .c(QT_ZERO), .p(p), .q(axb),  .r(t_mid));
  tr_gate_q u_tr2 (.a(c), .b(axb), .c(t_mid),   .p(q), .q(diff), .r(t_out));

  assign borr = qt_to_bit(t_out);

  always_comb begin
    assert final (qt_is_basis(t_out))
      else $error("full_sub_q: target line left in a non-basis state %0d", t_out);
  end
endmodule
