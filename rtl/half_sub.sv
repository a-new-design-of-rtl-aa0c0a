// half_sub: reversible half subtractor made of a single TR gate.
//
// Computes A - B for single bits: Diff = A xor B, Borr = (not A) and B.
// The TR gate is fed (B, A, 0), i.e. B on its first line, A on its second and
// a constant 0 on the target line, so its outputs are P = B, Q = A xor B and
// R = B and not A. The circuit underneath is tr_gate_q: controlled-V+,
// CNOT, controlled-V, controlled-V, giving quantum cost 4, delay 4 and no
// garbage outputs (P only regenerates the input B).
//
// Interface: a, b in; diff, borr out, plus p = b. Purely combinational.
// The target line always ends in a basis state for classical inputs; an
// assertion checks that. The gate structure is the published one; the
// assertion and port names are this design's own.
module half_sub
  import rev_pkg::*;
(
  input  logic a,     // minuend
  input  logic b,     // subtrahend
  output logic p,     // regenerated B
  output logic diff,  // A xor B
  output logic borr   // (not A) and B
);
  localparam int QUANTUM_COST = 4;
  localparam int DELAY        = 4;

  qturn_t r_line;

  tr_gate_q u_tr (.a(b), .b(a), .c(QT_ZERO), .p(p), .q(diff), .r(r_line));

  assign borr = qt_to_bit(r_line);

  always_comb begin
    assert final (qt_is_basis(r_line))
      else $error("half_sub: target line left in a non-basis state %0d", r_line);
  end
endmodule
