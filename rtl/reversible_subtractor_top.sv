// reversible_subtractor_top: the TR-gate reversible subtractors side by side.
//
// Holds, each with its own ports:
//   hs_*   half subtractor, one TR gate at quantum-gate level (cost 4, delay 4)
//   fs_*   optimised full subtractor, 6 quantum gates (cost 6, delay 6); the
//          main full subtractor of the design
//   fsq_*  the same full subtractor before optimisation: two TR gates at
//          quantum-gate level, 8 quantum gates
//   fsb_*  the same full subtractor as two Boolean TR gates
//   tri_*  a TR gate followed by its inverse, the Peres gate, both at
//          quantum-gate level; tri_p/q/r are the TR outputs and
//          tri_ra/rb/rc the Peres outputs, which equal the inputs again
//   trb_*  the same TR / Peres pair as Boolean gates
// All paths are purely combinational; there is no clock or reset. Subtractor
// outputs: diff and borr of A - B (- C), and the regenerated inputs p = B and
// q = C, which a reversible circuit keeps rather than discards. The
// quantum-level modules carry their target line as a count of V quarter turns
// (see rev_pkg); every output here is a classical bit.
// The circuits are the published ones; grouping them in one top, and bringing
// out the TR/Peres pairs as a round trip, is this design's own arrangement.
module reversible_subtractor_top
  import rev_pkg::*;
(
  // Half subtractor
  input  logic hs_a,
  input  logic hs_b,
  output logic hs_p,
  output logic hs_diff,
  output logic hs_borr,
  // Optimised full subtractor (6 gates)
  input  logic fs_a,
  input  logic fs_b,
  input  logic fs_c,
  output logic fs_p,
  output logic fs_q,
  output logic fs_diff,
  output logic fs_borr,
  // Unoptimised full subtractor at quantum-gate level (8 gates)
  input  logic fsq_a,
  input  logic fsq_b,
  input  logic fsq_c,
  output logic fsq_p,
  output logic fsq_q,
  output logic fsq_diff,
  output logic fsq_borr,
  // Full subtractor from two Boolean TR gates
  input  logic fsb_a,
  input  logic fsb_b,
  input  logic fsb_c,
  output logic fsb_p,
  output logic fsb_q,
  output logic fsb_diff,
  output logic fsb_borr,
  // TR gate and its inverse, quantum-gate level
  input  logic tri_a,
  input  logic tri_b,
  input  logic tri_c,
  output logic tri_p,
  output logic tri_q,
  output logic tri_r,
  output logic tri_ra,
  output logic tri_rb,
  output logic tri_rc,
  // TR gate and its inverse, Boolean
  input  logic trb_a,
  input  logic trb_b,
  input  logic trb_c,
  output logic trb_p,
  output logic trb_q,
  output logic trb_r,
  output logic trb_ra,
  output logic trb_rb,
  output logic trb_rc
);
  qturn_t tri_r_line, tri_rc_line;

  half_sub     u_hs  (.a(hs_a),  .b(hs_b),  .p(hs_p), .diff(hs_diff), .borr(hs_borr));
  full_sub_opt u_fs  (.a(fs_a),  .b(fs_b),  .c(fs_c),  .p(fs_p),  .q(fs_q),  .diff(fs_diff),  .borr(fs_borr));
  full_sub_q   u_fsq (.a(fsq_a), .b(fsq_b), .c(fsq_c), .p(fsq_p), .q(fsq_q), .diff(fsq_diff), .borr(fsq_borr));
  full_sub     u_fsb (.a(fsb_a), .b(fsb_b), .c(fsb_c), .p(fsb_p), .q(fsb_q), .diff(fsb_diff), .borr(fsb_borr));

  tr_gate_q    u_tri_fwd (.a(tri_a), .b(tri_b), .c(qt_from_bit(tri_c)),
                          .p(tri_p), .q(tri_q), .r(tri_r_line));
  peres_gate_q u_tri_inv (.a(tri_p), .b(tri_q), .c(tri_r_line),
                          .p(tri_ra), .q(tri_rb), .r(tri_rc_line));
  assign tri_r  = qt_to_bit(tri_r_line);
  assign tri_rc = qt_to_bit(tri_rc_line);

  always_comb begin
    assert final (qt_is_basis(tri_r_line) && qt_is_basis(tri_rc_line))
      else $error("TR/Peres pair: target line left in a non-basis state");
  end

  tr_gate      u_trb_fwd (.a(trb_a), .b(trb_b), .c(trb_c), .p(trb_p),  .q(trb_q),  .r(trb_r));
  peres_gate   u_trb_inv (.a(trb_p), .b(trb_q), .c(trb_r), .p(trb_ra), .q(trb_rb), .r(trb_rc));
endmodule
