// rev_pkg: shared types and helpers for the reversible subtractor circuits.
//
// The quantum realisations of the gates in this design use controlled-V and
// controlled-V+ gates, where V is the square root of NOT (V*V = NOT,
// V*V+ = V+*V = identity, V+*V+ = NOT). All control inputs of these gates
// carry classical values, and only one line of each circuit (the target line)
// is ever acted on by V or V+. Starting from a classical |0> or |1>, every
// state that line can reach is V^k|0> for some k in 0..3, because |1> = V^2|0>.
// The target line is therefore carried as a 2-bit count of quarter turns:
//   k = 0 : |0>        (classical 0)
//   k = 1 : V|0>       (not a basis state)
//   k = 2 : |1>        (classical 1)
//   k = 3 : V|1>       (not a basis state)
// V adds 1, V+ subtracts 1 and NOT (a CNOT with the line as target) adds 2,
// all modulo 4. This encoding is exact for the circuits in this design; it is
// this design's own way of expressing the V/V+ algebra in synthesizable logic.
package rev_pkg;

  // Target-line state: number of V quarter turns applied to |0>, modulo 4.
  typedef logic [1:0] qturn_t;

  localparam qturn_t QT_ZERO = 2'd0;
  localparam qturn_t QT_ONE  = 2'd2;

  // Classical bit to target-line state.
  function automatic qturn_t qt_from_bit(logic b);
    return {b, 1'b0};
  endfunction

  // True when the line holds a classical basis state (|0> or |1>).
  function automatic logic qt_is_basis(qturn_t q);
    return ~q[0];
  endfunction

  // Classical value of a basis-state line (meaningful only if qt_is_basis).
  function automatic logic qt_to_bit(qturn_t q);
    return q[1];
  endfunction

endpackage
