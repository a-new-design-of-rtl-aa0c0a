// reversible_subtractor_top_tb: end-to-end test of every circuit in the top,
// with the top at its defaults. All inputs of all circuits are swept
// together (2^16 combinations, one per time step), each output is compared
// with plain integer arithmetic or the gate equations, and the following
// mechanisms are counted, each of which must occur at least once:
//   borrow_hs / borrow_fs : a borrow produced by the half / full subtractor
//   v_pair_not            : two V gates in series acting as a NOT on the
//                           TR target line (A = 1, B = 0)
//   v_pair_identity       : a V+ and a V in series cancelling on the TR
//                           target line (A = B = 1)
//   mid_nonbasis          : the target line of the optimised full subtractor
//                           holding a non-basis state mid-circuit
//   removed_pair_active   : the V / V+ pair that the optimisation removed
//                           being active in the unoptimised circuit, with
//                           both circuits agreeing
//   round_trip            : TR followed by Peres returning its inputs
module reversible_subtractor_top_tb;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  int borrow_hs = 0, borrow_fs = 0, v_pair_not = 0, v_pair_identity = 0;
  int mid_nonbasis = 0, removed_pair_active = 0, round_trip = 0;

  logic hs_a, hs_b, hs_p, hs_diff, hs_borr;
  logic fs_a, fs_b, fs_c, fs_p, fs_q, fs_diff, fs_borr;
  logic fsq_a, fsq_b, fsq_c, fsq_p, fsq_q, fsq_diff, fsq_borr;
  logic fsb_a, fsb_b, fsb_c, fsb_p, fsb_q, fsb_diff, fsb_borr;
  logic tri_a, tri_b, tri_c, tri_p, tri_q, tri_r, tri_ra, tri_rb, tri_rc;
  logic trb_a, trb_b, trb_c, trb_p, trb_q, trb_r, trb_ra, trb_rb, trb_rc;

  reversible_subtractor_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Expected outputs of a full subtractor from integer arithmetic.
  function automatic logic [1:0] fs_ref(logic a, logic b, logic c);
    int d;
    d = int'(a) - int'(b) - int'(c);  // -2 .. 1
    return {d < 0, d[0]};             // {borrow, difference}
  endfunction

  task automatic check_fs(string name, logic a, logic b, logic c,
                          logic p, logic q, logic diff, logic borr);
    check({borr, diff} == fs_ref(a, b, c),
          $sformatf("%s ABC=%b%b%b -> Borr=%b Diff=%b", name, a, b, c, borr, diff));
    check(p == b && q == c, $sformatf("%s regenerated inputs", name));
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      {hs_a, hs_b, fs_a, fs_b, fs_c, fsq_a, fsq_b, fsq_c,
       fsb_a, fsb_b, fsb_c, tri_a, tri_b, tri_c, trb_a, trb_b} = 16'(v);
      trb_c = ^16'(v);
      #1;
      // Half subtractor.
      check({hs_borr, hs_diff} == fs_ref(hs_a, hs_b, 1'b0),
            $sformatf("half AB=%b%b -> Borr=%b Diff=%b", hs_a, hs_b, hs_borr, hs_diff));
      check(hs_p == hs_b, "half P");
      if (hs_borr) borrow_hs++;
      // Full subtractors.
      check_fs("opt",  fs_a,  fs_b,  fs_c,  fs_p,  fs_q,  fs_diff,  fs_borr);
      check_fs("q8",   fsq_a, fsq_b, fsq_c, fsq_p, fsq_q, fsq_diff, fsq_borr);
      check_fs("bool", fsb_a, fsb_b, fsb_c, fsb_p, fsb_q, fsb_diff, fsb_borr);
      if (fs_borr) borrow_fs++;
      if (!qt_is_basis(dut.u_fs.t1) || !qt_is_basis(dut.u_fs.t3) || !qt_is_basis(dut.u_fs.t5))
        mid_nonbasis++;
      if (dut.u_fsq.axb && fsq_borr == fs_ref(fsq_a, fsq_b, fsq_c)[1])
        removed_pair_active++;
      // TR gate and its inverse.
      check({tri_p, tri_q, tri_r} == {tri_a, tri_a ^ tri_b, (tri_a & ~tri_b) ^ tri_c}, "TR (quantum) outputs");
      check({trb_p, trb_q, trb_r} == {trb_a, trb_a ^ trb_b, (trb_a & ~trb_b) ^ trb_c}, "TR (Boolean) outputs");
      check({tri_ra, tri_rb, tri_rc} == {tri_a, tri_b, tri_c}, "Peres after TR (quantum) round trip");
      check({trb_ra, trb_rb, trb_rc} == {trb_a, trb_b, trb_c}, "Peres after TR (Boolean) round trip");
      if ({tri_ra, tri_rb, tri_rc} == {tri_a, tri_b, tri_c}) round_trip++;
      if (tri_a && !tri_b && tri_r != tri_c) v_pair_not++;
      if (tri_a && tri_b && !qt_is_basis(dut.u_tri_fwd.c1) && tri_r == tri_c) v_pair_identity++;
    end
    $display("mechanisms: borrow_hs=%0d borrow_fs=%0d v_pair_not=%0d v_pair_identity=%0d",
             borrow_hs, borrow_fs, v_pair_not, v_pair_identity);
    $display("mechanisms: mid_nonbasis=%0d removed_pair_active=%0d round_trip=%0d",
             mid_nonbasis, removed_pair_active, round_trip);
    check(borrow_hs > 0, "half subtractor never borrowed");
    check(borrow_fs > 0, "full subtractor never borrowed");
    check(v_pair_not > 0, "V.V never acted as NOT");
    check(v_pair_identity > 0, "V+.V never cancelled");
    check(mid_nonbasis > 0, "no non-basis state mid-circuit");
    check(removed_pair_active > 0, "removed V/V+ pair never active");
    check(round_trip > 0, "no TR/Peres round trip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
