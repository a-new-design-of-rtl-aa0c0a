// peres_gate_q_tb: self-checking test of the Peres gate built from quantum
// gates. Checks its truth table with a classical target, the behaviour with
// non-basis target inputs (two quarter turns added exactly when A = B = 1),
// and that it undoes tr_gate_q when chained after it.
module peres_gate_q_tb;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic   a, b, p, q, tp, tq, ip, iq;
  qturn_t c, r, tr_, ir;

  peres_gate_q dut   (.a(a),  .b(b),  .c(c),   .p(p),  .q(q),  .r(r));
  tr_gate_q    u_tr  (.a(a),  .b(b),  .c(c),   .p(tp), .q(tq), .r(tr_));
  peres_gate_q u_inv (.a(tp), .b(tq), .c(tr_), .p(ip), .q(iq), .r(ir));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [5:0] TABLE [8] = '{
    6'b000_000, 6'b001_001, 6'b010_010, 6'b011_011,
    6'b100_110, 6'b101_111, 6'b110_101, 6'b111_100};

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[i]) begin
      a = TABLE[i][5];
      b = TABLE[i][4];
      c = qt_from_bit(TABLE[i][3]);
      #1;
      check(qt_is_basis(r), "target left in a non-basis state");
      check({p, q, qt_to_bit(r)} == TABLE[i][2:0],
            $sformatf("ABC=%b -> P=%b Q=%b R=%0d", TABLE[i][5:3], p, q, r));
    end
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        {a, b} = 2'(i);
        c = qturn_t'(k);
        #1;
        check(r == qturn_t'(k + ((a & b) ? 2 : 0)), $sformatf("AB=%b%b k=%0d -> %0d", a, b, k, r));
        check(ip == a && iq == b && ir == c, $sformatf("Peres after TR: AB=%b%b k=%0d", a, b, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
