// tr_gate_q_tb: self-checking test of the TR gate built from quantum gates.
// With a classical target input the outputs must match the TR truth table.
// The target input is also driven with the two non-basis states: the gate
// must then add two quarter turns exactly when A = 1 and B = 0. The two
// hand-worked cases of the gate's verification are checked on the internal
// control signals: ABC = 101 (gates 3 and 4 active, acting as NOT) and
// ABC = 111 (gates 1 and 3 active, cancelling).
module tr_gate_q_tb;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic   a, b, p, q;
  qturn_t c, r;

  tr_gate_q dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [5:0] TABLE [8] = '{
    6'b000_000, 6'b001_001, 6'b010_010, 6'b011_011,
    6'b100_111, 6'b101_110, 6'b110_100, 6'b111_101};

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
    // Non-basis target inputs.
    for (int i = 0; i < 4; i++) begin
      for (int k = 1; k < 4; k += 2) begin
        {a, b} = 2'(i);
        c = qturn_t'(k);
        #1;
        check(r == qturn_t'(k + ((a & ~b) ? 2 : 0)), $sformatf("AB=%b%b k=%0d -> %0d", a, b, k, r));
      end
    end
    // Case ABC = 101: controls C1 = 0, C2 = 1, C3 = 1.
    a = 1; b = 0; c = QT_ONE;
    #1;
    check({dut.b, dut.a2, dut.bx} == 3'b011, "ABC=101 control signals");
    check(dut.c1 == QT_ONE && !qt_is_basis(dut.c3) && r == QT_ZERO, "ABC=101 target path");
    // Case ABC = 111: controls C1 = 1, C2 = 1, C3 = 0.
    a = 1; b = 1; c = QT_ONE;
    #1;
    check({dut.b, dut.a2, dut.bx} == 3'b110, "ABC=111 control signals");
    check(!qt_is_basis(dut.c1) && dut.c3 == QT_ONE && r == QT_ONE, "ABC=111 target path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
