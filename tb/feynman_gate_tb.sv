// feynman_gate_tb: exhaustive self-checking test of the CNOT (Feynman) gate.
// Drives all four (A, B) pairs and compares against P = A, Q = A xor B, and
// checks that two gates in series restore B (the gate is its own inverse).
module feynman_gate_tb;
  int checks = 0, failures = 0;
  logic a, b, p, q, p2, q2;

  feynman_gate dut  (.a(a), .b(b), .p(p),  .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rows {A, B, P, Q} of the gate's mapping.
  localparam logic [3:0] ROWS [4] = '{4'b00_00, 4'b01_01, 4'b10_11, 4'b11_10};

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ROWS[i]) begin
      {a, b} = ROWS[i][3:2];
      #1;
      check({p, q} == ROWS[i][1:0], $sformatf("A=%b B=%b -> P=%b Q=%b", a, b, p, q));
      check({p2, q2} == {a, b}, $sformatf("CNOT twice does not restore A=%b B=%b", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
