// peres_gate_tb: exhaustive test of the Boolean Peres gate. Checks its truth
// table, and that it undoes the TR gate: peres(tr(x)) = x and
// tr(peres(x)) = x for all eight input vectors.
module peres_gate_tb;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic tp, tq, tr_, ip, iq, ir;
  logic pp, pq, pr, up, uq, ur;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  // Inverse relation, both orders. The TR mapping is written out here.
  assign tp = a;
  assign tq = a ^ b;
  assign tr_ = (a & ~b) ^ c;
  peres_gate u_inv (.a(tp), .b(tq), .c(tr_), .p(ip), .q(iq), .r(ir));
  assign {pp, pq, pr} = {p, q, r};
  assign up = pp;
  assign uq = pp ^ pq;
  assign ur = (pp & ~pq) ^ pr;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rows {A B C, P Q R}.
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
      {a, b, c} = TABLE[i][5:3];
      #1;
      check({p, q, r} == TABLE[i][2:0], $sformatf("ABC=%b%b%b -> PQR=%b%b%b", a, b, c, p, q, r));
      check({ip, iq, ir} == {a, b, c}, "Peres after TR does not restore the inputs");
      check({up, uq, ur} == {a, b, c}, "TR after Peres does not restore the inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
