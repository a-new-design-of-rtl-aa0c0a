// tr_gate_tb: exhaustive self-checking test of the Boolean TR gate against
// the eight rows of its truth table, plus a check that the mapping is one to
// one (every output vector appears exactly once).
module tr_gate_tb;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit   seen [8];

  tr_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Truth table rows {A B C, P Q R}.
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
    foreach (seen[i]) seen[i] = 1'b0;
    foreach (TABLE[i]) begin
      {a, b, c} = TABLE[i][5:3];
      #1;
      check({p, q, r} == TABLE[i][2:0], $sformatf("ABC=%b%b%b -> PQR=%b%b%b", a, b, c, p, q, r));
      check(!seen[{p, q, r}], "output vector repeated");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
