// full_sub_tb: exhaustive test of full_sub against the full subtractor truth table
// (A, B, C -> Borr, Diff), plus the regenerated inputs P = B, Q = C and the
// arithmetic cross-check A - B - C = Diff - 2*Borr.
module full_sub_tb;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, diff, borr;

  full_sub dut (.a(a), .b(b), .c(c), .p(p), .q(q), .diff(diff), .borr(borr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rows {A B C, Borr Diff}.
  localparam logic [4:0] TABLE [8] = '{
    5'b000_00, 5'b001_11, 5'b010_11, 5'b011_10,
    5'b100_01, 5'b101_00, 5'b110_00, 5'b111_11};

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[i]) begin
      {a, b, c} = TABLE[i][4:2];
      #1;
      check({borr, diff} == TABLE[i][1:0],
            $sformatf("ABC=%b%b%b -> Borr=%b Diff=%b", a, b, c, borr, diff));
      check(p == b && q == c, "regenerated inputs wrong");
      check(int'(a) - int'(b) - int'(c) == int'(diff) - 2 * int'(borr), "A-B-C mismatch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
