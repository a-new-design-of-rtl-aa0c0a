// half_sub_tb: exhaustive test of the TR-gate half subtractor against the
// half subtractor truth table (A, B -> Borr, Diff), plus P = B and an
// arithmetic cross-check: A - B = Diff - 2*Borr.
module half_sub_tb;
  int checks = 0, failures = 0;
  logic a, b, p, diff, borr;

  half_sub dut (.a(a), .b(b), .p(p), .diff(diff), .borr(borr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rows {A B, Borr Diff}.
  localparam logic [3:0] TABLE [4] = '{4'b00_00, 4'b01_11, 4'b10_01, 4'b11_00};

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[i]) begin
      {a, b} = TABLE[i][3:2];
      #1;
      check({borr, diff} == TABLE[i][1:0], $sformatf("AB=%b%b -> Borr=%b Diff=%b", a, b, borr, diff));
      check(p == b, "P is not B");
      check(int'(a) - int'(b) == int'(diff) - 2 * int'(borr), "A-B mismatch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
