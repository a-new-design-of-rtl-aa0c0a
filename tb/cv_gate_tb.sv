// cv_gate_tb: self-checking test of the controlled-V and controlled-V+ gates.
// Checks every (control, target state) pair for both gate kinds against the
// quarter-turn rule, then the gate algebra on chains of two gates:
// V.V = NOT, V+.V+ = NOT, V.V+ = V+.V = identity (control 1), and that a
// 0 control leaves every chain as a wire.
module cv_gate_tb;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic   ctrl;
  qturn_t tin;
  logic   cv_po, cvd_po, x1, x2, x3, x4, x5, x6, x7, x8;
  qturn_t cv_out, cvd_out, vv_mid, vv_out, dd_mid, dd_out, vd_mid, vd_out, dv_mid, dv_out;

  cv_gate #(.DAGGER(1'b0)) u_v   (.ctrl(ctrl), .tin(tin), .ctrl_out(cv_po),  .tout(cv_out));
  cv_gate #(.DAGGER(1'b1)) u_vd  (.ctrl(ctrl), .tin(tin), .ctrl_out(cvd_po), .tout(cvd_out));
  // V then V
  cv_gate #(.DAGGER(1'b0)) u_vv1 (.ctrl(ctrl), .tin(tin),    .ctrl_out(x1), .tout(vv_mid));
  cv_gate #(.DAGGER(1'b0)) u_vv2 (.ctrl(x1),   .tin(vv_mid), .ctrl_out(x2), .tout(vv_out));
  // V+ then V+
  cv_gate #(.DAGGER(1'b1)) u_dd1 (.ctrl(ctrl), .tin(tin),    .ctrl_out(x3), .tout(dd_mid));
  cv_gate #(.DAGGER(1'b1)) u_dd2 (.ctrl(x3),   .tin(dd_mid), .ctrl_out(x4), .tout(dd_out));
  // V then V+
  cv_gate #(.DAGGER(1'b0)) u_vd1 (.ctrl(ctrl), .tin(tin),    .ctrl_out(x5), .tout(vd_mid));
  cv_gate #(.DAGGER(1'b1)) u_vd2 (.ctrl(x5),   .tin(vd_mid), .ctrl_out(x6), .tout(vd_out));
  // V+ then V
  cv_gate #(.DAGGER(1'b1)) u_dv1 (.ctrl(ctrl), .tin(tin),    .ctrl_out(x7), .tout(dv_mid));
  cv_gate #(.DAGGER(1'b0)) u_dv2 (.ctrl(x7),   .tin(dv_mid), .ctrl_out(x8), .tout(dv_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected V and V+ results, written as tables: state k -> next state.
  localparam qturn_t V_OF  [4] = '{2'd1, 2'd2, 2'd3, 2'd0};
  localparam qturn_t VD_OF [4] = '{2'd3, 2'd0, 2'd1, 2'd2};

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int k = 0; k < 4; k++) begin
        ctrl = c[0];
        tin  = qturn_t'(k);
        #1;
        check(cv_po == ctrl && cvd_po == ctrl, "control line not passed through");
        check(cv_out  == (c ? V_OF[k]  : qturn_t'(k)), $sformatf("V  ctrl=%0d k=%0d -> %0d", c, k, cv_out));
        check(cvd_out == (c ? VD_OF[k] : qturn_t'(k)), $sformatf("V+ ctrl=%0d k=%0d -> %0d", c, k, cvd_out));
        // NOT adds two quarter turns: |0> <-> |1>, V|0> <-> V|1>.
        check(vv_out == (c ? qturn_t'(k ^ 2) : qturn_t'(k)), $sformatf("V.V  ctrl=%0d k=%0d -> %0d", c, k, vv_out));
        check(dd_out == (c ? qturn_t'(k ^ 2) : qturn_t'(k)), $sformatf("V+.V+ ctrl=%0d k=%0d -> %0d", c, k, dd_out));
        check(vd_out == qturn_t'(k), $sformatf("V.V+ ctrl=%0d k=%0d -> %0d", c, k, vd_out));
        check(dv_out == qturn_t'(k), $sformatf("V+.V ctrl=%0d k=%0d -> %0d", c, k, dv_out));
        // A single V on a basis state leaves a non-basis state.
        if (c == 1 && (k % 2) == 0)
          check(!qt_is_basis(cv_out) && !qt_is_basis(cvd_out), "single V gave a basis state");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
