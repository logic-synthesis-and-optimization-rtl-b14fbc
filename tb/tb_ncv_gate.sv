// tb_ncv_gate: self-check of ncv_gate against the NCV gate rules: NOT and
// CNOT invert, controlled-V applied twice equals CNOT, controlled-V followed
// by controlled-V-dagger is the identity, and a superposed control raises
// ctrl_superposed.  Every one of the 4 x 4 (control, target) four-valued
// states is applied on a 2-line bus.  The expected values come from the
// matrix form of V: V|0> and V|1> are the two V-states, V applied to
// V|b> gives |~b>, and V-dagger undoes V.
module tb_ncv_gate;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  qline_t [1:0] x;
  qline_t [1:0] y_not, y_cnot, y_v, y_vv, y_vd, y_vvd;
  logic s_not, s_cnot, s_v, s_vv, s_vd, s_vvd;

  // line 0 is the control, line 1 the target
  ncv_gate #(.N(2), .OP(NCV_NOT),  .CTRL(0), .TGT(1)) u_not  (.x(x),   .y(y_not),  .ctrl_superposed(s_not));
  ncv_gate #(.N(2), .OP(NCV_CNOT), .CTRL(0), .TGT(1)) u_cnot (.x(x),   .y(y_cnot), .ctrl_superposed(s_cnot));
  ncv_gate #(.N(2), .OP(NCV_CV),   .CTRL(0), .TGT(1)) u_v    (.x(x),   .y(y_v),    .ctrl_superposed(s_v));
  ncv_gate #(.N(2), .OP(NCV_CV),   .CTRL(0), .TGT(1)) u_vv   (.x(y_v), .y(y_vv),   .ctrl_superposed(s_vv));
  ncv_gate #(.N(2), .OP(NCV_CVDG), .CTRL(0), .TGT(1)) u_vd   (.x(x),   .y(y_vd),   .ctrl_superposed(s_vd));
  ncv_gate #(.N(2), .OP(NCV_CVDG), .CTRL(0), .TGT(1)) u_vvd  (.x(y_v), .y(y_vvd),  .ctrl_superposed(s_vvd));

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%b got=%b exp=%b", what, x, got, exp);
    end
  endtask

  // expected V on the target, written out state by state
  function automatic qline_t exp_v(input qline_t t);
    if (t == Q0) return QV0;
    if (t == Q1) return QV1;
    if (t == QV0) return Q1;
    return Q0;
  endfunction

  function automatic qline_t exp_vd(input qline_t t);
    if (t == Q0) return QV1;
    if (t == Q1) return QV0;
    if (t == QV0) return Q0;
    return Q1;
  endfunction

  function automatic qline_t exp_not(input qline_t t);
    if (t == Q0) return Q1;
    if (t == Q1) return Q0;
    if (t == QV0) return QV1;
    return QV0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qline_t c, t;
    logic on, sup;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        c = qline_t'(i);
        t = qline_t'(j);
        x = {t, c};
        #1;
        on  = (c == Q1);
        sup = c.v;
        check("NOT",   y_not,  {exp_not(t), c});
        check("CNOT",  y_cnot, {on ? exp_not(t) : t, c});
        check("CV",    y_v,    {on ? exp_v(t) : t, c});
        check("CVDG",  y_vd,   {on ? exp_vd(t) : t, c});
        if (c == Q0 || c == Q1) begin
          // V*V = NOT, V+ * V = I
          check("CV^2",   y_vv,  {on ? exp_not(t) : t, c});
          check("CV+CV",  y_vvd, {t, c});
        end
        check("supNOT", {3'b0, s_not},  4'b0);
        check("supCNT", {3'b0, s_cnot}, {3'b0, sup});
        check("supV",   {3'b0, s_v},    {3'b0, sup});
        check("supVD",  {3'b0, s_vd},   {3'b0, sup});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
