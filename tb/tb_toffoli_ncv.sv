// tb_toffoli_ncv: self-check of all four NCV realisations of the Toffoli
// gate.  Basis inputs: y = (a, b, c ^ ab), all basis, no superposed control.
// Target in a V-state with basis controls: the target must be inverted
// (V|x> -> V|~x>) exactly when a = b = 1.  Controls in a V-state must raise
// ctrl_superposed.
module tb_toffoli_ncv;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  qline_t [2:0] x;
  qline_t [2:0] y [4];
  logic   [3:0] sup;

  for (genvar v = 0; v < 4; v++) begin : g_dut
    toffoli_ncv #(.VARIANT(v)) dut (.x(x), .y(y[v]), .ctrl_superposed(sup[v]));
  end

  task automatic check(input string what, input int v, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s variant=%0d x=%b got=%0h exp=%0h", what, v, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b;
    qline_t c, ce;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = i[1];
        b = i[0];
        c = qline_t'(j);
        x = {c, q_of(b), q_of(a)};
        #1;
        // expected target: c with its bit label inverted when a & b
        ce = '{v: c.v, b: c.b ^ (a & b)};
        for (int v = 0; v < 4; v++) begin
          check("target",  v, int'(y[v][2]), int'(ce));
          check("control a", v, int'(y[v][0]), int'(q_of(a)));
          check("control b", v, int'(y[v][1]), int'(q_of(b)));
          check("flag", v, int'(sup[v]), 0);
        end
      end
    end
    // a superposed control is flagged
    x = {Q0, Q1, QV0};
    #1;
    for (int v = 0; v < 4; v++) check("flag superposed a", v, int'(sup[v]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
