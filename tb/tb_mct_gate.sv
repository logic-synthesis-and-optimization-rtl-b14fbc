// tb_mct_gate: exhaustive self-check of mct_gate in its three common forms
// on a 4-line bus: NOT (no control), CNOT (one control) and Toffoli (two
// controls), plus a three-control gate.  Each instance is driven with all
// 16 line patterns and compared with the rule "target flips exactly when
// every control line is 1".  Applying every gate twice must return the
// input (each MCT gate is its own inverse).
module tb_mct_gate;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] x;
  logic [3:0] y_not, y_cnot, y_tof, y_t4;
  logic [3:0] z_not, z_cnot, z_tof, z_t4;

  mct_gate #(.N(4), .CTRL(0), .TGT(2))                                     u_not  (.x(x), .y(y_not));
  mct_gate #(.N(4), .CTRL(line_bit(0)), .TGT(3))                           u_cnot (.x(x), .y(y_cnot));
  mct_gate #(.N(4), .CTRL(line_bit(1) | line_bit(3)), .TGT(0))             u_tof  (.x(x), .y(y_tof));
  mct_gate #(.N(4), .CTRL(line_bit(0) | line_bit(1) | line_bit(2)), .TGT(3)) u_t4 (.x(x), .y(y_t4));

  mct_gate #(.N(4), .CTRL(0), .TGT(2))                                     u_not2  (.x(y_not),  .y(z_not));
  mct_gate #(.N(4), .CTRL(line_bit(0)), .TGT(3))                           u_cnot2 (.x(y_cnot), .y(z_cnot));
  mct_gate #(.N(4), .CTRL(line_bit(1) | line_bit(3)), .TGT(0))             u_tof2  (.x(y_tof),  .y(z_tof));
  mct_gate #(.N(4), .CTRL(line_bit(0) | line_bit(1) | line_bit(2)), .TGT(3)) u_t42 (.x(y_t4), .y(z_t4));

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%b got=%b exp=%b", what, x, got, exp);
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
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      check("NOT",     y_not,  {x[3], ~x[2], x[1], x[0]});
      check("CNOT",    y_cnot, {x[3] ^ x[0], x[2], x[1], x[0]});
      check("TOF",     y_tof,  {x[3], x[2], x[1], x[0] ^ (x[1] & x[3])});
      check("TOF4",    y_t4,   {x[3] ^ (x[0] & x[1] & x[2]), x[2], x[1], x[0]});
      check("NOT^2",   z_not,  x);
      check("CNOT^2",  z_cnot, x);
      check("TOF^2",   z_tof,  x);
      check("TOF4^2",  z_t4,   x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
