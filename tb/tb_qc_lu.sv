// tb_qc_lu: exhaustive self-check of the NCV logic unit.  For each basis
// input: all lines end in basis states, no control was superposed, the
// result line gives XOR / OR / AND for S1 S2 = 00 / 01 / 11, and all four
// lines equal those of the reversible circuit rev_lu.
module tb_qc_lu;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic s1, s2, a, b;
  qline_t [3:0] q;
  logic sup;
  logic [3:0] ref_lines;

  qc_lu  dut  (.s1(s1), .s2(s2), .a(a), .b(b), .q(q), .ctrl_superposed(sup));
  rev_lu refc (.s1(s1), .s2(s2), .a(a), .b(b),
               .g1(ref_lines[0]), .g2(ref_lines[1]), .o1(ref_lines[2]), .g3(ref_lines[3]));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b got=%0d exp=%0d", what, s1, s2, a, b, got, exp);
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
      {s1, s2, a, b} = 4'(i);
      #1;
      check("basis", int'({q[3].v, q[2].v, q[1].v, q[0].v}), 0);
      check("control", int'(sup), 0);
      check("lines", int'({q[3].b, q[2].b, q[1].b, q[0].b}), int'(ref_lines));
      case ({s1, s2})
        2'b00: check("XOR", int'(q[2].b), int'(a ^ b));
        2'b01: check("OR",  int'(q[2].b), int'(a | b));
        2'b11: check("AND", int'(q[2].b), int'(a & b));
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
