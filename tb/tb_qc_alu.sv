// tb_qc_alu: exhaustive self-check of the NCV realisation of the 1-bit ALU.
// For each basis input: all lines in basis states, no superposed control,
// the four operations (00 ADD, 01 OR, 10 SUB, 11 AND) on o1/o2, and the
// garbage lines as the MCT circuit leaves them:
//   g1 = S1 ^ A,   g2 = AB when S1 = 0, A|B when S1 = 1.
module tb_qc_alu;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic s1, s2, a, b;
  qline_t [3:0] q;
  logic sup;

  qc_alu dut (.s1(s1), .s2(s2), .a(a), .b(b), .q(q), .ctrl_superposed(sup));

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
    logic o1, o2;
    for (int i = 0; i < 16; i++) begin
      {s1, s2, a, b} = 4'(i);
      #1;
      o1 = q[1].b;
      o2 = q[3].b;
      check("basis", int'({q[0].v, q[1].v, q[2].v, q[3].v}), 0);
      check("control", int'(sup), 0);
      check("g1", int'(q[0].b), int'(s1 ^ a));
      check("g2", int'(q[2].b), s1 ? int'(a | b) : int'(a & b));
      unique case ({s1, s2})
        2'b00: begin check("ADD carry", int'(o1), int'(a & b));  check("ADD sum", int'(o2), int'(a ^ b)); end
        2'b01: check("OR", int'(o2), int'(a | b));
        2'b10: begin check("SUB borrow", int'(o1), int'(~a & b)); check("SUB diff", int'(o2), int'(a ^ b)); end
        2'b11: check("AND", int'(o2), int'(a & b));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
