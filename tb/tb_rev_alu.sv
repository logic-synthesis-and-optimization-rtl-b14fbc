// tb_rev_alu: exhaustive self-check of the 1-bit reversible ALU.
// For every selector code and operand pair the results must be:
//   S1 S2 = 00 ADD: o1 = carry A&B,   o2 = A^B
//           01 OR :                  o2 = A|B
//           10 SUB: o1 = borrow ~A&B, o2 = A^B   (A - B)
//           11 AND:                  o2 = A&B
// which is the ALU truth table with its operations reassigned to these
// selector codes.  Every output pattern of the 4-line circuit must also
// appear exactly once.
module tb_rev_alu;

  int checks = 0;
  int failures = 0;

  logic s1, s2, a, b;
  logic g1, o1, g2, o2;

  rev_alu dut (.s1(s1), .s2(s2), .a(a), .b(b), .g1(g1), .o1(o1), .g2(g2), .o2(o2));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b got=%b exp=%b", what, s1, s2, a, b, got, exp);
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
    logic [15:0] seen;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {s1, s2, a, b} = 4'(i);
      #1;
      seen[{g1, o1, g2, o2}] = 1'b1;
      unique case ({s1, s2})
        2'b00: begin check("ADD carry", o1, a & b);  check("ADD sum", o2, a ^ b); end
        2'b01: check("OR", o2, a | b);
        2'b10: begin check("SUB borrow", o1, ~a & b); check("SUB diff", o2, a ^ b); end
        2'b11: check("AND", o2, a & b);
      endcase
    end
    checks++;
    if (!(&seen)) begin
      failures++;
      $display("FAIL not bijective: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
