// tb_rev_mini_alu: exhaustive self-check of the reversible Mini-ALU.
//   S1 S2 = 00 OR : o2 = A|B
//           01 ADD: o1 = carry A&B, o2 = sum A^B
//           10 AND: o2 = A&B
//           11 ID : o1 = A, o2 = B
// Every output pattern must appear exactly once.
module tb_rev_mini_alu;

  int checks = 0;
  int failures = 0;

  logic s1, s2, a, b;
  logic g1, g2, o1, o2;

  rev_mini_alu dut (.s1(s1), .s2(s2), .a(a), .b(b), .g1(g1), .g2(g2), .o1(o1), .o2(o2));

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
      seen[{g1, g2, o1, o2}] = 1'b1;
      unique case ({s1, s2})
        2'b00: check("OR", o2, a | b);
        2'b01: begin check("ADD carry", o1, a & b); check("ADD sum", o2, a ^ b); end
        2'b10: check("AND", o2, a & b);
        2'b11: begin check("ID a", o1, a); check("ID b", o2, b); end
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
