// tb_rev_lu: exhaustive self-check of the compact reversible logic unit.
// S1 S2 = 00 XOR, 01 OR, 11 AND on output o1; code 10 has no operation and
// is only checked for reversibility.  NOT is checked as XOR with B = 1.
// Every output pattern must appear exactly once.
module tb_rev_lu;

  int checks = 0;
  int failures = 0;

  logic s1, s2, a, b;
  logic g1, g2, o1, g3;

  rev_lu dut (.s1(s1), .s2(s2), .a(a), .b(b), .g1(g1), .g2(g2), .o1(o1), .g3(g3));

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
      seen[{g1, g2, o1, g3}] = 1'b1;
      case ({s1, s2})
        2'b00: begin
          check("XOR", o1, a ^ b);
          if (b) check("NOT", o1, ~a);
        end
        2'b01: check("OR", o1, a | b);
        2'b11: check("AND", o1, a & b);
        default: ;
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
