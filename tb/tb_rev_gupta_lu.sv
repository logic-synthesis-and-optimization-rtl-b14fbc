// tb_rev_gupta_lu: exhaustive self-check of the reversible Gupta logic unit
// over all 32 inputs.  Lines S2 S3 choose the operation (00 constant 0,
// 01 AND, 10 XOR, 11 OR) and line S1 complements it (constant 1, NAND,
// XNOR, NOR).  Every output pattern of the 5-line circuit must appear
// exactly once.
module tb_rev_gupta_lu;

  int checks = 0;
  int failures = 0;

  logic s1, s2, s3, a, b;
  logic y, g1, g2, g3, g4;

  rev_gupta_lu dut (
    .s1(s1), .s2(s2), .s3(s3), .a(a), .b(b),
    .y(y), .g1(g1), .g2(g2), .g3(g3), .g4(g4)
  );

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b%b got=%b exp=%b", what, s1, s2, s3, a, b, got, exp);
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
    logic [31:0] seen;
    logic f;
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      {s1, s2, s3, a, b} = 5'(i);
      #1;
      seen[{y, g1, g2, g3, g4}] = 1'b1;
      unique case ({s2, s3})
        2'b00: f = 1'b0;
        2'b01: f = a & b;
        2'b10: f = a ^ b;
        2'b11: f = a | b;
      endcase
      check("op", y, f ^ s1);
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
