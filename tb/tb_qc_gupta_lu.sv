// tb_qc_gupta_lu: exhaustive self-check of the NCV Gupta logic unit over
// all 32 basis inputs: basis-state outputs, no superposed control, the
// selected operation on y = q[0] (S2 S3 choose constant 0 / AND / XOR / OR,
// S1 complements), and all five lines equal to those of rev_gupta_lu.
module tb_qc_gupta_lu;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic s1, s2, s3, a, b;
  qline_t [4:0] q;
  logic sup;
  logic [4:0] ref_lines;

  qc_gupta_lu  dut  (.s1(s1), .s2(s2), .s3(s3), .a(a), .b(b), .q(q), .ctrl_superposed(sup));
  rev_gupta_lu refc (.s1(s1), .s2(s2), .s3(s3), .a(a), .b(b),
                     .y(ref_lines[0]), .g1(ref_lines[1]), .g2(ref_lines[2]),
                     .g3(ref_lines[3]), .g4(ref_lines[4]));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b%b got=%0d exp=%0d", what, s1, s2, s3, a, b, got, exp);
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
    logic f;
    for (int i = 0; i < 32; i++) begin
      {s1, s2, s3, a, b} = 5'(i);
      #1;
      check("basis", int'({q[4].v, q[3].v, q[2].v, q[1].v, q[0].v}), 0);
      check("control", int'(sup), 0);
      check("lines", int'({q[4].b, q[3].b, q[2].b, q[1].b, q[0].b}), int'(ref_lines));
      unique case ({s2, s3})
        2'b00: f = 1'b0;
        2'b01: f = a & b;
        2'b10: f = a ^ b;
        2'b11: f = a | b;
      endcase
      check("op", int'(q[0].b), int'(f ^ s1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
