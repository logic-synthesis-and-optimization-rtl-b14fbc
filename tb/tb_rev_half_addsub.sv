// tb_rev_half_addsub: exhaustive self-check of the reversible half
// adder/subtractor.
//  * With c = 0 the outputs must be carry A&B / sum A^B for S = 0 and
//    borrow ~A&B / difference A^B for S = 1 (A - B).
//  * Over all 16 inputs (c, S, A, B read as a 4-bit number with c as the
//    most significant bit) the output (C/B, g1, S/D, g2) must equal the
//    published permutation 0 3 6 13 4 15 2 1 8 11 14 5 12 7 10 9.
//  * Every output pattern must appear once (the circuit is reversible).
module tb_rev_half_addsub;

  int checks = 0;
  int failures = 0;

  logic c, s, a, b;
  logic cb, g1, sd, g2;

  rev_half_addsub dut (
    .c(c), .s(s), .a(a), .b(b),
    .carry_borrow(cb), .g1(g1), .sum_diff(sd), .g2(g2)
  );

  localparam int PERM [16] = '{0, 3, 6, 13, 4, 15, 2, 1, 8, 11, 14, 5, 12, 7, 10, 9};

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b got=%0d exp=%0d", what, c, s, a, b, got, exp);
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
    int out;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {c, s, a, b} = 4'(i);
      #1;
      out = int'({cb, g1, sd, g2});
      check("permutation", out, PERM[i]);
      seen[out] = 1'b1;
      if (!c) begin
        check("sum/diff", int'(sd), int'(a ^ b));
        check("carry/borrow", int'(cb), s ? int'(~a & b) : int'(a & b));
      end
    end
    check("bijective", int'(&seen), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
