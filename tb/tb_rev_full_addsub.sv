// tb_rev_full_addsub: exhaustive self-check of the reversible full
// adder/subtractor.
//  * S = 0: {carry, sum} must equal A + B + C.
//  * S = 1: {borrow, diff} must equal A - B - C (borrow set when the result
//    is negative).
//  * Reading (S, A, B, C) as a 4-bit number, S most significant, the output
//    (g1, S/D, g2, C/B) must equal the published permutation
//    0 14 6 9 12 3 11 5 8 7 15 1 4 10 2 13.
//  * Every output pattern appears once.
module tb_rev_full_addsub;

  int checks = 0;
  int failures = 0;

  logic s, a, b, c;
  logic g1, sd, g2, cb;

  rev_full_addsub dut (
    .s(s), .a(a), .b(b), .c(c),
    .g1(g1), .sum_diff(sd), .g2(g2), .carry_borrow(cb)
  );

  localparam int PERM [16] = '{0, 14, 6, 9, 12, 3, 11, 5, 8, 7, 15, 1, 4, 10, 2, 13};

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b got=%0d exp=%0d", what, s, a, b, c, got, exp);
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
    int out, r;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {s, a, b, c} = 4'(i);
      #1;
      out = int'({g1, sd, g2, cb});
      check("permutation", out, PERM[i]);
      seen[out] = 1'b1;
      if (!s) begin
        r = int'(a) + int'(b) + int'(c);
        check("add", int'({cb, sd}), r);
      end else begin
        r = int'(a) - int'(b) - int'(c);
        check("sub diff", int'(sd), r & 1);
        check("sub borrow", int'(cb), int'(r < 0));
      end
    end
    check("bijective", int'(&seen), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
