// tb_qc_full_addsub: exhaustive self-check of the NCV full
// adder/subtractor: basis-state outputs, no superposed control, the
// published permutation 0 14 6 9 12 3 11 5 8 7 15 1 4 10 2 13 of the
// reversible circuit, and the arithmetic itself (A+B+C for S = 0, A-B-C
// for S = 1).
module tb_qc_full_addsub;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic s, a, b, c;
  qline_t [3:0] q;
  logic sup;

  qc_full_addsub dut (.s(s), .a(a), .b(b), .c(c), .q(q), .ctrl_superposed(sup));

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
    int r;
    for (int i = 0; i < 16; i++) begin
      {s, a, b, c} = 4'(i);
      #1;
      check("basis", int'({q[0].v, q[1].v, q[2].v, q[3].v}), 0);
      check("control", int'(sup), 0);
      check("permutation", int'({q[0].b, q[1].b, q[2].b, q[3].b}), PERM[i]);
      r = s ? int'(a) - int'(b) - int'(c) : int'(a) + int'(b) + int'(c);
      check("sum/diff", int'(q[1].b), r & 1);
      check("carry/borrow", int'(q[3].b), s ? int'(r < 0) : int'(r > 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
