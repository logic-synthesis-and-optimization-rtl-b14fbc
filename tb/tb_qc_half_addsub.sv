// tb_qc_half_addsub: exhaustive self-check of the NCV half
// adder/subtractor.  For each of the 16 basis inputs every output line must
// be in a basis state (no V-state left over), no gate may have seen a
// superposed control, and the four lines must equal the reversible
// circuit's published permutation 0 3 6 13 4 15 2 1 8 11 14 5 12 7 10 9
// (inputs and outputs read with line 0 as the most significant bit).
module tb_qc_half_addsub;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic c, s, a, b;
  qline_t [3:0] q;
  logic sup;

  qc_half_addsub dut (.c(c), .s(s), .a(a), .b(b), .q(q), .ctrl_superposed(sup));

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
    for (int i = 0; i < 16; i++) begin
      {c, s, a, b} = 4'(i);
      #1;
      check("basis", int'({q[0].v, q[1].v, q[2].v, q[3].v}), 0);
      check("control", int'(sup), 0);
      check("permutation", int'({q[0].b, q[1].b, q[2].b, q[3].b}), PERM[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
