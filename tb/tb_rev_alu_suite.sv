// tb_rev_alu_suite: end-to-end self-check of the whole library through its
// top, at its only size.  Each reversible circuit is driven with all of its
// input patterns and checked against the arithmetic or logic it performs;
// each quantum (NCV) realisation is driven with the same patterns and must
// give the same Boolean lines as its reversible circuit, all in basis
// states; the four Toffoli realisations are driven with every basis and
// V-state target.  The test counts how often each operation of each unit,
// a carry out, a borrow out, a Toffoli firing on a superposed target and a
// flagged superposed control occurred, and counts a failure for any that
// never did.
module tb_rev_alu_suite;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic   [3:0] has_in, fas_in, alu_in, lu_in, mini_in;
  logic   [3:0] has_out, fas_out, alu_out, lu_out, mini_out;
  logic   [4:0] glu_in, glu_out;
  logic   [3:0] qhas_in, qfas_in, qalu_in;
  qline_t [3:0] qhas_out, qfas_out, qalu_out;
  logic         qhas_sup, qfas_sup, qalu_sup;
  logic   [3:0] qlu_in, qmini_in;
  logic   [4:0] qglu_in;
  qline_t [3:0] qlu_out, qmini_out;
  qline_t [4:0] qglu_out;
  logic         qlu_sup, qmini_sup, qglu_sup;
  qline_t [2:0] tof_in;
  qline_t [2:0] tof_out [4];
  logic   [3:0] tof_sup;

  rev_alu_suite dut (.*);

  // event counters
  int n_add, n_sub, n_carry, n_borrow;
  int n_alu_op [4];
  int n_lu_op  [4];
  int n_mini_op[4];
  int n_glu_op [8];
  int n_qc, n_qglu, n_tof_v, n_tof_flag;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  function automatic logic [3:0] bits_of(input qline_t [3:0] q);
    return {q[3].b, q[2].b, q[1].b, q[0].b};
  endfunction

  function automatic logic [3:0] vs_of(input qline_t [3:0] q);
    return {q[3].v, q[2].v, q[1].v, q[0].v};
  endfunction

  task automatic require(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s, a, b, c, s1, s2, s3, f;
    int r;
    n_add = 0; n_sub = 0; n_carry = 0; n_borrow = 0;
    n_qc = 0; n_qglu = 0; n_tof_v = 0; n_tof_flag = 0;
    foreach (n_alu_op[k])  n_alu_op[k]  = 0;
    foreach (n_lu_op[k])   n_lu_op[k]   = 0;
    foreach (n_mini_op[k]) n_mini_op[k] = 0;
    foreach (n_glu_op[k])  n_glu_op[k]  = 0;
    tof_in = {Q0, Q0, Q0};

    for (int i = 0; i < 32; i++) begin
      // bus bit k = line k
      has_in  = 4'(i);
      fas_in  = 4'(i);
      alu_in  = 4'(i);
      lu_in   = 4'(i);
      mini_in = 4'(i);
      glu_in  = 5'(i);
      qhas_in = 4'(i);
      qfas_in = 4'(i);
      qalu_in = 4'(i);
      qlu_in  = 4'(i);
      qmini_in = 4'(i);
      qglu_in = 5'(i);
      #1;

      if (i < 16) begin
        // half adder/subtractor, lines c S A B, in normal use c = 0
        {b, a, s, c} = has_in;
        if (!c) begin
          check("has sum/diff", int'(has_out[2]), int'(a ^ b));
          check("has carry/borrow", int'(has_out[0]), s ? int'(~a & b) : int'(a & b));
        end

        // full adder/subtractor, lines S A B C
        {c, b, a, s} = fas_in;
        r = s ? int'(a) - int'(b) - int'(c) : int'(a) + int'(b) + int'(c);
        check("fas sum/diff", int'(fas_out[1]), r & 1);
        check("fas carry/borrow", int'(fas_out[3]), s ? int'(r < 0) : int'(r > 1));
        if (!s) begin n_add++; if (fas_out[3]) n_carry++; end
        else    begin n_sub++; if (fas_out[3]) n_borrow++; end

        // ALU, lines S1 S2 A B; operation code {S1, S2}
        {b, a, s2, s1} = alu_in;
        n_alu_op[{s1, s2}]++;
        unique case ({s1, s2})
          2'b00: check("alu ADD", int'({alu_out[1], alu_out[3]}), int'(a) + int'(b));
          2'b01: check("alu OR",  int'(alu_out[3]), int'(a | b));
          2'b10: begin
            check("alu SUB diff",   int'(alu_out[3]), int'(a ^ b));
            check("alu SUB borrow", int'(alu_out[1]), int'(~a & b));
          end
          2'b11: check("alu AND", int'(alu_out[3]), int'(a & b));
        endcase

        // LU
        {b, a, s2, s1} = lu_in;
        case ({s1, s2})
          2'b00: begin check("lu XOR", int'(lu_out[2]), int'(a ^ b)); n_lu_op[0]++; end
          2'b01: begin check("lu OR",  int'(lu_out[2]), int'(a | b)); n_lu_op[1]++; end
          2'b11: begin check("lu AND", int'(lu_out[2]), int'(a & b)); n_lu_op[3]++; end
          default: n_lu_op[2]++;
        endcase

        // Mini-ALU
        {b, a, s2, s1} = mini_in;
        n_mini_op[{s1, s2}]++;
        unique case ({s1, s2})
          2'b00: check("mini OR",  int'(mini_out[3]), int'(a | b));
          2'b01: check("mini ADD", int'({mini_out[2], mini_out[3]}), int'(a) + int'(b));
          2'b10: check("mini AND", int'(mini_out[3]), int'(a & b));
          2'b11: check("mini ID",  int'({mini_out[2], mini_out[3]}), int'({a, b}));
        endcase

        // quantum realisations against their reversible circuits
        check("qhas basis", int'(vs_of(qhas_out)), 0);
        check("qfas basis", int'(vs_of(qfas_out)), 0);
        check("qalu basis", int'(vs_of(qalu_out)), 0);
        check("qhas lines", int'(bits_of(qhas_out)), int'(has_out));
        check("qfas lines", int'(bits_of(qfas_out)), int'(fas_out));
        check("qalu lines", int'(bits_of(qalu_out)), int'(alu_out));
        check("qlu basis", int'(vs_of(qlu_out)), 0);
        check("qmini basis", int'(vs_of(qmini_out)), 0);
        check("qlu lines", int'(bits_of(qlu_out)), int'(lu_out));
        check("qmini lines", int'(bits_of(qmini_out)), int'(mini_out));
        check("q controls", int'({qhas_sup, qfas_sup, qalu_sup, qlu_sup, qmini_sup}), 0);
        n_qc++;
      end

      // Gupta's logic unit, lines S1 S2 S3 A B
      {b, a, s3, s2, s1} = glu_in;
      unique case ({s2, s3})
        2'b00: f = 1'b0;
        2'b01: f = a & b;
        2'b10: f = a ^ b;
        2'b11: f = a | b;
      endcase
      check("glu", int'(glu_out[0]), int'(f ^ s1));
      n_glu_op[{s1, s2, s3}]++;
      check("qglu basis", int'({qglu_out[4].v, qglu_out[3].v, qglu_out[2].v, qglu_out[1].v, qglu_out[0].v}), 0);
      check("qglu lines", int'({qglu_out[4].b, qglu_out[3].b, qglu_out[2].b, qglu_out[1].b, qglu_out[0].b}), int'(glu_out));
      check("qglu control", int'(qglu_sup), 0);
      n_qglu++;
    end

    // Toffoli realisations: every basis/V-state target, basis controls
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        qline_t t, te;
        t = qline_t'(j);
        tof_in = {t, q_of(i[0]), q_of(i[1])};
        #1;
        te = '{v: t.v, b: t.b ^ (i[0] & i[1])};
        for (int v = 0; v < 4; v++) begin
          check("tof target", int'(tof_out[v][2]), int'(te));
          check("tof flag", int'(tof_sup[v]), 0);
        end
        if (t.v && i == 3) n_tof_v++;
      end
    end
    // superposed control
    tof_in = {Q0, QV1, Q1};
    #1;
    for (int v = 0; v < 4; v++) begin
      check("tof flag superposed", int'(tof_sup[v]), 1);
      if (tof_sup[v]) n_tof_flag++;
    end

    $display("mechanisms exercised:");
    require("full adder ADD",         n_add);
    require("full adder SUB",         n_sub);
    require("carry out",              n_carry);
    require("borrow out",             n_borrow);
    require("ALU ADD",                n_alu_op[0]);
    require("ALU OR",                 n_alu_op[1]);
    require("ALU SUB",                n_alu_op[2]);
    require("ALU AND",                n_alu_op[3]);
    require("LU XOR",                 n_lu_op[0]);
    require("LU OR",                  n_lu_op[1]);
    require("LU AND",                 n_lu_op[3]);
    require("Mini-ALU OR",            n_mini_op[0]);
    require("Mini-ALU ADD",           n_mini_op[1]);
    require("Mini-ALU AND",           n_mini_op[2]);
    require("Mini-ALU ID",            n_mini_op[3]);
    for (int k = 0; k < 8; k++) require($sformatf("Gupta LU code %0d", k), n_glu_op[k]);
    require("NCV vs MCT comparisons", n_qc);
    require("NCV vs MCT, Gupta LU",   n_qglu);
    require("Toffoli on V-state",     n_tof_v);
    require("superposed control",     n_tof_flag);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
