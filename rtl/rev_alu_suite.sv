// rev_alu_suite: every circuit of the library side by side, each with its
// own ports.  The circuits do not connect to one another: they are separate
// 1-bit units, each a complete reversible or quantum circuit.
//
// Reversible (MCT) circuits take and return their lines as one bus, bit i
// being line i (line 0 is the top line of the circuit drawing):
//   has_*  half adder/subtractor, lines c S A B  ->  C/B g1 S/D g2
//   fas_*  full adder/subtractor, lines S A B C  ->  g1 S/D g2 C/B
//   alu_*  ALU (00 ADD, 01 OR, 10 SUB, 11 AND), lines S1 S2 A B -> g1 o1 g2 o2
//   lu_*   LU (00 XOR, 01 OR, 11 AND), lines S1 S2 A B -> g1 g2 o1 g3
//   mini_* Mini-ALU (00 OR, 01 ADD, 10 AND, 11 ID), lines S1 S2 A B -> g1 g2 o1 o2
//   glu_*  Gupta's logic unit, lines S1 S2 S3 A B -> y g1 g2 g3 g4
// Quantum (NCV) realisations, in four-valued emulation, take the same
// Boolean lines and return qline_t lines plus a flag that a control saw a
// superposed value:
//   qhas_*, qfas_*, qalu_*   of the half, full adder/subtractor and ALU
//   qlu_*, qmini_*, qglu_*   of the LU, the Mini-ALU and Gupta's logic unit
//   tof_*                    the four NCV realisations of the Toffoli gate,
//                            all driven by the same three lines
// All paths are combinational; there is no clock or reset.
module rev_alu_suite
  import rev_pkg::*;
(
  input  logic   [3:0] has_in,
  output logic   [3:0] has_out,
  input  logic   [3:0] fas_in,
  output logic   [3:0] fas_out,
  input  logic   [3:0] alu_in,
  output logic   [3:0] alu_out,
  input  logic   [3:0] lu_in,
  output logic   [3:0] lu_out,
  input  logic   [3:0] mini_in,
  output logic   [3:0] mini_out,
  input  logic   [4:0] glu_in,
  output logic   [4:0] glu_out,

  input  logic   [3:0] qhas_in,
  output qline_t [3:0] qhas_out,
  output logic         qhas_sup,
  input  logic   [3:0] qfas_in,
  output qline_t [3:0] qfas_out,
  output logic         qfas_sup,
  input  logic   [3:0] qalu_in,
  output qline_t [3:0] qalu_out,
  output logic         qalu_sup,
  input  logic   [3:0] qlu_in,
  output qline_t [3:0] qlu_out,
  output logic         qlu_sup,
  input  logic   [3:0] qmini_in,
  output qline_t [3:0] qmini_out,
  output logic         qmini_sup,
  input  logic   [4:0] qglu_in,
  output qline_t [4:0] qglu_out,
  output logic         qglu_sup,

  input  qline_t [2:0] tof_in,
  output qline_t [2:0] tof_out [4],
  output logic   [3:0] tof_sup
);

  rev_half_addsub u_has (
    .c(has_in[0]), .s(has_in[1]), .a(has_in[2]), .b(has_in[3]),
    .carry_borrow(has_out[0]), .g1(has_out[1]), .sum_diff(has_out[2]), .g2(has_out[3])
  );

  rev_full_addsub u_fas (
    .s(fas_in[0]), .a(fas_in[1]), .b(fas_in[2]), .c(fas_in[3]),
    .g1(fas_out[0]), .sum_diff(fas_out[1]), .g2(fas_out[2]), .carry_borrow(fas_out[3])
  );

  rev_alu u_alu (
    .s1(alu_in[0]), .s2(alu_in[1]), .a(alu_in[2]), .b(alu_in[3]),
    .g1(alu_out[0]), .o1(alu_out[1]), .g2(alu_out[2]), .o2(alu_out[3])
  );

  rev_lu u_lu (
    .s1(lu_in[0]), .s2(lu_in[1]), .a(lu_in[2]), .b(lu_in[3]),
    .g1(lu_out[0]), .g2(lu_out[1]), .o1(lu_out[2]), .g3(lu_out[3])
  );

  rev_mini_alu u_mini (
    .s1(mini_in[0]), .s2(mini_in[1]), .a(mini_in[2]), .b(mini_in[3]),
    .g1(mini_out[0]), .g2(mini_out[1]), .o1(mini_out[2]), .o2(mini_out[3])
  );

  rev_gupta_lu u_glu (
    .s1(glu_in[0]), .s2(glu_in[1]), .s3(glu_in[2]), .a(glu_in[3]), .b(glu_in[4]),
    .y(glu_out[0]), .g1(glu_out[1]), .g2(glu_out[2]), .g3(glu_out[3]), .g4(glu_out[4])
  );

  qc_half_addsub u_qhas (
    .c(qhas_in[0]), .s(qhas_in[1]), .a(qhas_in[2]), .b(qhas_in[3]),
    .q(qhas_out), .ctrl_superposed(qhas_sup)
  );

  qc_full_addsub u_qfas (
    .s(qfas_in[0]), .a(qfas_in[1]), .b(qfas_in[2]), .c(qfas_in[3]),
    .q(qfas_out), .ctrl_superposed(qfas_sup)
  );

  qc_alu u_qalu (
    .s1(qalu_in[0]), .s2(qalu_in[1]), .a(qalu_in[2]), .b(qalu_in[3]),
    .q(qalu_out), .ctrl_superposed(qalu_sup)
  );

  qc_lu u_qlu (
    .s1(qlu_in[0]), .s2(qlu_in[1]), .a(qlu_in[2]), .b(qlu_in[3]),
    .q(qlu_out), .ctrl_superposed(qlu_sup)
  );

  qc_mini_alu u_qmini (
    .s1(qmini_in[0]), .s2(qmini_in[1]), .a(qmini_in[2]), .b(qmini_in[3]),
    .q(qmini_out), .ctrl_superposed(qmini_sup)
  );

  qc_gupta_lu u_qglu (
    .s1(qglu_in[0]), .s2(qglu_in[1]), .s3(qglu_in[2]), .a(qglu_in[3]), .b(qglu_in[4]),
    .q(qglu_out), .ctrl_superposed(qglu_sup)
  );

  for (genvar v = 0; v < 4; v++) begin : g_tof
    toffoli_ncv #(.VARIANT(v)) u_tof (
      .x(tof_in), .y(tof_out[v]), .ctrl_superposed(tof_sup[v])
    );
  end

endmodule
