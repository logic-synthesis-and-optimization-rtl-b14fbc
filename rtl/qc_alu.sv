// qc_alu: quantum (NCV) realisation of the 1-bit reversible ALU (ADD, OR,
// SUB, AND), seventeen elementary gates, in four-valued emulation.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = A, 3 = B.  The two CNOTs of the
// MCT circuit are kept and each of its three Toffoli gates is expanded into
// five NCV gates.  In order:
//   CNOT A->B, CNOT A->S1
//   CV S1->A, CNOT S1->B, CV+ B->A, CNOT S1->B, CV B->A     Toffoli(S1,B->A)
//   CV S2->B, CNOT S2->A, CV+ A->B, CNOT S2->A             Toffoli(S2,A->B)
//   CV A->S2                                               Toffoli(S1,A->S2)
//   CV A->B                                                ends Toffoli(S2,A->B)
//   CNOT S1->A, CV+ A->S2, CNOT S1->A, CV S1->S2           Toffoli(S1,A->S2)
// (CV A->S2 has been moved forward past gates it commutes with.)
// Two pairs (CNOT A->S1 with CV S1->A, CNOT S2->A with CV A->S2) act on the
// same two lines and count as merged two-qubit gates: cost 17, or 15 under
// the merged two-qubit gate rule.
// Outputs for basis inputs: q[0] = g1, q[1] = o1 (carry/borrow),
// q[2] = g2, q[3] = o2 (result); ctrl_superposed stays low.
//
// Combinational, no clock.  The gate sequence is that of the published
// reduced quantum circuit; the emulation is this library's own.
module qc_alu
  import rev_pkg::*;
(
  input  logic           s1,
  input  logic           s2,
  input  logic           a,
  input  logic           b,
  output qline_t [3:0]   q,
  output logic           ctrl_superposed
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 17;

  localparam ncv_op_e     OPS  [G] = '{NCV_CNOT, NCV_CNOT,
                                       NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT, NCV_CV,
                                       NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT, NCV_CV,
                                       NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT, NCV_CV};
  localparam int unsigned CTLS [G] = '{2, 2,  0, 0, 3, 0, 3,  1, 1, 2, 1, 2,  2, 0, 2, 0, 0};
  localparam int unsigned TGTS [G] = '{3, 0,  2, 3, 2, 3, 2,  3, 2, 3, 2, 1,  3, 2, 1, 2, 1};

  qline_t [N-1:0] st [G+1];
  logic   [G-1:0] sup;

  assign st[0] = {q_of(b), q_of(a), q_of(s2), q_of(s1)};

  for (genvar i = 0; i < G; i++) begin : g_gate
    ncv_gate #(.N(N), .OP(OPS[i]), .CTRL(CTLS[i]), .TGT(TGTS[i])) u_gate (
      .x(st[i]), .y(st[i+1]), .ctrl_superposed(sup[i])
    );
  end

  assign q               = st[G];
  assign ctrl_superposed = |sup;

endmodule
