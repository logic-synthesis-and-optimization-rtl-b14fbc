// qc_gupta_lu: quantum (NCV) realisation of the Gupta logic unit
// rev_gupta_lu (eight logic operations), fifteen elementary gates, in
// four-valued emulation.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = S3, 3 = A, 4 = B.  Each of the
// three Toffoli gates is expanded into CV a->t, CV b->t, CNOT a->b,
// CV+ b->t, CNOT a->b:
//   CV S2->S1, CV A->S1, CNOT S2->A, CV+ A->S1, CNOT S2->A   Toffoli(S2,A->S1)
//   CV A->S2, CV S3->S2, CNOT S3->A, CV+ A->S2, CNOT S3->A   Toffoli(A,S3->S2)
//   CV S2->S1, CV B->S1, CNOT S2->B, CV+ B->S1, CNOT S2->B   Toffoli(S2,B->S1)
// Quantum cost 15.  The fifth and sixth gates (CNOT S2->A, then CV A->S2)
// act on the same two lines in opposite directions and form one merged
// two-qubit gate, so the cost under that rule is 14.  Both figures are the
// ones usually reported for this unit.  The output y is q[0]; the other
// lines are garbage, equal to rev_gupta_lu's; ctrl_superposed stays low.
//
// Combinational, no clock.  The gate sequence is this library's own,
// derived by the standard Toffoli expansion.
module qc_gupta_lu
  import rev_pkg::*;
(
  input  logic           s1,
  input  logic           s2,
  input  logic           s3,
  input  logic           a,
  input  logic           b,
  output qline_t [4:0]   q,
  output logic           ctrl_superposed
);

  localparam int unsigned N = 5;
  localparam int unsigned G = 15;

  localparam ncv_op_e     OPS  [G] = '{NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT,
                                       NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT,
                                       NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT};
  localparam int unsigned CTLS [G] = '{1, 3, 1, 3, 1,  3, 2, 2, 3, 2,  1, 4, 1, 4, 1};
  localparam int unsigned TGTS [G] = '{0, 0, 3, 0, 3,  1, 1, 3, 1, 3,  0, 0, 4, 0, 4};

  qline_t [N-1:0] st [G+1];
  logic   [G-1:0] sup;

  assign st[0] = {q_of(b), q_of(a), q_of(s3), q_of(s2), q_of(s1)};

  for (genvar i = 0; i < G; i++) begin : g_gate
    ncv_gate #(.N(N), .OP(OPS[i]), .CTRL(CTLS[i]), .TGT(TGTS[i])) u_gate (
      .x(st[i]), .y(st[i+1]), .ctrl_superposed(sup[i])
    );
  end

  assign q               = st[G];
  assign ctrl_superposed = |sup;

endmodule
