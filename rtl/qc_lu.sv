// qc_lu: quantum (NCV) realisation of the compact logic unit rev_lu (XOR,
// OR, AND), eleven elementary gates, in four-valued emulation.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = A, 3 = B.  The CNOT of the MCT
// circuit is kept and each of its two Toffoli gates is expanded into the
// 5-gate sequence CV a->t, CV b->t, CNOT a->b, CV+ b->t, CNOT a->b:
//   CNOT B->S1
//   CV S2->B, CV A->B, CNOT S2->A, CV+ A->B, CNOT S2->A     Toffoli(S2,A->B)
//   CV S1->A, CV B->A, CNOT S1->B, CV+ B->A, CNOT S1->B     Toffoli(S1,B->A)
// Quantum cost 11, the figure usually reported for this unit.  No pair of
// gates here is a mergeable CNOT/CV pair, so the cost under the merged
// two-qubit gate rule is also 11; a realisation with cost 10 under that
// rule is reported but its gate sequence is not known, and this is not it.
// Outputs for basis inputs: q[2] = o1 (result), q[0], q[1], q[3] garbage,
// equal to rev_lu's lines; ctrl_superposed stays low.
//
// Combinational, no clock.  The gate sequence is this library's own,
// derived by the standard Toffoli expansion.
module qc_lu
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
  localparam int unsigned G = 11;

  localparam ncv_op_e     OPS  [G] = '{NCV_CNOT,
                                       NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT,
                                       NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT};
  localparam int unsigned CTLS [G] = '{3,  1, 2, 1, 2, 1,  0, 3, 0, 3, 0};
  localparam int unsigned TGTS [G] = '{0,  3, 3, 2, 3, 2,  2, 2, 3, 2, 3};

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
