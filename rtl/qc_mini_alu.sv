// qc_mini_alu: quantum (NCV) realisation of the Mini-ALU rev_mini_alu (OR,
// ADD, AND, ID), fifteen elementary gates, in four-valued emulation.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = A, 3 = B.  The two CNOTs of the
// MCT circuit are kept and its three Toffoli gates are expanded:
//   CNOT B->S2, CNOT A->S1
//   CV S2->A, CV B->A, CNOT S2->B, CV+ B->A              Toffoli(S2,B->A)
//   CV S1->B, CV A->B, CNOT S1->A, CV+ A->B, CNOT S1->A  Toffoli(S1,A->B)
//   CV+ B->A, CNOT S2->B, CV B->A, CV S2->A              Toffoli(S2,B->A)
// The first and last Toffoli gates are the same gate, expanded in opposite
// orders.  Between them, the CNOT S2->B that ends the first expansion and
// the CNOT S2->B that starts the second commute with the middle Toffoli,
// whose target is B.  The two CNOTs therefore cancel, which brings the cost
// from 17 down to 15, the figure usually reported for this unit.  The
// merged two-qubit gate rule is said to give 14, but no adjacent CNOT/CV
// pair occurs in this sequence, so it still counts 15 under that rule.
// Outputs for basis inputs equal rev_mini_alu's lines: q[2] = o1,
// q[3] = o2; ctrl_superposed stays low.
//
// Combinational, no clock.  The gate sequence is this library's own,
// derived by Toffoli expansion and the deletion and moving rules.
module qc_mini_alu
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
  localparam int unsigned G = 15;

  localparam ncv_op_e     OPS  [G] = '{NCV_CNOT, NCV_CNOT,
                                       NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG,
                                       NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT,
                                       NCV_CVDG, NCV_CNOT, NCV_CV, NCV_CV};
  localparam int unsigned CTLS [G] = '{3, 2,  1, 3, 1, 3,  0, 2, 0, 2, 0,  3, 1, 3, 1};
  localparam int unsigned TGTS [G] = '{1, 0,  2, 2, 3, 2,  3, 3, 2, 3, 2,  2, 3, 2, 2};

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
