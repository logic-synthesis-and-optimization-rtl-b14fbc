// qc_full_addsub: quantum (NCV) realisation of the reversible full
// adder/subtractor, nine elementary gates, in four-valued emulation.
//
// Lines, top to bottom: 0 = S, 1 = A, 2 = B, 3 = C.  The four CNOTs of the
// MCT circuit are kept; its Toffoli (controls S, B, target C) becomes
//   CV S->C, CV B->C, CNOT S->B, CV+ B->C, CNOT S->B
// The fourth CNOT (C->S) and the first CV act on the same two lines S and C
// and together form one merged two-qubit gate, so the circuit has nine
// gates and a cost of eight under the merged two-qubit gate rule.
// Outputs for basis inputs: q[0] = g1, q[1] = sum/diff, q[2] = g2,
// q[3] = carry/borrow, all in basis states; ctrl_superposed stays low.
//
// Combinational, no clock.  The gate sequence is that of the published
// reduced quantum circuit; the emulation is this library's own.
module qc_full_addsub
  import rev_pkg::*;
(
  input  logic           s,
  input  logic           a,
  input  logic           b,
  input  logic           c,
  output qline_t [3:0]   q,
  output logic           ctrl_superposed
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 9;

  localparam ncv_op_e     OPS  [G] = '{NCV_CNOT, NCV_CNOT, NCV_CNOT, NCV_CNOT, NCV_CV,
                                       NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT};
  localparam int unsigned CTLS [G] = '{1, 3, 2, 3, 0, 2, 0, 2, 0};
  localparam int unsigned TGTS [G] = '{0, 2, 1, 0, 3, 3, 2, 3, 2};

  qline_t [N-1:0] st [G+1];
  logic   [G-1:0] sup;

  assign st[0] = {q_of(c), q_of(b), q_of(a), q_of(s)};

  for (genvar i = 0; i < G; i++) begin : g_gate
    ncv_gate #(.N(N), .OP(OPS[i]), .CTRL(CTLS[i]), .TGT(TGTS[i])) u_gate (
      .x(st[i]), .y(st[i+1]), .ctrl_superposed(sup[i])
    );
  end

  assign q               = st[G];
  assign ctrl_superposed = |sup;

endmodule
