// qc_half_addsub: quantum (NCV) realisation of the reversible half
// adder/subtractor, seven elementary gates, in four-valued emulation.
//
// Lines, top to bottom: 0 = c (constant 0), 1 = S, 2 = A, 3 = B.  The two
// CNOTs of the MCT circuit come first; its Toffoli (controls S, B, target c)
// is replaced by five NCV gates:
//   CNOT A->S, CNOT B->A,
//   CV B->c, CV S->c, CNOT B->S, CV+ S->c, CNOT B->S
// c collects V^B * V^S' * V+^(S'^B) with S' = S^A, which is NOT exactly
// when S' = B = 1 and identity otherwise.  Quantum cost 7.
// For every basis input all four lines end in a basis state equal to the
// MCT circuit's outputs: q[0] = carry/borrow, q[1] = g1, q[2] = sum/diff,
// q[3] = g2.  ctrl_superposed stays low for basis inputs.
//
// Combinational, no clock.  The gate sequence is that of the published
// reduced quantum circuit; the emulation is this library's own.
module qc_half_addsub
  import rev_pkg::*;
(
  input  logic           c,
  input  logic           s,
  input  logic           a,
  input  logic           b,
  output qline_t [3:0]   q,
  output logic           ctrl_superposed
);

  localparam int unsigned N = 4;
  localparam int unsigned G = 7;

  localparam ncv_op_e     OPS  [G] = '{NCV_CNOT, NCV_CNOT, NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT};
  localparam int unsigned CTLS [G] = '{2, 3, 3, 1, 3, 1, 3};
  localparam int unsigned TGTS [G] = '{1, 2, 0, 0, 1, 0, 1};

  qline_t [N-1:0] st [G+1];
  logic   [G-1:0] sup;

  assign st[0] = {q_of(b), q_of(a), q_of(s), q_of(c)};

  for (genvar i = 0; i < G; i++) begin : g_gate
    ncv_gate #(.N(N), .OP(OPS[i]), .CTRL(CTLS[i]), .TGT(TGTS[i])) u_gate (
      .x(st[i]), .y(st[i+1]), .ctrl_superposed(sup[i])
    );
  end

  assign q               = st[G];
  assign ctrl_superposed = |sup;

endmodule
