// ncv_gate: one elementary quantum gate of the NCV library on an N-line bus,
// in the four-valued emulation of rev_pkg.
//
// OP selects NOT (no control), CNOT, controlled-V or controlled-V-dagger.
// When the control line CTRL holds |1> the target TGT is transformed (NOT,
// V or V-dagger); when it holds |0> nothing changes.  A control that is in a
// V-state would entangle the two lines, which four-valued logic cannot
// express; ctrl_superposed is then raised and the target is left unchanged.
// A correct NCV realisation of a Boolean function never raises it for basis
// inputs, and the testbenches check that it stays low.
//
// Combinational, no clock.  Gate behaviour follows the NCV gate definitions
// (V*V = NOT, V-dagger the inverse of V); the encoding and the flag are this
// library's own.
module ncv_gate
  import rev_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter ncv_op_e     OP   = NCV_NOT,
  parameter int unsigned CTRL = 0,  // control line (unused for NCV_NOT)
  parameter int unsigned TGT  = 0   // target line
) (
  input  qline_t [N-1:0] x,
  output qline_t [N-1:0] y,
  output logic           ctrl_superposed
);

  if (TGT >= N || CTRL >= N) begin : g_bad_line
    $error("ncv_gate: line number outside %0d lines", N);
  end
  if (OP != NCV_NOT && CTRL == TGT) begin : g_bad_ctrl
    $error("ncv_gate: control and target are the same line");
  end

  logic active;

  always_comb begin
    y = x;
    if (OP == NCV_NOT) begin
      active          = 1'b1;
      ctrl_superposed = 1'b0;
    end else begin
      active          = !x[CTRL].v && x[CTRL].b;
      ctrl_superposed = x[CTRL].v;
    end
    if (active) begin
      unique case (OP)
        NCV_NOT, NCV_CNOT: y[TGT] = q_not(x[TGT]);
        NCV_CV:            y[TGT] = q_v(x[TGT]);
        NCV_CVDG:          y[TGT] = q_vdg(x[TGT]);
      endcase
    end
  end

endmodule
