// mct_gate: one multiple-control Toffoli gate (Toffoli-k) on an N-line bus.
//
// The target line TGT is XORed with the AND of the control lines selected by
// the mask CTRL; every other line passes unchanged.  With no control this is
// the NOT gate, with one control the CNOT (Feynman) gate, with two the
// Toffoli gate.  The gate is its own inverse.  Bit i of x and y is line i,
// line 0 being the top line of a drawing (see rev_pkg::line_bit).
//
// Purely combinational; no clock, no reset.  The gate definition follows the
// MCT gate of the reversible-logic literature; the bus form and the mask
// parameter are this library's own.
module mct_gate #(
  parameter int unsigned N    = 4,
  parameter int unsigned CTRL = 0,  // mask of control lines
  parameter int unsigned TGT  = 0   // target line
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);

  localparam logic [N-1:0] CMASK = N'(CTRL);

  if (TGT >= N) begin : g_bad_tgt
    $error("mct_gate: target line %0d outside %0d lines", TGT, N);
  end
  if (CMASK[TGT]) begin : g_bad_ctrl
    $error("mct_gate: target line %0d is also a control", TGT);
  end
  if ((CTRL >> N) != 0) begin : g_bad_mask
    $error("mct_gate: control mask names a line outside %0d lines", N);
  end

  logic fire;

  always_comb begin
    fire = &(x | ~CMASK);
    y = x;
    y[TGT] = x[TGT] ^ fire;
  end

endmodule
