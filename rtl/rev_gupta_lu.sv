// rev_gupta_lu: 1-bit reversible logic unit with eight operations (constant
// 0 and 1, AND, NAND, XOR, XNOR, OR, NOR) on five lines, built from three
// Toffoli gates.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = S3, 3 = A, 4 = B.  Gate list
// (1 3 0) (2 3 1) (1 4 0):
//   S1 ^= S2 & A
//   S2 ^= S3 & A
//   S1 ^= S2 & B               y = S1 ^ S2·A ^ (S2 ^ S3·A)·B
// The result y is the S1 line; the other four lines are garbage g1..g4.
// Line S1 inverts the result, and lines S2 S3 choose the operation:
//   S2 S3 = 00: constant 0     01: AND     10: XOR     11: OR
// so with S1 = 1 the same codes give constant 1, NAND, XNOR and NOR.
// The operation table printed beside the drawing names the selectors in
// another order (its "S1 S2" pair is lines S2 S3 here, its "S3" is line S1);
// this module keeps the line names of the drawing.
//
// Combinational, no clock.  Gate list and line order are those of the
// published minimum circuit; port names are ours.
module rev_gupta_lu
  import rev_pkg::*;
(
  input  logic s1,
  input  logic s2,
  input  logic s3,
  input  logic a,
  input  logic b,
  output logic y,
  output logic g1,
  output logic g2,
  output logic g3,
  output logic g4
);

  localparam int unsigned N = 5;

  logic [N-1:0] l0, l1, l2, l3;

  assign l0 = {b, a, s3, s2, s1};

  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(3)), .TGT(0)) u_g1 (.x(l0), .y(l1));
  mct_gate #(.N(N), .CTRL(line_bit(2) | line_bit(3)), .TGT(1)) u_g2 (.x(l1), .y(l2));
  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(4)), .TGT(0)) u_g3 (.x(l2), .y(l3));

  assign {g4, g3, g2, g1, y} = l3;

endmodule
