// rev_mini_alu: 1-bit reversible ALU with OR, ADD, AND and ID (identity),
// built from five MCT gates (two CNOT, three Toffoli) on four lines.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = A, 3 = B.  Operation assignment
// S1 S2: 00 OR, 01 ADD, 10 AND, 11 ID.  Gate list
// (3 1) (2 0) (1 3 2) (0 2 3) (1 3 2):
//   S2 ^= B; S1 ^= A
//   A  ^= S2 & B
//   B  ^= S1 & A
//   A  ^= S2 & B
// Results appear on the A and B lines:
//   OR : o2 = A|B            (o1 = A)
//   ADD: o1 = carry AB,      o2 = sum A^B
//   AND: o2 = AB             (o1 = A|B)
//   ID : o1 = A,             o2 = B
// The S1 and S2 lines are garbage (g1, g2).  The drawing this circuit comes
// from labels the S2 and A lines as the two results; the gates it shows
// compute the operations above on the A and B lines instead, and this
// module follows the gates.
//
// Combinational, no clock.  Gate list, line order and operation assignment
// are those of the published minimum circuit; port names are ours.
module rev_mini_alu
  import rev_pkg::*;
(
  input  logic s1,
  input  logic s2,
  input  logic a,
  input  logic b,
  output logic g1,
  output logic g2,
  output logic o1,
  output logic o2
);

  localparam int unsigned N = 4;

  logic [N-1:0] l0, l1, l2, l3, l4, l5;

  assign l0 = {b, a, s2, s1};

  mct_gate #(.N(N), .CTRL(line_bit(3)),               .TGT(1)) u_g1 (.x(l0), .y(l1));
  mct_gate #(.N(N), .CTRL(line_bit(2)),               .TGT(0)) u_g2 (.x(l1), .y(l2));
  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(3)), .TGT(2)) u_g3 (.x(l2), .y(l3));
  mct_gate #(.N(N), .CTRL(line_bit(0) | line_bit(2)), .TGT(3)) u_g4 (.x(l3), .y(l4));
  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(3)), .TGT(2)) u_g5 (.x(l4), .y(l5));

  assign {o2, o1, g2, g1} = l5;

endmodule
