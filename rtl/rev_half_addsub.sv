// rev_half_addsub: reversible half adder/subtractor built from three MCT
// gates (two CNOT, one Toffoli) on four lines.
//
// Lines, top to bottom: 0 = c (constant input, 0 in use), 1 = S (0: add,
// 1: subtract), 2 = A, 3 = B.  The gate list, in (controls... target)
// notation, is (2 1) (3 2) (1 3 0):
//   S  ^= A            S becomes S xor A
//   A  ^= B            A becomes the sum/difference A xor B
//   c  ^= S & B        c becomes carry A&B (S=0) or borrow ~A&B (S=1)
// Outputs: c line = carry/borrow, S line = garbage g1, A line = sum/diff,
// B line = garbage g2 (equal to B).  The borrow is that of A - B.
//
// The circuit is a bijection on all 16 input patterns, so it also defines
// the outputs for c = 1 (they are the c = 0 results with carry/borrow
// inverted).  Combinational, no clock.  The gate list and line assignment
// are those of the published minimum circuit; the port names are ours.
module rev_half_addsub
  import rev_pkg::*;
(
  input  logic c,
  input  logic s,
  input  logic a,
  input  logic b,
  output logic carry_borrow,
  output logic g1,
  output logic sum_diff,
  output logic g2
);

  localparam int unsigned N = 4;

  logic [N-1:0] l0, l1, l2, l3;

  assign l0 = {b, a, s, c};

  mct_gate #(.N(N), .CTRL(line_bit(2)),               .TGT(1)) u_g1 (.x(l0), .y(l1));
  mct_gate #(.N(N), .CTRL(line_bit(3)),               .TGT(2)) u_g2 (.x(l1), .y(l2));
  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(3)), .TGT(0)) u_g3 (.x(l2), .y(l3));

  assign {g2, sum_diff, g1, carry_borrow} = l3;

endmodule
