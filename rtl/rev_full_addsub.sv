// rev_full_addsub: reversible full adder/subtractor built from five MCT
// gates (four CNOT, one Toffoli) on four lines, with no constant input and
// two garbage outputs.
//
// Lines, top to bottom: 0 = S (0: add, 1: subtract), 1 = A, 2 = B,
// 3 = C (carry or borrow in).  Gate list (1 0) (3 2) (2 1) (3 0) (0 2 3):
//   S ^= A; B ^= C; A ^= B     A becomes A xor B xor C (sum/difference)
//   S ^= C                     S becomes S xor A xor C
//   C ^= S & B                 C becomes C xor (S^A^C)(B^C)
// For S = 0 the last line is the majority of A, B, C (carry of A+B+C);
// for S = 1 it is the majority of ~A, B, C (borrow of A-B-C).
// Outputs: S line = g1, A line = sum/diff, B line = g2, C line = carry/borrow.
//
// Combinational, no clock.  Gate list and line order are those of the
// published minimum circuit; port names are ours.  Chaining the
// carry/borrow of one cell into C of the next gives a ripple
// adder/subtractor, which this module does not include.
module rev_full_addsub
  import rev_pkg::*;
(
  input  logic s,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic g1,
  output logic sum_diff,
  output logic g2,
  output logic carry_borrow
);

  localparam int unsigned N = 4;

  logic [N-1:0] l0, l1, l2, l3, l4, l5;

  assign l0 = {c, b, a, s};

  mct_gate #(.N(N), .CTRL(line_bit(1)),               .TGT(0)) u_g1 (.x(l0), .y(l1));
  mct_gate #(.N(N), .CTRL(line_bit(3)),               .TGT(2)) u_g2 (.x(l1), .y(l2));
  mct_gate #(.N(N), .CTRL(line_bit(2)),               .TGT(1)) u_g3 (.x(l2), .y(l3));
  mct_gate #(.N(N), .CTRL(line_bit(3)),               .TGT(0)) u_g4 (.x(l3), .y(l4));
  mct_gate #(.N(N), .CTRL(line_bit(0) | line_bit(2)), .TGT(3)) u_g5 (.x(l4), .y(l5));

  assign {carry_borrow, g2, sum_diff, g1} = l5;

endmodule
