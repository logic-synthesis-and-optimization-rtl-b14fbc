// rev_alu: 1-bit reversible ALU with ADD, OR, SUB and AND, built from five
// MCT gates (two CNOT, three Toffoli) on four lines, no constant input.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = A, 3 = B.  Operation assignment
// S1 S2: 00 ADD, 01 OR, 10 SUB (A - B), 11 AND.  Gate list
// (2 3) (2 0) (0 3 2) (1 2 3) (0 2 1):
//   B ^= A; S1 ^= A            B = A^B, S1 = S1^A
//   A ^= S1 & B                A = AB (S1=0) or A|B (S1=1)
//   B ^= S2 & A                adds AB or A|B into A^B when S2 = 1
//   S2 ^= S1 & A               carry AB (S1=0) or borrow ~A&B (S1=1)
// Outputs: S1 line = g1, S2 line = o1 (carry/borrow for ADD/SUB, garbage
// otherwise), A line = g2, B line = o2 (sum, OR, difference or AND).
//
// Combinational, no clock.  The gate list, line order and operation
// assignment are those of the published minimum circuit; the port names
// and the gate-list notation in this comment are ours.
module rev_alu
  import rev_pkg::*;
(
  input  logic s1,
  input  logic s2,
  input  logic a,
  input  logic b,
  output logic g1,
  output logic o1,
  output logic g2,
  output logic o2
);

  localparam int unsigned N = 4;

  logic [N-1:0] l0, l1, l2, l3, l4, l5;

  assign l0 = {b, a, s2, s1};

  mct_gate #(.N(N), .CTRL(line_bit(2)),               .TGT(3)) u_g1 (.x(l0), .y(l1));
  mct_gate #(.N(N), .CTRL(line_bit(2)),               .TGT(0)) u_g2 (.x(l1), .y(l2));
  mct_gate #(.N(N), .CTRL(line_bit(0) | line_bit(3)), .TGT(2)) u_g3 (.x(l2), .y(l3));
  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(2)), .TGT(3)) u_g4 (.x(l3), .y(l4));
  mct_gate #(.N(N), .CTRL(line_bit(0) | line_bit(2)), .TGT(1)) u_g5 (.x(l4), .y(l5));

  assign {o2, g2, o1, g1} = l5;

endmodule
