// rev_lu: compact 1-bit reversible logic unit with XOR, OR and AND, built
// from three MCT gates (one CNOT, two Toffoli) on four lines.
//
// Lines, top to bottom: 0 = S1, 1 = S2, 2 = A, 3 = B.  Operation assignment
// S1 S2: 00 XOR, 01 OR, 10 unused, 11 AND.  NOT is XOR with B = 1.
// Gate list (3 0) (1 2 3) (0 3 2):
//   S1 ^= B                    S1 = S1^B
//   B  ^= S2 & A               B = B^A when S2 = 1
//   A  ^= S1 & B               A = A^B, A|B or AB
// Outputs: S1 line = g1, S2 line = g2, A line = o1 (result), B line = g3.
// For S1 S2 = 10 no operation is assigned; the gates then pass A through.
//
// Combinational, no clock.  Gate list, line order and operation assignment
// are those of the published minimum circuit; port names are ours.
module rev_lu
  import rev_pkg::*;
(
  input  logic s1,
  input  logic s2,
  input  logic a,
  input  logic b,
  output logic g1,
  output logic g2,
  output logic o1,
  output logic g3
);

  localparam int unsigned N = 4;

  logic [N-1:0] l0, l1, l2, l3;

  assign l0 = {b, a, s2, s1};

  mct_gate #(.N(N), .CTRL(line_bit(3)),               .TGT(0)) u_g1 (.x(l0), .y(l1));
  mct_gate #(.N(N), .CTRL(line_bit(1) | line_bit(2)), .TGT(3)) u_g2 (.x(l1), .y(l2));
  mct_gate #(.N(N), .CTRL(line_bit(0) | line_bit(3)), .TGT(2)) u_g3 (.x(l2), .y(l3));

  assign {g3, o1, g2, g1} = l3;

endmodule
