// toffoli_ncv: the Toffoli-3 gate (c ^= a & b) built from five elementary
// NCV gates, in four-valued emulation.  VARIANT picks one of the four
// standard realisations, each of quantum cost 5:
//   0 (a): CV a->c, CV b->c, CNOT a->b, CV+ b->c, CNOT a->b
//   1 (b): variant 0 reversed: CNOT a->b, CV+ b->c, CNOT a->b, CV b->c, CV a->c
//   2 (c): variant 0 with V and V+ exchanged
//   3 (d): variant 1 with V and V+ exchanged
// Lines: x[0]/y[0] = a, x[1]/y[1] = b, x[2]/y[2] = c.  For basis inputs
// y = (a, b, c ^ ab) in basis states and ctrl_superposed stays low.  The
// lines are qline_t so the gate can sit inside a larger NCV circuit.
//
// Combinational, no clock.  The four gate sequences are the standard ones;
// the variant numbering is this library's own.
module toffoli_ncv
  import rev_pkg::*;
#(
  parameter int unsigned VARIANT = 0
) (
  input  qline_t [2:0] x,
  output qline_t [2:0] y,
  output logic         ctrl_superposed
);

  localparam int unsigned N = 3;
  localparam int unsigned G = 5;

  // Variant 0: the base sequence.  Variant 1 is it in reverse order; 2 and
  // 3 exchange V and V+ in 0 and 1.
  localparam ncv_op_e     OPS_A  [G] = '{NCV_CV, NCV_CV, NCV_CNOT, NCV_CVDG, NCV_CNOT};
  localparam int unsigned CTLS_A [G] = '{0, 1, 0, 1, 0};
  localparam int unsigned TGTS_A [G] = '{2, 2, 1, 2, 1};

  function automatic ncv_op_e swap_v(input ncv_op_e op);
    case (op)
      NCV_CV:   return NCV_CVDG;
      NCV_CVDG: return NCV_CV;
      default:  return op;
    endcase
  endfunction

  function automatic ncv_op_e op_at(input int unsigned i);
    ncv_op_e op;
    // the V-type gates all act on c and commute, so the gate order can be
    // reversed as it stands
    op = (VARIANT % 2 == 1) ? OPS_A[G-1-i] : OPS_A[i];
    return (VARIANT >= 2) ? swap_v(op) : op;
  endfunction

  function automatic int unsigned ctl_at(input int unsigned i);
    return (VARIANT % 2 == 1) ? CTLS_A[G-1-i] : CTLS_A[i];
  endfunction

  function automatic int unsigned tgt_at(input int unsigned i);
    return (VARIANT % 2 == 1) ? TGTS_A[G-1-i] : TGTS_A[i];
  endfunction

  if (VARIANT > 3) begin : g_bad_variant
    $error("toffoli_ncv: VARIANT must be 0 to 3");
  end

  qline_t [N-1:0] st [G+1];
  logic   [G-1:0] sup;

  assign st[0] = x;

  for (genvar i = 0; i < G; i++) begin : g_gate
    ncv_gate #(.N(N), .OP(op_at(i)), .CTRL(ctl_at(i)), .TGT(tgt_at(i))) u_gate (
      .x(st[i]), .y(st[i+1]), .ctrl_superposed(sup[i])
    );
  end

  assign y               = st[G];
  assign ctrl_superposed = |sup;

endmodule
