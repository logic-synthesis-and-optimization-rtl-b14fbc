// rev_pkg: shared types and helpers for the reversible (MCT) and quantum (NCV)
// circuits of this library.
//
// Reversible circuits are modelled as N parallel lines, bit i of a bus being
// line i, where line 0 is the top line of the circuit drawing.  line_bit(i)
// builds a control mask from line numbers, so a gate written (x y z) in the
// usual MCT notation (controls x and y, target z) becomes
// CTRL = line_bit(x) | line_bit(y), TGT = z.
//
// Quantum circuits over the NCV library (NOT, CNOT, controlled-V and
// controlled-V-dagger, with V*V = NOT) are emulated in four-valued logic.
// Started from a computational-basis state, every line of such a circuit is
// always in one of the states |0>, |1>, V|0> or V|1> as long as every control
// it meets is |0> or |1>.  qline_t holds one line: `v` says the line is in a
// V-state and `b` names the basis state V was applied to.  The mapping is
// exact (V|0>, V|1> differ from each other only by a NOT, with no global
// phase), so the emulation is a faithful model of the quantum circuit for
// basis inputs.  The encoding is this library's own choice.
package rev_pkg;

  // One line of an NCV circuit in four-valued form.
  typedef struct packed {
    logic v;  // 1: line is V|b>, 0: line is |b>
    logic b;
  } qline_t;

  // Named line states, for use by circuits and testbenches; a lint of the
  // package alone reports those no circuit reads.
  localparam qline_t Q0  = '{v: 1'b0, b: 1'b0};
  localparam qline_t Q1  = '{v: 1'b0, b: 1'b1};
  localparam qline_t QV0 = '{v: 1'b1, b: 1'b0};
  localparam qline_t QV1 = '{v: 1'b1, b: 1'b1};

  // Elementary gates of the NCV library.
  typedef enum logic [1:0] {
    NCV_NOT  = 2'd0,  // target inverted, no control
    NCV_CNOT = 2'd1,  // target inverted when control is |1>
    NCV_CV   = 2'd2,  // V applied to target when control is |1>
    NCV_CVDG = 2'd3   // V-dagger applied to target when control is |1>
  } ncv_op_e;

  // Control mask with only line i set.
  function automatic int unsigned line_bit(input int unsigned i);
    return 32'(1) << i;
  endfunction

  // NOT commutes with V, so it only swaps V|0> and V|1>.
  function automatic qline_t q_not(input qline_t q);
    return '{v: q.v, b: ~q.b};
  endfunction

  // V|0> -> V|0>, V|1> -> V|1>, V(V|b>) = NOT|b> = |~b>.
  function automatic qline_t q_v(input qline_t q);
    return q.v ? '{v: 1'b0, b: ~q.b} : '{v: 1'b1, b: q.b};
  endfunction

  // V-dagger = V^3: |b> -> V|~b>, V|b> -> |b>.
  function automatic qline_t q_vdg(input qline_t q);
    return q.v ? '{v: 1'b0, b: q.b} : '{v: 1'b1, b: ~q.b};
  endfunction

  // Basis state of a Boolean value.
  function automatic qline_t q_of(input logic b);
    return '{v: 1'b0, b: b};
  endfunction

endpackage
