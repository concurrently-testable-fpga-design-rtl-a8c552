// fredkin_and: two-input AND made of one Fredkin gate (FAND).
//
// Inputs (A, B, C) = (a, b, 0) give R = AB + A'.0 = a AND b; P and Q are
// garbage. The mapping onto the gate is this design's choice; the document
// only names the FAND. Combinational, with the gate's parity check on
// gate_err.
module fredkin_and
  import fredkin_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output logic       y,
  input  fault_t     fault,
  output logic [0:0] gate_err
);
  logic g_p, g_q;

  fredkin_gate u_gate (
    .a    (a),
    .b    (b),
    .c    (1'b0),
    .p    (g_p),
    .q    (g_q),
    .r    (y),
    .fault(fault_slice(fault, 0, 1)),
    .err  (gate_err[0])
  );
endmodule
