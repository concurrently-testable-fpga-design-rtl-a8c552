// fredkin_not: inverter made of one Fredkin gate (FNOT).
//
// Inputs (A, B, C) = (a, 1, 0) give Q = A'.1 + A.0 = NOT a, while P and R
// both copy a (garbage outputs). The mapping onto the gate is this design's
// choice; the document only names the FNOT. Combinational, with the gate's
// parity check on gate_err.
module fredkin_not
  import fredkin_pkg::*;
(
  input  logic       a,
  output logic       y,
  input  fault_t     fault,
  output logic [0:0] gate_err
);
  logic g_p, g_r;

  fredkin_gate u_gate (
    .a    (a),
    .b    (1'b1),
    .c    (1'b0),
    .p    (g_p),
    .q    (y),
    .r    (g_r),
    .fault(fault_slice(fault, 0, 1)),
    .err  (gate_err[0])
  );
endmodule
