// fredkin_mcell: one-bit memory cell, a Fredkin gate used as a D latch.
//
// The gate gets A = E, B = D and, on C, its own R output fed back, so
// R = E.D + E'.Q: the latch characteristic Q+ = D.E + E'.Q. The cell is used
// for every configuration bit (LUT contents, multiplexer selects) and as the
// master and slave halves of the Fredkin flip-flop.
//
// Timing: the feedback loop is closed through one register clocked by clk,
// the model clock standing for the delay of the loop's QCA clock zones. So q
// takes the value of d one clk after a cycle in which e was 1, and holds
// while e is 0. This register is this design's choice; the document gives
// only the characteristic equation. No reset: a cell is written before it is
// read. gate_err is the gate's parity check, evaluated every cycle.
module fredkin_mcell
  import fredkin_pkg::*;
(
  input  logic       clk,
  input  logic       e,
  input  logic       d,
  output logic       q,
  input  fault_t     fault,
  output logic [0:0] gate_err
);
  logic state, r_next, p_g, q_g;

  fredkin_gate u_gate (
    .a    (e),
    .b    (d),
    .c    (state),
    .p    (p_g),
    .q    (q_g),
    .r    (r_next),
    .fault(fault_slice(fault, 0, 1)),
    .err  (gate_err[0])
  );

  always_ff @(posedge clk) state <= r_next;

  assign q = state;
endmodule
