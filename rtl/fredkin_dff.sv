// fredkin_dff: master-slave D flip-flop of three Fredkin gates.
//
// Gate 0 gets (E, 0, 1) and so outputs E on Q and E' on R: it makes the
// clock and its complement (fan-out is allowed in QCA). Gate 1 is a Fredkin
// D latch (fredkin_mcell) enabled by E and loaded from D: the master. Gate 2
// is a second latch enabled by E' and loaded from the master: the slave,
// which drives Q. The master follows D while E is 1; when E falls the master
// holds and the slave takes its value, so the flip-flop loads on the falling
// edge of E.
//
// Timing in this model: each latch loop is one clk register (see
// fredkin_mcell), so q shows the D of the last clk cycle in which E was 1,
// one clk after E is seen low. E must stay at each level for at least two
// clk cycles. Gate numbers: 0 clock gate, 1 master, 2 slave.
module fredkin_dff
  import fredkin_pkg::*;
(
  input  logic       clk,
  input  logic       e,
  input  logic       d,
  output logic       q,
  input  fault_t     fault,
  output logic [2:0] gate_err
);
  logic e_buf, e_n, e_p, q_m;

  fredkin_gate u_clk_gate (
    .a    (e),
    .b    (1'b0),
    .c    (1'b1),
    .p    (e_p),
    .q    (e_buf),
    .r    (e_n),
    .fault(fault_slice(fault, 0, 1)),
    .err  (gate_err[0])
  );

  fredkin_mcell u_master (
    .clk     (clk),
    .e       (e_buf),
    .d       (d),
    .q       (q_m),
    .fault   (fault_slice(fault, 1, 1)),
    .gate_err(gate_err[1:1])
  );

  fredkin_mcell u_slave (
    .clk     (clk),
    .e       (e_n),
    .d       (q_m),
    .q       (q),
    .fault   (fault_slice(fault, 2, 1)),
    .gate_err(gate_err[2:2])
  );
endmodule
