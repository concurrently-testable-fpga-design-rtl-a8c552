// fredkin_gate: conservative reversible Fredkin gate with concurrent parity
// check and single-defect emulation.
//
// Function: (A,B,C) -> (P = A, Q = A'B + AC, R = AB + A'C). The gate swaps B
// and C when A is 1, so it keeps both the number of 1s and the parity of its
// inputs. Q and R are two 2:1 multiplexers with A as select.
//
// Structure (follows the QCA layout of the design): A is passed through as P;
// two inverters make A'; four majority voters with one input fixed at 0 form
// the product terms A'B, AC, AB, A'C; two voters with one input fixed at 1 OR
// them into Q and R. The layout's four clock zones are not modelled as
// registers: the gate is combinational here.
//
// Concurrent test: err = parity(A,B,C) XOR parity(P,Q,R). A fault-free gate
// never raises err; every defect pattern of the measured fault table changes
// the output parity whenever it changes the output at all.
//
// Defect emulation (this design's addition, for verification): when fault.en
// is set, fault.gate is 0 and fault.pattern is a known pattern (1..19), the
// outputs are taken from that pattern's row of fredkin_pkg::FAULT_TABLE
// instead of from the voters. Tie fault to NO_FAULT in normal use.
//
// Inside a CLB the gate also sits on the feedback path from the block outputs
// back to the input multiplexers; tools report that structural loop at this
// gate's output, and fredkin_clb explains why it stands.
module fredkin_gate
  import fredkin_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   c,
  output logic   p,
  output logic   q,
  output logic   r,
  input  fault_t fault,
  output logic   err
);
  logic a_n;            // inverter output
  logic t_anb, t_ac;    // product terms of Q
  logic t_ab, t_anc;    // product terms of R
  logic q_good, r_good;
  fvec_t in_vec, good_vec, out_vec;
  logic  defect;

  assign a_n = ~a;

  qca_majority u_and_anb (.a(a_n), .b(b),    .c(1'b0), .y(t_anb));
  qca_majority u_and_ac  (.a(a),   .b(c),    .c(1'b0), .y(t_ac));
  qca_majority u_and_ab  (.a(a),   .b(b),    .c(1'b0), .y(t_ab));
  qca_majority u_and_anc (.a(a_n), .b(c),    .c(1'b0), .y(t_anc));
  qca_majority u_or_q    (.a(t_anb), .b(t_ac),  .c(1'b1), .y(q_good));
  qca_majority u_or_r    (.a(t_ab),  .b(t_anc), .c(1'b1), .y(r_good));

  assign in_vec   = {a, b, c};
  assign good_vec = {a, q_good, r_good};
  assign defect   = fault.en && (fault.gate == '0) && pattern_valid(fault.pattern);

  always_comb begin
    out_vec = good_vec;
    if (defect) out_vec = faulty_output(fault.pattern, in_vec);
  end

  assign {p, q, r} = out_vec;
  assign err       = (^in_vec) ^ (^out_vec);
endmodule
