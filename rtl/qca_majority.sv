// qca_majority: the QCA majority voter (MV), the basic logic device of QCA.
//
// y is 1 when at least two of a, b, c are 1. With one input tied to 0 (cell
// polarisation -1) the voter is a 2-input AND, tied to 1 (polarisation +1) an
// OR; the Fredkin gate is built from four AND-voters and two OR-voters.
// Purely combinational.
module qca_majority (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (a & c) | (b & c);
endmodule
