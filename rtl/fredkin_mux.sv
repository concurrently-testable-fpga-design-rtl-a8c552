// fredkin_mux: 2^SEL_W-to-1 multiplexer built as a binary tree of
// 2^SEL_W - 1 Fredkin gates, each used as a 2:1 multiplexer.
//
// A Fredkin gate with select on A and data on B, C gives Q = A'B + AC, so
// each gate passes B when its select is 0 and C when it is 1. The first
// column of the tree pairs data[2j] (B) with data[2j+1] (C) under sel[0];
// column l combines the outputs of column l-1 under sel[l-1]. As in the
// document's lookup table drawing, a select enters the lowest-numbered gate
// of its column and is handed on to the next gate through that gate's P
// output, so a defect on P corrupts the select seen further up. R outputs and
// the last P of each column are garbage outputs. Combinational.
//
// Gate numbering for fault/gate_err: column 1 first (gate j handles data
// 2j, 2j+1), then column 2, and so on; the last gate drives out.
module fredkin_mux
  import fredkin_pkg::*;
#(
  parameter int unsigned SEL_W = 3
) (
  input  logic [2**SEL_W-1:0] data,
  input  logic [SEL_W-1:0]    sel,
  output logic                out,
  input  fault_t              fault,
  output logic [2**SEL_W-2:0] gate_err
);
  localparam int unsigned N         = 2 ** SEL_W;
  localparam int unsigned NUM_GATES = N - 1;

  // node[0 +: N] are the data inputs; node[N + g] is the Q output of gate g.
  logic [2*N-2:0]       node;
  logic [NUM_GATES-1:0] a_in;   // select seen by each gate
  logic [NUM_GATES-1:0] p_out;  // select passed on by each gate
  logic [NUM_GATES-1:0] r_out;  // garbage output

  assign node[N-1:0] = data;

  for (genvar l = 1; l <= SEL_W; l++) begin : g_col
    localparam int unsigned W      = N >> l;              // gates in this column
    localparam int unsigned G_BASE = N - (N >> (l - 1));  // first gate number
    localparam int unsigned I_BASE = 2 * N - (2 * N >> (l - 1));  // first input node
    for (genvar j = 0; j < W; j++) begin : g_gate
      localparam int unsigned G = G_BASE + j;
      if (j == 0) begin : g_sel_in
        assign a_in[G] = sel[l-1];
      end else begin : g_sel_chain
        assign a_in[G] = p_out[G-1];
      end
      fredkin_gate u_gate (
        .a    (a_in[G]),
        .b    (node[I_BASE + 2*j]),
        .c    (node[I_BASE + 2*j + 1]),
        .p    (p_out[G]),
        .q    (node[N + G]),
        .r    (r_out[G]),
        .fault(fault_slice(fault, G, 1)),
        .err  (gate_err[G])
      );
    end
  end

  assign out = node[2*N-2];
endmodule
