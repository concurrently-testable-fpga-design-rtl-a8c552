// routing_switch: programmable routing switch of the Fredkin FPGA.
//
// An N:1 multiplexer of N - 1 Fredkin gates (fredkin_mux) picks one of the
// routing inputs in[0..N-1]; its log2(N) select bits are held in Fredkin
// memory cells (the configuration cells S). No output buffer is needed, as
// QCA wires restore the signal themselves. in[k] reaches out when the cells
// hold k. N must be a power of two.
//
// Writing: while cfg_we is 1 the cells load cfg_sel; the new route is used
// one clk later. Routing itself is combinational. Gate numbers: multiplexer
// gates 0 .. N-2, then the select cells, lowest select bit first.
module routing_switch
  import fredkin_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                        clk,
  input  logic                        cfg_we,
  input  logic [$clog2(N)-1:0]        cfg_sel,
  input  logic [N-1:0]                in,
  output logic                        out,
  input  fault_t                      fault,
  output logic [N-2+$clog2(N):0]      gate_err
);
  localparam int unsigned SEL_W     = $clog2(N);
  localparam int unsigned MUX_GATES = N - 1;

  if (2 ** SEL_W != N) begin : g_bad_n
    $error("routing_switch: N must be a power of two");
  end

  logic [SEL_W-1:0] s;

  for (genvar i = 0; i < SEL_W; i++) begin : g_s
    fredkin_mcell u_s (
      .clk     (clk),
      .e       (cfg_we),
      .d       (cfg_sel[i]),
      .q       (s[i]),
      .fault   (fault_slice(fault, MUX_GATES + i, 1)),
      .gate_err(gate_err[MUX_GATES + i +: 1])
    );
  end

  fredkin_mux #(.SEL_W(SEL_W)) u_mux (
    .data    (in),
    .sel     (s),
    .out     (out),
    .fault   (fault_slice(fault, 0, MUX_GATES)),
    .gate_err(gate_err[MUX_GATES-1:0])
  );
endmodule
