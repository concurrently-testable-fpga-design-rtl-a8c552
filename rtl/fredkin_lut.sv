// fredkin_lut: K-input lookup table of Fredkin gates.
//
// 2^K one-bit Fredkin memory cells hold the truth table; a fredkin_mux tree
// of 2^K - 1 Fredkin gates, addressed by x, reads one of them. Cell i
// (cfg_data[i]) is read when x == i, x[0] being the first-column select (x1).
// For K = 3 this is 7 mux gates and 8 cells, for K = 4 15 and 16 (31 gates).
//
// Writing: while cfg_we is 1 every cell loads its cfg_data bit; the new
// contents appear on out one clk later. Reading is combinational from x.
// Gate numbers: mux gates 0 .. 2^K-2, then cells 2^K-1 .. 2^(K+1)-2.
module fredkin_lut
  import fredkin_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic                clk,
  input  logic                cfg_we,
  input  logic [2**K-1:0]     cfg_data,
  input  logic [K-1:0]        x,
  output logic                out,
  input  fault_t              fault,
  output logic [2**(K+1)-2:0] gate_err
);
  localparam int unsigned N         = 2 ** K;
  localparam int unsigned MUX_GATES = N - 1;

  logic [N-1:0] cell_q;

  for (genvar i = 0; i < N; i++) begin : g_cell
    fredkin_mcell u_cell (
      .clk     (clk),
      .e       (cfg_we),
      .d       (cfg_data[i]),
      .q       (cell_q[i]),
      .fault   (fault_slice(fault, MUX_GATES + i, 1)),
      .gate_err(gate_err[MUX_GATES + i +: 1])
    );
  end

  fredkin_mux #(.SEL_W(K)) u_mux (
    .data    (cell_q),
    .sel     (x),
    .out     (out),
    .fault   (fault_slice(fault, 0, MUX_GATES)),
    .gate_err(gate_err[MUX_GATES-1:0])
  );
endmodule
