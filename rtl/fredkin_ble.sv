// fredkin_ble: basic logic element of the Fredkin FPGA.
//
// A K-input Fredkin LUT feeds both the D input of a Fredkin master-slave
// flip-flop and the B input of one Fredkin gate used as a 2:1 multiplexer;
// the flip-flop's Q feeds that gate's C input and sel its A input. The
// gate's Q output is the BLE output: the LUT value when sel is 0, the
// registered value when sel is 1. Gate count: 2^K - 1 + 2^K (LUT) + 3
// (flip-flop) + 1 (multiplexer), which is 35 for a 4-input LUT.
//
// ff_e is the flip-flop's E input; the flip-flop loads on its falling edge
// (see fredkin_dff). sel comes from outside (a configuration cell in the
// CLB). Gate numbers: LUT gates first, then the three flip-flop gates, then
// the output gate.
module fredkin_ble
  import fredkin_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic                clk,
  input  logic                cfg_we,
  input  logic [2**K-1:0]     cfg_lut,
  input  logic [K-1:0]        x,
  input  logic                ff_e,
  input  logic                sel,
  output logic                out,
  input  fault_t              fault,
  output logic [2**(K+1)+2:0] gate_err
);
  localparam int unsigned LUT_GATES = 2 ** (K + 1) - 1;
  localparam int unsigned FF_BASE   = LUT_GATES;
  localparam int unsigned MUX_GATE  = LUT_GATES + 3;

  logic lut_out, ff_q, mux_p, mux_r;

  fredkin_lut #(.K(K)) u_lut (
    .clk     (clk),
    .cfg_we  (cfg_we),
    .cfg_data(cfg_lut),
    .x       (x),
    .out     (lut_out),
    .fault   (fault_slice(fault, 0, LUT_GATES)),
    .gate_err(gate_err[LUT_GATES-1:0])
  );

  fredkin_dff u_dff (
    .clk     (clk),
    .e       (ff_e),
    .d       (lut_out),
    .q       (ff_q),
    .fault   (fault_slice(fault, FF_BASE, 3)),
    .gate_err(gate_err[FF_BASE +: 3])
  );

  fredkin_gate u_out_mux (
    .a    (sel),
    .b    (lut_out),
    .c    (ff_q),
    .p    (mux_p),
    .q    (out),
    .r    (mux_r),
    .fault(fault_slice(fault, MUX_GATE, 1)),
    .err  (gate_err[MUX_GATE])
  );
endmodule
