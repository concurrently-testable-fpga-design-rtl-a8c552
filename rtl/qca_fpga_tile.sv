// qca_fpga_tile: one concurrently testable tile of the Fredkin-gate FPGA.
//
// The tile joins the two programmable parts of the fabric: N_IN Fredkin
// routing switches, one per CLB input, each choosing one of the N_TRACKS
// routing tracks entering the tile, and one Fredkin CLB (N_BLE BLEs with
// K-input LUTs) whose outputs leave the tile. Every Fredkin gate in the tile
// compares the parity of its inputs with that of its outputs; gate_err
// brings out each gate's result and fault_detected is their OR, raised in
// the same cycle as the faulty gate's output while the tile keeps operating.
//
// One routing switch per CLB input, all fed by the same tracks, is this
// design's choice of how the parts meet. Configuration is written in one
// cycle: all configuration cells load while cfg_we is 1 and are in use one
// clk later. clk is the model clock of every Fredkin storage loop; uclk is
// the user clock of the CLB flip-flops, which load on its rising edge when
// cfg_ff_en is set. uclk must hold each level for at least two clk cycles.
//
// fault emulates one single-cell defect in gate number fault.gate: routing
// switch i owns gates i * SW_GATES .. , the CLB follows at N_IN * SW_GATES.
module qca_fpga_tile
  import fredkin_pkg::*;
#(
  parameter int unsigned N_TRACKS = 4,
  parameter int unsigned N_IN     = 5,
  parameter int unsigned N_BLE    = 3,
  parameter int unsigned K        = 3,
  // derived
  localparam int unsigned SW_SEL_W  = $clog2(N_TRACKS),
  localparam int unsigned SEL_W     = $clog2(N_IN + N_BLE),
  localparam int unsigned SW_GATES  = N_TRACKS - 1 + SW_SEL_W,
  localparam int unsigned CLB_GATES = N_BLE * (2 ** (K + 1) + 3 + K * (2 ** SEL_W - 1) + K * SEL_W + 1) + 3,
  localparam int unsigned NUM_GATES = N_IN * SW_GATES + CLB_GATES
) (
  input  logic                               clk,
  input  logic                               uclk,
  // configuration
  input  logic                               cfg_we,
  input  logic [N_IN-1:0][SW_SEL_W-1:0]      cfg_sw_sel,
  input  logic [N_BLE-1:0][2**K-1:0]         cfg_lut,
  input  logic [N_BLE-1:0][K-1:0][SEL_W-1:0] cfg_in_sel,
  input  logic [N_BLE-1:0]                   cfg_out_reg,
  input  logic                               cfg_ff_en,
  // data
  input  logic [N_TRACKS-1:0]                tracks,
  output logic [N_BLE-1:0]                   out,
  // concurrent test
  input  fault_t                             fault,
  output logic [NUM_GATES-1:0]               gate_err,
  output logic                               fault_detected
);
  localparam int unsigned CLB_BASE = N_IN * SW_GATES;

  logic [N_IN-1:0] clb_in;

  for (genvar i = 0; i < N_IN; i++) begin : g_sw
    routing_switch #(.N(N_TRACKS)) u_sw (
      .clk     (clk),
      .cfg_we  (cfg_we),
      .cfg_sel (cfg_sw_sel[i]),
      .in      (tracks),
      .out     (clb_in[i]),
      .fault   (fault_slice(fault, i * SW_GATES, SW_GATES)),
      .gate_err(gate_err[i * SW_GATES +: SW_GATES])
    );
  end

  fredkin_clb #(.N_IN(N_IN), .N_BLE(N_BLE), .K(K)) u_clb (
    .clk        (clk),
    .uclk       (uclk),
    .cfg_we     (cfg_we),
    .cfg_lut    (cfg_lut),
    .cfg_in_sel (cfg_in_sel),
    .cfg_out_reg(cfg_out_reg),
    .cfg_ff_en  (cfg_ff_en),
    .in         (clb_in),
    .out        (out),
    .fault      (fault_slice(fault, CLB_BASE, CLB_GATES)),
    .gate_err   (gate_err[CLB_BASE +: CLB_GATES])
  );

  assign fault_detected = |gate_err;
endmodule
