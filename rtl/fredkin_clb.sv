// fredkin_clb: cluster-based configurable logic block of the Fredkin FPGA.
//
// N_BLE basic logic elements (fredkin_ble, K-input LUT each) share N_IN
// block inputs. Each LUT input is chosen by a Fredkin multiplexer from the
// N_IN block inputs and the N_BLE block outputs fed back (5 + 3 = 8 sources,
// an 8:1 multiplexer, in the default configuration). Multiplexer source s is
// in[s] for s < N_IN and out[s - N_IN] above; unused sources read 0.
//
// Clock: the user clock uclk is inverted by a Fredkin NOT (FNOT) and gated
// with one configuration cell by a Fredkin AND (FAND); the result drives the
// E input of every BLE flip-flop. Since the Fredkin flip-flop loads on a
// falling E, the flip-flops load on the rising edge of uclk while
// cfg_ff_en is 1 and hold while it is 0.
//
// Configuration cells (all Fredkin memory cells, written together while
// cfg_we is 1 and in use one clk later): cfg_lut[b] LUT contents of BLE b,
// cfg_in_sel[b][i] source of input i of BLE b, cfg_out_reg[b] output select
// of BLE b (0 = LUT, 1 = flip-flop), cfg_ff_en the clock-gating cell.
//
// Feedback: block outputs return to the input multiplexers. A configuration
// that routes an unregistered BLE output back into its own LUT (directly or
// through other unregistered BLEs) is a combinational loop and is not
// allowed; the tools report the structural loop that the feedback wiring
// necessarily contains.
//
// Gate numbers: BLE b owns the range starting at b * PER_BLE: its BLE gates,
// its K input multiplexers, its K * SEL_W select cells, its output-select
// cell. Then the FNOT, the FAND and the clock-gating cell.
module fredkin_clb
  import fredkin_pkg::*;
#(
  parameter int unsigned N_IN  = 5,
  parameter int unsigned N_BLE = 3,
  parameter int unsigned K     = 3,
  // derived
  localparam int unsigned SEL_W     = $clog2(N_IN + N_BLE),
  localparam int unsigned NUM_GATES = N_BLE * (2 ** (K + 1) + 3 + K * (2 ** SEL_W - 1) + K * SEL_W + 1) + 3
) (
  input  logic                               clk,
  input  logic                               uclk,
  input  logic                               cfg_we,
  input  logic [N_BLE-1:0][2**K-1:0]         cfg_lut,
  input  logic [N_BLE-1:0][K-1:0][SEL_W-1:0] cfg_in_sel,
  input  logic [N_BLE-1:0]                   cfg_out_reg,
  input  logic                               cfg_ff_en,
  input  logic [N_IN-1:0]                    in,
  output logic [N_BLE-1:0]                   out,
  input  fault_t                             fault,
  output logic [NUM_GATES-1:0]               gate_err
);
  localparam int unsigned M         = 2 ** SEL_W;        // multiplexer width
  localparam int unsigned BLE_GATES = 2 ** (K + 1) + 3;
  localparam int unsigned MUX_GATES = M - 1;
  localparam int unsigned MUX_BASE  = BLE_GATES;
  localparam int unsigned SEL_BASE  = MUX_BASE + K * MUX_GATES;
  localparam int unsigned OSEL_GATE = SEL_BASE + K * SEL_W;
  localparam int unsigned PER_BLE   = OSEL_GATE + 1;
  localparam int unsigned FNOT_GATE = N_BLE * PER_BLE;
  localparam int unsigned FAND_GATE = FNOT_GATE + 1;
  localparam int unsigned EN_GATE   = FNOT_GATE + 2;

  logic [M-1:0] src;      // multiplexer sources
  logic         uclk_n, ff_en, ff_e;

  always_comb begin
    src = '0;
    src[N_IN-1:0] = in;
    src[N_IN +: N_BLE] = out;
  end

  // Clock gating: ff_e = NOT(uclk) AND cfg cell.
  fredkin_not u_fnot (
    .a       (uclk),
    .y       (uclk_n),
    .fault   (fault_slice(fault, FNOT_GATE, 1)),
    .gate_err(gate_err[FNOT_GATE +: 1])
  );

  fredkin_mcell u_en_cell (
    .clk     (clk),
    .e       (cfg_we),
    .d       (cfg_ff_en),
    .q       (ff_en),
    .fault   (fault_slice(fault, EN_GATE, 1)),
    .gate_err(gate_err[EN_GATE +: 1])
  );

  fredkin_and u_fand (
    .a       (uclk_n),
    .b       (ff_en),
    .y       (ff_e),
    .fault   (fault_slice(fault, FAND_GATE, 1)),
    .gate_err(gate_err[FAND_GATE +: 1])
  );

  for (genvar b = 0; b < N_BLE; b++) begin : g_ble
    localparam int unsigned BASE = b * PER_BLE;
    logic [K-1:0]            x;
    logic [K-1:0][SEL_W-1:0] sel_q;
    logic                    out_reg_q;

    for (genvar i = 0; i < K; i++) begin : g_in
      for (genvar s = 0; s < SEL_W; s++) begin : g_sel_cell
        localparam int unsigned G = BASE + SEL_BASE + i * SEL_W + s;
        fredkin_mcell u_cell (
          .clk     (clk),
          .e       (cfg_we),
          .d       (cfg_in_sel[b][i][s]),
          .q       (sel_q[i][s]),
          .fault   (fault_slice(fault, G, 1)),
          .gate_err(gate_err[G +: 1])
        );
      end

      fredkin_mux #(.SEL_W(SEL_W)) u_in_mux (
        .data    (src),
        .sel     (sel_q[i]),
        .out     (x[i]),
        .fault   (fault_slice(fault, BASE + MUX_BASE + i * MUX_GATES, MUX_GATES)),
        .gate_err(gate_err[BASE + MUX_BASE + i * MUX_GATES +: MUX_GATES])
      );
    end

    fredkin_mcell u_osel_cell (
      .clk     (clk),
      .e       (cfg_we),
      .d       (cfg_out_reg[b]),
      .q       (out_reg_q),
      .fault   (fault_slice(fault, BASE + OSEL_GATE, 1)),
      .gate_err(gate_err[BASE + OSEL_GATE +: 1])
    );

    fredkin_ble #(.K(K)) u_ble (
      .clk     (clk),
      .cfg_we  (cfg_we),
      .cfg_lut (cfg_lut[b]),
      .x       (x),
      .ff_e    (ff_e),
      .sel     (out_reg_q),
      .out     (out[b]),
      .fault   (fault_slice(fault, BASE, BLE_GATES)),
      .gate_err(gate_err[BASE +: BLE_GATES])
    );
  end
endmodule
