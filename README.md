# A concurrently testable FPGA tile built from Fredkin gates

Molecular quantum-dot cellular automata (QCA) are a nanotechnology with
high defect rates: a QCA cell can be missing from its place, or an extra
cell can be deposited next to it. This design is the logic fabric of an FPGA
for such a technology. It uses one primitive throughout, the **Fredkin gate**,
because of one property: the gate is *conservative*. It has as many 1s at
its outputs as at its inputs, so the parity of its outputs always equals the
parity of its inputs. In the QCA layout of the gate, every single-cell defect
that changes an output vector also changes that vector's parity. Comparing
input parity with output parity at every gate therefore detects faults
**concurrently**: while the FPGA runs its normal function, with no test mode
and no test vectors. This covers permanent defects and also transient faults
that flip parity.

The RTL models the whole fabric at gate level. Every lookup table, memory
cell, flip-flop, multiplexer, AND and NOT is made of Fredkin gates, and each
gate reports its own parity check. A defect-emulation port lets a testbench
put any one of the measured defect behaviours on any one gate. You can then
watch the error flag rise in the same cycle that the defect corrupts a value.

## The Fredkin gate (`fredkin_gate`)

    (A, B, C)  ->  P = A,   Q = A'B + AC,   R = AB + A'C

When A is 0 the gate passes B to Q and C to R. When A is 1 it swaps them.
Q and R are therefore two 2:1 multiplexers, selected by A in opposite senses.
Every other element of the fabric is this gate with suitable inputs:

| use | inputs (A, B, C) | output used |
|---|---|---|
| 2:1 multiplexer | (sel, d0, d1) | Q = sel ? d1 : d0 |
| AND (`fredkin_and`) | (a, b, 0) | R = a & b |
| NOT (`fredkin_not`) | (a, 1, 0) | Q = ~a |
| copy of E and E' (flip-flop) | (E, 0, 1) | Q = E, R = E' |
| D latch (`fredkin_mcell`) | (E, D, own R) | R = E·D + E'·Q |

Inside, the gate follows its QCA implementation. An inverter makes A'. Four
majority voters, each with one input held at 0, form the AND terms A'B, AC,
AB and A'C. Two more voters, each with one input held at 1, OR those terms
into Q and R (`qca_majority` is the voter). The QCA layout spreads these six
voters over four clock zones. Here the gate is combinational.

**Parity check.** `err = ^{A,B,C} ^ ^{P,Q,R}`. A healthy gate never raises
`err`.

**Defect emulation.** `fredkin_pkg::FAULT_TABLE` holds 19 defect patterns.
Each one gives the output vector that a damaged QCA Fredkin gate produces
for each of the 8 input vectors. These are the results of exhaustive
simulation of single missing-cell and additional-cell defects. In each
pattern, every output that differs from the correct one has the wrong
parity. The exhaustive test in `tb_fredkin_gate` checks this property for
every pattern and every input. The published table has 20 patterns. One
column could not be recovered, so patterns 1–19 are those that remain, in
their published order.

The `fault_t` struct (`en`, `gate`, `pattern`) selects one defect. Every
composite module numbers its gates. It passes each sub-module the slice of
the fault that falls in that sub-module's range (`fault_slice`). Its
`gate_err` output has one bit per gate, in the same order. Tie `fault` to
`'0` in normal use.

## Timing model: two clocks

QCA has no separate storage devices. A memory cell is a Fredkin gate whose R
output loops back to its C input. The delay around the loop comes from the
QCA clock zones. The RTL closes each such loop through one register on
**`clk`**, the model clock. So a memory cell obeys `Q+ = D·E + E'·Q`, with
`Q+` meaning "after one `clk`". Nothing else is clocked by `clk`.

**`uclk`** is the FPGA user clock. It is an ordinary signal that `clk`
samples, and it must hold each level for at least two `clk` cycles. The
flip-flops in the logic elements respond to `uclk`.

## Building blocks

**Memory cell (`fredkin_mcell`).** One gate used as a D latch. The cell
holds every configuration bit: LUT contents, multiplexer selects and
clock enable. It is also the master and slave halves of the flip-flop.
While `e` is 1, the cell takes `d` at the next `clk`.

**Multiplexer tree (`fredkin_mux`, parameter `SEL_W`).** A 2^SEL_W:1
multiplexer built from 2^SEL_W − 1 gates in SEL_W columns. Column 1 pairs
`data[2j]` (B) with `data[2j+1]` (C) under `sel[0]`. Each later column
combines the outputs of the one before. A select bit enters the lowest gate
of its column and is passed up the column through each gate's P output.
This is why a defect on P can corrupt the select that the gates above it
see.

**Lookup table (`fredkin_lut`, parameter `K`, default 3).** 2^K memory
cells feed a K-level multiplexer tree. Address `x` reads cell `x`. The
default LUT has 7 gates and 8 cells. A 4-input LUT has 31 gates.

**D flip-flop (`fredkin_dff`).** Three gates:
- a gate that makes E and E';
- a master latch enabled by E;
- a slave latch enabled by E', which copies the master.

The flip-flop loads on a falling E: Q becomes the D of the last `clk` in
which E was 1, one `clk` after E goes low.

**Basic logic element (`fredkin_ble`).** The LUT drives both the flip-flop's
D input and the B input of an output gate. The flip-flop's Q drives the
output gate's C input, and `sel` drives its A input. The output is the
combinational LUT value when `sel = 0` and the registered value when
`sel = 1`. A BLE has 2^(K+1) + 3 gates: 19 for K = 3 and 35 for K = 4.

**Configurable logic block (`fredkin_clb`; N_IN = 5, N_BLE = 3, K = 3).**
Three BLEs form a cluster with 5 block inputs and 3 block outputs. Each of
the 9 LUT inputs has its own 8:1 Fredkin multiplexer. The multiplexer
chooses among the 5 block inputs (sources 0–4) and the 3 block outputs fed
back (sources 5–7). Memory cells hold the multiplexer selects and each BLE's
output select.

The flip-flop clock is `FAND(FNOT(uclk), enable cell)`. Because the
flip-flop loads on a falling E, the flip-flops load on the **rising** edge of
`uclk` while the enable cell holds 1. While it holds 0, they keep their
value. The CLB has 153 gates.

**Routing switch (`routing_switch`, parameter N, default 4).** An N:1
Fredkin multiplexer tree whose log2(N) select bits sit in memory cells.
Select code k routes `in[k]` to `out`. Conventional FPGA switches need an
output buffer because they use pass transistors. A QCA switch does not, so
there is none. N must be a power of two.

**Tile (`qca_fpga_tile`, the top).** Five routing switches each pick one of
the 4 `tracks`, and each drives one CLB input. `gate_err` has one bit per
gate: switch i owns gates `5i … 5i+4` and the CLB owns gates 25–177.
`fault_detected` is the OR of all the bits.

## Configuration

All configuration cells load in parallel. While `cfg_we` is 1, every cell
takes its `cfg_*` input, and the new configuration is in use one `clk`
later.

| input | meaning |
|---|---|
| `cfg_sw_sel[i]` | track for CLB input i |
| `cfg_lut[b]` | truth table of BLE b; bit x is the output for address x |
| `cfg_in_sel[b][i]` | source of LUT input i of BLE b: 0–4 block input, 5–7 BLE output 0–2 |
| `cfg_out_reg[b]` | 0 = combinational output, 1 = registered output |
| `cfg_ff_en` | flip-flop clock enable |

**Rule:** an unregistered BLE output must not reach its own LUT, either
directly or through other unregistered BLEs. That would be a true
combinational loop. Because of the feedback wiring, the netlist always
contains a structural loop. Lint tools report it (Verilator `UNOPTFLAT` at a
gate inside the input multiplexers), and it is harmless under this rule.

## Where this RTL departs from, or adds to, the published design

- **Configuration.** The published design does not say how configuration
  cells are written. A parallel write with one enable was chosen here.
- **Reset.** Nothing is reset. Configure the tile before use and run one
  `uclk` cycle before relying on the flip-flops.
- **Defect model.** The defect port and gate numbering are added here for
  verification. Defects act at the gate's outputs, as a measured table, not
  at the level of QCA cells.
- **LUT size.** The design description uses 3-input LUTs, which is the
  default here (`K = 3`). The power evaluation assumes 4-input LUTs. Set
  `K = 4` on the tile, CLB or BLE to get that size; `tb_qca_fpga_tile_k4`
  tests it.
- **Table size.** The defect table has 19 patterns where the publication
  lists 20.
- **Pin order.** Which data pin of each multiplexer gate is B or C is a
  choice made here, and so is the select-to-input mapping.
- **Routing switch select chain.** In the routing switch, the select chain
  starts at the gate of inputs 0/1. The published drawing starts it at the
  gate of inputs 2/3. The function is the same, but defects on P propagate
  differently.
- **Clock gating.** The published CLB drawing marks the clock-gating cell
  with a "3". Here one enable cell, one FNOT and one FAND serve all three
  flip-flops.
- **Joining switches and CLB.** The tile, with one routing switch per CLB
  input, is a choice made here. The publication describes the switch and the
  CLB separately, and it also does not describe an array of tiles or global
  routing.
- **No power figures in the RTL.** The publication estimates power with
  71.99 meV per majority voter and 6 voters per gate. For a 4-input BLE that
  gives 35 × 6 × 71.99 meV = 15.117 eV. Its largest benchmark, clma, comes to
  125.742·10³ eV, which is about 8318 such BLEs. The RTL only reproduces the
  gate counts behind these figures (`tb_fredkin_ble` checks 35 gates for K = 4).

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog.

- The **gate-level tests** are exhaustive: the gate equations, the
  conservative and one-to-one properties, and all 19 × 8 defect entries with
  their parity flags.
- The **mux, LUT, switch, BLE and CLB tests** compare against independent
  models over random contents. They also inject random single defects and
  require that no wrong output ever appears without a gate error having been
  raised in that cycle or earlier.
- **`tb_qca_fpga_tile`** runs the whole tile at its default size against a
  reference model. It covers:
  - random configurations with feedback;
  - combinational and registered outputs;
  - flip-flop hold when the enable cell is 0;
  - every track being routed;
  - 400 injected defects. Many of them corrupt an output, and every
    corrupted output is flagged. A fault-free run never raises the flag.

  It prints a count for each mechanism and fails if any count is zero.
- **`tb_qca_fpga_tile_k4`** runs the same test on a tile whose BLEs have
  4-input LUTs, the BLE size used in the power evaluation.

Each testbench was also run against a deliberately broken copy of its
module, and each of those runs failed.

Simulating with Verilator, for example the tile:

    verilator --binary --timing --assert -Irtl -y rtl rtl/fredkin_pkg.sv \
        tb/tb_qca_fpga_tile.sv --top-module tb_qca_fpga_tile -o sim
    ./obj_dir/sim

The other testbenches are built the same way. `fredkin_pkg.sv` must always
come first. The tile test takes well under a second.

## Files

`rtl/fredkin_pkg.sv` holds the types, the defect table and `fault_slice`.
There is one module per file, bottom-up:
- `qca_majority`;
- `fredkin_gate`;
- `fredkin_and`, `fredkin_not`;
- `fredkin_mcell`, `fredkin_mux`;
- `fredkin_dff`, `fredkin_lut`;
- `fredkin_ble`, `routing_switch`;
- `fredkin_clb`;
- `qca_fpga_tile`.
