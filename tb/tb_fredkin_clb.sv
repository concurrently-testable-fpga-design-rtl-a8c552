// tb_fredkin_clb: tests the Fredkin CLB at its default size (5 inputs, 3
// BLEs with 3-input LUTs, 8:1 input multiplexers).
//
// A reference model, written here from the CLB's definition, evaluates the LUTs (iterating over block-output feedback) and
// updates the flip-flops on each rising uclk edge when enabled. Random
// configurations are written and exercised for several user clock cycles;
// the outputs are compared in every cycle. Configurations keep unregistered
// feedback acyclic (a comb BLE only reads registered BLEs or comb BLEs of a
// lower index).
//
// A defect campaign then places single defects of random pattern on random
// gates while the tile runs: an output that differs from the model must be
// preceded or accompanied by fault_detected, and a fault-free run must never
// raise it. Each mechanism (configuration write, every block input used,
// combinational and registered BLE outputs, output feedback, flip-flop hold
// by the clock-enable cell, defect detection) is counted and must occur.
module tb_fredkin_clb;
  import fredkin_pkg::*;

  localparam int NT = 5, NI = 5, NB = 3, K = 3, SW = 3;

  logic clk = 0, uclk;
  logic cfg_we;
  logic [NB-1:0][7:0]       cfg_lut;
  logic [NB-1:0][K-1:0][SW-1:0] cfg_in_sel;
  logic [NB-1:0]            cfg_out_reg;
  logic                     cfg_ff_en;
  logic [NT-1:0]            tracks;
  logic [NB-1:0]            out;
  fault_t                   fault;
  logic [152:0]             gate_err;
  logic                     fault_detected;

  fredkin_clb dut (
    .clk(clk), .uclk(uclk), .cfg_we(cfg_we), .cfg_lut(cfg_lut),
    .cfg_in_sel(cfg_in_sel), .cfg_out_reg(cfg_out_reg), .cfg_ff_en(cfg_ff_en),
    .in(tracks), .out(out), .fault(fault), .gate_err(gate_err)
  );

  assign fault_detected = |gate_err;

  always #5 clk = ~clk;

  typedef struct {
    logic [NB-1:0][7:0]           lut;
    logic [NB-1:0][K-1:0][SW-1:0] in_sel;
    logic [NB-1:0]                out_reg;
    logic                         ff_en;
  } cfg_t;

  cfg_t        cfg;
  logic [NB-1:0] ff;       // model flip-flops
  int checks = 0, failures = 0;
  bit checking = 1;        // compare outputs with the model
  // mechanism counters
  int n_cfg = 0, n_comb = 0, n_reg = 0, n_feedback = 0, n_hold = 0, n_capture = 0;
  int n_track [NT];
  int n_faults = 0, n_flagged = 0, n_corrupt = 0, n_false = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic logic [NI-1:0] model_in(cfg_t c, logic [NT-1:0] t);
    logic [NI-1:0] r;
    r = t;  // no routing: block inputs applied directly
    return r;
  endfunction

  function automatic logic [NB-1:0] model_x(cfg_t c, logic [NI-1:0] in, logic [NB-1:0] o, int b);
    logic [7:0] src;
    logic [K-1:0] x;
    src = {o, in};
    for (int i = 0; i < K; i++) x[i] = src[c.in_sel[b][i]];
    return NB'(c.lut[b][x]);
  endfunction

  function automatic logic [NB-1:0] model_out(cfg_t c, logic [NT-1:0] t, logic [NB-1:0] f);
    logic [NB-1:0] o;
    logic [NI-1:0] in;
    in = model_in(c, t);
    o = f;
    for (int it = 0; it <= NB; it++)
      for (int b = 0; b < NB; b++)
        o[b] = c.out_reg[b] ? f[b] : model_x(c, in, o, b)[0];
    return o;
  endfunction

  function automatic logic [NB-1:0] model_next(cfg_t c, logic [NT-1:0] t, logic [NB-1:0] f);
    logic [NB-1:0] o, n;
    logic [NI-1:0] in;
    in = model_in(c, t);
    o = model_out(c, t, f);
    for (int b = 0; b < NB; b++) n[b] = model_x(c, in, o, b)[0];
    return n;
  endfunction

  function automatic cfg_t random_cfg(bit feedback);
    cfg_t c;
    for (int b = 0; b < NB; b++) begin
      c.lut[b] = 8'($urandom);
      c.out_reg[b] = 1'($urandom);
    end
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < K; i++) begin
        int s;
        s = $urandom_range(0, NI - 1);
        if (feedback && $urandom_range(0, 2) == 0) begin
          int j;
          j = $urandom_range(0, NB - 1);
          if (c.out_reg[j] || j < b) s = NI + j;
        end
        c.in_sel[b][i] = SW'(s);
      end
    c.ff_en = 1'b1;
    return c;
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic write_cfg(cfg_t c);
    cfg = c;
    cfg_we = 1;
    cfg_lut = c.lut; cfg_in_sel = c.in_sel;
    cfg_out_reg = c.out_reg; cfg_ff_en = c.ff_en;
    @(posedge clk); #1;
    cfg_we = 0;
    cfg_lut = ~c.lut; cfg_in_sel = ~c.in_sel;   // ignored now
    cfg_out_reg = ~c.out_reg; cfg_ff_en = ~c.ff_en;
    n_cfg++;
  endtask

  bit sticky;  // fault_detected seen since the current defect was applied

  always @(posedge clk) if (fault_detected) sticky <= 1'b1;

  task automatic compare(string what);
    logic [NB-1:0] exp_o;
    exp_o = model_out(cfg, tracks, ff);
    if (!checking) return;
    if (fault.en) begin
      if (out !== exp_o) begin
        n_corrupt++;
        checks++;
        if (!(sticky || fault_detected)) begin
          failures++;
          $display("FAIL %s: wrong output %b (model %b) without detection, fault %p", what, out, exp_o, fault);
        end
      end
    end else begin
      checks++;
      if (out !== exp_o) begin
        failures++;
        $display("FAIL %s: out %b model %b cfg %p", what, out, exp_o, cfg);
      end
      checks++;
      if (fault_detected) begin n_false++; failures++; $display("FAIL false alarm"); end
      for (int b = 0; b < NB; b++) begin
        if (cfg.out_reg[b]) n_reg++; else n_comb++;
        for (int i = 0; i < K; i++) if (cfg.in_sel[b][i] >= NI) n_feedback++;
      end
      for (int i = 0; i < NI; i++) for (int b = 0; b < NB; b++) for (int k = 0; k < K; k++)
        if (cfg.in_sel[b][k] == SW'(i)) n_track[i]++;
    end
  endtask

  // One user clock cycle: new tracks while uclk is high, compare, uclk low
  // for three clk, then the rising edge.
  task automatic user_cycle(bit new_tracks);
    if (new_tracks) tracks = NT'($urandom);
    repeat (2) @(posedge clk); #1;
    compare("high phase");
    uclk = 0;
    repeat (3) @(posedge clk); #1;
    compare("low phase");
    if (cfg.ff_en) begin
      ff = model_next(cfg, tracks, ff);
      n_capture++;
    end
    uclk = 1;
    repeat (2) @(posedge clk); #1;
    compare("after edge");
  endtask

  // Bring the model's flip-flops in step: no feedback, all enabled.
  task automatic flush();
    cfg_t c;
    bit saved;
    saved = checking;
    c = random_cfg(1'b0);
    write_cfg(c);
    checking = 0;
    user_cycle(1'b1);                   // no feedback: ff is now known
    checking = saved;
    user_cycle(1'b0);
  endtask

  initial begin
    cfg_t c;
    fault = '0;
    uclk = 1;
    tracks = '0;
    cfg_we = 0;
    ff = '0;
    foreach (n_track[t]) n_track[t] = 0;
    checks++; if ($bits(gate_err) != 153) failures++;  // 3 x (19 + 21 + 9 + 1) + 3

    // bring up: the flip-flops start unknown, so one flush cycle first
    c = random_cfg(1'b0);
    write_cfg(c);
    checking = 0;
    user_cycle(1'b1);
    checking = 1;
    // the captured value did not depend on the old flip-flops (no feedback)
    user_cycle(1'b0);

    // ---- normal operation ----
    for (int n = 0; n < 60; n++) begin
      c = random_cfg(1'b1);
      write_cfg(c);
      repeat (6) user_cycle(1'b1);
      // flip-flop hold: disable the clock-enable cell, registered outputs
      // must keep their value across uclk edges
      c.ff_en = 1'b0;
      write_cfg(c);
      repeat (2) begin
        user_cycle(1'b1);
        n_hold++;
      end
    end

    // ---- single-defect campaign ----
    for (int n = 0; n < 400; n++) begin
      flush();
      c = random_cfg(1'b1);
      write_cfg(c);
      user_cycle(1'b1);
      @(negedge clk);
      sticky = 0;
      fault = '{en: 1'b1, gate: 12'($urandom_range(0, 152)), pattern: 5'($urandom_range(1, 19))};
      n_faults++;
      #1;
      if (fault_detected) sticky = 1;
      repeat (2) user_cycle(1'b1);
      if (sticky) n_flagged++;
      fault = '0;
      @(posedge clk); #1;
    end

    // ---- mechanism coverage ----
    $display("config writes %0d, comb outputs %0d, registered outputs %0d, feedback inputs %0d, captures %0d, holds %0d",
             n_cfg, n_comb, n_reg, n_feedback, n_capture, n_hold);
    $display("block inputs used %0d %0d %0d %0d %0d", n_track[0], n_track[1], n_track[2], n_track[3], n_track[4]);
    $display("defects %0d, flagged %0d, output-corrupting %0d, false alarms %0d", n_faults, n_flagged, n_corrupt, n_false);
    checks++; if (n_cfg == 0)      begin failures++; $display("FAIL no configuration write"); end
    checks++; if (n_comb == 0)     begin failures++; $display("FAIL no combinational output"); end
    checks++; if (n_reg == 0)      begin failures++; $display("FAIL no registered output"); end
    checks++; if (n_feedback == 0) begin failures++; $display("FAIL no feedback"); end
    checks++; if (n_capture == 0)  begin failures++; $display("FAIL no flip-flop capture"); end
    checks++; if (n_hold == 0)     begin failures++; $display("FAIL no flip-flop hold"); end
    for (int t = 0; t < NT; t++) begin
      checks++; if (n_track[t] == 0) begin failures++; $display("FAIL input %0d never used", t); end
    end
    checks++; if (n_flagged == 0)  begin failures++; $display("FAIL no defect detected"); end
    checks++; if (n_corrupt == 0)  begin failures++; $display("FAIL no defect reached an output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
