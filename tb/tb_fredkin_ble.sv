// tb_fredkin_ble: checks the Fredkin basic logic element with 3- and 4-input
// LUTs. A random truth table is written; with sel = 0 the output must follow
// the LUT combinationally; with sel = 1 it must show the LUT value captured
// at the last falling edge of ff_e and hold in between. Also checks the gate
// count of the 4-input element (31 + 1 + 3 = 35 Fredkin gates) and the
// element's upper-bound dissipation that follows from it, 35 gates x 6
// majority voters x 71.99 meV = 15.117 eV.
module tb_fredkin_ble;
  import fredkin_pkg::*;

  logic clk = 0, we, ff_e, sel;
  logic [7:0]  t3; logic [2:0] x3; logic o3; logic [18:0] e3;
  logic [15:0] t4; logic [3:0] x4; logic o4; logic [34:0] e4;
  int checks = 0, failures = 0;

  fredkin_ble          dut3 (.clk(clk), .cfg_we(we), .cfg_lut(t3), .x(x3), .ff_e(ff_e), .sel(sel), .out(o3), .fault('0), .gate_err(e3));
  fredkin_ble #(.K(4)) dut4 (.clk(clk), .cfg_we(we), .cfg_lut(t4), .x(x4), .ff_e(ff_e), .sel(sel), .out(o4), .fault('0), .gate_err(e4));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] tab3; logic [15:0] tab4;
    logic ff3, ff4;
    longint mev_x100;
    int comb_checks = 0, reg_checks = 0;

    // gate count and dissipation bound of a 4-input element
    check($bits(e4) == 35, "4-input BLE has 35 Fredkin gates");
    mev_x100 = longint'($bits(e4)) * 6 * 7199;    // units of 0.01 meV
    check(mev_x100 / 100000 == 15 && (mev_x100 / 100) % 1000 == 117, "35 x 6 x 71.99 meV = 15.117 eV");
    $display("4-input BLE: %0d gates, max dissipation %0d.%03d eV", $bits(e4), mev_x100 / 100000, (mev_x100 / 100) % 1000);

    ff_e = 1; sel = 0;
    for (int n = 0; n < 60; n++) begin
      tab3 = 8'($urandom); tab4 = 16'($urandom);
      we = 1; t3 = tab3; t4 = tab4;
      @(posedge clk); #1;
      we = 0;
      // combinational mode
      sel = 0;
      @(posedge clk); #1;
      for (int a = 0; a < 16; a++) begin
        x3 = 3'(a); x4 = 4'(a);
        #1;
        check(o3 == tab3[a % 8], "K=3 LUT output");
        check(o4 == tab4[a], "K=4 LUT output");
        check(e3 == '0 && e4 == '0, "no gate error");
        comb_checks++;
      end
      // registered mode: capture at the falling edge of ff_e
      sel = 1;
      for (int c = 0; c < 4; c++) begin
        x3 = 3'($urandom); x4 = 4'($urandom);
        ff_e = 1;
        repeat (2) @(posedge clk);
        #1;
        ff3 = tab3[x3]; ff4 = tab4[x4];
        ff_e = 0;
        repeat (2) @(posedge clk);
        #1;
        check(o3 == ff3, "K=3 registered output");
        check(o4 == ff4, "K=4 registered output");
        // inputs change while ff_e is low: output must hold
        x3 = ~x3; x4 = ~x4;
        @(posedge clk); #1;
        check(o3 == ff3 && o4 == ff4, "registered output holds");
        reg_checks++;
      end
    end
    check(comb_checks > 0 && reg_checks > 0, "both output modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
