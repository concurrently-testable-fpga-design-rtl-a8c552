// tb_fredkin_mcell: checks the Fredkin memory cell against its characteristic
// equation Q+ = D.E + E'.Q over random E and D, one clk per step, and that a
// defect that changes the stored value is flagged in that cycle.
module tb_fredkin_mcell;
  import fredkin_pkg::*;

  logic clk = 0, e, d, q;
  logic [0:0] gate_err;
  fault_t fault;
  int checks = 0, failures = 0;

  fredkin_mcell dut (.clk(clk), .e(e), .d(d), .q(q), .fault(fault), .gate_err(gate_err));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    int writes = 0, holds = 0, caught = 0;
    fault = '0;
    // load a known value first
    e = 1; d = 0;
    @(posedge clk); #1;
    model = 1'b0;
    checks++; if (q !== model) failures++;
    for (int n = 0; n < 400; n++) begin
      e = 1'($urandom); d = 1'($urandom);
      #1;
      checks++; if (gate_err !== 1'b0) failures++;
      @(posedge clk); #1;
      model = (d & e) | (!e & model);
      if (e) writes++; else holds++;
      checks++;
      if (q !== model) begin failures++; $display("FAIL e=%b d=%b q=%b model=%b", e, d, q, model); end
    end
    checks++; if (writes == 0 || holds == 0) failures++;
    // defects: a stored value that differs from the equation must have been flagged
    for (int n = 0; n < 400; n++) begin
      logic flag;
      fault = '{en: 1'b1, gate: '0, pattern: 5'($urandom_range(1, 19))};
      e = 1'($urandom); d = 1'($urandom);
      #1;
      flag = gate_err[0];
      @(posedge clk); #1;
      model = (d & e) | (!e & model);
      if (q !== model) begin
        caught++;
        checks++; if (!flag) begin failures++; $display("FAIL undetected defect %p", fault); end
        model = q;  // continue from the stored value
      end
    end
    checks++; if (caught == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
