// tb_fredkin_and: exhaustive check of the Fredkin AND, with and without a
// defect on its gate (a wrong output must raise gate_err).
module tb_fredkin_and;
  import fredkin_pkg::*;
  logic a, b, y;
  logic [0:0] gate_err;
  fault_t fault;
  int checks = 0, failures = 0;

  fredkin_and dut (.a(a), .b(b), .y(y), .fault(fault), .gate_err(gate_err));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wrong = 0;
    fault = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++; if (y !== (a & b)) begin failures++; $display("FAIL %b&%b=%b", a, b, y); end
      checks++; if (gate_err !== 1'b0) failures++;
    end
    for (int k = 1; k <= 19; k++)
      for (int v = 0; v < 4; v++) begin
        fault = '{en: 1'b1, gate: '0, pattern: 5'(k)};
        {a, b} = 2'(v);
        #1;
        if (y !== (a & b)) begin
          wrong++;
          checks++; if (gate_err !== 1'b1) failures++;
        end
      end
    checks++; if (wrong == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
