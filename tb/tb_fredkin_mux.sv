// tb_fredkin_mux: checks Fredkin multiplexer trees of 2, 4 and 8 inputs.
// Fault-free: out == data[sel] for every select and random data, with no
// gate error. With a random single defect on a random gate of the 8:1 tree:
// whenever the output is wrong, some gate reports a parity error.
module tb_fredkin_mux;
  import fredkin_pkg::*;

  logic [1:0] d1; logic [0:0] s1; logic o1; logic [0:0] e1;
  logic [3:0] d2; logic [1:0] s2; logic o2; logic [2:0] e2;
  logic [7:0] d3; logic [2:0] s3; logic o3; logic [6:0] e3;
  fault_t f3;
  int checks = 0, failures = 0;

  fredkin_mux #(.SEL_W(1)) dut1 (.data(d1), .sel(s1), .out(o1), .fault('0), .gate_err(e1));
  fredkin_mux #(.SEL_W(2)) dut2 (.data(d2), .sel(s2), .out(o2), .fault('0), .gate_err(e2));
  fredkin_mux              dut3 (.data(d3), .sel(s3), .out(o3), .fault(f3),  .gate_err(e3));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wrong = 0, flagged = 0;
    f3 = '0;
    for (int n = 0; n < 200; n++) begin
      d1 = 2'($urandom); d2 = 4'($urandom); d3 = 8'($urandom);
      s1 = 1'($urandom); s2 = 2'($urandom); s3 = 3'(n % 8);
      #1;
      check(o1 == d1[s1], $sformatf("2:1 data=%b sel=%0d out=%b", d1, s1, o1));
      check(o2 == d2[s2], $sformatf("4:1 data=%b sel=%0d out=%b", d2, s2, o2));
      check(o3 == d3[s3], $sformatf("8:1 data=%b sel=%0d out=%b", d3, s3, o3));
      check(e1 == '0 && e2 == '0 && e3 == '0, "no gate error when fault-free");
    end
    for (int n = 0; n < 2000; n++) begin
      f3 = '{en: 1'b1, gate: 12'($urandom_range(0, 6)), pattern: 5'($urandom_range(1, 19))};
      d3 = 8'($urandom); s3 = 3'($urandom);
      #1;
      if (e3 != '0) flagged++;
      if (o3 != d3[s3]) begin
        wrong++;
        check(e3 != '0, $sformatf("wrong output undetected, fault %p", f3));
      end
    end
    check(wrong > 0, "defects changed the output");
    $display("defects: %0d wrong outputs, %0d cycles flagged", wrong, flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
