// tb_fredkin_dff: checks the Fredkin master-slave flip-flop. E is held at each
// level for 2..4 clk cycles while D changes at random; after E falls, Q must
// show the D present during the last clk in which E was 1, and must hold
// while E is 1. No gate error is expected.
module tb_fredkin_dff;
  import fredkin_pkg::*;

  logic clk = 0, e, d, q;
  logic [2:0] gate_err;
  int checks = 0, failures = 0;

  fredkin_dff dut (.clk(clk), .e(e), .d(d), .q(q), .fault('0), .gate_err(gate_err));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic last_d, expect_q;
    int loads = 0;
    // start: one full E period to settle
    e = 1; d = 0;
    repeat (3) @(posedge clk);
    #1 e = 0;
    repeat (3) @(posedge clk);
    #1;
    expect_q = 1'b0;
    checks++; if (q !== expect_q) failures++;
    for (int n = 0; n < 300; n++) begin
      // E high: master follows D, Q holds
      e = 1;
      repeat ($urandom_range(2, 4)) begin
        d = 1'($urandom);
        last_d = d;
        @(posedge clk); #1;
        checks++;
        if (q !== expect_q) begin failures++; $display("FAIL Q changed while E high"); end
        checks++; if (gate_err !== '0) failures++;
      end
      // E low: Q takes the last D, D changes must not matter
      e = 0;
      expect_q = last_d;
      loads++;
      repeat ($urandom_range(2, 4)) begin
        @(posedge clk); #1;
        checks++;
        if (q !== expect_q) begin failures++; $display("FAIL Q=%b expected %b", q, expect_q); end
        d = 1'($urandom);
      end
    end
    checks++; if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
