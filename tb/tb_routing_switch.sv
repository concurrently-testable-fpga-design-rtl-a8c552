// tb_routing_switch: checks the 4-input Fredkin routing switch (and an 8-input
// one). For every select value the S cells are written, then random inputs
// are applied and out must equal the selected input. With single defects on
// random gates, a wrong output must come with a gate error.
module tb_routing_switch;
  import fredkin_pkg::*;

  logic clk = 0, we;
  logic [1:0] s4; logic [3:0] i4; logic o4; logic [4:0] e4;
  logic [2:0] s8; logic [7:0] i8; logic o8; logic [9:0] e8;
  fault_t f4;
  int checks = 0, failures = 0;

  routing_switch          dut4 (.clk(clk), .cfg_we(we), .cfg_sel(s4), .in(i4), .out(o4), .fault(f4), .gate_err(e4));
  routing_switch #(.N(8)) dut8 (.clk(clk), .cfg_we(we), .cfg_sel(s8), .in(i8), .out(o8), .fault('0), .gate_err(e8));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(input logic [1:0] a, input logic [2:0] b);
    we = 1; s4 = a; s8 = b;
    @(posedge clk); #1;
    we = 0; s4 = ~a; s8 = ~b;
  endtask

  initial begin
    int wrong = 0;
    f4 = '0;
    checks++; if ($bits(e4) != 5) failures++;  // 3 mux gates + 2 S cells
    for (int k = 0; k < 8; k++) begin
      configure(2'(k), 3'(k));
      for (int n = 0; n < 20; n++) begin
        i4 = 4'($urandom); i8 = 8'($urandom);
        #1;
        checks++;
        if (o4 !== i4[k % 4]) begin failures++; $display("FAIL N=4 sel %0d in %b out %b", k % 4, i4, o4); end
        checks++;
        if (o8 !== i8[k]) begin failures++; $display("FAIL N=8 sel %0d in %b out %b", k, i8, o8); end
        checks++; if (e4 != '0 || e8 != '0) failures++;
        @(posedge clk);
      end
    end
    // single defects on the 4-input switch
    for (int n = 0; n < 1000; n++) begin
      logic [1:0] k;
      logic flag;
      k = 2'($urandom);
      f4 = '0;
      configure(k, '0);
      f4 = '{en: 1'b1, gate: 12'($urandom_range(0, 4)), pattern: 5'($urandom_range(1, 19))};
      i4 = 4'($urandom);
      #1;
      flag = (e4 != '0);
      if (o4 !== i4[k]) begin
        wrong++;
        checks++; if (!flag) begin failures++; $display("FAIL undetected %p", f4); end
      end
      @(posedge clk); #1;  // a defective S cell may now hold a wrong select
      if (o4 !== i4[k]) begin
        wrong++;
        checks++; if (!(flag || e4 != '0)) begin failures++; $display("FAIL undetected stored %p", f4); end
      end
    end
    checks++; if (wrong == 0) failures++;
    $display("defect-induced wrong outputs: %0d", wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
