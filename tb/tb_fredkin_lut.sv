// tb_fredkin_lut: checks Fredkin lookup tables of 2 and 3 inputs. Random
// truth tables are written through the memory cells; every address is then
// read and compared with the written bit. A table written one clk earlier
// must be visible, and contents must hold while cfg_we is 0.
module tb_fredkin_lut;
  import fredkin_pkg::*;

  logic clk = 0, we;
  logic [3:0] t2; logic [1:0] x2; logic o2; logic [6:0]  e2;
  logic [7:0] t3; logic [2:0] x3; logic o3; logic [14:0] e3;
  int checks = 0, failures = 0;

  fredkin_lut #(.K(2)) dut2 (.clk(clk), .cfg_we(we), .cfg_data(t2), .x(x2), .out(o2), .fault('0), .gate_err(e2));
  fredkin_lut          dut3 (.clk(clk), .cfg_we(we), .cfg_data(t3), .x(x3), .out(o3), .fault('0), .gate_err(e3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] tab2; logic [7:0] tab3;
    checks++; if ($bits(e3) != 15) failures++;  // 7 mux gates + 8 cells
    for (int n = 0; n < 100; n++) begin
      tab2 = 4'($urandom); tab3 = 8'($urandom);
      if (n == 0) tab3 = 8'b1001_0110;  // 3-input XOR
      we = 1; t2 = tab2; t3 = tab3;
      @(posedge clk); #1;
      we = 0; t2 = ~tab2; t3 = ~tab3;   // must not be written now
      @(posedge clk); #1;
      for (int a = 0; a < 8; a++) begin
        x3 = 3'(a); x2 = 2'(a);
        #1;
        checks++;
        if (o3 !== tab3[a]) begin failures++; $display("FAIL K=3 table %b addr %0d out %b", tab3, a, o3); end
        checks++;
        if (o2 !== tab2[a % 4]) begin failures++; $display("FAIL K=2 table %b addr %0d out %b", tab2, a % 4, o2); end
        checks++; if (e2 != '0 || e3 != '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
