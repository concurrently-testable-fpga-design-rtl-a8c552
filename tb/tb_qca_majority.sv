// tb_qca_majority: exhaustive check of the QCA majority voter against a
// count of ones, including its AND (one input 0) and OR (one input 1) uses.
module tb_qca_majority;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_majority dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      ones = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL maj(%b%b%b) = %b", a, b, c, y);
      end
      // AND / OR uses with c as the fixed polarisation cell
      if (c == 1'b0) begin
        checks++;
        if (y !== (a & b)) failures++;
      end else begin
        checks++;
        if (y !== (a | b)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
