// tb_fredkin_gate: checks the Fredkin gate exhaustively.
//  * fault-free: P = A, Q = A'B + AC, R = AB + A'C, the number of 1s is kept,
//    the mapping is one-to-one and err stays 0;
//  * with each of the 19 defect patterns: the outputs equal the measured
//    fault table (held here as text, one string per pattern, outputs for
//    inputs 0..7) and err is 1 exactly when the output parity differs from
//    the input parity, which is whenever the output is wrong;
//  * a fault addressed to another gate number has no effect.
module tb_fredkin_gate;
  import fredkin_pkg::*;

  logic   a, b, c, p, q, r, err;
  fault_t fault;
  int     checks = 0, failures = 0;

  // Measured outputs (decimal digit = {P,Q,R}) for inputs a0..a7.
  string table_txt [19] = '{
    "01334646", "01235746", "11235757", "11335746", "00224757",
    "01014657", "10324657", "21214657", "11335657", "11334657",
    "01234646", "23014657", "01014677", "23234657", "03236455",
    "03234455", "03236477", "23014657", "45670213"
  };

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .fault(fault), .err(err));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (in=%b%b%b out=%b%b%b err=%b fault=%p)", what, a, b, c, p, q, r, err, fault);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [7:0] seen;
    int detected;
    fault = '0;
    seen  = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(q == ((!a && b) || (a && c)), "Q = A'B + AC");
      check(r == ((a && b) || (!a && c)), "R = AB + A'C");
      check($countones({p, q, r}) == $countones({a, b, c}), "conservative");
      check(err == 1'b0, "no error when fault-free");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "one-to-one mapping");

    detected = 0;
    for (int k = 1; k <= 19; k++) begin
      for (int v = 0; v < 8; v++) begin
        int expect_out;
        logic [2:0] good;
        fault = '{en: 1'b1, gate: '0, pattern: 5'(k)};
        {a, b, c} = 3'(v);
        #1;
        expect_out = table_txt[k-1][v] - "0";
        good = {a, (!a && b) || (a && c), (a && b) || (!a && c)};
        check({p, q, r} == 3'(expect_out), $sformatf("pattern %0d output", k));
        check(err == ((^{a, b, c}) != (^{p, q, r})), "err is the parity mismatch");
        if ({p, q, r} != good) begin
          check(err == 1'b1, "wrong output is detected");
          detected++;
        end
      end
      // the same defect addressed to another gate is not applied here
      fault = '{en: 1'b1, gate: 12'd1, pattern: 5'(k)};
      {a, b, c} = 3'b101;
      #1;
      check({p, q, r} == 3'b110 && err == 1'b0, "fault for another gate ignored");
      fault = '{en: 1'b0, gate: '0, pattern: 5'(k)};
      #1;
      check({p, q, r} == 3'b110 && err == 1'b0, "disabled fault ignored");
    end
    check(detected > 0, "some defect changed an output");
    $display("defect-induced output errors detected: %0d", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
