// tb_rev_not_gate: self-checking testbench for the 1x1 reversible NOT gate.
// Checks P = not A for both inputs, and that applying the gate twice
// restores the input (it is its own inverse).
module tb_rev_not_gate;
  logic a, p, p2;
  int checks = 0, failures = 0;

  rev_not_gate dut  (.a, .p);
  rev_not_gate dut2 (.a(p), .p(p2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (p !== (i == 0)) begin failures++; $display("FAIL a=%b p=%b", a, p); end
      checks++;
      if (p2 !== a) begin failures++; $display("FAIL double inversion"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
