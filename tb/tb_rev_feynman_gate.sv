// tb_rev_feynman_gate: exhaustive self-checking testbench for the Feynman
// (CNOT) gate. Checks P = A and Q = A xor B for all four inputs, that the
// gate is a bijection on two bits, and its two uses: copy (B = 0) and
// complement (B = 1).
module tb_rev_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  rev_feynman_gate dut (.a, .b, .p, .q);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL in=%b out=%b", 2'(i), {p, q});
      end
      seen[{p, q}] = 1'b1;
      checks++;
      if (!b && q !== a) begin failures++; $display("FAIL copy"); end
      if (b && q !== !a) begin failures++; $display("FAIL complement"); end
    end
    checks++;
    if (seen !== 4'hf) begin failures++; $display("FAIL not reversible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
