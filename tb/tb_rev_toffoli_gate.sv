// tb_rev_toffoli_gate: exhaustive self-checking testbench for the Toffoli gate.
//
// Applies all eight input combinations, compares {P,Q,R} with the gate's
// truth table written here independently (C inverted only when A and B are both 1), and checks that the
// eight outputs are all different, i.e. that the gate is reversible
// (a bijection on three bits).
module tb_rev_toffoli_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;
  logic [2:0] exp_out;

  rev_toffoli_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_out = (a && b) ? {a, b, !c} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", 3'(i), {p, q, r}, exp_out);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL gate is not reversible, outputs reached=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
