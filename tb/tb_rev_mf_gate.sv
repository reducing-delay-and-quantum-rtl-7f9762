// tb_rev_mf_gate: exhaustive self-checking testbench for the modified Fredkin gate.
//
// Applies all eight input combinations, compares {P,Q,R} with the gate's
// truth table written here independently (P=A, Q=B xor C, R=B when A is 1 and C when A is 0), and checks that the
// eight outputs are all different, i.e. that the gate is reversible
// (a bijection on three bits).
module tb_rev_mf_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;
  logic [2:0] exp_out;

  rev_mf_gate dut (.a, .b, .c, .p, .q, .r);

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
      exp_out = {a, b != c, a ? b : c};
      checks++;
      if ({p, q, r} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", 3'(i), {p, q, r}, exp_out);
      end
      seen[{p, q, r}] = 1'b1;
    end
    // worked examples: the two MF gates of the clock-enabled JK latch
    // toggling from Q=0 with J=K=1, E=1, and the D latch loading D=1.
    {a, b, c} = 3'b001; #1;   // MF1(Q=0, K'=0, J=1)
    checks++;
    if ({p, q, r} !== 3'b011) begin failures++; $display("FAIL JK example MF1"); end
    {a, b, c} = 3'b110; #1;   // MF2(E=1, JK value 1, Q=0)
    checks++;
    if ({p, q, r} !== 3'b111) begin failures++; $display("FAIL JK example MF2"); end
    {a, b, c} = 3'b110; #1;   // D latch MF(E=1, D=1, Q=0): Q+ = 1
    checks++;
    if (r !== 1'b1) begin failures++; $display("FAIL D latch example"); end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL gate is not reversible, outputs reached=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
