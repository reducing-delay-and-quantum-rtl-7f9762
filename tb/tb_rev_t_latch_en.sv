// tb_rev_t_latch_en: self-checking testbench for the clock-enabled T latch.
//
// Drives random inputs for 400 clk periods (after a reset) and
// compares Q in every period with a reference model written
// from the characteristic equation:
//   Q+ = T.E xor Q
// Q must show the new value in the same clk period as the inputs (the
// latch is transparent) and the state must be stored at the clk edge.
// It also counts how
// often each mode of the element was exercised; a mode never seen counts
// as a failure. A watchdog ends the run as failed if it hangs.
// Finally it checks that the gate network is reversible: over all
// (inputs, old state) patterns the visible gate outputs (Q+ and the
// garbage lines) are all different.
module tb_rev_t_latch_en;
  logic clk = 1'b0, rst_n;
  logic e, t;
  logic q;
  logic e_pass;
  logic garbage;
  int checks = 0, failures = 0;
  logic ref_q, ref_m, exp_q, exp_m;
  int n_modes [4];
  int unsigned out_of [int unsigned];  // (inputs, state) -> gate outputs

  rev_t_latch_en dut (.clk, .rst_n, .e, .t, .q, .e_pass, .garbage);

  always #5 clk = ~clk;

  initial begin : watchdog
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next state given by the characteristic equation
  function automatic logic f_next(logic e, logic t, logic qo);
    return (t && e) != qo;
  endfunction

  // which mode an input combination exercises (index into n_modes)
  function automatic int mode_of(logic e, logic t, logic qo);
    if (!e) return 3; if (!t) return 0; return qo ? 2 : 1;
  endfunction

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, want);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    {e, t} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_q = 1'b0;
    ref_m = 1'b0;
    foreach (n_modes[i]) n_modes[i] = 0;
    // published example: T=1, E=1 from Q=1 toggles to 0; the Peres gate
    // outputs are (1, 0, 0).
    e = 1'b1; t = 1'b1; #3;
    @(posedge clk); #1;             // now Q = 1
    ref_q = 1'b1;
    #3;
    check("example Q+", q, 1'b0);
    check("example PG P", e_pass, 1'b1);
    check("example PG Q", garbage, 1'b0);
    @(posedge clk); #1;
    ref_q = 1'b0;
    for (int n = 0; n < 400; n++) begin
      e = 1'($urandom_range(0, 1));
      t = 1'($urandom_range(0, 1));
      #3;
      exp_q = f_next(e, t, ref_q);
      n_modes[mode_of(e, t, ref_q)]++;
      out_of[{e, t, ref_q}] = {e_pass, garbage, q};
      check("Q", q, exp_q);
      @(posedge clk);
      ref_q = exp_q;
      #1;
    end
    foreach (n_modes[i]) begin
      checks++;
      if (n_modes[i] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", i);
      end
    end
    // the gate network must be reversible: every (inputs, old state)
    // pattern reached, and no two of them giving the same outputs
    begin
      bit seen_out [int unsigned];
      foreach (out_of[key]) seen_out[out_of[key]] = 1'b1;
      check("all input patterns reached", out_of.num() == 8, 1'b1);
      check("gate network one-to-one", seen_out.num() == out_of.num(), 1'b1);
    end
    $display("modes exercised: %0d %0d %0d %0d", n_modes[0], n_modes[1], n_modes[2], n_modes[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
