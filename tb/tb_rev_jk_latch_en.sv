// tb_rev_jk_latch_en: self-checking testbench for the clock-enabled JK latch.
//
// Drives random inputs for 400 clk periods (after a reset) and
// compares Q in every period with a reference model written
// from the characteristic equation:
//   Q+ = E.(J.Q' + K'.Q) + E'.Q
// Q must show the new value in the same clk period as the inputs (the
// latch is transparent) and the state must be stored at the clk edge.
// It also counts how
// often each mode of the element was exercised; a mode never seen counts
// as a failure. A watchdog ends the run as failed if it hangs.
// Finally it checks that the gate network is reversible: over all
// (inputs, old state) patterns the visible gate outputs (Q+ and the
// garbage lines) are all different.
module tb_rev_jk_latch_en;
  logic clk = 1'b0, rst_n;
  logic e, j, k;
  logic q;
  logic e_pass;
  logic [1:0] garbage;
  int checks = 0, failures = 0;
  logic ref_q, ref_m, exp_q, exp_m;
  int n_modes [4];
  int unsigned out_of [int unsigned];  // (inputs, state) -> gate outputs

  rev_jk_latch_en dut (.clk, .rst_n, .e, .j, .k, .q, .e_pass, .garbage);

  always #5 clk = ~clk;

  initial begin : watchdog
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next state given by the characteristic equation
  function automatic logic f_next(logic e, logic j, logic k, logic qo);
    return e ? ((j && !qo) || (!k && qo)) : qo;
  endfunction

  // which mode an input combination exercises (index into n_modes)
  function automatic int mode_of(logic e, logic j, logic k, logic qo);
    if (!e || (!j && !k)) return 0; if (j && !k) return 1; if (!j && k) return 2; return 3;
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
    {e, j, k} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_q = 1'b0;
    ref_m = 1'b0;
    foreach (n_modes[i]) n_modes[i] = 0;
    // published example: J=K=1, E=1 from Q=0 toggles; first MF gives
    // (0, 1, 1), second MF gives (1, 1, 1).
    e = 1'b1; j = 1'b1; k = 1'b1; #3;
    check("example Q+", q, 1'b1);
    check("example MF1 Q", garbage[0], 1'b1);
    check("example MF2 P", e_pass, 1'b1);
    check("example MF2 Q", garbage[1], 1'b1);
    @(posedge clk); #1;
    ref_q = 1'b1;
    for (int n = 0; n < 400; n++) begin
      e = 1'($urandom_range(0, 1));
      j = 1'($urandom_range(0, 1));
      k = 1'($urandom_range(0, 1));
      #3;
      exp_q = f_next(e, j, k, ref_q);
      n_modes[mode_of(e, j, k, ref_q)]++;
      out_of[{e, j, k, ref_q}] = {e_pass, garbage, q};
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
      check("all input patterns reached", out_of.num() == 16, 1'b1);
      check("gate network one-to-one", seen_out.num() == out_of.num(), 1'b1);
    end
    $display("modes exercised: %0d %0d %0d %0d", n_modes[0], n_modes[1], n_modes[2], n_modes[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
