// tb_rev_ms_jk_ff: self-checking testbench for the master-slave JK flip-flop.
//
// Drives random inputs for 400 clk periods (after a reset) and
// compares Q and Q' in every period with a reference model written
// from the characteristic equation:
//   Q+ = E.(J.Q' + K'.Q) + E'.Q
// The reference holds a master and a slave state: the master follows the
// equation while E = 1 and holds while E = 0; the slave copies the master
// while E = 0 and holds while E = 1. Q must equal the slave's value in the
// same period (no extra latency), so Q changes in the first period with
// E = 0 and never while E = 1.
// It also counts how
// often each mode of the element was exercised; a mode never seen counts
// as a failure. A watchdog ends the run as failed if it hangs.
module tb_rev_ms_jk_ff;
  logic clk = 1'b0, rst_n;
  logic e, j, k;
  logic q, q_n;
  logic [3:0] garbage;
  int checks = 0, failures = 0;
  logic ref_q, ref_m, exp_q, exp_m;
  int n_modes [4];

  rev_ms_jk_ff dut (.clk, .rst_n, .e, .j, .k, .q, .q_n, .garbage);

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
    for (int n = 0; n < 400; n++) begin
      e = 1'($urandom_range(0, 2) == 0);
      j = 1'($urandom_range(0, 1));
      k = 1'($urandom_range(0, 1));
      #3;
      exp_m = e ? f_next(e, j, k, ref_m) : ref_m;
      exp_q = e ? ref_q : exp_m;
      n_modes[mode_of(e, j, k, ref_m)]++;
      check("Q", q, exp_q);
      check("Q'", q_n, !exp_q);
      @(posedge clk);
      ref_q = exp_q;
      ref_m = exp_m;
      #1;
    end
    foreach (n_modes[i]) begin
      checks++;
      if (n_modes[i] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", i);
      end
    end
    $display("modes exercised: %0d %0d %0d %0d", n_modes[0], n_modes[1], n_modes[2], n_modes[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
