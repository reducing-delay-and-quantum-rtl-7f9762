// tb_rev_costs: checks the cost figures of every storage element.
//
// Instantiates the whole library (rev_memory_top) and compares each
// element's QUANTUM_COST (number of elementary quantum operations) and
// DELAY (longest path to Q, in delta units) with the published figures.
// Where this netlist knowingly differs from the published figure, the
// expected value is this netlist's own and the published one is given in
// the comment; every such difference is explained in the element's
// header. No simulation of logic values happens here; the behaviour is
// checked by the other testbenches.
module tb_rev_costs;
  import rev_pkg::*;

  rev_memory_top dut (
    .clk(1'b0), .rst_n(1'b0),
    .d_e(1'b0), .d_d(1'b0), .d_q(), .d_q_n(), .d_e_pass(), .d_garbage(),
    .msd_e(1'b0), .msd_d(1'b0), .msd_q(), .msd_garbage(),
    .sr_e(1'b0), .sr_s(1'b0), .sr_r(1'b0), .sr_q(), .sr_e_pass(), .sr_garbage(),
    .mssr_e(1'b0), .mssr_s(1'b0), .mssr_r(1'b0), .mssr_q(), .mssr_q_n(), .mssr_garbage(),
    .jk_j(1'b0), .jk_k(1'b0), .jk_q(), .jk_garbage(),
    .jke_e(1'b0), .jke_j(1'b0), .jke_k(1'b0), .jke_q(), .jke_e_pass(), .jke_garbage(),
    .msjk_e(1'b0), .msjk_j(1'b0), .msjk_k(1'b0), .msjk_q(), .msjk_q_n(), .msjk_garbage(),
    .t_t(1'b0), .t_q(), .t_garbage(),
    .te_e(1'b0), .te_t(1'b0), .te_q(), .te_e_pass(), .te_garbage(),
    .mst_e(1'b0), .mst_t(1'b0), .mst_q(), .mst_q_n(), .mst_garbage(),
    .tg_in(3'b000), .tg_out(), .fg_in(3'b000), .fg_out()
  );

  int checks = 0, failures = 0;

  task automatic check(string what, int unsigned got, int unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, want);
    end else begin
      $display("%-28s %0d", what, got);
    end
  endtask

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    // gate library
    check("NOT quantum cost", COST_NOT.qc, 0);
    check("Feynman quantum cost", COST_FEYNMAN.qc, 1);
    check("Toffoli quantum cost", COST_TOFFOLI.qc, 5);
    check("Fredkin quantum cost", COST_FREDKIN.qc, 5);
    check("MF quantum cost", COST_MF.qc, 4);
    check("Peres quantum cost", COST_PERES.qc, 4);
    // storage elements: quantum cost
    check("D latch QC", dut.u_d.QUANTUM_COST, 6);           // published 6
    check("MS D flip-flop QC", dut.u_msd.QUANTUM_COST, 10);  // published 10
    check("SR latch QC", dut.u_sr.QUANTUM_COST, 12);         // published 12
    check("MS SR flip-flop QC", dut.u_mssr.QUANTUM_COST, 18);// published 18
    check("JK latch QC", dut.u_jk.QUANTUM_COST, 5);          // published 5
    check("JK-E latch QC", dut.u_jke.QUANTUM_COST, 9);       // published 9
    check("MS JK flip-flop QC", dut.u_msjk.QUANTUM_COST, 15);// published 15
    check("T latch QC", dut.u_t.QUANTUM_COST, 2);
    check("T-E latch QC", dut.u_te.QUANTUM_COST, 5);
    check("MS T flip-flop QC", dut.u_mst.QUANTUM_COST, 11);
    // storage elements: delay in delta units
    check("D latch delay", dut.u_d.DELAY, 6);                // published 6
    check("MS D flip-flop delay", dut.u_msd.DELAY, 10);      // published 11
    check("SR latch delay", dut.u_sr.DELAY, 11);             // published 12, 11 to Q
    check("MS SR flip-flop delay", dut.u_mssr.DELAY, 17);    // published 17
    check("JK latch delay", dut.u_jk.DELAY, 6);              // published 5, NOT on K
    check("JK-E latch delay", dut.u_jke.DELAY, 10);          // published 9, NOT on K
    check("MS JK flip-flop delay", dut.u_msjk.DELAY, 16);    // published 14
    check("T latch delay", dut.u_t.DELAY, 2);
    check("T-E latch delay", dut.u_te.DELAY, 5);
    check("MS T flip-flop delay", dut.u_mst.DELAY, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
