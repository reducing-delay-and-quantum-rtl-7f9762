// tb_rev_memory_top: end-to-end self-checking testbench of the whole
// library of reversible storage elements.
//
// All ten storage elements and the two stand-alone gates are driven at
// once with independent random inputs for 2000 clk periods after a reset.
// A reference model, written from the characteristic equations, keeps the
// state of every latch (and the master and slave states of the three
// master-slave flip-flops) and predicts every Q and Q' in every period.
// The clock inputs E of the master-slave flip-flops are pulses one clk
// period wide, the way a toggling master must be clocked.
// Mechanisms counted (each must occur at least once): D load and hold,
// flip-flop capture on the falling edge of E, SR set / reset / hold and
// the S=R=1 hold, JK set / reset / toggle / hold, T toggle, and a
// Fredkin swap. The top has no parameters, so this is also the full-size
// run.
module tb_rev_memory_top;
  logic clk = 1'b0, rst_n;
  logic d_e, d_d, d_q, d_q_n, d_e_pass, d_garbage;
  logic msd_e, msd_d, msd_q;
  logic [2:0] msd_garbage;
  logic sr_e, sr_s, sr_r, sr_q, sr_e_pass;
  logic [3:0] sr_garbage;
  logic mssr_e, mssr_s, mssr_r, mssr_q, mssr_q_n;
  logic [5:0] mssr_garbage;
  logic jk_j, jk_k, jk_q;
  logic [1:0] jk_garbage;
  logic jke_e, jke_j, jke_k, jke_q, jke_e_pass;
  logic [1:0] jke_garbage;
  logic msjk_e, msjk_j, msjk_k, msjk_q, msjk_q_n;
  logic [3:0] msjk_garbage;
  logic t_t, t_q, t_garbage;
  logic te_e, te_t, te_q, te_e_pass, te_garbage;
  logic mst_e, mst_t, mst_q, mst_q_n;
  logic [2:0] mst_garbage;
  logic [2:0] tg_in, tg_out, fg_in, fg_out;

  rev_memory_top dut (.*);

  localparam int CYCLES = 2000;

  typedef enum int {
    EV_D_LOAD, EV_D_HOLD, EV_EDGE_CAPTURE, EV_SR_SET, EV_SR_RESET,
    EV_SR_HOLD, EV_SR_BOTH, EV_JK_SET, EV_JK_RESET, EV_JK_TOGGLE,
    EV_JK_HOLD, EV_T_TOGGLE, EV_F_SWAP, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  int checks = 0, failures = 0;

  // reference state
  logic r_d, r_msd_m, r_msd_s, r_sr, r_mssr_m, r_mssr_s, r_jk, r_jke;
  logic r_msjk_m, r_msjk_s, r_t, r_te, r_mst_m, r_mst_s;
  // expected values of this period
  logic x_d, x_msd_m, x_msd_s, x_sr, x_mssr_m, x_mssr_s, x_jk, x_jke;
  logic x_msjk_m, x_msjk_s, x_t, x_te, x_mst_m, x_mst_s;

  always #5 clk = ~clk;

  initial begin : watchdog
    #((CYCLES + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sr_f(logic s, logic r, logic q);
    if (s && !r) return 1'b1;
    if (!s && r) return 1'b0;
    return q;
  endfunction

  function automatic logic jk_f(logic j, logic k, logic q);
    case ({j, k})
      2'b00:   return q;
      2'b01:   return 1'b0;
      2'b10:   return 1'b1;
      default: return !q;
    endcase
  endfunction

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, want);
    end
  endtask

  task automatic count_jk(logic j, logic k);
    case ({j, k})
      2'b00: events[EV_JK_HOLD]++;
      2'b01: events[EV_JK_RESET]++;
      2'b10: events[EV_JK_SET]++;
      2'b11: events[EV_JK_TOGGLE]++;
    endcase
  endtask

  task automatic count_sr(logic s, logic r);
    case ({s, r})
      2'b00: events[EV_SR_HOLD]++;
      2'b01: events[EV_SR_RESET]++;
      2'b10: events[EV_SR_SET]++;
      2'b11: events[EV_SR_BOTH]++;
    endcase
  endtask

  // a master-slave pair: master follows nxt while e, slave copies while !e
  task automatic ms_step(logic e, logic nxt, logic rm, logic rs,
                         output logic xm, output logic xs);
    xm = e ? nxt : rm;
    xs = e ? rs : xm;
  endtask

  initial begin
    logic pulse;
    foreach (events[i]) events[i] = 0;
    rst_n = 1'b0;
    {d_e, d_d, msd_e, msd_d, sr_e, sr_s, sr_r, mssr_e, mssr_s, mssr_r} = '0;
    {jk_j, jk_k, jke_e, jke_j, jke_k, msjk_e, msjk_j, msjk_k} = '0;
    {t_t, te_e, te_t, mst_e, mst_t} = '0;
    tg_in = '0;
    fg_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    {r_d, r_msd_m, r_msd_s, r_sr, r_mssr_m, r_mssr_s, r_jk, r_jke} = '0;
    {r_msjk_m, r_msjk_s, r_t, r_te, r_mst_m, r_mst_s} = '0;
    pulse = 1'b0;

    for (int n = 0; n < CYCLES; n++) begin
      // one-period clock pulses for the flip-flops, at random intervals
      pulse = !pulse && ($urandom_range(0, 2) == 0);
      d_e = 1'($urandom_range(0, 1));
      d_d = 1'($urandom_range(0, 1));
      msd_e = pulse;
      msd_d = 1'($urandom_range(0, 1));
      sr_e = 1'($urandom_range(0, 1));
      {sr_s, sr_r} = 2'($urandom_range(0, 3));
      mssr_e = pulse;
      {mssr_s, mssr_r} = 2'($urandom_range(0, 3));
      {jk_j, jk_k} = 2'($urandom_range(0, 3));
      jke_e = 1'($urandom_range(0, 1));
      {jke_j, jke_k} = 2'($urandom_range(0, 3));
      msjk_e = pulse;
      {msjk_j, msjk_k} = 2'($urandom_range(0, 3));
      t_t = 1'($urandom_range(0, 1));
      te_e = 1'($urandom_range(0, 1));
      te_t = 1'($urandom_range(0, 1));
      mst_e = pulse;
      mst_t = 1'($urandom_range(0, 1));
      tg_in = 3'($urandom_range(0, 7));
      fg_in = 3'($urandom_range(0, 7));
      #3;

      x_d  = d_e ? d_d : r_d;
      x_sr = sr_e ? sr_f(sr_s, sr_r, r_sr) : r_sr;
      x_jk = jk_f(jk_j, jk_k, r_jk);
      x_jke = jke_e ? jk_f(jke_j, jke_k, r_jke) : r_jke;
      x_t  = t_t ^ r_t;
      x_te = (te_e & te_t) ^ r_te;
      ms_step(msd_e,  msd_d,                             r_msd_m,  r_msd_s,  x_msd_m,  x_msd_s);
      ms_step(mssr_e, sr_f(mssr_s, mssr_r, r_mssr_m),    r_mssr_m, r_mssr_s, x_mssr_m, x_mssr_s);
      ms_step(msjk_e, jk_f(msjk_j, msjk_k, r_msjk_m),    r_msjk_m, r_msjk_s, x_msjk_m, x_msjk_s);
      ms_step(mst_e,  mst_t ^ r_mst_m,                   r_mst_m,  r_mst_s,  x_mst_m,  x_mst_s);

      check("D latch Q", d_q, x_d);
      check("D latch Q'", d_q_n, !x_d);
      check("MS D Q", msd_q, x_msd_s);
      check("SR latch Q", sr_q, x_sr);
      check("MS SR Q", mssr_q, x_mssr_s);
      check("MS SR Q'", mssr_q_n, !x_mssr_s);
      check("JK latch Q", jk_q, x_jk);
      check("JK-E latch Q", jke_q, x_jke);
      check("MS JK Q", msjk_q, x_msjk_s);
      check("MS JK Q'", msjk_q_n, !x_msjk_s);
      check("T latch Q", t_q, x_t);
      check("T-E latch Q", te_q, x_te);
      check("MS T Q", mst_q, x_mst_s);
      check("MS T Q'", mst_q_n, !x_mst_s);
      checks++;
      if (tg_out !== {tg_in[2], tg_in[1], tg_in[0] ^ (tg_in[2] & tg_in[1])}) begin
        failures++;
        $display("FAIL Toffoli gate in=%b out=%b", tg_in, tg_out);
      end
      checks++;
      if (fg_out !== (fg_in[2] ? {fg_in[2], fg_in[0], fg_in[1]} : fg_in)) begin
        failures++;
        $display("FAIL Fredkin gate in=%b out=%b", fg_in, fg_out);
      end

      // mechanisms
      if (d_e) events[EV_D_LOAD]++; else events[EV_D_HOLD]++;
      if (!msd_e && (r_msd_m != r_msd_s)) events[EV_EDGE_CAPTURE]++;
      if (sr_e) count_sr(sr_s, sr_r);
      if (mssr_e) count_sr(mssr_s, mssr_r);
      count_jk(jk_j, jk_k);
      if (jke_e) count_jk(jke_j, jke_k);
      if (msjk_e) count_jk(msjk_j, msjk_k);
      if (te_e && te_t) events[EV_T_TOGGLE]++;
      if (mst_e && mst_t) events[EV_T_TOGGLE]++;
      if (fg_in[2] && (fg_in[1] != fg_in[0])) events[EV_F_SWAP]++;

      @(posedge clk);
      {r_d, r_sr, r_jk, r_jke, r_t, r_te} = {x_d, x_sr, x_jk, x_jke, x_t, x_te};
      {r_msd_m, r_msd_s, r_mssr_m, r_mssr_s} = {x_msd_m, x_msd_s, x_mssr_m, x_mssr_s};
      {r_msjk_m, r_msjk_s, r_mst_m, r_mst_s} = {x_msjk_m, x_msjk_s, x_mst_m, x_mst_s};
      #1;
    end

    foreach (events[i]) begin
      checks++;
      if (events[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", event_e'(i));
      end else begin
        $display("mechanism %s: %0d", event_e'(i), events[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
