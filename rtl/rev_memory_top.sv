// rev_memory_top: the family of reversible storage elements, side by side.
//
// Every storage element of the library is instantiated once with its own
// inputs and outputs; they share only clk (one period = the delay of a
// feedback loop) and rst_n (clears every stored state to 0):
//   d_*    clock-enabled D latch with Q and Q'         (MF + 2 FG)
//   msd_*  master-slave D flip-flop, falling edge of E (MF, FG, NOT, MF, FG)
//   sr_*   clock-enabled SR latch                      (FG, FG, MF, PG, FG copies)
//   mssr_* master-slave SR flip-flop                   (SR latch, NOT, D latch)
//   jk_*   JK latch without clock                      (NOT, MF, FG)
//   jke_*  clock-enabled JK latch                      (NOT, 2 MF, FG)
//   msjk_* master-slave JK flip-flop                   (JK latch, NOT, D latch)
//   t_*    T latch without clock                       (2 FG)
//   te_*   clock-enabled T latch                       (PG, FG)
//   mst_*  master-slave T flip-flop                    (T latch, NOT, D latch)
// The Toffoli and Fredkin gates of the gate library, which none of these
// elements uses, are brought out as two stand-alone 3x3 gates (tg_*, fg_*).
// The garbage outputs of every element are brought out as well, so that
// each element is a complete reversible circuit. The elements and their
// netlists follow the published designs; placing them side by side in one
// top with a shared step clock and reset is this design's arrangement.
module rev_memory_top (
  input  logic       clk,
  input  logic       rst_n,
  // D latch
  input  logic       d_e, d_d,
  output logic       d_q, d_q_n, d_e_pass,
  output logic       d_garbage,
  // master-slave D flip-flop
  input  logic       msd_e, msd_d,
  output logic       msd_q,
  output logic [2:0] msd_garbage,
  // SR latch
  input  logic       sr_e, sr_s, sr_r,
  output logic       sr_q, sr_e_pass,
  output logic [3:0] sr_garbage,
  // master-slave SR flip-flop
  input  logic       mssr_e, mssr_s, mssr_r,
  output logic       mssr_q, mssr_q_n,
  output logic [5:0] mssr_garbage,
  // JK latch
  input  logic       jk_j, jk_k,
  output logic       jk_q,
  output logic [1:0] jk_garbage,
  // clock-enabled JK latch
  input  logic       jke_e, jke_j, jke_k,
  output logic       jke_q, jke_e_pass,
  output logic [1:0] jke_garbage,
  // master-slave JK flip-flop
  input  logic       msjk_e, msjk_j, msjk_k,
  output logic       msjk_q, msjk_q_n,
  output logic [3:0] msjk_garbage,
  // T latch
  input  logic       t_t,
  output logic       t_q, t_garbage,
  // clock-enabled T latch
  input  logic       te_e, te_t,
  output logic       te_q, te_e_pass, te_garbage,
  // master-slave T flip-flop
  input  logic       mst_e, mst_t,
  output logic       mst_q, mst_q_n,
  output logic [2:0] mst_garbage,
  // stand-alone Toffoli and Fredkin gates, {A,B,C} in, {P,Q,R} out
  input  logic [2:0] tg_in,
  output logic [2:0] tg_out,
  input  logic [2:0] fg_in,
  output logic [2:0] fg_out
);
  rev_d_latch u_d (
    .clk, .rst_n, .e(d_e), .d(d_d),
    .q(d_q), .q_n(d_q_n), .e_pass(d_e_pass), .garbage(d_garbage)
  );
  rev_ms_d_ff u_msd (
    .clk, .rst_n, .e(msd_e), .d(msd_d), .q(msd_q), .garbage(msd_garbage)
  );
  rev_sr_latch u_sr (
    .clk, .rst_n, .e(sr_e), .s(sr_s), .r(sr_r),
    .q(sr_q), .e_pass(sr_e_pass), .garbage(sr_garbage)
  );
  rev_ms_sr_ff u_mssr (
    .clk, .rst_n, .e(mssr_e), .s(mssr_s), .r(mssr_r),
    .q(mssr_q), .q_n(mssr_q_n), .garbage(mssr_garbage)
  );
  rev_jk_latch u_jk (
    .clk, .rst_n, .j(jk_j), .k(jk_k), .q(jk_q), .garbage(jk_garbage)
  );
  rev_jk_latch_en u_jke (
    .clk, .rst_n, .e(jke_e), .j(jke_j), .k(jke_k),
    .q(jke_q), .e_pass(jke_e_pass), .garbage(jke_garbage)
  );
  rev_ms_jk_ff u_msjk (
    .clk, .rst_n, .e(msjk_e), .j(msjk_j), .k(msjk_k),
    .q(msjk_q), .q_n(msjk_q_n), .garbage(msjk_garbage)
  );
  rev_t_latch u_t (
    .clk, .rst_n, .t(t_t), .q(t_q), .garbage(t_garbage)
  );
  rev_t_latch_en u_te (
    .clk, .rst_n, .e(te_e), .t(te_t),
    .q(te_q), .e_pass(te_e_pass), .garbage(te_garbage)
  );
  rev_ms_t_ff u_mst (
    .clk, .rst_n, .e(mst_e), .t(mst_t),
    .q(mst_q), .q_n(mst_q_n), .garbage(mst_garbage)
  );
  rev_toffoli_gate u_tg (
    .a(tg_in[2]), .b(tg_in[1]), .c(tg_in[0]),
    .p(tg_out[2]), .q(tg_out[1]), .r(tg_out[0])
  );
  rev_fredkin_gate u_fg (
    .a(fg_in[2]), .b(fg_in[1]), .c(fg_in[0]),
    .p(fg_out[2]), .q(fg_out[1]), .r(fg_out[0])
  );
endmodule
