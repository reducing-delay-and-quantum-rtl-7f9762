# Reversible latches and flip-flops

A reversible circuit computes a one-to-one mapping: every output pattern
comes from exactly one input pattern, so no information is erased, and in
principle no energy need be lost as heat when it operates. Memory seems to
clash with that, because a flip-flop forgets its old state when it loads a
new one. The way round it is to keep the combinational part of a
sequential circuit reversible and to close the loop with a wire: the old
state goes in as an input, the new state comes out as an output, and a
copy of that output is fed back.

This library applies the idea to the usual storage elements. Each one is
a small network of reversible gates (NOT, Feynman, Peres and a *modified
Fredkin* gate) plus one or more feedback wires:

| element | module | next state |
|---|---|---|
| clock-enabled D latch, Q and Q' | `rev_d_latch` | Q+ = E ? D : Q |
| master-slave D flip-flop | `rev_ms_d_ff` | Q takes D at the falling edge of E |
| clock-enabled SR latch | `rev_sr_latch` | Q+ = E·(S⊕Q)·(S⊕R) ⊕ Q |
| master-slave SR flip-flop | `rev_ms_sr_ff` | SR latch + NOT + D latch |
| JK latch (no clock) | `rev_jk_latch` | Q+ = J·Q' + K'·Q |
| clock-enabled JK latch | `rev_jk_latch_en` | Q+ = E·(J·Q' + K'·Q) + E'·Q |
| master-slave JK flip-flop | `rev_ms_jk_ff` | JK latch + NOT + D latch |
| T latch (no clock) | `rev_t_latch` | Q+ = T ⊕ Q |
| clock-enabled T latch | `rev_t_latch_en` | Q+ = T·E ⊕ Q |
| master-slave T flip-flop | `rev_ms_t_ff` | T latch + NOT + D latch |

The aim of the netlists is a low *quantum cost* (the number of elementary
one- and two-qubit operations the gates need), a low *delay* (counted in
units Δ of one elementary operation along the longest path) and few
*garbage outputs* (outputs that the circuit does not use but must carry
out to remain reversible). `rev_memory_top` places all ten elements side
by side, together with a stand-alone Toffoli and Fredkin gate.

## The gate library

All gates are purely combinational modules with inputs `a b c` and
outputs `p q r` (two or one of each for the smaller gates).

| gate | module | function | quantum cost | delay |
|---|---|---|---|---|
| NOT | `rev_not_gate` | P = A' | 0 | 1 |
| Feynman (CNOT) | `rev_feynman_gate` | P = A, Q = A⊕B | 1 | 1 |
| Toffoli | `rev_toffoli_gate` | P = A, Q = B, R = AB⊕C | 5 | 5 |
| Fredkin | `rev_fredkin_gate` | P = A, B and C swapped when A = 1 | 5 | 5 |
| Peres | `rev_peres_gate` | P = A, Q = A⊕B, R = AB⊕C | 4 | 4 |
| modified Fredkin (MF) | `rev_mf_gate` | P = A, Q = B⊕C, R = A ? B : C | 4 | 4 |

The Feynman gate does the fan-out: with B = 0 it makes a copy of A, with
B = 1 it gives A and A'. A signal that must reach two places always goes
through one, which is why the netlists below carry "copy" gates.

The costs are collected in `rev_pkg` (`COST_*` constants). Each storage
element states the quantum cost of its netlist as `QUANTUM_COST` and the
delay of its longest path to Q, in Δ, as `DELAY`.

### The modified Fredkin gate

Everything here rests on this gate, and its cost (4 instead of 5) and its
descent from the Fredkin gate fix it only in part. The Fredkin gate is built from
three quantum stages: a CNOT from C to B, a doubly controlled stage with
controls A and B acting on C, and a CNOT from C to B again. Leave out the
last CNOT and the cost falls from 5 to 4, while the outputs become

    P = A,   Q = B ⊕ C,   R = A ? B : C

R is a 2:1 multiplexer steered by A: exactly the load-or-hold function of
a latch when A is the enable, B the new value and C the old state. This is
the function used throughout. It is this design's reading, chosen because
it reproduces every MF output value of the worked examples for the D and
JK latches; if the intended gate differs, only `rev_mf_gate.sv` and the
netlists that use it change.

## The storage elements

### How the feedback wire is modelled

In each element the gate network is combinational and the feedback wire
carries a copy of the new state back to the gate input that takes the old
state. The delay of that wire is the only storage, and here it is one
period of `clk`: the value on the wire is a flip-flop that loads the
copy-gate output on every rising `clk` edge. Consequences:

* `clk` is not the element's clock. It is a fast step clock standing for
  the loop delay. The element's own clock is the input `E`.
* The outputs are combinational from the inputs and the stored state, so a
  latch is transparent: with E = 1 a new D shows on Q in the same `clk`
  period and is stored at the next edge.
* A latch whose next state depends on its own state (T with T = 1, JK
  with J = K = 1) toggles once per loop delay, i.e. once per `clk` period
  while it is enabled. That is what the characteristic equation says, and
  it is the race-around of any latch-based toggle circuit. Clock it with
  an E pulse one `clk` period wide to get exactly one toggle.
* `rst_n` (active low, asynchronous) clears every stored state to 0. The
  reset is this design's addition; a reversible circuit would instead
  start from a known state.

### D latch (`rev_d_latch`)

    MF(E, D, Q)  -> E (e_pass),  D⊕Q (garbage),  Q+
    FG(Q+, 0)    -> two copies: one fed back, one to
    FG(., 1)     -> Q and Q'

Quantum cost 6, delay 6Δ, two garbage lines. The E that leaves the MF gate
(`e_pass`) is garbage here but is the clock for the next stage in the
master-slave flip-flops.

### Master-slave D flip-flop (`rev_ms_d_ff`)

A master D latch (MF + copy gate) open while E = 1; its E output goes
through a NOT gate and opens the slave (MF + copy gate) while E = 0. Q
takes the value D had when E fell and changes in the first `clk` period
with E = 0. Quantum cost 10, three garbage lines. The slave has no Q'
output, which keeps the cost at 10.

### SR latch (`rev_sr_latch`)

The SR equation Q+ = S + R'Q is undefined for S = R = 1; here that input
holds the state, which gives Q+ = (S⊕Q)(S⊕R) ⊕ Q, and with the enable
Q+ = E·(S⊕Q)(S⊕R) ⊕ Q. The product is 1 exactly when the state must
change, so the latch computes a "change" bit and lets the enable gate it
onto Q, the same way the enabled T latch does:

    FG(S, Q)           -> S, S⊕Q
    FG(R, S)           -> R (garbage), S⊕R
    MF(S⊕R, S⊕Q, 0)    -> garbage, garbage, (S⊕R)(S⊕Q)     AND via a 0 input
    PG(E, change, Q)   -> e_pass, garbage, E·change ⊕ Q  = Q+
    FG(Q+, 0), FG      -> Q and two feedback copies

An MF gate with C = 0 is an AND gate (A ? B : 0). Quantum cost 12. With a
Fredkin gate in place of the MF gate the same netlist costs 13, and the
master-slave versions 18 and 19, the four published figures. The gate
wiring is this design's reading; the published walk-through lists the
Peres gate before the MF gate, an order that does not reach those costs.

### JK latches (`rev_jk_latch`, `rev_jk_latch_en`)

Steering an MF gate with the old state picks J when Q = 0 and K' when
Q = 1, which is J·Q' + K'·Q:

    NOT(K)             -> K'
    MF1(Q, K', J)      -> Q, K'⊕J (garbage), J·Q' + K'·Q
    MF2(E, MF1.R, MF1.P) -> e_pass, garbage, Q+        (enabled version only)
    FG(Q+, 0)          -> Q and the feedback copy

The unclocked latch (MF1 + FG) costs 5, the enabled one 9 with three
garbage lines. The NOT on K costs nothing but adds 1Δ on the K path; it
is this design's (the worked toggle example fixes MF1's inputs to the old
state, K' and J).

### T latches (`rev_t_latch`, `rev_t_latch_en`)

Unclocked: FG(T, Q) gives T⊕Q, a copy gate feeds it back (cost 2).
Enabled: PG(E, T, Q) gives E·T⊕Q directly on R, plus a copy gate (cost 5).

### Master-slave SR, JK and T flip-flops

Each is the enabled latch as master, a NOT gate on the E that leaves the
master's last gate, and the D latch with Q and Q' as slave. Quantum costs
18 (SR), 15 (JK) and 11 (T). The master keeps its own feedback loop, so a
toggling master (J = K = 1, or T = 1) must be clocked with one-period
pulses of E, as above; Q then changes once per pulse, after E falls.

## Costs compared with the published figures

Quantum cost / delay (Δ) / garbage lines. The garbage count includes the
E pass-through where nothing else uses it.

| element | published | this netlist |
|---|---|---|
| D latch (Q, Q') | 6 / 6 / 2 | 6 / 6 / 2 |
| master-slave D | 10 / 11 / 3 | 10 / 10 / 3 |
| SR latch | 12 / 12 / 3 | 12 / 11 to Q / 5 |
| master-slave SR | 18 / 17 / 4 | 18 / 17 / 6 |
| JK latch, no clock | 5 / 5 / – | 5 / 6 with NOT on K / 2 |
| JK latch, enabled | 9 / 9 / 3 | 9 / 10 with NOT on K / 3 |
| master-slave JK | 15 / 14 / 4 | 15 / 16 / 4 |
| T latch, enabled | – | 5 / 5 / 2 |
| master-slave T | – | 11 / 11 / 3 |

## Departures and open points

* The MF gate's output function is inferred (see above).
* The Peres gate is the standard one; it reproduces the published T-latch
  example (E = T = Q = 1 gives 1, 0, 0).
* SR latch: the MF gate (as an AND) comes before the Peres gate, the
  reverse of the published walk-through, so that the costs match the
  published ones. It has more garbage lines than the published count.
* JK latches: a NOT gate on K that the published cost allows but the
  text does not mention.
* Master-slave T flip-flop: built the same way as the SR and JK ones; its
  exact netlist is this design's choice.
* The alternative versions with a Fredkin gate in place of the MF gate
  (no clock inversion, one unit more costly) are not built; the Fredkin
  gate itself is in the library.
* The feedback delay is a `clk` period and there is a reset; both are
  modelling choices, not part of a reversible circuit.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv \
        tb/tb_rev_memory_top.sv --top tb_rev_memory_top
    ./obj_dir/Vtb_rev_memory_top

Replace the testbench name for any other module (`tb_<module>.sv`). The
gate testbenches apply every input pattern and check that the gate is a
bijection; the storage-element testbenches compare Q in every `clk` period
with a model written from the next-state equation, run the published
worked examples, check that the gate
network of each latch is one-to-one over all (inputs, old state)
patterns, and fail if any mode (load, hold,
set, reset, toggle) was never exercised. `tb_rev_memory_top` drives all
elements at once for 2000 periods and counts every mechanism: D load and
hold, capture at the falling edge of E, SR set, reset, hold and the
S = R = 1 hold, JK set, reset, toggle and hold, T toggle and Fredkin swap.
`tb_rev_costs` checks every `QUANTUM_COST` and `DELAY` against the cost
table above.
