# Constrained-random bus-master stimulus from a non-deterministic extended FSM

To check that a bus slave follows its interface protocol you need a large amount of
random stimulus, and all of it must be legal. Pure random values break the protocol.
Constraint solvers (SAT or BDD based) give legal values, but they are slow, they usually
run outside the simulator, and they cannot go into an emulator.

This design takes a different route. The master side of the protocol is written as a
**non-deterministic extended finite-state machine (NEFSM)**: states, internal variables
such as a beat counter, and transitions. Each transition has an *enabling function*
(when it may be taken) and an *update function* (which outputs and variables it sets).
Several transitions may be enabled at once; that non-determinism is the freedom the
protocol gives the master. Each clock the generator:

1. **Evaluation**: works out which transitions the slave's response allows;
2. **Selection**: draws one of them at random, weighted;
3. **Update**: applies that transition's update function, and fills every output the
   transition leaves free with a biased random value.

The output is legal by construction. The same machine also checks the slave: if no
transition is enabled, the slave has broken the protocol and `fail` rises. Everything is
plain synthesizable logic, with an LFSR for randomness, so the generator can run in an
emulator next to the design under test.

The RTL implements this generator for one protocol model: the master side of a
simplified AMBA AHB fixed-length incrementing burst.

## The burst-master protocol model

Signals, named from the master's point of view:

| signal | dir | width | meaning |
|---|---|---|---|
| `i_r` (I_r) | in  | 1 | slave ready for the current transfer |
| `i_e` (I_e) | in  | 1 | slave error response (given with `i_r` low) |
| `o_b` (O_b) | out | 1 | master busy: suspend the next transfer |
| `o_a` (O_a) | out | 32 | address |
| `o_d` (O_d) | out | 2 | data |
| V_b (`v_b`) | internal | 5 | beats left in the burst |

Protocol rules: an n-beat burst has n transfers, and each address is the previous one
plus one. When ready, the master presents data and the next address, and it may continue
or go busy. While the slave is not ready, the master holds every output. An error
response (`i_e` high, `i_r` low) requires the master to hold `o_d`.

States: `S_SEQ` (bursting), `S_DONE`, `S_BUSY`, `S_ERROR`. All five transitions leave
`S_SEQ`:

| | enabled when | next state | constrained update | randomised |
|---|---|---|---|---|
| t1 | `i_r & !i_e & V_b != 0` | SEQ   | V_b−1, O_a+1, O_b=0 | O_d |
| t2 | `!i_r & !i_e`           | SEQ   | O_b, O_a, O_d held  | – |
| t3 | `i_r & !i_e & V_b == 0` | DONE  | – | O_b, O_a, O_d |
| t4 | `i_r & !i_e & V_b != 0` | BUSY  | V_b−1, O_a+1, O_b=1 | O_d |
| t5 | `!i_r & i_e`            | ERROR | O_b=0, O_d held     | O_a |

t1 and t4 are enabled together: that is the master's free choice between continuing and
going busy. `i_r & i_e` together enables nothing, so it is a protocol violation.

The model covers only part of the protocol. DONE, BUSY and ERROR have no outgoing
transitions. In those states the generator raises `terminal`, keeps `fail` low and
holds until `start` loads a new burst.

## One clock of the generator

All decisions are combinational from the registered state and the present `i_r`/`i_e`.
The result is registered at the rising edge, so the generator behaves as a synchronous
master. The slave sees new outputs one clock after the response that caused them.

```
 i_r,i_e ─► nefsm_eval ──ntcs──► weighted_select ──sel──► nefsm_update ──► registers
 state,V_b ┘    │                 ▲        ▲                  ▲   ▲   ▲       (state, V_b,
                └─► fail          │        └─ lfsr            │   │   │        O_b, O_a, O_d)
                         word_bias_adjust                     │   │   └─ lfsr (O_a, uniform)
                      (T_WEIGHT, B_WEIGHT)      word_bias_gen ┘   └─ word_bias_gen
                                               (O_b, B_WEIGHT)       (O_d, D_WEIGHT)
```

- `nefsm_eval` produces the candidate set `ntcs` (bit k is transition t(k+1)) and `fail`
  = NOR of the candidate bits while in SEQ.
- `weighted_select` draws one candidate.
- `nefsm_update` computes the next state, outputs and V_b.
- If `fail` is high, nothing can be drawn, and every register holds for as long as the
  violation lasts. The assertions `a_rdy_err_fail` and `a_fail_no_move` state these
  rules.
- `start` overrides everything in its cycle. It reloads SEQ with
  V_b = `start_len` and O_a = `start_addr`, and clears O_b and O_d.
- Reset loads SEQ with V_b = 4 and O_a = 20, the starting point of the worked example.

`trans`/`trans_valid` report the transition taken at the last edge. `state` and `v_b`
are outputs too, so a testbench or coverage collector can follow the machine.

## Weighted selection: the arithmetic

`weighted_select` is the core of both the Selection and the Update phase:

1. Disabled candidates count as weight 0. A ripple chain forms the prefix sums
   P_i = w_0 + … + w_i. The total is P_{N−1}.
2. A raw random number `rnd` (RW = 16 bits from an LFSR) is scaled into [0, total):
   r = (rnd × total) >> RW.
3. N comparators form lt_i = (r < P_i). This is a thermometer code.
4. A decoder picks the first i with lt_i set. So candidate i wins exactly when
   P_{i−1} ≤ r < P_i, a range w_i wide.

Over all 2^16 values of `rnd`, each candidate wins ⌊2^16·w_i/total⌋ or ⌈…⌉ times. The
error from the multiply-and-shift scaling is therefore below total/2^16 per candidate.
This is far below what any simulation of realistic length can see. A zero weight is never
drawn, so a weight of 0 disables a transition or a word value. If every enabled weight is
0, `valid` is low and the generator holds.

Each random consumer has its own 32-bit Galois LFSR (x^32+x^22+x^2+x+1, maximal length),
each with its own seed:

- transition choice;
- O_d;
- O_b;
- O_a.

Each LFSR advances 16 bits per clock, or 32 for the address, so one clock's draws share
no bits with the next clock's. Change the `SEED_*` parameters to get a different
stimulus stream.

## Biasing

- **Transition level** (`T_WEIGHT`, default 80/40/40/20/100 for t1..t5). These weights
  set the relative odds among the enabled transitions. Raising the weights of a chosen
  sequence of transitions biases toward that sequence; this is *transaction-level*
  biasing.
- **Word level on a free output** (`D_WEIGHT` 5/40/40/15 for O_d = 0..3, `B_WEIGHT` 3/1
  for O_b). `word_bias_gen` draws the whole word with probability W_v/ΣW, so any
  distribution over the 2^n values can be set. Per-bit biasing cannot do this: here
  01 and 10 are both favoured over 00 and 11. A 1-bit word weight is bit-level biasing.
- **Word level on a constrained output.** O_b is forced by t1, t4 and t5. A bias on O_b
  can therefore only act through the choice of transition. `word_bias_adjust` rescales
  each transition weight by the share of the word weight that the transition can produce:

  w′_t = w_t · Σ_i C^t_i·W_i / Σ_i W_i

  Here C^t_i = 1 if O_b = i can result from t (table `B_FEASIBLE` in `avsg_pkg`). t1 and
  t5 can give only 0, t4 only 1, and t2 and t3 either value. With W_b = 3/1, the
  weights 80/40/40/20/100 become **60/40/40/5/75**, and these are the weights actually
  used. When t1 and t4 compete, t4 wins 5/65 ≈ 7.7 % of the time.

All weights are parameters: the biasing is fixed when the generator is built. The
adjustment is computed from constants and folds away in synthesis. Weights are 8 bits wide
(`avsg_pkg::WEIGHT_W`).

## Files

| file | what |
|---|---|
| `rtl/avsg_pkg.sv` | state and transition enums, weight type, default weights, O_b feasibility table |
| `rtl/avsg_ahb_burst.sv` | **top**: the burst-master generator and checker |
| `rtl/nefsm_eval.sv` | enabling functions, candidate set, `fail` |
| `rtl/weighted_select.sv` | prefix sums, scaled random number, comparators, decoder |
| `rtl/lfsr.sv` | Galois LFSR, several steps per clock |
| `rtl/word_bias_gen.sv` | word-level biased random value (LFSR + weighted_select) |
| `rtl/word_bias_adjust.sv` | folds a word bias into transition weights |
| `rtl/nefsm_update.sv` | update functions of t1..t5 |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_hburst_bias` |

Top parameters: `ADDR_W` (32, at most 32), `VB_W` (5), `RW` (16), `INIT_LEN` (4),
`INIT_ADDR` (20), `T_WEIGHT`, `D_WEIGHT`, `B_WEIGHT`, `SEED_SEL`, `SEED_D`, `SEED_B`,
`SEED_A`. Reset `rst_n` is asynchronous and active low. After synthesis the top is about
260 word-level cells and 174 flip-flop bits.

## Verification

Each testbench compares its block with values it computes on its own. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_avsg_ahb_burst` runs the top at its default parameters for 200,000 clocks, against
  a random slave. The slave mixes ready, wait, error and the illegal ready+error
  combination, and restarts a burst of random length whenever the generator reaches a
  terminal state. A reference model checks every clock:
  - `fail` rises exactly when no move is legal, and then nothing changes;
  - the transition taken is an enabled one;
  - its update function holds;
  - terminal states hold until `start`.

  It also checks the distributions statistically:
  - the t4 : t1 share is 5/65;
  - O_d follows 5/40/40/15;
  - randomised O_b follows 3/1.

  It also runs the two worked cases directed:
  - ready with V_b = 4 at address 20, giving BUSY, O_b = 1, O_a = 21, V_b = 3 when t4
    is drawn;
  - ready together with error, giving `fail`.

  It counts every mechanism (t1..t5, violations, wait holds, each terminal state,
  restarts) and fails if one never happens.
- `tb_hburst_bias` draws a 3-bit AHB HBURST burst type one million times, with weights
  10/20/40/5/15/0/0/10 for SINGLE … INCR16. Each share lands within 0.05 percentage points of its
  target, and the two types weighted 0 never appear.
- `tb_weighted_select` sweeps all 2^16 random inputs to prove the exact proportions.
- `tb_word_bias_adjust` reproduces 60/40/40/5/75 and random cases.
- `tb_lfsr` checks the bit-by-bit sequence and an 8-bit full period of 255.
- `tb_nefsm_eval` is exhaustive. `tb_nefsm_update` covers each transition.
- `tb_word_bias_gen` checks the word distributions.

Each testbench has been shown to catch a deliberately broken copy of its module.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/avsg_pkg.sv \
          tb/tb_avsg_ahb_burst.sv --top-module tb_avsg_ahb_burst -o sim
./obj_dir/sim
```

Use the same command for any other `tb_*`. Each run takes about a second.

## Choices made here, and what is not included

Beyond the protocol model and the method, the following are this design's own choices:

- the reset values and the `start` reload port;
- holding, with `fail` low, in states that have no outgoing transition;
- the signal widths (32-bit address, 5-bit beat counter, 8-bit weights, 16-bit random
  numbers);
- scaling the random number by multiplication rather than modulo;
- a ripple prefix chain instead of an adder tree or look-up table;
- one LFSR per random consumer;
- truncating division in the weight adjustment;
- randomising only outputs, while an internal variable a transition does not name keeps
  its value.

Only the simplified burst model exists as RTL. Generators for the complete WISHBONE
master (4 states, 17 transitions) and the complete AHB master (6 states, 46 transitions)
would use the same building blocks. Their transition lists are not available here, so
they are not built. Nor is the translator that would produce such a generator from an
NEFSM description automatically: it is software. `avsg_ahb_burst` is what it would emit
for the burst model, written by hand. To model another protocol, write its
`nefsm_eval`/`nefsm_update` pair and reuse `weighted_select`, `word_bias_gen`,
`word_bias_adjust` and `lfsr` unchanged.
