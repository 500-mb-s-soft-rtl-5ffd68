# 8-state soft output Viterbi decoders (SOVA) at one bit per clock

A Viterbi decoder says which bit sequence was most likely sent. A soft-output Viterbi
decoder also says how sure it is about each bit. That is what an iterative (turbo)
receiver needs. Here the confidence of a decided bit is the path-metric difference
between two paths:

- the most-likely path α;
- the best path β that reaches the opposite value for that bit.

In the log domain this difference is the log-likelihood ratio of the decision.

This RTL implements two such decoders, both with the same datapath:

| decoder | trellis | input per clock | output per clock |
|---|---|---|---|
| `sova_epr4` (inner) | EPR4 magnetic-recording channel, 1 + D − D² − D³, 8 states | one 6-bit channel sample plus one a-priori value | decided channel bit + 6-bit reliability |
| `sova_11_13` (outer) | (11,13) octal convolutional code, 8 states, punctured to rate 8/9 | two soft code bits with puncture flags | decided information bit + 6-bit reliability |

`sova_chip` puts the two decoders side by side. In a serially concatenated turbo
receiver they would be joined through an interleaver and a deinterleaver, which are not
part of this RTL.

The datapath is fully pipelined. It takes one trellis step per clock and never stalls,
so the throughput is one decoded bit per cycle. The reference silicon ran at 500 MHz,
i.e. 500 Mb/s. Three structures make this possible:

1. **Transformed compare-select-add (CSA)**: the add of the next step is moved ahead of
   the select, so the add and the compare happen in parallel.
2. **Register-exchange survivor memory (SMU)**: no RAM and no traceback pointers.
3. **Second register exchange plus pipelined minimum**: a second register exchange, the
   path-equivalence detector (PED), feeds a pipelined minimum unit, the reliability
   measure unit (RMU). Together they find β for every bit.

## Files

| file | module | role |
|---|---|---|
| `rtl/sova_pkg.sv` | package | widths, `soft_t` (7-bit sign-magnitude), trellis helpers |
| `rtl/sova_chip.sv` | `sova_chip` | top: both decoders |
| `rtl/sova_epr4.sv`, `rtl/sova_11_13.sv` | decoders | branch metric generator + `sova_core` |
| `rtl/bmg_epr4.sv`, `rtl/bmg_11_13.sv` | branch metric generators | |
| `rtl/sova_core.sv` | `sova_core` | shared SOVA datapath |
| `rtl/csa.sv`, `rtl/csa_array.sv` | CSA unit, 8 CSAs with trellis wiring | |
| `rtl/lstep_fifo.sv` | fixed-delay FIFO | |
| `rtl/smu.sv` | survivor memory (register exchange) | |
| `rtl/ped.sv` | path-equivalence detector | |
| `rtl/rmu.sv` | reliability measure unit | |
| `tb/sova_ref_pkg.sv` | behavioural reference model used by the testbenches | |
| `tb/tb_*.sv` | one self-checking testbench per module | |

## The trellis and its numbering

Both decoders use the same trellis shape. Everything below relies on this numbering.

- **State.** The state is the last three input bits, newest in the MSB:
  `s(n) = {u(n-1), u(n-2), u(n-3)}`.
- **Next state.** Input `u` moves the trellis from `s` to `{u, s[2:1]}`.
- **Predecessors.** State `i` is entered from `{i[1:0],0}` and `{i[1:0],1}`, both on
  the branch with input bit `i[2]`.
- **Decision.** The CSA decision `dec_i(n)` is 1 when the predecessor ending in 1
  survived. It is therefore the LSB of the surviving predecessor.
- **Decision equals input bit.** Along any path, the decision taken at step `n` is the
  input bit `u(n-4)`. A decision stream is a (4-step-delayed) bit stream, so a register
  exchange of decisions is also a register exchange of decoded bits.
- **State from decisions.** The state at step `m` is `{d(m+3), d(m+2), d(m+1)}`, built
  from three consecutive decisions. The SMU uses this to turn its survivor bits into a
  state number.

`bm[s][u]` is the branch metric of the branch that leaves state `s` with input `u`.
Metrics are costs: smaller is better.

For the EPR4 decoder, the input bit is the channel bit. The noiseless sample is
`4·(a(n)+a(n-1)−a(n-2)−a(n-3))` with `a = 2u−1`. Its levels are 0, ±8 and ±16 on a
6-bit two's-complement input. The metric has two parts:

- the squared error `(y − level)² >> 2`, saturated to 7 bits;
- the a-priori reliability, added when the branch bit disagrees with the a-priori sign.

For the (11,13) decoder, the code bits are `c0 = u ^ u(n-3)` and
`c1 = u ^ u(n-2) ^ u(n-3)`: generators 11 and 13 octal, read with the current bit in the
MSB. A branch pays the reliability of every received, unpunctured code bit whose hard
value it contradicts.

## Compare-select-add

A conventional add-compare-select unit first adds branch metrics to two state metrics,
then compares, then selects. In `csa.sv` the registers instead hold partial sums
`P[s][u] = sm_s(n) + bm_{s,u}(n)`, one per branch.

In one cycle, unit `i` does the following:

1. It compares the two partial sums entering state `i` (`pa`, `pb`). This comparison is
   a subtraction, and its result is also the metric difference Δ.
2. At the same time, it adds both of next step's outgoing branch metrics to *both*
   `pa` and `pb`: four adders.
3. The compare result selects the finished sums `p_out0` and `p_out1`, which are
   registered.

The loop is one subtract in parallel with one add, followed by a 2:1 multiplexer. The
cost is twice the adders and multiplexers.

Arithmetic details:

- **Normalisation.** Partial sums are 12-bit and use modulo arithmetic. The compare
  looks at the sign of the wrapped difference, which is exact while all metrics lie
  within ±2047 of each other. With 7-bit branch metrics and a memory of three, the
  spread stays far below that.
- **Tie rule.** The smaller metric wins. A tie keeps `pa` (decision 0).
- **Δ output.** `|pa − pb|` is saturated to 6 bits.
- **Reset.** All partial sums reset to 0, so there is no known start state.

## Two cascaded tracebacks, and how they line up

This is the part that needs care. `sova_core.sv` wires the blocks as follows, with cycle
offsets given relative to the CSA output.

```
 CSA array ──dec(n),Δ(n)──┬──────────────► SMU (L-stage register exchange, row 0)
                          │                    │  ML state of step n-L-1, registered
                          └─► 8 × FIFO (L+2) ──┼──► dec(m),Δ(m) of all states, m = n-L-1
                                               │
                   PED (register exchange on dec(m)) ──► EQ(i,j) for all i, j=1..M
                                               │
            ML state î(m) selects:  Δ_î(m), dec_î(m) (the decided bit), EQ(î,1..M)
                                               │
                         RMU: M sections, one word moves one section per cycle
```

### SMU

Row `s` of the SMU holds the decisions along the survivor into state `s`, newest first.
Each cycle, register `k+1` of row `s` takes register `k` of the chosen predecessor's
row. After L steps all survivors have normally merged. Row 0 is therefore read at depth
L, and its last three bits form the ML state at that depth. The output is registered.

### FIFOs

The FIFOs delay every state's decision and Δ by L+2 cycles. That is exactly the SMU
delay, so the FIFO output for step `m` arrives together with the ML state of step `m`.

### PED

The PED is a second register exchange, fed with the FIFO's decisions. At step `m` the
two paths competing for state `i` are the survivors of its two predecessors. Comparing
those two rows at depth `j−1` gives `EQ(i,j)`: 1 when the winner and the loser of the
merge at state `i` agree on the decision `j−1` steps before the merge.

`EQ(i,1)` covers the merge branch itself. It is always 0, because the two branches into
a state carry complementary decisions.

### RMU

Each cycle a new reliability word enters section 1 with the value 63 ("infinity"). It
moves one section per cycle. All sections see the same Δ (of the ML state at the
current step) and pick their own `EQ(î, j)`. Section `j` then does:

- if `EQ = 1`: pass the word on unchanged;
- if `EQ = 0`: pass on `min(Δ, word)`.

Why every section works on the same bit: a word entering in cycle `c` meets merge step
`m+j−1` in section `j`, and that section's `EQ` looks `j−1` steps behind that merge.
Every section therefore looks at the same bit, the ML path's decision at step `m`.
That decision is taken from the FIFO of the ML state (`dec_î(m)`) and delayed M cycles,
so it leaves together with its reliability.

The result is the classic SOVA update rule. For each bit, the reliability is the
smallest metric difference over the M merges along the ML path whose losing path
disagrees on that bit.

### Latency

From input to output the latency is **L + M + 8 cycles**, 38 at the defaults:

- the L-step and M-step tracebacks;
- 4 cycles because a decision names the input bit four steps earlier;
- 4 pipeline registers: branch metric, CSA, SMU output, and output alignment.

`out_valid` is `in_valid` delayed by that amount. `in_valid` is only a tag: the
pipeline runs every cycle, and outputs are meaningful once it has been fed L+M+8 valid
inputs.

## Number formats

| quantity | format |
|---|---|
| soft input and output (`soft_t`) | 7-bit sign-magnitude `{hard, mag[5:0]}`. `hard` is the bit; `mag` is the reliability in branch-metric units; 63 is "infinity" or "certain" |
| EPR4 sample `y` | 6-bit two's complement |
| branch metric | 7-bit unsigned, saturating |
| partial sum | 12-bit, modulo |
| Δ | 6-bit unsigned, saturated; stored with the decision as one 7-bit FIFO word per state |

## Interfaces

All ports are sampled on the rising clock edge. Reset is asynchronous and active low.

`sova_epr4`: `in_valid`, `y[5:0]`, `apriori` (soft_t) in; `out_valid`, `out` (soft_t)
out. The output for the channel bit of sample `n` appears L+M+8 cycles after sample `n`
was applied. Use `apriori = 0` when there is no a-priori knowledge.

`sova_11_13`: `in_valid`, `llr[1:0]` (soft_t, code bits c0 and c1), `erased[1:0]` in;
`out_valid`, `out` out. A set `erased` bit makes that code bit cost nothing, which is how
punctured bits are fed. The puncture pattern is up to the driver. For rate 8/9, keep
`c0` always and `c1` once every eight steps.

`sova_chip`: the ports of both decoders, prefixed `epr4_` and `c1113_`, plus the shared
`clk` and `rst_n`. Parameters `L` and `M` (default 15 each) set the traceback depths of
both decoders.

## Where this RTL follows its source and where it chooses

Taken from the reference architecture:

- the 8-state trellises;
- L = M = 15 (five constraint lengths);
- the transformed CSA, with the add moved ahead of the select;
- the register-exchange SMU;
- the decision/Δ FIFOs;
- a PED that is itself a register exchange with one equivalence output per stage;
- the RMU rule (initialise at infinity; EQ = 1 passes, EQ = 0 takes the minimum);
- the 7-bit sign-magnitude output;
- one bit per clock.

Choices made here:

- **Branch metrics.** Both metric formulas and their scaling. The EPR4 polynomial
  1 + D − D² − D³. How the a-priori input enters.
- **Code reading.** The (11,13) code is read as a feed-forward rate-1/2 code; whether
  the original is recursive is not known. Puncturing is handled through flags.
- **Metric arithmetic.** Modulo normalisation, the tie rule, the 12-bit partial sums and
  the reset state.
- **SMU output.** The SMU reads a fixed row (state 0) rather than searching for the best
  state.
- **Alignment.** The FIFO depth L+2 instead of L. The single ML-state register shared by
  the Δ and all EQ multiplexers.
- **PED indexing.** `EQ(i,1)` is the merge branch itself, so it is 0. The source's drawing
  places its first equivalence output one register later. Followed literally, the merge
  that decides a bit could never lower that bit's reliability. This RTL follows the
  written definition ("the two competing decisions obtained through a j-step
  traceback").
- **Latency.** The latency is L+M+8 rather than L+M, for the reasons in the latency
  section above.

Not included:

- the interleavers;
- the transmit-side encoder and channel (the testbenches model them);
- the soft output on the outer code's coded bits that a full turbo loop would feed back;
- the custom clock tree and pads of the silicon.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare against
values computed independently in the testbench. `tb/sova_ref_pkg.sv` holds a
behavioural SOVA model for this purpose. It stores the whole decision history and finds
every output by explicit tracebacks:

- an L-step traceback from state 0 for the ML path;
- a traceback of both competing paths at every merge;
- unbounded integer path metrics.

It shares no structure with the register exchanges it checks.

| testbench | what it shows |
|---|---|
| `tb_csa` | decision, Δ, new partial sums, including ties, saturation and wrap-around |
| `tb_csa_array` | decisions and Δ of all states against an unbounded-metric recursion |
| `tb_lstep_fifo` | exact delay |
| `tb_smu` | ML state against an explicit traceback |
| `tb_ped` | every EQ(i,j) against traced competing paths |
| `tb_rmu` | reliability against a software pipeline |
| `tb_bmg_epr4`, `tb_bmg_11_13` | all 16 branch metrics against the formulas |
| `tb_sova_core` | random metrics; every output against the reference; latency |
| `tb_sova_epr4` | noisy EPR4 channel with a-priori input; outputs against the reference; hard bits against sent bits; wrong bits must be less reliable |
| `tb_sova_11_13` | (11,13) code punctured to 8/9 with flipped soft bits; same checks |
| `tb_sova_chip` | both decoders at default size at once; all of the above; counts each mechanism (second-predecessor select, metric wrap-around, saturated Δ, RMU updates taken and skipped, a-priori penalties, punctured bits) and fails if one never occurs |

Typical results of `tb_sova_chip` (3000 steps):

- **EPR4, noise σ ≈ 2.8 on a level spacing of 8:** about 24 bit errors. Mean
  reliability is 48 for correct bits and 6 for wrong ones.
- **Punctured (11,13), 2 % flipped code bits:** about 9 % bit errors. That is expected
  from a rate-8/9 code on its own; the code is meant to work inside the turbo loop. The
  same decoder makes no errors unpunctured.

To run a testbench with Verilator (the package files come first):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sova_pkg.sv tb/sova_ref_pkg.sv rtl/*.sv tb/tb_sova_chip.sv \
    --top-module tb_sova_chip
./obj_dir/Vtb_sova_chip
```

Each testbench ends with `TB_RESULT checks=N failures=F` and has a watchdog.

## Changing the design

- **Traceback depths.** `L` and `M` are parameters of `sova_chip`, `sova_epr4`,
  `sova_11_13` and `sova_core`. L must be at least 3 (the SMU reads three bits of one
  row) and M at least 2.
- **Word sizes.** Widths live in `sova_pkg`. If branch metrics are widened, `PM_W` must
  keep the metric spread below half its range.
- **Other trellises.** Other 8-state trellises with the same shift-register state only
  need a new branch metric generator. A different number of states needs the trellis
  helpers in `sova_pkg` and the state-from-decisions taps in `smu.sv` changed.
