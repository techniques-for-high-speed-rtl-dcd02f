# Nonlinear cancellation receiver with lookahead feedback loops

A binary receiver can remove post-cursor intersymbol interference (ISI) by
letting its previous decisions choose the decision threshold. With N
decisions fed back there are 2^N possible thresholds, and these may depend on
the bit pattern in any nonlinear way. This is nonlinear cancellation (NLC).
Decision-feedback equalisation is the special case where the threshold is a
linear function of the old bits.

Built directly, this is hard to run fast. Decision a_{n-1} has to get through
the feedback path and set the threshold before symbol n is compared. That
means the loop must finish within one symbol period, and an analog threshold
has to switch cleanly at the symbol rate.

This RTL implements the circuit that removes both limits:

1. **No analog switching.** The receiver has 2^N comparators, and comparator j
   always uses threshold j. The feedback now only picks which comparator
   output to use, through a digital multiplexer.
2. **Lookahead.** The one-symbol selection rule is substituted into itself L
   times. Decision n then depends only on decisions that are at least L
   symbols old. Everything else is computed ahead of time, outside the loop,
   from the stored comparator outputs. The loop keeps the form of a single
   2^N:1 multiplexer, but now has L symbol periods to settle.
3. **Using the slack.** The extra time can go to a pipeline register inside
   the multiplexer (`pipelined_loop`). It can also go to L copies of the loop,
   each running at 1/L of the symbol rate, with their outputs interleaved
   (`parallel_loops`). Both are built here.

## The recursion

Let A_(j,n) be the sampled output of comparator j for symbol n, that is
`sample_n > thr[j]`. Threshold index j is the previous N decisions read as a
binary number, with the newest decision as the most significant bit:

    j(n) = a_{n-1} a_{n-2} ... a_{n-N}          (binary, a_{n-1} = MSB)
    a_n  = A_(j(n), n)                           (direct canceller)

Substituting L times gives

    a_n = f_i(n),   i = a_{n-L} a_{n-L-1} ... a_{n-L-N+1}   (binary, a_{n-L} = MSB)

Here f_i(n) is the decision the direct canceller would reach at symbol n if
the N decisions just before symbol n-L+1 had been i. It depends only on the
comparator words A(n-L+1) … A(n). `lookahead_precompute` computes it by
running the selection rule forward from each of the 2^N possible histories.

For one tap (comparator 1 = "A", threshold for a previous one; comparator 0 =
"B", threshold for a previous zero) and L = 2, this gives:

    f_1(n) = A_n A_{n-1} + B_n ~A_{n-1}     used when a_{n-2} = 1
    f_0(n) = A_n B_{n-1} + B_n ~B_{n-1}     used when a_{n-2} = 0

Each is one AND-OR pair. All f_i are computed once per symbol and shared by
every loop. This logic is not in any feedback path, so it can be pipelined
freely (`PRE_PIPE`).

## Structure

```
 sample ──► comparator_bank ──A(n)──► lookahead_precompute ──f(n)──┬──► parallel_loops ──► bit_par, par_phase
 thr[j] ──►  (2^N compares,           (L-1 words of A history,      │
              1 register)              2^N iterated selections)     └──► pipelined_loop ──► bit_pipe
```

`nlc_receiver` is the top. It drives both loop organisations from one front
end, so their outputs can be compared. A chip would keep one of them. Both
outputs carry exactly the decisions of the direct canceller.

### `parallel_loops`: L loops at 1/L of the rate

Symbols are dealt out round-robin: loop k handles every symbol with
n ≡ k (mod L). Each loop has:

- a hold register for its f word;
- a 2^N:1 multiplexer;
- a short history of its own decisions.

The divided, staggered clocks (Clock/2 and its inverse for L = 2) are
implemented as clock enables from a phase counter on the single symbol clock.
Loop k updates only in cycles where the phase equals k, and in that cycle it:

- stores the new word f(n) in its hold register;
- decides a_{n-L} from the word it stored L cycles earlier, selecting with
  a_{n-2L} … a_{n-2L-N+1}.

a_{n-2L} is the loop's own previous decision, which has been stable for L
cycles. That is the critical loop, and it now has L cycles. With N > 1 the
older select bits come from the other loops, which keep
`DEPTH = 2 + (N-2)/L` decisions each (two for N = 2, L = 2). The output
register passes on the decision of whichever loop was enabled, so the output
is again one bit per clock.

As a synchronous RTL description, the design does not say that the feedback
paths inside a loop are multicycle paths. A timing flow must be told so
(L-cycle paths from `fq[k]`/`aq[k]` to `aq[k]`, enabled once every L cycles).
Otherwise it will time them as single-cycle paths.

### `pipelined_loop`: one loop at the full rate

The loop holds the last L+N-1 decisions in a shift register. With
`PIPE_MUX = 0`, a single multiplexer selects f_i(n) using
a_{n-L} … a_{n-L-N+1}. With `PIPE_MUX = 1` (the default) the multiplexer
is split into two stages:

1. The first stage resolves the older select bits a_{n-L-1} …, which are
   already available a cycle earlier. Its two candidate values go into a
   register.
2. The second stage is a 2:1 multiplexer on a_{n-L}.

For two taps this is a first rank of multiplexers steered by a_{n-3}, a
register, and a final multiplexer steered by a_{n-2}. With one tap the first
stage is only the register. The split is correct for any L, but it only
shortens the loop when L ≥ 2, since then a_{n-L} comes from a register that
is not the one just written.

## Timing

Sample n is applied before a rising edge; count that edge as edge 1.

| output     | decision a_n valid after edge | default (N=1, L=2) |
|------------|-------------------------------|--------------------|
| `bit_pipe` | 2 + PRE_PIPE + PIPE_MUX       | 3                  |
| `bit_par`  | 2 + PRE_PIPE + L              | 4                  |

One decision leaves each output every clock. There is no valid/stall
handshake: the receiver accepts one sample per clock for ever. The
synchronous, active-high reset clears every register. The decisions before
the first sample therefore read as zeros, and the first outputs after reset
are those zeros.

## Parameters (top)

| parameter   | default | meaning |
|-------------|---------|---------|
| `N_TAPS`    | 1 | decisions fed back (N); 2^N comparators and thresholds |
| `LOOKAHEAD` | 2 | iterations L of the selection rule; loop slack in symbol periods; number of parallel loops |
| `SAMPLE_W`  | 8 | width of the signed received sample and thresholds |
| `PRE_PIPE`  | 0 | pipeline registers after the lookahead precomputation |
| `PIPE_MUX`  | 1 | pipeline register inside the full-rate loop's multiplexer |

The one-tap, L = 2 configuration is the default. The two-tap circuits
correspond to `N_TAPS = 2, LOOKAHEAD = 2`:

- `PRE_PIPE = 1, PIPE_MUX = 0`: full-rate loop with registered f words;
- `PRE_PIPE = 1, PIPE_MUX = 1`: the same with a pipelined multiplexer;
- `parallel_loops`: two cross-coupled half-rate loops.

`LOOKAHEAD = 1, PIPE_MUX = 0` gives the plain multi-comparator receiver
without lookahead. Any N ≥ 1 and L ≥ 1 elaborate. The tests cover N up to 3
and L up to 4.

## Where this RTL departs from, or adds to, the underlying circuit

- **Digital sample.** The received signal and the comparators are analog in
  the original circuit. Here the signal is a signed `SAMPLE_W`-bit sample,
  and comparator j computes `sample > thr[j]`; a tie gives 0. The thresholds
  are static input ports. How they are chosen or adapted to the channel is
  outside this design.
- **Clock enables.** The divided clocks of the parallel loops are replaced by
  phase enables on one clock (see above).
- **Index convention.** Threshold and f indices use the binary value of the
  old decisions, newest as MSB, counting from 0. Threshold 0 is the one for
  "all previous bits zero". Some descriptions of this scheme number the
  comparators from the all-ones history instead. Only the naming of the
  `thr` entries depends on this choice.
- **One-tap pipeline register.** With one tap and `PIPE_MUX = 1`, the
  pipeline register inside the loop sits on the two f values ahead of the
  2:1 multiplexer. That placement is this design's choice.
- **Not built.** The extension to M-ary symbols is not built; symbols are
  binary. There is no threshold adaptation and no error-propagation handling.
  Like the original scheme, the design assumes its own past decisions are
  correct.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

| testbench | what it checks |
|-----------|----------------|
| `tb_comparator_bank` | 4 comparators against integer compares, including ties and reset |
| `tb_lookahead_precompute` | every f_i against an independent forward model. Also checks that the f selected by the true old decisions equals the direct decision, and the closed forms above. Run with N/L/PRE_PIPE = 1/2/0, 1/1/0, 2/2/1 and 3/3/2, at exact latency |
| `tb_pipelined_loop` | random f words against a_n = f_i(n), with N/L/PIPE_MUX = 1/2/1, 1/1/0, 2/2/0, 2/2/1, 3/3/1 and 2/1/1, at exact latency |
| `tb_parallel_loops` | the same for the parallel loops (1/2, 1/1, 2/2, 1/4, 3/3). Also checks which loop produced each bit and that every loop delivers |
| `tb_nlc_receiver` | whole receiver in five configurations, see below |
| `tb_nlc_receiver_full` | whole receiver at default parameters, 20 000 symbols |

The receiver tests use the channel model in `tb/nlc_channel_pkg.sv`:

- main symbol ±35;
- post-cursor ISI of ±40, ±15 and ±8 from up to three earlier bits;
- a pattern-dependent term of +20 when the current and the previous bit are
  both one;
- noise of ±6.

A fixed threshold at zero gets more than 40 % of the bits wrong on this channel. The
thresholds are the midpoints of the two levels each history can produce.

The tests compare both outputs, at their exact latencies, with a direct
canceller written in the testbench. They also require that canceller to
recover every transmitted bit. Each of the following must happen at least
once, or the run fails:

- every threshold is used;
- a bit needs cancellation;
- the comparators disagree;
- every parallel loop delivers a decision.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/nlc_pkg.sv tb/tb_nlc_receiver.sv --top-module tb_nlc_receiver -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. Each of them finishes in
seconds.

## Files

- `rtl/nlc_pkg.sv`: default N, L and sample width; level count.
- `rtl/comparator_bank.sv`, `rtl/lookahead_precompute.sv`,
  `rtl/pipelined_loop.sv`, `rtl/parallel_loops.sv`: the blocks.
- `rtl/nlc_receiver.sv`: top.
- `tb/tb_*.sv`: testbenches.
- `tb/*_harness.sv`: one configuration each, instantiated several times by
  the testbenches.
- `tb/nlc_channel_pkg.sv`: channel and threshold model.
