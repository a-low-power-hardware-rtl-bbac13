# Izhikevich spiking neuron with a stochastic-computing squarer

The Izhikevich model reproduces most firing patterns of cortical neurons with
two state variables and one nonlinearity, a square:

    dv/dt = 0.04 v^2 + 5 v + 140 - u + I
    du/dt = a (b v - u)
    if v >= 30 mV:  v <- c,  u <- u + d

In fixed-point hardware almost everything here is an add or a shift. The
exceptions are the square and the two coefficient products. The square is the
one that costs the most area and power. This RTL drops the squaring
multiplier. Instead, `0.04 v^2` comes from a **stochastic-computing (SC)
squarer**: |v| becomes a random bit-stream whose density of 1s is
proportional to |v|. Two such streams are ANDed and the 1s are counted. The
price is time: one square takes 2^n clocks for an n-bit word, and the result
carries a small statistical error. The method follows the paper "A Low Power
Hardware Implementation of Izhikevich Neuron using Stochastic Computing". The
numbers, sequencing and interfaces below are this implementation's own
unless stated otherwise.

The default word is n = 18 bits: 10 integer bits and 8 fractional bits. At
this length the squarer's error barely affects the spike train. One Euler
step of the neuron then takes 2^18 + 2 = 262,146 clocks.

## Block structure

```
izh_neuron_sc                     top: v/u registers, step sequencer
 ├─ sc_multiplier  u_square       stochastic squarer, 2^n clocks per product
 │   ├─ lfsr   u_lfsr1            random source of SNG1
 │   ├─ lfsr   u_lfsr2            random source of SNG2 (read bit-reversed)
 │   ├─ sng    u_sng1, u_sng2     comparators: bit = (x > random)
 │   ├─ AND gate                  stream multiplication
 │   └─ sc_counter u_s2b          stochastic-to-binary converter
 └─ izh_datapath   u_dp           |v| operand, de-normalisation, Euler step, reset
izh_pkg                           default sizes, LFSR tap table, helper functions
```

## The stochastic squarer

**Coding.** An n-bit unsigned number x stands for the probability x / 2^n.
A stochastic number generator (`sng`) compares x with an n-bit pseudo-random
value r each clock and outputs `x > r`. An `lfsr` supplies r: a
maximal-length Fibonacci LFSR that visits every non-zero n-bit value once per
2^n - 1 clocks. Over a full period the stream therefore holds exactly x - 1
ones.

**Multiplication.** If two streams are independent, the AND of their bits
is 1 with probability p1·p2. `sc_counter` counts the ANDed 1s over exactly
2^n clocks, so

    product ≈ x1 · x2 / 2^n.

**Normalisation and de-normalisation.** The operand is |v| in the n-bit word,
read as the fraction |v| / 2^10. The squarer returns
count ≈ 2^n · v^2 / 2^20. The datapath turns this back into millivolts and
applies the 0.04 factor with a single constant multiplication:

    0.04 v^2 = count · 0.04 · 2^(20 - n)        (0.16 per count at n = 18)

Only |v| is squared, so the sign of v never reaches the stochastic part.

**Correlation: the hard part.** The AND gate only multiplies if the two
streams are uncorrelated. With one shared LFSR the product of x with itself
would be just x. This design uses two LFSRs, as the SC method calls for.
How they are decorrelated is this design's choice:

* both use the same maximal-length polynomial (x^18 + x^11 + 1 at n = 18);
* the second starts `LFSR2_AHEAD` = 1000 steps ahead of the first (its seed
  is computed at elaboration by `izh_pkg::lfsr_advance`);
* SNG2 reads the second LFSR's state with its bit order reversed. This is
  wiring only and costs nothing.

The table gives the relative error of the squared count, measured over whole
2^n windows for |v| from 20 to 80 mV:

| n  | error range over \|v\| = 20..80 mV |
|----|-----------------------------------|
| 15 | up to +148 % (at 20 mV), -38 %    |
| 16 | up to +12 %                       |
| 17 | within 2 %                        |
| 18 | within 1 %                        |
| 19 | within 0.5 %                      |
| 20 | within 0.2 %                      |

The obvious alternative, two LFSRs with reciprocal polynomials, reads up to
8 % low at n = 18 in the 20..40 mV range. With it, the fast-spiking neuron
fires about 20 % less often than the exact model. Word lengths below 17 bits
remain poor with either pairing. Their systematic error changes the neuron's
response: at n = 15 and 16 the fast-spiking neuron does not fire at all (see
the word-length test below).

**Handshake and timing.** `start` while idle latches `x1` and `x2` and clears
the counter. For exactly 2^n clocks the LFSRs step and the counter counts.
`done` then pulses for one cycle, and `product` holds until the next start.
A start while busy is ignored. The LFSRs are never reseeded: each product
continues the sequences where the last one stopped. Because a window spans
2^n states (one more than the period), the two LFSRs keep a fixed phase
relationship from product to product.

## One neuron step

`izh_neuron_sc` is a two-state sequencer around the squarer:

```
clock   0          1 .. 2^n           2^n + 1
        IDLE:      SQUARE:            SQUARE, done seen:
        start SC   counting           v <- v_next, u <- u_next,
        on |v|                        step_done (and spike) next cycle
```

A step therefore takes **2^n + 2 clocks**, and steps follow back to back
while `en` is high. `izh_datapath` is purely combinational. It computes
`v_mag` (the squarer operand) from the stored v and, once the count is in,
the next state:

* if the stored v >= 30 mV: `v <- c`, `u <- u + d`, and `spike` pulses;
* otherwise one forward-Euler step with dt = 2^-DT_SHIFT ms (1/16 ms by
  default):
  `v += dt (0.04 v^2 + 5v + 140 - u + I)`, `u += dt · a (b v - u)`.

So a spike appears as one step with v above 30 mV, followed by v = c. The
threshold test uses the value at the start of the step, so the reset step
spends its squarer window on a value it does not use; the timing stays
uniform. 5v is a shift and an add. `a (b v - u)` uses two ordinary binary
multipliers, because a and b are run-time inputs. Results saturate to the
state range.

## Number formats

| signal            | format                          | default width |
|-------------------|---------------------------------|---------------|
| squarer word      | unsigned, 10 integer + (n-10) fraction bits | 18 |
| v, u, I, c, d     | signed, 10 integer (incl. sign) + 16 fraction bits, mV | 26 |
| a, b              | signed, 2 integer + 16 fraction bits | 18 |
| squarer count     | unsigned, n+1 bits              | 19            |

The state keeps 16 fractional bits, not 8. With 8, the per-step change of u
(about 0.0006 at a = 0.02, dt = 1/16 ms) would round to zero. Only the
squarer operand is cut to the n-bit word, by truncating |v|.

## Top-level interface (`izh_neuron_sc`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| clk, rst_n  | in  | 1     | clock; asynchronous active-low reset (v = V0_MV, u = U0_MV) |
| en          | in  | 1     | run steps back to back while high (tested between steps) |
| load        | in  | 1     | while idle: v <- v_init, u <- u_init (takes priority over en) |
| v_init, u_init | in | 26  | start state |
| i_in        | in  | 26    | input current I |
| a, b        | in  | 18    | recovery time scale and sensitivity |
| c, d        | in  | 26    | after-spike reset of v and increment of u |
| v, u        | out | 26    | present state |
| spike       | out | 1     | one-cycle pulse after a step that applied the reset |
| step_done   | out | 1     | one-cycle pulse whenever v and u take a new value |

Parameters (all with defaults): `SC_N` = 18 (squarer word length n),
`INT_BITS` = 10, `STATE_FRAC` = 16, `COEF_FRAC` = 16, `DT_SHIFT` = 4,
`V0_MV` = -65, `U0_MV` = -13. `SC_N` works from 10 to 24 (LFSR tap table)
as long as `SC_N - INT_BITS <= STATE_FRAC`. `sc_multiplier` also has
`SEED1` and `LFSR2_AHEAD`.

Typical parameter sets (standard Izhikevich values):

| regime        | a    | b   | c   | d | I  |
|---------------|------|-----|-----|---|----|
| fast spiking  | 0.1  | 0.2 | -65 | 2 | 10 |
| tonic spiking | 0.02 | 0.2 | -65 | 6 | 14 |
| mixed mode    | 0.02 | 0.2 | -55 | 4 | 10 |

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/izh_pkg.sv tb/tb_izh_fast_spiking.sv \
          --top-module tb_izh_fast_spiking -Mdir obj -o sim && ./obj/sim
```

| testbench | what it checks | run time |
|-----------|----------------|----------|
| tb_lfsr | state against a hand-written reference every clock; full 2^18-1 period, all non-zero states visited; 10-bit period; hold when disabled | < 1 s |
| tb_sng | exhaustive 8-bit comparison; stream density over an LFSR period | < 1 s |
| tb_sc_counter | random streams and windows; clear priority; wrap | < 1 s |
| tb_sc_multiplier | exact count against an independent model of the LFSRs, SNGs and AND gate (n = 10 and 18); closeness to x1·x2/2^n; latency of exactly 2^n; busy and ignored start | < 1 s |
| tb_izh_datapath | 5000 random cases against the equations in floating point (3 LSB); exact reset; operand; saturation | < 1 s |
| tb_izh_neuron_sc | whole neuron at n = 17, three regimes of 50 ms: per-step clock count, per-step v and u against the equations, exact resets, spike counts and first spike against an exact-square model; load, hold and spike all exercised | ~2.5 min |
| tb_izh_neuron_sc_full | the same at the default sizes, 37.5 ms per regime | ~3.5 min |
| tb_izh_fast_spiking, tb_izh_tonic_spiking, tb_izh_mixed_mode | one regime each at default sizes for 80 ms; MERRt and RSEE against the exact-square model, with per-regime bounds | ~2.5 min each |
| tb_izh_word_length | fast spiking at n = 15..20 for 90 steps, one neuron per n on its own clock; first spike within 10 steps of the model for n >= 17 | ~2 min |

The error measures compare the SC neuron with the same Euler model computed
with an exact square:

* MERRt: mean relative difference of inter-spike intervals;
* RSEE: relative difference of the sum of v^2 over the run.

Results at n = 18, dt = 1/16 ms, 80 ms from v = -70 mV:

| regime        | spikes (SC / exact) | MERRt  | RSEE   | published SC design (MERRt / RSEE) |
|---------------|---------------------|--------|--------|------------------------------------|
| fast spiking  | 11 / 11             | 4.65 % | 1.27 % | 4.82 % / 0.08 %                    |
| tonic spiking | 5 / 5               | 8.47 % | 0.69 % | 3.33 % / 7.04 %                    |
| mixed mode    | 5 / 5               | 21.0 % | 4.28 % | 26.73 % / 0.79 %                   |

These runs use different windows and start conditions from the published
ones, so only the overall picture compares. Fast spiking suffers least.
Mixed mode suffers most, because its intervals hinge on slow approaches
to threshold.

Word length, fast spiking, from v = -70 mV (the exact-square model first
fires at step 58):

| n                  | 15    | 16    | 17 | 18 | 19 | 20 |
|--------------------|-------|-------|----|----|----|----|
| first spike (step) | none  | none  | 60 | 59 | 58 | 58 |

At 15 and 16 bits the squarer's bias holds v below threshold. From 17 bits
up, the first spike lands within two steps of the exact model.

## Where this design makes its own choices

The source fixes the idea and the squarer structure: two LFSRs feeding two
SNGs, an AND gate, a counter, a 2^n-clock window, 10 integer bits, and
n = 18 as the chosen word length. The following are this design's own:

* LFSR polynomials and seeds, the 1000-step offset and the bit-reversed
  read of the second LFSR;
* the comparator SNG (`x > r`);
* the forward-Euler integration with dt = 1/16 ms, the 16-bit state
  fraction, the 2.16 coefficient format and the saturation;
* firing tested on the stored v at the start of a step;
* the start/busy/done handshake, the `en`/`load` control and the reset state
  (-65 mV, -13);
* exact binary arithmetic (shift-add and two multipliers) for everything
  except the square.

Not reproduced: the area and power of a standard-cell implementation. Those
depend on a process library and are outside what RTL simulation can
confirm. The paper reports 12,584 µm² and 0.0268 mW in 0.13 µm CMOS, against
42,059 µm² and 0.11 mW for a conventional multiplier-based neuron.

## Changing the design

* **Word length:** set `SC_N`. Each step of 1 in n halves or doubles the
  step time and changes the squarer error as in the table above. Check the
  error again if you change `SEED1` or `LFSR2_AHEAD`: the quality of the
  decorrelation depends on them.
* **Time step:** `DT_SHIFT` (dt = 2^-DT_SHIFT ms). Larger steps run faster but
  overshoot the spike peak more.
* **Faster stepping:** the sequencer could skip the squarer on reset steps, or
  use the first clock of the window. Neither is done, to keep the timing
  uniform.
