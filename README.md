# Continuous-time filters in stochastic logic

This design builds analog-style continuous-time filters out of a few
flip-flops and gates. A signal is carried as a random pulse stream: its
value, between 0 and 1, is the probability that the stream is high in a
given clock. A first-order low-pass filter then needs only three parts in a
loop: a one-gate "adder" that forms the error between the input stream and
the filter's own output stream, an up/down counter that integrates that
error, and a comparator against a pseudo-random number that turns the
counter back into a pulse stream. The counter has no multiplier and no
coefficient. The clock rate and the counter width alone set the time
constant:

    tau = 2^N / Fclk        fc = Fclk / (2 pi 2^N)        G(s) = 1 / (1 + s tau)

The reference system runs at 36 MHz. It has an 8-bit analog-to-stochastic
converter, then four cascaded 14-bit low-pass stages, which make a
4th-order low-pass filter with each stage cut off at 349.7 Hz. A
first-order high-pass filter sits beside the cascade. The analog parts
(an RC integrator and a comparator for the input converter, and RC filters
to turn output streams back into voltages) sit outside the chip. This RTL
is the digital part.

## Stochastic streams

* **Unipolar stream.** One bit per clock. Its value is P(bit = 1), between 0
  and 1. All low-pass inputs and outputs use this form.
* **Signed stream** (`sc_pkg::sc_signed_t`). A pulse bit plus a sign bit
  (`pos`, 1 = positive). The sign only means something while the pulse bit
  is high. The value is P(positive pulse) - P(negative pulse). The ADDER and
  the high-pass output use this form.
* **Digital-to-stochastic converter (DSC)** (`sc_dsc`). Compares a register
  with the word of its own maximal-length LFSR (`sc_lfsr`) every clock. The
  LFSR visits every value 1..2^N-1 once per period, and the output is high
  when the random word is `<=` the register. So the density is exactly
  value/(2^N-1) over one period. The testbench checks this count exactly.

A value read from a stream is only an estimate, and its accuracy improves
only with the square root of the averaging time. Every number quoted below
therefore comes from long averages.

## The first-order loop (`sc_lp_stage`)

```
 x ──►(+)──► ADDER ──► up/down counter ──► DSC ──┬──► y
      (−)▲                (N bits)               │
         └───────────────────────────────────────┘
```

**ADDER** (`sc_signed_adder`). A combinational wired-OR for signed pulses:

    sum  = a ^ b | a & ~(sa ^ sb)
    sign = a sa (~b | sb) | b sb (~a | sa)

One pulse passes with its own sign. Two pulses of opposite sign cancel. Two
pulses of the same sign merge into one, so an OR-based sum saturates at high
densities. That does not matter here, because the loop feeds the ADDER +x
and -y. A same-sign pair never occurs, so the error stream x - y is exact.

**Counter** (`sc_updown_counter`). Adds a signed step every clock and clamps
at 0 and 2^N-1. Its value, count/2^N, is the stage's digital output. The
counter goes up by one for each positive error pulse and down for each
negative one. Its mean drift is Fclk·(x - count/2^N), which gives the
first-order lag above. One input pulse reaches the counter at the next
clock edge.

**Gain factor K.** A factor K in the feedback path gives gain 1/K:

    G(s) = (1/K) / (1 + s tau/K)

Here each negative error pulse steps the counter down by K instead of 1. A
cancelled x/y coincidence still counts as -(K-1). The counter therefore
integrates x - K·y, which gives exactly the transfer function above. Note
that the time constant *shrinks* by K. Because streams are limited to
0..1, x/K never overflows. K = 1 (unity gain) is the default and is what
the 4th-order filter uses.

Each stage has its own LFSR with its own seed. The input streams are
unipolar, so one stage's output can drive the next stage directly: the
stages do not load each other, just like buffered analog RC sections.

## High-pass filter (`sc_hp_filter`)

The high-pass output is the input minus a low-pass stage's output. Both
streams can be dense, so the OR-based ADDER would saturate. Instead, a
multiplexer chooses every clock between the input pulse (as a positive
pulse) and the low-pass pulse (as a negative pulse). Its select is the top
bit of a separate 16-bit LFSR, which is high with probability 0.5. The
output, a signed stream, therefore carries half the difference:

    out = (x - y_lp) / 2,   G(s) = s tau / (1 + s tau)                 (K = 1)
                            G(s) = ((K-1) + s tau) / (K + s tau)       (gain K)

## Analog-to-stochastic converter (`sc_asc_digital`)

The converter is the same loop as a low-pass stage, with the error formed
in analog:

```
 vin ──►(+) comparator ──► [sync] ──► up/down counter ──► DSC ──┬──► stream
        (−)▲  (off chip)                (8 bits)                │
           └──────────── RC integrator (off chip) ◄─────────────┘
```

The RC integrator smooths the converter's own output stream. The comparator
compares that voltage with `vin`, and its PWM output arrives on `cmp_i`.
A two-flop synchroniser follows, then a counter that steps +1 while the
comparator is high and -1 while it is low. The stream's density follows
`vin`, with voltages taken relative to the RC's full scale. There are
three clocks from a `cmp_i` edge to the counter.

The RC must be slower than the clock, so that it averages the pulses, and
faster than the input signal. The RC value is a board-level choice. The
testbenches use a behavioural RC with a time constant of 64 clocks
(`tb/rc_comparator_model.sv`). With it, the converter settles within about
3 % of full scale, with the largest error at low input levels. That error
comes from the comparator responding to the median of the rippling RC
voltage rather than its mean. The counter and the stream it produces also
differ slightly in amplitude (0.308 against 0.295 for a 0.3 sine), because
the counter's ripple is correlated with its LFSR. The filters see the
stream.

## Top level (`sc_filter_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ASC`   | 8       | converter counter / DSC width |
| `N_LP`    | 14      | low-pass stage width (fc = Fclk / (2 pi 2^N_LP)) |
| `STAGES`  | 4       | number of cascaded low-pass stages (filter order) |
| `K_LP`    | 1       | gain factor of every low-pass stage |
| `N_HP`    | 14      | high-pass filter width |
| `K_HP`    | 1       | high-pass gain factor |

The converter output `asc_stream_o` drives stage 1 and the high-pass filter.
`lp_stream_o[i]` / `lp_count_o[i]` are the stream and counter of stage i+1,
so index `STAGES-1` is the 4th-order output. `hp_o` is the signed
high-pass stream. The per-stage `lp_up_o`, `lp_dn_o`, `lp_cancel_o` and
`lp_sat_o`, and `asc_sat_o`, are monitoring outputs for the counter steps,
ADDER cancellations and clamping. All logic is on one clock. Reset is
asynchronous and active low: it clears the filter counters, sets the
converter counter to mid-scale and loads the LFSR seeds.

At the defaults the design has 174 flip-flops. It uses no memory and no
multiplier.

## How well it matches the model

The full-size testbench uses the default parameters and a 36 MHz clock,
which is about 2.7 million clocks. Its results:

| input | quantity | measured | first-order model |
|-------|----------|----------|-------------------|
| DC 0.5 | every counter | 0.506 | 0.5 |
| 350 Hz | gain / phase per stage | 0.706–0.708 / -45.0° | 0.707 / -45.0° |
| 350 Hz | 4th-order gain | 0.250 | 0.250 |
| 350 Hz | high-pass gain (incl. ½) / phase | 0.352 / +44.8° | 0.354 / +45.0° |
| 50 Hz  | gain / phase per stage | 0.990 / -8.1° | 0.990 / -8.1° |
| 50 Hz  | 4th-order gain | 0.961 | 0.960 |
| 50 Hz  | high-pass gain (incl. ½) | 0.070 | 0.071 |

The reduced-size end-to-end test (8-bit filters) shows the same per-stage
behaviour at its own cutoff.

## Where this design makes its own choices

* **Gain factor.** The realisation of K as a down-step of K (with -(K-1) on
  a cancellation) is this design's reading. With it the time constant
  becomes tau/K, as the transfer function requires.
* **DSC scale.** The DSC density is value/(2^N-1), not value/2^N, because
  an LFSR never produces zero.
* **LFSRs.** Fibonacci form with the usual maximal-length tap table: 8 bits
  x^8+x^6+x^5+x^4, 14 bits x^14+x^5+x^3+x^1, 16 bits for the multiplexer
  select. The seeds are arbitrary distinct constants.
* **Sign convention and encoding.** The sign bit means positive when 1. The
  high-pass output stays a signed stream; it is not folded into an offset
  code.
* **Counters.** They saturate rather than wrap. The converter counter
  resets to mid-scale, the filter counters to zero. There is a synchroniser
  on the comparator input.
* **High-pass filter.** It is fed from the converter output and has a
  14-bit counter.
* **Not in the RTL.** The analog parts: RC integrator, comparator, input
  signal conditioning and output RC filters. The testbenches model the
  first two behaviourally.

Known behaviour worth knowing:

* Streams made by LFSRs are not truly random. After a reset, every DSC
  starts from the same point of its sequence, so short transients repeat
  exactly from run to run. Averaging over several resets does not remove
  that bias. The testbenches average over random start times instead.
* With K = 2, the measured step response at tau/2 runs about 10 % above the
  ideal curve. The steady state is correct.
* With unity gain, a low-pass counter never reaches its clamp, because at
  full scale its feedback pulses cancel every input pulse.

## Files

`rtl/`:

* `sc_pkg.sv`: signed-stream type and the LFSR tap table.
* `sc_lfsr.sv`, `sc_dsc.sv`, `sc_signed_adder.sv`, `sc_updown_counter.sv`:
  the primitives.
* `sc_lp_stage.sv`, `sc_hp_filter.sv`, `sc_asc_digital.sv`: the filters and
  the converter.
* `sc_filter_top.sv`: the system.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_sc_filter_full.sv` (defaults, 36 MHz, 350 Hz and 50 Hz) and
`rc_comparator_model.sv` (behavioural analog front end). Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Any testbench builds the same way:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sc_pkg.sv tb/tb_sc_filter_full.sv --top-module tb_sc_filter_full
./obj_dir/Vtb_sc_filter_full
```

The full-size run takes about a second. To move the cutoff, change `N_LP`
(each extra bit halves fc) or the clock. To scale a stage's gain, set `K_LP`.
To change the filter order, set `STAGES`. The end-to-end and full-size
testbenches compute their expected gains and phases from the first-order
formulas and the cutoff above. If you change a width there, change its
full-scale constant (`FS_LP`, `FS_ASC`) as well.
