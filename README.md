# Self-repairing ring-oscillator TRNG

A true random number generator (TRNG) is only trustworthy while its noise
source keeps producing entropy and while the tests that watch it keep working.
Both can fail. A noise source can fail through ageing, temperature, supply
drift, oscillator locking or a deliberate attack. A test can fail through a
stuck-at fault or a bit flip in its own counters. This design wraps a classic
ring-oscillator TRNG in three kinds of protection:

- **Redundancy.** There are two noise sources, two post-processing filters, and
  two copies of every on-the-fly test.
- **Checking.** The two test copies are compared after every dataset. When they
  disagree, each copy is checked against a known LFSR sequence with known
  results.
- **Graded countermeasures.** A controller escalates step by step. It raises
  the filter order, enables more oscillators, swaps the noise source, swaps the
  filter, and finally falls back to an LFSR post-processor. It steps back down
  once things have been normal for a while. Only when everything has failed
  does it stop in an ERROR state that needs a human.

The RTL follows a published self-repairing TRNG architecture (a Sunar-style
TRNG, with a flip-flop after each oscillator). Where that description leaves
details open, this implementation makes its own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

All RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable except the ring
oscillator, which is a behavioural model of an analog cell.

## Data path

```
             +-> NS-A (256 RO) -+                    +-> PP-A (parity n) -+
 enable/     |                  +-> raw bit --+------+                    +-> sel --> rnd_bit --> FIPS A/B
 enhance ----+-> NS-B (256 RO) -+    (1/clk)  |      +-> PP-B (parity n) -+     ^                  |
                                               |                                 |                  v
                                               +-> entropy tests A/B       LFSR (mode 2)      20 Kbit buffer
                                               |                                                    |
                                         LFSR (closed loop) ---> off-line test input          out_word (released
                                                                                               only after a pass)
```

### Noise source (`noise_source`, `ring_oscillator`, `xor_tree_extractor`)

Each source has 256 ring oscillators. Each oscillator is four inverters closed
through a NAND gate, and the NAND's second input is the enable. Normally 128
oscillators run; `enhance` switches on all 256. Every oscillator output is
sampled by its own flip-flop at the system clock (300 MHz in the reference
design). The samples are then XOR-reduced to one raw bit per clock.

The reduction is a *ripple* tree. Groups of six inputs (one FPGA LUT each) are
XORed, and every level is registered. For 256 inputs that gives
256 → 43 → 8 → 2 → 1, so a raw bit leaves 5 clocks after its samples were
taken. Registering every level keeps the wide XOR from seeing glitches on the
supply or clock.

Only the selected source is enabled. The other one does not run, so it does
not age. After a source change, or after a transient shut-down of the
oscillators, the raw bits of the next `SETTLE` (8) clocks are ignored. This
lets the XOR pipeline flush.

The oscillator is a delay-based model. Each half period is `HALF_PERIOD` plus
a uniformly distributed jitter of up to `JITTER` picoseconds. The sources give
their oscillators slightly different periods, so they do not run in
lock-step.

### Post-processing (`parity_filter`, `galois_lfsr`)

A parity filter of order *n* XORs *n* consecutive raw bits into one output bit.
The blocks do not overlap, so the throughput drops by *n*. The order is
selectable at run time from 100, 110, 120 or 130. A new order takes effect at
the next block boundary, so no output bit mixes two orders. The window is a
129-bit shift register plus the incoming bit, masked to the first *n*
positions. The output bit is registered one clock after the *n*-th input bit.

Two identical filters, PP-A and PP-B, run side by side. The post-processing
FSM selects one of them.

`galois_lfsr` is a 64-bit Galois LFSR with polynomial x^64+x^63+x^61+x^60+1. It
serves two purposes:

- **Testing mode** (closed loop, restarted from a fixed seed). It produces a
  known bit sequence for the off-line self-test of the statistical tests.
- **Post-processing mode** (mode 2). The selected raw noise bit is XORed into
  the feedback. This is the last resort when both parity filters have failed.
  One output bit is taken every `DECIM` = 130 clocks.

### On-the-fly tests (`entropy_test`, `fips140_test`)

**Entropy tests** work on the raw bits, in datasets of 8192 bits. They estimate
min-entropy with three cheap estimators:

- **Frequency.** An up/down counter of ones minus zeros.
- **Collision.** A 3-state one-hot FSM walks non-overlapping segments of the
  stream. Two equal bits are a collision after 2 bits. Two different bits are a
  collision after 3 bits, because the third bit always repeats one of them. The
  two kinds are counted separately.
- **Partial collection.** Non-overlapping 2-bit blocks are checked, and blocks
  holding 01 or 10 are counted.

At the end of a dataset the counts are published as one packed record. Each
count is then compared with a *medium* and a *low* cut-off:

| Estimator | Medium cut-off | Low cut-off |
| --- | --- | --- |
| Frequency, \|ones − zeros\| | 588 (min-entropy about 0.9 bit/bit) | 1218 (about 0.8 bit/bit) |
| Collision, \|coll2 − coll3\| | 360 | 720 |
| Partial collection, \|pcoll − 2048\| | 256 | 512 |

**FIPS 140-2 tests** work on the final output bits, in datasets of 20000 bits:

- **Monobit:** 9725 < ones < 10275.
- **Poker:** in square-sum form, 1563175 < Σ f(i)² < 1576929.
- **Runs:** each of the six run-length bins, for zeros and for ones, must lie in
  the standard intervals.
- **Long run:** no run of 26 bits or more.

After the last bit, one multiplier squares the 16 poker counts, one per clock.
The verdict therefore comes 17 clocks after the last bit.

Both test blocks have a `clear` input that restarts a dataset. The controller
uses it when it switches a block between live data and the LFSR.

## Checker + controller (`checker_controller`)

This is the part that makes the generator self-repairing. It holds four
one-hot FSMs and a small arbiter for the single LFSR. Every FSM checks its own
state register for a legal one-hot code. An illegal code sends it to the most
restrictive state it can still leave on its own.

### Test FSMs and the off-line self-test (`test_checker_fsm`, two instances)

There is one instance for the entropy pair and one for the FIPS pair. At the
end of every dataset it compares the full counter records of copy A and copy
B.

- **IDLE, records equal.** The result (the alarms of copy A) is passed on to
  the noise-source or post-processing FSM.
- **IDLE, records differ.** One copy is faulty, and it is not known which. The
  FSM enters **TESTING**. This raises `stop`, so no output leaves the TRNG, and
  requests the LFSR. When the arbiter grants it, it does three things in the
  same clock: it clears both copies, restarts the LFSR from its seed in closed
  loop, and switches both copies' inputs to the LFSR. After one dataset of the
  known sequence, each copy's record is compared with a **golden record**. The
  golden record is a constant that follows from the polynomial and the seed:
  it is what a fault-free copy must report for those 8192 or 20000 bits. The
  FSM then moves on:
  - both copies match the golden record: the fault was transient, back to
    IDLE;
  - only A matches: **TEST_A**, copy B is disconnected (`test_fail`);
  - only B matches: **TEST_B**, copy A is disconnected;
  - neither matches: **ERROR**.
- **TEST_A or TEST_B.** With one copy left, nothing can be cross-checked. So
  after every dataset of live data, the result of the trusted copy is passed
  on, and the FSM goes back through TESTING to re-run the off-line test on that
  copy. If the trusted copy then fails as well, the FSM enters ERROR.

The golden records are kept in `trng_pkg` (`ENT_GOLDEN`, `FIPS_GOLDEN`). If
you change the LFSR seed, polynomial or a dataset length, you must recompute
them. The test benches compare both records with an independent model, so a
stale record shows up at once.

When both families request the LFSR at once, the arbiter serves the entropy
pair first. A second clear when the grant ends restarts the copies on live
data.

### Noise-source FSM (`noise_source_fsm`)

The noise-source FSM reacts to the entropy grade and to the external alarm:

| State | Entered on | Action |
| --- | --- | --- |
| RESET | medium or low entropy in IDLE | Shut the oscillators down for `OFF_CYCLES` (16) clocks, one `enhance_pp` request. |
| ADD | bad entropy again in RESET, or the external alarm in IDLE or RESET | All 256 oscillators, one `enhance_pp` request. From IDLE the external alarm gives two requests, which raises the order by two steps. |
| CHANGE | bad entropy again in ADD | Swap to the other noise source and request the maximum filter order. |
| ERROR | bad entropy again in CHANGE | Kept until reset. |

A low-entropy grade also holds `stop` until a dataset comes back without the
low alarm, so the TRNG does not produce output from a failing source. Medium
entropy never stops the TRNG.

After `RECOVER` (10) consecutive clean entropy datasets, the FSM steps back one
state: CHANGE → ADD → RESET or IDLE → IDLE. A dataset counts as clean only
without an external alarm. The source swap made in CHANGE stays in effect.

### Post-processing FSM (`pp_fsm`)

The post-processing FSM moves one state forward on every FIPS failure and on
every `enhance_pp` request:

IDLE (order 100) → 110 → 120 → 130 → CHANGE PP (PP-B, order 130) → LFSR → ERROR

A maximum-order request jumps straight to 130 unless the FSM is already
beyond it. After `RECOVER` (10) consecutive passing FIPS datasets, it steps
back one state. ERROR is kept until reset.

Because enhance requests also move this FSM forward, a long run of noise
problems can itself push the generator onto PP-B or the LFSR.

### Anti-ageing (`aging_counter`)

The two noise sources take turns: the selection toggles every 1000 FIPS
datasets (20 Mbit). The selected source is the XOR of this toggle and the
noise-source FSM's swap.

### Operating conditions (`opcond_monitor`)

The FPGA's sensor ADC is vendor IP and is not part of this RTL. Its 12-bit
codes enter on the `sensor_*` ports. The monitor compares each new set of
readings with the Artix-7 recommended operating ranges: 0..85 °C, VCCINT and
VCCBRAM 0.95..1.05 V, VCCAUX 1.71..1.89 V. The limits are stored as ADC codes,
using the 7-series transfer functions. `ext_alarm` is updated on every
`sensor_valid`.

### Output buffer (`output_buffer`)

The output bits of each FIPS dataset are packed LSB first into 32-bit words of
a 640 × 32 memory (20 Kbit). When the dataset's verdict is a pass, its 625
words are read out one per clock on `out_word`/`out_valid` and
`set_released` pulses. When it fails, the words are never shown and
`set_dropped` pulses. The unbuffered stream is also available on
`rnd_bit`/`rnd_valid`, for users who buffer externally and act on `stop` and
`error`.

## Top level (`trng_top`)

`trng_top` wires the blocks as in the data path above.

- **Inputs:** clock, synchronous reset and the sensor codes.
- **Outputs:** the random bits, the released words and every status signal:
  `stop`, `error`, `ext_alarm`, the source and filter selection, the four FSM
  states, the disconnected test copies and the alarms.

All state encodings are one-hot enums from `trng_pkg`.

Assertions check two rules:

- the two test copies of a family always finish a dataset in the same clock;
- the LFSR is never granted to both families at once.

| Parameter | Default | Meaning |
| --- | --- | --- |
| `N_RO`, `N_ACTIVE` | 256, 128 | oscillators per source, normally active |
| `PP_ORDERS` | 100, 110, 120, 130 | selectable parity orders |
| `LFSR_DECIM` | 130 | clocks per output bit with the LFSR as post-processor |
| `NS_RECOVER`, `PP_RECOVER` | 10, 10 | clean datasets before stepping back |
| `GENERATIONS` | 1000 | FIPS datasets between source swaps |
| `OFF_CYCLES`, `SETTLE` | 16, 8 | oscillator shut-down, raw bits ignored after a change |

Throughput at 300 MHz is one bit per order: 3.0 Mbit/s at order 100 and
2.31 Mbit/s at order 130. In the worst case, one entropy copy, one FIPS copy
and both filters have failed. The TRNG then runs the entropy off-line test
after every entropy dataset, which halves its duty, and uses the LFSR at one
bit per 130 clocks. That gives about 1.1 Mbit/s. The reference design reports
0.36 Mbit/s for this case, with an LFSR output rate it does not state. The
end-to-end test measures this scenario at reduced size (LFSR decimation 5):
0.088 bit per clock, against 1/5 × 1/2 × 0.9 ≈ 0.09 predicted.

## Departures and own choices

These points are not fixed by the architecture description. This
implementation chose them:

- **Entropy cut-offs.** The values in the table above.
- **LFSR.** The polynomial, the seed, and the decimation of 130 in
  post-processing mode.
- **Transient mismatch.** When both test copies pass the off-line test, the
  FSM returns to IDLE.
- **Shared LFSR.** One LFSR serves both test families through a request/grant
  arbiter, with the entropy pair first.
- **Noise-source FSM details:**
  - an external alarm while in RESET moves to ADD;
  - ADD remembers whether it came from RESET or from IDLE when it steps back;
  - an illegal state code recovers to ADD.
- **Illegal-state recovery in the other FSMs.** The post-processing FSM goes to
  order 130. The test FSMs go to TESTING.
- **Enhance requests are not capped.** They move the post-processing FSM like
  FIPS failures, all the way to PP-B and the LFSR.
- **Shut-down and settle times.** 16 clocks of oscillator shut-down; 8 clocks of
  raw bits ignored after a source change.
- **Idle source.** The unselected noise source is switched off.
- **FIPS monobit and runs intervals.** Taken from the FIPS 140-2 standard;
  run counters saturate at 8191.
- **Sensor limits.** Taken from the Artix-7 recommended ranges.
- **Output buffer.** Word width, read-out rate and packing order. A dataset
  that contains bits produced just before a stop is graded and released or
  dropped as a whole.
- **Ring oscillator model.** Period and jitter; the model is not meant for
  synthesis.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/trng_pkg.sv rtl/<block>.sv \
          tb/tb_<block>.sv --top-module tb_<block>
./obj_dir/Vtb_<block>
```

`--timing` is needed wherever the ring-oscillator model is included. The
simulator's default time unit is used throughout (1 ps). Verilator notes that
the model's random delays cannot be proven non-zero; that note is harmless.

- **`tb_trng_top`: the end-to-end test at reduced sizes.** It takes about
  2.2 million clocks and under 30 s. The settings are 16 oscillators per
  source, orders 2/3/4/5, recovery after 2 datasets and a swap every 2
  generations. It forces faults on internal nets and counts 21 mechanisms. Each
  must happen at least once:
  - release and drop of datasets;
  - source swaps;
  - the external alarm;
  - every noise-source and post-processing escalation and step-back;
  - the low-entropy stop;
  - off-line tests and disconnection for both test families;
  - an LFSR-post-processed dataset passing;
  - ERROR.

  It also checks throughout that released words are exactly the bits that were
  produced, and that nothing leaves while the TRNG is stopped.
- **`tb_trng_top_full`: the top at its default parameters.** The 2 × 256
  oscillator models simulate at a few hundred clocks per second, so this test
  covers start-up only:
  - two 8192-bit entropy datasets graded clean by both copies;
  - the 1-in-100 output rate;
  - the response to an external alarm.

  A complete 20000-bit FIPS dataset at full size (2 million clocks) has not
  been simulated. At full size the largest simulated run is these two entropy
  datasets, about 17000 clocks. Full FIPS datasets, with release and escalation,
  were simulated only at the reduced sizes above.
- **`tb_fault_campaign`: single bit flips at reduced sizes.** A small version
  of a bit-flip campaign, with the same settings as `tb_trng_top`. Once
  datasets are being released, it flips 40 random bits, one at a time, in live
  registers:
  - the four FSM state registers;
  - the entropy and FIPS counters of both test copies;
  - parity filter A;
  - the LFSR.

  Each flip is watched for 60000 clocks. No flip may lead to ERROR, and the
  TRNG must be running again afterwards. With the fixed seed, 30 of the 40
  flips are detected or repaired by the checker and 10 are masked. It takes
  about 2.5 million clocks and under 30 s. It is far smaller than a
  gate-level campaign.

## How far to trust it

- Every block's testbench compares its outputs with an independent reference.
  For the test blocks these are models of the counters. For the parity filter
  and the LFSR they are bit-exact models. For the checker they are the
  expected state sequence.
- Each testbench was also run against a deliberately broken copy of its block,
  and it fails there.
- The randomness of the oscillator model says nothing about real silicon. The
  cut-off values should be re-derived from a measured noise model before use.
