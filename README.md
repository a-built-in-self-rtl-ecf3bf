# Online built-in self-test for a PUF and a TRNG

A physical unclonable function (PUF) and a true random number generator (TRNG) both rely on
physical noise. Both can be weakened after manufacture by ageing, temperature, supply changes or
an attacker. This design puts a built-in self-test (BIST) next to them on the chip. The BIST
watches the TRNG all the time and checks the PUF from time to time. It reports pass/fail bits as
they come, keeps success rates in a result memory, and raises warning and error flags.

The main idea is sharing. PUF responses must be as unpredictable as TRNG bits. So one hardware
implementation of seven NIST SP800-22 randomness tests serves both:

- it normally tests the TRNG output;
- during a PUF evaluation it tests bit streams built from PUF responses.

The design is synthesizable SystemVerilog. The exceptions are three behavioural models of analog
parts: the ring-oscillator TRNG, the ring oscillator of the delay sensor, and the arbiter race
inside each PUF unit.

```
             +-------------------- bist_top ----------------------------------+
 RO TRNG --->| unit bits --> iid_test (Wald-Wolfowitz)                       |
 (16 units)  |           --> entropy_estimator (level 0..7, warning/error)   |
             | XOR bit ----+                                                 |
             |             v                                                 |
             |  bist_fsm --> randomness_tests (7 NIST tests, shared)         |
             |   |  ^  |          rt_res ---> success-rate sums, CRC         |
             |   |  |  +--> result_memory (2048 x 16, read port outside)     |
 4 x RO TRNG-+-> challenge_generator --> bist_fsm --> puf (GEN/AUTH/RAW)     |
             |   ring_oscillator --> ro_sensor --> bist_fsm (ST1)            |
             |   puf_calibration (inside bist_fsm) sets 16 tune levels        |
             +---------------------------------------------------------------+
```

## The randomness tests as counters

Software computes a P-value for each NIST test and compares it with alpha = 0.05. In hardware,
the sequence length, block count and alpha are all fixed. So each P-value comparison becomes a
fixed bound on an integer statistic, and no special functions are needed on chip. Each module's
header gives the formula for its bound.

| Test | Module | Size (default) | Decision in hardware | Result after last bit |
|---|---|---|---|---|
| Frequency | `nist_freq_runs` | n = 20000 | \|2k − n\| ≤ 277 (k = ones) | 1 cycle |
| Runs | `nist_freq_runs` | n = 20000 | NIST prerequisite \|2k−n\| < 4√n, then \|nV − 2k(n−k)\|·2²⁰ < C·k(n−k) | 2 cycles |
| Block frequency | `nist_block_freq` | N = 100, M = 200 | Σ(2·ones−M)² ≤ χ²₀.₉₅(100)·M | 2 cycles |
| Longest run | `nist_longest_run` | N = 16, M = 8 | χ² over 4 classes < 7.8147 | 2 cycles |
| Non-overlapping template | `nist_nonoverlap` | N = 8, M = 256, template 000000001 | Σ(W·2⁹ − μ)² < bound | 2 cycles |
| Overlapping template | `nist_overlap` | N = 1000, M = 1023, m = 9, K = 5 | χ² < 11.0705, six terms summed one per cycle | 7 cycles |
| Cumulative sums | `nist_cusum` | n = 20000 | forward and backward max excursion ≤ 316 | 2 cycles |

`randomness_tests` holds all seven tests. They all take the same bit stream, at one bit per
cycle while `bit_valid` is high. A `clear` pulse restarts every test. The result is a struct
with a `valid` and a `pass` bit per test, in this index order:

- 0 frequency
- 1 block frequency
- 2 runs
- 3 longest run
- 4 non-overlapping template
- 5 overlapping template
- 6 cumulative sums

## Checking the TRNG itself

The TRNG has 16 ring-oscillator units. Each unit's sampled bit is an *internal* sequence, and
their XOR is the output bit. Two blocks look at the internal bits rather than the output.

**`iid_test`** runs a Wald-Wolfowitz runs test. Its input sequence takes one bit from each unit
in turn: it captures a 16-bit snapshot and sends it out bit by bit. The 16 cycles this takes are
skipped in the TRNG stream, so the test keeps pace with the clock. The two-sided 5 % test
|Z| < 1.96 is evaluated without a square root:

(nR − A − n)² · (n − 1) · 625 < A · (A − n) · 2401, with A = 2·n₁·n₀.

One multiplier is used for six products in turn. The `error` output (`iid_error` at the
top) rises with a failing result and stays high until a sequence passes.

**`entropy_estimator`** gives each unit a min-entropy *level* from 0 to 7. It works on
non-overlapping 2-bit words, N = 10000 per unit:

- count each of the four words;
- take the largest count, C_max;
- level = the number of thresholds {2401, 2869, 3426, 4091, 4885, 5833, 6965, 8323} that are
  ≥ C_max, capped at 7.

These thresholds are the C_max values at which the min-entropy bound
−log₂((C_max + 2.3·√(C_max(1−C_max/N)))/N) crosses multiples of 1/4 bit. They therefore hold
only for N = 10000. If you change `N_WORDS`, recompute `THR` from that formula.

Unit *i* starts *i* cycles after unit 0, so their windows end on different cycles and one
evaluator pipeline serves them all. `warning` is high while one or two units are below
`MIN_LEVEL` (4). `error` is high while more than two are.

The controller adds up ROUNDS = 250 results per test and writes each sum to memory. The success
rate is sum/250. `trng_sr_low[t]` goes high when a test's last success rate was below 80 %.

## The PUF and what surrounds it

The PUF has Q = 16 delay-based arbiter units. Each unit has L = 64 switch stages and R = 16 tune
stages in each of its two paths. A challenge goes through four layers before it reaches the
units:

1. **Diffusion layer** (`diffusion_layer`). The 64-bit challenge is treated as a 4×4 matrix of
   4-bit numbers: nibble 4c+r is element (r, c). It is multiplied in GF(2⁴), with x⁴+x+1, by a
   constant matrix of 2-bit entries:

   ```
   2 3 1 1
   1 2 3 1
   1 1 2 3
   2 0 0 3
   ```

   The matrix is singular on purpose: its last row is the XOR of the first three, so its rank
   is 3. A singular matrix has no inverse that an attacker could put in front of the PUF to
   cancel the layer. Because the layer is linear, it needs only XOR gates.
2. **Interconnect** (`puf_interconnect`). Unit *j* gets the diffused challenge rotated by *j*
   bits, so every unit sees a different challenge.
3. **Input network** (`input_network`), one per unit. Each output bit is the XOR of two
   neighbouring input bits, and the middle output bit is a plain copy:

   - c[k] = d[2k] ⊕ d[2k+1]
   - c[L/2] = d[0]
   - c[L/2+m] = d[2m−1] ⊕ d[2m]

   This makes one flipped challenge bit reach many stages of the arbiter chain.
4. **Units and output network**. The units race, each arbiter gives one bit, and the response
   is the XOR of the 16 unit bits.

### Tuning

Each unit has a 5-bit tune level, from 0 to 2R−1 = 31, decoded by `tune_decoder`:

- level R (16) adds no tune delay;
- level R+k switches on k tune stages in the top path;
- level R−k switches on k tune stages in the bottom path.

The codes are thermometer codes, so the Hamming distance between the two tune words is
|level − R|.

At start-up, `puf_calibration` sweeps all 32 levels for all units together. At each level it
applies CAL_N = 1024 random challenges in RAW mode and counts each unit's ones. For each unit it
keeps the first level whose count is closest to CAL_N/2.

### Access modes

Each excitation takes two cycles. The `puf` module has three modes:

| Mode | Excitations | Latency | Use |
|---|---|---|---|
| RAW | 1 | 2 cycles | calibration; per-unit bits on `unit_resp` |
| AUTH | T1 = 7 at the optimum tuning | 14 cycles | majority vote (MSB of the 3-bit sum) |
| GEN | V = 5 each at tune+2, tune−2 and tune, then the T1 vote | 44 cycles | also sets `resp_valid` |

In GEN mode, `resp_valid` is 1 when the sum of the first 15 bits is within 1 of 0 or of 15.
That marks a challenge whose response does not move when the delays are pushed both ways
(*active parametric interrogation*). A user should keep only such challenges for later
authentication.

## Sequence of a PUF evaluation (`bist_fsm`)

After reset, the controller calibrates the PUF and writes the 16 tune levels to memory. Then it
idles:

- the TRNG stream feeds the randomness tests;
- user GEN/AUTH requests on the `user_*` port are served.

A pulse on `puf_eval_start` runs one evaluation:

| Step | What happens | Stored |
|---|---|---|
| ST1 | waits for the next count of the ring-oscillator sensor (edges per 1024 clocks) | 1 word |
| ST2 | for each of 16 random challenges: apply it T2 = 100 times in AUTH mode and add up the responses | 16 sums; `st2_stable` counts sums within 10 of 0 or 100 |
| UT1 | voted responses to random challenges go to the randomness tests | 7 pass counts |
| UT2, i = 1..64 | response(X) ⊕ response(X with bit i inverted) go to the tests | 7 counts per i |
| UT3, h = 1..64 | response(X) ⊕ response(X with h bits inverted) go to the tests | 7 counts per h |

Details of the UT steps:

- Each UT step runs until every test has UT_ROUNDS = 250 results.
- The tests are cleared whenever the source changes.
- The inverted bits in UT3 are a run of h bits, rotated by 6 bits of the previous challenge.
- TRNG accumulation pauses while the UT steps use the shared tests.
- `puf_sr_low` is set if any UT count is below 80 %.

The controller's own memory writes take priority. TRNG sums and entropy levels wait in pending
registers until a free cycle.

### Result memory map (16-bit words)

| Address | Content |
|---|---|
| 0x000 + 8·slot + t | TRNG success-rate sum of test t, 16 rotating slots |
| 0x080 + u | latest entropy level of TRNG unit u |
| 0x0A0 | ST1 sensor count |
| 0x0C0 + k | ST2 sum for challenge k |
| 0x0E0 + u | calibrated tune level of PUF unit u |
| 0x200 + 8·p + t | UT pass count of test t in phase p (p = 0: UT1, 1..64: UT2 i, 65..128: UT3 h) |

### Checksum

An attacker might force the exported pass/fail bits to a constant. To let the user detect this,
`result_checksum` folds every exported result bit into a CRC-16-CCITT (polynomial 0x1021,
initial value 0xFFFF). The bits are the randomness-test results during UT steps plus the iid
results, folded in index order within a cycle. The same bits are brought out on
`chk_valid`/`chk_bits`, so the user can compute the CRC outside and compare it with `checksum`.

## Where this RTL departs from the original scheme, and what was chosen

**Diffusion strength.** The original scheme does not print its diffusion matrix; the one above is
a choice. With it, one flipped challenge bit changes the challenges of about 5 of the 16 units on
average. The original scheme reports about 9 with its own matrix. The row choice is a one-line
change in `diffusion_layer.sv`.

**Latencies.**

- The overlapping-template test answers 7 cycles after its last bit, not 68: its six χ² terms
  are summed one per cycle.
- The iid test answers after about 7 cycles, not 3: one multiplier serves six products.

**Not built.** The metastability-based TRNG (programmable delay lines driving a flip-flop into
metastability, with a feedback controller) is not included. It is analog, and its controller is
not described. The ring-oscillator TRNG is the one monitored here.

**Behavioural models.** These parts are analog and are modelled, not synthesized:

- `ro_trng`: each unit bit is a random draw. The variables `one_prob_pm[]` and `corr_pm` let a
  testbench bias or correlate units.
- `ring_oscillator`: a delay-based toggle.
- `puf_unit_model`: an additive delay model with seeded stage weights, a fixed delay per tune
  element and per-evaluation noise.

`puf` instantiates `puf_unit_model`. A real chip replaces that instance with the arbiter chain.

**Values the original leaves open.** Each was chosen here:

- voting: T1 = 7;
- GEN settings: V = 5, tune offset ±2, margin 1;
- calibration: CAL_N = 1024 per level;
- ST2: 16 challenges, stable margin 10;
- success-rate threshold: 80 %;
- entropy threshold: MIN_LEVEL = 4;
- non-overlapping template: 000000001;
- checksum: CRC-16-CCITT;
- result memory: 2048 × 16;
- sensor window: 1024 clocks;
- user CRP port: served only while the controller is idle.

**Tune level.** One description of the tune decoder says the Hamming distance between the tune
words equals the level. But the level is log₂(2R) bits wide. Here the level is read as signed
around R, as described above.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/bist_pkg.sv tb/tb_math_pkg.sv tb/tb_puf.sv --top-module tb_puf
./obj_dir/Vtb_puf
```

| Testbench | What it runs |
|---|---|
| `tb_<block>` | one block against values the testbench computes itself: floating-point test statistics, a GF(2⁴) reference, the CRC check value 0x29B1 of "123456789", and so on |
| `tb_bist_fsm` | the controller with every peripheral modelled in the testbench (small sizes) |
| `tb_bist_top` | the whole BIST at L = 16, Q = 4, short test sequences, about 10 s |
| `tb_bist_full` | the whole BIST at the default sizes, about 1.05 M cycles, about 15 s |

`tb_bist_top` takes the design through:

- calibration;
- user GEN and AUTH requests;
- fair, biased and correlated TRNG phases, which trigger entropy warning and error, iid failures
  and low success rates;
- a complete ST1/ST2/UT1/UT2/UT3 evaluation;
- a memory read-back.

It counts each of these and fails if any never happened.

`tb_bist_full` covers only the start of a full-size evaluation:

- calibration: 32 × 1024 accesses;
- one result from every TRNG test, including the 1.023 M-bit overlapping-template test;
- ST1 and ST2;
- the start of UT1.

A complete full-size evaluation needs more than 10¹⁰ PUF responses and is not simulated.

`tb_math_pkg.sv` holds the floating-point reference functions the testbenches share
(erfc, normal CDF, cumulative-sums P-value).
