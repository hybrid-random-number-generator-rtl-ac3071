# Hybrid random number generator: Zener noise and TTL uncertainty seeding a three-LFSR generator

A linear feedback shift register (LFSR) is fast, but anyone who knows its taps can predict its output
after a few bits. A physical noise source is unpredictable, but it is slow, and its raw bits are
often biased. This generator combines the two:

* **A true-random front end (TRNG)** takes N = 8 bits from two entropy sources.
  * Amplified breakdown noise of a Zener diode, sampled at fixed times.
  * The randomness of a TTL input when it reads a level inside its uncertainty zone
    (0.4-2.4 V). This acts as a threshold that moves at random.
* **A pseudo-random back end (PRNG)** made of three 8-bit LFSRs. It takes those 8 bits, plus a
  static 16-bit user password, as its seed.
* **Periodic reseeding.** The PRNG runs at one bit per clock. Every Delta = 50 cycles it is
  reseeded with a fresh true-random word.

The RTL covers everything after the analog parts: the sampler, the random-threshold decision,
the serial-to-parallel buffer, the timing, and the PRNG. The noise and the threshold are analog
quantities. They enter the design as two signed 8-bit numbers, supplied by an ADC or, in
simulation, by the testbench.

The structure, gate-level wiring and default numbers follow a published Simulink model of this
generator. The cycle-level timing and the digital interface to the analog parts are this
design's own.

## One period, cycle by cycle

Everything runs on one clock. A clock cycle is the model's time unit: the sampling period
T_d and the LFSR clock period T_LFSR are both one cycle. The synchronizer defines a period of
T_s = Delta · T_LFSR = 50 cycles. Its clock pulse is high for the first tau_s = N · T_d = 8 cycles
of each period: this is the TRNG window. For the rest of the period only the PRNG works, and the
noise source drifts to a state unrelated to the last window. With the defaults (cycle c of a
period, counted from the first cycle after reset):

| cycle c | what happens |
|---|---|
| 0 … 7  | `clk_pulse` high. Each cycle the pulse generator strobes the sampler, which stores `noise_in` at the end of the cycle. |
| 1 … 8  | The clock pulse, delayed one cycle, gates the solver. `disc_out` holds the sample from cycle c-1, and `trn_bit = (disc_out + thr_noise) > 0`. |
| 1      | The single pulse generator fires once, on the front of the delayed clock pulse. |
| 1 + m  | The single pulse, delayed by m cycles, copies `trn_bit` into buffer flip-flop m (m = 0 … 7). |
| 9, 10  | `trn_word` holds all 8 bits. Bit 0 is the first bit sampled. |
| 3 … 10 | Both controlled PRNG registers are forced to step (see below). |
| 10     | `reseed` is high. At the closing edge, all three LFSRs load their seeds and the buffer is cleared. |
| 11 …   | The new sequence appears on `rn`. The buffer stays zero until the next window. |

The one- and two-cycle delays exist only because the sampler is a register. In the original
model every block reacts in the same time step. Here the solver and the single pulse generator
take the clock pulse one cycle late, and the PRNG takes it two cycles late. That puts the reseed
edge (cycle 10) after the buffer is complete (cycle 9) and no later than the cycle whose edge
clears it (cycle 10). With a sampling period of TD cycles the same relations hold:

* sample m is taken in cycle m·TD and scanned in cycle 1 + m·TD;
* the buffer is full from cycle (N-1)·TD + 2;
* the reseed is in cycle N·TD + 2;
* the clear is at the edge ending cycle 1 + (N+1)·TD.

So any TD ≥ 1 works.

## The true-random front end

**Pulse generator (`hrng_pg`).** While the clock pulse is high, it issues a one-cycle strobe
every TD cycles, starting in the first cycle of the pulse. It stops when the pulse falls.

**Sampler (`hrng_sampler`).** A zero-order hold: on each strobe it stores the signed noise
amplitude and keeps it until the next one.

**Solver (`hrng_solver`).** This models how a TTL input decides. It adds the held sample and a
random threshold amplitude, and outputs 1 only if the sum is positive, so negative pulses are cut
off. It passes the result only while the (delayed) clock pulse is high. A small positive sample
can therefore be read as 0, and a small negative one as 1; that is where the second entropy
source acts. The sum is one bit wider than the inputs, so it cannot overflow.

**Single pulse generator (`hrng_spg`).** Turns the front of the clock pulse into exactly one
one-cycle pulse, however long the clock pulse lasts. It uses two gates and two delay registers:
`a = in AND NOT a(t-1)`, `out = a AND NOT in(t-1)`.

**Serial-to-parallel converter and buffer (`hrng_spc_bm`).** A delay line carries the single
pulse. The copy delayed by m·TD cycles ANDs the serial bit into set-reset flip-flop m. The copy
delayed by (N+1)·TD cycles clears all the flip-flops. The result is an N-bit word.

## The pseudo-random back end

**Each LFSR (`hrng_lfsr`)** is an 8-bit Fibonacci register.

* Stage 1 takes the XOR of stages 2, 3, 4 and 8 (polynomial x^8 + x^4 + x^3 + x^2 + 1, which is
  primitive). A non-zero seed gives a period of 255.
* The output is stage 8.
* At the falling edge of its sync input, the register loads its 8-bit seed, with seed bit k going
  into stage k+1.
* An enable input freezes it.

**The combination (`hrng_prng`)** uses three of these registers.

| register | seed | steps when |
|---|---|---|
| `u_lfsr_pw2` (controller) | password bits 9-16 | every cycle |
| `u_lfsr_trn` | the true-random word | controller output is 0 |
| `u_lfsr_pw1` | password bits 1-8 | controller output is 1 |

The output `rn` is the XOR of the outputs of `u_lfsr_trn` and `u_lfsr_pw1`. This is an
alternating-step arrangement: which register advances depends on the controller, so an observer
of `rn` does not see one plain LFSR sequence.

The clock pulse, delayed by one register, is ORed into both controlled enables. Both registers
are therefore enabled in the cycle of the falling edge, so they do take their seeds. A side
effect is that both step together for the whole window, eight cycles per period.

All three registers reload at every falling edge, as the original model wires them, including
the two password registers. Between reseeds, only the 8-bit true-random seed changes.

## Interface of `hrng_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all registers to 0) |
| `noise_in` | in | AW, signed | amplified Zener noise, digitised |
| `thr_noise` | in | AW, signed | random threshold of the TTL uncertainty zone, digitised |
| `password` | in | 2N | static user password; bit i-1 is password input INi |
| `rn` | out | 1 | random bit stream, one bit per cycle |
| `clk_pulse` | out | 1 | synchronizer clock pulse (TRNG window) |
| `disc_out` | out | AW, signed | held noise sample |
| `trn_bit` | out | 1 | solver output, the serial true-random bits |
| `trn_word` | out | N | buffer contents, bit 0 = first bit of the window |
| `reseed` | out | 1 | high in the cycle whose closing edge loads the PRNG seeds |
| `step_trn`, `step_pw1` | out | 1 | enables of the two controlled PRNG registers |

| parameter | default | source |
|---|---|---|
| `N` | 8 | original model: bits per word, LFSR length |
| `TD` | 1 | original model: sampling period T_d, in cycles |
| `DELTA` | 50 | original model: PRNG bits per reseed period (T_s = 50 cycles) |
| `AW` | 8 | this design: amplitude resolution of the two analog inputs |

The LFSR taps exist only for N = 8. Another N needs a new `TAPS` value for `hrng_lfsr`. The top
checks that Delta ≤ 2^N − 1 and that N·TD < Delta. The shared constants are in
`rtl/hrng_pkg.sv`. The original model uses the password with inputs 1, 5, 8, 9 and 16 set,
i.e. `16'h8191`; the testbenches use that value.

## Where this RTL departs from, or adds to, the original model

* **Analog parts are not modelled.** The Zener diode, the operational amplifier and the TTL
  uncertainty zone have no logic function. Their outputs are the two signed input ports. The
  original model uses a Gaussian random source in place of the Zener noise, and another random
  source for the threshold.
* **Pipeline alignment.** The sampler is a register. The solver gate and the single pulse
  generator therefore use the clock pulse delayed one cycle, and the PRNG uses it delayed two.
  An LFSR load is visible in the cycle after the falling edge, not in the same time step.
* **Seed load.** The model's description speaks both of the shift register cells being "set to
  zero" and of them being "filled with new values" at the falling edge. The drawing loads the
  seed, and so does this RTL.
* **Strobe width.** The sampling strobe and the single pulse are one cycle wide. The model allows
  any width up to T_d.
* **Set and reset together.** If a buffer flip-flop sees set and clear at once, the clear wins.
  That does not happen in normal operation.
* **LFSR output and seed order.** The LFSR output is taken from the last stage. Seed bit 1 (the
  first sampled bit) goes to the first stage.
* **All-zero seed.** An all-zero seed leaves a register at zero until the next reseed; nothing
  guards against it. A zero true-random word occurs with probability 1/256 per period.
* **Baseline not built.** The single-LFSR generator that the three-LFSR scheme replaces is not
  built as a separate configuration. Its register is `hrng_lfsr`.

## How far to trust the statistics

The original model reports that all 15 tests of the NIST SP 800-22 suite pass, without giving
the sequence length. `tb_hrng_stats` feeds the complete generator pseudo-random noise, collects
100 000 bits of `rn` with password `16'h8191`, and runs four tests:

| test | p-value | result |
|---|---|---|
| frequency (monobit) | 0.17 | pass |
| frequency within a block (M = 128) | 0.08 | pass |
| frequency of the raw true-random bits | 0.016 | pass |
| runs | < 10⁻⁵ | fail: 47 915 runs where about 50 000 are expected |

The runs shortfall comes from the architecture. The two password registers restart from the same
state every 50 cycles. In the cycles where only `u_lfsr_pw1` steps, the bit-to-bit changes of
`rn` therefore repeat the same pattern every period. The size and direction of the effect depend
on the password: other passwords gave 46 009, 41 971 and 56 878 runs. Over about 1000 bits the
effect stays within the test's tolerance.

Each period carries only 8 bits of fresh entropy for 50 output bits. Treat `rn` as a stretched
8-bit-per-period true-random source, not as full-entropy output. The testbench prints the runs
statistic but does not count it as a failure.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself after a fixed time if it hangs.

| testbench | what it checks |
|---|---|
| `tb_hrng_sync` | pulse pattern and delayed copies, default and a 7/3-cycle instance |
| `tb_hrng_pg` | strobe positions for TD = 1 and TD = 3 under random gate lengths |
| `tb_hrng_sampler` | hold behaviour under random strobes |
| `tb_hrng_solver` | all 2 × 256 × 256 input combinations; that the threshold turns decisions both ways |
| `tb_hrng_spg` | exactly one pulse per high run |
| `tb_hrng_spc_bm` | buffer contents cycle by cycle for TD = 1 and 2; the words `10110010` and `01001100` |
| `tb_hrng_lfsr` | seed load, output recurrence o[t+8] = o[t+6]^o[t+5]^o[t+4]^o[t], period 255, enable, zero seed |
| `tb_hrng_prng` | `rn` and both enables every cycle against a reference model (`tb_hrng_ref_pkg`) |
| `tb_hrng_top` | 60 periods end to end, at the default parameters (details below) |
| `tb_hrng_top_td2` | the same at TD = 2 and DELTA = 30, to check the timing relations for a sampling period above one cycle |
| `tb_hrng_stats` | the statistical tests above |

`tb_hrng_top` computes from the noise and threshold it applies what every output must be in
every cycle. The first two windows are driven so that they produce the true-random words
`10110010` and `01001100`. It counts these mechanisms and fails if any of them never occurs:

* reseeds;
* solver decisions turned by the threshold, in each direction;
* buffer clears;
* steps of each controlled register alone, and of both together.

To run a testbench with plain Verilator (5.x):

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hrng_pkg.sv tb/tb_hrng_ref_pkg.sv tb/tb_hrng_top.sv --top-module tb_hrng_top
./obj_dir/Vtb_hrng_top
```

Replace `tb_hrng_top` with any other testbench name. Verilator finds the modules it uses in `rtl/`
through `-I`. Every testbench finishes in well under a second.

## Files

* `rtl/hrng_pkg.sv`: shared constants (N, T_d, Delta, password width, amplitude width, taps).
* `rtl/hrng_top.sv`: the complete generator.
* `rtl/hrng_sync.sv`: synchronizer.
* `rtl/hrng_pg.sv`: pulse generator.
* `rtl/hrng_sampler.sv`: sampler.
* `rtl/hrng_solver.sv`: solver.
* `rtl/hrng_spg.sv`: single pulse generator.
* `rtl/hrng_spc_bm.sv`: serial-to-parallel converter and buffer memory.
* `rtl/hrng_lfsr.sv`: one 8-bit LFSR.
* `rtl/hrng_prng.sv`: the three-LFSR combination.
* `tb/`: the testbenches above and the PRNG reference model they share.
