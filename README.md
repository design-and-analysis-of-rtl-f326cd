# CORDIC-based GMSK link

GMSK (Gaussian minimum shift keying) sends a bit stream as a constant-envelope
tone. The frequency is high for a 1 and low for a 0, and a Gaussian filter
rounds off the change between the two. The narrow spectrum and flat envelope
are why GSM uses it.

This RTL builds a complete GMSK link in one clock domain: modulator, noise
channel and demodulator. Its central idea is to make every sine and cosine
with a small pipelined CORDIC that uses quadrant mapping, instead of a
sine/cosine ROM or a VCO. The CORDIC needs no angle table. It covers the
full circle with only six iterations, because a quadrant-folding
pre-/post-processor is wrapped around it.

```
gmsk_in ─► NRZ encoder ─► integrator ─► Gaussian FIR ─► FM modulator ─► gmsk_mod_out
                                  │                       ▲      │
                                  └── integrator bit ─────┘      ▼
                                                           channel (2 x LFSR noise)
                                                                 │
gmsk_out ◄─ NRZ decoder ◄─ differentiator ◄─ FM demodulator ◄────┘ chan_out
```

All code is synthesizable SystemVerilog-2017. Shared types and constants are
in `rtl/gmsk_pkg.sv`. There is one module per file, and every module has a
self-checking testbench in `tb/`.

## The bit-coding chain and why it inverts exactly

Four blocks work on single bits. They advance once per bit, on a one-clock
strobe from `bit_timer` that comes every `SAMPLES_PER_BIT` clocks.

| block | rule (all sums modulo 2) | inverse of |
|---|---|---|
| `nrz_encoder` | e[k] = d[k] ^ e[k-1] (XOR gate with D flip-flop feedback) | `nrz_decoder` |
| `integrator` | y[k] = x[k] ^ y[k-4] (four registers; oldest added to the input) | `differentiator` |
| `differentiator` | z[k] = x[k] ^ x[k-4] (four registers; oldest subtracted) | `integrator` |
| `nrz_decoder` | d[k] = e[k] ^ e[k-1] | `nrz_encoder` |

The integrator is recursive and the differentiator is its feed-forward
inverse. Only one block on each side has feedback, so a wrong bit decision
in the demodulator corrupts at most five output bits and then clears. The
same holds for the undefined bits just after reset. Because every register
resets to 0, both sides start in matching states.

## FM modulation (`fm_modulator`)

The integrator bit drives two paths:

1. **Frequency.** The 8-tap Gaussian FIR (`gaussian_filter`) turns the bit
   into a 16-bit value between 0 and 32768. The coefficients are a sampled
   Gaussian with σ = 1.5 taps: 576, 2187, 5321, 8300, 8300, 5321, 2187, 576.
   They sum to exactly 2^15. The filter runs every clock. A 16-bit phase
   accumulator adds
   `fcw = FCW_LO + (FCW_HI − FCW_LO) · gauss / 2^15`
   per clock. The top 8 bits are the CORDIC `phase_in`. With a 100 MHz clock,
   the defaults FCW_HI = 1127 and FCW_LO = 318 give a 1.7197 MHz tone for a 1
   and a 485.2 kHz tone for a 0. These match the 1.72 MHz and 485.43 kHz this
   design is specified to produce. The phase never jumps, so the frequency
   change is continuous.
2. **I/Q selection.** The CORDIC gives cos1 and sine1 of `phase_in`. Two DFS
   stages (`dfs`) scale them to 12 bits (amplitude word `amp`; 16 is full
   scale) and give cos2 and sine2. The control unit (`fm_mod_control`) routes
   cos2 to I when the bit is 1 and sine2 to Q when the bit is 0. The unused
   channel is 0. The adder outputs `gmsk_mod = I + Q`. The bit is first
   delayed STAGES + 2 clocks, so the selection lines up with the CORDIC and
   DFS latency.

This cos/sin switch adds a 90° phase step at each bit change, on top of the
frequency change.

## The optimized CORDIC (`optimized_cordic`, `cordic_pipeline`)

The phase is 8 bits: 256 units per turn.

* **Preprocessing** (`cordic_preprocess`, combinational). `phase[7:6]` is the
  quadrant: 00 = [0°,90°), 01 = [90°,180°), 10 = [180°,270°), 11 = [270°,360°).
  `phase[5:0]` is the angle inside the quadrant. It is shifted left once to
  form Z₀, whose scale is **128 units = 90°**. This scaling is the key to the
  8-bit datapath. Any first-quadrant angle is below 128, and after the first
  rotation the residual stays inside ±64. So Z fits an 8-bit signed word, and
  its bit 7 is the rotation sign.
* **Pipelined CORDIC** (`cordic_pipeline`, six register stages). Stage i
  reads S = Z[7]. If S = 0 it computes `X − (Y>>>i)`, `Y + (X>>>i)`,
  `Z − aᵢ`; otherwise it flips every sign. The angles aᵢ = atan(2⁻ⁱ) in Z
  units are constants of each stage (64, 38, 20, 10, 5, 3), so there is no
  ROM. The inputs are X₀ = 76 and Y₀ = 0. This bakes in the CORDIC gain
  (K = 0.6073), so the outputs swing about ±125.
* **Delay unit** (`delay_line`). Carries the two quadrant bits for six
  clocks, alongside the pipeline.
* **Postprocessing** (`cordic_postprocess`, registered). Folds the result
  back into the right quadrant: (c,s) → (c,s), (−s,c), (−c,−s) or (s,−c).

The latency is **7 clocks**: six stages plus the output register. A new
phase can enter every clock. Accuracy: six iterations leave up to 1.8° of
residual angle. Together with truncation in the 8-bit words, the outputs are
within 7 LSB of the ideal 125·cos / 125·sin. The testbench checks this over
all 256 phases.

## Channel (`channel`, `galois_lfsr`)

Two Galois LFSRs run side by side. Both use G(x) = x⁵ + x² + 1 (POLY =
5'b00101), with different seeds. Each steps every clock by multiplying its
state by x modulo G, which gives a 31-state m-sequence. The two 5-bit states
are added, 32 is subtracted to centre the sum, and the result is scaled by
2^NOISE_SHIFT (±120 by default). This noise is added to the modulated sample
with 12-bit saturation.

## FM demodulation (`fm_demodulator`, `fm_demod_control`) — the subtle part

The demodulator builds its own reference, as in the modulator. A local phase
accumulator runs at the 1 tone (FCW_REF = 1127) and drives a second
optimized CORDIC. DFS-1 turns cos1 into cos2, which goes through a one-clock
delay register to the control unit.

The control unit decides the tone by **comparing half periods**:

* The channel signal and the reference each go through a zero-crossing
  detector with hysteresis. Polarity flips only above +HYST or below −HYST,
  with HYST = 256 by default. Noise smaller than HYST therefore makes no
  false crossings.
* A counter measures the clocks between flips. The reference half period R
  (about 29 clocks by default) is stored.
* The decision is **1** while both the last complete half period and the one
  in progress are shorter than 2R; otherwise it is **0**. A 0 tone has a half
  period of about 103 clocks, or 3.5R. Its decision therefore falls as soon as
  the count in progress passes 2R, without waiting for a full half period. A
  1 tone needs one complete short half period.

The threshold comes from the reference, so it follows FCW_REF and the clock
with no retuning. It works only if each bit lasts several half periods of
the slow tone. The default of 512 clocks per bit is about 2.5 periods of the
0 tone, and the demodulator settles in about 200 clocks.

The FM decision is sampled on the same bit strobe that ends each transmitted
bit. Modulator and demodulator share one clock and one `bit_timer`, so no
clock or bit recovery is built.

## Timing summary

| path | latency |
|---|---|
| optimized CORDIC, phase → sine/cosine | 7 clocks |
| integrator bit → `gmsk_mod_out` sample | about 10 clocks (Gaussian filter, accumulator, CORDIC, DFS, adder) |
| `gmsk_in` → `gmsk_out` | 3 bit periods: `gmsk_in` sampled on strobe k shows on `gmsk_out` after strobe k + 3 |
| throughput | one 12-bit sample per clock; one data bit per `SAMPLES_PER_BIT` clocks |

## Top level (`gmsk_system`)

Ports: `clk` and `rst_n` (asynchronous, active low). `en` is a global clock
enable. `start` arms the bit timer. Then `gmsk_in` and `amp`. Outputs:
`gmsk_out`, `gmsk_mod_out` (12-bit modulated samples), `chan_out` (noisy
samples), plus `bit_tick` and `demod_bit` for observation.

| parameter | default | meaning |
|---|---|---|
| SAMPLES_PER_BIT | 512 | clocks per data bit |
| FCW_LO / FCW_HI | 318 / 1127 | 0 / 1 tone, f = f_clk · fcw / 65536 |
| STAGES | 6 | CORDIC iterations (the angle table covers up to 8) |
| NOISE_SHIFT | 2 | channel noise scale |
| HYST | 256 | demodulator zero-crossing hysteresis |

## Where this RTL departs from the original description

* **End-to-end latency.** The original claims the output follows the input
  one clock later. Here it takes three bit periods. Registered bit-rate
  coders, and a demodulator that must watch the carrier for a while, cannot
  do better.
* **Not specified, so chosen here:**
  * where `phase_in` comes from (the Gaussian-driven phase accumulator);
  * the DFS internals (amplitude scaling and saturation);
  * the Gaussian coefficients and the filter's sample rate;
  * the demodulator's comparison rule and its reference frequency;
  * the noise scaling;
  * the bit period and the `start` behaviour;
  * the Z scaling, X₀, and the seven-clock split of the CORDIC latency.
* **Resource counts differ.** The original counts 15 delay flip-flops in the
  Gaussian filter; this filter has a 7-stage delay line plus a 16-bit output
  register. The whole link holds about 500 flip-flop bits, mostly in the two
  CORDIC pipelines of 6 × 24 bits each. The original reports 331 slice
  flip-flops on a Spartan-3E.
* **No FPGA results.** The original's area, clock-rate and power results on
  Spartan-3E and Artix-7 have not been reproduced.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog also ends it if it hangs. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/gmsk_pkg.sv tb/tb_gmsk_system.sv \
          --top-module tb_gmsk_system -y rtl +libext+.sv
./obj_dir/Vtb_gmsk_system
```

Any block works the same way: use `tb/tb_<module>.sv` and top module
`tb_<module>`.

* `tb_gmsk_system` runs the whole link at its default parameters with 80
  random bits (about 41,000 clocks). It checks every decoded bit, every FM
  decision and the bit period. It also counts the mechanisms it needs to
  see: both tone decisions, integrator-bit changes both ways, all four
  CORDIC quadrants, and noise of both signs. In the middle of every bit it
  counts sign changes of `gmsk_mod_out` to check the tone: 1.72 MHz for a 1
  and about 0.49 MHz for a 0, at 100 MHz.
* `tb_fm_modulator` measures the tone frequencies by counting sign changes
  and checks every sample against a floating-point sine or cosine.
* `tb_fm_demodulator` feeds floating-point tones with noise and checks the
  decisions and how fast they switch.
* `tb_optimized_cordic` sweeps all phases and checks the 7-clock latency.
* The other benches compare each block with a reference model written
  independently in the testbench.
