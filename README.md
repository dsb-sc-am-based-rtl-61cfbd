# Digital DSB-SC AM modem with Costas-loop carrier recovery

Double-sideband suppressed-carrier (DSB-SC) amplitude modulation multiplies
a message by a carrier, s(n) = m(n)·cos(ωc·n). No carrier component is sent,
so all transmitted power goes into the two sidebands. The catch is at the
receiver. To get the message back it has to multiply by a local carrier with
the same frequency and phase, and nothing in the received signal marks that
phase directly.

This RTL builds the whole link in the digital domain, one sample per clock:

* a **transmitter**: a message oscillator, a carrier oscillator and a
  modulator;
* a **coherent receiver**: mixer, decimator and low-pass FIR. Its local
  oscillator is synchronised to the transmitter's carrier by construction;
* a **Costas-loop receiver**: a second-order phase-locked loop that recovers
  the carrier from the DSB-SC signal itself and returns the message as its
  in-phase channel.

Every oscillator is a direct digital synthesizer (DDS). A DDS is a phase
accumulator followed by a sine look-up ROM. This follows a published
FPGA-oriented design for a software-defined radio. That design was built
from vendor generator blocks, and where it gives no sizes or coefficients,
this implementation picks its own; each such choice is marked below.

```
                 msg DDS ──m──┐
                              ├─► dsbsc_modulator ──s_I=m·cos──┬─► tx_i_o   (to RF transceiver)
 carrier DDS ──cos,sin────────┘                  ──s_Q=m·sin──┼─► tx_q_o
                                                               │
  rx_i_i, rx_q_i (from transceiver) ──► [loopback mux] ◄───────┘
                                           │
              ┌────────────────────────────┴─────────────────────────┐
              ▼                                                      ▼
   coherent_demod                                           costas_loop
   LO DDS ─► mixer ─► down_sample(÷2) ─► fir_lpf            complex_mult ─► I·Q ─► loop_filter
                                  └─► coh_demod_o ≈ m/2         ▲                      │ v(n)
                                                                └── NCO (dds) ◄─ Ω0 + v┘
                                                            I channel ─► costas_demod_o ≈ ±m
```

## Number formats

* Samples are signed 16-bit Q1.15 (±1.0 full scale).
* Products are rounded to nearest and saturated back to 16 bits. Only
  (−1)·(−1) and a complex product can overflow.
* Phase is an unsigned 32-bit fraction of a turn. A tuning word `inc` gives
  f = inc · f_clk / 2³².
* All registers use an asynchronous, active-low reset `rst_n` and clear to
  zero.
* Sizes live in `rtl/sdr_pkg.sv` (`SAMPLE_W = 16`, `PHASE_W = 32`,
  `LUT_AW = 10`) and are module parameters everywhere. The source gives no
  word lengths; these are this design's choice.

## The Costas loop (`costas_loop`)

This is the part that needs the most explanation.

**Complex input.** The received signal enters as a complex sample,
r = m·e^{jθ}, with in-phase part `in_i` = m·cos θ and quadrature part `in_q`
= m·sin θ. The transmitter produces both parts. The NCO gives cos θ̂ and
sin θ̂. The phase detector, `complex_mult`, forms r·(cos θ̂ − j·sin θ̂). It
does this with four multipliers, one subtractor and one adder, as the source
draws it. The result is:

* I = m·cos(θ − θ̂): the real part, the recovered message once locked;
* Q = m·sin(θ − θ̂): the imaginary part.

Because the input is analytic, this product has no term at twice the
carrier. So no low-pass filters are needed in the I and Q arms.

**Error.** The phase error is e = I·Q = (m²/2)·sin 2(θ − θ̂). For a DSB-SC
signal this is the key property: m changes sign, but m² does not, so the
error always pushes the same way.

* The loop locks at θ̂ = θ or θ̂ = θ + π. This is the usual Costas sign
  ambiguity: the recovered message may be inverted.
* `err_sel = ERR_IMAG` uses e = Q instead. That is a plain PLL error. It only
  works when the envelope keeps one sign, such as an unmodulated carrier.

**Loop filter** (`loop_filter`). A proportional-integral filter:

    vi(n) = K2·e(n) + vi(n−1)
    v(n)  = K1·e(n) + vi(n)

* K1 = 0.1979 and K2 = 0.00592 come from the source's loop-filter diagram.
* The gains are stored as integers with 20 fraction bits: `K1_Q = 207513`,
  `K2_Q = 6208`.
* v(n) is in radians per sample. It has 35 fraction bits and is 48 bits wide.

**Steering the NCO.** v(n) is converted to phase units by multiplying by
2³²/(2π), done as `(v · 10430) >>> 19`. The result is added to the nominal
tuning word Ω0 (`nco_freq_i`). So the NCO step is Ω0 + v(n), as in the
source's DDS drawing.

**Dynamics depend on signal power.** For small errors, e ≈ m̄²·Δθ, where m̄²
is the mean of m². The loop's natural frequency is √(K2·m̄²) rad/sample and
its damping is (K1/2)·√(m̄²/K2). Some values:

| message | m̄² | natural frequency | damping | lock, measured |
|---|---|---|---|---|
| 0.5·cos | 0.125 | 0.027 rad/sample | 0.46 | within the first 1024 samples (`tb_costas_loop`) |
| 0.8·cos | 0.32 | 0.044 rad/sample | 0.73 | phase error < 0.05 rad after 74 samples (`tb_costas_settling`) |

For much weaker signals, rescale K1 and K2. There is no automatic gain
control.

**Timing.**

* `demod_o`, `quad_o` and `err_o` are combinational in the current input
  sample.
* The NCO adds one clock of ROM latency behind its accumulator, so there are
  two clocks of delay around the loop.
* The integrator is wide enough for any frequency offset the NCO can
  represent. After lock it holds the offset: `tb_costas_loop` reads
  2^20 ± 4 % back for a 2^20 offset.

## The coherent receiver (`coherent_demod`)

The mixer multiplies the received sample by the local oscillator's cosine.
This gives m/2 + (m/2)·cos 2ωc. Then:

1. `down_sample` keeps every second sample.
2. `fir_lpf` removes the 2ωc image. It is a 15-tap triangular filter,
   h = 1, 2, …, 8, …, 2, 1, with taps summing to 64.

The triangular filter is two 8-sample moving averages in cascade. It has
double nulls at every multiple of 1/8 of its input rate. With the default
carrier of f_clk/16, the image lands exactly on the null at f_clk/8. The
source designed its FIR with a filter-design tool and does not publish the
taps, so this filter is this design's own. Another carrier frequency needs
other taps: change `tri_tap()` or the filter.

**Output and latency.** The output is m/2, which is A_c·A_m/2 with a
unit-amplitude oscillator. It comes at half the clock rate, with
`demod_valid` high every second clock. From the input sample to the
corresponding output is 17 clocks:

* 3 clocks of registers;
* 7 decimated samples of FIR group delay.

**Synchronisation.** This receiver has no carrier recovery. Its oscillator
must have the carrier's frequency and phase. In `dsbsc_sdr_top` the two DDSs
get the same tuning word. The coherent receiver leaves reset one clock after
the transmitter, which cancels the modulator's one-register delay. This
stands in for the synchronisation link between transmitter and local
oscillator that the source shows.

## DDS (`dds`, `sine_rom`)

* The 32-bit accumulator adds `phase_inc` every clock.
* Its top 10 bits address a 1024 × 16-bit full-period sine table. The table
  has two synchronous read ports. The cosine is read a quarter turn ahead
  (address + 256).
* Word i holds round(32767·sin(2π(i + ½)/1024)). These values are computed
  during elaboration by `sdr_pkg::sine_q`. That function uses quadrant
  folding and an integer Taylor series, so the design needs no data file.
* The phase is truncated to the top bits with no dithering. Outputs lag the
  accumulator by one clock.

## Top level (`dsbsc_sdr_top`)

**Inputs:**

* the four tuning words: message, carrier, coherent LO, Costas Ω0;
* the Costas error select;
* `loopback_i`, which chooses the receivers' input. When 1, the receivers
  take the transmitter's output, as in a closed simulation of the link. When
  0, they take `rx_i_i`/`rx_q_i`, the samples an RF transceiver would
  deliver.

**Outputs:** the message, both modulator products, and the outputs of both
receivers:

* coherent: data plus valid, and the mixer output;
* Costas: I, Q, error, loop-filter output, NCO phase and the recovered
  carrier (the NCO's cos and sin).

**Not built.** The RF transceiver, the data-converter module, the board's DSP
processor and the bench signal generator are outside this RTL. Their
connection points are the `tx_*` and `rx_*` ports.

## Where this departs from, or adds to, the source

* **Costas error.** The source's text forms the error by multiplying the I
  and Q channels. Its loop-filter diagram labels the filter input as the
  imaginary part. The default follows the text. The imaginary-part error is
  available through `err_sel`.
* **Complex input.** The Costas loop takes the complex signal that the
  source's hardware model feeds it, so it has no arm low-pass filters. The
  source's textbook description uses a real input, which would need them.
* **Own choices.** Where the source gives no value, this design sets its
  own:
  * all word lengths;
  * the fixed-point formats and rounding;
  * the radian-to-phase scaling;
  * the decimation factor (2);
  * the FIR taps;
  * the reset behaviour;
  * the one-clock reset offset that synchronises the coherent receiver.
* **Left out.** The source's model has width-conversion and gateway blocks
  between stages. They are simulation plumbing, and no logic is built for
  them.
* **Loop gains.** Lock speed depends on the input amplitude, which the source
  does not state. Its plotted phase error settles within about 1200 of 10000
  samples. Here, settling takes 74 to ~1000 samples depending on amplitude.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench compares
against values computed independently: real-arithmetic sin/cos, or integer
and real reference models. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_sine_rom` | all 1024 words within 1 LSB of the ideal sine/cosine; 1-clock latency |
| `tb_dds` | accumulator bit-exact; cos/sin within 1 LSB for random tuning words; period 16 at f_clk/16 |
| `tb_dsbsc_modulator` | bit-exact rounded products, including saturation; 1-clock latency |
| `tb_complex_mult` | bit-exact complex products against a real model |
| `tb_loop_filter` | bit-exact against the PI difference equations (impulse, step, random) |
| `tb_down_sample` | factors 2 and 3, random valid gaps, output rate |
| `tb_fir_lpf` | impulse response, unity DC gain, exact null at a quarter of its rate, random data against a model |
| `tb_coherent_demod` | output = m/2 ± 1 % of full scale at 17 clocks latency; one output per 2 clocks; peak amplitude |
| `tb_costas_loop` | lock with frequency and phase offset on DSB-SC input; message correlation > 0.99; frequency estimate; imaginary-part mode on a plain carrier |
| `tb_costas_settling` | 10000-sample acquisition run; phase error < 0.05 rad after sample 2000 |
| `tb_dsbsc_sdr_top` | end-to-end at default parameters, in three phases (below) |

`tb_dsbsc_sdr_top` runs three phases:

1. loopback through both receivers;
2. an external DSB-SC signal at a different frequency and phase, which the
   Costas loop re-locks to;
3. a switch to the imaginary-part error mode.

It counts each mechanism (coherent detection, decimation, Costas lock,
external path, mode switch) and requires each to happen.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sdr_pkg.sv tb/tb_dsbsc_sdr_top.sv --top-module tb_dsbsc_sdr_top -o sim
./obj_dir/sim
```

Substitute any testbench name. All of them finish in seconds. The package
file must come first, because the modules import it.
