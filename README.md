# Coherent BFSK modem on a single FPGA clock

Binary frequency-shift keying (BFSK) sends a 0 as one tone and a 1 as another. This design
recovers the bits coherently. The receiver multiplies the incoming samples by a local copy
of each tone, and a low-pass filter on each product keeps only its average. A product with
the matching tone averages A/2, since cos²(ωt) = ½ + ½cos(2ωt). A product with the other tone
averages zero. The bit is decided by which channel is larger.

Coherent detection needs the local tones to agree with the received ones in frequency and
phase. Here this is solved directly. One pair of digital oscillators (direct digital
frequency synthesis, DDFS) makes both tones, and the same two outputs feed the transmitter's
tone switch and the receiver's mixers. There is no carrier recovery, so there is nothing to
lock or settle. The RTL therefore holds the whole link:

```
 50 MHz ─► sampling accumulator (+13422/clk) ──► 40 kHz sample strobe (paces all below)
                                                        │
 data accumulator (+41943/sample) ─ MSB ─► data_bit (100 Hz square wave)
 carrier DDFS  (+503316/sample → 1.2 kHz, carr0)        │
               (+880804/sample → 2.1 kHz, carr1) ──► BFSK mux (bit 0: carr0, bit 1: carr1)
                                                        │  (or ext_bfsk from an ADC)
      ┌──────────────────── X1: (rx-128)·(carr0-128)/256 ─► LPF-1 ─► scale ─► filter1 ─┐
      └──────────────────── X2: (rx-128)·(carr1-128)/256 ─► LPF-2 ─► scale ─► filter2 ─┴► decision ─► z
```

## Numbers that define it

| Quantity | Value | How it arises |
|---|---|---|
| System clock | 50 MHz | |
| Sample rate | 40000.4 Hz | 13422 · 50 MHz / 2²⁴ |
| Carrier 0 (bit 0) | 1200.0 Hz | 503316 · 40 kHz / 2²⁴ |
| Carrier 1 (bit 1) | 2100.0 Hz | 880804 · 40 kHz / 2²⁴ |
| Data | 100 Hz square wave, 200 samples per bit | 41943 · 40 kHz / 2²⁴ |
| Accumulators | 24 bit | |
| Cosine tables | 8192 × 8 bit, addressed by phase bits [23:11] | |
| Low-pass filters | 251 taps (order 250), Hamming window, 450 Hz cut-off, 8-bit taps, 24-bit output | |

The data pattern is a square wave, so the design demonstrates itself. The data generator
stands in for a real bit source. `data_bit` and its full-scale copy `dat` (255 or 0) are the
reference to compare `z` against.

## Sample timing: one clock, one strobe

Every register runs on the 50 MHz clock. The sampling accumulator's MSB, `samp`, is a 40 kHz
square wave. Its rising edge becomes `samp_en`, a one-clock strobe that comes every 1249 or
1250 clocks. The carrier and data accumulators and the filters' sample input advance only on
that strobe. The ROMs, mixers and scale stages are plain pipeline registers that run every
clock. They settle within three clocks of a strobe and then hold for the rest of the period.

One sample, counted in clocks after the strobe edge:

| Clock | Event |
|---|---|
| +1 | New phases are in the accumulators, and the data bit may change |
| +2 | New cosine words from both ROMs; the BFSK multiplexer follows combinationally |
| +3 | Both mixer products are registered |
| next strobe | Each filter takes its mixer product as its newest sample, so the filters run one sample behind the mixers |
| +251 after that | The filter result appears on `k1`/`k2` |
| +1 | Scale stage, giving `filter1`/`filter2` |
| +1 | Decision, giving `z` |

A filter pass therefore takes 252 of the 1249 clocks in a sample period. The filters set the
delay from data to decision. Their group delay is 125 samples (3.125 ms), so `z` follows
`data_bit` by about 125 samples. In simulation, edges of `z` came 117 to 135 samples after the
data edges. The spread comes from the ripple described below.

## The low-pass filters

This is the least obvious part and the one with the most freedom.

**Taps.** The taps are a windowed sinc. The ideal tap is h[n] = w_c·sinc(w_c·(n−125)), where
w_c = 2·450/40000. It is multiplied by a Hamming window, 0.54 − 0.46·cos(2πn/250). The taps
are then divided by their sum (unity DC gain) and rounded to integers at a scale of 2¹². This
gives a centre tap of 92, taps no smaller than −11, and a sum of 4102. The tap table is
computed from this formula when the design is loaded (`bfsk_pkg::fir_coef`), so there is no
data file.

**Structure.** One multiply-accumulate unit serves all 251 taps. Samples are kept in a
251-word circular buffer. A strobe writes the new sample and starts a pass, which walks from
the newest sample to the oldest, one tap per clock. After 251 clocks the sum is registered in
`sout` and `sout_valid` pulses. The arithmetic is exactly that of a direct-form FIR. Only the
hardware is time-shared, which costs one 8×8 multiplier per filter instead of 251. Strobes
must therefore be at least 252 clocks apart, and an assertion in `fir_lpf` checks this.
After reset the buffer is cleared one word per clock. This takes 251 clocks, during which
strobes are ignored.

**Levels.** With the 127-amplitude tables, the matching mixer output averages about +31,
which is A/2 after the mixer's /256. The other mixer output averages about 0.
`scale_offset` takes bits [19:12] of the 24-bit filter sum. This undoes the 2¹² tap scale,
and the stage then adds 128 to give offset-binary DAC code. A settled channel thus reads
about 159 when its tone is present and about 128 when it is not. The testbench accepts more
than 150 and 118–138 respectively.

**Ripple.** The tones are only 900 Hz apart, and the cut-off is low against the 100 Hz data.
The filter outputs therefore show visible ripple and rounded, slow edges, and a sharp edge
in the data becomes a ramp of about 250 samples. The decision is taken in the middle of that
ramp. A wider tone spacing, a higher cut-off or more taps would all reduce the ripple.

## Modules

All files are in `rtl/`, one module or package per file.

| Module | Role |
|---|---|
| `bfsk_pkg` | Frequency words, widths, and the formulas for the cosine table and the filter taps |
| `phase_acc` | 24-bit phase accumulator with enable and asynchronous clear, shared by the three generators |
| `sampling_gen` | Sampling accumulator (+13422 per clock); outputs `samp` and the strobe `samp_en` |
| `data_gen` | Data accumulator (+41943 per sample); its MSB is the data bit |
| `cos_rom` | 8192×8 cosine table, round(128 + 127·cos(2πk/8192)), registered read |
| `car_ddfs` | Two accumulators and two ROMs; outputs the 1.2 kHz and 2.1 kHz carriers |
| `bfsk_ddfs` | Combinational tone switch controlled by the data bit |
| `coherent_mixer` | Removes the 128 offset from both inputs, multiplies them as signed values, and registers product/256 |
| `fir_lpf` | The 251-tap filter described above |
| `scale_offset` | 8-bit slice of the filter output plus 128, registered |
| `decision` | z = 0 if y0 > y1, 1 if y1 > y0, unchanged on a tie |
| `bfsk_demod_top` | Connects all of the above |

Top-level ports:

| Port | Meaning |
|---|---|
| `clk` | 50 MHz clock |
| `reset_n` | Active-low reset (a push button), inverted inside |
| `ext_bfsk`, `ext_sel` | Offset-binary samples from an external ADC, and the select that feeds them to the mixers instead of the internal BFSK. `ext_bfsk` must be synchronous to `clk`; it is used at each strobe. |
| `samp` | 40 kHz sampling square wave |
| `dat` | Data reference (255 or 0) |
| `bfsk` | Internal BFSK samples |
| `filter1`, `filter2` | 8-bit codes for the two channel DACs |
| `k1`, `k2` | Raw 24-bit filter outputs |
| `z` | Recovered bit |
| `data_bit` | Transmitted bit |

The converters and the oscillator are not part of the RTL: the BFSK ADC, the two channel
DACs, the display DAC and the 50 MHz oscillator. They meet the design at these ports.

## Where this implementation makes its own choices

The block structure, the frequency words, the widths, the ROM size and addressing, the
mixer's offset removal and signed multiply, and the filter specification are those of the
reference design. The following are this implementation's own choices.

- **Clocking.** Everything runs on one clock with a sample strobe as clock enable. The
  reference design instead clocks its sample-rate logic from the accumulator MSB.
- **Sample rate.** The 13422 word gives 40000.4 Hz, not exactly 40 kHz. A ÷1250 counter
  would give exactly 40 kHz. The accumulator was kept.
- **Cosine table contents.** The table holds 128 + 127·cos, which keeps the signed swing
  symmetric at ±127.
- **Mixer output.** The mixer keeps the upper 8 bits of the 16-bit product.
- **Filter taps.** The taps use 12 fraction bits.
- **Filter hardware.** The filter uses a shared multiplier, and its buffer is cleared after
  reset.
- **Scale slice.** The scale stage takes bits [19:12], which gives unity gain.
- **Decision.** The decision is made digitally on the two 8-bit channel codes, and it holds
  its value on a tie.
- **External input.** The `ext_bfsk`/`ext_sel` input is added so that an ADC can feed the
  receiver.
- **Reset.** The reset is asynchronous and active-high inside the design, and it also clears
  the sampling accumulator.

The carrier and data accumulators advance at the sample rate. Their frequency step is
therefore 40000/2²⁴ ≈ 0.0024 Hz, and their range is up to 20 kHz. A synthesiser clocked at
50 MHz would have a 3 Hz step and a range up to 25 MHz. To change a frequency, change the
word in `bfsk_pkg` (word = f · 2²⁴ / f_sample). To change the filter, change `TAPS`,
`FC_HZ`, `FS_HZ` or `COEF_FRAC` on `fir_lpf`. Sample strobes must stay at least `TAPS`+1
clocks apart.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module against values
computed independently in the testbench, and each ends with a `TB_RESULT checks=… failures=…`
line.

- **Generators.** The accumulator sequences are checked against k·word mod 2²⁴. The testbenches
  also check the strobe period (1249 or 1250 clocks), the data half-period (200 or 201
  samples), and carrier cycle counts over one simulated second (exactly 1200 and 2100).
- **ROM.** All 8192 words are checked against the cosine formula.
- **Filter.** The filter runs at full size and is checked three ways:
  - an impulse test gives back each tap;
  - random inputs are compared with a convolution computed in the testbench;
  - a DC test checks the gain.
  The testbench also checks the exact 251-clock latency.
- **Mixer, scale and decision.** These are checked with random and corner-case inputs.
- **`tb_bfsk_demod_top`.** This testbench runs the whole design at its default parameters in
  two parts.
  - **Part 1: internal data.** The testbench checks the BFSK samples against its own
    carrier model and the channel levels against the expected ranges. Wherever the
    transmitted bit was steady around the filter delay, it checks that `z` equals that
    bit.
  - **Part 2: external input.** After a reset, the testbench plays the ADC. It sends its
    own bit pattern of 300-sample bits through `ext_bfsk`, and `z` must recover it.

  The testbench counts decisions for both bit values, edges of `z` in both directions,
  external samples and the reset, and it fails if any of these never happens. It covers
  5400 samples (135 ms of signal) and takes a few seconds.

To run any testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/bfsk_pkg.sv \
          tb/tb_bfsk_demod_top.sv --top-module tb_bfsk_demod_top -Mdir obj -o sim
./obj/sim
```

Only the demonstration configuration has been simulated: the data rate, tones, sample rate
and filter listed above. The design has not been synthesised for or run on an FPGA here.
The tables are built by `initial` blocks that call `$cos` and `$sin`. FPGA synthesis tools
that evaluate such initialisers infer ROMs from them. Other tools would need the tables
supplied as constants.
