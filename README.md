# Four-element bit-stream beamforming receiver

This is SystemVerilog RTL for the digital back end of a four-element
digital-beamforming receiver. It follows the architecture of a Cairo
University thesis, "A Massive MIMO mm-Wave Receiver For 5G": 325 MHz IF,
1.3 GHz sampling, 20 MHz bandwidth.

The main idea is to leave the ADC outputs as 1-bit streams for as long as
possible. Each antenna element has a bandpass delta-sigma ADC whose 1-bit
output carries the signal at an IF of exactly Fs/4. The usual receiver would
decimate each stream to multi-bit baseband samples and then multiply by
complex weights. Here four steps happen on single bits, using only XNOR gates
and 2:1 multiplexers:

- splitting into I and Q
- down conversion to baseband
- the per-element phase rotation

Only the 6-bit sum of the four rotated elements, the beam, is decimated. So
there is one decimator pair per beam instead of one per element.

```
in_bits[k] ─► interleaver ─► DDC (XNOR with CLK/4) ─► CWM (muxes + adder) ─┐
  (k=0..3)     I = bit n      I·LO, Q·LO               I·cos + Q·sin         ├─► adder tree ─► 6-bit I, Q
               Q = bit n-1                              Q·cos − I·sin        ┘        │
                                                                                      ▼
                              38-bit I/Q ◄── HB /2 ◄── HB /2 ◄── sinc⁴ comb /8 ◄──────┘
                              at Fs/64       +10 bit   +10 bit   +12 bit
```

## Signal path, step by step

### Interleaver: I and Q from one bit stream (`interleaver.sv`)

At an IF of Fs/4, consecutive samples of the real IF signal are 90° apart. So
two neighbouring bits, n and n−1, together form a complex sample. The
interleaver works at the half-rate strobe (Fs/2):

- I takes the bit present at the strobe.
- Q takes the bit from one clock earlier.

The result is two streams at Fs/2, both sampled at the same strobe.

### Down conversion (`ddc.sv`)

After the split, the IF is at Fs/4 relative to the half-rate streams. So the
mixer needs an oscillator alternating +1, −1, which is the CLK/4 waveform.

With bits coded 1 = +1 and 0 = −1, multiplying by ±1 is an XNOR. I and Q use
the same oscillator phase. No inverted clock is needed because the
interleaver has already provided the 90° offset. In this implementation the
oscillator is +1 for even half-rate samples.

### Complex weight multiplier (`cwm.sv`, `cwm_zero.sv`)

Steering a beam to angle ψ rotates element k by θk = k·π·sin ψ, for
half-wavelength spacing. The rotation is applied as:

- I′ = I·cos θ + Q·sin θ
- Q′ = Q·cos θ − I·sin θ

The weights are 4-bit signed integers in −7…7: cos θ and sin θ scaled by 6
and rounded. The code −8 is not allowed, and an assertion checks this.

Because I and Q are ±1, each product is only a choice between w and −w, so
the multiplier is four 2:1 muxes and two adders. The outputs are 5-bit.

Element 0 is the phase reference and has no weights. `cwm_zero` outputs ±6:
a weight of 1 at the same scale, so that the four elements are balanced.

### Scale and forbidden angles (`adder_tree.sv`, `beamformer.sv`)

The four rotated elements are added to a 6-bit beam sample, range −32…31,
separately for I and Q. Three effects set the limits:

- **Sum range.** With |w| ≤ 7 each element contributes at most |cos| + |sin|
  times the scale. Four elements at scale 6 stay inside 6 bits for almost
  every angle.
- **Scale choice.** Scale 5 is the largest that is always safe. Scale 6 is
  used because the few angles that overflow are rare.
- **Overflow.** Weights that overflow (for example cos = sin = 7) are
  "forbidden". This design does not saturate them: the sum wraps in two's
  complement, and `bf_ovf` flags the clock in which it happened. The flag is
  this design's own addition.

### Pipelining

The pipeline uses three register levels:

1. a register after the CWM muxes
2. a register after the CWM adders
3. a two-level adder tree: first elements 0+1 and 2+3, then the final sum,
   each level registered

All registers are enabled by the half-rate strobe.

Latency: the beam sample for half-rate sample m is valid from clock edge
2m + 9 for four elements. Each doubling of the array adds one adder level,
which is 2 more clocks.

### Several beams

The interleavers and down-converters do not depend on the steering angle, so
extra beams share them. Each extra beam adds its own:

- three CWMs and one `cwm_zero`
- an adder tree
- an I decimator and a Q decimator

`NUM_BEAMS` on `beamformer` and `beamforming_rx` sets the number of beams. It
defaults to 1, the single-beam receiver. `tb_beamforming_rx_2beam` builds two
beams, steered at −20° and +30°.

### Decimation by 32 (`comb_decimator.sv`, `halfband_decimator.sv`, `decimator.sv`)

Decimation happens in three stages:

| stage | filter | rate change | width | growth |
|---|---|---|---|---|
| comb | sinc⁴, 29 taps, h = (1+…+z⁻⁷)⁴ | Fs/2 → Fs/16 | 6 → 18 bits | +12 bits (DC gain 8⁴) |
| half-band 1 | order 24 | Fs/16 → Fs/32 | 18 → 28 bits | +10 bits |
| half-band 2 | order 24 | Fs/32 → Fs/64 | 28 → 38 bits | +10 bits |

All three filters are polyphase. Products are formed only at the output rate,
and symmetric taps are added before they are multiplied.

Half-band details:

- Every second tap is zero. The centre tap is 512/1024.
- The coefficients are this design's own: an equiripple half-band with
  passband 0–0.2 and stopband 0.3–0.5 of its input rate, about 40 dB
  attenuation, quantized to 1/1024. One half is
  {−7, 14, −27, 50, −99, 325} at odd offsets from the centre. They sum to a
  DC gain of exactly 1024.
- The worst-case gain of these coefficients (Σ|h| = 1556/1024) exceeds 10
  bits, so each half-band saturates its output. Only large, step-like
  inputs reach saturation.

The output rate is Fs/64: 20.3 MHz complex at Fs = 1.3 GHz. `out_valid` is a
one-clock pulse each time new words appear.

For the output at index l, the arithmetic is:

```
c[j] = Σk hc[k] · bf[8j + 2 − k]       (comb, 29 taps, binomial-like sinc⁴ weights)
a[i] = sat28(Σk hh[k] · c[2i − k])     (half-band, 25 positions)
y[l] = sat38(Σk hh[k] · a[2l − k])     (valid in the clock after edge 64l + 63)
```

Here `bf[m]` is the beam sample for half-rate sample m.

### Clocking (`clk_div.sv`)

Everything runs on one clock, `clk`, the ADC sample clock.

- A 6-bit counter provides the divided waveforms: CLK/2, CLK/4 (the
  oscillator), CLK/16, CLK/32 and CLK/64.
- It also provides one-cycle enable strobes at Fs/2, Fs/16, Fs/32 and Fs/64.
  Each strobe is high in the last cycle of its period.
- All registers use these strobes as clock enables.

The original design instead clocks each stage from a ripple divider. The
sample timing is the same, but there is only one clock domain to constrain.

Reset is asynchronous and active high, everywhere.

## Module list

| module | role |
|---|---|
| `bf_pkg` | widths, weight/sample types, half-band coefficients, comb coefficients computed by repeated box convolution |
| `clk_div` | counter giving divided waveforms and enable strobes |
| `interleaver` | I = current bit, Q = previous bit, at the half-rate strobe |
| `ddc` | XNOR mixers with the CLK/4 oscillator |
| `cwm`, `cwm_zero` | mux-based complex weight multipliers (steered / reference element) |
| `element`, `element_zero` | interleaver + DDC + multiplier for one antenna element |
| `adder_tree` | pipelined binary sum of the elements, wrap to the filter-input width, overflow flag |
| `beamformer` | four elements, one adder tree per beam, extra multipliers for beams ≥ 1 |
| `comb_decimator`, `halfband_decimator`, `decimator` | decimation chain |
| `beamforming_rx` | top: divider, beamformer, an I and a Q decimator per beam |

Top-level ports of `beamforming_rx`:

- inputs: `clk`, `rst`, `in_bits[3:0]`, and `cos_w`/`sin_w[NUM_BEAMS][1:3]`
  (4-bit signed)
- outputs: `i_out`/`q_out[NUM_BEAMS]` (38-bit signed), `out_valid`, and
  `bf_ovf[NUM_BEAMS]`

The ADCs and the RF front end are analog and are not part of the RTL.

## Where this design departs from the original

- **Clocking.** The original uses an asynchronous divider and real divided
  clocks. Here a synchronous counter drives enable strobes.
- **Half-band coefficients.** The original's coefficients come from an
  outside source and are not given, so the ones here are this design's own.
  The order (24) and the +10-bit growth are kept.
- **Comb order.** The original names a 31st-order comb, but also says that
  it adds 12 bits. With decimation 8, 12 bits of growth means a fourth-order
  sinc (29 taps), which is what is built.
- **Registers in the decimators.** The polyphase structures hold a slightly
  different number of registers than the original's description:
  - comb: 7 input-rate registers plus 21 output-rate registers
  - half-band: 1 input-rate register plus 17 output-rate registers
- **Pipelining.** The original's fastest variant also uses pipelined
  ripple-carry adders, which are not described in detail. Here the adders
  are plain `+`, and the three-register pipeline above is used.
- **Sizes as parameters.** The original's register-level description covers
  only the 4-element, 4-bit-weight receiver. Its scale study also tabulates
  8- and 16-element arrays and 3- to 8-bit weights. Here these are
  parameters, and the default is the 4-element, 4-bit case.
- **Additions.** `bf_ovf`, `out_valid` and saturation in the half-bands are
  additions.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Expected values are computed independently
of the RTL, with direct-form sums and closed-form coefficient tables.

`tb/bp_dsm_model.sv` stands in for the ADC. It is a behavioural, not
synthesizable, 4th-order error-feedback bandpass delta-sigma modulator with
its noise notch at Fs/4. The real modulator is 6th order and continuous
time.

End-to-end testbenches, all at the default size and all bit-exact against a
sample-domain model:

- **`tb_beamforming_rx`**:
  - A source at +30°, with the beam steered at it, gives the expected
    amplitude.
  - Steering to −30° nulls the source by about 50 dB.
  - A sweep from −60° to +60° peaks at +30°.
  - Weights (7, 7) make the beamformer overflow.
  - Each of these mechanisms is counted.
- **`tb_beamforming_rx_2beam`** (`NUM_BEAMS = 2`): two sources, at +30° and
  −20°, with two beams. Each beam carries its own source about 12–13 dB
  above the other.
- **`tb_beamforming_rx_arrays`**, using the helper `rx_array_check`: the
  same end-to-end checks (bit-exact output, steering, null, overflow) for
  three other configurations:
  - 8 elements, N = 7
  - 16 elements, N = 8
  - 4 elements with 5-bit weights at scale 12, N = 7
- **`tb_beamforming_rx_snr`**: output SNR over the 20 MHz band at −6 dBFS
  input, with the 4th-order model:
  - about 58 dB with one element
  - about 63 dB with four elements, a 5 dB array gain
  - The original reports about 76 dB with its 6th-order modulator. The SNR
    here is limited by the model.
  - From +30° the element phase steps are whole clock periods, so the
    modulators produce shifted copies of the same noise and the array gain
    drops to about 2.6 dB. This shows the correlated-noise effect.

To run any testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/bf_pkg.sv tb/tb_beamforming_rx.sv \
          --top-module tb_beamforming_rx -Mdir obj -o sim && obj/sim
```

Replace the name with any other `tb_*` file. Every testbench finishes in
well under a second.

## Changing the design

- **Weights.** Compute them outside, as `round(6·cos θk)` and
  `round(6·sin θk)` with θk = k·π·sin ψ. With scale ≤ 5 the sum
  never overflows.
- **More beams.** Set `NUM_BEAMS`; nothing else changes.
- **Filter widths.** These follow from `BF_WIDTH`, `COMB_GROWTH` and
  `HB_GROWTH` in `bf_pkg`. The comb coefficients are recomputed from
  `COMB_M` and `COMB_K`. A different half-band needs new `HB_COEF` values.
  The two sides together must sum to 512, so the DC gain stays 1024.
- **Array size and weight width.** `beamforming_rx` and `beamformer` take
  these parameters:
  - `N_ELEM`: array size, a power of two, default 4
  - `W_W`: weight width, default 4
  - `SCALE`: the weight that stands for 1.0, default 6
  - `BF_W`: filter-input width N, default 6

  The filter word widths and `OUT_W` follow `BF_W`. The adder tree has
  log2(`N_ELEM`) register levels, so each doubling of the array adds one
  half-rate sample of latency. Rows of the scale table that are worth
  knowing:

  | elements | weight bits | scale | N |
  |---|---|---|---|
  | 4 | 4 | 6 | 6 |
  | 4 | 5 | 12 | 7 |
  | 8 | 4 | 6 | 7 |
  | 16 | 4 | 6 | 8 |

  The package constants `NUM_ELEM`, `W_WIDTH`, `REF_SCALE` and `BF_WIDTH`
  are only the defaults.
