# Stored-product PCM channel filter

A 24-channel PCM transmit bank normally band-limits every voice channel with its own
fifth-order analog low-pass filter. This design moves most of that filtering into one
digital filter shared by all 24 channels. It sits after the encoder and works directly
on the 8-bit compressed (segmented A-law style) codes.

The filter is a sixth-order low-pass sampled at 24 kHz, built as two identical
third-order direct-form sections. A cheap, slow multiplier-free implementation
is possible because of one idea: **every value that is multiplied by a coefficient is
a quantization level of a companding law**. The encoder output is quantized that way,
and the output of each section is quantized that way again before it is fed back or
passed on. So there are only a few hundred possible multiplicands per coefficient, and
each "multiplier" is a small ROM holding the precomputed product
`coefficient × level`. It is addressed directly by the sample code. One product is read
and added per 50 ns adder cycle, so a section needs no multiplier and no shift-and-add
sequencing.

Only one third-order section exists in hardware. Every input sample passes through it
twice: the first pass is the first stage, the second pass the second stage. The state
of each stage of every channel is kept in a small memory, so channels can be
interleaved in any order.

```
 in_code ──► R1 ─┐            ┌──────── product ROMs (7, read in parallel) ─────────┐
 (8 bit)         │  R2 R3 R4  │ A0 A1 A2 A3  (x(n)..x(n-3))                        │
                 │  R6 R7 R8  │ B1 B2 B3     (y(n-1)..y(n-3), storing -b_k)        │
                 ▼            └──────┬──────────────────────────────────────────────┘
         state memory                │ one product per clock, binary points aligned
   (24 channels × 2 stages)          ▼
                 ▲          adder/accumulator (preset +0.5) ──► quantizer ──► y code
                 │                                               (negate, find     │
                 └──────────── advanced delay line ◄──────────── segment, level    │
                                                                  ROM L0..L7)      │
                        pass 1 result ─► input of pass 2;  pass 2 result ─► block D ─► out_code
```

## Number formats

| quantity | format |
|---|---|
| sample code (`scode_t`) | `{sign, segment L[2:0], step q[3:0], ext}`. The 8-bit compressed code is the first eight bits. `ext` is a fifth step bit, used only by the fine level set in segments 5 to 7. |
| linear level | 13 bits: sign and magnitude. The magnitude field holds **twice** the level, so half-integer levels such as 2015.5 are exact. |
| product | 13-bit two's complement. The binary point is fixed per ROM (table below). |
| accumulator | 18-bit two's complement: 13 integer bits and 4 fraction bits. |

### Quantization levels

The companding law has eight positive segments, each with 16 equal quanta. A level is
the mid value of its quantum. Segments 0 and 1 have quanta one unit wide, so their
levels are the integers themselves.

| segment | standard level (q = 0..15) | fine level (first-stage output only) |
|---|---|---|
| L = 0 | q | same |
| L = 1 | q + 16 | same |
| L = 2..4 | 2^(L-1)·(q + 16.5) − 0.5 | same |
| L = 5..7 | 2^(L-1)·(q + 16.5) − 0.5 | 32 quanta: 2^(L-2)·(q + 32.5) − 0.5, q = 0..31 |

The largest standard level is 2015.5 and the largest fine level is 2031.5.

The fine set doubles the resolution of the three largest segments. It is used only
between the two stages: at the output of the first pass, and so at the input of the
second pass. This cuts the pass-band ripple that large signals get from the coarse top
segments. The filter output must be a standard code, so the second pass uses the
standard set.

## The third-order section

```
y(n) = Q( A0·x(n) + A1·x(n-1) + A2·x(n-2) + A3·x(n-3) − b1·y(n-1) − b2·y(n-2) − b3·y(n-3) )
```

| coefficient | value | product ROM fraction bits |
|---|---|---|
| A0 = A3 | 0.2726230 | 1 |
| A1 = A2 | 0.0808208 | 4 |
| b1 | −0.9877751 | 1 |
| b2 | 0.7787396 | 1 |
| b3 | −0.08407682 | 4 |

These values give a DC gain of exactly 1 per section: ΣA = 1 + Σb = 0.7068877.

The binary points follow from the largest product each ROM has to hold:
- With a 13-bit word, a coefficient near 1 times 2015.5 needs 11 integer bits, which
  leaves one fraction bit.
- The small coefficients leave room for four fraction bits.

The recursive ROMs store `−b_k × level`, so every product is added.

**Product ROMs (`product_rom`)**
- Each ROM holds `round(coef × |level|)` to its own binary point, so it stores products
  of magnitudes. The sample's sign bit tells the adder whether to add or subtract.
- The address is `{fine, L, q, ext}`, which is 512 words; 304 of them are distinct
  products.
- Stage-2 x-taps and stage-1 y-taps see fine codes, and the other taps see standard
  codes. The `fine` address bit is set from that.
- Each table is computed at elaboration time from the coefficient and the level formula.
  No data files are used.
- The read is synchronous.

**Gating and accumulation (`third_order_section`, `adder_accumulator`)**
- All seven ROMs are read in parallel from the registers R1–R4 and R6–R8.
- A one-hot select passes one product per clock, in the order A0 A1 A2 A3 b1 b2 b3. On
  the way, the product is shifted to the accumulator's 4 fraction bits.
- The accumulator starts each pass at **+0.5**. Dropping the fraction of the final sum
  then rounds it to the nearest integer with no extra step.

**Quantizer (`quantizer`, `level_rom`)**

The rounded sum becomes a code and a level in three registered steps:
1. **Negate.** The integer part of a negative sum is negated (two's complement), giving
   sign and magnitude. A magnitude above 2047 is limited to 2047, which selects the top
   level; `clip` reports this.
2. **Find the segment.**
   - The position of the leading one of the 11-bit magnitude gives the segment. A value
     below 16 is segment 0.
   - The four bits after the leading one are the step q.
   - In the fine set and segments 5–7, the next bit down is `ext`.
3. **Read the level.** The eight level ROMs L0..L7 each hold one segment, for both level
   sets. Only the detected segment's ROM is enabled, and the OR of all eight outputs is
   the level.

The quantizer's output code is both the section's output and the value fed back into
the y delay line.

**Block D (`code_converter`)** converts the second-stage level back to the 8-bit code for
the output. It uses the same leading-one rule and takes one clock.

## Two passes, 24 channels, and the timing

The clock is the 50 ns adder interval: one product is added per clock, at 20 MHz.
`section_controller` runs each pass as follows.

| phase | clocks | what happens |
|---|---|---|
| ADV | 3 (`T_ADV`) | First clock: load R1 (new input) and R2–R4, R6–R8 (channel state), and preset the accumulator. The previous output is converted to a code meanwhile. |
| ROM | 3 (`T_ROM`) | Product ROM access. |
| ACC | 7 | One product added per clock. |
| QNT | 4 (`T_QNT`) | Quantizer (3 clocks); the advanced state is written back in the last clock. |

- A pass is 17 clocks (850 ns) and a sample is 34 clocks (1.70 µs).
- A 24-channel frame therefore takes 816 clocks. A 24 kHz frame at 20 MHz has 833.
- The first pass quantizes with the fine set. Its code is kept in `mid_reg` and becomes
  the x input of the second pass, which runs on the other half of that channel's state.
- The 215 ns negation and quantization time is rounded to 4 clocks (200 ns).

**State memory (`channel_state_mem`)**
- Each entry holds x(n−1..n−3) and y(n−1..n−3) as 9-bit codes, for each of 24 channels ×
  2 stages, which is 2592 bits.
- Reads are combinational, at the first ADV clock.
- The write-back stores `{x(n), x(n−1), x(n−2), y(n), y(n−1), y(n−2)}`, which is the
  delay-line advance.

**Handshake and latency**
- `in_ready` is high when the filter is idle, and in the last clock of a sample's second
  pass. So samples can follow each other with no gap: one every 34 clocks.
- `out_valid` pulses exactly 35 clocks after the sample was accepted.
- Samples of one channel must arrive in time order. Channels may come in any order, and
  not every channel has to be used.

## Overload

Partial sums of a full-scale signal can reach about ±3400 even when the final sum is in
range. For example, a constant input of −2015.5:
- the A taps give −1425;
- b1 then adds −1990, reaching −3415;
- b2 and b3 then bring it back to −2015, the correct output.

A 16-bit accumulator (11 integer bits) that saturated on every addition would corrupt
such sums. This design instead:
- carries two guard bits, which give 13 integer bits. With these coefficients the
  largest possible magnitude is about 5200, so the accumulator itself never saturates;
- limits only the final sum, to the top level of the current level set.

`sat_event` pulses together with `out_valid` when either pass of that sample had to be
limited. The accumulator's own saturation flag is also ORed in, but with these
coefficients it only fires on a hardware fault.

## Ports of `pcm_filter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 20 MHz adder clock |
| `rst_n` | in | 1 | synchronous reset, active low; clears all channel state |
| `in_valid`, `in_ready` | in/out | 1 | input handshake; the sample is taken when both are high |
| `in_chan` | in | 5 | channel 0..23 |
| `in_code` | in | 8 | compressed code `{sign, L, q}`, sign 1 = negative |
| `out_valid` | out | 1 | one-clock strobe |
| `out_chan` | out | 5 | channel of the output sample |
| `out_code` | out | 8 | filtered sample, compressed code |
| `out_linear` | out | 13 | filtered sample level: sign and twice the magnitude |
| `sat_event` | out | 1 | this sample was limited to full scale |

The parameters are `N_CH` (24), `T_ADV` (3), `T_ROM` (3) and `T_QNT` (4). `T_QNT` must
stay 4, and an assertion checks it.

## Where this design differs from the original proposal

- **Stored values.** The delay registers and the state memory hold sample codes, not
  13-bit linear values. The ROMs are addressed by codes, so nothing is lost.
- **ROM reads.** The seven product ROMs are read in parallel and gated. The original
  proposal reads them one after another, 50 ns apart. The sequence of additions is the
  same.
- **ROM size.** A product ROM has 512 × 13 bits instead of 256 × 16 bits. The second
  stage's x-ROMs must also hold the extra fine levels.
- **Accumulator width.** It is 18 bits, with two guard bits (see Overload).
- **Level ROMs.** They store magnitudes only (64 words each, both level sets), and the
  sign is attached afterwards.
- **Block D.** The 13-bit to 8-bit conversion is leading-one logic, not a table.
- **No line coding.** No bit inversion is applied to the output code.
- **Interface.** The handshake, the per-channel state memory and `sat_event` are this
  design's own.

Not part of the RTL:
- the encoder and decoder;
- the analog pre-filters and channel gates;
- the line;
- a receive-side filter.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
The expected values come from `tb/pcm_ref_pkg.sv`, a reference model written
independently of the RTL:
- levels from the formulas in real arithmetic;
- segments found by comparing against thresholds;
- products rounded in real arithmetic.

| testbench | what it shows |
|---|---|
| `tb_product_rom` | every word of a ROM for two coefficients and binary points |
| `tb_level_rom` | every address of L0..L7, zero output when disabled, table values worked by hand |
| `tb_quantizer` | every rounded sum from −2048 to 2047 in both level sets, out-of-range sums, 3-clock latency |
| `tb_adder_accumulator` | 20,000 random preset/add/subtract steps against an integer model, saturation both ways |
| `tb_code_converter` | all 256 standard levels convert back to their code; random linear values |
| `tb_channel_state_mem` | reset, random writes and reads, 24- and 5-channel instances |
| `tb_section_controller` | the control outputs checked clock by clock, back-to-back and gapped arrivals, default and shortened phases |
| `tb_third_order_section` | 1500 random passes in both stage roles, against the reference section |
| `tb_pcm_filter` | end to end, at default parameters (see below) |
| `tb_pcm_filter_response` | gain at 300 Hz–10 kHz for 3, 10, 50, 90 and 100 % amplitude, against the ideal response |

`tb_pcm_filter` runs 80 frames of all 24 channels:
- **Inputs:** sinusoids, random codes, full-scale square waves, and a worst-case
  overload sequence.
- **Order:** shuffled channel order, with idle gaps.
- **Checks:** every output code and level, 35-clock latency, 34-clock spacing, and the
  816-clock frame.
- **Coverage:** it counts overload events, clipping, odd fine levels, negative results,
  back-to-back samples and gaps, and fails if any of them never happened.

Measured response (output gain over input amplitude, both stages):

| frequency | ideal | 100 % | 90 % | 50 % | 10 % | 3 % |
|---|---|---|---|---|---|---|
| 300 Hz | −0.003 dB | +0.00 | +0.04 | +0.02 | −0.01 | +0.12 |
| 1 kHz | −0.03 dB | −0.07 | +0.02 | −0.06 | −0.07 | +0.03 |
| 2 kHz | −0.03 dB | −0.03 | −0.05 | −0.03 | −0.03 | +0.19 |
| 3 kHz | −0.17 dB | −0.21 | −0.21 | −0.22 | −0.20 | +0.02 |
| 3.4 kHz | −1.32 dB | −1.22 | −1.29 | −1.22 | −1.38 | −1.33 |
| 6 kHz | −21.4 dB | −21.5 | −21.5 | −21.3 | −21.3 | −21.5 |
| 10 kHz | −35.0 dB | −35.0 | −34.9 | −34.9 | −35.0 | −35.4 |

Down to 10 % amplitude, the pass band stays within about 0.05 dB of the ideal
response. At 3 %, the coarse quantization of small levels adds about 0.2 dB of ripple.

The stop band of the digital filter alone flattens out at about 21 dB near 6 kHz.
The rest of the attenuation is expected from a low-order analog filter ahead of the
encoder.

## Simulating

Every testbench builds the same way with Verilator 5 (shown for the end-to-end test):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pcm_filter_pkg.sv tb/pcm_ref_pkg.sv tb/tb_pcm_filter.sv --top-module tb_pcm_filter
./obj_dir/Vtb_pcm_filter
```

All of them finish in well under a second.

To change the coefficients, edit `COEF_*` and `FRAC_*` in `rtl/pcm_filter_pkg.sv`. The
product ROMs are recomputed from them, and `tb/pcm_ref_pkg.sv` holds the matching
reference values. A different channel count needs only `N_CH`. The frame budget is
34 × `N_CH` clocks.
