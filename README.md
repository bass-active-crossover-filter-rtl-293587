# Bass active crossover filter

A small digital signal processor that splits an audio stream at a low
crossover frequency. A 16-bit serial sample stream goes in. The same stream
comes out, filtered by an 8th-order Chebyshev type II low-pass or high-pass
filter with a cut-off of 80, 120 or 160 Hz and an 80 dB stop-band. Used as a
low-pass it feeds a subwoofer amplifier; used as a high-pass it feeds the
satellite speakers.

The whole filter runs on one 32-bit adder. There is no parallel multiplier.
A product of a 32-bit state word and a 20-bit coefficient is built bit by bit
in 20 clock cycles, and the filter's 20 products per sample are computed one
after another. A small microprogram sequences them. The architecture (datapath,
number formats, memory sizes, counters, pins) follows a published student
chip design for a 2 µm CMOS process. The filter coefficients, the microprogram
and the serial-port timing are this implementation's own.

## The arithmetic: sign-magnitude products, two's complement sums

This is the part that makes the datapath look the way it does.

* **Coefficients** are 20-bit sign-magnitude numbers: bit 19 is the sign and
  bits 18:0 are the magnitude with 18 fraction bits, so
  `c = ±mag / 2^18` and `|c| < 2`.
* **Stored state words** (the filter's delay line, in the SRAM) are 32-bit
  sign-magnitude numbers: bit 31 is the sign and bits 30:0 the magnitude,
  in units of one input LSB.
* **The accumulator** `dff_t` is 32-bit two's complement.

A shift-and-add multiplier is simple for magnitudes, so the magnitudes are
multiplied, and only the finished product is negated if its sign is negative.
One multiply-accumulate (MAC) of state word `s` (in `dff_s`) and coefficient
`c` takes 20 cycles:

| cycle | operation (`dff_a` is the partial product) |
|---|---|
| 0 | `dff_a = c[0] ? |s| : 0` |
| 1..18 | `dff_a = (dff_a >> 1) + (c[k] ? |s| : 0)` |
| 19 | `p = c[19] ^ s[31]`; `dff_t = dff_t + (p ? ~dff_a[30:0] + 1 : dff_a[30:0])` |

After cycle 18, `dff_a = floor(|s| * |c| / 2^18)`, which is truncated toward
zero. The product magnitude is kept to 31 bits. In cycle 19 the
conditional negation and the accumulation are one addition: the inverted
magnitude goes into one adder input, `dff_t` into the other, and the carry-in
supplies the `+1`.

A value leaves `dff_t` for the SRAM by the reverse route. `dff_t` is copied
into `dff_a` (one cycle). The same inverted path, with its select driven by
`dff_a[31]` instead of a product sign, turns it into sign-magnitude (one cycle).
It is then written (one cycle). `-2^31` cannot be represented and becomes
`+0`; the coefficient scaling below keeps values far from it.

The whole computation is exactly reproducible with integer arithmetic:
`tb/bxf_ref_pkg.sv` does this in a few lines, and the end-to-end test
compares the chip against it bit for bit.

## Datapath (`rtl/datapath.sv`)

```
            +------------------ w_sel -----------------+
            v                                          |
 SRAM 9x32 --r_sel--> dff_s --+--> A mux (a2_sel) --+  |
   ^                          |                     |  |
   |    dff_a --+--> ~ / pass (a2_sel) --a1_sel-----+--> ADDER --+--> dff_a
   |            +--> >>1 ---------------b1_sel------+     ^      |
   |    dff_t --------------- b2_sel ---------------+    cin     +--t1_sel--> dff_t
   |                                                              t2_sel: hold / sign-extended dff_i
   +-- w_sel: dff_a or dff_s
 X_bit -> dff_i (16-bit shift, LSB first) ;  dff_t[15:0] -> dff_o (16-bit shift, LSB first) -> Y_bit
```

Adder operands:

* `A = a1_sel ? {a2_sel, a2_sel ? ~dff_a[30:0] : dff_a[30:0]}`
  `: {0, a2_sel ? dff_s[30:0] : 0}`
* `B = b1_sel ? dff_a >> 1 : (b2_sel ? dff_t : 0)`, plus `cin`

`dff_a` takes the adder output every cycle. `dff_t` takes the adder output
(`t1_sel`), the sign-extended input word (`t2_sel`), or holds. `dff_s` loads
the SRAM read word (`r_sel`) or holds; it keeps the SRAM out of the adder's
timing path. The adder (`rtl/cla_adder32.sv`) is built from eight 4-bit
carry-lookahead groups (`rtl/cla4.sv`) whose group carries ripple.

The micro-operations and the selects they drive:

| op | effect | selects set (all others 0) |
|---|---|---|
| RD  | `dff_s <= SRAM[addr]` | `r_sel` |
| MAC step 0 | `dff_a = c[0]·|s|` | `a2_sel = c[0]` |
| MAC step 1..18 | `dff_a = dff_a>>1 + c[k]·|s|` | `a2_sel = c[k]`, `b1_sel` |
| MAC step 19 | `dff_t += ±dff_a` | `a1_sel`, `a2_sel = cin = c[19]^s[31]`, `b2_sel`, `t1_sel` |
| CPY | `dff_a = dff_t` | `b2_sel` |
| SM  | `dff_a` to sign-magnitude | `a1_sel`, `a2_sel = cin = dff_a[31]` |
| WRA | `SRAM[addr] <= dff_a`, `dff_t <= 0` | `sram_wen`, `t1_sel` |
| WRS | `SRAM[addr] <= dff_s` | `sram_wen`, `w_sel` |
| LOADX | `dff_t <= sext(dff_i)` | `t2_sel` |

With every select at 0 the adder output is 0. That is how `dff_t` is
cleared (WRA) and how the SRAM is zeroed after reset.

## One sample: four sections, one microprogram

Each of the four second-order sections is a direct form II biquad:

```
w[n] = x[n] - a1·w[n-1] - a2·w[n-2]
y[n] = b0·w[n] + b1·w[n-1] + b2·w[n-2]
```

Each section's output is the next section's input. The SRAM holds `w[n-1]` and `w[n-2]` of
section `s` at addresses `2s` and `2s+1`, plus one scratch word at address 8.
That is 9 words. The state ROM (`rtl/state_rom.sv`) holds one section's program,
and the controller runs it four times with the row counter selecting the
section:

```
 0 RD  w1        1 MAC -a1      -> dff_t = x - a1·w1
 2 RD  w2        3 MAC -a2      -> dff_t = w
 4 CPY           5 SM           6 WRA tmp     (w saved, dff_t = 0)
 7 MAC b2  (dff_s still w2)
 8 RD  w1        9 MAC b1      10 WRS w2      (w2 <- w1)
11 RD  tmp      12 MAC b0      -> dff_t = y
13 WRS w1        (w1 <- w; end of section)
```

The coefficients are stored negated (`-a1`, `-a2`) so that every MAC adds.
They are stored in the order they are used, so the column counter simply
counts from 0 to 19 through a sample.

**Timing.** A sample costs 1 load cycle plus 4 × (5 × 20 + 9) = **437 clock
cycles**, and 400 of them are MAC cycles. The controller (`rtl/controller.sv`)
uses four counters (`rtl/up_counter.sv`), with widths from the original floorplan:

* a 6-bit program counter;
* a 5-bit loop counter for the MAC step, which also selects the coefficient bit;
* a 3-bit row counter for the section;
* a 6-bit column counter for the coefficient.

After reset the controller spends 9 cycles zeroing the SRAM before it accepts
samples.

## Serial interface and timing (`rtl/serial_sync.sv`, `rtl/bass_xover_top.sv`)

| port | meaning |
|---|---|
| `clk`, `rst` | system clock; synchronous active-high reset |
| `high_pass` | 1 high-pass, 0 low-pass |
| `freq[1:0]` | cut-off: 0 → 80 Hz, 1 → 120 Hz, 2 or 3 → 160 Hz |
| `bit_clk`, `x_bit` | serial input, LSB first, sampled on rising `bit_clk` |
| `word_clk` | high at the rising `bit_clk` edge that carries the last (MSB) input bit |
| `y_bit` | serial output, LSB first |

`bit_clk`, `word_clk` and `x_bit` pass through a two-flop synchroniser. Both
shift registers are clocked by `clk` and advance on a one-cycle strobe made
from each rising `bit_clk` edge, so `clk` must be at least 3× `bit_clk`. At a
word edge:

* `dff_o` loads the previous sample's result, `dff_t[15:0]`;
* one cycle later the new input word is loaded into `dff_t`, and the
  437-cycle computation starts.

The output is therefore one sample late: the result for input `n` appears
after word edge `n+1`. Its bit `k` is on `y_bit` after the `k`-th following
`bit_clk` edge, and zeros follow bit 15. A word edge that arrives while a
sample is still being computed is ignored.

The frame may have more than 16 bit clocks. Only the last 16 bits before the
word edge are kept.

`high_pass` and `freq` are read during the computation. Change them only while
the core is idle, i.e. more than 441 `clk` cycles after a word edge. The filter
states are kept across a change, so the output has a transient afterwards.

## Coefficients (`rtl/coef_rom.sv`)

The ROM holds 6 settings × 20 words. It is a combinational case table
addressed by `{high_pass, freq, coefficient}`; the loop counter picks the bit.
The values were computed as follows, for a 48 kHz sample rate:

1. Design an 8th-order Chebyshev type II filter with 80 dB stop-band
   attenuation. Place its stop-band edge so that the response is exactly
   -6 dB at the cut-off (80, 120 or 160 Hz), and split it into four
   second-order sections. The poles nearest the unit circle go to the last
   section.
2. Scale each section to unity gain at DC (low-pass) or at fs/2 (high-pass).
   This keeps every internal value below 12,700 × the input. A full-scale
   16-bit input then stays below 4.2·10^8, well inside 31 bits. Because each
   section's peak gain is 1, its output never exceeds the input's range in
   the pass-band.
3. Round `a1`, `a2` and `b0 = b2` to 18 fraction bits. Then pick `b1` as the
   integer that makes the rounded section's gain at DC (low-pass) or fs/2
   (high-pass) exactly 1:
   `b1 = (2^18 + a1 + a2) - 2·b0` or `b1 = 2·b0 - (2^18 - a1 + a2)`, in LSB
   units. Without this step the near-cancelling low-pass sums would lose a
   few percent of gain to rounding.
4. Store each section's words in the order `-a1, -a2, b2, b1, b0`, as
   sign-magnitude.

Response of the rounded table:

* every setting is between -5.2 and -6.1 dB at its cut-off, and within
  0.1 dB of 0 dB an octave into the pass-band;
* the low-pass stop-band is at least 79.8 dB down beyond 2.5× the cut-off;
* the high-pass stop-band is 69.9 dB (80 Hz), 75.5 dB (120 Hz) and 78.6 dB
  (160 Hz) down below cut-off/2.5. Here 20-bit rounding of poles this close
  to `z = 1` is the limit;
* the low-pass and high-pass outputs of one setting, added together, stay
  between -0.1 and +0.5 dB at every frequency. That is why the crossover
  point is -6 dB rather than the usual -3 dB: with -3 dB the sum bulges by
  about 2.5 dB around the cut-off.

At 44.1 kHz the same table moves every cut-off down by 8%.

## Where this implementation departs from the original chip

* **Sample rate.** The original claims 44.1–48 kHz at a 16 MHz clock, which
  allows 333–363 cycles per sample. The five-multiply sections used here need
  437 cycles. At 16 MHz that limits the sample rate to 36.6 kHz; 48 kHz needs
  a 21 MHz clock, and 44.1 kHz needs 19.3 MHz. The original's stated
  multiply rate, over 700,000 MACs per second at 16 MHz, is met (732,000/s).
  The original must have used fewer multiplies per section. Its section form
  is not known, so the general biquad was used. The datapath spends 400 of
  437 cycles (91.5%) in MACs, against more than 95% in the original. The
  other 37 cycles are one input load and nine moves and sign conversions per
  section.
* **Coefficient ROM.** The original ROM is 1440 bits (40 × 36), about 12
  coefficients per setting, and its organisation and contents are not known.
  The table here is 2400 bits, 20 coefficients per setting, with values
  designed as above.
* **State ROM.** The original is a 32 × 13 ROM with compressed words. Here the
  microprogram is 14 six-bit words, written as a case table.
* **Clocking.** The original clocks its serial shift registers directly from
  the bit clock. Here everything runs on `clk`, with synchronised strobes.
* **Output.** The output word is `dff_t[15:0]` with no saturation, and an
  internal overflow wraps. With this table, a filtered full-scale step can
  overshoot 16 bits.
* The clock driver and the pad ring have no RTL.

## Files

| file | contents |
|---|---|
| `rtl/bxf_pkg.sv` | sizes, micro-op and select-bundle types |
| `rtl/bass_xover_top.sv` | top level |
| `rtl/datapath.sv`, `rtl/sram.sv`, `rtl/cla_adder32.sv`, `rtl/cla4.sv` | datapath |
| `rtl/controller.sv`, `rtl/state_rom.sv`, `rtl/up_counter.sv`, `rtl/coef_rom.sv` | control and ROMs |
| `rtl/serial_sync.sv` | serial-port synchroniser |
| `tb/bxf_ref_pkg.sv` | integer reference model of the arithmetic and of one filter step |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_frequency_response.sv` | sine-wave measurement of the whole core's response |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/bxf_pkg.sv tb/bxf_ref_pkg.sv tb/tb_bass_xover_top.sv --top-module tb_bass_xover_top
./obj_dir/Vtb_bass_xover_top
```

Substitute any other `tb/tb_<module>.sv`. Most simulations run in a fraction
of a second; `tb_frequency_response` takes about ten seconds.

What the tests establish:

* `tb_bass_xover_top` runs the core at its default parameters. It streams 400
  samples through all eight `high_pass`/`freq` codes, with a reset in the
  middle of a computation and full-scale steps at the end. Every output word
  must equal the reference model bit for bit. The test also checks:
  * that each sample takes 437 cycles, 400 of them MAC cycles;
  * that negative products and negative conversions occur;
  * that the low-pass removes an fs/2 tone and the high-pass passes it.
* `tb_frequency_response` measures the core's response with sine waves.
  For each cut-off it feeds the sum of three tones, at half the cut-off, at
  the cut-off and at four times the cut-off, through the low-pass and the
  high-pass, with a 48 kHz sample rate assumed. After the start-up transient
  has died away (6000 samples at 80 Hz, fewer at higher cut-offs), it
  measures each tone's gain by correlation. It requires pass-band gain
  within 0.5 dB, -6 ± 1 dB at the cut-off, at least 70 dB of stop-band
  attenuation, and a low-pass + high-pass sum within 0.6 dB. Measured:
  80.3–81.0 dB low-pass and 76.5–81.4 dB high-pass at these tones; the sum
  is within 0.3 dB.
* `tb_datapath` drives the select lines directly. It covers the serial ports,
  sign extension, random MACs, sign-magnitude conversion and the SRAM paths.
* `tb_controller` checks the clear sequence and the select sequence of a
  sample: multiplier bits, product signs, SRAM addresses and cycle count.
* `tb_coef_rom` checks each section of the table for the properties listed
  below.
* `tb_state_rom` executes the microprogram symbolically against the biquad
  equations.
* The remaining testbenches cover the adder, the SRAM, the counters and the
  synchroniser against simple reference behaviour.

`tb_coef_rom` checks these properties of every section:

* equal outer taps;
* stable complex poles;
* unity gain at DC (low-pass) or fs/2 (high-pass);
* the high-pass numerator's zero at DC.

The full response figures in the Coefficients section come from evaluating
the rounded table's transfer function. `tb_frequency_response` confirms them
at three frequencies per setting, on the RTL itself.
