# FAST/SMEX count compressor: 14/15/16-bit particle counts to 8-bit quasi-log codes

Particle counters on the FAST small explorer produce 14-bit counts. An
averaging circuit produces 16-bit words. Telemetry has room for one byte per
value. This design squeezes each word into 8 bits with a quasi-logarithmic
code that works like a tiny floating-point number:

* Counts 0..15 are sent exactly (the linear range).
* Above 15, each octave of counts is cut into 8, 16, 32 or 64 equal steps.
  The step size grows about as fast as the square root of the count, so the
  quantisation stays below the counting (Poisson) noise. At the top of the
  range, where the resolution is near 2 %, the steps grow in proportion to the
  count, which makes the code logarithmic there.
* The code is a variable-length *characteristic* that encodes the position
  of the most significant one. The bits that follow that one come after it,
  as the *mantissa* (3 to 6 bits).

There are three maps: for 14-, 15- and 16-bit words. One circuit serves all
three, selected by a mode input.

The RTL holds two implementations of the same maps:

* `data_compressor` is the sequential circuit of the original FAST/SMEX
  design. It has an input shift register, a 5-bit state machine, a bit
  shifter made of eight 4:1 multiplexers, and an output register. It takes
  3 to 15 clock cycles per word.
* `compression_map` is a combinational version (a priority encoder plus a
  shifter). It covers the 14->8 and 16->8 maps and a further 12->8 map
  (called "BBF" in the source), which the sequential circuit does not have.

`fast_compression_top` places the two side by side.

## The maps

The characteristic field shrinks as the mantissa grows, so all codes are
exactly 8 bits. Below, `x` are the bits after the leading one, "bit k" means
a leading one at position k-1 (for example, bit 16 is the MSB of a 16-bit
word), and steps are given as number x size.

| leading one | 14-bit code | 15-bit code | 16-bit code | 14-bit steps | 16-bit steps |
|---|---|---|---|---|---|
| bit 16 |             |             | `111xxxxx` |        | 32 x 1024 |
| bit 15 |             | `111xxxxx`  | `110xxxxx` |        | 32 x 512 |
| bit 14 | `11xxxxxx`  | `110xxxxx`  | `101xxxxx` | 64 x 128 | 32 x 256 |
| bit 13 | `101xxxxx`  | `101xxxxx`  | `100xxxxx` | 32 x 128 | 32 x 128 |
| bit 12 | `100xxxxx`  | `100xxxxx`  | `0111xxxx` | 32 x 64 | 16 x 128 |
| bit 11 | `011xxxxx`  | `011xxxxx`  | `0110xxxx` | 32 x 32 | 16 x 64 |
| bit 10 | `0101xxxx`  | same        | same       | 16 x 32 | |
| bit 9  | `0100xxxx`  | same        | same       | 16 x 16 | |
| bit 8  | `0011xxxx`  | same        | same       | 16 x 8 | |
| bit 7  | `0010xxxx`  | same        | same       | 16 x 4 | |
| bit 6  | `00011xxx`  | same        | same       | 8 x 4 | |
| bit 5  | `00010xxx`  | same        | same       | 8 x 2 | |
| bit 4  | `00001xxx`  | same        | same       | linear | |
| bits 3..1, zero | `00000xxx` | same | same   | linear | |

In the 15-bit map, bits 15..11 hold 32 steps each, of size 512, 256, 128, 64
and 32.

The codes rise monotonically with the count. Each map uses all 256 codes.

## The sequential compressor

```
 din ──► INPUT SHIFT REGISTER ──top bit──► controller
              │ 6 bits under the top            │ ld / step
              ▼                                 ▼
          BIT SHIFT (8 x MX4) ◄──Q4Q3 (select)── STATE MACHINE (Q4..Q0)
              │               ◄──Q2..Q0 (characteristic)
              ▼ 8
        OUTPUT REGISTER ──► code
```

### The idea

The word is not searched for its leading one in one go. It is shifted left
one place per clock until the leading one reaches the top of the register.
Alongside it, a 5-bit state counter steps through the code prefix of each bit
position it passes. When the leading one arrives, the state already holds the
prefix, and the six bits under the top of the register are the mantissa
candidates. The bit shifter then merges the two into the output byte.

### The state word

The state word is `Q4..Q0`:

* `Q4Q3` is the mantissa length: 11 = 6 bits, 10 = 5, 01 = 4, 00 = 3.
* `Q2..Q0` is the characteristic. The code's prefix is these bits. When
  `Q4Q3` is 11, only `Q2 Q1` are used. When `Q4Q3` is 01 or 00, the prefix
  is padded with leading zeros.

In the code table, each prefix is therefore just `Q2..Q0`, truncated or
zero-padded. Reading the table from the top position down gives these state
sequences:

| mode | sequence (one state per bit position) |
|---|---|
| 14-bit | 11110 10101 10100 10011 01101 01100 01011 01010 00011 00010 00001 00000 |
| 15-bit | 10111 10110 10101 10100 10011 01101 … (as 14-bit) |
| 16-bit | 10111 10110 10101 10100 01111 01110 01101 … (as 14-bit) |

The state machine is a binary down-counter on `Q2..Q0`. `Q4Q3` changes only
at four branch states:

* **Preset** (on `ld`): 11110 in 14-bit mode (`m14`), otherwise 10111.
* **A** `1111x`: `Q4Q3` and `Q2..Q0` both count down (11110 -> 10101).
* **B** 10011 -> 01101.
* **C** 01010 -> 00011.
* **D** 10100 -> 01111, in 16-bit mode only (`m16`).

At 00000 (the linear range) the state holds.

The original notes give branch C with the condition "and not M16". That
conflicts with every table for 16-bit mode. The tables, and the 16->8 map,
keep the same codes below bit 11 in all modes, so they need C in 16-bit mode
as well. This design follows the tables: C fires in every mode.

### Control and the last step

After the load cycle, each clock does exactly one of two things:

* If the top bit is 1, or the state is 00000, the bit shifter's output is
  written into the output register and the conversion ends.
* Otherwise, the state machine steps and the register shifts.

There is one exception: the step from 00001 into 00000 does not shift the
data. Counts 0..7 and counts 8..15 both take their low three bits from
`D2..D0`, so the window must not move for that last step.

### Alignment

On load, the word is shifted so that the mode's top bit sits at bit 15 of
the register: a 14-bit word moves up by two places, a 15-bit word by one.
After that, one datapath serves all modes. Any bits above the mode's width
are dropped.

### Interface and timing (`data_compressor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a conversion. It is ignored while `busy` is high. |
| `mode` | in | 2 | `MODE_14`, `MODE_15`, `MODE_16`. Sampled with `din` on the start edge. |
| `din` | in | 16 | count word |
| `busy` | out | 1 | a conversion is in progress |
| `done` | out | 1 | one-cycle pulse: `code` has just been updated |
| `code`, `code_valid` | out | 8, 1 | last code; `code_valid` is high once a code exists |
| `state` | out | 5 | state word, for observation |

Let P be the mode's top bit index (13, 14 or 15) and L the index of the
leading one:

* If L >= 3, the conversion takes S = P - L steps.
* For words below 8 (including zero), it takes S = P - 2 steps.

`done` is high after S + 2 rising edges, counted from the edge that accepted
`start`. That is 2 cycles for a word whose top bit is set, and 15 cycles for
a small 16-bit count.

## The combinational map (`compression_map`)

This block finds the MSL (the index of the most significant one) with a
priority encoder. A small table gives the characteristic and the mantissa
length for each MSL. A shifter then extracts the mantissa.

* **`MAP_14_TO_8` and `MAP_16_TO_8`** give the same codes as the sequential
  compressor's 14- and 16-bit modes.
* **`MAP_12_TO_8`** reads a 12-bit value from bits 14..3 and ignores bits
  2..0. Up to MSL 7, bits 7..3 are passed through. Above that, the code is a
  3-bit characteristic `MSL-7` followed by the five bits under the leading
  one.

A word with a one above the map's range is flagged on `illegal`, and the
code saturates to `8'hFF`. Such a word has a one in bit 14 or 15 for the
14-bit map, or in bit 15 for the 12-bit map. The source marks these inputs
as illegal but does not say what they should produce; the saturation is this
design's choice.

## Files

| file | contents |
|---|---|
| `rtl/compressor_pkg.sv` | widths, mode and map enums, state-word struct |
| `rtl/input_shift_register.sv` | aligned load, left shift, top bit and mantissa outputs |
| `rtl/compressor_state_machine.sv` | 5-bit state counter with preset and branches A–D |
| `rtl/bit_shift.sv` | eight 4:1 multiplexers selected by `Q4Q3` |
| `rtl/output_register.sv` | 8-bit code register with valid and strobe |
| `rtl/data_compressor.sv` | the sequential compressor and its controller |
| `rtl/compression_map.sv` | combinational 14->8, 16->8 and 12->8 maps |
| `rtl/fast_compression_top.sv` | both compressors side by side |
| `tb/compress_ref_pkg.sv` | reference model built from the step tables, and the latency formula |
| `tb/*_tb.sv` | one self-checking testbench per module |

## What follows the original design, and what does not

These parts follow the original design:

* The block split, the 5-bit state coding, the presets, branches A, B and D,
  the eight-multiplexer bit shifter, and all the code tables.

These parts are this design's own, because the original does not specify
them:

* the `start`/`busy`/`done` handshake, the controller and the reset;
* the step enable, which lets the state counter stop when the leading one is
  found;
* holding the state at 00000;
* the alignment of the word on load;
* dropping bits above the mode's width;
* saturation and the `illegal` flag in the combinational map;
* the latency figures, since the source gives no rate.

Branch C fires in every mode, following the tables rather than the written
rule (see above).

The gate-level schematic of the original state machine was not transcribed.
The next-state logic is written from the transition rules.

The 14-bit particle counters and the 16-bit averaging circuit that feed the
compressor are outside this design. Their words arrive on `seq_din` and
`map_din`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference model in `tb/compress_ref_pkg.sv` is built from the
steps-and-size tables, not from the bit patterns. A mistake in the
bit-pattern logic therefore cannot cancel out in the comparison.

* `data_compressor_tb` compresses all 65,536 words in each of the three
  modes. It checks every code and every latency, that inputs are sampled only
  on the start edge, and that a `start` while busy is ignored.
* `compression_map_tb` checks all three maps over all 65,536 words,
  including the illegal inputs.
* `fast_compression_top_tb` runs random and directed words through both
  compressors. It cross-checks their codes and counts each mechanism: preset
  and branch A, branches B, C and D, reaching the linear range, a conversion
  that ends at once, a start while busy, an illegal map input, and use of
  the 12-bit map. A mechanism that never happened counts as a failure. The
  top has no parameters, so this run is at full size.

To simulate a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/compressor_pkg.sv tb/compress_ref_pkg.sv tb/fast_compression_top_tb.sv \
  --top-module fast_compression_top_tb -o sim
./obj_dir/sim
```

The package files must come first on the command line. The other modules are
found through `-y`.
