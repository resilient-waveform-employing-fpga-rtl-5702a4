# Reconfigurable-bit-loading QAM transceiver

This design shows one idea. A single FPGA datapath can carry 4-, 16-, 64- or
256-QAM, which is 2, 4, 6 or 8 bits per symbol, without changing the
hardware around it. Moving to a denser constellation raises the bit rate
from the same bandwidth. Here that step is one input: `mode` in the
transceiver, or the `BITS` parameter in the board demonstrator.

It has three parts, and `rwfc_top` instantiates all of them:

* **Transmitter** (`ogfdm_tx`): QAM mapping → up-sampling → pulse shaping →
  cyclic prefix → samples to a digital-to-analogue converter.
* **Receiver** (`ogfdm_rx`): samples from an analogue-to-digital converter →
  cyclic-prefix removal → matched filter → down-sampling → QAM decision
  back to bits.
* **Demonstrator** (`qam_board_demo`): ten slide switches set a token. Five
  seven-segment digits show the constellation point it maps to, for example
  ` 9-7F` for the 256-QAM token `11010000`. The letter F stands for the
  imaginary unit.

The converters, antennas and radio link are outside the FPGA. Their samples
are the top's `dac_*` and `adc_*` ports. A back-to-back link is modelled by
wiring `dac_*` to `adc_*`, which is what the top-level testbench does.

## The constellation map

This is the part that most needs explaining. Every other block is generic
signal processing.

A token of B = 2·(mode+1) bits is right-aligned in an 8-bit field, with
`bits[B-1]` as its first bit (the leftmost switch on the board). The upper
half of the token picks the real level and the lower half picks the
imaginary level. Each axis has K = 2^(B/2) levels: the odd integers
−(K−1) … K−1. There is no power normalisation, so 256-QAM reaches ±15.

Each half is mapped to a level in three steps:

1. XOR the half with a fixed mask for the format and axis.
2. Gray-decode the result to an index i.
3. The level is 2·i − (K−1).

Neighbouring levels therefore differ in exactly one bit, so the map is a
Gray map. The masks are:

| format  | B | real mask | imaginary mask | example token → point |
|---------|---|-----------|----------------|-----------------------|
| 4-QAM   | 2 | –         | –              | `10` → 1 − 1j         |
| 16-QAM  | 4 | `00`      | `10`           | `1010` → 3 − 3j       |
| 64-QAM  | 6 | `000`     | `000`          | `110001` → 1 − 5j     |
| 256-QAM | 8 | `0111`    | `0110`         | `11010000` → 9 − 7j   |

The four example points are the fixed requirement. They are the points the
demonstrator must display. A plain binary-reflected Gray map already gives
the 4-QAM and 64-QAM examples. It does not give the 16-QAM and 256-QAM ones.
An XOR mask keeps the Gray property and moves the labelling so that those
two examples come out too. To use a different labelling, change
`mask_re`/`mask_im` in `qam_pkg`. The mapper and demapper both read the
masks from there, so they stay consistent.

## Transmitter

All stages pass complex samples (`*_re`, `*_im`, signed) over valid/ready
handshakes. Reset is asynchronous and active low.
Concurrent assertions in `upsampler`, `shaping_filter` and `cp_insert`
check the handshake rule: an output sample that is not taken stays
unchanged. They fire in any simulator run with assertions enabled.

* **`qam_mapper`**: combinational, with zero latency.
* **`upsampler`** (L = 4): sends each symbol, then L−1 zeros. It accepts one
  symbol every L cycles at most.
* **`shaping_filter`**: a direct-form FIR filter with `NTAPS` real
  coefficients, `COEF`. The default is a rectangular pulse one symbol long:
  four ones. After zero insertion this holds every point for four samples.
  The peak is 4·15 = 60, which fits the 8-bit sample. The output is
  registered, and the filter state advances only on accepted samples.
* **`cp_insert`** (N = 64, CP = 16): collects a block of N samples in one
  buffer. It then sends the block's last CP samples, followed by the whole
  block. While it sends, it is not ready for input, so the output is bursty:
  one block occupies N + (N+CP) = 144 cycles. Only whole blocks leave, so a
  transmission must be a whole number of blocks of N/L = 16 tokens.

The converter side is a valid/ready pair. A converter that takes every
sample ties `dac_ready` high.

## Receiver

The receiver has no back-pressure: one sample arrives per cycle in which
`adc_valid` is high.

* **`cp_remove`**: counts samples in groups of N+CP from reset and drops the
  first CP of each group. It does not search for block boundaries. The first
  sample after reset must therefore be the first prefix sample, which holds
  on a back-to-back link.
* **`matched_filter`**: the time-reverse of the transmit pulse. Pass it the
  same `COEF` as the shaping filter. At a symbol's last sample its output is
  the point times Σ COEF² (4 by default).
* **`downsampler`**: keeps the sample at phase L−1, the matched-filter peak.
  The phase is fixed; there is no timing recovery.
* **`qam_demapper`**: slices each axis with
  i = ⌊(x + K·G) / 2G⌋ clamped to 0…K−1, where G = 2^`GAIN_SHIFT` is the
  chain gain (G = L for the default pulses). It then Gray-encodes i and
  XORs the mask.

A token appears on `out_bits` three cycles after the converter sample that
completes its symbol.

Across block boundaries, removing the prefix leaves exactly the shaped
transmit stream. With the rectangular pulse, every decision depends only on
the L samples of its own symbol. The link is therefore exact, and the tests
require bit-exact recovery.

## Changing the bit loading

`mode` (0 = 4-QAM, 1 = 16, 2 = 64, 3 = 256) feeds the mapper and the
demapper at the same time. No format tag travels with the samples, so
`mode` may change only when both chains are empty. That means the last
token sent has come back, or the converter has sent the last block. The
top-level test switches format this way: first in rising order, then in a
random order.

## Demonstrator

`qam_board_demo #(.BITS(b))` is one build of the board for one format
(b = 2, 4, 6, 8). The other three formats are the same module with a
different `BITS`.

The path is: `sw[b-1:0]` → `qam_mapper` → `qam_display_formatter` → five
`seg7_decoder`s → `hex4`…`hex0`. `hex4` is the leftmost digit, and the
segment outputs are active low, with bit 0 = segment a. The digits are:

    hex4      hex3   hex2      hex1   hex0
    sign(R)   |R|    sign(I)   |I|    F

A sign digit shows `-` for a negative part and is blank for a positive one,
because a plus sign cannot be drawn on seven segments. Magnitudes are
single hexadecimal digits, so the 256-QAM levels 11, 13 and 15 read `b`,
`d` and `F`. Between the formatter and the decoders each digit carries a
5-bit glyph code: 0–15 for the hex digits, 16 for blank and 17 for minus.
Unused switches are ignored.

## Where this design goes beyond the reference, and what it leaves out

The reference design fixes these:

* the stage order of both chains;
* the cyclic prefix;
* the four formats and their bit widths;
* that the demodulator follows the modulator's format;
* the four worked example points;
* the demonstrator's ten switches, five displays and its
  mapper → per-digit decoder structure.

Everything below is this design's own choice, and each one is a parameter
or a localised constant:

* the bit split and the Gray masks;
* the oversampling factor (4);
* the pulse shape (rectangular);
* the block and prefix lengths (64 and 16);
* the sample widths (8 bits out, 12 bits after the matched filter);
* the single-buffer prefix inserter;
* the fixed receive framing and sampling phase;
* the display glyph coding and active-low segments.

Not built:

* **The converters and the radio link**: these are analogue, and they
  appear only as ports.
* **Magnitude/phase (polar) conversion of the points**: no stage produces or
  uses it.
* **The orthogonal filter pair that the OGFDM waveform family normally
  uses**: no coefficients are specified, so the rectangular pulse stands in.
  `COEF` is a parameter, but the demapper's power-of-two gain (`GAIN_SHIFT`)
  assumes Σ COEF² = L. Other pulses need matching gain handling, and
  ISI-free timing must be checked.
* **Synchronisation, noise and channel effects**: the receiver assumes an
  ideal back-to-back link.
* **Per-subcarrier bit loading**: the design carries one stream, and its
  bit loading applies to all of that stream. A multi-carrier variant would
  need one `mode` per subcarrier and a way to tell the receiver about it.

## Files and hierarchy

```
rwfc_top
├── ogfdm_tx:  qam_mapper, upsampler, shaping_filter, cp_insert
├── ogfdm_rx:  cp_remove, matched_filter, downsampler, qam_demapper
└── qam_board_demo:  qam_mapper, qam_display_formatter, 5 × seg7_decoder
qam_pkg:  format enum, level/glyph types, Gray functions, masks
```

Each module is in `rtl/<module>.sv`. Its opening comment gives the
interface and the timing.

## Simulating

Every block has a self-checking testbench, `tb/<module>_tb.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds
the reference constellation that the tests use. It is written separately
from the RTL.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/qam_pkg.sv tb/tb_ref_pkg.sv tb/rwfc_top_tb.sv \
    --top-module rwfc_top_tb -o sim
./obj_dir/sim
```

Replace `rwfc_top_tb` with any other testbench name to run that one. The
other modules are found through `-Irtl`.

`rwfc_top_tb` runs the whole design at its default sizes and loops the
converter samples straight back to the receiver. It sends 11 runs of three
blocks each, in all four formats, with random input gaps and random
converter back-pressure. It checks every token end to end and checks the
demonstrator. It also counts format switches, transmitter stalls,
back-pressure cycles, blocks sent and display readings, and fails if any of
them never happened. The block testbenches check exact values, and, where
the block has timing to check, its cycle timing:

* the upsampler's L-cycle symbol rate;
* `cp_insert`'s N + (N+CP) block time;
* the one-cycle latency of the receive stages;
* the receiver's three-cycle latency.

The mapper test also checks the Gray property directly.
