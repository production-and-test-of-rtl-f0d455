# Two-channel bi-dimensional compressor for silicon drift detector readout

A silicon drift detector delivers, for every event, a matrix of 8-bit
samples: one row per anode (256 anodes per half-detector), one column per
drift-time sample (8 to 256 samples per anode). Almost all of those pixels
hold digitised noise. A real hit spreads over a few neighbouring pixels, in
both the anode and the drift-time direction. This design compresses an event
by keeping only the pixels that sit in such a cluster and sending them as
short variable-length records packed into 16-bit words. It handles the two
half-detectors of one detector with two independent channels. Each channel
takes one 8-bit sample per clock (40 MHz target) and writes at most one
16-bit word per clock.

The RTL follows the published description of the CARLOS readout chip of the
ALICE SDD. That description gives the cluster criterion exactly. It names
the rest: a "Huffman-like" encoding, position-or-continuation records,
packing into 16-bit words, serial configuration, four 256-word RAMs. The
encoding table, the record layout, the framing and the configuration
protocol are this design's own choices. They are listed under
[Where this design departs from, or fills in, the description](#where-this-design-departs-from-or-fills-in-the-description).

## The cluster criterion

Every pixel is judged together with its four neighbours, a five-pixel
**cross**:

```
            NORTH               (same sample, previous anode)
    WEST   CENTER   EAST        (previous / next sample, same anode)
            SOUTH               (same sample, next anode)
```

The cross is a cluster when some pixel of the cross is **above the high
threshold** and **another** pixel of the cross is **above the low
threshold**. "Above" means strictly greater. When the test passes, the
CENTER value is sent, even if the centre itself is below both thresholds.
A lone noise spike, one high pixel with quiet neighbours, is rejected,
because it has no second pixel above the low threshold. `cluster_detect`
implements the rule literally, as an OR over which pixel carries the high
hit. It is therefore correct even if the two thresholds are programmed the
wrong way round. Neighbours outside the matrix count as zero: the first and
last anode, and the first and last sample of an anode.

## Building the cross from a stream (`cross_window`)

This is the part that needs the most care. Samples arrive anode by anode:
all samples of anode 0, then anode 1, and so on. In this flat stream, with
`LEN` samples per anode, the neighbours of position `q` are `q-LEN` (NORTH),
`q+LEN` (SOUTH), `q-1` (WEST) and `q+1` (EAST). So a cross can only be
judged once its SOUTH pixel, `LEN` samples ahead, has arrived.

Each channel keeps the two previous anodes in two 256-word single-port RAMs
with read-first behaviour. Together with the other channel's two, these are
the four RAMs of the chip.

- RAM A is addressed by the sample index of the incoming pixel. In one
  access it returns the pixel one anode back and stores the new one. It is
  a delay of exactly one anode.
- RAM B is chained behind RAM A. Its address is the sample index one push
  earlier, because RAM A's read data arrives one clock later. It delays the
  stream by a second anode.
- A three-stage shift register on RAM A's output holds EAST, CENTER and
  WEST. Short register chains line the incoming pixel (SOUTH) and RAM B's
  output (NORTH) up with the centre column.

Everything advances only on `push`, so the input may have gaps. The cross
for stream position `q` is complete after push `q + LEN + 2`. It is
presented, with its anode and sample index, in the clock after that push
(`win_valid`).

Border pixels are masked to zero by comparing the centre position with the
matrix edges. The pipeline runs across anode boundaries without stopping,
so the RAMs and registers never need to be cleared between anodes or
events. Whatever is stale is masked.

To bring out the crosses of the last anode, the channel pushes `LEN+2`
zero samples of its own after the last real sample of an event.

## Records

The encoder (`cluster_encoder`) writes one record per kept pixel and
nothing for a rejected pixel. Because pixels are judged in scan order, a
kept pixel whose previous sample in the same anode was also kept is a
**continuation**: its position is "previous one + 1 sample" and is not
sent. Every other kept pixel is **isolated**, or the start of a larger
cluster, and carries its position.

| record        | bits                                                      | length   |
|---------------|-----------------------------------------------------------|----------|
| isolated      | `1`, anode (8), sample (8), value code                    | 22 to 27 |
| continuation  | `0`, value code                                           | 6 to 11  |

| value `v`     | value code            | length |
|---------------|-----------------------|--------|
| `v < 16`      | `0` then `v[3:0]`     | 5      |
| `16 <= v < 64`| `10` then `v[5:0]`    | 8      |
| `v >= 64`     | `11` then `v[7:0]`    | 10     |

The value code is a fixed prefix code with short codes for small values,
in the spirit of a Huffman code. It is not a Huffman code computed from
data statistics. A continuation never crosses an anode boundary.

## Packing and the end of an event (`word_packer`)

Records are appended, first bit first, to a 64-bit accumulator. Whenever
16 bits are available the oldest 16 leave as a word, with the first bit in
bit 15. At the end of an event the remaining bits are sent in a final word
that is filled with ones and flagged `out_last`. The fill always has at
least one bit: if the event's bits fill whole words, or the event sent
nothing, the last word is `16'hFFFF`. A decoder stops when fewer than 22
bits are left and they begin with `1`. No real record that begins with `1`
is that short.

Rate: at most one record arrives per clock (27 bits at most), and one word
leaves per clock. Two isolated records can only be back to back on the two
sides of an anode boundary, so the average input stays below 16 bits per
clock. An exhaustive search over hit patterns puts the peak accumulator
occupancy at 53 bits. Overflow is still flagged (`overflow`, sticky) and
asserted against in simulation.

The fill rule needs the anode and sample fields to have at least 11 bits
between them. The default 256 x 256 sizes give 16. With smaller
`ANODES`/`MAX_SAMPLES` the one-filled tail can be mistaken for a short
isolated record.

## Event control and timing (`compressor_channel`)

- An event is `ANODES` anodes of `LEN` samples. The first valid sample after
  reset, or after the previous event closed, is anode 0, sample 0. There are
  no start or stop signals.
- The sample length and the thresholds are captured with the first sample
  and held for the whole event. The configuration can therefore be
  rewritten while an event runs, and takes effect with the next event.
- After the last sample `busy` rises. The channel flushes the last anode
  (`LEN+2` clocks) and waits for its `out_last` word: about `LEN+6` clocks
  in all. Samples offered while `busy` is high are dropped and set the
  sticky `in_err`.
- Latency from a pixel to its record leaving the encoder: `LEN+2` pushes,
  plus one clock each for the cross register and the encoder. The packer
  adds one more clock, plus any words queued ahead of it.

## Configuration (`serial_config`)

`cfg_sdi` is shifted in, most significant bit first, on each clock with
`cfg_en` high. A `cfg_load` pulse copies the 40-bit shadow register into the
active configuration. `cfg_sdo` is the shadow's top bit, for daisy-chaining
or read-back. Frame, first bit first:

```
len_m1[7:0]  ch0.th_hi[7:0]  ch0.th_lo[7:0]  ch1.th_hi[7:0]  ch1.th_lo[7:0]
```

`len_m1` is the number of samples per anode minus one. Values below 7 are
raised to 7, so an anode has at least 8 samples. After reset the length is
256 and all thresholds are 255, so nothing passes until the chip is
configured. Both channels share the length; each has its own threshold
pair.

## Files

| file | contents |
|------|----------|
| `rtl/carlos_pkg.sv` | pixel, cross and threshold types; widths; the value-code function |
| `rtl/carlos_top.sv` | top: configuration register and `CHANNELS` compressor channels |
| `rtl/compressor_channel.sv` | event control, flush; instantiates the four blocks below |
| `rtl/cross_window.sv` | two chained line buffers and alignment registers, border masking |
| `rtl/line_buffer_ram.sv` | 256 x 8 single-port read-first RAM |
| `rtl/cluster_detect.sv` | two-threshold cross test (combinational) |
| `rtl/cluster_encoder.sv` | isolated / continuation records, value code |
| `rtl/word_packer.sv` | bit accumulator, 16-bit words, end-of-event fill |
| `rtl/serial_config.sv` | serial shift register and active configuration |
| `tb/tb_carlos_model_pkg.sv` | reference model: cross test on a whole matrix, expected records, stream decoder, synthetic event generator |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

The top's parameters are `ANODES` (256), `MAX_SAMPLES` (256) and
`CHANNELS` (2). The RTL is synthesizable. The line-buffer RAM is written as
an array. On a chip it would map onto a RAM macro with the same
single-port, read-first behaviour.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A
watchdog ends a run that hangs. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/carlos_pkg.sv tb/tb_carlos_model_pkg.sv \
  tb/tb_carlos_top.sv --top-module tb_carlos_top -o sim && ./obj_dir/sim
```

Replace `tb_carlos_top` with any other `tb/tb_<block>.sv`. `tb_carlos_top`
runs the design at its full default size, with both channels streaming at
once. It runs these events:

- 256 x 8: the shortest anode.
- 256 x 200: a physics-sized event.
- 256 x 256: the largest event.
- 256 x 192: a 48k-sample event.

The data are synthetic: low noise with clusters and lone spikes, uniform
random values, and bell-shaped noise. The output words are decoded back
into records and compared with the reference model. The testbench also
checks:

- that no input is refused during an event;
- that each event closes within `LEN+2` pushes plus a few clocks;
- that a sample offered while busy is refused and flagged.

It counts isolated and continuation records, border crosses, rejected
spikes, the three code lengths, input gaps and configuration changes. It
fails if any of these never occurred. It simulates about 340k samples in
well under a second.

`tb_threshold_sweep` sends one 256 x 200 event through both channels five
times. Each time it raises the high threshold on channel 0 and the low
threshold on channel 1. It checks every output against the model, and
checks that the number of kept pixels never grows as a threshold rises. It
also prints the compression ratio, input bits over output bits, of each
run. On its synthetic event this ranges from about 30:1 to 150:1.

The block testbenches use smaller sizes
(`compressor_channel`: 32 anodes x up to 64 samples).

## Where this design departs from, or fills in, the description

Taken from the description:

- the cross-shaped cluster and the two-threshold rule;
- records with a position for isolated clusters, and without one for
  continuations ("previous one + 1");
- no output for rejected pixels;
- 8-bit samples and 16-bit output words;
- 256 anodes and 8 to 256 samples per anode;
- two channels;
- four 256-word RAMs;
- serial configuration.

This design's own choices:

- **Value code**: fixed three-class prefix code, shown above. The real
  encoding table is not given, so the compressed stream is not
  bit-compatible with the original chip.
- **Record layout**: the one-bit flag and the 8 + 8 position fields.
- **Event framing**: implicit, by counting. The end of an event is marked by
  the one-filled, `out_last` word.
- **Border rule**: neighbours outside the matrix count as zero.
- **Flush period**: a short busy period after each event, about `LEN+6`
  clocks, during which input is refused. The original chip's behaviour
  between back-to-back events is not known.
- **Serial protocol**: the frame, the load strobe and the reset values.
- **RAM use**: two RAMs per channel, chained as anode delays. Read-first,
  single-port RAMs are assumed.

Not included:

- The chip's JTAG switch for the front-end electronics, whose behaviour is
  not given.
- The link to the counting room. The words are brought out as parallel
  ports instead.
- Pads, and the radiation-tolerant layout (enclosed-gate transistors).

Known limits:

- No timing closure is claimed for 40 MHz.
- The test data are synthetic. No detector or test-beam data were
  available.
