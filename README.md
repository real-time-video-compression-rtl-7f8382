# Real-time differential vector quantization of composite video

This is the RTL of a video compressor that works directly on sampled composite NTSC video. It
samples at four times the colour subcarrier (14.31818 MHz) and handles one sample per clock. It
never buffers a frame for coding. Each sample is predicted from already-coded samples of the
lines above. The prediction error is grouped into 4-sample vectors. Each vector is replaced by
the index of the nearest entry in a small codebook of error vectors. With 32 codewords, 4 × 8 bits
become one 5-bit index, a ratio of 6.4:1.

The hard part is the full codebook search at video rate: one search per 280 ns. A special
associative memory, the VAMPIRE chip, does it. It keeps 32 codewords. For each word it computes
the l1 (city-block) distance in a row of eight bit-slice cells, all words at once. It then finds the minimum
with a set of shared compare lines, not a comparator tree. Up to eight chips combine into a
256-word codebook through an inter-chip compare bus.

The top module is `dvq_system`. Around the encoder and decoder it contains:

- a sync detector;
- a one-frame store that can capture, upload, download and replay frames;
- a host controller that loads codebooks and selects what goes to the video output.

## The coding loop

Each sample `x[n]` goes through these steps:

```
d[n]     = x[n] - p[n]                  9-bit signed difference
c[n]     = clamp(d[n], -128, 127)       8 bits; goes to the search in offset binary (c + 128)
j        = argmin_k  sum_i |c_i - y_k,i|  over the 4 samples of a tile
d^[n]    = y_j,i                        the codeword component for this sample
r[n]     = clamp(p[n] + d^[n], 0, 255)  reconstruction
p[n]     = predictor(r[...])            from reconstructed samples only
```

The encoder predicts from its own reconstruction, never from the input. The decoder repeats the
second half of the loop from the indices alone. So both sides hold the same `r[n]` and errors do
not build up. The decoder is a subset of the encoder: index latch, inverse quantizer, adder with
clamp, and predictor.

A tile is 4 consecutive samples on one line: `4 × 1`. Tiles are counted from reset. The whole
signal is coded, sync pulses included. So a line is always 910 samples and a frame is always
910 × 526 samples.

## Prediction and the subcarrier phase

At 4 fsc there are exactly four samples per subcarrier cycle. Consecutive lines of a field are
180° apart in subcarrier phase. Sample `n` therefore has the same chroma phase as:

- the sample two lines above at the same position, `A = r[n − 2·LINE]`;
- the samples one line above and two positions to either side, `B = r[n − LINE − 2]` and `C = r[n − LINE + 2]`.

The prediction is

```
p[n] = ((B + C)/2 + A)/2
```

Each `/2` is a 9-bit sum with its LSB dropped. Samples from before reset count as 0.

**Hardware.** Three delay lines in a chain produce C, B and A:

- the first delays the reconstruction stream until its output lines up with C;
- the second adds 4 samples, giving B;
- the third adds `LINE − 2` samples, giving A.

Each delay line is a FIFO (`delay_fifo`) run at a fixed fill level. It fills for `LATENCY − 1`
cycles and then reads and writes every cycle.

**Timing constraint.** The reconstruction of sample `m` arrives `RECON_GAP` cycles after `p[m]` is
needed. The encoder's `RECON_GAP` is 10 and the decoder's is 1. So C really is `LINE + 2` samples
behind only if the loop closes within `LINE − 3` cycles. `predictor` takes `RECON_GAP` as a
parameter and sizes the first FIFO as `LINE − 3 − RECON_GAP`.

## The VAMPIRE search

`vampire_chip` is an array of 32 words × 8 bit-slice cells (`vampire_cell`). Each word also has
an end circuit on its MSB side. Cell `b` of a word stores bit `b` of the word's four 8-bit
components. It carries these chains:

| Chain | Direction | What it does |
|---|---|---|
| greater-than | LSB → MSB | For each component: is the input larger than the stored value? The end circuit turns the MSB result into a per-word select `gt[3:0]`. |
| absolute difference | LSB → MSB | Subtracts the smaller operand from the larger one. `gt` decides which is which. |
| sums | LSB → MSB | Adds components 0+1 and 2+3, then the two partial sums. |
| propagate | MSB → LSB | Tells a cell whether its word is still a candidate. |

The carries out of the MSB cell become distortion bits 9 and 8 in the end circuit. The result is
a 10-bit distance of up to 4 × 255 = 1020.

**Finding the minimum** uses ten compare lines, C9 down to C0, shared by all words. It works one
bit at a time, from the MSB:

- every word still in the running, with a 0 in that distortion bit, pulls the line;
- if the line is pulled, every word with a 1 in that bit drops out;
- the propagate chain carries "still in the running" to the next lower bit.

After C0 only the words at the minimum are left. The minimum itself is the complement of the
lines. A priority encoder takes the lowest address among the survivors. All of this settles
within one clock. The chip registers the minimum and the address one cycle after latching the
input, so its latency is 2 cycles and it accepts one vector per cycle.

**Several chips.** `compare_bus` runs the same MSB-first elimination across the chips' minima.
Every chip whose minimum is not the bus minimum disqualifies itself. `vector_quantizer` takes the
lowest surviving chip and outputs `{chip, address}` as the index. With `NUM_CHIPS = 8` this is a
256-word search with an 8-bit index. The quantizer's latency is 3 cycles.

**Number formats.** The input vector and the stored codewords are in offset binary (value + 128).
An unsigned l1 distance is then the same as a signed one. Codewords are loaded once, as signed
bytes. The encoder flips the MSB for the search memory and stores them unchanged in the inverse
quantizer.

## Encoder pipeline and timing

`dvq_encoder` has one register stage per latch of the encoder's block diagram. The path is:

1. subtractor;
2. difference latch;
3. 9-to-8-bit converter;
4. three tile latches, each loaded in its own sample slot, while the fourth component comes straight from the converter;
5. vector quantizer;
6. index latch;
7. inverse quantizer, which is four RAMs (one per component) read in turn into one latch;
8. adder, which gets the prediction delayed by a 9-cycle FIFO;
9. overflow/underflow clamp;
10. reconstruction latch, which feeds the predictor.

Cycle counts, with sample `n` entering in cycle `n` and the tile's last sample in cycle `t`:

| Event | Cycle |
|---|---|
| index of the tile on `index` / `index_valid` | `t + 5`: 8 cycles (559 ns) after the tile's first sample |
| reconstruction of sample `n` on `recon` | `n + 10` (698 ns) |
| index rate | one per 4 cycles, 3.58 M indices/s at 14.31818 MHz |

`dvq_decoder` receives an index in cycle `i` and outputs the tile's four reconstructed samples in
cycles `i+3` … `i+6`. Indices must arrive every 4 cycles without gaps, as they do straight from an
encoder.

## The system around the codec

Ports of `dvq_system`:

- `ad_sample` in and `da_sample` out: the A/D and D/A sample streams.
- `h2d_*` and `d2h_*`: two byte streams with valid/ready handshakes. They stand for the host (SCSI) link.
- `enc_index*` out and `dec_index*` in: the channel side. Loop `enc_index` back to `dec_index` for a local codec.

**Video bus.** The bus carries the A/D stream, or the frame store's playback while the host has
asked for playback. The encoder always codes the bus.

**D/A source.** The D/A shows the bus, the encoder's reconstruction or the decoder's output.

**`sync_detector`** looks for vertical sync. A run of `VSYNC_RUN` samples at or below `SYNC_LEVEL`
is taken as a broad vertical pulse. At 4 fsc a horizontal sync pulse is about 67 samples and a
broad pulse about 380, so the default run is 200. After a field start the detector waits
`HOLDOFF` samples (8 lines) before it looks again. Every second field start is a frame start. The
first field after reset counts as the first field of a frame, because field parity is not
decoded.

**`frame_buffer`** is a 2^19 × 8 store with one port. The priority is capture, then host access,
then playback.

- **Capture** waits for a frame start, then writes `FRAME_SAMPLES` samples.
- **Host access** walks an address counter. The counter is cleared when an upload or download command is accepted. Read data comes back one cycle after the read.
- **Playback** repeats the stored frame. `play_sof` marks each start.

**`controller`** takes these command bytes:

| Code | Command | What follows or happens |
|---|---|---|
| 0 | NOP | |
| 1 | CAPTURE | Store the next whole frame from the A/D. |
| 2 | UPLOAD | Send the stored frame, 478,660 bytes. |
| 3 | DOWNLOAD | Receive a frame, 478,660 bytes. |
| 4 | PLAY | The frame store drives the video bus. |
| 5 | LIVE | The A/D drives the video bus. |
| 6 | OUTSEL | One byte follows: 0 = video bus, 1 = encoder, 2 = decoder. |
| 7 | LOAD_CB | `32·NUM_CHIPS × 4` signed bytes follow, component 0 first. They are written to the encoder's search memory and to both inverse quantizers. |

`busy` is high while a command runs. `status` collects these flags:

- vsync and field;
- capture in progress;
- playback frame start;
- converter saturation;
- the encoder's and the decoder's clamp events;
- decoder output valid.

## Where this departs from the original design, and what is this design's own

**Built as described:**

- the coding loop and the prediction formula;
- halving by dropping the LSB;
- the chain of three FIFOs of 2048 × 9 (run 8 bits wide here);
- the four-RAM inverse quantizer;
- a full-search l1 codebook of 32 words per chip, expandable to 8 chips;
- the latch structure of the encoder;
- the system partition: sync, frame store, controller, encoder, decoder, output select.

**Choices of this design.** The original says little or nothing about these:

- Converter: saturation to ±127/−128. Only the converter's name is given.
- Reconstruction: clamped to 0..255.
- Inside the VAMPIRE cells: every carry chain and the compare-line elimination. The chip is described only at block level.
- Ties: the lowest address and the lowest chip win.
- Pipeline registers: their placement and all latencies.
- Sync detection: the method and thresholds.
- Host interface: the command set and byte protocol.
- Reset: synchronous, active-low, everywhere. It clears registers and counters but not the memories.

**Departures:**

- The key memory beside each VAMPIRE word is not built. The word address is the output code.
- The frame store is 512K × 8. A 910 × 526 frame needs more than 512 bytes.
- The dynamic RAMs are plain arrays, with no refresh.
- The codec's pipeline delays are shorter than the original's stated encoding delay of about 1 µs.

**Not included:**

- the SCSI interface itself, the A/D and D/A converters, and the channel. Their signals are ports.
- later improvements the original only proposes: active-video-only coding, separate chroma, motion-compensated prediction.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`, that compares against values
computed independently. Each ends with a `TB_RESULT checks=… failures=…` line and has a watchdog.

`tb/tb_dvq_ref_pkg.sv` is a plain behavioural model of the whole coding loop. It does a direct
search over the codebook, and computes the predictor from an array of past reconstructions.

The encoder, decoder and system tests compare the hardware against this model sample by sample
and index by index. They also check the cycle timing from the table above and count the saturation
and clamp events.

There are two system benches:

- **`tb_dvq_system`** runs 8 chips (256 codewords) on 40-sample lines and 12-line frames. It loads a codebook, captures, uploads, downloads, plays, switches outputs and codes live video. It counts every mechanism (clip, overflow, underflow, decoder clamps, vsync, frame starts, chip disqualification) and fails if one never happens.
- **`tb_dvq_system_full`** runs the same sequence with every parameter at its default: one chip, 910 × 526 frames, a full-size frame store, real NTSC sync timing. That is about 2.9 M cycles and 11 M checks. It takes under a minute in Verilator. Disqualification cannot happen with a single chip, so this bench does not require it.

## Simulating

Any testbench builds with plain Verilator 5. From the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    -y rtl -y tb +libext+.sv rtl/dvq_pkg.sv tb/tb_dvq_ref_pkg.sv tb/tb_dvq_system.sv \
    --top-module tb_dvq_system -o sim
./obj_dir/sim
```

Replace `tb_dvq_system` with any other testbench name. The system benches include
`tb/tb_dvq_system_body.svh`, so they need `-Itb`.

Parameters worth changing, all on `dvq_system`:

- `NUM_CHIPS`: 1..8, giving 32..256 codewords.
- `LINE` and `LINES`: any line length works as long as `LINE ≥ 15`. The limit comes from the encoder loop.
- `FB_DEPTH`: at least `LINE × LINES`.
- `SYNC_LEVEL`, `VSYNC_RUN` and `HOLDOFF`: for other sync timing.

The codebook is whatever the host loads. The design contains no trained codebook.
