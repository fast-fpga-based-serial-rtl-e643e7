# Oversampling serial receiver for a clockless 400 Mbit/s line

This design receives a fast single-ended serial line that has no clock: no
clock wire and no clock recovery. Frames of this kind are used between trigger
and data-acquisition modules in nuclear instrumentation. A gigabit transceiver
is used only as a sampler and deserializer. It samples the line at 3.2 GS/s,
eight times per bit, and hands the FPGA fabric 64 consecutive samples on every
50 MHz clock. Everything after that is plain logic. It works on a wide window
of samples at once and needs one clock per stage, so:

* each frame leaves the chain a fixed number of clocks after it arrived
  (5 clocks from the word that holds its start bit), and
* frames may follow each other with no gap: a new frame can begin in every
  sample slot, and every sample is checked as a possible frame start exactly once.

The RTL also contains the logic of a matching frame tester. It sends counter
frames and can deliberately shorten the logical 1 or logical 0 runs, which is
how the receiver's tolerance to pulse-width distortion is measured.

## Frame and sample conventions

| item | value (default) |
|---|---|
| samples per clock `W` | 64 (1:64 deserializer, 3.2 GS/s at 50 MHz) |
| samples per bit | 8 (`SPB_X16` = 128, the ratio ×16) |
| frame | 5 idle bits (0), 1 start bit (1), 4 data bits = 80 samples |
| idle line | logical 0 |
| sample order | bit 0 of a word or vector is the earliest sample |
| data order | the first data bit sent is the MSB of `frame_data` |

The line is a NIM signal: −16 mA into 50 Ω means 1 and 0 V means 0. An analog
comparator in front of the transceiver turns it into a logic level. The RTL
expects logical 1 to arrive as a 1 sample.

## Receive chain

```
rx_word[63:0] ─► frame buffer ─► majority filter ─► start comparators ─► sampling-point ─► output FIFO ─► readout
   (3.2 GS/s)    3 words=192     5-tap, 188 out    64 in parallel       selection         32768 x 8
```

Each block is one register stage: `rx_frame_buffer`, `rx_majority_filter`,
`rx_start_detect`, `rx_data_reconstruct` and `rx_output_fifo`.
`serial_receiver` wires them together.

### Frame buffer (`rx_frame_buffer`)

A frame is 80 samples long, and 32 samples of idle line are needed in front of
it to recognise it. The frame can start anywhere in a word. So one word is
not enough, and the buffer keeps the last three words as a single 192-sample
vector (oldest samples at bit 0). Think of the middle word as "the word being
searched". The word before it supplies the idle run in front of a start bit.
The word after it supplies the rest of the frame.

### Majority filter (`rx_majority_filter`)

Every sample is replaced by the majority of the five samples centred on it,
at all 188 positions where a full window exists. Output bit `j` lines up with
buffer sample `j+2`. A spike or dropout of 1 or 2 samples disappears. A run of
3 or more samples keeps its length and position. Clusters of 3 wrong
samples within 5 are not removed.

### Frame start detection (`rx_start_detect`)

The start pattern is `START_ZEROS` (32) zeros immediately followed by a one.
There is one comparator for each of the 64 positions of the middle word.
Comparator `o` looks at filtered samples `62+o-32 … 62+o` (62 is the middle
word in filtered coordinates). A priority encoder takes the earliest match.
This gives `trig` and a 6-bit `offset`. The buffer advances by exactly 64
samples per clock, the same width as the comparator array. So every sample of
the line falls under exactly one comparator once, and no frame is seen twice
or missed because of a word boundary.

The pattern length is chosen so that data can never look like a start. Inside
a frame, a run of zeros followed by a one lasts at most three data bits
(24 samples), plus up to 7 samples of distortion. That is below 32. The idle
run in front of the start bit is 40 samples, and at least 33 after
distortion.

### Sampling-point selection (`rx_data_reconstruct`)

This block is the core of the design, and its behaviour decides the
distortion tolerance.

1. The filtered vector is shifted right by `62 + offset − 1`. Sample 0 of the
   result is then the first sample of the start bit, with one sample of
   context on each side.
2. There is no receive clock, so bit windows come from the nominal ratio:
   bit `k` (k = 0 is the start bit) covers samples
   `round(k·SPB_X16/16) … round((k+1)·SPB_X16/16) − 1`. At 8 samples per bit
   these are 0–7, 8–15, … 32–39.
3. *Edge avoidance*: a sample may serve as a sampling point only if both of
   its neighbours have the same value. A sample right next to a transition
   never qualifies. A bit can therefore only be read from a run of at least
   three equal samples.
4. In each window the candidates are tried from the centre outwards: 4, 3,
   5, 2, 6, 1, 7, 0. The first usable one gives the bit.
5. If any window has no usable sample, or the start bit does not read as 1,
   the frame is *rejected* (`frame_reject`). Otherwise it is *accepted*
   (`frame_valid`, `frame_data`).

Because the reference point is the rising edge of the start bit, the window
positions move with rising edges. They do not move with falling edges. This
asymmetry shapes the tolerance results below.

### Output FIFO (`rx_output_fifo`)

Accepted frames are written one byte each (data zero-extended) into a
32768-entry FIFO, 32 kB in total. Rejected frames are not stored. With
counting test data, a lost frame therefore shows up as a gap in the sequence.
Once the FIFO is full, `capture_stopped` is set. Incoming frames are then
dropped, even after the reader has started to empty the FIFO, until
`capture_rearm` is pulsed. This keeps one unbroken block of frames for the
slow readout. The read port (`fifo_rd_en`, then `fifo_rd_data` and
`fifo_rd_valid` one clock later) is meant for an external USB 2.0 bridge.

## Timing

| event | clock |
|---|---|
| word with the start bit presented on `rx_word` | sampled at edge *n* |
| word in the middle of the buffer | after edge *n*+1 |
| filtered vector | after edge *n*+2 |
| `trig`/`offset` | after edge *n*+3 |
| `frame_valid` or `frame_reject`, FIFO write | after edge *n*+4 |

Throughput is one 64-sample word per clock, with no stalls. Back-to-back
frames (an 80-sample period) are received without loss.

## Frame tester (`frame_tester`)

The tester uses the same sample grid (64 samples per clock, 8 per bit). It
has three parts:

* `tx_up_counter`: a 4-bit counter. Its value is the data of the next frame.
  It advances on the builder's `increment` while `enable` is high.
* `tx_bit_duration_ext`: builds the 88-sample waveform of a frame: 5 idle bits,
  the start bit, 4 data bits and one spare idle bit that catches spill-over.
  It can shorten every run of one logical value by `distortion` samples.
  floor(D/2) samples come off the run's leading edge and the rest off its
  trailing edge, and the opposite value gets the freed samples. The frame's
  duration stays the same. For shortened ones this is an erosion of the
  waveform; for shortened zeros it is a dilation.
* `tx_frame_builder`: a shift register of 88+64 samples. Once every `period`
  samples the frame waveform is OR-ed in at the exact sample offset where the
  frame is due. The register then shifts out 64 samples per clock as
  `tx_word`. Frame *k* starts at stream sample *k*·`period`.

Transceivers, cabling and NIM level shifting between `tx_word` and `rx_word`
are outside the RTL. The testbenches connect the two directly or through a
channel model.

## Distortion tolerance

This is the output of `tb_serial_rx_dynamic`: 2000 frames per setting, a
period of 1000 samples (3.2 MHz frame rate), loop-back with no noise. "Error"
counts wrong data, rejected frames and missed frames.

| value shortened | 2 of 8 (25 %) | 3 of 8 (37.5 %) | 4 of 8 (50 %) | 5 of 8 (62.5 %) |
|---|---|---|---|---|
| logical 1 | 0 % | 0 % | 100 % (half wrong, half rejected) | 100 % |
| logical 0 | 0 % | 0 % | 0 % | 93.8 % (wrong data) |

Lab measurements of the original hardware are reported as error-free up to
50 % for both values. They showed 38.2 % (zeros) and 53.8 % (ones) errors at
62.5 %. This RTL is error-free up to 37.5 % in both directions. It matches the
lab result for shortened zeros, but fails for shortened ones already at 50 %.
The reason is the reference point. With ones shortened by 4 samples, a lone
1 bit fills only samples 0–3 of its window. The centre-first search
(4, 3, 5, …) then finds a usable 0 at sample 5 before it reaches sample 2. The
tester's way of distorting (half the samples from each edge) and the search
order are choices of this design. The source gives neither, and the lab
generator may have distorted bits differently. As in the lab, the receiver is
more sensitive to shortened ones than to shortened zeros.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 64 | samples per clock |
| `SPB_X16` | 128 | samples per bit × 16; at least 64 (4 samples per bit) |
| `DATA_BITS` | 4 | data bits per frame |
| `IDLE_BITS` | 5 | idle bits in front of the start bit (tester) |
| `START_ZEROS` | 32 | zeros required before the start bit |
| `BUF_WORDS` | 3 | words in the frame buffer |
| `FIFO_DEPTH` | 32768 | output FIFO entries (power of two) |
| `FIFO_WIDTH` | 8 | bits per FIFO entry (≥ `DATA_BITS`) |

Assertions check the geometry during elaboration:
`START_ZEROS ≤ W−2`, and the frame tail must fit behind the search window
(`W−2 + W−1 + frame length < W·BUF_WORDS − 4`). Another frame format, or
10 GS/s sampling (25 samples per bit, a 250-sample frame), needs larger
`BUF_WORDS` and `START_ZEROS` to match. The defaults do not hold it.

Sizes after generic synthesis of the defaults: about 640 flip-flops in
the receiver chain, 1300 word-level cells for the majority filter, and
270 for the 64 start comparators.

## What the RTL does not contain

* The NIM input comparator and the tester's output level shifting (analog).
* The receive and transmit transceivers (vendor SERDES hard IP). Their
  parallel words are the `rx_word` and `tx_word` ports.
* The USB 2.0 bridge. The FIFO read port is brought out instead.
* The tester's enable push button (the `tx_enable` port).

## Design choices not fixed by the source

* Reset: active-low and synchronous. Registers clear, the buffer fills with
  idle (0).
* Sample and data bit order as in the conventions table.
* Start pattern length (32), buffer depth (3 words), search window (the
  middle word) and earliest-match priority.
* Majority filter alignment. Its 4 edge samples are dropped.
* Usable-sample rule (both neighbours equal), centre-out search order, and
  rejection when the start bit does not read as 1.
* FIFO entry of one byte per accepted frame. Rejected frames are not stored.
  A re-arm input restarts capture.
* The tester runs at the receiver's sample rate, takes samples from both
  edges when distorting, and has a run-time frame period in samples.

## Simulating

All code is SystemVerilog-2017. `rtl/serial_rx_pkg.sv` must come first; the
other modules are found by name. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/serial_rx_pkg.sv tb/tb_serial_rx_top.sv --top-module tb_serial_rx_top
./obj_dir/Vtb_serial_rx_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_rx_frame_buffer`, `tb_rx_majority_filter`, `tb_rx_start_detect`, `tb_rx_data_reconstruct`, `tb_rx_output_fifo` | each receiver stage against a reference model; the sampling-point stage also at 8.5 samples per bit and with a line 6 % slower than the assumed ratio |
| `tb_tx_up_counter`, `tb_tx_bit_duration_ext`, `tb_tx_frame_builder`, `tb_frame_tester` | the tester parts |
| `tb_serial_receiver` | the receiver chain on a drawn stream: ±2-sample edge jitter, 1–2 sample glitches, back-to-back frames, rejected frames, exact 5-clock latency, FIFO full, readout and re-arm (FIFO reduced to 16) |
| `tb_serial_rx_top` | tester looped into receiver through a channel with glitches and bursts; 1000-, 256- and 80-sample periods; FIFO stop and re-arm (FIFO reduced to 64); distortion 25–62.5 %; counts that every mechanism occurred |
| `tb_serial_rx_full` | all defaults: static test at a 256-sample period until the 32 kB FIFO stops capture (131 075 clocks), then reads out all 32768 entries and checks the counter sequence |
| `tb_serial_rx_dynamic` | all defaults: the distortion table above |

Each testbench finishes in a few seconds or less with Verilator.
