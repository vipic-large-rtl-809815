# VIPIC-L readout without RStrobe

VIPIC-L is a pixel detector readout chip. During a time frame each pixel counts
its hits. At the end of the frame a sparsifier reads out only the pixels that
have hits, one at a time, and a high-speed serializer sends the counts off the
chip. The frame boundaries are set by an external clock, TSCLK.

Earlier designs used a global strobe, RStrobe, which was sent to every pixel for
each word read. That strobe is fast, loads the whole matrix and must reach all
pixels at the same moment. This design removes it. The *ack-hit* line that the
sparsifier already routes to the selected pixel now carries the timing of the
readout:

* the line goes **low** at the selected pixel: the pixel puts its count on the bus;
* the line goes **high** again: that pixel's readout is over. The pixel drops its
  request and the priority encoder moves on to the next pixel.

The controller pulses ack-hit synchronously to the serializer clock, once per
serial word. Acknowledgement, serialization and output therefore all run on one
clock. The difficult part is TSCLK. It is asynchronous, may arrive at any time
and starts a new frame in every pixel. The design deals with it by **stretching**
the ack-hit pulse over the frame edge, as described below.

## Reading one pixel

```
clk          _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
ack-hit orig ‾‾‾\___________________________/‾‾‾\___________________________/
pre (latch)  ___________________________/‾‾‾\___________________________/‾‾‾\
bus          ===X pixel n count ============X=X pixel n+1 count =========X=X
                 <----------- word_len cycles (7..20) ---------->
```

* `vipic_ackhit_gen` makes the original ack-hit. It is one clock high every
  `word_len` cycles. `word_len` is a runtime input between 7 and 20, and values
  outside that range are clamped.
* `vipic_sparsifier` routes the line to the requesting pixel with the lowest
  index. Every other pixel sees the line high.
* `vipic_pixel` drives its count while its ack-hit is low. When it samples a
  rising edge it clears its request and its read-out register. One cycle after
  that edge the encoder has already picked the next pixel, which sees ack-hit
  fall.
* `vipic_serializer` latches the bus at the clock edge where ack-hit rises. This
  is the edge that ends the cycle flagged by `pre_*`. It then shifts the word
  out MSB first during the next `word_len` cycles, so words follow one another
  with no gap.

A word contains only the pixel's count. A pixel that is read always has at
least one hit, so an all-zero word means "no data". A count that does not fit in
`word_len` bits is sent as all ones. The pixel address goes out in parallel on
`word_addr_*`, together with `word_valid_*`.

## The frame boundary: stretching ack-hit

At each rising edge of TSCLK the pixels move their counter into the read-out
register and raise their request if they counted anything. Any data of the old
frame that has not been read is overwritten. The first pixels of the new frame
matter more than the last pixels of the old one.

TSCLK could move the "low state" of ack-hit to a different pixel in the middle of
a word. That pixel would then have too little time to settle its output before
the serializer latches it. Even a TSCLK edge near an ack-hit edge is unsafe. Each
pixel sees the two signals with its own routing delay, so the falling edge of
ack-hit could race the rising edge of TSCLK. The controller therefore does four
things (`vipic_tsclk_sync`, `vipic_stretcher`):

1. It synchronises TSCLK to the serializer clock. Its rising edge becomes a
   one-cycle pulse, `ts_det`.
2. From the `ts_det` cycle, the ack-hit line sent to the matrix is held high.
   It stays high until the original ack-hit falls after its **second** rising
   edge that follows the detection (`PULSES = 2`).
3. Every word latched while the stretch is active is forced to zero. There are
   always exactly two such words per lane:
   * the word of the pixel that was cut off;
   * the empty step inside the stretch.
   The serializer keeps latching at exactly the same times. It never waits.
4. TSCLK reaches the pixels (`tsclk_pix`) `DT` cycles after `ts_det`. At that
   point ack-hit is already high everywhere in the matrix, so the two cannot
   race. The first pixel of the new frame is read in the first full step after
   the stretch.

```
TSCLK (sync)      ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
ack-hit original  ‾\_______/‾\___________/‾\___________/‾\___________/‾\
ack-hit to matrix ‾\_____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___________/‾\___________/‾\
TSCLK to pixels   ____________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
word latched            zero        zero     1st pixel    2nd pixel
                      |<-DT->|
```

The shortest stretch lasts one word of the shortest length plus two cycles
(9 cycles at `word_len = 7`). `DT` must finish inside it, and an elaboration
assertion in the top checks `DT + 1 < (PULSES-1)*7 + 2`. `DT` must also be longer
than any delay difference between ack-hit and TSCLK across the matrix. That
difference depends on the layout, so `DT` is a parameter.

With `PULSES = 1` the stretch ends at the falling edge of the nearest original
pulse. This is the simpler variant, but it leaves no safe place for `DT`. The
assertion rejects it in the top, and it is kept only in `vipic_stretcher`.

Two assertions guard the timing at run time. The top checks that `tsclk_pix`
rises only while both ack-hit lines to the matrix are high. The sparsifier
checks that ack-hit is never low at more than one pixel.

A frame edge costs two words per lane. This is the price of letting TSCLK come
at any time without changing the tempo of the readout.

## Two interleaved halves

The matrix is split into two halves, R and L. Each half has its own sparsifier,
ack-hit line (ACKHIT_R, ACKHIT_L), stretcher and serial output. ACKHIT_L runs
half a word after ACKHIT_R, so the two halves never latch in the same cycle. One
TSCLK detection starts the stretch in both halves. Each half counts its own two
useless words.

## Module map

| module | role |
|---|---|
| `vipic_pkg` | word-length limits (7, 20), `word_len_t`, `clamp_len` |
| `vipic_pixel` | hit counter, read-out register, request/ack-hit handshake |
| `vipic_sparsifier` | priority encoder; routes ack-hit; data and address mux |
| `vipic_half_matrix` | N pixels and their sparsifier |
| `vipic_ackhit_gen` | original ACKHIT_R / ACKHIT_L and their `pre_*` latch flags |
| `vipic_tsclk_sync` | TSCLK synchroniser, edge detector, delay `DT` to the pixels |
| `vipic_stretcher` | ack-hit stretch and zero-forcing over a frame edge |
| `vipic_serializer` | word latch, MSB-first shift register |
| `vipic_large_top` | two halves, one generator, one TSCLK stage, two stretchers and two serializers |

Top parameters: `N_HALF = 64` pixels per half, `DT = 4`, `PULSES = 2`. At these
defaults the design synthesises to about 5.5k flip-flops. Almost all of them
are the 40 counter and register bits in each of the 128 pixels.

## What comes from the architecture and what is chosen here

These follow the architecture:

* no RStrobe;
* the ack-hit rising edge ends a pixel's readout and steps the priority encoder;
* ack-hit pulses one serializer clock wide, synchronous and continuous;
* the word length range of 7 to 20 bits;
* the stretch from the detected TSCLK edge to the second ack-hit pulse;
* all-zero words during the stretch, with unchanged latch times;
* TSCLK delayed to the pixels by some serializer clock cycles;
* two interleaved ack-hit lines;
* new-frame data taking priority over unread old data.

These are choices of this RTL:

* the matrix size. No pixel count was given; 2 x 64 was chosen.
* the pixel modelled as synchronous logic that samples ack-hit and TSCLK with the
  serializer clock. A real pixel would use the edges directly.
* a hit entering as a one-cycle pulse;
* a 20-bit saturating counter, double-buffered into a read-out register at the
  frame edge;
* lowest-index-first priority;
* the half-word offset between R and L;
* a two-flop TSCLK synchroniser and `DT = 4`;
* MSB-first bit order, saturation to all ones, a parallel address output, and
  one serial output per half;
* a `ts_det` that arrives in the same cycle as an original pulse does not count
  that pulse. A new TSCLK edge during a stretch restarts the stretch.

Not part of this RTL:

* the analog front end that produces the hits;
* the RStrobe-based readout of the earlier chip, which is the baseline this
  design replaces;
* any link framing beyond the per-word `word_start` marker.

Nothing here has been checked against a clock rate. The target serializer clock
is up to 400 MHz, but timing depends on the process and layout. The
combinational priority encoder over 64 pixels is the likely critical path.

## Simulating

Every file in `rtl/` holds one module or package of the same name, and every
testbench in `tb/` is self-checking. Each testbench prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/vipic_pkg.sv tb/tb_vipic_large_top.sv --top-module tb_vipic_large_top \
    --Mdir obj -o sim
./obj/sim
```

| testbench | checks |
|---|---|
| `tb_vipic_pixel` | request only for frames with hits; data only while ack-hit is low; end of readout on the rising edge; overwrite by a new frame; hit in the edge cycle; saturation |
| `tb_vipic_sparsifier` | random request patterns against a reference scan: selection, ack-hit routing, bus |
| `tb_vipic_ackhit_gen` | for every length 7..20 and clamped values: pulse width, period, R/L offset, `pre_*` lead |
| `tb_vipic_tsclk_sync` | asynchronous TSCLK: one detection per rising edge, latency, `DT` for 4 and 1 |
| `tb_vipic_stretcher` | against a stretch computed from the whole trace, for `PULSES` 2 and 1, including detections in and just before a pulse and during a stretch |
| `tb_vipic_serializer` | serial stream vs. expected word for several lengths, zero forcing, saturation, gap-free words |
| `tb_vipic_half_matrix` | 8 pixels: words in address order with the right counts, empty frames, frames cut short |
| `tb_vipic_large_top` | the whole chip at default size for word lengths 20, 7 and 13, with an asynchronous TSCLK |

`tb_vipic_large_top` checks all of the following against a hit-counting
reference model:

* every word, including its order, count, saturation and address;
* the two zero words after each TSCLK edge, and the first new-frame pixel in
  the third word;
* the serial-to-parallel agreement;
* the interleaving of the two halves.

It also counts each mechanism and fails if one never happens: stretches, zero
words, complete frames, frames cut by TSCLK, empty frames, saturated words,
data on both halves, and each word length. It runs in a few seconds.

To change the design:

* set `N_HALF` in the top for a different matrix size;
* change `MIN_WORD_LEN` and `MAX_WORD_LEN` in `vipic_pkg` for a different word
  range;
* set `DT` for a matrix with more skew, keeping it within the stretch.
