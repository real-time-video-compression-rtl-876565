# Real-time DVQ video codec with associative-memory vector quantization

This design compresses composite NTSC colour video in real time with
**differential vector quantization (DVQ)**. Each sample is first predicted from
samples of earlier lines that have already been coded. The prediction error of
four neighbouring samples (a *tile*) is then replaced by the index of the
nearest of 128 stored error patterns (*codewords*). The output is 7 bits per 4
samples, against 32 bits for the raw 8-bit samples (4.57:1). At the NTSC sample
rate that is 25 Mbit/s.

The codeword search is the expensive step. It is done by a bank of
**associative-memory chips**. Each chip stores 32 four-component codewords. It
computes the l1 (sum of absolute differences) distance to all of them at once,
then finds the smallest one with a bit-serial search over a wired-NOR line. Several
chips join the search through shared open-drain COMPARE pins. This RTL models
that chip at gate-level detail and builds the full encoder around it. It also
includes a matching decoder, a frame buffer, a sync detector and a host-command
controller.

One sample enters per clock. The intended clock is the 14.31818 MHz sample rate,
four times the colour subcarrier. A line is 910 samples and a frame is 910 × 526
samples. Sync pulses and blanking are coded like picture content.

## Signal flow

```
adc_data ──┐                      ┌──────────── dvq_controller ◄── host port
           ├─ video_bus ──► dvq_encoder ──chan_index──► dvq_decoder
frame_buffer (playback) ┘        │                          │
   ▲  sync_detector ◄── adc_data │ enc_recon                │ dec_recon
   └── capture of adc_data       ▼                          ▼
                      dac_data ◄── registered 3-way select (video / encoder / decoder)
```

* `dvq_system` is the top. It connects the units above. The A/D converter, the
  D/A converter, the host link and the transmission channel are outside the
  logic. Their data buses are the top's ports. The channel is a wire inside the
  top and is also brought out on `chan_index`/`chan_valid`.
* `dvq_encoder` holds the subtractor, the 9-to-8-bit converter, the tile latches
  and the vector quantizer `vq_flipflop`. It also holds a copy of the decoder
  loop (`dvq_decoder`), because the predictor must work from the same
  reconstructed samples that the far end will have.
* `dvq_decoder` holds the inverse quantizer `ivq` (four codebook RAMs, one per
  component), the prediction delay line, the adder with clamp, and the
  predictor `dvq_predictor`.
* `dvq_predictor` uses three `delay_fifo` delay lines.
* `vq_flipflop` uses eight `vampire_chip` instances in two sets of four. Each
  chip uses 32 × 4 `vampire_absdiff` cells.

## The prediction

Let X1..X4 be the four samples of a tile. Each X is predicted from three
reconstructed samples R on earlier lines of the same field:

```
P(X) = ( (B + C)/2 + A ) / 2      each /2 drops the LSB
C = R[n-908]   two samples to the right, one line up
B = R[n-912]   two samples to the left,  one line up
A = R[n-1820]  same position, two lines up
```

At four samples per subcarrier cycle, offsets of ±2 samples put B and C in the
same subcarrier phase as X once the line-to-line phase flip of NTSC is taken
into account. The average of B and C therefore meets X in phase. A supplies
the vertical term.

The counts assume a 910-sample line and no gap between lines. The delay lines
therefore run without pause, through sync and blanking.

The predictor is three delay lines in a chain:

* D1 = L − 2 − RECON_LAT − 1 samples;
* D2 = 4 samples;
* D3 = L − 2 samples.

D1 is shorter than the geometric distance because a reconstructed sample
appears RECON_LAT = 16 clocks after its original entered. Its taps give C
(after D1) and B (after D2), and A comes after D3. Two adders with LSB-dropping
halvings and an output register follow. Until a delay line has been filled
once, it reads zero. The first lines after a reset are therefore predicted
from zero.

## From difference to index

* **Difference and converter.** `pix − pv` is a 9-bit signed number. The
  converter saturates it to −128..127. It then flips the sign bit, giving
  *offset binary*, where 0x80 means zero difference. The codeword chips
  compare unsigned magnitudes, so a signed difference must be offset this way
  before its distance means anything. Codebooks are stored in the same code in
  the chips and in the inverse-quantizer RAMs. The `dvq_pkg` functions
  `diff_to_code`/`code_to_diff` give the mapping.
* **Tile.** Three latches hold the first three differences. The fourth arrives
  directly. Together they form the 32-bit tile `{c3,c2,c1,c0}`, valid every
  fourth clock.
* **Reconstruction.** The decoded difference is added to the prediction,
  delayed to meet it, and the sum is clamped to 0..255
  (overflow/underflow correction).

## The associative-memory chip (`vampire_chip`)

This is the hardest part to read, so here it is step by step.

1. **Absolute difference per component** (`vampire_absdiff`). A greater-than
   signal ripples from LSB to MSB through the 8 bit cells. It says whether the
   input `I` or the stored `C` is larger. The larger value L is complemented,
   added to the smaller S, and the sum is complemented again:
   `|C − I| = ~(~L + S)`. This needs one adder and no subtractor.
2. **Distance.** The four component differences are summed into a 10-bit
   metric per codeword (range 0..1020).
3. **Minimum search, MSB first.** Every codeword starts "in competition"
   (PROPAGATE high). For bit b from 9 down to 0, a wired-NOR line
   COMPARE(b) is pulled low by any codeword still in competition whose metric
   bit b is 0. If the line is low, every competitor with a 1 in that bit
   drops out. If no competitor has a 0, nobody drops. After bit 0 the
   survivors all hold the minimum distance.
4. **Priority encoder.** Among the survivors, the lowest address wins and
   appears on ADDR_OUT(4:0).
5. **Across chips.** Each internal COMPARE(b) is mirrored on an external
   open-drain pin shared by all chips of a set. A chip pulls the pin low when
   its internal line is low and it is still valid. It drops out (CHIP-VALID-OUT*
   goes high) at a bit where the shared pin is low but its own line is high:
   another chip has a smaller distance. After bit 0 only chips with the global
   minimum remain valid.

In silicon the search is asynchronous. Here it is one combinational block per
chip. The chip-to-chip COMPARE net forms a loop through the chips. The loop is
acyclic bit by bit: pin b depends only on bits above b. Tools still report it
as a combinational loop, and the module headers explain why it is safe.
Tri-state pins are split into a drive-low output and a level input. The quantizer
(`vq_flipflop`) ANDs the drivers of a set into the net (open-drain with pull-up).

Chip control: `store_n` writes `vector_in` to `addr_in` on the clock edge.
`reset_n` clears all codewords. `match_n` low enables the search. `enable`
lets the chip drive `addr_out` and join the interchip selection.

## The flip-flop quantizer (`vq_flipflop`)

One search must finish within one tile, four sample clocks (280 ns). The
chip's searching time does not fit, so two chip sets alternate, each getting
two tiles of time (560 ns).

* Both sets hold the same 128-codeword codebook. Chip k of a set holds
  codewords 32k..32k+31. The upper two index bits are the position of the
  winning chip. On a tie, the lowest chip wins, which keeps the whole search
  lowest-index-first.
* Each set has an input latch. A toggle (TILE_CLK) steers each new tile into
  the latch of the set whose turn it is.
* When that set is given its next tile, two tiles later, the result of its
  previous tile is taken into the index register. The result has had 8 clocks
  to settle.
* `index_valid` rises 9 clocks after the cycle in which `tile_valid` was
  high. `min_dist` and `set_sel` come with it.

## Timing of the whole loop

| Event (sample n in clock n) | Clock |
|---|---|
| tile k (samples 4k..4k+3) complete at the quantizer | 4k + 4 |
| its index valid (`chan_valid`) | 4k + 13 |
| first decoded difference leaves the inverse quantizer | 4k + 15 |
| reconstructed sample n available | n + 16 (≈ 1.1 µs) |

The predictor needs a reconstructed sample 908 clocks after it was taken,
which is far more than 16, so the loop closes with no stall. The decoder
keeps the same time base. Given the same indices, it produces the same samples
as the encoder's reconstruction, 16 clocks after the sample entered the
encoder.

## Frame buffer, sync and controller

* **`sync_detector`.** It finds a vertical interval as a run of `VSYNC_RUN` (200)
  samples below `SYNC_TH` (16). Horizontal sync tips are about 67 samples
  long, and broad vertical pulses are about 390. After a detection, a hold-off
  of 20 lines ignores the rest of the interval. Every second field starts a
  frame (`frame_start`).
* **`frame_buffer`.** 2^19 × 8 bits, enough for 910 × 526 = 478,660
  samples. It has three modes:
  * capture: arm it, and the next frame is written from address 0;
  * host byte read and write;
  * playback: the stored frame repeats onto the video bus, replacing the A/D.
  Host access is ignored while the buffer is busy.
* **`dvq_controller`.** It takes one host command per accepted clock
  (`host_valid && host_ready`). The commands are listed below; frame-buffer
  commands wait while the buffer is busy.

  | Command | Action |
  |---|---|
  | `LOAD_CW` | `host_addr` = index, `host_data` = {c3,c2,c1,c0} in offset binary. Writes the quantizer chips and both inverse quantizers. |
  | `SET_MODE` | `host_data[2:1]` selects the D/A source: video, encoder reconstruction or decoder output. |
  | `CAPTURE` | Arms a capture. `cap_done` pulses when it ends. |
  | `PLAY` | `host_data[0]` turns playback on or off. |
  | `FB_WRITE`, `FB_READ` | Byte access to the frame buffer. The read byte returns on `rsp_data`/`rsp_valid`. |
  | `RESTART` | Restarts the encoder and decoder loops together. The codebooks are kept. |

## Where this design departs from, or adds to, the published system

* **Decoder.** The published hardware built only the encoder. The decoder here
  is derived from the encoder's internal reconstruction loop.
* **Converter and clamp.** The 9-to-8-bit rule (saturate, offset binary) and
  the clamp to 0..255 are this design's choices.
* **Bus and chip control.**
  * The component order on the chip input bus (component c on bit 4b+c) is
    a choice.
  * So are the store/reset/match/enable behaviour and the lowest-index tie
    rule.
* **Frame buffer and sync.**
  * The frame-buffer size is 512K × 8, needed for one frame.
  * The sync-detection method, its thresholds and the choice of first field
    are this design's.
* **Host interface.** The host command port, the command set and the RESTART
  command stand in for a SCSI interface, which is not implemented.
* **Timing.** Chip propagation delay (the search took up to 380 ns in
  silicon) is not modelled. Synthesis timing at 14.3 MHz has not been
  checked.
* **Codebook sizes.** Smaller codebooks (32 or 64 words) run by loading the
  unused entries with copies of the lower ones. The lowest-index rule then
  never selects them. 256 codewords need `CHIPS_PER_SET = 8`.

## Files

| File | Content |
|---|---|
| `rtl/dvq_pkg.sv` | sizes, sample/tile/distance types, converter functions, host command and D/A select enums |
| `rtl/vampire_absdiff.sv`, `rtl/vampire_chip.sv` | associative-memory chip |
| `rtl/vq_flipflop.sv` | two-set 128-codeword quantizer |
| `rtl/delay_fifo.sv`, `rtl/dvq_predictor.sv` | delay lines and predictor |
| `rtl/ivq.sv`, `rtl/dvq_decoder.sv`, `rtl/dvq_encoder.sv` | coding loops |
| `rtl/sync_detector.sv`, `rtl/frame_buffer.sv`, `rtl/dvq_controller.sv` | system units |
| `rtl/dvq_system.sv` | top |
| `tb/dvq_ref_pkg.sv` | reference model of the codec (prediction, full search, decoding) used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dvq_codebook_sizes.sv` | encoder run with 32-, 64- and 128-word codebooks, checked against the model, with the reconstruction MSE of each |
| `tb/tb_dvq_system.sv` | end-to-end run at reduced frame size (46 × 50) |
| `tb/tb_dvq_system_full.sv` | the same run at full size: one 910 × 526 frame plus four lines, default parameters |

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dvq_pkg.sv tb/dvq_ref_pkg.sv tb/tb_dvq_encoder.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

**Block testbenches.**
* The chip and absolute-difference testbenches compare against direct
  arithmetic.
* The encoder and decoder testbenches compare every prediction, index and
  reconstructed sample against `dvq_ref_pkg::dvq_model`. They also check the
  latencies in the timing table.

**End-to-end run** (`tb_dvq_system`, `tb_dvq_system_full`):
1. Downloads a random codebook through the host port.
2. Codes live A/D video with sync pulses.
3. Captures a frame and reads part of it back.
4. Writes bytes into the buffer.
5. Plays the frame back through the codec.
6. Switches the D/A source.

Throughout, it checks the channel indices and both reconstructions against the
reference model. It counts each mechanism: saturation, clamping, both chip sets,
wins by chips above position 0, capture, playback, restarts and each D/A
source. It fails if any mechanism never occurred. The full-size run takes
about 3 minutes in verilator.

To change the design, override the parameters of `dvq_system`:

| Parameter | Meaning |
|---|---|
| `LINE_LEN` | samples per line |
| `FRAME_LINES` | lines per frame |
| `CHIPS_PER_SET` | chips per set (32 codewords each) |
| `FB_AW` | frame-buffer address bits |
| `VSYNC_RUN` | vertical-sync run length |

The index width follows from `CHIPS_PER_SET`.
