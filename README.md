# Flash-activated still image capturer

A camera flash lasts only a fraction of a video frame. A still image taken "at
the flash" therefore has to be caught automatically from the video stream. It
cannot be timed by hand. This design watches a live BT.656 video stream. It sums
the luminance of every frame. When one frame is brighter than a threshold set
by software, it writes the frames that follow into an external ZBT SRAM over an
On-chip Peripheral Bus (OPB). Software then reads the picture out of that
memory.

The system also includes a separate Y'CrCb-to-R'G'B' colour space converter.
This pipelined block with five multipliers is what a display path for the
captured frames would need. It stands beside the capturer with its own ports.

Everything is SystemVerilog-2017. It is synthesizable except for the
testbenches and the two behavioural models in `tb/`: the video source and the
SRAM.

## System view

```
             vid_clk (27 MHz)                  |           opb_clk
 YCrCb_in ─► line_field_decoder ─► luma_energy |
               │  H V F, de, counts    │found  |
               │                  flash_fsm ───┼─► led1, led2, cap_state
               └──► pixel_packer ◄──WriteFrame |
                        │ {addr,data}          |
                        └──► async_fifo ───────┼──► opb_master_wr ─┐
                                               |                    │ master 1
  host_m2b/b2m (processor port) ───────────────┼──── master 0 ─► opb_bus
                                               |          slave 0 │   │ slave 1
                            inflags ◄── 2-FF ◄─┼──── opb_gpio ◄───┘   opb_emc ─► ZBT pins
```

| Module | Role |
|---|---|
| `flash_capturer_top` | System top: bus, GPIO, memory controller, capture core, and the converter on the side |
| `vidcap` | Capture core: video-clock pipeline plus the clock crossing to its bus master |
| `line_field_decoder` | Recovers H/V/F, NTSC/PAL, line and word counts, and syncs from BT.656 |
| `luma_energy` | Per-frame luminance sum and threshold compare |
| `flash_fsm` | Seven-state capture controller (A–G) |
| `pixel_packer` | Packs Cb,Y,Cr,Y into 32-bit `{Y,Cr,Y,Cb}` words with addresses |
| `async_fifo` | Gray-pointer dual-clock FIFO (video clock to bus clock) |
| `opb_master_wr` | OPB master that writes one queued word per transfer |
| `opb_bus` | OPB interconnect: fixed-priority arbiter, OR-bus, timeout |
| `opb_gpio` | 32-bit output register at 0x80000300 that drives `inflags` |
| `opb_emc` | Controller for one ZBT SRAM bank at 0x80100000–0x801FFFFF |
| `csc_mult` | Y'CrCb to R'G'B' converter with five constant multipliers |
| `fasic_pkg` | OPB structs, state enum, BT.656 constants |

The processor and its debug module are not part of the RTL. Their bus master
port is brought out on `host_m2b`/`host_b2m`, and a testbench drives it as the
host. The video decoder chip and the SRAM chip are also off-chip. The
decoder's output is the `YCrCb_in` port. The SRAM is reached through the
`zbt_*` pins.

## Using it from software

1. Write `{threshold[31:2], 2'b11}` to the GPIO register (0x80000300). This
   arms the detector. The low two bits are start bits, and both must be 1. The
   upper 30 bits are the threshold, with its two low bits taken as zero.
   `led1` lights while the core searches.
2. Fire the flash. The core sees the bright frame and waits for it to end. It
   then writes `C_NUM_FRAMES` frames (default 4), all to the same buffer at
   `C_FBADDR` (default 0x80100000). Each new frame overwrites the last, so the
   buffer finally holds the last of them.
3. When `led2` lights (state G), read the buffer back. Each 32-bit word is
   `{Y_first[31:24], Cr[23:16], Y_second[15:8], Cb[7:0]}`. Each field is the 8
   most significant bits of the 10-bit sample. The words run line by line:
   all active lines of field 1 first, then all active lines of field 2.
   Interleave the two halves to get the frame.
4. Write 0 to the GPIO to return to state A.

A full NTSC frame (487 active lines × 360 words) takes 701,280 bytes. A PAL
frame (576 × 360 words) takes 829,440 bytes. Both fit in the 1 MB window.

## Reading BT.656 timing (`line_field_decoder`)

This is the part that takes the most care. BT.656 sends Cb,Y,Cr,Y words at
27 MHz and has no separate sync wires. Each line carries two timing reference
signals (TRS): the words 3FF 000 000 and then an XY word. XY bits [9:2] are
`1 F V H P3 P2 P1 P0`. H=1 is EAV (end of active video) and H=0 is SAV. F is
the field and V is vertical blanking.

How the decoder works:

* It keeps a four-word history and recognises a TRS when the preamble is
  followed by an XY word. It checks the protection bits (`P3=V^H, P2=F^H,
  P1=F^V, P0=F^V^H`). A damaged XY word is ignored: the flags keep their
  values and `trs_err` pulses. `vidcap` counts these pulses in `trs_errors`.
* **Format detection.** It counts the words from the EAV XY word to the next
  SAV XY word. The count is 272 for NTSC (138 blanking samples) and 284 for PAL
  (144 blanking samples). The split is at 278. `pal_ntsc_out` is 1 for PAL.
* **Line count.** The count goes up by one at every EAV. When F rises it is
  reloaded with 266 (NTSC) or 313 (PAL), which puts it on the standard line
  numbering. It wraps after 525 or 625.
* **Alignment.** Video is delayed by 4 clocks, so every flag lines up with the
  word it describes on `vid_out`. H, V, F and the line count change on the
  edge where the EAV's 3FF word appears on `vid_out`. H falls when Cb0 appears.
  `de_out` is high only on active samples of active lines. The TRS words are
  never marked active.
* **Syncs (all active low; the shapes are this design's own).**
  * `hsync_out` is low for 64 samples after a 16-sample front porch.
  * `vsync_out` is low for the first 3 lines after each F change.
  * `blank_out` is low whenever H or V is set.

A well-known reference decoder for this job takes 8 clocks of latency. This one
takes 4, and every flag is still aligned.

## The capture controller (`flash_fsm`)

| State | Outputs | Leaves when |
|---|---|---|
| A reset | — | write_en = 1 → B |
| B looking | CountEnergy, led1, frame counter = 0 | FoundFrame → C |
| C wait for end of bright frame | — | frame_end → D |
| D wait for frame start | WriteFrame | FrameCount ≥ C_NUM_FRAMES → G; else stays while frame_end; else → E |
| E increment | WriteFrame, FrameCount+1 | → F |
| F write frame | WriteFrame | frame_end → D |
| G all done | led2 | write_en = 0 → A |

`frame_end` is one clock wide. It fires when V falls while F = 0, which is
where the vertical blanking before field 1 ends, at the boundary between two
frames.

The D row's exits are checked in the order shown. The frame counter has 4
bits, so `C_NUM_FRAMES` can be at most 15.

From B to F, clearing write_en has no effect. Only G returns to A when the
start bits are cleared, and `rst` returns to A from any state. This is
deliberate and follows the diagram the design is based on. It means that
writing 0 during a capture takes effect once the capture completes.

`luma_energy` adds the 8-bit Y of every active luminance word while
CountEnergy is high. The sum is cleared at each frame start and saturates at
2^32−1. FoundFrame is `energy > threshold`. A full-white NTSC frame sums to
about 89 million, which is far below the counter's range.

## Bus and memory

The OPB is modelled with four packed structs (`fasic_pkg`), one for each
direction between masters, bus and slaves. The bus is an OR-bus: a master or
slave drives zeros when it is not selected. The transfer protocol is a compact
subset of OPB and is this design's own:

* A master raises `request`. When the bus is idle, the arbiter gives a
  one-clock `grant`. The highest index wins, so the capture core beats the
  processor.
* On the next clock the master raises `select` and drives address, data, byte
  enables and RNW.
* The slave ends the transfer with `xferAck`, or with `retry` to make the
  master ask again.
* If no answer comes within `TIMEOUT` (16) clocks, the bus returns `errAck`.
  The capture master then drops the word and counts it in `words_failed`.

`opb_gpio` acknowledges one clock after select and honours byte enables.

`opb_emc` turns each transfer into one ZBT access:

* command with chip select, `we_n` and byte writes;
* a wait clock;
* the data clock (write data driven, or read data sampled);
* the acknowledge.

A transfer therefore takes 4 clocks. The SRAM sees the data two clocks after
its command, as pipelined ZBT parts do.

**Bandwidth.** Active video needs one 32-bit write every 4 video clocks, which
is 6.75 M writes/s. Each write uses about 7 bus clocks from request to
acknowledge, so the bus clock must be above roughly 50 MHz. At 100 MHz nothing
is lost. At lower clocks the 16-word FIFO fills, and words are dropped and
counted in `dropped_words`. The system has no back-pressure to the video
source.

## Colour space converter (`csc_mult`)

```
R' = 1.164(Y'-16k) + 1.596(Cr-128k)
G' = 1.164(Y'-16k) - 0.813(Cr-128k) - 0.392(Cb-128k)      k = 2^(W-8)
B' = 1.164(Y'-16k) + 2.017(Cb-128k)
```

With W = 10 the offsets are 64 and 512.

The coefficients are unsigned fixed point with 9 fraction bits: 596, 817, 416,
201 and 1033. The shared Y term needs only one product, so there are five
multipliers in all. The pipeline has five stages, all enabled by `ce`:

1. input registers;
2. offset removal;
3. products;
4. R and B sums, and the first G subtraction;
5. the second G subtraction, then rounding, a shift by 9, limiting to
   0..1023 and the output registers.

Latency is 5 clocks.

## Where this RTL goes beyond, or differs from, its source description

* The source describes the OPB, GPIO and memory controller only by name, base
  address and width. The arbiter, the transfer timing, the timeout and the ZBT
  access timing are this design's own.
* The dual-clock FIFO and the synchronisers for `inflags` and reset are added.
  They are needed because the capture core runs on the video clock.
* Only active samples are stored, each cut to 8 bits. Blanking lines are not
  written, so an NTSC frame is 487 lines of 360 words. A read-back tool that
  expects all 525 lines, split 263/262 between the fields, has to be adapted.
* `frame_end` is a one-clock pulse. The description allows it to last a few
  clocks.
* For 10-bit inputs the converter uses the offsets 64/512. A block diagram of
  the same converter labels its inputs with the 8-bit offsets 16/128. The
  equations, which scale with the width, were followed.
* The converter limits its outputs. The multiplier-based block diagram shows no
  limiter, but the behavioural form of the same converter has one.
* The sync shapes, the 4-clock decoder latency and the saturating energy
  counter are this design's own.

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<n>` and finishes. A watchdog ends a run that
hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fasic_pkg.sv tb/tb_flash_fsm.sv --top-module tb_flash_fsm
./obj_dir/Vtb_flash_fsm
```

Each block has a `tb/tb_<module>.sv`. `tb/bt656_source.sv` generates a
standard NTSC or PAL BT.656 stream. Its luminance level and TRS corruption can
be controlled. `tb/zbt_sram_model.sv` is a 2-cycle pipelined SRAM with a
`peek()` back door.

`tb_flash_capturer_top` runs the whole system with every parameter at its
default, at full frame size (720 samples per line), in two runs.

**Run 1** (NTSC, 100 MHz bus):

* arm through the GPIO and flash in frame 3;
* check every word of the frame buffer against the stream;
* read back through the host port;
* hit a bus timeout on an unmapped address;
* reset.

**Run 2** (PAL, 12.5 MHz bus):

* the bus is too slow, so FIFO drops occur;
* one damaged TRS word is sent.

The testbench counts each mechanism: flash detection, frames written, drops,
bus contention, timeout, both formats, TRS error and return to reset. A
mechanism that never happens counts as a failure. The converter is checked
against a real-valued model. The run takes about 1.5 minutes under Verilator
and makes about 15 million checks. `tb_vidcap` runs the capture core with
short 32-sample lines.

To change the design, the knobs are:

* `C_NUM_FRAMES` (1–15);
* `C_FBADDR`;
* `FIFO_AW`, the FIFO depth as 2^AW;
* `TIMEOUT` on `opb_bus`;
* `W` and `CF` on `csc_mult`.
