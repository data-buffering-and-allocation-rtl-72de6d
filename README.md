# Sparse template matching without row buffers: a four-port FPGA datapath

This RTL runs the first two stages of an infrared target recogniser on an
8-bit, 480 x 640 image. Every stage is a *generalized template matching*
step. A mask, or template, is slid over the image, and each pixel location
gets a score. The templates are sparse: a Round 0 template pair touches only
60 pixels of its window, and a Round 1 template only 80. Buffering whole
image rows on chip would therefore cost far more area than it saves.

The datapath keeps the image in external SRAM and stores only the *list of
active points* of the current mask on chip. For every window it reads the
image in the order that list gives. The bandwidth is spent as follows:

* **Round 0** needs one pixel per window per cycle. Each 32-bit memory word
  holds four pixels, so four windows are computed side by side on every
  port.
* **Four ports** give 16 Round 0 windows in flight.
* **Round 1** visits only the candidate pixels that Round 0 selected, at
  random addresses. It takes one byte from each of the four memories per
  cycle, so four active points per cycle.

The organisation follows a published mapping of this application onto an
Annapolis StarFire board. That board has a Virtex XCV1000 FPGA and four SRAM
ports: Left_Mem, Left_Mezz, Right_Mezz and Right_Mem. Every port is used at
32 bits. Where the published description is silent, this design makes its
own choices, and they are listed below.

## Block structure

```
 host ──► blockram_fifo (in) ──────────┬──────────┬──────────┬──────────┐
                                        ▼          ▼          ▼          ▼
 one_round1 ── 4 addr ──────────► mem_port_mux x4 (host / Round 0 / Round 1)
     ▲                                  │          │          │          │
     └──── 4 read-data ─────────── Left_Mem  Left_Mezz  Right_Mezz  Right_Mem  (off chip)
     │                                  │          │          │          │
     ▼                              four_round0 four_round0 four_round0 four_round0
 blockram_fifo (out) ──► host          (strip 0)  (strip 1)  (strip 2)  (strip 3)
```

| module | role |
|---|---|
| `starfire_gtm_top` | Wires everything together, owns the ports, takes the host commands. |
| `four_round0` | Sweeps one strip with one Round 0 template pair: four windows at a time, and a summary update in memory. |
| `internal_buffer_k4` | Realigns the four pixel lanes of a memory word to four consecutive windows. |
| `round0_basic_block` | Score of one window: one pixel per cycle, target points added and background points subtracted. |
| `active_point_fifo` | The on-chip list of the mask's active points, replayed for every window group. |
| `one_round1` | Scans the Round 0 summary, picks the regions of interest (ROIs) and tests each one with its super-group's Round 1 templates. |
| `blockram_fifo` | Host-side block-RAM queues, one for image words in and one for results out. |
| `mem_port_mux` | One per memory; selects which unit drives it. |
| `internal_buffer_k2` | Alternative scheme: the two-window (k = 2) form of the internal buffer. |
| `hybrid_buffer_k4` | Alternative scheme: four windows from a doubly stored image with two small buffers. |
| `row_buffer` | Alternative scheme: full row buffering with shift registers for the mask area. |
| `banked_row_buffer` | Alternative scheme: full row buffering read straight from banked RAMs. |
| `gtm_pkg` | Widths, constants, the request, point and result structs, and the score helpers. |

## The k = 4 internal buffer

This is the part that needs the most care.

Pixels are stored row-major, four per word: pixel `n` sits in word `n/4`,
byte lane `n%4`. The four basic blocks of a `four_round0` unit evaluate the
windows anchored at pixels `4t, 4t+1, 4t+2, 4t+3` (window group `t`). For an
active point at offset `o`, window `4t+j` needs pixel `4t+o+j`.

If `o` is a multiple of 4, that is exactly the word `t + o/4`. Otherwise the
four pixels straddle two words. Reading both words would halve the
throughput. Instead the controller reads one word per active point per
group: the word holding pixel `4t+o`. That word has pixels `4t+o-s .. 4t+o-s+3`,
with `s = o mod 4`.

* Windows `j < 4-s` find their pixel in this word, in lane `s+j`.
* Windows `j >= 4-s` need the following word. That word is exactly the one
  fetched for the *same active point* while the next group `t+1` is
  processed.

So the buffer keeps, for every active point, the lanes `d[s+j]` of the word
it just saw. During the next pass it hands out:

```
w[j] = m_old[j]         for j <  4-s     (stored one pass earlier)
w[j] = d_now[s+j-4]     for j >= 4-s     (word arriving now)
```

The four windows of group `t` are therefore evaluated during the fetch pass
of group `t+1`. The computation lags the memory by one pass of `W` cycles,
and the buffer needs one entry per active point (64 entries; a Round 0 pair
has 60 points). The 2-bit `s` of each point is the only control needed.

An example with `s = 1`, at point `o = 101`, group `t = 0`. The word holding
pixels 100..103 arrives. Windows 0, 1 and 2 need pixels 101, 102 and 103,
which are stored. Window 3 needs pixel 104. It is taken directly from the
memory word during group 1's pass, when the word holding 104..107 arrives
for the same point.

A strip of `G` groups therefore takes `G+1` fetch passes. The last pass
reads the pixels that follow the strip, which the memory holds anyway.

## Round 0 sweep and the summary

`four_round0` applies the template pair held in its `active_point_fifo` to
every pixel of its strip. With `W` active points and `G = STRIP_PIX/4`
groups, one sweep is:

```
pass 0 ... pass G      each pass: W cycles, one read per active point
after pass 1..G:       4 cycles: read 2 summary words, write 2 summary words
busy cycles = (G+1)*W + 4*G + 1
```

At the full size (`G = 19200`, `W = 60`) that is 1,228,861 cycles per pair,
about 31 ms at a 40 MHz clock.

Six template pairs are applied one sweep at a time. The per-pixel result
lives in the same memory, behind the frame. Each pixel has 16 bits: a 3-bit
index of the best pair so far (its *target super-group*) and a 13-bit
saturated best score. Two pixels share a 32-bit word, with the even pixel in
the low half.

* A sweep with `pair = 0` overwrites the summary.
* A later sweep replaces a pixel's entry only if its own score is strictly
  higher.

Memory map of every SRAM, in 32-bit words, for `IMG_ROWS x IMG_COLS = R x C`:

| words | contents |
|---|---|
| `0 .. R*C/4-1` | the frame. It is identical in all four memories. |
| next `GUARD_WORDS` (8192) | unused. Windows at the end of the frame read here, never the summary. |
| `RES_BASE = R*C/4 + GUARD_WORDS` onward | the Round 0 summary of this memory's strip, `R*C/8` words. |

At 480 x 640 that is 76800 + 8192 + 38400 = 123392 words. This fits the
131072 words (512 KB) that a 64-bit mezzanine SRAM offers when it is used as
a 32-bit port. Duplicating the frame in a redundant layout would not fit,
which is why the internal buffer is used.

Window addresses are plain `anchor + offset`. A window near the right edge
therefore continues on the next row, and one near the end of the frame reads
zeros or guard words. The scores of such border pixels are well defined but
carry no meaning.

## Round 1

`one_round1` reads the summary of strip 0 from memory 0, strip 1 from
memory 1, and so on, one word (two pixels) at a time. A pixel whose stored
score is at or above `r1_threshold` is a region of interest (ROI). Its
super-group selects a run of Round 1 templates from a host-loaded table: a
first template and a count, 2 or 5 in the target application.

A template is 80 points in 20 rows of four. Row `r` puts point `4r+m` on
memory `m`, so all four reads happen in the same cycle. Each memory returns
a word, and the addressed byte is kept. One template takes 20 cycles, and
the next template starts on the following cycle.

The best template (highest score; ties keep the earlier one) goes to the
output FIFO as `{pix, sg, tpl, score}`. Cycle cost:

* each summary word: 2 cycles;
* each pixel: 2 cycles;
* each ROI: `20 * count + 2` cycles, plus any cycles the output FIFO is full.

## Alternative buffering schemes

The top also carries four blocks for the other ways of feeding a mask from
memory. They are not on the Round 0 or Round 1 path and share nothing with
it. Each one has its own `alt_*` ports on the top, so it can be driven and
checked on its own.

* **`internal_buffer_k2`** (`alt_k2_*`). A memory word holds an even and
  an odd pixel, and two windows are computed at once. For active point `o`,
  the control bit is `c = o mod 2`. The even buffer stores the half that
  holds pixel `2t+o`; the odd buffer stores the odd half. Both are read one
  pass later. When `c = 1`, the odd window takes the even half of the word
  arriving for the next group.
* **`hybrid_buffer_k4`** (`alt_hy_*`). The image is stored twice over:
  word `a` holds pixels `2a .. 2a+3`, so consecutive words overlap by two
  pixels. Point `o` of group `N` reads word `(4N+o)/2`. A left and a right
  buffer of two pixels each, steered by one bit `c = o mod 2`, give the
  four windows. When `c = 1`, window 3 takes lane 0 of the next group's
  word. Doubling the image costs memory, which is why the StarFire mapping
  uses the k = 4 buffer instead.
* **`row_buffer`** (`alt_rb_*`). This is classic row buffering for an
  `RB_P x RB_Q` mask (3 x 4 by default) over rows of `IMG_COLS` pixels.
  Each pixel enters once. `RB_P` shift registers of `RB_Q` pixels hold the
  mask area. `RB_P-1` line RAMs, one per row distance, supply the pixels of
  the same column in the rows above, all in the same cycle.
* **`banked_row_buffer`** (`alt_bk_*`). This is row buffering with no
  registers for the mask area. The buffered pixels are spread over
  `RB_P*RB_Q/2` dual-ported RAMs. Along a row the stride is one RAM; down a
  column the stride is `RB_Q`. All `RB_P*RB_Q` pixels of a window are read
  in one cycle, two from each RAM; an assertion checks this. For a simple
  placement it keeps `RB_P` whole rows, not the minimum
  `(RB_P-1)*COLS + RB_Q` pixels.

Both row buffers produce, one cycle after each accepted pixel `n`, the
window whose bottom-right pixel is `n`. `win_valid` pulses once per pixel
from pixel `(RB_P-1)*IMG_COLS + RB_Q-1` on. Windows that wrap around a row
end are flagged as well; the caller knows the geometry.

## Using the top level

All commands are single-cycle pulses.

1. **Load the frame.** Push `{word address, 4 pixels}` into `host_in_*`
   whenever `host_in_full` is low. While no round runs, the input FIFO
   drains one word per cycle into the same address of all four memories.
2. **Load a Round 0 pair.** Pulse `r0_tpl_clear`, then push each
   `apoint_t {tgt, off}` with `r0_tpl_push`. `off` is the row-major pixel
   offset from the window anchor, `row*IMG_COLS + col`, 15 bits. All four
   units get the same list.
3. **Run the pair.** Pulse `cmd_r0_start` with `cmd_r0_pair = p` (0 first).
   Wait for `r0_done`. Repeat steps 2 and 3 for the other pairs.
4. **Load the Round 1 tables.** Write the template rows (`r1_tpl_*`,
   address `template*20 + row`) and the super-group table (`r1_sg_*`). Set
   `r1_threshold`.
5. **Run Round 1.** Pulse `cmd_r1_start` and pop results from `host_out_*`
   until `r1_done` has pulsed and the queue is empty.

The rules around commands:

* A start is ignored while a round runs or while image words are still
  queued. Words pushed during a round wait in the input FIFO.
* A Round 0 start with an empty point list is refused.
* Tables may be changed only while `busy` is low.

The memory ports are `mem_req[4]` (`req`, `we`, `addr`, `wdata`) and
`mem_rdata[4]`. The design expects single-ported synchronous SRAM that
returns read data on the cycle after the request.

## What comes from the original design and what does not

Taken from the original mapping:

* the block diagram: four Round 0 units of four windows each, one Round 1
  unit, two block-RAM buffers, and a multiplexer in front of each of the
  four memories;
* 32-bit use of every port;
* 8-bit pixels and the 480 x 640 frame;
* 60-point Round 0 pairs evaluated at one pixel per cycle per window;
* six Round 0 pairs;
* 80-point Round 1 templates at four points per cycle, one byte from each
  memory;
* 2 or 5 Round 1 templates per super-group;
* strip-wise sharing of Round 0 over the ports;
* the internal-buffer scheme with 2-bit per-point control and 64 entries;
* the k = 2 buffer's even/odd organisation, the hybrid scheme's doubly
  stored words with small buffers, and both row-buffer organisations with
  the 3 x 4 example mask.

This design's own choices:

* **Score arithmetic.** The original refers elsewhere for the insides of
  its basic blocks. Here a score is the sum of target pixels minus the sum
  of background pixels.
* **The summary kept in memory.** This covers the read-modify-write after
  each pass, the 16-bit per-pixel format, 13-bit saturation and the guard
  words.
* **How Round 1 finds its ROIs.** It scans the summary with a threshold.
* **The host interface.** This covers the command set, the FIFO depths
  (512) and the owner-based port selection.
* **Reset.** It is asynchronous and active-low.
* **Border pixels.** Edge windows are computed as described above.
* **Inside the alternative blocks.** This covers the hybrid buffer's lane
  assignment, the line-RAM split of `row_buffer`, the whole-row placement
  of `banked_row_buffer`, and the buffer depths.
* **Multiplexer structure.** The lane selection of the internal buffer is
  written as indexed selects. These have the same function as the
  original's multiplexer tree, but not necessarily the same gates.

Not built:

* **The SRAMs, the mezzanine crossbars and the PCI controller.** These are
  board parts. `tb/sram_model.sv` models an SRAM for simulation.
* **Rounds 2 to 5.** They run on the host.
* **Plain redundant storage.** In this scheme memory word `n` holds pixels
  `n .. n+k-1`, so every pixel is stored k times and any k neighbours come
  in one read. It is only a data layout written by the host, with no logic
  of its own to build.
* **The time-shared sub-block of the smaller G900 board.** Its function is
  not known.

## Parameters

| parameter | default | where |
|---|---|---|
| `IMG_ROWS`, `IMG_COLS` | 480, 640 | top |
| `IN_DEPTH`, `OUT_DEPTH` | 512, 512 | top (one 4-kbit block RAM per 8 bits of width) |
| `STRIP_PIX` | `IMG_ROWS*IMG_COLS/4` | `four_round0`, `one_round1` (set by top) |
| `DEPTH` | 64 | internal buffer and point list: at most 64 points per pair |
| `R0_POINTS`, `R0_PAIRS` | 60, 6 | `gtm_pkg` |
| `R1_POINTS`, `R1_ROWS`, `R1_TPL_MAX` | 80, 20, 32 | `gtm_pkg` |
| `ADDR_W` | 18 | 1 MB of 32-bit words |
| `RB_P`, `RB_Q` | 3, 4 | top: mask size of the two row buffers |
| `OFF_W` | 15 | active-point offset; sets `GUARD_WORDS = 2**(OFF_W-2)` |

`IMG_ROWS*IMG_COLS` must be a multiple of 16, so that each strip is a whole
number of 4-pixel groups.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`. Every testbench compares against a software
model written independently of the RTL, and checks cycle counts where the
design has a fixed rate.

| testbench | what it covers |
|---|---|
| `tb_internal_buffer_k4` | 20 passes of 60 points at all four alignments |
| `tb_round0_basic_block` | scores and the window-every-60-cycles rate |
| `tb_active_point_fifo` | replay, wrap, full list, rewind, clear |
| `tb_blockram_fifo` | random traffic against a queue model |
| `tb_mem_port_mux` | selection |
| `tb_four_round0` | three sweeps and the summary; exact sweep length |
| `tb_one_round1` | ROI selection and best template; exact cycle count; back-pressure |
| `tb_internal_buffer_k2` | 30 passes of 60 points, odd and even offsets, the example offsets 0, 71, 101, 132 |
| `tb_hybrid_buffer_k4` | 20 passes of 60 points over a doubly stored image |
| `tb_row_buffer` | every window of a 12 x 16 stream with gaps; first window and one window per pixel |
| `tb_banked_row_buffer` | the same checks, and the two-reads-per-RAM assertion |
| `tb_starfire_gtm_top` | whole flow on an 8 x 64 frame; see the list below |
| `tb_starfire_full` | the same flow at the default 480 x 640 size |

`tb_starfire_gtm_top` also counts each mechanism of the design and fails if
any one never happened:

* input FIFO full;
* a start refused while a load is pending;
* all four alignments used;
* a summary entry kept, and one replaced;
* a score saturated;
* ROIs and non-ROIs;
* both template-set sizes;
* output back-pressure;
* both control values of the k = 2 and hybrid buffers;
* windows from both row buffers, exactly one per pixel once the rows
  are filled.

The full-size run is about 8.5 M clock cycles and takes about 10 s of
simulation. It finds about 4.8 % of the pixels to be ROIs.

The two top-level testbenches share their body through
`tb/tb_gtm_top_body.svh`. The testbenches use `tb/sram_model.sv`.

With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/gtm_pkg.sv tb/tb_starfire_gtm_top.sv --top-module tb_starfire_gtm_top
./obj_dir/Vtb_starfire_gtm_top
```

Replace the testbench name to run any other. `verilator --lint-only -Wall`
with the same file arguments lints a module. The remaining lint warnings are
of two kinds: style warnings, and the reset being used both for flops and to
disable the protocol assertions.
