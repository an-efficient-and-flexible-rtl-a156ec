# Face detection accelerator: Haar cascade evaluators with a pyramid downscaler

This design finds faces in grey-scale images with the Viola–Jones method. Every
20x20 square of the image, on every level of an image pyramid, is tested by a
cascade of 20 stages. Each stage sums the votes of a set of two-node decision
trees, and each node compares a Haar feature with a threshold. A Haar feature is
a weighted sum of two or three rectangle sums. Most squares fail in the first
few stages, so the average cost per square is small. A square that passes all
20 stages is a face candidate.

The hardware is the programmable-logic side of a processor + FPGA system. A CPU
receives frames, stores them in shared DDR memory, and drives the accelerator
through an AXI4-Lite control bus. The accelerator contains:

* one **Downscaler**, which builds the next pyramid level in memory by shrinking
  an image by 1.2;
* `N_EVAL` (default 3) **Evaluators**. Each one fetches a window from memory,
  builds its integral image, and runs the full cascade on it at one tree per
  clock.

The CPU hands out windows and collects the results. Each module has its own
AXI master towards memory.

```
           AXI-Lite (CPU)
                 |
           axil_decoder ----+-------------+-------------+
                 |          |             |             |
            downscaler  evaluator 0   evaluator 1   evaluator 2
             |      |        |             |             |
         AXI rd   AXI wr   AXI rd        AXI rd        AXI rd      -> memory
```

Control address map (byte addresses on the AXI-Lite port):

| Address | Target |
|---|---|
| `0x000` | Downscaler |
| `0x100 * (k+1)` | Evaluator `k` |

Each target has a 256-byte window.

## Inside an Evaluator

```
   memory --AXI--> preproc_engine --integral writes--> integral_buffer --16 values--+
                        | INF                        (2 x 8 BRAM copies)            |
                        v                                   ^ 16 addresses          v
                      isqrt --NF--> eval_core --------------+----- operands ---> haar_tree
                                     |   ^  tree address                              |
                                     |   +-------------- training_rom                 |
                                     +<----------------------- vote ------------------+
```

### Preprocessing: window fetch, integral image and normalisation

`preproc_engine` reads a 24x22-byte region whose top-left byte is the window
origin:

* Each row is six 32-bit beats. Six beats cover the 20 window pixels for any
  byte alignment of the origin.
* Bursts are split so that none crosses a 4 KB boundary.
* The two rows below the window are fetched but not used.

The engine consumes one byte per clock. It keeps only the upper 7 bits of each
pixel, so the largest integral value, 400·127, fits in 16 bits.

Integral-image layout:

* 21x21 entries, 441 in all.
* Row 0 and column 0 are zero, so a rectangle sum never needs a bounds check.
* Entry `(y+1)*21 + (x+1)` holds the sum of all pixels up to `(x,y)`.

While streaming, the engine also accumulates Σp and Σp² over the 400 window
pixels. From these it forms `INF = 400·Σp² − (Σp)²`. `isqrt` takes the bit-serial
integer square root of INF in 16 clocks. The result is the normalisation factor
`NF = 400·σ`. NF rescales every node threshold, which has the same effect as
normalising the window to unit variance, without touching a single pixel.

### The double-buffered integral image

`integral_buffer` holds two complete integral images:

* While the classifier reads one, the preprocessing engine writes the next.
* `buf_sel` (the buffer select) swaps their roles; `buf_sel = 0` reads buffer 1.

A tree needs 16 integral values per clock: four rectangles with four corners
each. A BRAM has two ports, so each buffer is made of **8 identical copies**
(`ii_bank`, dual-port, synchronous read):

* A write goes to all 8 copies of the write-side buffer.
* Read address `2k` uses port A of copy `k`, and read address `2k+1` uses port B.

Reads take one clock.

### Training data: `training_rom`

The cascade has the following shape:

| Item | Count |
|---|---|
| Stages | 20 |
| Trees | 1047 |
| Nodes | 2094 |
| Rectangles | 4535 |

**One 208-bit record per tree** (`fd_pkg::tree_t`):

* Two nodes. Each node has:
  * three rectangles (x, y, w, h, 5 bits each) and a has-third-rectangle flag;
  * a 2-bit weight for rectangle 2;
  * a signed Q4.12 threshold;
  * a polarity bit.
* Three signed Q4.12 leaf values: left, right and root.

The tree table is read synchronously.

**A 20-entry stage table** gives each stage's tree count and its stage
threshold. It has two asynchronous read ports.

**The contents are synthetic.** The ROM is filled at elaboration by a generator
in `fd_pkg`, not from a trained classifier:

* Stage sizes: 3, 9, 14, 19, 19, 19, 27, 39, 45, 47, 53, 67, 63, 71, 75, 78, 91,
  97, 90 and 121 trees.
* Node `g` gets a third rectangle when `g mod 6 = 5` and `g < 2082`. That gives
  347 nodes with three rectangles, so 4535 rectangles in total.
* Features are the usual edge and line shapes: two halves, or three or four
  bands, optionally transposed. Their positions, sizes and thresholds come from
  an integer hash of the node index.
* Leaf values are random in ±1.
* Each stage threshold sits 40/128 of the way from the lowest to the highest
  possible vote sum of its stage.

This gives a realistic mix of early rejections and full passes, but the
"faces" it finds are not faces. To detect real faces, replace the generator
with a trained frontal-face cascade in the same record format; no other RTL
changes. The same holds for any other object class.

### A Haar node and a tree

`haar_node` computes each rectangle sum from its four corners as
`S = a − b − c + d` (a at top-left, d at bottom-right) and compares:

```
   lhs = S1 + threshold·NF          rhs = weight·S2 + 2·S3
   gt  = lhs > rhs                  active = polarity ? !gt : gt      (registered)
```

This is the test `−S1 + w·S2 + 2·S3 < thr` with a polarity that can flip it.
Rectangle 1 carries weight −1, which is why it sits on the threshold's side.

`haar_tree` holds two nodes. Node 2 chooses between the left and right leaf
values; node 1 chooses between that result and the root value:

```
vote = n1 ? (n2 ? left : right) : root
```

The tree takes two clocks and accepts a new tree every clock.

### The core: one tree per clock

`eval_core` is the control core. Its pipeline has four steps:

1. **I (issue).** Turns the tree record read in the previous clock into 16
   corner addresses. The thresholds are scaled by NF: `(thr·NF) >>> 12`.
2. **D (data).** Receives the 16 integral values.
3. **T (tree).** Runs the tree.
4. **A (accumulate).** Adds the vote to the stage sum. At a stage's last tree
   it compares the sum with the stage threshold: the stage passes when
   sum ≥ threshold.

**Two-phase reads.** Sixteen reads serve four rectangles per clock: two per
node. A tree in which either node has a third rectangle holds the ROM one more
clock and reads the third rectangles in a second phase. The first-phase values
are parked in D until then. 347 of the 1047 trees take two clocks.

**Speculative walking.** The walker does not wait for a stage's verdict. It
runs on into the next stage. When a stage fails, the partial work is flushed
and the window is reported as rejected in that stage.

**Timing.** A window that passes all stages costs 1394 issue clocks plus 4
clocks of latency: 1398 clocks from start to result. `EV_CYCLES` reports this
count for each window.

**Double buffering at the command level.** The CPU may queue the next window
as soon as the current one has been loaded:

* The engine then loads it into the write-side buffer while the classifier
  works.
* When the classifier is idle and the previous result has been read, the core
  flips `buf_sel` and starts.
* A result is held until it is read, so results cannot be lost.

### Evaluator registers (`fd_pkg::EV_*`)

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start the window set up in ADDR/STRIDE/TAG |
| 0x04 | STATUS | R | bit 0 command accepted next (cmd_ready), bit 1 result valid, bit 2 busy |
| 0x08 | ADDR | RW | byte address of the window's top-left pixel |
| 0x0C | STRIDE | RW | bytes per image row |
| 0x10 | TAG | RW | free value returned with the result |
| 0x14 | RESULT | R | bit 0 face, bits 12:8 rejecting stage, or 20 for a face; reading it frees the result slot |
| 0x18 | RTAG | R | tag of the result in RESULT (read it first) |
| 0x1C | CYCLES | R | clocks from start to result of that window |

### Downscaler registers (`fd_pkg::DS_*`)

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start |
| 0x04 | STATUS | R | bit 0 busy, bit 1 done (sticky until the next start) |
| 0x08 | SRC | RW | source image byte address (multiple of 4) |
| 0x0C | DST | RW | destination byte address (multiple of 4) |
| 0x10 | SRC_W | RW | source width, at most `MAX_W` = 640 |
| 0x14 | SRC_H | RW | source height |
| 0x18 | SRC_STR | RW | source row stride (multiple of 4) |
| 0x1C | DST_STR | RW | destination row stride (multiple of 4) |
| 0x20 | DST_W | R | output width `floor(5·W/6)` |
| 0x24 | DST_H | R | output height `floor(5·H/6)` |

## The Downscaler

The Downscaler shrinks an image with nearest-neighbour sampling:

```
out(x, y) = in(floor(1.2·x), floor(1.2·y))
```

It works one output row at a time:

1. Read the source row it needs into a 640-byte line buffer, in bursts of at
   most 16 beats that never cross a 4 KB boundary.
2. Build the output row four pixels per 32-bit word. The column and row
   positions advance with a remainder counter; no divider is used.
3. Write the output row back.

Source rows that are skipped are never read. Byte strobes protect any memory
beyond the output width. The ratio is the parameter pair `SCALE_NUM`/`SCALE_DEN`
(6/5).

## Interfaces and conventions

**Buses.** All buses are plain structs from `fd_pkg`:

* `axi_rd_req_t` / `axi_rd_rsp_t` and `axi_wr_req_t` / `axi_wr_rsp_t`: AXI with
  32-bit addresses and 32-bit data, INCR bursts of up to 16 beats, one
  outstanding burst per master.
* `axil_req_t` / `axil_rsp_t`: AXI4-Lite.

**Top-level AXI ports.** `face_detect_top` exposes:

* `m_axi_rd_*[0]`: the Downscaler's read master;
* `m_axi_rd_*[k+1]`: Evaluator `k`'s read master;
* `m_axi_wr_*`: the Downscaler's write master.

Connect these to the memory (the system's four high-performance ports).

**Reset.** One clock, `clk`. Reset `rst_n` is active-low and asynchronous. It
resets all control state; memories are not reset.

**Assertions.** They check the handshake rules: the AXI-Lite response stays
stable until it is accepted; an Evaluator's load starts only when the engine is
idle; a Downscaler source row fits the line buffer.

Verilator reports the assertions' `disable iff (!rst_n)` as SYNCASYNCNET and
some unused struct bits as UNUSEDSIGNAL. Neither is a circuit issue.

## Where this design departs from the original system, and what it adds

**The training data is synthetic** (see above). Hardware, formats and sizes are
those of a real 20-stage cascade, but detection quality cannot be judged with
this ROM.

**Third rectangles take a second read clock.** The original system is
described as evaluating one tree per clock with 16 reads, which covers only
two rectangles per node, while its node has three rectangle inputs. Here the
node keeps three rectangles, and the rare trees that use a third one take two
clocks. A fully passing window costs 1394 issue clocks instead of 1047.

**Pixels pass through the core.** Integral values go from the buffer through
the core to the tree, rather than straight from the buffer. The core needs to
hold the first phase of a two-phase tree. Single-phase trees pass through
without delay.

**Unspecified details are this design's own choice.** These include:

* bit widths and fixed-point formats;
* the comparator's operand sides and the multiplexer polarities;
* which 7 pixel bits are used (the upper ones, for INF too);
* the register maps and result handshake;
* the AXI data width;
* the control-bus decoder (`axil_decoder`, standing in for the system's
  interconnect);
* the 24x22 fetch, with two unused rows.

**Throughput.** Per window, the cost is:

* the fetch, about 570 clocks (one byte per clock), hidden behind the previous
  window's classification;
* classification, 8 to 1398 clocks.

Most windows are rejected early, so the fetch dominates. With 3 Evaluators at
144 MHz, a full 640x480 pyramid at one-pixel steps (about 0.94 M windows)
takes roughly 1.2 s. The original system reports about 16 frames/s, so it must
visit far fewer windows or share work between neighbouring windows; how it does
so is not known here. A faster fetch would be the first thing to change.

**Outside this RTL.** The CPU software, the DDR controller, the system
interconnects and the Ethernet link are not part of this RTL. Neither is the
post-filter that removes isolated detections.

## Files

**`rtl/`**

* `fd_pkg.sv`: constants, structs, register maps, training-data generator.
* `face_detect_top.sv`: top level.
* `axil_decoder.sv`: control-bus decoder.
* `axil_slave.sv`: register front end used by both modules.
* `downscaler.sv`: the Downscaler.
* `evaluator.sv`: one Evaluator.
* Evaluator parts:
  * `eval_core.sv`
  * `preproc_engine.sv`
  * `isqrt.sv`
  * `integral_buffer.sv`, with `ii_bank.sv`
  * `training_rom.sv`
  * `haar_tree.sv`
  * `haar_node.sv`

**`tb/`**

* One self-checking testbench per module, `tb_<module>.sv`.
* `fd_ref_pkg.sv`: an independent reference model. It covers the integral
  image, NF, the cascade and the cycle count.
* `axi_mem_model.sv`: a memory with random stalls and AXI protocol checks.
* `axil_bfm.sv`: a CPU bus driver.

Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_face_detect_top` runs the whole system at its default parameters (3
Evaluators, full 1047-tree cascade):

1. It downscales a 48x40 image placed across a 4 KB boundary.
2. It classifies every 20x20 window of both levels at a step of 2 pixels
   (242 windows) on the three Evaluators.
3. It checks every result and cycle count against the reference model.

It also confirms that each of these happened at least once: early rejections,
faces, two-phase trees, overlapped loads and split bursts.

`tb_frame_pyramid` runs the two frame sizes the system was built for, 640x480
and 320x240. For each frame:

1. The Downscaler is started level after level until a level is smaller than
   a window. The 640x480 frame gives 18 levels, down to 27x20.
2. Every byte of every level is checked.
3. Eight windows per level are classified and checked: the four corners and
   four at random positions.

Classifying every window of such a frame would take far too long to simulate.
Building the complete 640x480 pyramid takes about 540,000 clocks against a
memory that stalls at random.

`tb_core_count` builds the system with one and with two Evaluators. The two
builds run side by side, each in its own `core_count_env`, and each
classifies 30 checked windows.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`, for example the
whole system:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_face_detect_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fd_pkg.sv tb/fd_ref_pkg.sv \
    tb/tb_face_detect_top.sv
./obj_dir/Vtb_face_detect_top
```

The library paths let Verilator find every other module by its file name, so
the same command runs any testbench when you change the top module and the last
file. Packages are listed first because modules import them. Every testbench
runs in a few seconds or less.

To change the number of Evaluators, set `N_EVAL` on `face_detect_top`. The
control decoder grows with it. To use real training data, replace `gen_tree` and
`gen_stage_thr` in `fd_pkg` (or the `initial` block of `training_rom`) by
trained values in the same record format.
