# Row-stationary CNN accelerator with switchable spatial/temporal dataflow

This is a convolution accelerator built around a systolic array of processing
elements (PEs). It uses the *row-stationary* (RS) idea: a PE keeps one filter row
and one input row in local line buffers. Each weight and each activation fetched
from the scratchpad is therefore used many times before it leaves the array. The
array supports two ways of mapping a layer onto the PEs, and the host picks one
per layer at run time:

* **SRS (spatial RS)** is the classic mapping. A group of R PE rows holds the R
  rows of one filter, and the psums of the group are added bottom-to-top.
  Several filters are stacked vertically (G = Y / R groups). Input rows travel
  diagonally through the array.
* **TRS (temporal RS)** gives every PE row a different output channel and walks
  the filter rows in time. Each PE keeps all R x S weights of its filter, and
  input rows travel vertically. Any Y that divides M (or M >= Y) fills every row,
  whereas SRS leaves Y mod R rows idle. So TRS keeps more PEs busy on layers
  with many channels.

One start command runs a whole layer. The control unit runs the full loop nest in
hardware: tiling over output channels, output rows, output columns and input
channels. It then writes bias-corrected, scaled, ReLU-activated 8-bit outputs, or
raw 32-bit sums, back to the scratchpad.

Default configuration: a 7-column x 10-row array (70 PEs), a 128 kB
single-port scratchpad, 16-word edge FIFOs, 8-bit data and 32-bit partial sums.

## How a layer is mapped

Notation: input I[H][W][C], weights W[M][R][S][C], output O[P][Q][M] with
P = H-R+1 and Q = W-S+1. This means stride 1 and no padding. The array has X
columns (x = 0 is west) and Y rows (y = 0 is the bottom row). C0 channels and
Q0 output columns fit into a PE's line buffers. The host programs C0 and Q0.

### What one PE computes

After its buffers have been loaded, a PE runs, one multiply-accumulate per clock:

    for q0 < qn, s < S, c0 < cn:
        psum[q0] += w[woff + s*cn + c0] * iact[(q0+s)*cn + c0]

This is the 1-D convolution of one filter row with one input-row segment, over cn
channels. It takes exactly qn*S*cn clocks. The psums stay in the PE across channel
chunks (and, in TRS, across filter rows) until they are drained.

### TRS

    PE row y    -> output channel m = m_base + y
    PE column x -> output row     p = p_base + x
    for each (m_base, p_base, q_base) tile:            CLEAR
      for each channel chunk c_base:                   LOADW  R*S*cn weights per row
        for r < R:                                     LOADI  input row p+r on south feed x
                                                       COMP   woff = r*S*cn
      for y < Y:                                       DRAIN  row y

All PEs of a column see the same input row (vertical forwarding). All PEs of a
row see the same weights (eastward forwarding). Only the X south iact FIFOs are
used.

### SRS

    G = floor(Y / R) groups; group g = rows g*R .. g*R+R-1 holds filter m_base+g
    row j of a group works on filter row r = R-1-j
    feed f (0 .. X+Y-2) carries input row h = pb + R - Y + f
    PE(y,x) lies on diagonal f = x - y + Y - 1  ->  group g computes output row
    p = pb + x - g*R, the same for all R rows of the group
    for each (m_base, q_base) tile, for pb = 0, X, 2X, ... < P + (G-1)*R:   CLEAR
      for each channel chunk:  LOADW S*cn per row, LOADI (qn+S-1)*cn per feed, COMP
      for g < G:               DRAIN row g*R+R-1 with accumulation from the rows below

Input rows move diagonally from bottom-left to top-right. Because filter row r
decreases upward inside a group, every PE of a diagonal needs the same input row.
The groups are therefore offset by R output rows from each other. The pass base
pb steps by X until the last group has covered all P rows. Feeds whose row is
outside the image are filled with zeros without reading the scratchpad. Results
that fall outside the output (p < 0, p >= P, or m >= M) are popped and dropped.
This is where SRS loses PEs at the edges.

Feeds f < Y-1 enter at the west edge of row Y-1-f. Feeds f >= Y-1 enter at the
south edge of column f-(Y-1). That makes X+Y-1 iact FIFOs in total.

### Line buffer limits (defaults)

| buffer | depth | SRS needs | TRS needs |
|---|---|---|---|
| weights | 128 | S*C0 | R*S*C0 |
| iacts   | 128 | (Q0+S-1)*C0 | (Q0+S-1)*C0 |
| psums   | 32  | Q0 | Q0 |

For example, a 3x3 layer in TRS allows C0 = 4 with Q0 up to 30. A 7x7 filter fits
with C0 = 2.

## Data movement and clock domains

```
 clk_axi            |  clk_spad                               |  clk_pe
 axi_lite_if <-toggle-> host_port --+                          |
                    |               +-- scratchpad (1 port)    |
                    |  control_unit-+                          |
                    |   loop nest, address generation,         |
                    |   iact_arbiter (round robin)             |
                    |        |-- cmd queue ----async_fifo----> array_ctrl
                    |        |-- Y weight FIFOs -------------> west edge  } pe_array
                    |        |-- X+Y-1 iact FIFOs -----------> west/south }  X x Y pe
                    |        <-- X output buffers <----------- north edge }
                    |   post_proc                              |
```

* **Scratchpad** (`scratchpad`). It has 32768 words of 32 bits, byte enables and
  one port, with a one-clock read latency. It is byte addressed: activations,
  weights and 8-bit outputs take one byte each, and biases and raw sums take one
  word each. The control unit owns the port while busy, and the host owns it
  otherwise.
* **Round-robin fill** (`iact_arbiter` inside `control_unit`). Every FIFO of the
  current load has its own address counters. Each scratchpad clock, the arbiter
  picks the next FIFO that still needs data and has room. That FIFO gets one
  element. A FIFO is served in two consecutive clocks only if it has two free
  slots, because of the read latency. The same arbiter fills the weight FIFOs.
  The fill bandwidth is one element per scratchpad clock. So the ratio of the
  scratchpad clock to the PE clock limits how fast the array can be fed. The
  testbenches run at 5:1.
* **Edge FIFOs** (`async_fifo`). These are dual-clock FIFOs with Gray-coded
  pointers. They hold 16 words by default.
* **Commands** (`rs_pkg::cmd_t`). These are CLEAR, LOADW(n), LOADI(n),
  COMP(woff) and DRAIN(row, acc). The control unit always queues a load command
  before streaming its data. The PE side executes the commands in order, so the
  two sides cannot deadlock, and the scratchpad side can run ahead and prefetch.
* **Stall** (`array_ctrl`). During a load, all active input FIFOs are popped
  together. If any of them is empty, the whole array waits for that clock, and
  the clock is counted in `stat_stall`. During a drain, the X output buffers are
  pushed together and the drain waits while any of them is full
  (`stat_out_stall`).
* **Drain.** `psum_out` of a PE is `psum[k] + (acc_en ? psum_out_of_PE_below : 0)`.
  This is combinational, so in SRS the top row of a group delivers the sum of its
  R rows in one clock. `acc_en` is set for every row that is not the bottom row of
  its group.

Reset (`rst_n`) is asynchronous and must be released synchronously in each
domain. The layer configuration registers cross from the AXI domain without
synchronisers: they must not be written while the accelerator is busy.

## Output stage (`post_proc`)

    y = sat8( relu( round( (acc + bias[m]) * mant / 2^shift ) ) )

Rounding is half up, and `mant` is 16 bits wide with a 6-bit `shift`. With the
`raw` bit set, the 32-bit sum is written unchanged as a word. With `raw` and
`accumulate` set, each output word is read first and written back as the stored
value plus the new sum. This costs one more scratchpad clock per output, and it
lets a layer be split over input channels.

## Host interface

AXI4-Lite, 32-bit, 18-bit address. Bit 17 selects a 128 kB window onto the
scratchpad, where each word is addressed as `0x20000 + 4*word`.

| offset | register | bits |
|---|---|---|
| 0x00 | CTRL | [0] start (write 1), [1] dataflow 0=SRS 1=TRS, [2] ReLU, [3] raw 32-bit output, [4] accumulate: add raw sums to the words already at O_BASE |
| 0x04 | STATUS | [0] busy, [1] done (also on `irq`) |
| 0x08..0x1C | H, W, C, M, R, S | layer shape (H, W, C, M up to 2047; R, S up to 15) |
| 0x20, 0x24 | C0, Q0 | channels / output columns per line buffer |
| 0x28..0x34 | I_BASE, W_BASE, O_BASE, B_BASE | scratchpad byte addresses (B_BASE word aligned, O_BASE too in raw mode) |
| 0x38 | SCALE | [15:0] mantissa, [21:16] shift |
| 0x3C | HWINFO | [7:0] X, [15:8] Y (read only) |

Scratchpad layout, byte addresses:

* `I[(h*W + w)*C + c]` at I_BASE
* `W[((m*R + r)*S + s)*C + c]` at W_BASE
* bias[m] as a 32-bit word at B_BASE + 4m
* `O[(p*Q + q)*M + m]` at O_BASE, one byte each, or one word each (at O_BASE + 4*index) in raw mode

To run a layer:

1. Write the data through the window.
2. Write the shape, tiling, bases and scale registers.
3. Write CTRL with bit 0 set.
4. Poll STATUS, or wait for `irq`.

The host chooses the dataflow and C0/Q0. The table above gives the limits.

## Parameters

| parameter | default | where |
|---|---|---|
| X, Y | 7, 10 | `rs_accel`, `pe_array`, `control_unit`, `array_ctrl` |
| SPAD_WORDS | 32768 (128 kB) | `rs_accel` |
| FIFO_DEPTH | 16 (power of two) | `rs_accel` |
| W_DEPTH, I_DEPTH, P_DEPTH | 128, 128, 32 | `rs_accel`, `pe_array`, `pe` |
| DATA_W, PSUM_W | 8, 32 | `rs_pkg` |

Y must be at least R, and a DRAIN row index is 5 bits wide, so Y <= 32.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/rs_pkg.sv tb/tb_rs_accel.sv --top-module tb_rs_accel
    ./obj_dir/Vtb_rs_accel

| testbench | what it shows |
|---|---|
| `tb_pe` | MAC loop against a 1-D convolution (SRS and TRS, woff per filter row), busy = qn*S*cn clocks, forwarding, accumulate-from-below |
| `tb_pe_array` | every PE receives the right feed (diagonal vs vertical) and row weight, and the group sums |
| `tb_async_fifo` | full/almost-full exactly at 16/15, data order under random traffic on unrelated clocks |
| `tb_iact_arbiter` | round-robin order against a model |
| `tb_scratchpad` | byte-enable writes, one-clock reads |
| `tb_post_proc` | bias, scale, rounding, ReLU and saturation against a 64-bit model |
| `tb_control_unit` | the complete command sequence, every FIFO's element stream (including zero padding) and every write address and value, for TRS, SRS and TRS with accumulation, derived from the loop nests above |
| `tb_array_ctrl` | command execution on a small real array, input and output stalls, mode-switch count |
| `tb_axi_lite_if` | register map, start toggle, scratchpad window, B/R held until ready |
| `tb_rs_accel` | default-size end to end over AXI: one layer in TRS (8-bit outputs), then SRS (raw sums), then TRS accumulated onto those sums, needing several tiles in every loop; requires that stalls, the dataflow switch, zero feeds, dropped results, ReLU clipping and accumulation all occurred |
| `tb_layers_table2` | eight ResNet-50, GoogLeNet and MobileNetV3 layers (see below) in both dataflows at 10:1; every output byte checked; TRS may not be more than 5 % slower than SRS |
| `tb_fifo_depth_sweep` | four default-size copies built with input FIFOs of 4, 8, 16 and 32 words run the C=M=40 3x3 layer at 5:1; outputs checked, cycles and stalls must fall with depth |
| `tb_workload_fig4` | default size: 32x32 images with 40 channels (3x3, 5x5, TRS) and 10 channels (3x3, both dataflows); clock-ratio sweep 1:1 to 10:1; every output byte checked |

Measured with `tb_workload_fig4`, with cycles counted in PE clocks from start
to done. The ratio is the scratchpad clock frequency over the PE clock frequency.

| layer | dataflow | ratio | PE cycles | ideal (MACs/70) | utilization | stall cycles |
|---|---|---|---|---|---|---|
| 32x32, C=M=40, 3x3 | TRS | 5:1 | 348 761 | 185 143 | 53 % | 23 719 |
| 32x32, C=M=40, 3x3 | TRS | 10:1 | 322 460 | 185 143 | 57 % | 0 |
| 32x32, C=M=40, 5x5 | TRS | 5:1 | 633 090 | 448 000 | 71 % | 39 761 |
| 32x32, C=M=10, 3x3 | TRS | 1:1 | 58 869 | 11 571 | 20 % | 28 060 |
| 32x32, C=M=10, 3x3 | TRS | 2:1 | 36 829 | 11 571 | 31 % | 11 379 |
| 32x32, C=M=10, 3x3 | TRS | 5:1 | 23 642 | 11 571 | 49 % | 1 395 |
| 32x32, C=M=10, 3x3 | TRS | 10:1 | 21 600 | 11 571 | 54 % | 0 |
| 32x32, C=M=10, 3x3 | SRS | 5:1 | 50 402 | 11 571 | 23 % | 14 664 |

Input FIFO depth, for the C=M=40 3x3 TRS layer at 5:1 (`tb_fifo_depth_sweep`):

| depth | 4 | 8 | 16 | 32 |
|---|---|---|---|---|
| PE cycles | 361 482 | 356 442 | 348 761 | 334 201 |
| stall cycles | 36 440 | 31 400 | 23 719 | 9 159 |

Depth matters less here than it would in a design that streams activations
while computing. Here a FIFO can only prefetch while the array computes on the
previous load. It still gains beyond 16 words at 5:1. At 10:1 even 4 words
never stall.

Layers from common networks (`tb_layers_table2`). Each keeps its real image
size, filter size and channel count, but computes 10 output channels. Channels
are cut where the whole layer would not fit in 128 kB. The ratio is 10:1.

| layer | image | filter | C | SRS util. | TRS util. |
|---|---|---|---|---|---|
| ResNet-50 | 28x28 | 3x3 | 128 (of 256) | 31 % | 58 % |
| ResNet-50 | 14x14 | 3x3 | 448 (of 1024) | 25 % | 55 % |
| ResNet-50 | 7x7 | 3x3 | 512 | 13 % | 40 % |
| GoogLeNet | 14x14 | 1x1 | 528 | 17 % | 41 % |
| GoogLeNet | 7x7 | 1x1 | 832 | 11 % | 38 % |
| MobileNetV3 | 28x28 | 5x5 | 120 | 44 % | 60 % |
| MobileNetV3 | 14x14 | 3x3 | 240 | 25 % | 55 % |
| MobileNetV3 | 7x7 | 5x5 | 432 (of 960) | 10 % | 20 % |

TRS is ahead on every layer. SRS loses whole rows (Y mod R), diagonals that run
outside the image, and results that are dropped at the image edges. Small
images (7x7) leave columns idle in both dataflows and need many short loads.

Below about 5:1, the single scratchpad port cannot keep the input FIFOs filled.
At 10:1 no stall remains. The remaining gap to the ideal count is time in which
the array is not computing:

* loading each line buffer before computing on it (nothing is double buffered);
* the flush after each load;
* the drains;
* bias reads and writeback at the end of each tile.

At a 100 MHz PE clock and 5:1, the C=M=10 TRS layer runs at about 3.4 G MAC/s.
That figure excludes loading the data over AXI. The peak is 7 G MAC/s.

## Design choices and limits

The design follows its source in these points:

* the PE array and its three flows (weights east, input activations diagonal or
  vertical through a per-PE multiplexer, sums upward);
* the two loop nests and their mappings;
* the R x S weight buffer of TRS;
* X+Y (here X+Y-1) edge FIFOs for SRS and X for TRS;
* the stall of the whole array on an empty input FIFO;
* round-robin filling from a single-port scratchpad;
* the three clock domains;
* the default sizes.

The following are this implementation's own:

* **Widths and depths.** Widths, line-buffer depths (128/128/32) and the
  byte-addressed scratchpad organisation.
* **Command queue.** The command queue between the two domains and its encoding.
* **SRS pass scheme.** The SRS pass scheme (groups offset by R rows, zero feeding,
  dropping) that reconciles diagonal forwarding with stacked filters.
* **Loop order.** Loop order: TRS runs channel chunks outside filter rows so that
  all R*S*C0 weights stay loaded; SRS iterates m, q, pass.
* **Drain path.** The combinational drain path, rather than a registered psum
  pipeline.
* **Scaling.** The scale factor is a mantissa and power-of-two exponent, not an
  IEEE float.
* **Activation.** ReLU is the only activation function.
* **Host interface.** The AXI4-Lite interface (no bursts) and its register map.
* **Convolution shape.** Stride 1 and no padding.

Points where this implementation is known to differ in behaviour:

* **Clock ratio.** The source sizes the input FIFOs (16 words) for a scratchpad
  clock 10x the PE clock. Its FPGA build runs at 5:1. Both ratios are simulated
  above.
* **Input FIFOs.** SRS uses X+Y-1 input FIFOs, not X+Y. The corner PE is fed
  from the south edge only.
* **TRS loop order.** TRS computes all filter rows of one channel chunk before
  moving to the next chunk. The source loop nest names the filter row as the
  outer of the two.
* **FIFO depth.** The source finds that input FIFOs below about 10 words cost
  a lot of time and that more than 16 words hardly help. Here the effect of
  depth is small, and 32 words still help at 5:1. Loads and computation
  alternate rather than overlap, so the array is idle during every load
  whatever the depth.
* **Output buffers.** The output buffers are the same dual-clock FIFO as the
  inputs, and drains stall the array while they are full.

Not included: a PCIe host interface, the host driver and mapping software,
pipelining of one layer's writeback with the next layer's loads, and multiple
iact arbiters. Layers larger than the scratchpad must be split by the host into
independent pieces, by output channel or by row band. To split over input channels, run the first
piece in raw mode and the others with the accumulate bit set. The partial sums
then add up in the scratchpad. Bias, scaling and ReLU then have to be applied by
the host, because they act only in non-raw mode.

## Files

`rtl/rs_pkg.sv` holds the types, the configuration struct and the commands.
`rtl/rs_accel.sv` is the top level. The blocks are `pe`, `pe_array`,
`array_ctrl`, `control_unit`, `iact_arbiter`, `async_fifo`, `scratchpad`,
`post_proc` and `axi_lite_if`. The helpers are `host_port` (the scratchpad-side
host access) and `cdc_sync`. Each file starts with a description of its
function, interface and timing.
