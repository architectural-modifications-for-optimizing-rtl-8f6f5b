# MorphoSys M1 reconfigurable array with multiply-feedback ALU and diagonal links

This is synthesizable SystemVerilog for the reconfigurable part of a
MorphoSys-M1-style system: an 8 x 8 array of 16-bit reconfigurable cells (RCs),
its context memory, its double-buffered frame buffer and a DMA controller.
Two small architectural changes are built in, each aimed at one class of
kernel:

* **Multiply with output feedback in every cell.** A cell can compute
  `Out(t+1) = C x Out(t)` or `Out(t+1) = A x Out(t)`, so a product can be
  scaled again without a round trip through the frame buffer. Two scalings
  of a vector by `C1` and then `C2` take two broadcasts per column and a
  single write-back.
* **A lower-left diagonal link into operand port B.** Cell `(r, c)` can read
  the output of cell `(r+1, c-1)`, so a partial sum moves up and to the
  right by one cell per cycle. An FIR filter with up to N-1 taps on an N x N
  array then produces two outputs per cycle instead of one.

The control processor (a small RISC core in M1), its cache and the off-chip
main memory are not part of this RTL. The processor's two command streams
are ports of the top module, and main memory sits behind a simple
request/grant port.

## Block structure

```
            dma_cmd                 arr_cmd (one per cycle)         probe (16 bit)
               |                          |                              ^
        +------v-------+          +-------v--------+                     |
 main   |   dma_        |  ctx wr  |  rc_array_ctrl |   256-bit context   |
 memory<+ controller    +--------->| context_memory +---------+          |
 32 bit |              |   32 bit +-------+--------+          v          |
        |              |   64 bit         | 64/128 bus   +----------+    |
        |              +--------->frame_buffer---------->| rc_array +----+
        +--------------+          2x2x64x64  <-----------+ 8x8 RCs  |
                                             write-back   +----------+
                                             128 bit   (rc_cell x64 + rc_interconnect)
```

| File | Contents |
|------|----------|
| `rtl/m1_pkg.sv` | sizes, opcode and source encodings, context word, command structs |
| `rtl/rc_cell.sv` | one cell: ALU with multiplier, output register |
| `rtl/rc_interconnect.sv` | operand routing for all 64 cells (mesh, diagonal, lanes, data bus) |
| `rtl/rc_array.sv` | 8 x 8 cells, row/column context broadcast |
| `rtl/context_memory.sv` | 2 blocks x 8 sets x 16 words x 32 bits |
| `rtl/frame_buffer.sv` | 2 sets x 2 banks x 64 words x 64 bits |
| `rtl/dma_controller.sv` | main memory <-> context memory / frame buffer |
| `rtl/rc_array_ctrl.sv` | executes broadcast and write-back instructions |
| `rtl/morphosys_m1.sv` | top level |

## The cell and its context word

Every cell holds one registered 16-bit output. In each cycle it is enabled
it replaces that output with the result of one ALU operation. The cell is
configured by a 32-bit context word. All cells of a row (in row mode) or of
a column (in column mode) share the same word, as in M1.

| Bits | Field | Meaning |
|------|-------|---------|
| 31:28 | `op` | ALU operation |
| 27:24 | `sel_a` | source of operand A |
| 23:20 | `sel_b` | source of operand B |
| 19:18 | `idx_a` | lane index for A when `sel_a` is a quadrant lane |
| 17:16 | `idx_b` | lane index for B |
| 15:0  | `c` | signed constant |

| `op` | Result | Use |
|------|--------|-----|
| 0 `OP_NOP` | hold | |
| 1 `OP_PASS_A` | A | move / clear (with `SRC_ZERO`) |
| 2 `OP_ADD` | A + B | |
| 3 `OP_MUL_C` | A x C | vector-scalar multiply |
| 4 `OP_MAC_C` | A x C + B | FIR tap |
| 5 `OP_MUL_AB` | A x B | |
| 6 `OP_MUL_OUT_C` | C x Out(t) | feedback multiply (new) |
| 7 `OP_MUL_OUT_A` | A x Out(t) | feedback multiply (new) |

Arithmetic is two's complement on 16 bits and wraps: products keep their low
16 bits. Codes 8 to 15 behave as `OP_NOP`. Reset clears every output to zero.

## Operand routing and the diagonal link

`rc_interconnect` is a purely combinational selector per port and per cell.
Row 0 is the top row and column 0 the leftmost column.

| `sel` | Source for cell (r, c) |
|-------|------------------------|
| 0 `SRC_BUS` | its element of the frame-buffer bus, sign-extended to 16 bits (8-bit element, or 16-bit in a wide broadcast) |
| 1 `SRC_LEFT` / 2 `SRC_RIGHT` | (r, c-1) / (r, c+1) |
| 3 `SRC_TOP` / 4 `SRC_BOTTOM` | (r-1, c) / (r+1, c) |
| 5 `SRC_DIAG_LL` | **(r+1, c-1), the new diagonal link** |
| 6 `SRC_QROW` | (r, q + idx): any cell of its row in its own 4 x 4 quadrant |
| 7 `SRC_QCOL` | (q + idx, c): any cell of its column in its own quadrant |
| 8 `SRC_XROW` | any cell of its row in the horizontally adjacent quadrant |
| 9 `SRC_XCOL` | any cell of its column in the vertically adjacent quadrant |
| 10 `SRC_ZERO` | 0 |

A neighbour outside the array reads as zero; there is no wrap-around. Both
ports can reach every source. M1 itself restricts the ports more (A on the
data bus, B on the neighbours). Here the same selector is used for both
ports, to keep the design simple.

### Why the diagonal doubles the FIR rate

Take a T-tap filter `y(n) = sum_j w(j) x(n-j)` on an N x N array with
T = N-1 (7 taps on 8 x 8; shorter filters pad with zero weights). The array
runs in column mode with every column active:

* column 0: `OP_MUL_C`, A = bus, C = w(T-1)
* column j, 1 <= j <= T-1: `OP_MAC_C`, A = bus, B = `SRC_DIAG_LL`, C = w(T-1-j)
* column N-1: unused

Every broadcast puts 8 consecutive samples on the bus, one per row, and the
window moves by **two** samples per broadcast. Bus word k carries
`x(2k - (T-1) + r)` in row r. After broadcast k the cell (r, j) holds the
partial sum of samples `s, s-1, ..., s-j`, where `s` is its own sample. It
got the shorter partial sum from (r+1, j-1) one cycle earlier. Row r+1 was
one sample ahead, and the window has since moved by two, so it is exactly one
sample behind now. Rows 0 and 1 of column T-1 then hold complete outputs:

```
cell (0, T-1) = y(2k - (T-1))      cell (1, T-1) = y(2k - (T-1) + 1)
```

So there are two new outputs per broadcast. Rows 2 to N-1 compute partial
sums that feed these two rows. With only the left neighbour (the earlier
mapping, `SRC_LEFT` in place of `SRC_DIAG_LL`, window moving by one sample) there
is one new output per cycle. When each broadcast is followed by one
write-back of column T-1, the system delivers 2 outputs every 2 cycles.
The earlier mapping writes back once every N cycles, which gives N/(N+1)
outputs per cycle. Before the first broadcast the array should hold zeros
(reset, or one broadcast of `OP_PASS_A` from `SRC_ZERO`), as the filter
assumes `x(n) = 0` for n < 0.

The filter length is bounded by the array: with the diagonal mapping an
8 x 8 array takes at most 7 taps. Longer filters (8, 16, 32 or 64 taps) need
a larger array, because N must be at least taps + 1. The left-link mapping
uses every column, so it fits 8 taps on 8 x 8.

### Composite scaling with the feedback multiply

To compute `C2 x (C1 x A)` for a 64-element vector A (8 bits per element,
column c's eight elements in one frame-buffer word):

1. 8 broadcasts, one per column c: `OP_MUL_C`, A = bus, C = C1, bus = word of column c
2. 8 broadcasts, one per column: `OP_MUL_OUT_C`, C = C2 (no frame-buffer data used)
3. 8 write-backs, one per column

These are 24 array instructions in 24 cycles. Without the feedback operation,
the intermediate product has to go through the frame buffer: 8 broadcasts of
C1 x A, 8 write-backs of the 16-bit products, 8 *wide* broadcasts that read
those products back and multiply them by C2, and 8 more write-backs, which is
32 cycles. The other order also runs in 24 cycles with the second new
operation. Keep one frame-buffer word with C1 in every element, and for each
column broadcast that word with `OP_MUL_C`, C = C2, then broadcast the
vector with `OP_MUL_OUT_A` (A = bus), then write back.

## Memories, DMA and instructions

**Context memory.** Block 0 holds row contexts: set r drives row r. Block 1
holds column contexts: set c drives column c. A broadcast read returns word
`ctx_word` from all 8 sets of one block (256 bits) one cycle after the
request. The DMA writes one 32-bit word at a time to the address
`{block, set[2:0], word[3:0]}`. The read and write ports are separate, so
contexts can be loaded while the array runs.

**Frame buffer.** It has 2 sets, each with banks A and B, each bank 64 x 64
bits. Input data uses 8-bit elements: a 64-bit word carries one element for
each cell of a row or column. It has three ports:

* array read: the word at one address of one set, both banks (128 bits);
  the controller passes one bank as eight 8-bit elements, or both banks as
  eight 16-bit elements (wide broadcast);
* array write-back: the 8 x 16-bit results of one row or column, results
  0 to 3 into bank A and 4 to 7 into bank B at the same address;
* DMA: one 64-bit word, read or write.

Reads return data one cycle after the request. If the array and the DMA
write the same word in the same cycle, the array's write wins. The intended
use is that the DMA works on one set while the array uses the other.

**DMA controller.** A `dma_cmd_t` command moves `count` local words:

* context load: `count` 32-bit words;
* frame-buffer load: 2 x 32-bit words per 64-bit word, low half first;
* frame-buffer store: the reverse of a frame-buffer load.

Main memory is word-addressed (24-bit address, 32-bit data). A request
(`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`) is held until `mem_gnt`.
Read data returns later with `mem_rvalid`. One request is outstanding at a
time. `cmd_ready` is high only when the controller is idle, and `done`
pulses once when a command finishes.

**Array instructions** (`array_cmd_t`, accepted every cycle with
`arr_cmd_valid`, never stalled):

* `CMD_BCAST`: read context word `ctx_word` of block `mode`. Read frame-buffer
  word `fb_addr` of `fb_set`; bank `fb_bank` becomes the bus, or, with `wide`
  set, both banks as eight 16-bit elements (bank A holds elements 0 to 3,
  bank B elements 4 to 7, the same layout a write-back produces). Execute
  row/column `line`, or all rows/columns when `all` is set.
* `CMD_WBACK`: write row/column `line` to `fb_addr` of `fb_set`.

Both pass through a two-stage pipeline: the memory reads in the first cycle,
then the execution or write-back in the second. The cells update at the end
of the second cycle. Instructions stay in order, so a write-back issued right
after a broadcast stores that broadcast's results. The `probe_row`/`probe_col`
port reads any cell's output combinationally. It stands for the 16-bit path
from the array back to the processor.

## Own choices and departures

The block structure and sizes come from the M1 architecture: an 8 x 8 array
in 4 x 4 quadrants, 2x8x16x32 context memory, a 2x2x64x64 frame buffer, and a
64-bit bus, 256-bit context broadcast and 32-bit memory path. So do the
three-level network, row/column broadcast, the two new features and the two
mappings. The following are this design's own:

* the 16-bit cell width, 8-bit bus elements with sign extension, and
  wrapping arithmetic;
* the context-word layout, opcode and source encodings, and the 2-bit lane
  index used for the quadrant lanes;
* both operand ports reaching every source, including a right-neighbour
  link;
* the instruction formats: M1's real instruction encodings are not
  reproduced, and the processor is replaced by command ports;
* single-line broadcasts: each broadcast can address one column, so the
  second scaling phase runs once per column;
* how a 128-bit write-back is split over banks A and B, and the wide
  broadcast that reads such a word back as eight 16-bit elements (M1 names
  its ordinary broadcast a *single-bank* one, which suggests a two-bank form,
  but its layout here is this design's);
* the DMA protocol and its throughput (one 32-bit word per two cycles or
  more), the memory latencies, and the read-during-write rules.

Frame-buffer addresses in this design are word addresses (0 to 63). A
byte-addressed program that steps by 0x40 per column corresponds to word
addresses 8, 16, ... here.

Not built: the control processor and its instruction/data cache, and the
SDRAM. The testbenches use a behavioural memory model
(`tb/main_memory_model.sv`). The three-input cell that could make longer
diagonal chains pay off is also not built. It is a possible extension, not
part of the design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_rc_cell` | every opcode against an integer model, enable, reset, C1/C2 feedback chain |
| `tb_rc_interconnect` | every source for every cell against coordinates, incl. zero at the borders |
| `tb_rc_array` | 7-tap FIR on the diagonal (2 outputs/cycle), 7-tap FIR on the left link, composite scaling column by column, row mode with a quadrant lane, wide 16-bit bus elements |
| `tb_context_memory` | all 256 words, 256-bit broadcast read, read-during-write |
| `tb_frame_buffer` | all ports, bank split of the write-back, set independence |
| `tb_dma_controller` | context load, frame-buffer load and store, zero-length command, `done` |
| `tb_rc_array_ctrl` | 2000 random instructions against a reference pipeline |
| `tb_morphosys_m1` | end to end at full size: DMA loads, composite scaling (24 instructions in 24 cycles) while the DMA loads the next data, 7-tap diagonal FIR (48 outputs in 48 cycles), row mode, DMA store, results compared in main memory; every mechanism is counted |
| `tb_fir_workloads` | full size with write-back: 8-tap left-link filter (32 outputs in 36 cycles) and 7-tap diagonal filter (32 outputs in 32 cycles) |
| `tb_fir_mappings` | 3-tap FIR on a 4 x 4 array (diagonal, every partial sum checked) and on a 3 x 3 array (left link), with output rates |
| `tb_scaling_workloads` | two scalings of 64 and of 32 elements, in one step (24 / 12 cycles), in two steps through the frame buffer (32 / 16 cycles), and with the constant product C2 x C1 formed first and then A x Out(t) (24 cycles), full size |

Assertions in `dma_controller` (request held until granted, read data only
when a read is outstanding) and in `rc_array_ctrl` (one line or all lines
enabled) are checked in every simulation run with `--assert`.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_morphosys_m1 \
    -y rtl -y tb +libext+.sv -Irtl rtl/m1_pkg.sv tb/tb_morphosys_m1.sv
./obj_dir/Vtb_morphosys_m1
```

The top has no parameters. The block modules take `N`, `Q`, `W` and `E`
(bus element width) where they apply, with the defaults in `m1_pkg`. The package sizes,
command field widths (3-bit line index, 6-bit frame-buffer address, 4-bit
context word) assume the 8 x 8 configuration.

## Performance as built

| Kernel | Built | Cycles in the array |
|--------|-------|---------------------|
| Two scalings of a 64-element vector, one step | yes, 64 cells | 8 + 8 broadcasts + 8 write-backs = 24 |
| Same, 32 elements | yes, 4 columns | 4 + 4 + 4 = 12 |
| Same, constant product first: C2 x C1, then A x Out(t) | yes | 8 + 8 + 8 = 24 |
| Two scalings in two steps (no feedback multiply), 64 / 32 elements | yes, with the wide broadcast | 32 / 16 |
| FIR up to 7 taps, diagonal mapping | yes | 2 outputs every 2 cycles including write-back |
| FIR 8 taps, left-link mapping | yes | 8 outputs every 9 cycles including write-back |
| FIR 8, 16, 32, 64 taps, diagonal mapping | no: needs a 9 x 9 to 65 x 65 array | - |
| FIR 16, 32, 64 taps, left-link mapping | no: needs 16 to 64 columns | - |

At 100 MHz the diagonal FIR delivers 100 Msamples/s, whatever the number of
taps that fits. The left-link mapping delivers N/(N+1) of that: 88.9 % for
8 taps and 98.5 % for 64. Cycle counts for whole programs also depend on the
control processor and DMA, which are outside this RTL.
