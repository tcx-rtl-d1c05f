# TCX tensor engine in SystemVerilog

TCX is a tensor coprocessor for convolutional-network inference. It has 4096
8-bit multiply-accumulate units and is programmed with 64-bit tensor
instructions. Each instruction loads, stores, moves or computes on a whole
tensor register: a sub-tensor spread over the machine's distributed register
banks. Tensor operations have long and variable latency. So the front end
renames tensor registers, as an out-of-order CPU renames scalar ones. Loads and
computations overlap without a reorder buffer and without copying any tensor.

This RTL implements the engine described in the TCX publication (*TCX: A
Programmable Tensor Processor*). It is written from that description. Where the
publication gives only a function, a simple implementation of that function was
chosen. Every such choice is listed below and in each file's header.

## Organisation

```
tcx_top
├── tcx_ctrl          instruction decode, dimension/config registers, issue, retire, fence
│   └── tcx_rename    ATR→PTR mapping table, free stack, ready/early-free state, reference counts
├── tcx_lsu           4-D gather/scatter between the 64-bit bus and the register banks
├── tcx_loopback      register-to-register move with crop/pad/duplicate
└── tcx_nr ×4         neuron matrix: 16 cells in lockstep + partition-aware write decode
    └── tcx_cell ×16  8×8 compute units, sequencer, kernel cache
        ├── tcx_trf_bank   this cell's bank of every tensor register (2 ports)
        ├── tcx_feeder     5-stage operand pipeline: tile buffer, kernel buffer, shift/select
        ├── tcx_cu ×64     y = op0·op1 + op2 with 32-bit accumulator, max, PReLU
        └── tcx_row_pack   packs 8 results into one register row (INT8/INT16/INT20)
```

`tcx_pkg` holds the sizes, types, the instruction field layout and small
encoder functions for writing programs.

| Constant | Value | Origin |
|---|---|---|
| `NUM_NR` × `NUM_CELL` × `CU_DIM`² | 4 × 16 × 64 = 4096 CUs | published |
| `FEED_STAGES` | 5 | published |
| `WORD_W` | 160 bits (8 CUs × 20-bit results) | published result width |
| `NUM_ATR` / `NUM_PTR` | 8 architectural / 10 physical tensor registers | own choice |
| `TRF_ROWS` | 32 rows of 160 bits per register per cell | own choice |
| `TILE` | 20 rows × 20 byte lanes of feature window per cell | own choice |
| `KB_WORDS` | 10 words = 200 kernel bytes per cell | own choice |
| `BUS_W`, `ADDR_W` | 64-bit data, 32-bit byte address | own choice |

## Tensor registers and renaming

A tensor register is not one memory. Register *p* is row range *p* of every
cell's bank. Cell *c* of NR *n* holds the part of the tensor that cell *c* of
NR *n* will compute on. A row is 160 bits: 20 byte lanes, or eight 20-bit
results.

Programs name 8 architectural registers (ATRs). The hardware has 10 physical
ones (PTRs). `tcx_rename` keeps five pieces of state:

- **Mapping table**: ATR → PTR.
- **Free stack**: a LIFO of unused PTRs.
- **Ready bit** per PTR: set when the writer has completed.
- **Early-free bit** per PTR: set when the PTR has been replaced in the mapping table.
- **Reference count** per PTR: incremented once per use at issue, and decremented at retire.

Issue works like this:

1. An instruction that writes a register takes the top of the free stack.
   The new PTR is marked not ready, and the mapping table is updated.
2. The PTR that was mapped before becomes early-free.
3. An early-free PTR whose count has reached zero goes back onto the free
   stack, one per cycle, lowest number first.
4. If the stack is empty, issue stops. This is the allocation stall, counted
   in `PM_ALLOC_STALL`.

An instruction holds a reference on every register it reads or writes. So a
long computation keeps its inputs alive while later loads already reuse their
architectural names. That is the write-after-write and write-after-read freedom
renaming buys.

`tcx_ctrl` issues in program order to two resources that run in parallel:

- the **memory path**: one load, store or move at a time;
- the **compute path**: all four NRs together.

An instruction waits for three things: its sources to be ready, its resource to
be free, and a free PTR if it writes a register. Completions can come back out
of order. A completion marks the destination ready and goes into a 4-entry
retire buffer, which drains one entry per cycle and drops the references.
`FENCE` waits until everything has retired, then pulses `irq`.

**Merge loads.** A tensor register is often built by several loads, for
example one per cell with its own halo. A load with the *merge* bit writes into
the register's current PTR instead of allocating a new one. The merge load
itself waits until that PTR is ready and no running computation reads it. A
computation that reads it waits until the merge load is done. The first load of
such a sequence is an ordinary, renaming load.

## How a cell computes

A compute instruction (`TCOMP`) starts the same command in all 64 cells. Each
cell then works on its own data:

1. **TILE**: copy the feature window from its bank into the feeder's tile
   buffer. This is 7·S+K rows for a K×K kernel at stride S.
2. **KERN**: copy the kernel register's first words into the kernel buffer.
   This phase is skipped when the buffer already holds that PTR (*kernel
   caching*). Any write to the cached PTR drops the cache, which is how a
   renamed reload invalidates it.
3. **RUN**: one step per cycle. A K×K convolution takes K² steps, so 3×3 takes
   9 cycles and 7×7 takes 49. Each step is doubled for 16-bit kernels.
4. **DRAIN**: 7 cycles for the feeder and CU pipelines.
5. **WB**: write the eight result rows to rows 0–7 of the destination.

The feeder is the 5-stage pipeline between the bank and the CUs. Each step it
decides, for every CU at row *i* and column *j*, which operands it gets:

| Mode | op0 (feature) | op1 (kernel byte, same for the row) |
|---|---|---|
| Convolution, stride S | tile[i·S+kr][j·S+kc] | K[kr][kc], broadcast to all CUs |
| Max pooling | same as convolution | fixed to 1; the CU keeps the maximum |
| Point-wise / fully connected, N ≤ 8 outputs | tile[c·8/N + i/N][j] | K[n = i mod N][c] |
| PReLU / leaky ReLU | tile[i][j] | slope |

At stride 1, moving from kernel column kc to kc+1 does not reread the window.
Every CU takes its east neighbour's feature (the *systolic shift*). Only the
easternmost column gets a new value from the tile. Those steps are counted in
`PM_SHIFT_STEPS`.

Point-wise convolution shares one cell among N output channels. CU row *i*
works on pixel row i/N for channel i mod N. Each tile row is broadcast to N CU
rows, and one input channel is consumed per step.

The CU (`tcx_cu`) has two stages:

- It registers its operands and control.
- It then adds op0·op1 to the accumulator. On the first step it uses op2 (0, or
  the most negative value for max) instead.

A 16-bit kernel takes two steps. The high byte's product is shifted left by 8.
The output is `acc >>> shift`, saturated to the selected format.

With `acc_clear = 0`, the next command continues from the accumulator. This is
how inputs with many channels, or kernels too large for one tile, are summed
over several commands.

### Result rows

| Format | Lanes 0–7 (bits 63:0) | Lanes 8–15 (127:64) | Lanes 16–19 (159:128) |
|---|---|---|---|
| INT8 | result j | 0 | 0 |
| INT16 | low byte of j | high byte of j | 0 |
| INT20 | bits 11:4 of j | bits 19:12 of j | nibble j = bits 3:0 |

An INT20 row read as INT16 gives the result with its four low bits dropped.

## Partitions and NR modes

`SETCFG` selects a hardware partition (HWP) of the 4×4 cells into blocks of
2^a × 2^b cells, where a, b ∈ {0,1,2}. Load duplication bits decide where a
written row goes:

- **dup0**: the addressed position in every partition. Use it for common
  feature maps.
- **dup1**: every cell. Use it for kernels.
- **dup2**: every NR.
- none of them: one cell of one NR.

The NR combination mode decides how the four NRs are used:

- **Tile mode**: each NR computes its own output channels.
- **Expand mode**: the input channels are split over the NRs. A store then adds
  the four NRs' partial results, with saturation, before writing to memory.

## Load, store and loopback

`TLOAD` and `TSTORE` move one 4-D sub-tensor. They read three dimension
registers, each set with `SETDIM`:

- global size G,
- local size L,
- signed origin O.

Local element (i0,i1,i2,i3) is:

- on the register side: lane i0 (plus 8+i0 for 16-bit data), row i1, cell
  `cell0+i2`, NR `nr0+i3`;
- in memory: at `base + size·(((c3·G2+c2)·G1+c1)·G0+c0)`, where ck = Ok+ik.

Elements outside the global tensor have these effects:

- On a load they are filled with zeros, without a bus access. This is the
  convolution padding, counted in `PM_PAD`.
- On a store they are dropped (cropping).

Element-level behaviour:

- Consecutive elements in the same 8-byte memory word reuse one bus read
  (`PM_COMBINE`).
- Stores collect bytes into 8-byte words with byte strobes.
- A store can apply ReLU. Linear output is the default.

`TMOVE` copies one register into another through the loopback path. Memory is
not touched. It takes signed row and lane offsets, so one move can crop, pad or
shift a register. It can also copy cell 0 to every cell. Each row costs one
read, one capture and four write cycles, one per NR.

Bus protocol (`bus_req`, `tcx_pkg::bus_req_t`):

- A request is held until `bus_ready`.
- A read's 64-bit data comes back later with `rsp_valid`, one read at a time.
- Writes are posted.

## Instruction format

Bits [63:60] hold the opcode. Field positions are this design's own encoding.
`tcx_pkg` has `enc_*` functions that build each instruction.

| Opcode | Fields |
|---|---|
| `SETDIM` 1 | [59:57] register, [56:55] dimension, [31:0] value |
| `SETCFG` 6 | [59:58] log2 partition rows, [57:56] log2 partition columns, [55] expand mode |
| `TLOAD` 2 / `TSTORE` 3 | [59:57] ATR, [56:54] G reg, [53:51] L reg, [50:48] O reg, [47:44] cell0, [43:42] nr0, [41] dup0, [40] dup1, [39] dup2, [38] 16-bit, [37] merge, [36] ReLU, [31:0] base |
| `TCOMP` 4 | [59:57] dst, [56:54] features, [53:51] kernel, [50:49] mode (conv, point-wise, max, PReLU), [48:45] K, [44:43] stride, [42:39] N, [38:34] input channels, [33]/[32] feature/kernel signed, [31] 16-bit kernel, [30:29] output format, [28:24] shift, [23] clear accumulators, [22] write back |
| `TMOVE` 5 | [59:57] dst, [56:54] src, [53:46] row offset, [45:38] lane offset, [37:32] rows, [31] duplicate cell 0 |
| `FENCE` 7 | — |

## Timing summary

- CU: 1 MAC per cycle for 8-bit kernels, 2 cycles for 16-bit. The result is
  in the accumulator 2 cycles after its control word.
- Feeder: latency 5 cycles, one step per cycle.
- Cell command: tile copy (7·S+K cycles), then kernel copy (≤10 cycles, none
  on a cache hit), then K² steps, 7 drain cycles and 8 write-back cycles.
- Load/store: about one element per cycle. Bus waits come on top.
- Front end: one instruction per cycle when nothing stalls.

## Where this design departs from the published TCX

These parts are not built:

- The scalar CPU that shares the instruction window. Instructions enter on a
  valid/ready port instead.
- The instruction memory and system bus.
- The "smart" memory controller that receives tensor dimensions.
- The nearest-neighbour links between cells. Each cell's tile holds its halo,
  which loads write once per cell.

These parts are limited:

- Strides are 1 and 2 only. The publication describes arbitrary strides, with
  special support for stride 2.
- Point-wise mode covers at most 8 output channels per cell. For more than 8,
  the publication broadcasts a single feature row to all units; that variant is
  not built.
- Tensor dimensions and addresses are 32 bits.
- Kernels too large for one tile or kernel buffer must be split over chained
  commands. An example is a 7×7 kernel at stride 2, which needs 21 rows.
- Features are 8-bit. Kernels are 8- or 16-bit.

Own choices:

- Numbers of registers, bank depth, retire-buffer depth, bus width,
  instruction encoding.
- The performance-counter set and the merge-load bit.
- The placement of INT20 fields within a row.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a
model written independently in the testbench, uses random data, and ends with a
`TB_RESULT checks=… failures=…` line.

| Testbench | What it checks |
|---|---|
| `tb_tcx_cu` | every mode, signedness, 16-bit kernels, shift/saturation, 2-cycle latency |
| `tb_tcx_row_pack` | the three row formats |
| `tb_tcx_trf_bank` | random two-port traffic against a shadow memory |
| `tb_tcx_feeder` | operands of every CU for every step and mode, 5-cycle latency |
| `tb_tcx_cell` | 3×3 stride 1 (9 steps, 6 shifted), cache hit, stride 2, 16-bit kernel, 5×5 chained over two commands, max pooling, point-wise, PReLU |
| `tb_tcx_nr` | partition duplication, 16 cells in lockstep |
| `tb_tcx_rename` | random issue/complete/retire against a reference model |
| `tb_tcx_lsu` | padding, cropping, combining, duplication, 16-bit, ReLU, expand sum |
| `tb_tcx_loopback` | offsets, padding, duplication |
| `tb_tcx_ctrl` | dependencies, memory/compute overlap, allocation stall, fence |
| `tb_tcx_top` | full size, end to end (below) |

`tb_tcx_top` runs the whole engine at its default size against a memory model
with random back-pressure and latency. It runs this program:

1. A padded 32×32 image, 3×3 convolution into four output channels, ReLU,
   using 16 cells × 4 NRs.
2. The same kernel again, served from the kernel cache, with a 16-bit result.
3. 2×2 stride-2 max pooling.
4. A cropping loopback move.
5. An expand-mode sum over four input channels.
6. A long 13×13 convolution that forces an allocation stall.

It checks every output, and the 9-cycle 3×3 step count. Each mechanism must
occur at least once, counted through the performance counters: shift, cache
hit, padding, combining, expand, loopback, stall, release and fence.

To run a testbench with Verilator 5 (the package comes first):

```
verilator --binary --timing --assert rtl/tcx_pkg.sv $(ls rtl/*.sv | grep -v tcx_pkg) \
    tb/tb_tcx_cell.sv --top-module tb_tcx_cell -Mdir obj_cell
./obj_cell/Vtb_tcx_cell +verilator+rand+reset+2
```

The full-size top takes several minutes to compile, because of the 4096 CUs.
It then runs in seconds. `--build-jobs` helps.
