# Five dataflows for one convolutional layer: WS, IS and OS accelerator cores

A convolutional layer reads three kinds of data (IFMAP pixels, filter weights,
biases) and writes one kind (output feature-map values, OFMAP). Every output is
a sum over many products, so a hardware accelerator spends most of its effort
deciding **which operand to keep on chip and which to fetch again**. This RTL
implements the three classic answers, all around the same 3x3
multiply-accumulate array and the same memory interface, so they can be
compared cycle for cycle and access for access:

| core | keeps on chip | fetches repeatedly | output buffer |
|---|---|---|---|
| **WS** (weight stationary) | one 3x3 filter set | IFMAP windows (once per filter) | none: partial sums go to OFMAP memory |
| **WS-buf** | one 3x3 filter set | IFMAP windows | one output channel (15x15 partial sums) |
| **IS** (input stationary) | all weights and biases, one IFMAP window | nothing but each window once | none |
| **IS-buf** | all weights and biases, one window | each window once | one output row of every channel (15x16) |
| **OS** (output stationary) | one running sum | every window and every filter, for every output | one register |

The structure follows the design-space study *"A Comprehensive Evaluation of
Convolutional Hardware Accelerators"* (the WS/IS/OS cores, the 3x3 arithmetic
core, the buffers and the memory signal names). Everything the study leaves
open (handshake timing, memory layout, loop order of the buffered IS core,
pipeline details) is this design's own choice and is listed below.

The default layer is the first layer of a small CIFAR-10 network:
32x32x3 IFMAP, sixteen 3x3 filters, stride 2, giving a 15x15x16 OFMAP. All
inputs are 8-bit signed integers; sums and outputs are 20-bit signed integers.

## The computation

Every core computes, for each filter `f` and output position `(y, x)`:

```
O[f][y][x] = ReLU( B[f] + sum_{c < CH} sum_{r,q < 3} I[c][S*y + r][S*x + q] * W[f][c][r][q] )
```

with `OUT_W = (IN_W - 3)/S + 1`, `OUT_H = (IN_H - 3)/S + 1`. The convolution of
one 3x3 window with one 3x3 filter set of one channel is the unit of work
(a *partial sum*). An output needs `CH` partial sums; ReLU may only be applied
to the complete sum, so partial sums bypass it (`relu.en` low).

## Memory interface and timing

Each core has two memory ports, identical across cores:

| signal | dir | width | meaning |
|---|---|---|---|
| `ifmap_add` | out | `IADDR_W` (12) | input-memory address |
| `ifmap_ce` | out | 1 | read request |
| `ifmap_valid` | in | 1 | read completes this cycle |
| `ifmap_value` | in | 8 | read data |
| `ofmap_add` | out | `OADDR_W` (12) | OFMAP address |
| `ofmap_ce` | out | 1 | request |
| `ofmap_we` | out | 1 | 1 write, 0 read |
| `pixel_out` | out | 20 | write data |
| `pixel_in` | in | 20 | read data |
| `ofmap_valid` | in | 1 | access completes this cycle |

A core raises `*_ce` with a stable address (and write data) and holds it until
it samples `*_valid` high on a rising clock edge. That edge completes the
access, and read data must be present in the same cycle. A new request may
start on the following cycle, and only one access per memory is outstanding.
The `valid` signal is how memory latency enters: a memory that raises `valid`
L cycles after the request starts costs L+1 cycles per access. This is the
knob for comparing SRAM (about 2 cycles) with DRAM (about 5 cycles). The two
ports are independent, so a core may read the input memory while it writes
the OFMAP memory. Assertions in each core check the rule that a raised request
stays stable until `valid`.

Control: `start` (one-cycle pulse while idle) begins a layer; `busy` is high
until `done` pulses for one cycle after the last OFMAP write has completed.
`rst_n` is an active-low asynchronous reset of the control state; datapath
registers are not reset.

### Memory layout (this design's choice)

Input memory, one 8-bit word per address, packed from 0:

| region | address |
|---|---|
| bias `B[f]` | `f` |
| weight `W[f][c][r][q]` | `NF + ((f*CH + c)*3 + r)*3 + q` |
| pixel `I[c][y][x]` | `NF + 9*NF*CH + (c*IN_H + y)*IN_W + x` |

At the default size that is 16 + 432 + 3072 = 3520 words, which fits a 4 KB
memory. The OFMAP memory holds one 20-bit word per address: `O[f][y][x]` at
`(f*OUT_H + y)*OUT_W + x`, which is 3600 words.

## The arithmetic core (`mac_array`)

Three rows, one per window row. Each row is MULT→REG→MAC→REG→MAC→REG: column 0
is multiplied, then columns 1 and 2 are multiply-added. That makes 3
multipliers, 6 MACs, and 9 of the result registers. The three row sums are
then combined: rows 0 and 1 are added and registered, and the last adder
takes that sum, row 2 and the bias into the output register. So the sum
appears **6 cycles** after `in_valid`.

The operands of columns 1 and 2 and the bias travel down the pipeline with the
partial sums. This means a new window/filter pair can enter **every cycle**
and the caller may change its operands right after issuing. Two things rely on
this: the IS core issues all 16 filters of a window back to back, and the WS
double buffer overwrites the window while the previous one is still being
computed. No overflow handling is needed: 9 products of 8-bit values plus an
8-bit bias fit in 20 bits, and so does a sum over 3 channels.

## Buffers

* `input_buffer`: the bias and weight partitions. It is a register file
  written one value per cycle, and a whole 3x3 filter set is read
  combinationally. The WS core keeps one set and one bias. The IS core keeps
  all `NF*CH` sets (48 x 9 = 432 weights) and `NF` biases.
* `feature_buffer`: the IFMAP partition, one 3x3 window. When a core steps to
  the next window of the same row, `shift` moves the columns `STRIDE` places
  left in one cycle. The `3-STRIDE` overlapping columns are then kept, and only
  `STRIDE` new columns are read. At stride 2 that is 6 reads per window
  instead of 9. Rows are not reused.
* `output_buffer`: partial sums, one combinational read port and one write
  port. A read-modify-write of one entry takes one cycle. The WS-buf core uses
  `OUT_H*OUT_W` = 225 entries, and the IS-buf core `OUT_W*NF` = 240.
* `in_addr_gen` / `out_addr_gen`: the bias, weight and feature address
  generators with their source mux, and the OFMAP address generator.

## The cores

### WS, WS-buf (`ws_core`, `OUT_BUF` = 0/1)

Loop order: filter `f`, channel `c`, then every window of channel `c`. For each
`(f, c)` the nine weights are read once and stay put while all 225 windows of
the channel stream past them. The bias is read once per filter and added with
channel 0.

**Double buffer.** The core has two FSMs. The *loader* reads bias, weights and
window pixels and issues a window to the arithmetic core. Because the array
copies its operands at issue, the loader goes straight on to the next window
(or the next filter set). Meanwhile the *write-back* FSM waits for that
window's result and stores it. One window is in flight: the loader stalls at
issue until the write-back is idle. The result is that the core runs at the
speed of its input-memory reads. The OFMAP traffic and the 6-cycle arithmetic
latency are hidden behind the next window's reads.

Write-back without buffer: for channel 0 the partial sum is written. For
later channels the running sum is read back from OFMAP memory, added to, and
written again. The last channel's value goes through ReLU. That is
`CH` writes and `CH-1` reads per output. With buffer, the running sum lives in
the 225-entry output buffer, and only the final ReLU value is written, once
per output.

### IS, IS-buf (`is_core`, `OUT_BUF` = 0/1)

First every bias and weight of the layer is read into the input buffer
(448 reads). After that each IFMAP window is read once. While it sits in the
feature buffer, all `NF` filter sets of its channel are issued on consecutive
cycles. The `NF` results are collected in `NF` result registers and then
written back one by one.

* IS: loop order `c, y, x`. Write-back is the same read-add-write scheme as
  unbuffered WS (`CH` writes, `CH-1` reads per output).
* IS-buf: loop order `y, c, x`. All channels of one output row are finished
  before the next row starts, so a buffer of one row per filter
  (`OUT_W*NF` = 240 entries) is enough to accumulate across channels. Results
  of channels `0..CH-2` go into the buffer as they leave the arithmetic core.
  Only the last channel's values are written to memory.

In this core, reads, arithmetic and write-back run one after another; there is
no double buffer.

### OS (`os_core`)

Loop order: `f, y, x`, and for each output all channels. One register,
`internal_p`, holds the running sum. For every channel the core fetches the
whole window (9 reads, no column reuse) and the filter set (9 reads) from
memory, and the bias once per output. It then issues them and adds the
result. The finished sum goes through ReLU and is written once. With no
on-chip reuse at all this costs `1 + 18*CH` input reads per output.

### The top (`conv_accel_top`)

All five cores side by side, with per-core ports: core 0 = WS, 1 = WS-buf,
2 = IS, 3 = IS-buf, 4 = OS. Every memory signal above becomes a 5-element
array. The memories are outside: attach any SRAM/DRAM or controller that
follows the request/valid handshake. A product would keep just one of the
cores.

## Access counts and cycles

Closed forms. `N = NF*OUT_H*OUT_W` outputs, `A = L+1` cycles per access at
memory latency `L`, `R = OUT_H*(9 + (OUT_W-1)*3*min(S,3))` window reads per
channel. The numbers are at the default layer with `L = 2`, measured by the
end-to-end testbench:

| core | input reads | OFMAP reads | OFMAP writes | busy cycles (L=2) |
|---|---|---|---|---|
| WS | `NF + 9*NF*CH + NF*CH*R` = 67,408 | `(CH-1)*N` = 7,200 | `CH*N` = 10,800 | 223,836 |
| WS-buf | 67,408 | 0 | `N` = 3,600 | 223,833 |
| IS | `NF + 9*NF*CH + CH*R` = 4,633 | 7,200 | 10,800 | 94,225 |
| IS-buf | 4,633 | 0 | 3,600 | 43,825 |
| OS | `N*(1 + 18*CH)` = 198,000 | 0 | 3,600 | 684,001 |

Busy cycles of the cores without overlap:
* IS: `A*(accesses) + CH*OUT_H*OUT_W*(NF+7) + (OUT_BUF ? N : CH*N) + 1`
* OS: `A*(accesses) + N*(7*CH + 1) + 1`

For WS the overlap makes the count data-independent but not a simple product.
It lies between `A*(input reads)` (202,224) and the fully serial time.

How this compares with the published evaluation (same layer, 2-cycle SRAM):

* WS: 223,836 cycles here against 225,078 reported (within 0.6%).
* IS: 94,225 cycles here against 135,450 reported. IS is faster than WS in
  both, but by 2.4x here against 1.66x there. The study does not describe
  the IS timing. Here the gap comes from this design's own choices: one
  filter issued per cycle, and the handshake.
* OFMAP writes: 10,800 without and 3,600 with an output buffer, as reported.
* The study also quotes 71,008 memory reads without saying how it counts
  them. The same number is WS-buf's input reads plus OFMAP writes here
  (67,408 + 3,600).
* With 5-cycle memories (the DRAM case) the cycle counts are:
  * WS: 426,066
  * WS-buf: 426,060
  * IS: 162,124
  * IS-buf: 68,524
  * OS: 1,288,801

  IS is 2.6x faster than WS, against the 2.5x reported. Buffering the IS core
  gains 2.4x here, against the 12% reported. This core's write-back is
  serial, so the 10,800 OFMAP writes and 7,200 read-backs of the unbuffered
  IS core dominate its time.
* Ranking: OS is by far the slowest, and its cycle count grows fastest with
  latency, as in the study.

Energy, area and power were evaluated in the study after synthesis in a 28 nm
process. None of that is reproduced here.

## Sizes and workloads

* **32x32x3 layer, 16 filters, stride 2** (the defaults): fits. Input memory
  3520 of 4096 addresses, OFMAP 3600 of 4096. IS input buffer 432 weights +
  16 biases. Output buffers 225 (WS-buf) and 240 (IS-buf) entries.
* **Any memory latency**: supported through the `valid` handshake. It is
  simulated at 2 cycles (SRAM case) and 5 cycles (DRAM case).
* **128x128 IFMAPs**: these do not fit the default address widths. A 3-channel
  input needs 49,600 input words and a 16-filter 63x63 OFMAP needs 63,504
  words. Set `IN_W = IN_H = 128`, `IADDR_W = OADDR_W = 16`. The 8-bit loop
  indices still suffice. The WS-buf output buffer then has 3969 entries and
  the IS-buf buffer 1008. At that size with 2-cycle memories the cores take
  3,838,812 (WS), 3,838,809 (WS-buf), 1,634,305 (IS), 745,249 (IS-buf) and
  12,065,761 (OS) cycles, the same ranking as at 32x32.

The loop indices are 8 bits wide (`IDX_W`), so layers are limited to 255
filters, channels and output positions per dimension, and to window origins
below 256.

## Design choices and departures

* **ReLU position.** In the reference block diagram ReLU sits in front of the
  output buffer. Here it acts only on complete sums; partial sums pass
  unchanged.
* **Reads and writes per output.** The OFMAP traffic without buffer is counted
  per *input channel* (`CH` writes, `CH-1` reads per output). This matches
  the 10,800 writes the study reports.
* **The buffered IS loop order** (`y, c, x`) is chosen so that a row-sized
  buffer suffices; the study gives the size but not the order.
* **OS loop.** The running sum of an output covers all channels before it is
  written, and the bias is re-read for every output.
* **Operand registers.** The 12 result registers of the arithmetic core are
  complemented by operand pipeline registers, so it accepts one window per
  cycle. The OS core holds its fetched operands in the same window and weight
  registers the other cores use.
* **Double buffer only in WS**, with one window in flight. The IS and OS
  cores are sequential.
* **Signedness.** All values are two's-complement. The bias is an 8-bit input
  word.

## Files

`rtl/`
* `conv_pkg.sv`: widths, `data_t`/`acc_t`, the address-source enum.
* `mac_array.sv`, `relu.sv`: arithmetic core and activation.
* `input_buffer.sv`, `feature_buffer.sv`, `output_buffer.sv`: buffers.
* `in_addr_gen.sv`, `out_addr_gen.sv`: address generators.
* `ws_core.sv`, `is_core.sv`, `os_core.sv`: the cores.
* `conv_accel_top.sv`: all five cores.

`tb/` (every testbench prints `TB_RESULT checks=N failures=M`):
* `tb_<module>.sv`: one self-checking test per module.
* `core_harness.sv`: runs one core between memory models against a reference
  convolution. It also checks the closed-form access and cycle counts above,
  on reduced layers at latencies 0, 2 and 5 and strides 1 and 2.
* `tb_conv_accel_top.sv`: all five cores at the default size, 2-cycle
  memories. It checks all 18,000 outputs, the access counts, the cycle counts
  and the speed ranking. It also counts that every mechanism happens: column
  reuse, double-buffer overlap, output-buffer accumulation, OFMAP read-back,
  back-to-back issue, memory waits, ReLU clamping and `done`.
* `tb_dram_latency.sv`: the same at 5-cycle memories.
* `tb_ifmap128.sv`: all five cores on a 128x128x3 IFMAP (63x63x16 OFMAP),
  with the top overridden to 16-bit memory addresses.
* `input_mem_model.sv`, `ofmap_mem_model.sv`: behavioural memories with a
  `LAT` parameter. They are for simulation only.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/conv_pkg.sv tb/tb_conv_accel_top.sv --top-module tb_conv_accel_top
./obj_dir/Vtb_conv_accel_top
```

Replace the testbench name to run another test. The full-size run takes well
under a minute. The testbenches use random data from `$urandom`; the
reference convolution is computed inside the testbench. To change the layer,
override `IN_W`, `IN_H`, `CH`, `NF`, `STRIDE` and, if needed, the address
widths on the top or on a core. The memory latency is the `LAT` parameter of
the two memory models.
