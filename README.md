# Latency-insensitive ping-pong buffer channel for task-parallel FPGA designs

Large accelerators for multi-die FPGAs are often built as graphs of tasks. Each
task is a separately compiled HLS module with its own state machine, and tasks
talk over channels. FIFO streams are easy to stretch across a die crossing:
put registers on the wires and make the FIFO a little deeper. Many
accelerators, though, pass whole arrays from one task to the next through
ping-pong buffers. A shared memory with two free-running state machines
around it is hard to pipeline without breaking it.

This RTL implements a **buffer channel** that solves this. Its memory is split
into *sections*. Ownership of each section is carried by a *token*, the
section's number, and tokens move through two ordinary FIFOs:

```
             +-------------------- buffer_channel ---------------------+
             |  free sections FIFO (self-initialising)                 |
 producer <--+-- dout/read/empty     <==pipe==   din/write/full <------+-- consumer
  task       |                                                         |   task
             |  memory module: NUM_CORES dual-port cores               |
          ---+==pipe==> port A (addr/ce/we/din/qout)  port B <---------+---
             |                                                         |
          ---+==pipe==> din/write/full   occupied sections FIFO  dout/read/empty --+->
             +---------------------------------------------------------+
```

* The **producer** reads a token from the free sections FIFO, writes its
  array into that section, and then writes the token to the occupied sections
  FIFO.
* The **consumer** reads a token from the occupied sections FIFO, reads that
  section, and then returns the token to the free sections FIFO.

With two sections the producer fills one while the consumer drains the other
(double buffering). With one section the two tasks take turns; with three or
more, several filled arrays can queue up. Neither task ever waits on a signal
from the other task's state machine. Each task only waits on an empty FIFO,
and each FIFO tolerates any latency on its write side. This is why the whole
channel can be pipelined (made *latency-insensitive*). The task-facing ports
are only FIFO ports (`dout/read/empty`, `din/write/full`) and memory ports
(`addr/ce/we/din/qout`), the two port styles an HLS compiler can already
generate.

## Token protocol in detail

A section is never touched by two tasks at once. Only the holder of its
token may use it, and exactly one copy of each token exists. The token is in
one of the FIFOs, in a pipeline register between a task and a FIFO, or held
by one task. The protocol puts these requirements on the tasks:

1. A task may drive memory addresses only inside the section whose token it
   holds. The section number is part of the address: section `s` of a core
   occupies words `s*SEC ... s*SEC + SEC-1`, where `SEC = CORE_DEPTH / SECTIONS`.
2. It must finish its memory accesses before it writes the token to the other
   FIFO. The memory port and the token FIFO are separate paths, and nothing in
   the channel orders them. An HLS task needs an explicit dependence between
   its last memory access and the token write, or the compiler may move the
   write earlier.
3. It must write back exactly the token it read.

Token FIFOs are `SECTIONS` entries deep, so every token fits in each FIFO and
a token write never meets a full FIFO in normal use.

## The self-initialising free sections FIFO

At start-up every section is free, so the free sections FIFO must already
hold every token. That could be the consumer's job at start-up, but then a
second run of the accelerator would write the tokens twice. So the FIFO
fills itself. `free_sections_fifo` contains an `srl_fifo`, a two-state FSM,
and a relay:

| state   | FIFO driven by                      | producer side sees | consumer side sees |
|---------|-------------------------------------|--------------------|--------------------|
| `RESET` | FSM writes tokens 0 … SECTIONS-1, one per cycle | `empty = 1` | `full = 1` |
| `DONE`  | the outside ports, straight through | real `empty`       | real `full`        |

Reset puts the FSM in `RESET`. It goes to `DONE` after writing the last token,
so the first free token can be read `SECTIONS` cycles after reset is released.
Tokens are written again only after the next reset.

## Memory module and partitioning

A buffer is declared like a C array, with an element width `WIDTH`, a shape
`DIMS` (up to three dimensions; pad with 1), a number of sections, and one
partitioning scheme per dimension (`pasta_pkg::part_scheme_e`):

| scheme          | partition factor f(i) |
|-----------------|-----------------------|
| `PART_NORMAL`   | 1                     |
| `PART_COMPLETE` | d_i                   |
| `PART_CYCLIC`   | `FACTORS[i]`          |
| `PART_BLOCK`    | `FACTORS[i]`          |

The memory module then builds

* `NUM_CORES = f(0) * f(1) * f(2)` logical dual-port cores, and
* `CORE_DEPTH = SECTIONS * ceil(d_0/f(0)) * ceil(d_1/f(1)) * ceil(d_2/f(2))`
  words in each core.

Each core has one memory port on the producer side and one on the consumer
side, so a task can reach every partition in the same cycle. This is what
lets an unrolled HLS loop touch `NUM_CORES` elements per cycle. The channel
does not decide which element lives where. The task drives per-core
addresses exactly as its HLS compiler would for a partitioned local array.
For example, with `<normal, cyclic 2>` on a `[20][40]` array, element `(i, j)`
is in core `j % 2` at address `section*400 + i*20 + j/2`.

Two core templates are used:

* `mem_core_s2p`, simple dual-port block RAM. The producer side only writes
  and the consumer side only reads. A simple dual-port block RAM can be twice
  as wide as a true dual-port one, so this saves RAM at 36/72-bit widths.
  Use it (`PORTS = PORTS_S2P`) when the producer never reads and the consumer
  never writes.
* `mem_core_t2p`, true dual-port. Both sides read and write. `CORE` selects
  block RAM or UltraRAM. UltraRAM has no simple dual-port mode, so
  `CORE_URAM` with `PORTS_S2P` is an elaboration error.

Both templates have read latency 1. They pass `ram_style` and
`cascade_height` to the FPGA synthesis tool as attributes. A large core
is built from several physical RAMs chained for depth, and the cascade
height caps how long such a chain may be. It is the `CASCADE_HEIGHT`
parameter, passed down from `buffer_channel`, with a default of 16.
The value 1 turns cascading off, and values below 1 are rejected. The
parameter has no effect in simulation. How it trades against clock
frequency depends on the design. In the one deep-buffer design where it
was measured, no cascading gave the highest clock and no clear trend was
seen between 2 and 16.

## Pipelining across die and region boundaries

If the producer and consumer are placed far apart, the channel is split:

* the **free sections FIFO** sits next to the producer, which reads it; the
  consumer's writes reach it through `FS_STAGES` registers;
* the **occupied sections FIFO** and the **memory module** sit next to the
  consumer. The producer's token writes go through `OS_STAGES` registers and
  its memory port through `MEM_STAGES` registers.

Each FIFO is therefore pipelined only on its write side (`fifo_write_pipe`):
`write` and `data` are delayed forward, and `full` is delayed back. A writer
that sees `full` late can send up to `2 * STAGES` more words after the FIFO
reached its nominal depth. The FIFO is therefore built with
`HEADROOM = 2 * STAGES` extra entries and still raises `full` at the nominal
depth, so no word is lost. An assertion in `srl_fifo` flags an overflow.

The same write-side pipeline plus headroom FIFO is a complete FIFO
stream channel between two tasks, `stream_channel`. The occupied sections
FIFO is one of these, carrying tokens. A stream word arrives `STAGES + 1`
cycles after it is written, and a stream moves one word per cycle until its
FIFO reaches `DEPTH`. One sizing rule follows from the late `full`. When two
streams of different pipeline depth feed one task, the shallower stream must
buffer the difference. Give it `DEPTH` greater than the difference in stages,
or its writer is throttled. The vector-addition test shows this: its `a` path
has 1 stage and its `b` path has 3.

The memory port is pipelined with `mem_port_pipe`. Writes simply land
`MEM_STAGES` cycles later. A read issued by the producer returns after
**1 + 2·MEM_STAGES** cycles instead of 1, so a producer that reads its own
section must be compiled for that latency. The memory sits on the consumer's
side for this reason: producers seldom read, so usually nothing needs
recompiling. A producer that reads in a loop whose initiation interval
depends on the read latency (a read-after-write through the buffer, or a
loop that is not pipelined) slows down in proportion to the trip count. Such
a pair is best kept in one region, with `MEM_STAGES = 0`.

A `*_STAGES` of 0 is a plain wire. The defaults are 2, as in the example of a
channel routed over two boundaries.

## Timing summary

All logic is on the rising edge of `clk`. Reset `rst` is synchronous and
active high.

| event                                                     | latency |
|-----------------------------------------------------------|---------|
| first free token readable after reset release             | `SECTIONS` cycles |
| FIFO word written → readable at the FIFO's own read port  | 1 cycle |
| producer token write → visible at `c_os_*`                | `OS_STAGES + 1` cycles |
| consumer token write → visible at `p_fs_*`                | `FS_STAGES + 1` cycles |
| consumer memory read → `c_mem_qout`                       | 1 cycle |
| producer memory read → `p_mem_qout`                       | `1 + 2*MEM_STAGES` cycles |

The FIFOs are first-word-fall-through. `dout` shows the oldest token whenever
`empty` is low, and `read` pops it. A write is accepted when `write` is high
and there is room.

## Ports of `buffer_channel`

| group                | signals                                   | direction (from channel) | width |
|----------------------|-------------------------------------------|--------------------------|-------|
| producer, acquire    | `p_fs_dout`, `p_fs_read`, `p_fs_empty`    | out, in, out | TW, 1, 1 |
| producer, release    | `p_os_din`, `p_os_write`, `p_os_full`     | in, in, out  | TW, 1, 1 |
| producer, memory     | `p_mem_addr/ce/we/din/qout [NUM_CORES]`   | in ×4, out   | AW, 1, 1, WIDTH, WIDTH |
| consumer, acquire    | `c_os_dout`, `c_os_read`, `c_os_empty`    | out, in, out | TW, 1, 1 |
| consumer, release    | `c_fs_din`, `c_fs_write`, `c_fs_full`     | in, in, out  | TW, 1, 1 |
| consumer, memory     | `c_mem_addr/ce/we/din/qout [NUM_CORES]`   | in ×4, out   | AW, 1, 1, WIDTH, WIDTH |

`TW = max(1, clog2(SECTIONS))` and `AW = clog2(CORE_DEPTH)`. With
`PORTS_S2P`, `p_mem_qout` reads as zero and `c_mem_we`/`c_mem_din` are
ignored. An assertion flags a producer read in that mode.

## Default configuration

`buffer_channel` with no parameters is a `float[20][40]` buffer with two
sections, the second dimension partitioned cyclically by 2, on simple
dual-port block RAM, with two register stages on each pipelined path. That
gives 2 cores of 800 × 32 bits (51,200 bits) and 1-bit tokens. The cyclic
factor and the stage counts are choices made here; the rest is the
reference usage example of this kind of channel.

## Files

| file | contents |
|------|----------|
| `rtl/pasta_pkg.sv` | enums for schemes, core type and port style; core count, core depth and token width functions |
| `rtl/buffer_channel.sv` | the channel, with its pipelining (top) |
| `rtl/free_sections_fifo.sv` | self-initialising token FIFO (FSM + relay + FIFO) |
| `rtl/stream_channel.sv` | pipelined FIFO stream channel (write pipe + FIFO with headroom) |
| `rtl/srl_fifo.sv` | shift-register FIFO with optional headroom; occupied sections FIFO and stream FIFO |
| `rtl/memory_module.sv` | array of memory cores sized from the buffer declaration |
| `rtl/mem_core_s2p.sv`, `rtl/mem_core_t2p.sv` | memory core templates |
| `rtl/fifo_write_pipe.sv` | write-side pipeline of a FIFO channel |
| `rtl/mem_port_pipe.sv` | pipeline of one memory port |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_buffer_channel.sv` | end-to-end run of the default channel |
| `tb/tb_buffer_channel_t2p.sv` | end-to-end run with T2P UltraRAM cores, three sections, producer read-back |
| `tb/tb_buffer_channel_single.sv` | end-to-end run with one section and no pipelining: the tasks take turns |
| `tb/tb_vecadd_streams.sv` | vector addition (load a, load b → add → store) over three pipelined stream channels |
| `tb/producer_task.sv`, `tb/consumer_task.sv` | behavioural task models used by the end-to-end tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_buffer_channel \
    -y rtl -y tb +libext+.sv -Irtl rtl/pasta_pkg.sv tb/tb_buffer_channel.sv
./obj_dir/Vtb_buffer_channel
```

Replace `tb_buffer_channel` with any other `tb_*` module. The package must
be listed first; everything else is found by module name.

The end-to-end tests move many arrays through the channel and check every
word. They arrange for each mechanism to happen and count it:

* the initialisation window;
* producer stalls on an empty free FIFO and consumer stalls on an empty
  occupied FIFO;
* cycles where both tasks work at once on different sections;
* both token pipeline latencies;
* in the T2P tests, producer read-back after exactly `1 + 2*MEM_STAGES`
  cycles;
* with one section, strict turn taking: the two tasks are never active in
  the same cycle.

`tb_vecadd_streams` checks that a small task graph over pipelined streams
sustains one element per cycle. `tb_fifo_write_pipe` drives a greedy writer into a pipelined FIFO and checks
that the headroom is really used and nothing is lost. Each test fails if a
mechanism it expects never occurs. The default end-to-end run takes well
under a second.

## Changing it

* Another buffer: set `WIDTH`, `DIMS`, `SCHEMES`, `FACTORS` and `SECTIONS` on
  `buffer_channel`. The port arrays resize from `pasta_pkg::num_cores` and
  `core_depth`.
* A different placement: set `FS_STAGES`, `OS_STAGES` and `MEM_STAGES` to the
  number of boundaries each path crosses. A producer that reads must then
  allow `1 + 2*MEM_STAGES` cycles of read latency.
* Deep buffers: try `CASCADE_HEIGHT = 1` (no cascading) against the
  default 16 when a deep memory core limits the clock.
* Several channels of one type: instantiate `buffer_channel` once per
  channel; nothing is shared between instances.

## Where this RTL departs from, or adds to, the published design

* The FIFO stream channel it builds on is described only as a standard
  shift-register-LUT FIFO. `srl_fifo` is an implementation written here:
  first-word-fall-through, with active-high `empty`/`full`. A typical HLS
  `ap_fifo` port uses active-low `empty_n`/`full_n`, so an inverter per
  signal is needed to attach real HLS tasks.
* The amount of extra FIFO depth for a pipelined write side (`2 * STAGES`)
  is derived here. The published scheme only says the depth is increased
  while `full` stays at the original depth.
* The published flow generates a separate Verilog memory module for every
  buffer configuration. Here one parameterised module with SystemVerilog array
  ports covers all configurations of up to three dimensions. A factor that
  does not divide its dimension rounds the core depth up.
* Register stage counts come from parameters. In a full flow they follow
  from the floorplan and the route each channel takes.
* Token FIFO depth, token numbering, the one-token-per-cycle fill, reset
  polarity, read-before-write order in the cores, and reset values of
  pipeline registers are choices made here.
* Not included: the HLS producer and consumer tasks, the software model of
  the channel, the resource model that chooses between block RAM
  configurations, the floorplanner, and the off-chip memory channels.
