# Event tracing and statistics for a hybrid transactional-memory multicore

A hybrid transactional memory (TM) system runs some transactions in hardware
and some in a software TM library. Which strategy works best changes while a
program runs: a phase with many conflicting transactions wants a different
setting than a phase with few. To switch at the right time, software must see
what the transactional machinery is doing, cheaply and without slowing
the program down.

This RTL is the hardware side of that: an event-based tracing framework for a
multicore of MIPS-compatible cores connected by rings. Each transactional
state change becomes a small event. An event gets a delta timestamp, is buffered
next to its core, and travels on the ring only in slots nobody else wants. A
central statistics unit at the bus controller counts the events per core and
per type. It keeps separate counts for the current and the previous sampling
period. Software reads those counters as ordinary memory and decides whether
the program has entered a new phase.

Around the tracing logic sits the board infrastructure the system needs:
- a bus controller that turns quad-word requests into DDR2 bursts and
  arbitrates the commit lock of hardware transactions;
- the clock-domain crossing to the 200 MHz DDR2 controller;
- an on-chip block-RAM main memory that answers like the DDR2 controller, so
  the design runs without external memory;
- reset sequencing, a debounced reset button and the host UART.

## What is and is not in the RTL

```
        clk_sys domain (50 MHz)                                   clk_ddr (200 MHz)
 +-------------------------------------------------------------+
 |  core i side (ports)        per core i                       |
 |  htm_state, abort cause --> event_gen --> log_unit --+       |
 |  sw_ev (xevent)        --/                           |       |
 |  inv_valid/addr ------------------------------+      v       |
 |                                               v   ring_node i|
 |  ring: [ctrl stop 15] -> [node 0] -> [node 1] -> ... -> back |
 |           | events                                           |
 |           v                                                  |
 |      stats_unit <---- registers ---- bus_controller ---------+--> cdc_fifo x3 --> ddr2_bram (default)
 |                                       |                      |                   or DDR2 queues (ports)
 |                                       |   |                  |
 |                         loader_bram --+   +-- lock_req/grant |
 |  uart (core 0)                                               |
 +-------------------------------------------------------------+
   debounce (clk_ref) -> reset_generator -> rst_pll, rst_ddr, rst_sys
```

The processor cores, their caches and hardware TM units, and the memory
request ring are not part of this RTL. Their side of every interface is a
port of `tmbox_trace_top`. Also outside are:
- the vendor DDR2 controller and the PLL;
- the phase detection software, which only reads the statistics window.

## Events

Every event is 32 bits when it travels on the ring:

| bits  | field            | notes                                         |
|-------|------------------|-----------------------------------------------|
| 31:28 | data[7:4]        | upper half of the event data                  |
| 27:24 | type             | 16 possible types                             |
| 23:4  | delta timestamp  | cycles since the previous event of this core  |
| 3:0   | data[3:0]        | lower half of the event data                  |

On the ring the word is tagged with message type 3 (event) and the sender's
core id.

| code | type          | produced when                                   | data                          |
|------|---------------|-------------------------------------------------|-------------------------------|
| 0    | Overflow      | 2^20-1 cycles passed without an event           | 0                             |
| 1    | Start         | HTM state idle -> running                       | mode (2 = hardware)           |
| 2    | Commit        | committing -> idle                              | 0                             |
| 3    | Abort         | running or try-lock -> idle                     | {culprit core, cause}         |
| 4    | Invalidation  | the core's write invalidation left on the ring  | 0                             |
| 5    | Try Lock      | -> try-lock (transaction wants to commit)       | 0                             |
| 6    | Lock Success  | -> committing (bus lock acquired)               | 0                             |
| 7-15 | software      | `xevent1..4` instructions, type and data chosen by the STM runtime | any |

Abort causes are 1 (software), 2 (capacity) and 3 (conflict). Codes 1, 2, 5
and 6 match the original system's event streams. Codes 0, 3 and 4 and the
abort-cause values are choices of this implementation.

### Why delta timestamps and Overflow events

A 20-bit delta is enough to time every event to the cycle, and it keeps the
event word small. If a core stays silent for 2^20-1 cycles (about 21 ms at
50 MHz), its log unit writes an Overflow event carrying the full delta. As a
result, the running sum of a core's deltas always equals elapsed time. A trace
reader reconstructs absolute time by adding deltas, and it ignores the
Overflow events.

## Per-core path: event generation, log unit, ring node

**`event_gen`** has three sources, each with a one-entry holding register:
- HTM state changes, which are never lost;
- invalidations;
- software events, with a valid/ready handshake.

It hands at most one event per cycle to the log unit, one cycle after the
cause. The priority order is HTM state, then invalidation, then software. A
software event costs the core one cycle. If the holding register is still
occupied, `sw_ev_ready` is low and the core waits. An invalidation that finds
its register full is dropped and flagged on `inv_lost`.

**`log_unit`** works as follows:
- A counter measures the cycles since the last stored event.
- On an event, it stores `{data, type, delta}` in a 32-entry FIFO (`log_fifo`).
- The head of the FIFO is offered to the ring node.
- An event that arrives while the FIFO is full is dropped and counted in
  `lost_count`, which is visible per core as `trace_lost`.

**`ring_node`** owns one slot of the invalidation/event ring per clock. It
forwards the incoming message unless the slot is free. A slot is free when:
- it is empty;
- it carries this node's own invalidation coming back around (the
  invalidation is retired there); or
- it carries an event and this node is the event sink.

A free slot goes to the core's invalidation first. The log unit's event
goes only into a free slot that no invalidation wants. Tracing therefore never
delays application traffic; it only waits for idle slots.

The node also delivers other cores' invalidations to its core (`rx_inv_*`).
The bus controller's stop, node id 15, is the event sink: it takes every event
off the ring and passes it to the statistics unit.

## Statistics unit

This is the part with the most state and the least obvious structure.

**What it counts.** The unit keeps a 32-bit counter per (core, event type), in
`NUM_LEVELS` levels (3 by default):
- level 0: events since the last reset of the unit;
- level 1: events in the current sampling period;
- level 2: events in the previous period, frozen until the current period
  ends. Further levels hold older periods.

At the end of a period, level 1 (including an event in the very last cycle)
becomes level 2 and level 1 restarts from zero. A global sum over all cores
is kept for every level and type.

**Register window** (at 0x0FFFF000 through the bus controller):

| offset | register                                    |
|--------|---------------------------------------------|
| 0x000  | signature 0x53544154 ("STAT")               |
| 0x004  | current period number                       |
| 0x008  | cycles elapsed in the current period        |
| 0x00C  | number of levels                            |
| 0x010  | write: reset all counters, period number and cycle count |
| 0x014  | sampling period length (read/write)         |
| 0x400 + level*S + core*0x40 + type*4 | counter         |

`S = 0x40 * 2^ceil(log2(NUM_CORES+1))`, which is 0x400 for 8 cores. Core
slot `NUM_CORES` (slot 8 by default) reads the global sum. A new period length
written to 0x014 takes effect at the next reset (a write to 0x010).

**How it is stored.** Copying hundreds of counters from level 1 to level 2 in
one cycle would need every counter in flip-flops. Instead, each level's
per-core counters live in a RAM bank of `NUM_CORES*16` words:
- Bank 0 is level 0. Banks 1..`NUM_LEVELS-1` rotate through levels 1 and up.
- A pointer says which bank is level 1. At a period end the pointer advances:
  the old level-1 bank becomes level 2 without moving any data, and the
  oldest bank becomes the new level 1.
- Every bank word has a valid bit, and a word with its bit clear reads as
  zero. Clearing a whole bank is therefore a one-cycle clear of its valid bits.

Counting is a two-stage read-modify-write:
1. The bank is read in the event's cycle.
2. `value + 1` is written in the next cycle.

The value written in one cycle is forwarded to the next, so two back-to-back
events for the same counter are both counted. Register reads use a second
read port and also see the word being written in the same cycle. A read
answers one cycle after the request and includes every event up to the cycle
before it.

The global sums are only 16 per level and are kept in registers.

## Bus controller and memory path

The bus controller serves one 128-bit quad-word request at a time and sends
exactly one response per request, writes included. DDR2 memory is accessed
only in bursts of four 64-bit words, which the DDR2 controller moves as two
128-bit beats. A two-word burst does not exist, so every request is widened
to the 32-byte-aligned burst that contains it:
- **Read:** one burst command; two beats come back; address bit 4 selects the
  wanted beat.
- **Write:** one burst command and two write beats. The wanted beat is sent
  with byte mask 0 and the other with mask all-ones (mask bit 1 = byte not
  written).

Two windows are not sent to DDR2:
- the statistics unit, 4 KB at 0x0FFFF000;
- the boot loader RAM, 8 KB at 0x0FFFC000 (`loader_bram`, 512 x 128 bits).

A 32-bit register is accessed through the big-endian word lane selected by
address bits 3:2 (lane 0 = bits 127:96). A register read returns the value in
all four lanes.

**Bus lock.** A hardware transaction raises `lock_req[i]` when it wants to
commit and holds it while it writes back. `lock_grant` is one-hot. The grant
stays with its holder until the holder drops its request, and is then handed
on round-robin.

**Clock-domain crossing.** Three dual-clock FIFOs (`cdc_fifo`, Gray-coded
pointers, two-flop synchronizers, 16 entries) connect the 50 MHz controller
to the 200 MHz DDR2 queues:
- burst commands (33 bits);
- write beats with their mask (144 bits);
- read beats (128 bits).

The DDR2 side must stop writing read beats while `ddr_rd_full` is high.

**Main memory.** The parameter `BRAM_MAIN_MEMORY` chooses what sits behind
the FIFOs in the 200 MHz domain:
- 1 (default): `ddr2_bram`, a block-RAM memory of `BRAM_MEM_WORDS` 128-bit
  words (128 KB). Addresses wrap modulo its size. It takes the same burst
  commands, write beats and read beats as the DDR2 controller and handles
  one burst at a time. A write takes the command cycle plus one cycle per
  beat, and each byte whose mask bit is 0 is written. A read returns each
  beat two cycles after it is issued and waits while the read FIFO is full.
  The contents start at zero. In this mode the `ddr_*` outputs are held
  idle and the `ddr_*` inputs are ignored.
- 0: the FIFO ends are the `ddr_*` ports, for an external DDR2 controller.

## Reset, button and UART

`reset_generator` produces three resets, in order of priority:

| reset | what it resets | asserted when | released when |
|---|---|---|---|
| `rst_pll` | the PLL | the debounced button is pressed | 16 reference cycles after the button is released |
| `rst_ddr` | the DDR2 controller | `rst_pll` is high or the PLL is not locked | both have cleared, a few `clk_ddr` cycles later |
| `rst_sys` | rings, tracing units, bus controller | `rst_ddr` is high or DDR2 calibration is not done | both have cleared, a few `clk_sys` cycles later |

Each reset is asserted asynchronously and released synchronously in its own
clock domain. A lower reset is therefore asserted at once whenever a higher
one is, and the release order is always PLL, DDR2, system.

`debounce` filters the push-button. Its output changes only after the
synchronized input has been stable for `STABLE_CYCLES` cycles (65536 at
100 MHz by default). The output starts active, so the system comes up in
reset.

`uart` is an 8N1 transmitter and receiver, by default at 115200 baud from
50 MHz. The receiver samples mid-bit and reports a frame with a bad stop bit
on `rx_frame_err`. It then waits for the line to go idle.

## Parameters (top level)

| parameter         | default     | meaning                                     |
|-------------------|-------------|---------------------------------------------|
| `NUM_CORES`       | 8           | cores on the ring (1..15; id 15 is the controller stop) |
| `LOG_DEPTH`       | 32          | log buffer entries per core                 |
| `NUM_LEVELS`      | 3           | statistics levels (>= 3)                    |
| `STATS_PERIOD`    | 100000      | sampling period after reset, in cycles      |
| `CDC_DEPTH`       | 16          | entries of each clock-crossing FIFO         |
| `CLK_SYS_HZ`      | 50 000 000  | system clock, for the UART divider          |
| `UART_BAUD`       | 115200      | UART symbol rate                            |
| `DEBOUNCE_CYCLES` | 65536       | button filter length in reference cycles    |
| `LOADER_WORDS`    | 512         | boot loader RAM size in 128-bit words (8 KB)|
| `BRAM_MAIN_MEMORY`| 1           | 1: on-chip block-RAM main memory; 0: external DDR2 queues |
| `BRAM_MEM_WORDS`  | 8192        | block-RAM main memory size in 128-bit words (128 KB) |

## Simulating

Every unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Wno-fatal \
    rtl/tm_trace_pkg.sv rtl/*.sv tb/tmbox_trace_top_tb.sv \
    --top-module tmbox_trace_top_tb -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run another test. Each
block test needs only the package and its own unit (`log_unit` also needs
`log_fifo`).

- **`tmbox_trace_top_tb`** runs the whole design with 4 cores, a 2000-cycle
  period and fast button and UART settings. It uses an external DDR2 model
  behind the `ddr_*` ports (`BRAM_MAIN_MEMORY` = 0). It takes about 15 s.
- **`tmbox_trace_top_full_tb`** runs the same scenario at the default sizes
  (8 cores, 100000-cycle period, 115200 baud, block-RAM main memory). It
  takes about 30 s.

The end-to-end testbenches model everything outside the RTL:
- the cores' HTM units, which run transactions that abort on conflicts or
  commit under the bus lock with invalidations;
- software events;
- the memory ring, with random DDR2 and loader-RAM traffic and statistics
  reads;
- a DDR2 burst memory (reduced test only);
- PLL lock and calibration;
- a UART loopback wire.

What they check:
- Every event arrives in order and with the right type and data.
- The sum of the delta timestamps matches the cycle of each HTM state change
  exactly, including across a quiet gap longer than 2^20 cycles bridged by
  Overflow events.
- Every invalidation reaches every other core.
- Only the lock holder commits.
- Memory reads return what was written.
- The statistics counters equal the events seen: since reset, for the
  previous period, and as global sums.
- A new period length takes effect after a statistics reset.

The testbenches also count each mechanism and fail if one never occurred:
- buffering in the log unit;
- an invalidation going ahead of a waiting event;
- lock hand-over and contention;
- a period end;
- clock-crossing traffic;
- a UART byte.

## Departures and choices to be aware of

- **Chosen here, not given by the original design:**
  - the event codes 0, 3 and 4, the abort-cause values and the 8-bit data
    field split across the word;
  - the signature value and the counter offsets in the statistics window;
  - the loader RAM address (0x0FFFC000);
  - round-robin lock arbitration;
  - the ring message format and retiring an invalidation at its sender;
  - the drop-and-count behaviour of a full log buffer;
  - the reset hold time, button filter length, FIFO depth and default
    sampling period.
- **Global sums.** The statistics unit provides global (all-core) sums in
  hardware. The original system forms its system-wide view in software.
- **Statistics storage.** The statistics unit stores its counters in
  rotating RAM banks with valid bits. Software sees the behaviour described
  above; the storage scheme is an implementation choice.
- **Clock-crossing FIFOs.** There are three, not two: commands and write
  data are kept apart.
- **Main memory.** Real DDR2 memory holds random data after power-up, and
  the boot loader must prepare it. The block-RAM main memory starts at zero
  and is only 128 KB, so a program must fit in it.
- **Not here:**
  - the processor cores, the caches with their HTM units, and the memory ring;
  - the DDR2 controller and the PLL.

  The tracing units take the HTM unit state as a 2-bit state (idle, running,
  try-lock, committing), plus an abort cause and a culprit core id.
- **Lint warnings that are expected:**
  - unconnected outputs of unused ring-node and log-unit ports in the top;
  - `rst_sys` is used synchronously by most units and as an asynchronous
    reset by the clock-crossing FIFO;
  - the debounce registers carry power-up values, because that unit runs
    before any reset exists;
  - the statistics unit ignores the timestamp bits of the event word.
  - with the default block-RAM main memory, the `ddr_*` inputs of the top
    are unused and its `ddr_*` outputs are constant;
  - the block-RAM main memory ignores the low five address bits, because
    bursts are aligned;
  - the core ring nodes' event-sink outputs are idle, because only the
    controller stop takes events off the ring.
