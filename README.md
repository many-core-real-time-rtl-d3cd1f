# NPRC-I/O: time-predictable I/O for a many-core network-on-chip

In a mesh-connected many-core chip an I/O request normally travels through the
operating system, a driver, several routers and a conventional I/O controller,
and its answer comes back the same way. Every stage adds latency and every
router is a place where it can be held up by other traffic, so the I/O timing
is hard to bound. This RTL implements the hardware half of an architecture
that attacks the problem in two places:

* **NPRC-CC**, an I/O controller that does its own scheduling. Periodic I/O
  requests are loaded into it before run-time together with a table of the
  time points at which they must start; it then issues them on its own,
  on time, without a processor in the loop. Sporadic requests sent by
  processors at run-time wait in two priority queues, one for hard and one for
  soft real-time requests, and are slotted into the gaps of the table, each
  only if it can finish before the next reserved time point.
* **I/O-Ring**, a crossbar between the home ports of the routers that have no
  processor or memory attached and the NPRC-CCs. Software can rewire at
  run-time which router each controller appears on, so that an offline search
  can place each I/O device next to the processors that use it and keep its
  traffic off busy routers. The ring is combinational: a flit crosses it in
  the same cycle, and to the network the controller looks as if it were
  attached to the router directly.

The top level, `nprc_io`, holds one I/O-Ring, N_CC controllers and a global
timer. The mesh routers, processors, memory and devices are not part of it.
The ring's router-side ports are the top's ports, ready to be wired to router
home ports.

```
   router home ports (N_SUB)          APB (processor)
     |  |  |  ...  |                      |
 +---v--v--v-------v----------------------v---+
 |  I/O-Ring: one 8-bit-steered mux per       |
 |  router port, config registers on APB      |
 +---+------+------------------------+--------+
     |      |        ...             |   (N_CC manager ports)
 +---v--+ +-v----+               +---v--+
 |NPRC- | |NPRC- |               |NPRC- |  <-- tick from global_timer
 | CC 0 | | CC 1 |               |CC n-1|
 +--+---+ +--+---+               +--+---+
    |SPI     |SPI                   |SPI
  device   device                 device
```

## Inside an NPRC-CC

The controller is full duplex. Requests and answers take separate paths.

```
 manager port --> cc_loader --+--> p_space (memory -> fetcher -> shadow FIFO) --+
                              |                                                  |
                              +--> io_pool HRT (queue, arbiter, Next) ---------+-+--> cc_scheduler --> spi_io_ctrl --> pins
                              |                                                |      (time slot table,     |
                              +--> io_pool SRT (queue, arbiter, Next) ---------+       scheduler, mux)      |
 manager port <------------------------------ answer register (pass-through) <------------------------------+
```

### The time slot table and how the scheduler uses it

This is the heart of the design. The schedule for one **hyper-period** (the
repeating time frame in which all periodic requests recur) is worked out
offline and written into the controller's time slot table. Each row is 32 bits:

| bits    | field      | meaning |
|---------|------------|---------|
| [31:30] | `typ`      | `SLOT_FREE` (0), `SLOT_P` (1) periodic request, `SLOT_HRT` (2) budget reserved for a hard real-time sporadic request |
| [29:16] | `req_id`   | for `SLOT_P`: word address of the request in P-space |
| [15:0]  | `start`    | start time, in timer ticks from the beginning of the hyper-period |

Rows must be sorted by start time. The scheduler keeps `slot_time`, its
position in the hyper-period. `slot_time` moves on by one on every global tick
and wraps to 0 at `hp_len`. A row pointer `cur` names the next row due. In
each cycle the scheduler does one of the following:

1. **Periodic row reached** (`slot_time >= start`, type P). The request's
   operations are already in the P-space shadow buffer. The scheduler hands
   them to the I/O controller one by one and removes each from the buffer.
   When the buffer is empty the row is done and `cur` advances.
2. **HRT row reached.** The most urgent request of the HRT pool is issued.
   This is the budget reserved offline for sporadic hard real-time work. If
   the HRT pool is empty, the budget is released and the time counts as free.
3. **Free time** (before the next row's start). The more urgent of the two
   pools' `Next` requests is chosen; on equal priority the HRT one wins. It is
   issued only if one operation fits before the next row's start:
   `start(next row) - slot_time >= OP_TICKS`. If it does not fit it is held
   back. Such a hold is reported as `ev_defer`, and it is what keeps the
   reserved time points exact. After the last row, the next start is row 0 of
   the following hyper-period.
4. `SLOT_FREE` rows only mark where free time begins. The pointer passes over
   them.

`OP_TICKS` is the worst-case length of one I/O operation in ticks, rounded up,
plus one tick for the tick already under way. `nprc_cc` derives it from the
SPI clock divider and the tick length. A periodic request is prefetched as soon
as the shadow buffer is free. After the last row of a hyper-period, that means
row 0 of the next one. If the gap before a periodic row is shorter than the
fetch (n + 3 cycles for n operations), the row starts late by the difference.
A row still unserved when the hyper-period wraps is dropped and reported on
`ev_overrun`.

### Sporadic pools

Each `io_pool` is a priority queue, not a FIFO. Its entries sit in a register
chain in arrival order. Any entry can leave, and when one does, the entries
behind it move up in the same cycle. The priority fields of all entries form a
register bank. A comparison tree (`pool_arbiter`) reads the whole bank at once
and picks the highest priority; on a tie the oldest entry wins. The winner is
copied every cycle into the `Next` shadow register, which the scheduler sees.
A more urgent late arrival therefore takes the place of a waiting request one
cycle after it is queued. When the scheduler takes `Next`, that entry is
removed from the chain and `Next` is empty for one cycle. A full pool stalls
the controller's input port (`ev_pool_full`). It drops nothing.

### P-space

`p_space` stores the periodic requests: a 32-bit memory, the fetcher, and the
shadow FIFO. A request is a header word, whose bits [7:0] give the number of
operations n, followed by the n operation words. The fetcher reads the header,
then streams the operations into the shadow FIFO. `loaded` goes high n + 3
cycles after the fetch was accepted. Counts above `SHADOW_DEPTH` are cut to
`SHADOW_DEPTH`.

### I/O controller and answers

Any protocol controller fits behind the scheduler as long as it keeps no
request FIFO of its own, since requests must stay where they can be
prioritised. `spi_io_ctrl` is the controller built here:

* It is an SPI master in mode 0 with 32-bit frames, MSB first.
* One operation takes `64*SPI_CLK_DIV` cycles (1.28 us at the defaults).
* Bit 31 of an operation is the read flag. For a read, the 32 bits received
  become the answer.
* The answer sits in one register and goes straight out of the controller's
  port as a one-flit packet. This register is the whole return path.
* While an answer is undelivered, no new operation starts.

## Packets on a controller port

Every link carries 32-bit flits `{last, data}` with valid/ready. Ring and
controller ports use the same flits. A packet is a header flit followed by
payload flits. The top nibble of the header is the command:

| command       | header fields | payload |
|---------------|---------------|---------|
| `PWRITE` (1)  | [15:0] first P-space word address | words written to consecutive addresses |
| `TWRITE` (2)  | [15:0] first table row | one table row per flit |
| `SPOR` (3)    | [24] class (1 = HRT, 0 = SRT), [7:0] priority, larger = more urgent | one I/O operation per flit, each queued with that priority |
| `CTRL` (4)    | [24] run, [22:16] number of table rows in use, [15:0] hyper-period length in ticks | none |

Initialisation is a few `PWRITE` and `TWRITE` packets and one `CTRL` packet
with run = 1. When run is low, the controller's hyper-period time and row
pointer are held at 0.

## I/O-Ring configuration

Each router port s has an 8-bit field at bits `[8*(s%4)+7 : 8*(s%4)]` of the
32-bit register at byte address `4*(s/4)`. The field holds the number of the
controller that port s is linked to. A value of `N_CC` or more (reset value
`8'hFF`) leaves the port unlinked. The rules for links:

* Links are one-to-one. If two router ports name the same controller, the
  lower-numbered port gets it.
* Requests from an unlinked port are held (ready low). An unlinked port never
  sees a response.
* A write takes effect from the next cycle.
* Switching a link in the middle of a packet is up to the software to avoid.
* The APB port has no wait states. An access past the last register answers
  `PSLVERR`.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `N_SUB` (router ports of the ring) | 28 | A 10 x 6 mesh with 32 processors in its central 8 x 4 block leaves 28 border routers free. |
| `N_CC` (controllers) | 16 | The evaluated ring size. |
| `POOL_DEPTH` | 50 | The evaluated controller buffers 100 I/O operations, split evenly over the two pools (the split is a choice made here). |
| `P_MEM_WORDS` | 4096 | 16 KB of RAM per controller, all of it used as P-space. |
| `SHADOW_DEPTH` | 16 | Chosen here. |
| `N_SLOTS` (table rows) | 64 | Chosen here. |
| `SPI_CLK_DIV` | 2 | Chosen here; SCLK = clk / (2*SPI_CLK_DIV), 25 MHz at 100 MHz. |
| `TICK_DIV` | 100 | Chosen here; 1 us ticks at the 100 MHz platform clock. |

## What follows the architecture and what is this design's own

These parts follow the published architecture:

* the controller's split into P-space, S-space with HRT and SRT pools, scheduling
  circuits and a FIFO-less I/O controller;
* the pass-through response path;
* the time slot table of periodic rows, HRT budgets and free time, driven by a
  global timer;
* the rule that a sporadic request may use free time only if it finishes before
  the next reserved start;
* the priority queue made of a register chain plus a register bank with an
  arbiter and a fetcher;
* the ring built from combinational multiplexers steered by 8-bit fields of
  32-bit registers on APB.

These are choices made here, because the architecture does not fix them:

* the packet command set and all bit layouts;
* the time base and the SPI protocol details;
* tie-breaking, both in the pools and between the two pools;
* prefetch timing and what happens when a hyper-period wraps with rows still
  unserved;
* the one-to-one conflict rule of the ring;
* reset values and the sizes marked "chosen here" above.

Known departures and limits:

* **No routers.** The real-time mesh (priority-based wormhole routers with five
  32-bit ports) is an existing design and is not included. Its packet format is
  not reproduced either. A response leaves the controller as a bare data flit
  with no destination header, so the router side must know where to send it.
* **Only SPI.** Single-lane SPI at 25 Mbit/s does not reach the 40 Mbit/s of
  the quad-SPI flash used in the case study. No Ethernet or FlexRay controller
  is included.
* **One operation per queue entry.** A sporadic request of several operations
  becomes several queue entries with the same priority. Another request can be
  scheduled between them.
* **Rows hold start times only.** A reservation is described by its start and
  its worst-case end. Here the end is not stored: a row's budget runs until
  the next row's start, and free-time work must fit before that start. A
  periodic request that runs past the next start is not cut off; the next row
  then starts late.
* **Time fields are 16 bits.** A hyper-period is limited to 65535 ticks.
* **The offline search is not included.** Placement and priorities are chosen
  by a genetic-algorithm search offline; that search is software. The hardware
  only takes its result through the ring registers and the table contents.

## Files

`rtl/`: `nprc_pkg` (types and commands), `nprc_io` (top), `io_ring`,
`io_ring_cfg`, `nprc_cc`, `cc_loader`, `p_space`, `shadow_fifo`, `io_pool`,
`prio_queue`, `pool_arbiter`, `cc_scheduler`, `spi_io_ctrl`, `global_timer`.

`tb/`: one self-checking testbench per block (`tb_<block>`), plus the
following:

* `spi_dev_model`: an SPI device whose answer is `{8'hA5, device id, frame
  number}`, so every answer can be predicted.
* `tb_nprc_io`: an end-to-end run at reduced size (6 router ports, 3
  controllers, 3 hyper-periods). It covers run-time ring reconfiguration,
  periodic starts, HRT budget use, free-time sporadic issue, held-back
  sporadics, full-pool back-pressure and unlinked-port hold, and checks that
  every answer comes out of the router port linked to the answering controller.
* `tb_nprc_cc_capacity`: one controller at its default size filled with 50
  HRT and 50 SRT operations of random priority. Five HRT budgets, too close
  together for sporadic work, come first; then everything drains in priority
  order. A 101st operation is held off until a slot in the full pool frees.
* `tb_io_ring_full`: the ring at its default 28 x 16 size. Twenty random
  placements of all 16 controllers on distinct ports, plus conflicting
  settings, each checked against a reference model under random traffic.
* `tb_nprc_io_full`: the top at its default parameters, running two
  hyper-periods of one periodic request plus sporadic reads.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_nprc_io \
  -y rtl -y tb -Irtl rtl/nprc_pkg.sv tb/tb_nprc_io.sv
./obj_dir/Vtb_nprc_io
```

Substitute any `tb_*` name. The full-size testbench takes about half a minute
to build and well under a second to run.
