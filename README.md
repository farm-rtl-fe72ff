# FARM: FPGA-side RTL for a coherent prototyping node

FARM (Flexible Architecture Research Machine) is a prototyping platform in
which an FPGA sits on the coherent HyperTransport (cHT) fabric of a
two-socket AMD Opteron system. To the CPUs the FPGA is one more coherent
node. It owns a window of physical memory, answers every snoop, and has a
cache of its own that takes part in the MOESI protocol. A user's accelerator
or prototype on the FPGA can then talk to software in three ways:

| mechanism | who starts it | typical use |
|---|---|---|
| memory-mapped registers (MMRs) | CPU, uncached loads/stores | configuration, status polling |
| data stream | CPU, write-combining stores into the FPGA window | pushing bulk data to the FPGA |
| coherent cache | FPGA (or CPU through a snoop) | pulling data straight out of CPU caches, shared-memory polling |

This repository holds synthesizable SystemVerilog for everything that sits
between the cHT link-layer core and the user's logic. That is the Data
Transfer Engine (DTE), the coherent cache, the MMR file and the clock-domain
crossing. It also holds self-checking testbenches. The cHT link core is not
included: it does flow control, CRC, link clocking and LVDS serialisation, and
it is third-party IP. This RTL meets it at a packet interface of its own
design, described below.

```
             cht_clk domain          |                  app_clk domain
                                     |
  cHT core ==> dual_clock_fifo (rx) ==> dte ---------------------------+
  (not here)<== dual_clock_fifo (tx) <==  |  stream_in_handler ---> str_*  (data stream to user)
                                     |    |        |
                                     |    |     mmr_file <-------> mmr_* (registers to user)
                                     |    |  snoop_handler --+
                                     |    |  data_requester -+--> coherent_cache <--> req_*/rsp_*/pf_*
                                     |    |  data_handler ---+     cache_core            (cache to user)
                                     |    |  dte_tag_table         write_buffer
                                     |                              prefetch_buffer
```

`farm_top` is the top level. Its ports are the cHT-side packet ports, plus the
three user interfaces and a tags-in-use status count.

## The packet interface

Every module behind the link core passes whole packets of type
`farm_pkg::ht_pkt_t`. Each transfer carries one packet:

| field | bits | meaning |
|---|---|---|
| `cmd` | 4 | command, see below |
| `src` | 3 | node that *owns the transaction*: the requester of a request; for a response, the node it goes back to |
| `tag` | 5 | transaction tag (32 in flight, as in cHT) |
| `addr` | 40 | physical address |
| `count` | 4 | valid 64-bit words of a sized access (1..8) |
| `posted` | 1 | sized write that expects no completion |
| `dirty` | 1 | probe response that carries an owned line |
| `data` | 512 | one 64-byte line; word *i* is `data[64*i +: 64]` |

Commands: `WR_SIZED` and `RD_SIZED` (CPU to FPGA window), `RD_BLK_MOD` (the
FPGA's exclusive line read), `VIC_BLK` (the FPGA's dirty-line writeback),
`PROBE`, `PROBE_RESP`, `RD_RESP`, `TGT_DONE` and `SRC_DONE`. These follow the
cHT transaction types in name and role. The encoding and the single-packet
layout belong to this design. A real cHT core sends command and data as
separate flits, so to attach one you need an adapter that gathers the flits
into this struct and splits it again on the way out.

The FPGA is node 2 (`NODE_ID`); the CPUs are nodes 0 and 1.

## Address window: MMRs and stream

The FPGA window starts at `FARM_BASE` (default `0x10_0000_0000`). Below it is
the CPUs' DRAM; the OS driver hides the window and maps it into the user
process.

* The first `MMR_SPAN` bytes (4 KB) hold the MMR file. Register *i* is at
  `FARM_BASE + 8*i`, modulo `NUM_REGS` (16 registers of 64 bits). A CPU write
  updates the register and pulses `mmr_cpu_wr_strobe[i]` for one cycle. A
  non-posted write is acknowledged with `TGT_DONE`. A CPU read returns the
  register in a `RD_RESP`. The user logic sees every register at once on
  `mmr_regs` and writes through `mmr_usr_*`. If both sides write the same
  register in one cycle, the CPU wins.
* The rest of the window is the stream. A `WR_SIZED` of *n* words comes out
  on the stream port as *n* beats, each with one 64-bit word and its 40-bit
  address, one beat per `app_clk` while `str_ready` is high. Posted writes
  are not answered. Non-posted ones get a `TGT_DONE` once the last word has
  been passed on. A read in the stream window returns zero.

The CPU's write-combining buffer merges stores to one line, so software must
stream to distinct, preferably sequential, addresses.

## The Data Transfer Engine

`dte` is the transport layer. It steers received packets by command:

* sized reads and writes go to `stream_in_handler`;
* probes go to `snoop_handler`;
* `RD_RESP`, `PROBE_RESP` and `TGT_DONE` are answers to the FPGA's own
  requests, and go to `data_handler`;
* unknown commands are consumed and dropped.

**Tags.** Every request the FPGA issues takes a tag from `dte_tag_table`:
the lowest free one of 32. The table records, per tag, whether the request is
a fetch or a writeback, which cache-buffer slot it serves and its line
address. Responses can therefore come back in any order and are matched by
tag alone.

**A fetch, step by step.** The prefetch buffer offers a line address.
`data_requester` takes a tag and sends `RD_BLK_MOD`. The system has no
directory, so the home memory controller answers with `RD_RESP` and each of
the two CPU caches answers with a `PROBE_RESP`. `data_handler` counts these
per tag until `NUM_RESP` (3) have arrived, and it keeps the right copy of the
line. A dirty probe response always wins over the memory data, in either
arrival order. After the last answer it hands the line to the recorded
prefetch-buffer slot, sends `SRC_DONE` and frees the tag. The tag is freed
only when both the line and the `SRC_DONE` have been accepted.

**A writeback.** The write buffer offers an evicted line. `data_requester`
sends `VIC_BLK` with the data. When the `TGT_DONE` comes back, `data_handler`
frees the tag and the write-buffer slot. If a writeback and a fetch wait at
the same time, the writeback goes first.

**A snoop.** `snoop_handler` passes the probed address to the cache. The
cache looks in its core, write buffer and prefetch buffer in the same cycle
and answers one cycle later. The handler then returns a `PROBE_RESP` to the
requester, with the line and `dirty=1` on a hit and without data otherwise.
The cache gives up the line on every hit (see below). A probe accepted in
cycle *t* has its response ready on the transmit port in cycle *t+2*.

**Transmit order.** Four sources share one transmit port under fixed
priority:

1. probe responses (snoop latency sets the miss latency of the whole system);
2. `SRC_DONE`;
3. MMR/stream completions;
4. new requests.

Each source holds its packet until it is taken.

## The coherent cache

This is the part with the most interacting state.

**States.** A line is either *modified* or *invalid*. Every line is brought
in with an exclusive read, so whatever the cache holds is owned. It is
written back when evicted and handed over when snooped. There are no shared,
exclusive-clean or owned states. That keeps the snoop logic small, and it
suits producer/consumer traffic, where shared copies would not help.

**Size.** `CACHE_BYTES` = 4096 and `WAYS` = 2 by default. With 64-byte lines
that is 32 sets. The address splits as tag `[39:11]`, set `[10:6]`, word
`[5:3]`. Addresses are physical, and software must use pinned pages.

**User interface (`cache_core`).** Requests are 64-bit word reads or writes
with a 4-bit id. A hit is answered in the next cycle. A miss is parked in a
single miss register and sent to the prefetch buffer. Later requests that hit
are still served (hit-under-miss), so a response can overtake the parked miss;
that is why responses carry the id. The next request that misses stalls
`req_ready` until the parked miss is filled. A write miss allocates the line:
the write is merged into the fetched line as it is installed. `rsp_valid`
has no back-pressure.

**Priorities inside the core.** Snoop first, then fill, then user request.
In a snoop cycle neither fills nor requests are taken. While a fill is
offered, requests wait.

**Fill and eviction.** The victim is an invalid way if there is one, else
the least recently used way. With more than two ways it is the way after the
most recently used one, which is an approximation of LRU. A valid victim is
pushed into the write buffer in the same cycle as the fill is installed, and
the fill waits while the write buffer is full. A fill for a line the core
already holds is dropped.

**Prefetch/fill buffer (`prefetch_buffer`).** Every fetch passes through one
of 4 slots, demand misses included. Each slot goes FREE → ISSUE → WAIT →
READY → FREE:

* ISSUE: waiting for the requester;
* WAIT: fetch sent;
* READY: line arrived, waiting to move into the core.

The user's `pf_*` port is non-blocking while a slot is free, so an
accelerator can issue a run of precomputed addresses and let up to four
fetches overlap. A request for a line already in a slot joins that slot. A
demand miss marks its slot, and marked slots move into the core first.
Demand misses are taken before prefetches. A prefetch of a line the core
already holds is accepted and dropped.

**Write buffer (`write_buffer`).** It holds 4 evicted lines until their
`TGT_DONE` arrives. The lowest waiting slot is offered for writeback first.

**Snoops across the three sub-blocks.** At most one sub-block can hold a
given line, because every line is held exclusively. On a snoop hit:

* in the core, the line is invalidated;
* in the prefetch buffer (READY slot), the line is taken. The slot is
  refetched if a demand miss waits on it, and freed otherwise;
* in the write buffer, an entry not yet sent is dropped, because ownership
  moved to the snooper. An entry already sent stays until its completion
  arrives.

A snoop on a slot whose data has not arrived yet answers *miss*: the FPGA's
own request has not been ordered yet. A new fetch of a line that is still in
the write buffer is held back until the writeback completes. Otherwise the
fetch could read memory before the dirty data reached it.

These corner-case rules belong to this design, not to the platform
description. Check them first if you connect a real cHT core, because the
real protocol's ordering of a probe against the FPGA's own in-flight request
is handled by the home node, and this RTL assumes that ordering.

## Clock domains

The DTE, the cache, the MMR file and the user logic run on `app_clk`. The
packet side runs on `cht_clk`, the clock of the link core's user interface.
In the platform's base configuration both run at 100 MHz, and the link
itself at 200 MHz inside the core. Two `dual_clock_fifo`s join the domains,
one per direction. They are Gray-pointer asynchronous FIFOs of `2**FIFO_AW`
entries (default 8) carrying whole 570-bit packets. Each domain has its own
active-low reset, synchronous to its clock. Release both resets together.

## Parameters (`farm_top`)

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 4096 | cache capacity (platform's reported configuration) |
| `WAYS` | 2 | associativity (platform's reported configuration) |
| `PF_ENTRIES` | 4 | prefetch/fill buffer slots (design choice) |
| `WB_ENTRIES` | 4 | write buffer slots (design choice) |
| `NUM_RESP` | 3 | answers per exclusive read: 2 CPU caches + home memory |
| `NUM_REGS` | 16 | MMR count (design choice) |
| `FARM_BASE`, `MMR_SPAN` | `0x10_0000_0000`, 4096 | FPGA window and its MMR part (design choice) |
| `NODE_ID` | 2 | FPGA node number |
| `ID_W` | 4 | cache request id width |
| `FIFO_AW` | 3 | log2 depth of each clock-crossing FIFO (at least 2) |

Fixed in `farm_pkg`:

* 40-bit addresses, 64-bit words and 32 tags, all as on the platform;
* 64-byte lines, the Opteron line size. The platform makes the line size a
  parameter but does not state it.

The slot index width (`SLOT_W` = 3) limits `PF_ENTRIES` and `WB_ENTRIES` to 8.

## Rates and latencies

* Stream: 8 bytes per `app_clk`, which is 800 MB/s at 100 MHz. The rate holds
  across back-to-back posted line writes, because the handler takes the next
  packet in the cycle that passes the last word of the previous one. The CPU-side
  rate measured on the platform is about 630 MB/s, so the FPGA side is not
  the limit.
* Cache hit: the response comes one cycle after the request is accepted.
* Snoop: the cache answers one cycle after the snoop, and the probe response
  is ready two cycles after the probe is accepted in the DTE. The clock
  crossing adds a few cycles in each direction.
* Up to 32 FPGA transactions can be in flight. With the default buffers,
  4 fetches and 4 writebacks are the practical limit.

## What follows the platform, and what this RTL adds

The platform description fixes the structure and the behaviour visible from
outside. The RTL follows it in these points:

* a DTE made of a data requester, a data handler, a snoop handler and a
  handler for incoming stream/MMR traffic, with tag-indexed state for 32
  transactions;
* the data handler counts every answer to a fetch and picks the valid copy;
* evictions go out through the data requester;
* a cache made of a set-associative core, a write buffer and a prefetch
  buffer, with three data paths to the DTE (fetch, writeback, snoop), whole
  lines on each;
* snoops searched in all three sub-blocks at once, and given the highest
  priority;
* modified/invalid lines only, with an exclusive read for every fill;
* a word-wide user port with hit-under-miss that stalls at the second miss;
* a non-blocking prefetch port while a slot is free;
* physical addresses;
* a 4 KB, 2-way default cache;
* 64 bits of data and 40 bits of address per clock on the stream port;
* a small MMR file.

The platform description gives none of the following, so they are this
design's own:

* the packet struct and its command encoding (see above);
* every handshake (valid/ready throughout);
* the clock-crossing FIFO depth;
* the number of MMRs, their address map, and the rule that the CPU wins a
  write collision;
* the window base;
* zero data for stream-window reads;
* the fixed transmit priority below the snoop response;
* writebacks ahead of fetches;
* the victim choice;
* the 4-entry write and prefetch buffers;
* the corner-case snoop rules listed under the coherent cache;
* the assumption of exactly three answers per exclusive read.

The platform's real cHT core also handles shared and owned lines from the
CPUs (MOESI). This RTL never asks for them, because it always requests
exclusive ownership. It therefore implements only the part of the protocol
that such a node needs. Commands it does not know are dropped, not answered.

## Not included

* The cHT link core, the HyperTransport PHY/LVDS pads, the CPUs and DRAM:
  they are given parts of the platform.
* The user application, such as a DMA engine built on the cache's prefetch
  port. The platform leaves it to its users.
* The OS driver that maps the window and pins pages: it is software.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it does |
|---|---|
| `tb_farm_top` | end to end at default parameters, against a packet-level model of two CPU caches and home memory, with unrelated clocks. Covers MMR write/read, streaming with and without back-pressure and at full rate, miss, hit, hit-under-miss, stall at the second miss, dirty probe data taken over memory, snoop hit and miss, prefetch, eviction with writeback and re-read, several tags in flight, out-of-order responses. Each mechanism must occur at least once |
| `tb_farm_workload` | the communication microbenchmark at default parameters. It moves M = 64, 1024 and 16384 bytes by MMR writes, by streaming and by a coherent pull (a small DMA engine on the user ports that prefetches ahead of its reads). Each run ends with software polling an MMR for completion. It also has software poll a flag coherently: the CPU's read misses probe the FPGA until the user logic's cache write raises the flag, and the next probe takes it out of the FPGA's cache. It checks every word and prints the user-side rate: 8 B/clock for the stream, about 2.6 B/clock for the pull with 4 fetches in flight. The pull is limited by the one-word-per-request cache port |
| `tb_coherent_cache` | 3000 random accesses and random prefetches over lines that collide in 4 sets, with random and aimed snoops and out-of-order fills. Every read must return the last value written anywhere in the system. Snoops must hit in all three sub-blocks |
| `tb_cache_core` | the same value check on the core alone, plus next-cycle hits, hit-under-miss, second-miss stalls, and that a line given up to a snoop does not hit again until it is refetched |
| `tb_dte`, `tb_data_handler`, `tb_data_requester`, `tb_snoop_handler`, `tb_stream_in_handler`, `tb_dte_tag_table` | the DTE and its parts: tag uniqueness, response counting and copy selection in random order, transmit priority, stream rate |
| `tb_prefetch_buffer`, `tb_write_buffer`, `tb_mmr_file`, `tb_dual_clock_fifo` | the buffers: slot life cycle, snoop rules, full/empty, collisions |

Running one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/farm_pkg.sv tb/tb_farm_top.sv --top-module tb_farm_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_farm_top` with any other testbench name. Every testbench runs in
well under a second. The RTL also carries assertions for handshake and
protocol rules:

* a held packet must not change;
* responses must belong to a tag in flight;
* only one sub-block may hit a snoop.

Limits of what has been checked: the packet model in `tb_farm_top` stands in
for the real cHT core and CPUs, and it answers every exclusive read with
exactly one memory response and two probe responses. The RTL has not been run
against a real link core or on an FPGA.
