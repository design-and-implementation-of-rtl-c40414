# Correlating cache

A data-cache front end for the processing cores of a network processor. It
rests on one observation about packet-processing code: when load X is
followed by load Y, the distance between the addresses they read tends to
stay the same from one loop iteration to the next, even when the addresses
themselves jump around (each packet sits somewhere else in memory). In

    start: ldX  r1, [r2]        ; e.g. 0x1000, 0x2000, 0x1000 ...
           add  r3, r1, r4
           ldY  r5, [r3]        ; e.g. 0x1200, 0x2200, 0x1200 ...

ldY always reads 0x200 bytes after ldX. Once the hardware has seen that, it
can fetch ldY's line as soon as ldX executes, long before ldY is issued.

The correlating cache places a small, single-cycle **Correlating Buffer (CB)**
in front of the level-1 data cache (**DL1**) and adds two tables that sit
beside the load path rather than in it:

* the **Dynamic Correlation Extractor (DCE)** learns which loads are followed
  by a load at a constant offset;
* the **Correlation History Table (CHT)** keeps those loads and, each time one
  of them executes again, asks the CB to prefetch the address of its
  successor.

The CB then serves most loads in one cycle. This repository holds
synthesizable SystemVerilog for the CB, DL1, DCE, CHT and the subsystem that
joins them, with self-checking testbenches.

## Structure

```
            cpu_req (pc, we, addr, wdata, wstrb)         mem_* (to the L2)
 core ───────────────┬──────────────► cc_cb ◄──────► cc_dl1 ◄──────►
      ◄── cpu_rsp ───┼──────────────   ▲ pf
                     │ pc, addr        │
                     ├──► cc_cht ──► cc_pf_queue
                     │      ▲ (LPC, offset)
                     └──► cc_dce   (loads only, one cycle later)
```

| Module | File | Role |
|---|---|---|
| `correlating_cache` | `rtl/correlating_cache.sv` | top: wires the units, core port, L2 port, event outputs |
| `cc_dce` | `rtl/cc_dce.sv` | Dynamic Correlation Extractor |
| `cc_cht` | `rtl/cc_cht.sv` | Correlation History Table |
| `cc_pf_queue` | `rtl/cc_pf_queue.sv` | prefetch buffer between CHT and CB |
| `cc_cb` | `rtl/cc_cb.sv` | Correlating Buffer (level-0 cache) |
| `cc_dl1` | `rtl/cc_dl1.sv` | level-1 data cache |
| `cc_pkg` | `rtl/cc_pkg.sv` | widths, request structs, event struct |

The only thing the core must add is its PC on every memory request; the
rest replaces the core's local data cache. The core itself, its packet
memory and the shared L2 are outside this RTL: the L2 attaches to the `mem_*`
port.

## Correlation extraction (DCE)

This is the part that decides what gets prefetched, and the least obvious.
The DCE keeps two registers, **LPC** (PC of the previous load) and **LSA**
(address of the previous load), and a direct-mapped table indexed by PC whose
entries hold the last two offsets seen *after* that PC, `last_offset_1`
(newest) and `last_offset_2`. For every load (PC, address):

```
new_offset = address - LSA
look up the table with LPC
  hit:   if new_offset == last_offset_1 == last_offset_2
             send (LPC, new_offset) to the CHT          -- "extraction"
         else
             last_offset_2 = last_offset_1; last_offset_1 = new_offset
  miss:  allocate the entry for LPC with last_offset_1 = new_offset
LPC = PC; LSA = address
```

So a load pair is reported once the same offset has been seen three times in
a row, and then on every further repetition (the CHT is simply rewritten with
the same value). For the ldX/ldY loop above, with the next ldX 0xE00 bytes
after ldY:

| load | LPC entry | action |
|---|---|---|
| 1 ldX 0x1000 | – | only sets LPC/LSA |
| 2 ldY 0x1200 | ldX: miss | allocate ldX {0x200} |
| 3 ldX 0x2000 | ldY: miss | allocate ldY {0xE00} |
| 4 ldY 0x2200 | ldX: hit | shift: ldX {0x200, 0x200} |
| 5 ldX 0x3000 | ldY: hit | shift: ldY {0xE00, 0xE00} |
| 6 ldY 0x3200 | ldX: hit | **extract (ldX, +0x200)** |
| 7 ldX 0x4000 | ldY: hit | **extract (ldY, +0xE00)** |

Implementation details that are this design's own: each stored offset has a
valid bit, so a freshly allocated entry (one offset) cannot match; offsets
are 16-bit signed (`OFFSET_W` in `cc_pkg`), enough for every offset from 4 to
13848 bytes that the original evaluation reports, and a difference that does
not fit is stored as invalid so it never matches; the table is indexed with
PC[5:2] (16 entries) and tagged with the rest of the PC; stores neither train
the DCE nor change LPC/LSA. The DCE works one cycle after the load is
accepted and its result reaches the CHT one cycle after that.

## Prefetching (CHT and the prefetch buffer)

The CHT is a 16-entry direct-mapped table of (PC tag, offset). Every access
the CB accepts probes it in the same cycle, in parallel with the CB lookup,
so it adds nothing to the access time. On a hit the prefetch address
`address + offset` is registered and put in the prefetch buffer at the next
clock edge.

The CB takes a prefetch only in a cycle in which the core presents no
request. A prefetch whose line is already in the CB costs only the tag check;
otherwise the line is read from the DL1 and installed (writing back a dirty
victim first). Because the core usually issues its next load before older
prefetches get a turn, the buffer (`cc_pf_queue`, 2 entries) hands out the
*newest* prefetch first and discards the oldest when full: the newest one
predicts the very next load. The buffer and its ordering are additions of
this implementation.

Timing for a load that hits the CB at cycle *a*: response at *a*+1, prefetch
buffered at *a*+2, so one free cycle between loads is enough for the CB to
start fetching the successor's line. If the successor arrives while that fill
is in flight it waits for it (`cpu_req_ready` low) and then hits.

## Correlating Buffer and DL1

| | CB (`cc_cb`) | DL1 (`cc_dl1`) |
|---|---|---|
| default size | 32 lines x 32 B = 1 KB, direct mapped | 128 sets x 2 ways x 32 B = 8 KB |
| hit latency | 1 cycle (registered response) | 2 cycles (`HIT_LATENCY`) |
| policy | write-back, write-allocate | write-back, write-allocate, LRU |
| outstanding | one miss or prefetch | one request |

Latency seen by the core, request cycle to response cycle:

| case | cycles |
|---|---|
| CB hit | 1 |
| CB miss, DL1 hit, clean CB victim | 3 |
| CB miss, dirty CB victim, DL1 hit | 6 |
| CB miss, DL1 miss (12-cycle L2), clean victims | 15 |

The 1-cycle CB and the 3-cycle DL1 access behind it are the figures of the
original evaluation (1 GHz, L1 latency 2, L2 latency 12); the write policies,
the LRU and the one-at-a-time operation are choices of this design. The CB
forwards the DL1's line to the core in the cycle it arrives, and the DL1
forwards the L2's line likewise. A whole-line write (a CB write-back) that
misses in the DL1 installs the line without reading the L2.

## Interfaces

All types are in `cc_pkg`.

* **Core port.** `cpu_req_valid`/`cpu_req_ready` handshake; `cpu_req_t` =
  {`pc`[32], `we`, `addr`[32] (word aligned), `wdata`[32], `wstrb`[4]}. Each
  accepted request gets exactly one `cpu_rsp_valid` pulse, in order, with
  `cpu_rsp_rdata` for loads (stores get a data-less pulse). A request must be
  held unchanged until accepted (an assertion checks this).
* **L2 port.** `mem_req_valid`/`mem_req_ready` with `line_req_t` = {`we`,
  `laddr`[27] (line address), `wdata`[256]}; one `mem_rsp_valid` pulse per
  request, with `mem_rsp_data`[256] for reads. The next level may take any
  number of cycles.
* **Events.** `events` (`cc_events_t`) carries one-cycle pulses: CPU stall,
  CB hit/miss/write-back, prefetch fetched/redundant/dropped, DCE
  allocation/extraction, CHT hit, DL1 hit/miss/write-back. They are meant for
  performance counters.
* Reset `rst_n` is asynchronous, active low, and empties every table.

## Parameters and configurations

`correlating_cache` parameters, with the defaults of the main configuration
("large CB x large DL1", the best-performing one in the original evaluation):

| parameter | default | meaning |
|---|---|---|
| `CB_ENTRIES` | 32 | CB lines (small CB: 8) |
| `DL1_SETS` | 128 | DL1 sets (small DL1: 64) |
| `DL1_WAYS` | 2 | DL1 ways (small DL1: 1) |
| `DL1_HIT_LATENCY` | 2 | DL1 hit latency, >= 2 (only 2 is exercised by the testbenches) |
| `DCE_ENTRIES` | 16 | DCE table entries |
| `CHT_ENTRIES` | 16 | CHT entries |
| `PFQ_DEPTH` | 2 | prefetch buffer entries (own choice) |

All sizes must be powers of two. The line size (32 bytes) and the 16-bit
offset are package constants.

## Verification

Each testbench checks outputs against values computed independently in the
testbench and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cc_dce` | the worked example above, a sequence with no constant offset (never extracted), and 2000+ random loads against a reference model |
| `tb_cc_cht` | hit/miss and prefetch address (signed offsets, replacement of a shared entry) for random writes and probes |
| `tb_cc_pf_queue` | newest-first order, discarding of the oldest entry, drop pulses, against a reference list |
| `tb_cc_cb` | random loads/stores/prefetches against a reference memory; latencies 1 / 3 / 6; prefetch fills and redundant prefetches; event counts |
| `tb_cc_dl1` | random line reads/writes over 4x the capacity; LRU, dirty write-backs, latencies 2 / 14 / 27 with a 12-cycle L2 |
| `tb_correlating_cache` | the whole subsystem at default parameters: a packet loop in which the ldY-style load must hit the CB at least 80 % of the time after training, a back-to-back phase that overflows the prefetch buffer, random traffic over 128 KB; every event must occur, CB hit = 1 cycle, CB miss/DL1 hit = 3 cycles, CB miss/DL1 miss = 15 cycles, all load data checked |
| `tb_cc_configs` | the same packet loop on large/small CB x large/small DL1 and on 4- and 128-entry DCE/CHT; prints CB hit ratio and average load latency per configuration |

On `tb_cc_configs`' synthetic loop (six loads per packet, 28 bytes apart,
irregular packet addresses) about 83 % of loads hit the CB in all four
cache configurations with 16-entry tables, against 50 % with 4-entry tables,
whose index collisions lose most extractions. These figures describe that
loop only; they are not a performance claim for real applications.

`tb/cc_line_mem_model.sv` is a behavioural line memory used as the L2
(12 cycles) or as a stand-in DL1 (2 cycles). Its contents start as
`word(a) = a ^ 32'h5A5A0F0F`, which the testbenches use to predict reads.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/cc_pkg.sv tb/tb_correlating_cache.sv --top-module tb_correlating_cache
./obj_dir/Vtb_correlating_cache
```

Replace the testbench name for the others. Each runs in well under a second.
To lint the RTL: `verilator --lint-only -Wall -Irtl -y rtl rtl/cc_pkg.sv
rtl/correlating_cache.sv`. The remaining lint warnings are unused low address
and PC bits, and the reset being used both as the asynchronous reset and as
the disable of the protocol assertions.

## What is not here, and how far to trust it

* The comparison points of the original evaluation are not built: the plain
  DL1 baseline, a CB without prefetching, and a CB with next-block
  prefetching. Neither are the energy figures, which came from a cache
  energy model, not from logic.
* The core, its packet memory and the L2 are not designed here; the L2 is a
  port.
* The original describes what the CB, DCE and CHT do and the DCE's procedure
  step by step; it gives sizes and latencies but not write policies, index
  bits, handshakes or how prefetches and demand requests share the CB. Those
  are this design's choices, listed in each file's header.
* The stored-offset width is the one point where the original's figures
  disagree with each other: its stated DCE table size implies 8-bit offsets,
  while the offsets it reports reach 13848 bytes. This design uses 16 bits.
* The CB and DL1 are blocking caches serving one request at a time. That is
  simple and verifiable, but a core that issues a load during a prefetch fill
  waits for it.
* All modules pass their self-checking testbenches, including the top-level
  one at the default sizes. Synthesis has only been checked up to
  technology-independent cells.
