# Eight-core bio-signal platform with a non-volatile main memory and page buffers

A wireless body sensor node spends most of its energy in its digital
processor, and most of that energy is leakage, not computation. This
platform attacks leakage by working in short bursts at a comparatively high
clock (20 MHz in the published evaluation). Between bursts it switches off
the whole digital domain while the analog front end keeps collecting
samples ("deep-sleep sensing"). Nothing is lost when power goes, because all
code and data live in a non-volatile memory (a low-voltage STT-RAM). The
cores never read the STT-RAM directly. They work on tiny volatile **page
buffers** of eight words each, which together act as a cache in front of it.

This repository is synthesizable SystemVerilog for that memory system and its
control: the page buffers, the two crossbars, the MMU that moves pages, and
the synchronizer that stalls cores and sequences deep sleep. The STT-RAM is
included as a cycle-level behavioural model. The RISC cores are not
included. Their ports are the top module's ports, so any core with a
simple request/grant memory interface can be attached.

Sizes follow the published architecture (*An Ultra-Low Power NVM-Based
Multi-Core Architecture for Embedded Bio-Signal Processing*):

- eight cores;
- eight instruction page buffers (I-PBs) and sixteen data page buffers
  (D-PBs), eight words each;
- one 160 KB non-volatile store, holding 96 KB of code and 64 KB of data.

Everything else is this design's own choice and is listed below: the word
width, the arbitration and replacement policies, the NVM timing, and the
synchronizer's command set.

## Block map

```
                   +--------------------- nvm_sttram (160 KB, page-wide port) ---+
                   |  page read bus -> every buffer's page_in                    |
                   |  page write   <- victim D-PB's page_out (via MMU)           |
   I-PB 0..7  <- PM crossbar <-+                              +-> DM crossbar -> D-PB 0..15
   (page_buffer)  (log_xbar)   |    core ports (8x)           |   (log_xbar)    (page_buffer)
                               +--- MMU: tag CAM, buffer index, miss handling ---+
                                     | miss_stall          ^ flush_req/done
                                     v                     |
                               synchronizer: core_run[7:0], pwr_gate_o, wake_i
```

| Module | File | What it is |
|---|---|---|
| `wbsn_top` | `rtl/wbsn_top.sv` | the platform; core ports are its ports |
| `mmu` | `rtl/mmu.sv` | tag CAM, miss handling, eviction, write-back, flush |
| `log_xbar` | `rtl/log_xbar.sv` | single-cycle crossbar with per-bank arbitration; used twice (PM: 8x8, DM: 8x16) |
| `page_buffer` | `rtl/page_buffer.sv` | 8-word bank with a word port and a whole-page port |
| `synchronizer` | `rtl/synchronizer.sv` | run enables, barriers, notifications, deep-sleep sequence |
| `nvm_sttram` | `rtl/nvm_sttram.sv` | behavioural model of the STT-RAM (not synthesizable logic) |
| `wbsn_pkg` | `rtl/wbsn_pkg.sv` | command and power-state enums, NVM initial-content formula |

## Addresses and pages

Words are 32 bits. A core's instruction address is a 15-bit word address
into the 24 576-word code space. Its data address is a 14-bit word address
into the 16 384-word data space. The low three bits select the word in a
page. The upper bits are the page number. The NVM stores pages by one page
index: code pages 0-3071 come first, and data page *p* is NVM page
3072 + *p*. Any code page can sit in any I-PB, and any data page in any D-PB.

## The MMU: how a request finds its page

The MMU keeps one tag per buffer: a page number and a valid bit, plus a
dirty bit for data buffers. Every cycle, each core's instruction address is
compared with all eight I-PB tags, and its data address with all sixteen
D-PB tags. This is a small CAM of 8 cores x 24 comparators. A match gives the
index of the buffer that holds the page (`i_sel`, `d_sel`). That index is
the bank number the crossbar routes the request to. The word offset goes
with it unchanged. So translation and routing both happen in the cycle of
the request.

A request that matches no tag is a **miss**. Its core's `miss_stall` bit
rises, the synchronizer drops that core's `core_run`, and the MMU starts a
transfer. There is one NVM, so only one transfer runs at a time. The order
of service is:

1. **Choosing whose miss.** Cores are served round-robin. A core's
   instruction miss goes before its data miss. (A fixed priority was tried
   first and starved the high-numbered cores under heavy traffic.)
2. **Choosing the victim.** An invalid buffer is used if there is one.
   Otherwise the MMU takes the next buffer in round-robin order that no core
   is accessing in that cycle. The victim's tag is invalidated at once. Any
   core that still wants the old page now misses and waits, so nobody can
   write into a buffer while it is being swapped.
3. **Write-back.** A data victim that was written since it was loaded is
   dirty. Its whole page is written to the NVM straight from the buffer's
   `page_out` port. Clean pages, and all code pages, are simply dropped.
4. **Fill.** The missing page is read from the NVM. In the cycle the read
   completes, the page is on the shared NVM read bus. The victim's `load`
   strobe stores all eight words at once, and the tag becomes valid.

Timing, counted from the first cycle a request misses, with no other
transfer in the way:

| Case | Cycles until the request hits |
|---|---|
| instruction page | `RD_LAT + 2` (4 at the defaults) |
| data page, clean victim | `RD_LAT + 3` (5) |
| data page, dirty victim | `RD_LAT + WR_LAT + 4` (10) |

A request that hits costs nothing extra. It is granted in the same cycle
unless another core wins the same bank.

**Flush.** Page buffers are volatile. Before power is cut, the MMU receives
`flush_req`. It writes back every dirty data page, then invalidates every
tag, and pulses `flush_done`. After wake-up every page is fetched again from
the NVM.

## The crossbars

`log_xbar` connects N masters to N banks in a single cycle. Each bank
serves one master per cycle. When several masters address the same bank,
the bank picks one round-robin, starting after the master it served last.
The others see `gnt` low and hold their request. Read data returns
combinationally in the grant cycle, and a write lands at the clock edge.

Masters that read the **same word of the same bank** as the winning read are
granted together with it (`BCAST=1`). This is what makes lock-step (SIMD)
execution cheap: eight cores fetching the same instruction cost one bank
access, not eight. The PM crossbar only reads. Its write enables are tied
low in the top.

Per-bank flags `conflict` and `merged` show when a bank turned a master
away or served several at once. They exist for observation only.

## The synchronizer

A core runs only while its `core_run` bit is high. The bit drops for any of
these reasons:

- **Miss:** the core's request is missing in the page buffers.
- **Barrier:** the core issued `SYNC_BARRIER` with a core mask. It is parked
  until every core in the mask has arrived, and then the whole group is
  released in the same cycle. Cores that split on a data-dependent branch
  use this to rejoin. After the barrier they fetch the same addresses in the
  same cycles, so the crossbar can merge their fetches again.
- **Wait:** `SYNC_NOTIFY` (mask) sets event flags in other cores; this is the
  producer side. `SYNC_WAIT` consumes the core's own flag, or parks the core
  until the flag is set; this is the consumer side. A waiting core runs
  again in the cycle after the notification.
- **Sleep:** the core issued `SYNC_SLEEP`, or the platform is not active.

A command is taken when `sync_req` is high in a cycle where the core's
`core_run` is high.

**Deep-sleep sequence** (`pstate`):

1. `ACTIVE`: when all cores sleep and the MMU is idle, go to step 2.
2. `FLUSH`: `flush_req` is high until the MMU answers `flush_done`.
3. `DEEP`: `pwr_gate_o` is high, asking the power switches to cut the
   digital domain.
4. `WAKE`: `wake_i` (a new sample from the front end) moves the platform
   here. One cycle later all cores are released together, back in `ACTIVE`.

The published description says which jobs this unit does but not how. The command set,
its encoding and this sequence are this design's own.

## Core interface (ports of `wbsn_top`)

Each signal below is an array with one entry per core.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `i_req`, `i_addr` | in | 1, 15 | instruction fetch request, word address |
| `i_gnt`, `i_rdata` | out | 1, 32 | granted this cycle; instruction word (same cycle) |
| `d_req`, `d_we`, `d_addr`, `d_wdata` | in | 1, 1, 14, 32 | data access |
| `d_gnt`, `d_rdata` | out | 1, 32 | granted this cycle; read data (same cycle) |
| `sync_req`, `sync_op`, `sync_arg` | in | 1, 2, 8 | synchronizer command and core mask |
| `core_run` | out | 8 (vector) | run enable per core |
| `wake_i` | in | 1 | sample ready, ends deep sleep |
| `pwr_gate_o` | out | 1 | power-gate request for the digital domain |

Protocol: hold a request until it is granted. There is no separate
response phase. `rst_n` is an active-low asynchronous reset. After reset
every buffer is invalid, so the first accesses miss.

## Parameters (`wbsn_top`)

| Parameter | Default | Origin |
|---|---|---|
| `N_CORES` | 8 | published architecture |
| `N_IPB` / `N_DPB` | 8 / 16 | published architecture |
| `PB_WORDS` | 8 | published architecture (the chosen page-buffer size) |
| `IMEM_KB` / `DMEM_KB` | 96 / 64 | published architecture (160 KB NVM) |
| `WORD_W` | 32 | own choice |
| `NVM_RD_LAT` / `NVM_WR_LAT` | 2 / 4 cycles | own choice; the STT-RAM is only described as low-latency |

Address widths, page counts and the NVM size are derived from these values.

## Where this departs from, or adds to, the published architecture

- **Cores.** The RISC cores are not modelled. Their ISA and pipeline are
  not part of the architecture described.
- **Page buffer cells.** The page buffers are full-custom latch arrays in
  silicon, with a direct input line to every bit cell. Here they are
  edge-triggered registers with the same two ports.
- **NVM.** The STT-RAM is a behavioural model: a page-wide port, fixed
  latencies, and initial content from a formula
  (`wbsn_pkg::nvm_init_word`), so that simulations can predict what they
  read.
- **Own choices.** All of these are assumptions:
  - the single NVM port shared by code and data;
  - round-robin miss service and round-robin replacement;
  - writing back only dirty pages;
  - the flush before power gating;
  - merging identical reads in the crossbars;
  - the synchronizer command set.
- **Power.** Power gating and the sensing front end are outside the digital
  design. Only their two signals, `pwr_gate_o` and `wake_i`, appear.
- **No retention.** Core state is not retained across deep sleep. On
  wake-up the cores are simply released, and a real system would restart
  them from a known point.
- **Benchmarks.** The published evaluation uses four ECG benchmarks:
  8-channel compression, 3-channel morphological filtering, multi-scale
  morphological-derivative delineation, and classifier-driven delineation.
  Their code and data sizes are not published. Whether each one fits in
  96 KB + 64 KB, and meets its real-time deadline at 20 MHz, depends on
  code for cores that are not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_page_buffer` | word reads and writes, and one-cycle page loads, against a reference array; a load beats a simultaneous write |
| `tb_nvm_sttram` | full 160 KB model: initial content, read-back of writes, exact read and write latencies |
| `tb_log_xbar` | 8x16 crossbar against an independent arbitration model: grants, round-robin order, read data, writes, merged reads, flags |
| `tb_mmu` | eight random cores over more pages than the buffers hold, checked against a shadow memory; miss latencies; no starvation; after a flush the NVM holds every written word and no buffer is valid |
| `tb_synchronizer` | miss stalls, partial and full barriers, notify before and after wait, the full deep-sleep sequence |
| `tb_wbsn_top` | the whole platform at its default size (see below) |
| `tb_wbsn_duty` | the whole platform over six sensing periods (see below) |

`tb_wbsn_top` emulates eight cores running a short program:

1. a lock-step section whose fetches are merged;
2. shared code entered at different words, which causes bank conflicts;
3. private code and data that overflow the buffers, which causes evictions
   and dirty write-backs;
4. a shared page and a producer/consumer handoff;
5. deep sleep, during which the test checks that the NVM holds all data;
6. wake-up and a full read-back;
7. one core alone, checking that a read and a write to a resident page
   are each granted in the cycle they are issued.

The test counts each mechanism and fails if any of them never happened. It
runs in about 1200 cycles.

`tb_wbsn_duty` runs the platform as it is meant to operate: six sensing
periods in a row. In each period:

1. While the platform is gated, the testbench drops eight new samples per
   channel straight into the NVM, then raises `wake_i`.
2. Every core filters its channel with a three-tap moving sum and keeps its
   history in data memory.
3. The cores sleep again.

The test checks every result in the NVM after the last flush. It also
reports how the cycles were spent: active, page transfer and deep sleep.
The kernel is a toy and not an ECG application, so it is transfer-bound and
its percentages say nothing about the published benchmarks.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          rtl/wbsn_pkg.sv tb/tb_wbsn_top.sv --top-module tb_wbsn_top
./obj_dir/Vtb_wbsn_top
```

Replace `tb_wbsn_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/wbsn_pkg.sv rtl/<module>.sv`.

Two kinds of lint warning remain:

- Unused-signal warnings in `wbsn_top`. The MMU's, crossbars' and
  synchronizer's event outputs and the I-PBs' page outputs are left
  unconnected there on purpose. The testbench observes them.
- A sync/async reset warning. It comes from the `disable iff (!rst_n)`
  clauses of the assertions.
