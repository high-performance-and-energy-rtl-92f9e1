# Two-level instruction cache with next-line prefetch for an 8-core ultra-low-power cluster

A cluster of small RISC-V cores that all run the same parallel loop has a
choice of instruction caches, and none of the simple ones is good:

- **Private caches** are fast: one cycle, nothing between core and tag
  lookup. But each core holds its own copy of the code. That wastes area, and
  the loop stops fitting once it outgrows one small cache.
- **One shared cache** holds the code once. But the crossbar between the
  cores and the banks then sits on the critical path from the core's fetch
  request to the tag lookup.

This design stacks the two. Each core has a tiny private L1 (512 B), which
keeps the 1-cycle hit and the short critical path. Behind the L1s sits a
shared, banked **L1.5** (2 × 2 KiB), reached through a logarithmic
interconnect with a response buffer. An L1 miss that hits in the L1.5 costs
3 cycles instead of a trip to L2 (19 cycles here).

Three further mechanisms make the small L1 work and keep the clock high:

1. **A next-line prefetcher in each L1.** It hides most of the 3-cycle L1.5
   latency for sequential code. It shares the L1's single port to the
   interconnect with the refill path, using out-of-order transfer IDs.
2. **Merging of misses in the L1.5.** When eight cores miss on the same line
   at almost the same time, the line is fetched from L2 only once.
3. **A fetch stage built for timing.** The core's fetch request comes only
   from registers: a 128-bit L0 line buffer plus a 4 × 32-bit ring FIFO. The
   conditional branch from the execute stage is delayed by one cycle. This
   removes the two long paths from the core into the cache's tag lookup.

The default parameters are the main configuration of the original design:

- 8 cores
- 512 B, 4-way private L1 with prefetch
- 2 × 2048 B, 4-way, single-ported L1.5 banks
- response buffer on, request buffer off
- 4-entry ring FIFO

```
 core 0..7 (decode / execute)           per core                                 shared
 ─────────────────────────────  ┌─────────────────────────────┐
  jump_i, branch_i  ──────────► │ if_fetch_unit               │
  instr_* ◄──────────────────── │  L0 line ─► fetch_ring_fifo │
                                └──────────────┬──────────────┘
                                  fetch_req/addr/gnt, fetch_rvalid/rdata (128 b)
                                ┌──────────────▼──────────────┐
                                │ l1_icache  512 B 4-way      │
                                │  scm_tag_array (2 rd ports) │
                                │  scm_data_array             │
                                │  l1_prefetch_ctrl           │
                                │  l1_ooo_arbiter (ID in MSB) │
                                └──────────────┬──────────────┘
                                               │ {id, addr} / {id, line}, drop
                                ┌──────────────▼───────────────────────────────┐
                                │ log_interconnect 8 × 2, round robin per bank │
                                │ response buffer, refill-over-prefetch on     │
                                │ collision                                    │
                                └───────┬──────────────────────────┬───────────┘
                                ┌───────▼────────┐        ┌────────▼───────┐
                                │ l15_bank 0     │        │ l15_bank 1     │
                                │ 2 KiB 4-way    │        │ 2 KiB 4-way    │
                                │ miss table (4) │        │ miss table (4) │
                                └───────┬────────┘        └────────┬───────┘
                                ┌───────▼──────────────────────────▼───────┐
                                │ l2_refill_arbiter (round robin, ID)      │──► L2 port
                                └──────────────────────────────────────────┘
```

## What one fetch costs

All numbers are in cycles, counted from the cycle the L1 grants a core fetch
to the cycle the 128-bit line is on `fetch_rvalid`. The full-size testbench
checks each of them.

| Case | Latency | Where the cycles go |
|---|---|---|
| L1 hit | 1 | Registered data read |
| Line sits in the L1's prefetch buffer | 1 | Counts as a hit |
| L1 miss, L1.5 hit | 3 | Refill request leaves the L1 (+1); bank lookup (+1); interconnect response buffer (+1). The line goes to the core in the cycle it arrives. |
| L1 miss, line already being prefetched | ≤ 3 | No refill is sent; the L1 waits for the prefetch response |
| L1 miss, L1.5 miss | L2 round trip + 4 | 19 with a 15-cycle L2. The bank answers the first waiting core the cycle after the L2 line arrives. |

The 1, 3 and 19 cycles match the figures of the original design (L1 hit 1,
L1.5 penalty ≥ 3, L2 penalty 19). Anything above them is contention: two
masters on one bank, a bank busy answering merged requesters, or a full miss
table.

## The fetch stage: why a ring FIFO, and what it costs

**The problem.** In the classic RI5CY-style fetch stage, the next request
depends on the data just returned, because compressed and misaligned
instructions decide how far to advance. This gives two long paths:

- The first runs from the cache's data array, through the prefetch logic, to
  `fetch_req`, and back into the tag lookup.
- The second runs from the branch decision in execute to `fetch_req`.

**`if_fetch_unit` cuts both paths.**

- **The request comes only from registers.** `fetch_req_o` and
  `fetch_addr_o` depend only on:
  - the fetch pointer,
  - the tag of the line held in L0,
  - the one-bit "request outstanding" flag.

  They never depend on `fetch_rvalid_i`, `fetch_rdata_i`, `jump_i` or
  `branch_i`. An assertion checks that a pending request stays stable until
  it is granted.
- **The L0 buffer.** It holds the last 128-bit line. Words are taken from it
  one at a time, so four sequential words cost one cache access. A line that
  arrives is written into L0. If the line holds the word the fetch pointer
  wants, that word is pushed into the ring in the same cycle.
- **The ring FIFO (`fetch_ring_fifo`).** It holds 4 words, each with its
  address.
  - It is *full at DEPTH−1 useful words*. The slot under the write pointer
    is therefore never useful, and `full_o` is a function of registered
    pointers only.
  - Consumed words stay in their slots until they are overwritten. A
    redirect whose target is still in the ring (any slot except the write
    slot) only moves the read pointer. A very short loop, or a forward skip
    of a word or two, then costs no cache access.
  - Any other redirect clears the ring.
- **Branch timing.** `jump_i` (an unconditional jump, resolved in decode)
  acts in the same cycle. `branch_i` (a taken conditional branch, resolved in
  execute) is registered and acts one cycle later. If both arrive in one
  cycle, the delayed branch wins, because it is the older instruction.

**The cost.** Sequential throughput with a 1-cycle cache is about 0.66
words per cycle, not 1, and each taken conditional branch costs one extra
cycle. There are three reasons:

- only one line request is outstanding at a time;
- there is a single L0 buffer;
- a request is raised only from registered state.

The testbench of the fetch stage measures this rate.

The fetch stage delivers aligned 32-bit words with their addresses.
Re-assembling compressed (16-bit) and misaligned instructions is left to the
core's decoder. The instruction memory is word-aligned.

## The private L1 and its prefetcher

`l1_icache` is a 4-state controller:

| State | Meaning |
|---|---|
| READY | Lookup; hits are answered here |
| MISS | Send the refill |
| REFILL | Wait for the refill line, forward it and write it |
| WUP | Wait for an unfinished prefetch |

It is built from these pieces:

- **Tag store (`scm_tag_array`) with two combinational read ports.** Port 0
  serves the core's lookup and port 1 the prefetcher's probe, so the two
  never wait for each other. The arrays are written as plain register
  arrays, in the style of a latch-based standard-cell memory. No SRAM macro
  is assumed.
- **Replacement.** The victim way comes from a free-running 8-bit LFSR,
  x⁸+x⁶+x⁵+x⁴+1. The replacement is purely pseudo-random: an invalid way is
  not preferred.
- **The single write port.** A refill always wins it. The prefetcher writes
  its buffered line only in a cycle when the refill does not write.

**`l1_prefetch_ctrl`** is a sequential next-line prefetcher. It fetches one
128-bit line (four instructions) ahead, and it always prefetches, not only
on a miss:

1. **Trigger and probe.** Every core fetch the L1 accepts is a trigger. In
   the next cycle the prefetcher probes line+16 on tag port 1. This is cache
   probe filtering: a line already cached is not fetched again.
2. **Request.** On a probe miss the prefetch request leaves in that same
   cycle, with transfer ID 1, but only if all of these hold:
   - prefetching is enabled for this core (a software switch, see *Control
     and counter registers*);
   - the prefetcher is idle;
   - the line is not the one the refill path is fetching.
3. **While busy.** Only one prefetch is in flight. Triggers that arrive
   meanwhile are ignored. The next trigger after completion re-aims the
   prefetcher, which is how it follows a branch.
4. **The keep rule.** The returned line waits in a one-line buffer. Before it
   is written, it is compared with the line of the most recent core fetch.
   It is kept only if it *is* that line or the line after it. Otherwise a
   branch has made it useless, and it is discarded so it cannot pollute the
   512 B cache.
5. **Wait for the unfinished prefetch (WUP).** A core miss on the line the
   prefetcher is fetching sends no refill. The L1 waits in the WUP state and
   answers the core from the prefetch response. If the interconnect drops
   that response (see below), the L1 falls back to a normal refill.

## Sharing one port: transfer IDs and the collision rule

Doubling the L1's interconnect ports would make the crossbar larger and
slower. So refill and prefetch share one port (`l1_ooo_arbiter`):

- **Requests.** The refill has priority. The request carries a one-bit
  transfer ID above the 32-bit address: `icache_pkg::l15_req_t`, where
  0 = refill and 1 = prefetch.
- **Responses.** The ID travels back with the line (`l15_rsp_t`), and the
  arbiter steers each response by it. A refill and a prefetch may be
  outstanding at the same time, in different banks, and may return in either
  order.

The interconnect can route only one response to a master per cycle. If two
banks answer the same master in the same cycle, `log_interconnect` delivers
the refill, discards the prefetch, and raises `mst_drop_o`. The prefetcher
treats that prefetch as finished. In the full-size test this happens only a
handful of times per run.

## The shared L1.5 bank: merging misses from eight cores

When all cores run the same loop, a line that misses in one L1 misses in the
others a few cycles later. `l15_bank` handles this as follows:

- **Non-blocking misses.** A miss allocates an entry in a 4-entry miss table,
  keyed by line address, and the bank keeps serving hits.
- **Merging.** A later miss to a line already in the table only sets a bit
  in that entry. There is one bit per (master, transfer ID), so a core's
  refill and prefetch of the same line are both answered.
- **Refill order.** Entries not yet sent go to the L2 arbiter in index order.
  Each entry's index is its tag.
- **When the line returns:**
  - it is written into a pseudo-random way;
  - the first waiting requester is answered in the next cycle, directly from
    the L2 data;
  - the other waiters are answered one per cycle, from a registered copy of
    the line.

  While it answers, the bank grants no new request, and it grants none in
  the cycle the line arrives. This keeps the bank single-ported with a single
  response register. The cost is a short stall after each refill.
- **Table full.** A miss is refused (no grant) and retried by the
  interconnect.

**Bank selection.** Consecutive 128-bit lines alternate between the banks:
address bit 4 selects the bank when there are 2 banks. The set index is
taken from the bits above the bank bits. The original description does not
fix this mapping. It suits the next-line prefetcher: a refill of line *n*
and a prefetch of line *n+1* go to different banks and can proceed in
parallel. The same property is what makes their responses able to collide.

**Interconnect (`log_interconnect`).** It has one round-robin arbiter
(`rr_arbiter`) per bank. Grant is combinational. With `RSP_BUF=1`, every
response is registered once, which is the second cycle of the L1.5's
2-cycle hit. `REQ_BUF=1` adds a one-entry register slice per master on the
request side. It is off by default: in this configuration the response
buffer alone is enough for timing. The mesh-of-trees network is written
behaviourally as arbiters plus a source-indexed response mux, and synthesis
builds the trees.

**Refill bus (`l2_refill_arbiter`).** It picks one bank per cycle,
round-robin. It sends the L2 the line address and the ID {bank, miss-table
entry}, which plays the role of an AXI ID. The returned ID steers the line
back. The L2 may answer out of order. Its response uses valid/ready, and
`l2_rready_o` is the addressed bank's readiness.

## Top-level interface (`hier_icache`)

| Port | Width | Meaning |
|---|---|---|
| `clk_i`, `rst_ni` | 1 | Clock; active-low asynchronous reset |
| `fetch_en_i`, `boot_addr_i` | 1, 32 | Start fetching at the boot address |
| `reg_req_i`, `reg_we_i`, `reg_addr_i`, `reg_wdata_i` | 1, 1, 4, 32 | Register access (always accepted) |
| `reg_rvalid_o`, `reg_rdata_o` | 1, 32 | Read data, one cycle after the request |
| `jump_i`, `jump_addr_i` | per core 1 + 32 | Jump from decode, acts at once |
| `branch_i`, `branch_addr_i` | per core 1 + 32 | Taken branch from execute, acts one cycle later |
| `instr_valid_o`, `instr_addr_o`, `instr_rdata_o`, `instr_ready_i` | per core | Instruction words to the decoder |
| `l2_req_o`, `l2_addr_o`, `l2_id_o`, `l2_gnt_i` | 1, 32, 3, 1 | Line refill request to L2 |
| `l2_rvalid_i`, `l2_rdata_i`, `l2_rid_i`, `l2_rready_o` | 1, 128, 3, 1 | Line from L2 |
| `ev_l1_hit_o`, `ev_l1_miss_o`, `ev_pf_issue_o`, `ev_pf_hit_o`, `ev_wup_o`, `ev_pf_drop_o`, `ev_pf_discard_o` | NB_CORES each | One-cycle event strobes for performance counters |
| `ev_l15_hit_o`, `ev_l15_miss_o`, `ev_l15_merge_o` | NB_BANKS each | One-cycle bank event strobes |

The event strobes mean:

- `ev_pf_hit_o`: a fetch served from the prefetch buffer.
- `ev_wup_o`: a miss that waited for a prefetch.
- `ev_pf_drop_o`: a prefetch response lost to a collision.
- `ev_pf_discard_o`: a prefetched line thrown away by the keep rule.

## Control and counter registers (`icache_ctrl_regs`)

Software can do two things with the cache:

- switch the prefetcher per core, to trade performance against energy for
  each application;
- read hardware event counters, from which miss rates are computed.

Both sit in one small register file on the top's `reg_*` port. A write
takes effect at the next edge. Read data comes one cycle after the request.

| Index | Name | Access | Contents |
|---|---|---|---|
| 0 | PF_EN | RW | Bit *c* enables the prefetcher of core *c*. Reset: all ones. |
| 1 | CTRL | RW | Bit 0: counting on (reset 1). Writing bit 1 = 1 clears all counters. |
| 2 | L1_HIT | R | L1 hits, including prefetch-buffer hits |
| 3 | L1_MISS | R | L1 misses |
| 4 | PF_ISSUE | R | Prefetch requests sent |
| 5 | PF_HIT | R | Fetches served from a prefetch buffer |
| 6 | PF_WUP | R | Misses that waited for an unfinished prefetch |
| 7 | PF_DROP | R | Prefetch responses lost to a collision |
| 8 | PF_DISCARD | R | Prefetched lines discarded by the keep rule |
| 9 | L15_HIT | R | L1.5 hits |
| 10 | L15_MISS | R | L1.5 misses |
| 11 | L15_MERGE | R | L1.5 misses merged into a pending refill |

About the counters:

- Each is 32 bits and wraps around.
- Each adds, per cycle, the number of cores (or banks) that raised the
  event, so it is the cluster-wide total.
- A clear wins over the events of its own cycle.
- Reads of unused indexes return 0, and writes to counters are ignored.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `NB_CORES` | 8 | |
| `L1_SIZE_B`, `L1_WAYS` | 512, 4 | 8 sets of 128-bit lines |
| `NB_BANKS` | 2 | Power of two |
| `L15_SIZE_B`, `L15_WAYS` | 2048, 4 | Per bank: 32 sets |
| `N_MSHR` | 4 | Miss-table entries per bank. This design's choice; the original gives no size. |
| `REQ_BUF`, `RSP_BUF` | 0, 1 | Interconnect pipeline buffers |
| `FIFO_DEPTH` | 4 | Ring FIFO words |

The line width (128 bits) and address width (32 bits) are fixed in
`rtl/icache_pkg.sv`.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_fetch_ring_fifo` | Against a reference model: full rule, order, ring hits on redirects, clearing |
| `tb_if_fetch_unit` | Every word and address after random jumps and branches; `fetch_req` unaffected by the response inputs; one-cycle branch delay; sequential rate |
| `tb_l1_icache` | 1- and 3-cycle latencies; prefetch issue, probe filtering and buffer hits; WUP; discard on branch; drop fallback; random traffic with line checks |
| `tb_l1_prefetch_ctrl` | Trigger timing, filtering, keep rule, write-port yield, drop |
| `tb_l1_ooo_arbiter` | Priority and ID steering under random traffic |
| `tb_log_interconnect` | Routing, round-robin fairness, response buffer timing, collision rule |
| `tb_log_interconnect_bufs` | The other buffer setting (request slice on, response buffer off): every granted request reaches its bank once, in order, a cycle later; responses pass in the same cycle |
| `tb_l15_bank` | 1-cycle hit; miss answered one cycle after the L2 line; merging into one L2 request; hits under a pending miss; table-full refusal; random traffic with exactly one answer per request |
| `tb_l2_refill_arbiter` | Round robin and out-of-order return by ID |
| `tb_icache_ctrl_regs` | Reset values, PF_EN, read timing, random events against a reference sum, stop/restart, clear under traffic, unused indexes |
| `tb_hier_icache` | End to end, see below |

`tb_hier_icache` runs the whole design at its default size. It connects
eight behavioural core models (`tb/core_fetch_model.sv`) and a behavioural
L2 (`tb/l2_mem_model.sv`), which answers 15 to 20 cycles after a request, in
any order.

**The loop tests.** It runs synthetic loop tests with bodies of 0.375, 0.75,
1.5, 3, 6 and 12 KiB. Each loop has:

- a short forward jump in the middle, resolved in decode;
- a conditional branch back at the end, resolved in execute.

Before each test the bench writes PF_EN through the register port and
reads it back. Prefetch is enabled on all cores for half of the tests and on
cores 0–3 only for the others.

**The checks.** It checks:

- every word each core consumes;
- the 1- and 3-cycle latencies, and that the cold first fetch takes the
  L2 round trip plus 4 cycles (19 with a 15-cycle L2);
- that every mechanism happened at least once. The mechanisms are: hit,
  miss, prefetch issue, prefetch-buffer hit, WUP, drop, discard, L1.5
  hit/miss/merge, ring hit, delayed branch, bank stall and L2 refill;
- that the ten hardware counters, read over the register port after
  counting is stopped, equal the bench's own event counts, and that a clear
  sets them all to 0.

The collision that drops a prefetch response depends on the L2 timing. If
the six tests produced none, the test repeats the 12 KiB loop, up to six
times. The run takes well under a second.

Typical results, in words delivered per cycle per core (the fetch stage
limits this to about 0.66 without misses):

| Loop body | Words/cycle/core | L1 miss rate | Prefetch |
|---|---|---|---|
| 0.375 KiB | 0.71 | 0.02 | All cores |
| 0.75 KiB | 0.55 | 0.38 | Cores 0–3 |
| 1.5 KiB | 0.59 | 0.17 | All cores |
| 3 KiB | 0.39 | 0.73 | Cores 0–3 |
| 6 KiB | 0.26 | 0.74 | All cores |
| 12 KiB | 0.24 | 0.87 | Cores 0–3 |

The shape matches what the design is for:

- Loops up to 4 KiB are held by the L1.5, so the L1 misses cost only a few
  cycles.
- Beyond 4 KiB every pass goes to L2.

The miss rates of neighbouring rows are not directly comparable, because the
prefetch setting alternates between rows. The 0.75 KiB loop runs with
prefetch on only half the cores, and it misses more often than the 1.5 KiB
loop with prefetch on all of them.

**Running a testbench** with plain Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal --top-module tb_hier_icache \
  -y rtl -y tb +libext+.sv -Irtl rtl/icache_pkg.sv tb/tb_pkg.sv tb/tb_hier_icache.sv
./obj_dir/Vtb_hier_icache
```

For another block, replace `tb_hier_icache` with its testbench name in both
places. `tb/tb_pkg.sv` defines the memory contents seen by all tests: word
at address *a* = *a*·0x9E3779B1 ⊕ 0x1234.

Verilator lint reports only these warnings:

- **Unused bits.** The low address bits of word addresses, and the bits a
  set-index function does not use.
- **One unused package constant.**
- **`SYNCASYNCNET` on `rst_ni`.** The reset is used asynchronously in the
  flops and synchronously in the `disable iff` of the assertions.

None of them is a circuit problem. Yosys synthesizes every module without
latches.

## Where this RTL departs from, or fills in, the original description

These points follow the original design:

- the organisation and sizes;
- the 1/3/19-cycle latencies;
- next-line always-prefetch with cache probe filtering and a software
  enable;
- the dual-read-port tag store;
- refill priority on the write port;
- waiting for an unfinished prefetch;
- the one-bit transfer ID and the drop-the-prefetch collision rule;
- merged non-blocking L1.5 misses;
- round-robin refill to L2;
- the ring FIFO rules and the one-cycle conditional-branch delay.

These are this implementation's own choices:

- **The keep rule.** The prefetched line is kept only if it equals the
  current fetch line or the current fetch line + 16 bytes. The original
  states the drop condition with an "or" that would always be true; the
  intended "neither … nor" is implemented.
- **Miss table.** 4 entries, one waiter bit per (master, ID). New requests
  are blocked while the bank answers the waiters of a returned line. A
  prefetch of a line the refill path is already fetching is not started.
- **One prefetch in flight.** Triggers that arrive meanwhile are dropped.
- **The fetch stage.** One line request is outstanding. A redirect waits
  for a stale response before it refetches. A delayed branch beats a
  same-cycle jump. A miss in the ring on a redirect clears it. Throughput is
  therefore below one word per cycle for sequential code, and a taken branch
  costs a refetch unless its target is still in the ring.
- **Replacement.** Purely pseudo-random (8-bit LFSR) in both levels, with no
  preference for invalid ways.
- **Interfaces.** The line-interleaved bank mapping, the event strobes, the
  reset behaviour (all control state and valid bits clear), and the L2 port
  are this design's. The L2 port is a simple request/grant plus valid/ready
  interface with IDs. It stands in for the AXI4 master of a real cluster.
- **Not included.** The cores, the L2 memory and the memory cells
  themselves. Their ports are brought out, and behavioural models stand in
  for them in the testbenches.
- **Baselines not built.** The comparison architectures of the original
  work (private-only, single-port shared, multi-port shared, and the
  variants without prefetch or without the new fetch stage) are not built.
  Writing 0 to PF_EN gives the two-level cache without prefetch.

## Files

| File | Contents |
|---|---|
| `rtl/icache_pkg.sv` | Widths, line/word types, transfer ID, request/response structs |
| `rtl/hier_icache.sv` | Top: per-core fetch unit and L1, interconnect, banks, L2 arbiter |
| `rtl/if_fetch_unit.sv`, `rtl/fetch_ring_fifo.sv` | Fetch stage |
| `rtl/l1_icache.sv`, `rtl/l1_prefetch_ctrl.sv`, `rtl/l1_ooo_arbiter.sv` | Private L1 |
| `rtl/scm_tag_array.sv`, `rtl/scm_data_array.sv` | Tag and data arrays |
| `rtl/log_interconnect.sv`, `rtl/rr_arbiter.sv` | L1-to-L1.5 interconnect |
| `rtl/l15_bank.sv` | Shared L1.5 bank |
| `rtl/l2_refill_arbiter.sv` | Refill bus to L2 |
| `rtl/icache_ctrl_regs.sv` | Prefetch enable register and event counters |
| `tb/tb_*.sv` | Testbenches, one per block plus the end-to-end test |
| `tb/core_fetch_model.sv`, `tb/l2_mem_model.sv`, `tb/tb_pkg.sv` | Behavioural core and L2, test memory contents |
