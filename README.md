# Banked TLB with sequential prefetch, for fast context switches

A conventional TLB either flushes all its entries on every context switch,
which means a flood of misses when the task resumes, or stores an
address-space identifier (ASID) in every entry, which costs tag bits in each
of them. This design splits the TLB into **banks**, one per address space.
Each bank has a single tag register that holds the ASID, so the per-entry tags
carry only the virtual page number. A context switch does not flush anything.
It only clears the "current" mark of the running task's bank. When a task comes
back, it finds its bank again by ASID, and its translations are still there.

A small **prefetch buffer** sits beside the banks. It is searched in parallel
with them and filled by sequential prefetching around the last missed page. It
removes many compulsory misses, such as the first touches of neighbouring pages.

Default organisation (all parameters of `tlb_ctrl_top`):

| what | value |
|---|---|
| banks × entries | 32 × 32 = 1024 translations |
| address | 32-bit virtual and physical, 32-KB pages: VPN = VA[31:15], PPN 17 bits, offset VA[14:0] |
| ASID | 5 bits (so up to 32 address spaces, one per bank) |
| prefetch buffer | 18 entries, window −8 … +9 pages around a miss |
| replacement | 1-bit LRU, for entries within a bank and for banks |
| interface | eight 4-phase request/acknowledge channels, sampled on `clk` |

The design was first conceived as an asynchronous (clockless) circuit. This
RTL keeps its structure, its channels and its algorithm. It runs them from a
single clock, so it can be used and verified in an ordinary synchronous flow.

## Structure

```
             VA_data[31:15] (VPN)
                 │
     ┌───────────┼─────────────────────────────┐
     ▼           ▼                             ▼
 tlb_memory ─────────────────────────    prefetch_buffer (18)
  ├ bank_tag_array: 32 × {ASID, current, valid, lru}      ▲ write
  └ 32 × tlb_bank: 32 × {valid, lru, VPN, PPN}            │
     │ hit = OR(current[b] & bank_hit[b])   │ hit    prefetch_ctrl ── PFE / PTE channels
     ▼                                      ▼
                 pa_gen  →  PA = {PPN, VA[14:0]}
                    │
              control_unit ── VA, TLB_hit, PA, ASID, PTE, CMW, clr_TLB channels
```

| file | role |
|---|---|
| `rtl/tlb_pkg.sv` | sizes; entry, bank-tag and command records |
| `rtl/tlb_bank.sv` | one bank: 32-entry CAM with 1-bit LRU and four commands |
| `rtl/bank_tag_array.sv` | the 32 bank tags: ASID search, current bank, victim bank |
| `rtl/tlb_memory.sv` | the banks plus their tags; picks the current bank's hit |
| `rtl/prefetch_buffer.sv` | the 18-entry fully associative prefetch buffer |
| `rtl/prefetch_ctrl.sv` | sequential-prefetch generator and the PFE/PTE handshakes |
| `rtl/pa_gen.sv` | physical-address generator |
| `rtl/control_unit.sv` | the controller algorithm and the environment channels |
| `rtl/hs_push.sv`, `rtl/hs_pull.sv` | active and passive ends of one 4-phase channel |
| `rtl/tlb_ctrl_top.sv` | top level |

## How a virtual address is translated

The VPN goes to all 32 banks at once. Each bank reports its own hit. The
translation used comes from the bank whose tag has the **current** bit set and
which hits. At most one bank is current. The control unit then takes one of
four paths.

1. **No bank is current.** This happens after reset and after every context
   switch. The TLB cannot translate yet, because it does not know which bank
   belongs to the running task. It reports `TLB_hit = 0`. At the same time it
   takes the task's ASID from the ASID channel, and searches the bank tags for it:
   * ASID found in a valid tag: that bank becomes current, with all its old
     translations.
   * ASID not found: a victim bank is chosen. This is the first bank with an
     invalid tag, otherwise the first with LRU bit 0. Its 32 entries and LRU
     bits are cleared, and its tag becomes {ASID, current=1, valid=1, lru=1}.

   The walker then supplies the PTE for the address on the PTE channel. The
   TLB stores it in the current bank (unless the bank already holds that
   page), sends the PA and starts a new prefetch window at this page.
2. **Current bank hits.** The TLB sends `TLB_hit = 1` and the PA concurrently.
   The hit entry's LRU bit is set.
3. **Current bank misses, prefetch buffer hits.** The entry moves from the
   buffer into the current bank. The TLB sends `TLB_hit = 1` and the PA. The
   slot this frees is refilled later by the prefetcher.
4. **Miss everywhere.** The TLB sends `TLB_hit = 0`, takes the PTE from the PTE
   channel, stores it in the current bank and sends the PA. It then flushes
   the prefetch buffer and starts a new prefetch window at this page.

`VA_ack` rises only when the whole translation is over. The processor must
therefore hold `VA_data` until then, as the bundled-data rule requires. Every
VA handshake produces exactly one TLB_hit message and one PA message.

Two other requests are served between translations. The priority when
several are pending is clear-TLB, then context switch, then VA.

* **Context switch** (`CMW_data = 1`): all current bits are cleared and the
  prefetch buffer is flushed. Nothing else changes. `CMW_data = 0` is
  acknowledged and ignored.
* **Clear TLB** (`clr_TLB_data`): an OS sends this when mappings change, for
  example after pages are swapped out or frames are released. Data `1` clears
  every entry of every bank; data `0` clears only the current bank. Both
  flush the prefetch buffer. Bank tags are kept, so the current task keeps its
  (now empty) bank.

## Replacement: 1-bit LRU

Entries within a bank use one LRU bit each:

* all bits start cleared;
* a hit or a fill sets the entry's bit;
* the victim is the first invalid entry, otherwise the first entry whose bit is 0;
* if every bit is set when a replacement is needed, all bits are cleared and
  entry 0 is replaced.

Banks use the same rule on their tag's LRU bit. The bit is set when the bank
is selected or given out. With 32 banks and a 5-bit ASID, every ASID can have
its own bank, so a valid bank is reused only if `NUM_BANKS` is set below 32
(see `tb_tlb_bank_reuse`).

## Sequential prefetch

After a miss in both the bank and the buffer at page V, `prefetch_ctrl` starts
a window. It fetches V+1 … V+9, then V−1 … V−8 (17 pages). V itself went into
the bank. The 18th buffer slot, and every slot freed later by a
prefetch-buffer hit, gets the next page upward: V+10, V+11, and so on. So a
task that sweeps forward through memory keeps finding its next page in the
buffer.

Each fetch is one handshake on the PFE channel (`PFE_data = 1`, with the
wanted page on `PFE_vpn`), followed by the walker's answer on the PTE channel.
Prefetching runs only while no request is waiting. A fetch that has started
is finished before the next request is served. A context switch or a clear-TLB
ends the window.

## Interface

All channels are 4-phase, bundled-data handshakes:

1. the sender raises `req` with `data` valid;
2. the receiver raises `ack`;
3. `req` falls;
4. `ack` falls.

`data` must stay stable from `req` rising until `ack` rises. All inputs are
sampled on the rising edge of `clk`, so they must be synchronous to it or
synchronised first. `rst_n` is a synchronous, active-low reset.

| channel | dir. | data | meaning |
|---|---|---|---|
| `VA` | in | 32 | virtual address; acknowledged at the end of the translation |
| `PTE` | in | 32 | page-table entry: frame number in bits [31:15], bits [14:0] ignored |
| `clr_TLB` | in | 1 | `1`: clear all banks; `0`: clear the current bank |
| `ASID` | in | 5 | ASID of the running task |
| `CMW` | in | 1 | `1`: context switch |
| `PA` | out | 32 | physical address `{PPN, VA[14:0]}` |
| `PFE` | out | 1 + 17 | `1`: please send a PTE; `PFE_vpn`: for this page |
| `TLB_hit` | out | 1 | `1` hit, `0` miss |

What the environment must do:

* **ASID.** Offer one ASID after reset and after each context switch. The TLB
  takes it with the first VA that follows. Before that, the request simply
  waits.
* **Demand PTE.** After `TLB_hit = 0`, send the PTE of the VA being
  translated on the PTE channel.
* **Prefetch PTE.** After each PFE handshake, send the PTE of `PFE_vpn` on the
  PTE channel.

Demand and prefetch PTEs never overlap: the TLB asks for only one at a time.

**Latency.** Take a bank hit with acknowledgements that come at once. The
control unit sees `VA_req` on one edge and evaluates the lookup on the next.
`TLB_hit_req` and `PA_req` rise after that second edge. Each handshake then
takes about two edges, and `VA_ack` follows about three edges after the last
acknowledgement. A miss adds the PTE handshake and two more cycles. A VA that
arrives while a prefetch PTE fetch is in flight waits for that fetch to
finish, so its hit can come several cycles later.

## Where this RTL departs from the original design, and why

* **Clocked, not asynchronous.** The original is a clockless circuit built from
  handshake components. Here the same channels and algorithm run as clocked
  state machines. Handshake library cells (C-element-style latches, S-element,
  sequence and concurrency components) are not used.
* **Page size.** The entry layout (17-bit tag and PPN) implies 32-KB pages, and
  that is what is built. Other page sizes need `VPN_W`/`PPN_W` in `tlb_pkg`
  changed.
* **`PFE_vpn`.** The original PFE channel carries one bit and does not say which
  page to fetch. The 17-bit page number is added so that a walker can answer.
* **PA after a miss.** The original algorithm reports the miss and fetches the
  PTE, but shows no PA message. Here the PA follows once the PTE is stored, so
  every VA transaction ends the same way.
* **Clear-TLB.** Clear-TLB clears entries, not bank tags. The original text
  also mentions clearing the bank tags' valid bits on an ASID-less processor.
  The entry-clearing reading was kept; `bank_tag_array` has a `clr_all` input
  for the other one.
* **Bank lookup by ASID.** The bank is found by searching the tags for the
  ASID, associatively. The 5-bit ASID could instead index the 32 banks
  directly. The search keeps the LRU victim mechanism meaningful when there
  are fewer banks than ASIDs.
* **One TLB, not an ITLB/DTLB pair.** The architecture lets an instruction TLB
  and a data TLB share one set of bank tags. The controller here has one VA
  channel and one set of banks.
* **Memory.** Banks, tags and the prefetch buffer are flip-flop arrays with
  parallel compare. A product would use CAM macros.
* **Choices the original leaves open.** The following are this design's own:
  * the PTE bit layout;
  * taking invalid entries first, and the lowest index;
  * the order of the prefetch window and its continuation past +9;
  * flushing the buffer when a new window starts;
  * the priority between channels;
  * the reset.

Distance prefetching (a stride-table alternative) is not built; sequential
prefetching was the recommended choice.

## Size

At the default parameters, a coarse synthesis gives:

* about 38,000 storage bits, of which 36,864 are TLB entries (1024 × 36);
* 256 bank-tag bits;
* 1,120 prefetch-buffer bits;
* about 24,000 word-level cells, most of them the 1,024 parallel 17-bit
  comparators and their multiplexers.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench | what it checks |
|---|---|
| `tb/tb_tlb_bank.sv` | one bank against a reference model of the LRU rule (random) |
| `tb/tb_bank_tag_array.sv` | bank tags against a reference model, 8 banks so that valid banks get reused |
| `tb/tb_tlb_memory.sv` | per-ASID banks, keeping pages across switches, clearing, and filling all 1024 entries at full size |
| `tb/tb_prefetch_buffer.sv` | fill, full, take, reuse, flush |
| `tb/tb_prefetch_ctrl.sv` | window order, PFE/PTE handshakes, `allow`, `stop` |
| `tb/tb_pa_gen.sv` | source priority and address assembly |
| `tb/tb_control_unit.sv` | each path of the algorithm: messages sent and operations issued |
| `tb/tb_tlb_ctrl_top.sv` | whole design at its default sizes: PAs against a page-table model, pages kept across context switches, clears, all 32 ASIDs, and a count of each mechanism |
| `tb/tb_tlb_multitask.sv` | 8 tasks round robin at default sizes. With 24-page working sets, every access after the first round hits, except the obligatory first one per time slice. A 64-page sweep shows the prefetch buffer at work. |
| `tb/tb_tlb_bank_reuse.sv` | 4 banks, 5 tasks: which bank is reused and which task keeps its pages |

`tb/tlb_env.sv` is the shared environment model: processor, OS and
page-table walker.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tlb_pkg.sv tb/tb_tlb_ctrl_top.sv --top-module tb_tlb_ctrl_top
./obj_dir/Vtb_tlb_ctrl_top
```

Each of these runs in well under a second of simulated work. The multitask
workload prints its miss rate. The synthetic streams stand in for the
multiprogrammed benchmark traces this organisation was evaluated with (one
context switch per million instructions), which are not included.
