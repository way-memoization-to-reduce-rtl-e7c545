# Way-memoizing instruction cache (zero-link, 64-way CAM tags)

A highly associative instruction cache pays for its low miss rate with energy.
Every fetch searches the tags, and in a CAM-tag cache that means driving all 64
match lines of a sub-bank. Most of those searches are redundant, because the
cache has answered the same question before. The next line after a line, and
the target of a given branch, are nearly always in the same way as last time.

Way memoization stores the answer. Each cache line carries a **sequential
link**: the way that holds the next line. Each pair of instruction words
carries a **branch link**: the way that holds the target of the branch taken
from there. Unlike way *prediction*, every link has a **valid bit**, and a set
valid bit *guarantees* that the link is correct. A fetch that follows a valid
link reads one word directly and performs no tag check at all. Only when the
link is invalid does the cache fall back to a normal CAM search, and it then
records the result in the link for next time.

The difficulty is keeping the guarantee. When a line is evicted, every valid
link that points to it must be cleared. This design uses the **zero-link**
scheme for that, a cheap conservative rule (see "Invalidating links" below).

This repository holds synthesizable SystemVerilog for the cache in its main
configuration: 16 KB, 32-byte lines, 64-way set-associative with CAM tags,
8 sub-banks, FIFO replacement within each sub-bank, 32-bit MIPS instruction
words. It also holds a self-checking testbench for each block, and an
end-to-end testbench that runs the whole cache at full size.

## Organisation and address split

16 KB / 32 B = 512 lines. With 64 ways that gives 8 sets, and each of the 8
sub-banks holds one set. The set index therefore also selects the sub-bank.

| address bits | use |
|---|---|
| [1:0]  | byte in word (fetches are word aligned) |
| [4:2]  | word in line (0..7) |
| [7:5]  | set = sub-bank |
| [31:8] | 24-bit tag, held in the sub-bank's CAM |

A link holds only a way number, 6 bits for 64 ways, plus a valid bit. The set
and the word come from the fetch address itself, so a valid link names exactly
one word in the cache.

Per line the design stores:

```
 tag(24) | valid | seq link: valid + way(6) | overflow | word0 word1 | ... | word6 word7
                                                      \_ branch link _/     \_ branch link _/
                                                       valid + way(6)        (one per pair)
```

There is one branch link per *pair* of words, not per word. In MIPS code every
taken branch has a delay slot, and the link is looked up from the delay slot,
the instruction fetched just before the target. Branches are never
back-to-back, so no pair can contain two delay slots. One link per pair is
therefore enough.

## How a fetch is served

The processor presents each fetch with the kind of control flow that led to it:

| `req_kind`    | meaning | way comes from |
|---|---|---|
| `FK_SEQ`, word ≠ 0 | next word in the same line | the previous fetch's way (no search, no link) |
| `FK_SEQ`, word = 0 | next word crosses into the next line | the previous line's sequential link |
| `FK_BRANCH`   | fixed target of a taken branch or jump | the branch link of the previous fetch's word pair |
| `FK_INDIRECT` | indirect jump, restart | always a CAM search; no link is used or made |

The cache carries a one-fetch history: the previous fetch's sub-bank, its way,
its word pair, and the sequential and branch link read out with it. The
sequential link is re-read only when a fetch enters a new line.

Cycle 0 is the cycle in which the request is accepted. The cases then run as
follows:

* **Valid link (or intra-line).** The word is read in cycle 0 and appears on
  `rsp_instr` in cycle 1. No tag search is made.
* **Invalid link, hit.** The CAM search and the word read both happen in cycle 0,
  and the word appears in cycle 1. For `FK_BRANCH`, the overflow bit of the
  target line is set in cycle 0. In cycle 1 the missing link is written into
  the previous fetch's line, while the next fetch proceeds. A link write
  occupies its sub-bank. If the cycle-1 fetch falls in that same sub-bank,
  `req_ready` drops for exactly one cycle.
* **Invalid link, miss.** A victim line E is chosen by the sub-bank's FIFO
  pointer.
  * Cycle 0: the search misses.
  * Cycle 1: E's tag, valid bit and overflow bit are read out. The link from
    the previous fetch is written, already pointing to E's way, where the new
    line will go.
  * Cycle 2: the links that point to E are removed (next section), and the line
    is requested from memory.
  * The 8 words arrive, one per cycle, in order, and are written to the data
    array. With the last word the new tag is written into the CAM and the new
    line's links are reset. Its overflow bit is set if the link just made to it
    was a branch link.
  * The word appears one cycle after the last refill word. With the
    testbench's memory (first word 11 cycles after the request), a miss costs
    exactly 20 cycles more than a hit.

## Invalidating links (zero-link scheme)

When line E is evicted, two kinds of links may still point at its way:

* **The sequential link of line E-1.** Only one line can hold it: the line
  whose address is one less than E's. In cycle 2 the cache forms that address
  from E's tag and set and searches the CAM of sub-bank (set-1) mod 8. If it
  hits, that line's sequential link is cleared. This is exact.
* **Branch links.** Any word pair anywhere in the cache may hold one. Tracking
  them all would be expensive. Instead, each line has one **overflow bit**,
  which is set whenever a branch link to the line is created. If the evicted
  line's overflow bit is set, every branch-link valid bit in the whole cache
  is cleared in one cycle (a flash clear). The valid bits are flip-flops for
  this reason.

The result is conservative: useful links are sometimes lost, and a wrong link
is never followed. The cost is one extra bit per line. Richer schemes keep a
pointer to the first linking instruction ("one-link") or track every link
exactly; these would flash-clear less often but need more state. They are not
implemented.

Orderings that matter, and why they are safe:

* A link created during a miss (cycle 1) is written before the E-1 search and
  the flash clear (cycle 2). If the flash clear removes it, the only loss is
  the link itself.
* If the line holding the previous fetch is itself chosen as the victim, the
  link written into it in cycle 1 is wiped by the refill reset.
* The link history held in the cache's registers cannot go stale. Links are
  cleared only during a miss, and after a miss the history is replaced by the
  freshly filled line, whose links are all invalid.

## Interface of `wm_icache` (top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `req_valid` / `req_ready` | in / out | 1 | fetch handshake; taken when both are high |
| `req_addr` | in | 32 | word-aligned fetch address |
| `req_kind` | in | 2 | `wm_pkg::fetch_kind_e` (table above) |
| `rsp_valid` / `rsp_instr` | out | 1 / 32 | fetched word, valid for one cycle |
| `mem_req_valid` / `mem_req_addr` | out | 1 / 32 | one-cycle line read request, line-aligned address |
| `mem_rsp_valid` / `mem_rsp_data` | in | 1 / 32 | refill words 0..7 in order, one per valid cycle |
| `events` | out | 14 | `wm_pkg::wm_events_t`, one-cycle strobes for counting |

Rules for the processor:

* An `FK_SEQ` fetch must be the previous address + 4. An assertion checks this.
* An instruction that precedes an `FK_BRANCH` fetch must always branch to the
  same target. Use `FK_INDIRECT` for anything else.
* At most one instruction of an aligned word pair may precede an `FK_BRANCH`
  fetch. MIPS delay slots satisfy this.

A new request may be presented in the cycle in which `rsp_valid` is high. The
memory must send data only while a refill is in progress; an assertion checks
this too.

The `events` strobes are: intra-line fetch, sequential link followed, branch
link followed, tag search, hit, miss, sequential link written, branch link
written, overflow bit set, sub-bank stall, valid victim, sequential link of E-1
cleared, flash clear, and refill done. They let a system count tag searches per
fetch, the figure of merit of the technique.

## Blocks

| file | block |
|---|---|
| `rtl/wm_pkg.sv` | shared constants, `fetch_kind_e`, `wm_events_t` |
| `rtl/wm_icache.sv` | top: fetch controller, miss/invalidate sequencer, pending link write |
| `rtl/cam_tag_array.sv` | 8 sub-bank CAMs with one search, one write and one tag read-out port |
| `rtl/cam_tag_bank.sv` | one 64-entry CAM: one-cycle search and match encoding, write, read-out |
| `rtl/icache_data_array.sv` | 16 KB word array (4096 × 32), synchronous read, word-wide refill write |
| `rtl/link_array.sv` | sequential links, branch links, overflow bits; flash clear; way fields read out gated by their valid bits |
| `rtl/fifo_repl.sv` | per-sub-bank FIFO (round-robin) victim pointers |

Parameters (`NSETS` = 8, `NWAYS` = 64, `WORDS_PER_LINE` = 8) default to the
configuration above. They must be powers of two. Synthesis of the top gives
about 3.8 k flip-flops, most of them the link valid bits and the CAM valid
bits, plus about 155 kbit of memory arrays.

## What is this design's own choice

The link structure, the zero-link scheme, the flash clear, the FIFO policy,
the sub-bank stall and the cycle order of the three fetch cases follow the
published description of the technique. The following were left open there
and were chosen here:

* the fetch handshake, and the processor telling the cache the kind of flow;
* the branch link being the one of the previous fetch's pair;
* 32-bit addresses;
* word order and timing of a refill;
* reset of all valid and overflow bits, and of the FIFO pointers;
* setting a missed branch target's overflow bit when its line is written;
* leaving overflow bits set after a flash clear;
* a single search, write and read-out port on the tag store;
* the event outputs.

Not modelled:

* The circuit techniques that make the real arrays cheap: low-swing bitlines,
  segmented wordlines, and a CAM with separate search and write bitlines and
  reduced-swing match lines. The arrays here are plain logic and memories, so
  energy cannot be estimated from this RTL directly; use the event counts.
* The RAM-tag (4-way, two-cycle link write) variant, the phased cache and the
  way-predicting cache, which are comparison points.
* Any optimisation for indirect jumps.
* Proposed refinements not part of the scheme itself: storing link bits in
  unused fields of branch instructions, precomputing branch-target low bits,
  and superscalar fetch.
* The processor and the secondary memory. `tb/wm_mem_model.sv` is a
  behavioural stand-in for the memory.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
against a reference model in the testbench and prints
`TB_RESULT checks=N failures=M`:

* `tb_cam_tag_bank`, `tb_cam_tag_array`: random unique-tag writes; searches of
  present and absent tags; steering of one tag held in several sub-banks.
* `tb_icache_data_array`: full fill, then random reads (one-cycle latency,
  hold) mixed with writes.
* `tb_link_array`: random mixes of every update port, including
  simultaneous ones, and the flash clear, against a reference.
* `tb_fifo_repl`: independent per-sub-bank pointer sequences and wrap.
* `tb_wm_icache`: end to end at full default size, 400 000 fetches.
  * Stream: a synthetic MIPS-like fetch stream of loops, far branches from
    delay slots and indirect jumps, over a 64 KB program whose hot 6 KB region
    moves every 20 000 fetches.
  * Data: every returned word is checked against memory, so a wrong link shows
    up as a data error.
  * Timing: hits and links take 1 cycle and misses 21. A stall lasts one
    cycle. Link writes come one cycle after their search. The E-1 clear, the
    flash clear and the memory request come in miss cycle 2.
  * Mechanisms: every one of the 14 event types must occur.

  Stalls came on 8.5% of link writes. With 8 sub-banks, about one in eight
  is expected.

  In a typical run, 1.6% of fetches needed a tag search. Without links, the
  16.8% of fetches that are not intra-line would each have needed one.

`tb_wm_workloads` runs the full-size cache under three program profiles from
reset:

* a 4 KB loop kernel that fits in the cache;
* a 12 KB program;
* a 48 KB program whose 8 KB hot region moves.

It checks every word. For the kernel, which evicts nothing, it also checks that
no sequential or branch transition taken before ever needs a tag search again.
It reports these figures:

| profile | tag searches / fetch | not intra-line | misses | evictions that flash-clear |
|---|---|---|---|---|
| kernel 4 KB  | 0.21% | 19.8% | 120  | no evictions |
| medium 12 KB | 0.08% | 22.1% | 91   | no evictions |
| large 48 KB  | 1.67% | 17.7% | 1320 | 51% of 808 |

The flash-clear rate depends on how many lines are branch targets. The
synthetic programs branch far more densely into their hot code than real
programs do. They should not be read as a prediction for real code.

To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/wm_pkg.sv tb/wm_tb_pkg.sv tb/tb_wm_icache.sv --top-module tb_wm_icache
./obj_dir/Vtb_wm_icache
```

Replace `tb_wm_icache` with any other testbench name; only `tb_wm_icache` needs
`tb/wm_tb_pkg.sv`. The end-to-end run takes a few seconds. Verilator is
two-state: storage that is not reset starts random. The design only reads such
storage behind a valid bit.
