# A microprogrammed allocating-loader

This is the RTL of a hardware loader for a paged machine. It puts a program
segment into whatever main-memory pages happen to be free, and it never changes
a word of the program. Every segment is assembled as if it started at address 0.
The loader does not relocate the code. It records, in a small associative memory,
which physical pages hold the segment and in what order. The processor then
turns each segment-relative address into a physical one while it runs
("dynamic addressing").

A 10-word microprogram does the whole job in two parts:

1. **Allocation.** The free pages form a linked list, the *available segment*.
   The loader takes as many pages off the front of that list as the new segment
   needs. It relabels them as belonging to the new segment.
2. **Loading.** It copies the segment's words from the memory bus, one word per
   main-memory cycle, into those pages. It follows the page links, and it checks
   that every page it enters belongs to the segment being loaded.

The design follows the original report, "A Microprogrammed Allocating-loader"
by Yaohan Chu. Its configuration, register set, word formats, control-word
format and microprogram come from that report. Where the report is incomplete or
inconsistent, the choices made here are listed in
[Departures and design choices](#departures-and-design-choices).

## Memories and addresses

| | size | address |
|---|---|---|
| main memory M | 256 pages × 128 words × 48 bits (32,768 words) | 15 bits = page PA (8) + line LA (7) |
| associative memory AM | 512 words × 32 bits | searched by content |
| control memory CM | 256 words × 32 bits (10 used) | H (8 bits) |

### The page-map word

Each associative-memory word describes one main-memory page:

| bits (MSB first) | field | meaning |
|---|---|---|
| 31:24 | X | where the page is in main memory |
| 23:16 | Y | the next page of the same segment, or `*` (255) on its last page |
| 15:8  | Z | the page's order in its segment (0, 1, 2, ...) |
| 7:3   | SN | segment number (up to 32 segments) |
| 2:0   | S | status |

Status codes: `000` loaded, `001` released, `010` reserved, `011` permanently
loaded, `100` available for loading, `101` shared, `110` segment-number register,
`111` unused. Code `111` is this design's own: reset gives it to every word so
that no stale word can match.

A word with status `110` is not a page. It is a *segment-number register*: its X
holds the segment's first page, and its Y and Z are free for a return address.
The loader never touches these words; the supervisor keeps them.

A search compares the argument register A with every word, in the bit positions
where mask register K is 1. The page words are unique, so at most one word
matches. The matching word can be read into buffer register D (*match-read*), or
replaced by D (*match-write*).

Example after allocating a 600-word segment (5 pages) as segment 3. Before
allocation, all eight pages 56-34-103-6-89-201-153-55 were available segment 9:

| X | Y | Z | SN | S |
|---|---|---|---|---|
| 56 | 34 | 0 | 3 | 000 |
| 34 | 103 | 1 | 3 | 000 |
| 103 | 6 | 2 | 3 | 000 |
| 6 | 89 | 3 | 3 | 000 |
| 89 | * | 4 | 3 | 000 |
| 201 | 153 | – | 9 | 100 |
| 153 | 55 | – | 9 | 100 |
| 55 | * | – | 9 | 100 |

At the end, FPA = 201 (the new head of the free list) and PC = 4.

## The two parts of the algorithm

**Set-up (word 0).** The supervisor has written FPA (first free page), NSN (new
segment number) and NSPN (number of pages needed). Word 0 does the following:

- sets the argument to A = FPA-0-0-9-4, meaning "page FPA of segment 9, available";
- sets the mask to K = 255-0-0-31-7, so that X, SN and S are compared;
- clears the page counter PC;
- sets NI = {FPA, 0};
- copies NSN into CSN.

Segment number 9 is fixed for the available segment.

**Allocation loop (words 1-4).** Each pass handles one page:

1. NSPN counts down.
2. A match-read fetches the word of free page A(X) into D.
3. FPA takes D(Y), the next free page.
4. D gets Z = PC, SN = NSN and S = loaded. D(Y) is kept, so the page stays linked to the next one.
5. While NSPN is not zero, D is match-written back, PC counts up, A(X) takes the new FPA, and the loop repeats.
6. On the last page, D(Y) is set to `*` before the match-write.

The match-write finds the old word because A still holds the old X, SN = 9 and
S = available.

**Loading loop (words 5-9).** The argument is switched to "page A(X), status
loaded", comparing only X and S. Then, for every word:

- If NI(LA) is not 127, only the line address counts up.
- If NI(LA) is 127, the word of the current page NI(PA) is match-read. Then:
  - if its SN differs from CSN, the loader stops with a *protection interrupt*;
  - if its Y is `*`, the segment is complete and the loader stops at *return*;
  - otherwise NI(PA) takes D(Y), and the line address wraps to 0.
- A main-memory cycle then copies NI to AR, takes the word from MBUS into B,
  and writes it to M(AR).

The loop counts the line address up before it stores a word. As a result, the
first word on the bus lands at **line 1** of the first page, and line 0 of that
page is not written. The loop stops after line 127 of the last page, so it
stores 127 + 128·(pages−1) words whatever the segment's true length. The source
must keep supplying words until `done`. The 600-word example takes 639 words
from the bus.

## The microprogram and its timing

One rising clock edge ends one **clock phase**:

- three phases P(0), P(1), P(2) make one control-memory cycle;
- three control-memory cycles make one main-memory cycle (9 clocks).

| phase | what happens |
|---|---|
| P(0) | F ← CM(H) if F(8) = 1; an associative-memory operation requested in the previous P(2) is performed; main-memory ring steps: AR ← NI (MC(0)), B ← MBUS (MC(1)), M(AR) ← B (MC(2)) |
| P(1) | register transfers of the control word; the four tests write status register STA |
| P(2) | MR / MW requests; start of a main-memory cycle (F(30)); DO ADDRESS; MC ring shifts |

Control-word bits (F(0) is the most significant bit; `loader_pkg::cword_t`):

| bit | operation | bit | operation |
|---|---|---|---|
| 0-7 | branch address | 19 | test NI(LA)=127 → STA(0); if equal A(X) ← NI(PA) |
| 8 | fetch next word | 20 | D(Z,SN,S) ← PC-NSN-0 |
| 9 | DO ADDRESS | 21 | D(Y) ← * |
| 10-11 | 01 A ← FPA-0-0-9-4, 10 A(X) ← FPA, 11 A(S) ← 0 | 22 | test D(Y)=* → STA(1); if not, NI(PA) ← D(Y) |
| 12 | A(X) ← NI(PA) | 23 | test D(SN)≠CSN → STA(2) |
| 13 | K ← 255-0-0-31-7 | 24 | NSPN ← NSPN−1 |
| 14 | K ← 255-0-0-0-7 | 25 | test NSPN=0 → STA(3) |
| 15, 16 | PC ← 0, PC ← PC+1 | 26, 27 | FPA ← D(Y), CSN ← NSN |
| 17-18 | 01 NI ← FPA-0, 10 NI(LA)+1, 11 NI(PA) ← D(Y) | 28, 29 | MR ← 1, MW ← 1 |
| | | 30, 31 | MC ← 100 (start memory cycle), MR ← 1 if STA(0)=0 |

The program (`loader_pkg::ucode`):

| H | operations | next |
|---|---|---|
| 0 | A ← FPA-0-0-9-4, K ← 255-0-0-31-7, PC ← 0, NI ← FPA-0, CSN ← NSN | 1 |
| 1 | A(X) ← FPA, NSPN−1, MR | 2 |
| 2 | FPA ← D(Y), D(Z,SN,S) ← PC-NSN-0, test NSPN=0 | 3, or 4 if zero |
| 3 | MW, PC+1 | 1 |
| 4 | D(Y) ← *, MW | 5 |
| 5 | A(S) ← 0, K ← 255-0-0-0-7 | 6 |
| 6 | test NI(LA)=127 (and A(X) ← NI(PA)); MR if equal | 7, or 9 if not 127 |
| 7 | test D(SN)=CSN | 8, or 254 (interrupt) |
| 8 | test D(Y)=*, NI(PA) ← D(Y) | 9, or 255 (return) |
| 9 | NI(LA)+1, start main-memory cycle | 6 |

**Branching.** DO ADDRESS counts H up when STA is all zero. Otherwise it jumps
to F(0-7) and clears STA. A word that contains no test always jumps to F(0-7).
Word 9 needs this rule to get back to word 6.

**Stopping.** All other control words are zero. When the sequencer fetches one,
F(8) is 0, so nothing more is fetched and `halted` goes high. `h` then reads 255
(`done`) or 254 (`prot_int`).

**The main-memory ring MC.** MC moves 100 → 010 → 001 → 000, one step at each
P(2). Word 9 starts it. When the page changes, the loop runs 9-6-7-8. Those
three words span exactly one memory cycle, so the memory cycle for line 127
overlaps them.

Inside a page the loop runs only 9-6, which is two control-memory cycles. That
is shorter than a memory cycle. So when word 9 finds the previous memory cycle
still in its first two thirds, it **waits** one control-memory cycle. During the
wait, its P(1) and P(2) operations are suppressed and it is not replaced at the
next P(0). Every word therefore gets a full, uninterrupted memory cycle.

Resulting rates:

| activity | rate |
|---|---|
| loading within a page | one word per 9 clocks |
| loading, first word of a new page | 12 clocks |
| allocation | 9 clocks per page (words 1-3) |

## Execution-time addressing

`dynamic_address_unit` serves the running program. It has the associative
memory to itself whenever the loader is stopped. It answers one clock after a
request.

- **Next instruction** (`xl_operand`=0). NI counts up inside a page. From line
  127, the current page's word gives the next page {D(Y), 0}. The result also
  flags a page of another segment (`xl_protect`) and the end of the segment
  (`xl_seg_end`).
- **Operand or branch target** (`xl_operand`=1). A segment-relative address
  keeps its line part. Its page part is looked up as page order Z of the current
  segment, and the physical page is D(X). `xl_miss` marks an address beyond the
  segment.

Index arithmetic and indirection belong to the processor. It forms the relative
address before it makes the request.

## Top-level interface (`allocating_loader`)

| group | ports |
|---|---|
| clock, reset | `clk` (one edge per phase), `rst` (synchronous, active high) |
| supervisor | `sup_we`, `sup_fpa[7:0]`, `sup_nsn[4:0]`, `sup_nspn[4:0]`, `start`; status `halted`, `done`, `prot_int`, `h`, `fpa`, `pc`, `ni`, `csn`, `nspn`, `mc`, `waiting`, `am_multi` |
| memory bus | `mbus[47:0]` (next word, held until taken), `mbus_take` (the word is taken at this edge) |
| page-map access | `am_host_we`, `am_host_idx`, `am_host_wdata`, `am_host_rdata` |
| main-memory read | `mm_raddr[14:0]`, `mm_rdata[47:0]` |
| address unit | `xl_req`, `xl_operand`, `xl_addr`, `xl_csn` → `xl_valid`, `xl_addr_out`, `xl_protect`, `xl_seg_end`, `xl_miss` |

A load proceeds as follows:

1. After reset, write the page map through the host port.
2. Pulse `sup_we` with FPA, NSN and NSPN.
3. Pulse `start`.
4. Present words on `mbus`, advancing after each `mbus_take`.
5. Wait for `halted`.

The last memory cycle ends up to 9 clocks after `halted` rises.

The supervisor's own bookkeeping is outside this design. That covers checking
that the segment fits, updating the segment-number registers (for example, the
free list's head from `fpa`), saving return addresses, and releasing a segment by
linking its pages back into the free list.

## Departures and design choices

- **Associative-memory size 512.** The report gives both 256 and 512 words. 256
  page words plus up to 32 segment-number registers do not fit in 256, so the
  design uses 512 (parameter `AM_WORDS`).
- **Control word 32 bits.** The report declares a 30-bit control memory but uses
  bit F(31). This design uses 32 bits. F(30) is its own assignment for "start a
  main-memory cycle"; the report has that operation in word 9 but gives it no bit.
- **F(14)** is taken as K ← 255-0-0-0-7, the loading mask.
- **The end mark `*` is page address 255.** Page 255 can therefore begin a
  segment but never follow another page.
- **Associative-memory phase.** The operation requested by MR/MW is performed in
  the following P(0), not in P(1), so that the next word's P(1) transfers see
  the new D.
- **Words 2-5 reconstructed.** These words of the microprogram are rebuilt from
  the report's sequence chart and statements. The branch rule for test-free
  words, the exit addresses 254/255, the `start` input, the supervisor load port
  and the host port are also additions.
- **Wait for the memory cycle.** The one-cycle wait in word 9 is this design's;
  the report does not say how its two-cycle inner loop meets a three-cycle
  memory cycle.
- **Line 0 of the first page** is left unwritten, exactly as the report's
  sequence does; see the loading loop above.
- **Address unit.** The operand lookup also matches the segment number and
  "loaded" status, because page orders repeat across segments. The interface of
  `dynamic_address_unit` is this design's. It finds only pages whose status is
  000 ("loaded"), the same status the loader gives them; pages marked
  permanently loaded (011) or shared (101) are reported as a miss.
- **Associative-memory speed.** The report's associative memory needs a quarter
  of a main-memory cycle per operation. Here a search is combinational and a
  match-write takes one clock, a ninth of the nine-clock memory cycle. The
  microprogram never relies on this margin: it issues at most one operation per
  control word.

## Files

| file | contents |
|---|---|
| `rtl/loader_pkg.sv` | widths, word and control-word types, status codes, the microprogram function |
| `rtl/allocating_loader.sv` | top level |
| `rtl/micro_control.sv` | phases, H, F, STA, DO ADDRESS, MC ring, wait |
| `rtl/loader_datapath.sv` | AR, B, NI, CSN, FPA, PC, NSN, NSPN, A, K, D, MR, MW |
| `rtl/control_memory.sv` | 256 × 32 control memory |
| `rtl/assoc_memory.sv` | 512 × 32 maskable associative memory |
| `rtl/main_memory.sv` | 32,768 × 48 main memory |
| `rtl/dynamic_address_unit.sv` | execution-time address mapping |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example, to run the
end-to-end test at full size (it finishes in well under a second):

```
verilator --binary --timing --assert -j 4 rtl/loader_pkg.sv \
    $(ls rtl/*.sv | grep -v loader_pkg) \
    tb/allocating_loader_tb.sv --top-module allocating_loader_tb -o sim
./obj_dir/sim
```

Other testbenches run the same way: swap the testbench file and the top-module
name. The package has to come first and only once.

What the testbenches cover:

- `allocating_loader_tb` runs the 600-word example above at the default sizes.
  It checks:
  - the page map after allocation, FPA and PC;
  - all 639 stored words at the addresses the page links give;
  - the 9- and 12-clock rates;
  - the address unit on the loaded segment.

  It then loads a second segment while relabelling one of its pages to another
  segment, and expects the protection interrupt. It counts every mechanism
  (allocation step, end mark, page crossing, memory-cycle wait, return,
  interrupt, each address-unit outcome) and fails if one never happens.
- `loader_full_memory_tb` links pages 0-254 into one free list in random order.
  It then loads segments of 10 to 31 pages, one after another, until the list is
  empty. After each load it checks the page map and every stored word against
  its own model.
- `micro_control_tb` runs a synthetic control program and checks H, MC and the
  wait cycle by cycle.
- `loader_datapath_tb` plays the sequencer and the associative memory, and checks
  each micro-operation.
- `control_memory_tb` checks all 256 control words against bit lists.
- `assoc_memory_tb` checks masked searches, match-write, a missed write and
  multiple matches.
- `main_memory_tb` checks writes and reads at full size.
- `dynamic_address_unit_tb` checks both mapping operations against a small
  four-segment map.
