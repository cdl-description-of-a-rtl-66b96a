# A page-organised memory buffer in front of a slow main memory

A CPU that runs at 80 ns per cycle cannot wait a full microsecond for every
word from a core main memory. This design puts a small, fast buffer memory
(1,024 words) between the two, in the manner of the buffer ("cache") of the
IBM System/360 Model 85. The buffer holds 16 pages of main memory. It is filled
one four-word block at a time, only when a block is first referenced. The pages
present are tracked by three small register arrays, kept in order of use, so
the least recently used page is the one that gets replaced. The CPU sees one
port: it presents an address, a read/write command and a data word, and waits
for `done`.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The two memories
are plain register arrays.

## Address formats

Words are 128 bits wide in both memories. A block is 4 words, and a page is 16
blocks.

| field         | main memory (16 bits) | buffer memory (10 bits) |
|---------------|-----------------------|-------------------------|
| page address  | `[15:6]`, 10 bits     | `[9:6]`, 4 bits         |
| block address | `[5:2]`, 4 bits       | `[5:2]`, 4 bits         |
| word address  | `[1:0]`, 2 bits       | `[1:0]`, 2 bits         |

Main memory has 1,024 pages (64K words). Page 0 is never used. That is how an
empty entry of the page table is marked: a page address of 0 never matches. The
buffer has 16 pages (1,024 words). A main-memory page can sit in any buffer
page, so the buffer is fully associative at page granularity. Within a page,
block *b* of the main-memory page always goes to block *b* of the buffer page.

## The activity list: P, Q and V

This is the part that takes the most care to follow. There are 16 entries, and
each has three registers (`activity_list.sv`):

- **P(i)** is the 10-bit main-memory page address of a page in the buffer.
- **Q(i)** is the 4-bit buffer page where that page is stored.
- **V(i)** holds 16 valid bits, one per block of that page.

The entries are kept in order of use, not by buffer page. Entry 0 is the top of
the list, the most recently referenced page. Entry 15 is the bottom, the next
to be replaced. P, Q and V always move together, so entry *i* describes one
page completely. The Q entries always form a permutation of 0..15: every buffer
page is owned by exactly one entry.

Every reference compares the page address with all 16 P registers at once
(`page_match.sv`). Each compare is a 10-bit equality (AND of XNORs). The result
goes into the 16-bit match register **M**, which has at most one bit set. The
list then moves in one of two ways, each done in a single clock:

- **Page miss (INSERT).** P shifts down one entry. The new page address enters
  P(0), and the bottom address falls out. Q rotates: Q(0) takes Q(15). The
  buffer page freed by the dropped entry therefore becomes the new page's home.
  V shifts down with zeros entering V(0), so no block of the new page is valid
  yet.
- **Page hit (UPDATE).** If M(k) = 1, entries 0..k rotate by one position.
  Entry k goes to the top, and entries 0..k-1 each move down one. Entries below
  k do not move. In hardware each entry *i* ≥ 1 has a shift enable, the OR of
  M(i..15). Entry 0 takes the matched entry through an AND-OR select driven by
  M.

Example, with the list showing pages 120, 105, 89, 1001 and the rest. A hit on
page 89 (k = 2) gives 89, 120, 105, 1001 and so on, with Q and V travelling
with their pages. A miss on page 7 gives 7, 120, 105, 89, ... The page that was
at entry 15 is gone, and its Q value is now in entry 0.

A page that goes unreferenced drifts toward the bottom and is eventually
displaced. This is exact LRU replacement over the 16 pages.

The encoder **N** (`match_encoder.sv`) turns M into the 4-bit position of the
matched entry. The sequence itself does not need N, because it reads the buffer
page from Q(0) after the list has moved. N is brought out of the top as the
status output `match_pos`.

## The access sequence

`buffer_access_ctrl.sv` is a state machine. It holds the CPU-side registers S
(address), DATA, RW and B (busy), the counter C, the match register M, and the
memory registers MAR/MBR (main) and BAR/BBR (buffer).

**Read.**

1. `MAR <- S`, then `M <- P match S(PA)`.
2. If M = 0, INSERT S(PA). Otherwise, UPDATE.
3. Form `BAR <- Q(0) & S(BA) & S(WA)` and test V(0, S(BA)).
4. If the block is valid, read BM(BAR) into BBR and then into DATA.
5. If it is not valid, set V(0, S(BA)), clear C, and load the block. The load
   makes four passes. Each pass raises READ, counts C up, and waits for the main
   memory. It then moves `MBR -> BBR` and writes BM(BAR). On the first pass
   (C = 1) the word also goes to DATA. After each pass the word-address bits of
   BAR and MAR are counted up. The loop ends when C wraps to 0.

   The load starts at the requested word and wraps within the block. The CPU
   therefore gets its word after one main-memory access, not four.

**Write (store-through).**

1. `MAR <- S` and the page search, as for a read.
2. If the page is present, UPDATE the list.
3. `MBR <- DATA` and write main memory. If the page is present, also form BAR
   and write the word into the buffer.

A write never allocates a page or a block. Main memory is always up to date.
This matters because I/O channels also access main memory.

**End.** Every access ends by clearing B and M and pulsing `done`.

### Timing

There is one clock per step, plus the main-memory waits. T is the main-memory
cycle in clocks: 13 by default, from 1 µs / 80 ns rounded up. Clock 0 is the
clock in which `cpu_start` is high.

| access                          | `done` high in clock | default |
|---------------------------------|----------------------|---------|
| read, block in buffer           | 7                    | 7       |
| read, block loaded              | 19 + T               | 32      |
| ... requested word in DATA from | 7 + T                | 20      |
| write (either page state)       | 5 + T                | 18      |

A block load pays one main-memory cycle for its first word. The other three
words come from the interleaved banks one clock after they are requested (see
below). With `INTERLEAVED_READ = 0` every word costs a full cycle, and a load
ends in clock 16 + 4T.

## Memories

- **`buffer_memory`.** A synchronous single-port RAM of 1,024 × 128 bits. Its
  cycle equals the CPU clock. `rb` reads into `rdata` one clock later. `wb`
  writes on the clock edge.
- **`main_memory`.** 64K × 128 bits, built as four 16K-word banks selected by
  the word address, so the four words of a block lie in four banks. Each bank
  has a data register. A one-clock `read` or `write` is accepted when `busy` is
  0. `done` marks the last clock of the access, and for a read `rdata` is valid
  during it.
  - A read that must go to the banks starts all four of them on the addressed
    block. It takes `CYCLE_CLKS` clocks and leaves the whole block in the four
    data registers.
  - A read of another word of that block is then answered from its register in
    one clock. This is how four-way interleaving moves a block in one memory
    cycle, even though the access sequence asks for one word at a time.
  - A write always takes a full cycle on its own bank. If the data register
    holds the block being written, the write updates the register too, so the
    registers never return stale data.
  - `INTERLEAVED_READ = 0` turns the block read off.

## Top level and CPU interface

`memory_buffer_top` wires together the controller, the activity list, the page
search, the encoder and both memories. It has one parameter, `MM_CLKS` (default
13), the main-memory cycle in clocks.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `cpu_start` | in | 1 | load S, DATA, RW and start; only while `busy` = 0 |
| `cpu_addr` | in | 16 | effective address |
| `cpu_wdata` | in | 128 | word to store |
| `cpu_rw` | in | 1 | 1 = write, 0 = read |
| `busy` | out | 1 | register B |
| `done` | out | 1 | one-clock pulse at the end of an access |
| `cpu_rdata` | out | 128 | register DATA; the word read, valid at `done` |
| `match_pos`, `match_hit` | out | 4, 1 | encoder N and "M ≠ 0" during an access |
| `mm_busy_o` | out | 1 | main memory busy |
| `events` | out | 6 | one-clock pulses: see `mb_events_t` in `mb_pkg.sv` |

Reset clears P to 0 (all entries empty), sets Q(i) = i, and clears V and B. The
memory arrays are not reset. A buffer word is read only after its block has
been loaded. A main-memory word that was never written reads as whatever the
array holds.

Assertions in the RTL check these rules:

- `cpu_start` is never given while busy.
- Page 0 is never referenced.
- M has at most one bit set.
- No memory request is issued while the main memory is busy.

## Choices made in this implementation

The organisation fixes the sizes, the registers and the order of the
micro-operations. The following details are this implementation's own:

- **Clocking.** Each micro-step takes one clock. READ, WRITE, RB and WB are
  decoded from the state, not held in separate flip-flops.
- **Block load.** BAR is formed from Q(0), S(BA) and S(WA) once, before the
  loop. Only its two word-address bits are counted up in the loop, in step with
  MAR. Re-forming BAR inside the loop would cancel the count.
- **Write order.** For a write to a present page, the list UPDATE happens first,
  so that Q(0) names that page when BAR is formed for the buffer write. The
  buffer is written even if that block is not valid. The valid bit does not
  change, so the word is simply overwritten when the block is later loaded.
- **Interfaces and timing model.** The CPU handshake (start/busy/done) and the
  status outputs (`match_pos`, `events`) are this implementation's own. So is
  the main-memory timing model: T = 13, and the four-bank block read is held in
  per-bank data registers.
- **Reset.** Reset values are chosen, not given. Empty entries rely on page 0
  never being used.
- **Not built.** There is no port for I/O channels into main memory.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_page_match`** tests 2,000 random P arrays and keys against an integer
  compare.
- **`tb_match_encoder`** tests every one-hot vector, zero, and random vectors.
- **`tb_activity_list`** runs 5,000 random INSERT/UPDATE/set-valid operations
  against a queue model of the list. It checks all of P, Q(0), V(0) and
  V(0, blk), and that Q stays a permutation.
- **`tb_buffer_memory`** and **`tb_main_memory`** check write/read-back and the
  access times: one clock for the buffer; 13 clocks, or one for a word already
  in the bank registers, for main memory. The main-memory test reads all four
  banks of one block and writes into a block held in the registers.
- **`tb_buffer_access_ctrl`** runs a directed sequence with the real list and
  memories:
  - store-through to an absent page;
  - a block load with first-word forwarding;
  - buffer reads;
  - a write hit read back from the buffer;
  - LRU drift to the bottom, rescue by a hit, eviction by 16 new pages, and
    reload of the stored word;
  - a block load on a present page.

  Each step checks the data and the exact clock counts above.
- **`tb_memory_buffer_top`** runs the full design at default sizes. It stores a
  24-page working set and then makes 4,000 random reads and writes with
  locality. A reference model (an ordered page list with valid bits, plus a
  copy of main memory) predicts every access: the word, the clock count, the
  event pulses and the encoder output. It also counts that every mechanism
  happens at least once: page hit, page miss, LRU replacement, block load,
  first-word forwarding, buffer read, store to main memory only, store to both
  memories, and a hit below the top of the list. The run takes well under a
  second.

## Simulating

All files are in `rtl/` and `tb/`, one module or package per file. The package
must be read first. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mb_pkg.sv tb/tb_memory_buffer_top.sv --top-module tb_memory_buffer_top
./obj_dir/Vtb_memory_buffer_top
```

Replace the testbench name to run another one. To change the main-memory speed,
set `MM_CLKS` on `memory_buffer_top`, or `CYCLE_CLKS` on `main_memory`; the
minimum is 2. `INTERLEAVED_READ` on `main_memory` switches the block read.
The sizes live in `mb_pkg.sv`. `page_match`, `match_encoder`,
`activity_list` and both memories also take them as parameters. The controller
uses the package widths directly.
