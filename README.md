# Minimum-redundancy prefix coder in SystemVerilog

This is a lossless entropy coder for blocks of image samples, meant for
on-board compression of satellite data. Each block of 2048 samples gets its
own optimal prefix code (a Huffman code for the block's statistics). The
code is found in time linear in the block size, with no priority queue and
no tree of pointers in memory. Instead the design uses a counting sort,
then an in-place merge over two sorted lists, then canonical codewords.

The hardware side is about memory scheduling. Every table is a *simple
dual-port RAM*: one read port, one write port, a one-cycle read latency,
and old data when the same address is read and written in the same cycle.
Every loop of the algorithm is software-pipelined over these RAMs, so that
it runs at about one iteration per cycle. Where one iteration needs a value
that an earlier iteration has not yet written back, the value is forwarded
in logic. Nothing relies on a vendor's write-through RAM mode, so the RTL
maps to any FPGA block RAM or ASIC two-port SRAM.

The stage structure, the memory organisation and the loop schedules follow
a published FPGA design of this coder: its optimised configuration with
4 cycles per tree-build iteration, duplicated count tables and a merged
sort pass. The two other configurations that design was measured in are
available through parameters. One is a 3-cycle tree build. The other is an
unoptimised frequency stage with a single count table and a separate pass
that builds the sorted frequency table. The stage handshakes, the table clearing, the positive mapping,
the code-length stage, the output packer and all word widths are this
implementation's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Data flow

A block passes ten stages, one after another. A stage starts when the
previous one has finished.

| Stage | Work | Reads | Writes | Cycles (defaults) |
|---|---|---|---|---|
| C0 | DPCM + positive mapping, 2 samples per cycle | input | MEM0, MEM1 | 1024 + 4 |
| C1a | symbol frequency count, 2 symbols per cycle (1 with `C1_OPT = 0`) | MEM0, MEM1 | FA0, FA1 | 1024 + 5, or 2048 + 5 |
| C1b | histogram of the frequencies (F2); counts the symbols present, the largest frequency and the largest symbol | FA0+FA1 | F2 | 256 + 5 |
| C1c | F2 becomes the bucket start positions of a descending sort | F2 | F2 | max_f + 3 |
| C1de | counting-sort placement: symbols into Idx, frequencies into Fs | FA0+FA1, F2 | F2, Idx, Fs | max_sym + 6 |
| C1e | only with `C1_OPT = 0`: Fs(j) = F(Idx(j)) | Idx, FA0 | Fs | n + 4 |
| C2a | in-place tree build, parent pointers, 4 cycles per iteration (3 with `C2A_CYCLES = 3`) | Fs, L | Fs, L | 4(n-2) + 5, or 3(n-2) + 7 |
| C2b | parent pointers to depths, 2 cycles per iteration | L | L | 2(n-2) + 3 |
| C2c | code length of each leaf | Fs, L | Len | n + 5 |
| C3 | canonical codewords, stored at the symbol's address | Len, Idx | CW | n + 4 |
| C4 | map each sample to its codeword, pack the bits | MEM0, MEM1, CW | output | 2048 + 5 |

Here n is the number of distinct symbols in the block (1 to 256), max_f is
the largest symbol frequency and max_sym is the largest symbol value
present. Each cycle count is measured in the top level, from the cycle the
stage is entered to the cycle it is left. Blocks measured in simulation
take 4,894 to 8,226 cycles.

Table sizes at the defaults: MEM0/MEM1 are 1024 x 8 bits. FA0, FA1, Fs and
L are 256 x 12 bits. F2 is 4096 x 12 bits (frequencies 0..2048). Idx is
256 x 8, Len is 256 x 5 and CW is 256 x 21 bits.

## Simple dual-port RAM and forwarding

`sdp_ram` is the only memory primitive. An address read in cycle t gives
its word in cycle t+1. A write issued in cycle t is visible to reads issued
from cycle t+1 on.

Most loops of the coder are read-modify-write loops of the form
`T(a) = T(a) + 1`. Examples are the frequency count (C1a), the frequency
histogram (C1b) and the bucket pointer advance (C1de). `rmw_pipe` runs such
a loop at one iteration per cycle, n iterations in n+2 cycles, with three
stages:

```
cycle       t      t+1     t+2     t+3
iter i      A      D/M     W
iter i+1           A       D/M     W
iter i+2                   A       D/M    W
```

In A, the address goes to the RAM. In D/M, the old word arrives and is
incremented. In W, the new word is written. The word iteration i+2 reads in
cycle t+2 is missing two updates:

* the update of iteration i+1, which is only written in cycle t+3;
* the update of iteration i, written in cycle t+2, the same cycle as the
  read, so the RAM returns the old word.

So D/M compares its address with the iteration in W (the nearer one, which
wins) and with the write of the previous cycle, and takes the freshest
value. Both paths are needed whenever a symbol repeats within three
samples, which smooth image data does all the time.

`rmw_pipe` also shows, in its W stage, the corrected old value and a tag.
C1de uses this to write Idx and Fs in the same cycle as F2.

## Frequency counting and the counting sort

**C0** takes samples 2j and 2j+1 in one beat. Sample 2j is predicted by
sample 2j-1, held in a register from the previous beat. Sample 2j+1 is
predicted by sample 2j. The two mapped differences go to MEM0[j] and
MEM1[j], so that two symbols can be read back per cycle. Sample 0 (the DC
value) is stored unmapped. The positive mapping is the CCSDS 121.0 one. It
folds a difference into the same 8 bits as the samples without loss, so the
alphabet stays at 256 symbols.

**C1a** would need two read-modify-writes per cycle on one table. No
two-port RAM can sustain that, so the table is duplicated. MEM0's symbols
are counted into FA0 and MEM1's into FA1, each by its own `rmw_pipe`. Every
later reader of the frequencies drives the same address into both tables
and adds the two outputs.

With `C1_OPT = 0`, the original's first prototype is built instead. C1a
(`c1a_count1`) counts one symbol per cycle into FA0 alone, in NSAMP + 4
cycles. There is no FA1; it reads as zero.

**C1b to C1de** are a counting sort by frequency in descending order. C1b
builds F2, where F2(v) is the number of symbols of frequency v. C1c walks v
from max_f down to 1 and replaces F2(v) by the 1-based position where the
first symbol of frequency v goes. C1de walks the symbols. For each symbol
present it reads its bucket pointer j = F2(f) and advances it. In the same
cycle it writes the symbol to Idx(j-1) and its frequency to Fs(j-1). The
schedule (F read, F2 read, F2 word, three writes) keeps the F2 updates
inside `rmw_pipe`, so neighbouring symbols of equal frequency are forwarded
correctly. Symbols of equal frequency stay in ascending order.

With `C1_OPT = 0`, C1de writes only Idx and F2. A separate pass, C1e
(`c1e_gather`), then builds Fs(j) = F(Idx(j)) for j = 0..n-1. It reads Idx,
then the count table at that symbol, then writes Fs, one entry per cycle
(n + 3 cycles). Merging this pass into C1de saves its cycles, which is why
the default configuration has no C1e.

## Tree build (C2a)

This is the hardest stage. It implements the in-place construction of a
Huffman tree over a sorted list. The inputs are the n leaf weights Fs(0..n-1)
in descending order, so the lightest leaves are at the end.

1. The two lightest leaves form internal node n-2: L(n-2) = Fs(n-2) + Fs(n-1).
   Both leaves get parent pointer n-2.
2. For k = n-3 down to 0, two items are taken. Each is the lighter of the
   next unused internal node L(i) and the next unused leaf Fs(f). On a tie
   the leaf is taken. A node is only eligible for the second item if i > k.
   Node k gets the sum of the two weights, and the word of each item taken
   is overwritten with its parent, k.

Internal nodes are created in decreasing index order, and their weights
never decrease. So the unused nodes and the unused leaves each form a
sorted queue, and the "two lightest" are always at the two queue heads.
Afterwards Fs(f) holds the parent of leaf f, L(k) the parent of node k, and
L(0) the total weight.

Which table is written, at which address, and which pointer moves all
depend on the two comparisons of the iteration. The RTL holds the words at
both queue heads (L(i) and Fs(f)) in registers. It spends 4 cycles per
iteration:

| State | Action |
|---|---|
| S0 | first pick; parent pointer written to the item taken; read of the next word of that queue |
| S1 | that word arrives |
| S2 | second pick; L(k) written with the node weight; leaf parent written if a leaf was taken; read of the next word |
| S3 | that word arrives; node parent L(i) = k written if a node was taken (the L write port is free again) |

When the node pointer reaches k, the node's weight is taken from a register
rather than from the RAM. It was written in S2, the same cycle as the read,
so the RAM would return the stale word.

**3-cycle variant** (`c2a_tree3`, chosen with `C2A_CYCLES = 3`). It has the
same function and interface. Instead of caching one word per queue, it
reads two candidates from each table ahead of time. It decides both picks
in one cycle:

| State | Action |
|---|---|
| P0 | read L(i) and Fs(f); write L(k+1) with the previous node's weight; write the parent of a leaf taken second last time |
| P1 | read L(i-1) and Fs(f-1); write the parent of a node taken second last time |
| P2 | all four words present; both picks decided, node weight summed, parent of the first item written |

Words that are not taken are read again in the next iteration. When
i = k+1, the read of L(i) in P0 meets the write of L(k+1). The registered
weight is then used instead. P2 chains compare, select, compare and add,
so its path is longer. The original design reports about 20% lower clock
frequency for this scheme. It saves about 250 cycles per block, which is
not enough to make up for the lower clock. The default is therefore the
4-cycle schedule.

## Depths, lengths and codewords

**C2b** turns parent pointers into depths in place: L(0) = 0, then
L(k) = L(L(k)) + 1 for k = 1..n-2. A parent always has a smaller index than
its child, so one ascending pass suffices. Each iteration takes two cycles.
In the first, the depth of node k-1 arrives (L(parent)+1) and is held in a
register while L(k) is read. In the second, the parent p = L(k) arrives,
L(p) is read and the held depth of k-1 is written. The write is kept off
the read-to-add path. When p = k-1, the read and the write hit the same
word in the same cycle and the RAM returns the old value. The held depth
is then used in place of the RAM output.

**C2c** gives each leaf the code length L(Fs(f)) + 1, one leaf per cycle.
Leaves in descending weight order get non-decreasing lengths.

**C3** assigns canonical codes in that order. The first leaf gets 0. A leaf
of the same length as its predecessor gets the previous code + 1. A longer
one gets (previous + 1) << (length increase); for a step of one this is
(previous << 1) + 2. Length and code are stored as one word {len, code} at
the symbol's own address. C4 then needs a single look-up per sample.

## Output stream

C4 reads the symbols back in sample order, one per cycle, and looks each
one up in CW. Codes are appended MSB first to a 64-bit buffer, and a 32-bit
word leaves whenever 32 bits are held. After the last sample, the remaining
bits leave left-aligned and zero-padded in a final word. That word has
`out_last` set and `out_nbits` valid bits (0 means none).

A decoder must rebuild the same code, so it needs the sorted symbol list or
the code length of each symbol. This design does not transmit either. The
stream holds only the codewords. `n_symbols` gives the number of distinct
symbols, and the tables are inside the top.

## Top-level interface (`mrp_coder_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset of all control state |
| start | in | 1 | pulse while idle to begin a block |
| in_valid, in_ready | in/out | 1 | beat handshake; 1024 beats per block |
| in_d0, in_d1 | in | 16 | samples 2j and 2j+1; the low 8 bits are the pixel |
| out_valid | out | 1 | packed word valid (no back-pressure) |
| out_word | out | 32 | packed code bits, first bit in bit 31 |
| out_last, out_nbits | out | 1, 5 | final word of the block and its valid bits |
| n_symbols | out | 9 | distinct symbols of the block |
| busy, done | out | 1 | block in progress; done pulses with out_last |

Parameters: `NSAMP` (2048) and `NSYM` (256). All widths are derived from
them. `C2A_CYCLES` (4) selects the C2a schedule, 4 or 3 cycles per
iteration. `C1_OPT` (1) selects the optimised frequency stage. Set it to 0
for one count table, one symbol per cycle and a separate C1e pass. Shared constants are in `mrp_pkg`.

## Timing

Worst case in this implementation: 8,226 cycles per 2048-sample block.
That case has all 256 symbols present and one symbol dominant. With 256
symbols in a noise-like block it takes 6,706 cycles.

| Configuration | Worst case | Noise, 256 symbols | Original, worst case |
|---|---|---|---|
| default (`C1_OPT = 1`, `C2A_CYCLES = 4`) | 8,226 | 6,706 | 7,715 |
| `C1_OPT = 0`, `C2A_CYCLES = 4` | 9,510 | 7,990 | 9,000 |
| `C1_OPT = 0`, `C2A_CYCLES = 3` | 9,258 | 7,738 | 8,742 |
| `C1_OPT = 1`, `C2A_CYCLES = 3` | 7,974 | 6,454 | - |

The original design reports 7,715 cycles in the worst case, at about
296 MHz on a Stratix III. It reports 284 MHz for the unoptimised
4-cycle configuration and 200 MHz for the 3-cycle one. Its count allows
only 1,025 cycles for the bucket pass C1c. Here C1c visits every frequency
from the largest present down to 1, up to 2,048. Those are the extra
cycles in every configuration. No clock frequency has been
measured for this RTL.

## Departures and own choices

* **Symbols are 8-bit.** The inputs are 16-bit words, but the symbol
  tables have 256 entries. A sample's low 8 bits are its symbol and the
  upper bits are ignored.
* **Positive mapping** is the CCSDS 121.0 one. The original only names
  "DPCM and positive mapping".
* **DC sample.** It is stored unmapped, and is also counted and coded like
  any other symbol.
* **Table clearing.** A counter zeroes FA0/FA1 and F2 while C0 and C1a run,
  which costs no cycles at the default sizes.
* **C1c** is built as a running sum, since only its function is known.
  Positions are 1-based as in the original sort schedule.
* **C2a.** Both leaves of the first node get an explicit parent pointer. A
  one-symbol block gets a 1-bit code.
* **C3** shifts by the full length increase. The original's codeword rule,
  (prev << 1) + 2 on any length change, gives wrong codes when the length
  grows by more than one between neighbouring leaves.
* **C2c and C4** are built from their stated function: leaf length from the
  parent's depth; mapping with MSB-first packing into 32-bit words.
* **Control.** Stages are chained with start/done pulses.
* **Widths.** Code lengths are 5 bits and codes 16 bits; 15 bits is the
  longest possible code for 2048 samples.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an
independent behavioural model and checks its cycle count. The end-to-end
test `tb_mrp_coder_top` runs at the default sizes. It codes eight blocks:
smooth and rough random walks, uniform noise, one-symbol and two-symbol
blocks, a skewed block with code-length jumps, and the worst case above.
For each block it checks:

* every output word against a model;
* the total code length against a plain Huffman construction (so the code
  is optimal);
* the Kraft sum of the codeword table;
* the stage cycle counts.

It also counts how often each mechanism fired: both forwarding paths, the
C2a node-weight forward, the C2b depth bypass, both pick kinds, the three
length-step kinds, and the one- and two-symbol cases. A mechanism that
never fires counts as a failure. Two more end-to-end testbenches run the
same blocks and checks in the original's other two configurations.
`tb_mrp_coder_top2` uses `C1_OPT = 0`. `tb_mrp_coder_top3` uses
`C1_OPT = 0` and `C2A_CYCLES = 3`.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mrp_pkg.sv tb/tb_mrp_coder_top.sv \
          --top-module tb_mrp_coder_top -o sim && ./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. For a block
testbench, replace the file and top name (for example `tb/tb_c2a_tree.sv`,
`tb_c2a_tree`). Stage testbenches that need no package can drop
`rtl/mrp_pkg.sv`.

## Files

`rtl/`: `mrp_pkg` (constants, stage enum), `sdp_ram`, `rmw_pipe`,
`c0_dpcm`, `c1a_count`, `c1a_count1`, `c1b_freq2`, `c1c_bucket`,
`c1de_sort`, `c1e_gather`,
`c2a_tree`, `c2a_tree3`, `c2b_depth`, `c2c_len`, `c3_codegen`, `c4_mapper`,
`mrp_coder_top`. `tb/`: one `tb_<module>.sv` per module, plus
`tb_mrp_coder_top2` and `tb_mrp_coder_top3` for the other configurations.
