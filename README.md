# BWT / LZ77 compression coprocessor built around a Weavesorter

This is a small coprocessor that speeds up the expensive inner step of two
lossless compressors, using one shared array of storage cells:

* **Burrows-Wheeler Transform (BWT).** The block's cyclic rotations are sorted
  and the last column of the sorted matrix is returned, together with the row
  of the original string.
* **LZ77.** A sliding dictionary is searched for the longest match of the
  incoming text. The result is a stream of `(offset, length, next symbol)`
  tokens.

Both jobs need a long register file of symbols in which every symbol can be
compared at once. The design uses a single array of 64 cells for both, the
*Weavesorter*. It is a bidirectional shift register with one compare/swap unit
for each pair of cells. BWT uses it as a sorter. LZ77 uses it as a
content-addressable dictionary. A host processor drives the coprocessor
through its floating-point-unit port. Five double-precision FP instructions
are reused as the coprocessor's instructions.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The default size
is 64 cells of 8-bit symbols.

---

## 1. The Weavesorter: sorting by shifting

```
 Input ─►┌───┬───┐ ┌───┬───┐       ┌─────┬───┐ ◄─ Input
         │ 0 │ 1 │ │ 2 │ 3 │  ...  │ N-2 │N-1│
         └─┬─┴─┬─┘ └─┬─┴─┬─┘       └──┬──┴─┬─┘
           └─C─┘     └─C─┘            └──C─┘      N/2 compare/swap units
 ctrl:   [b0][b1]  [b2][b3]    ...   [bN-2][bN-1]  ControlShiftRegister ─► AND ─► done
 Output ◄─ mux(cell 0 | cell N-1)
```

Each cell holds a symbol and the block address it came from. The address
travels with the symbol and takes no part in comparisons. Each clock the
array does one of four things: hold, shift right, shift left, or
compare/swap. A compare/swap unit sits between cells `2k` and `2k+1` and swaps
them when the left symbol is larger.

**Why this sorts.** Shift a string in from the left and do a compare/swap
after every shift. Each pair of cells then keeps its smaller symbol on the
left and passes the larger one right on the next shift. The array behaves as a
systolic priority queue, and the smallest symbol so far always sits in cell
0. Now reverse the direction. Each shift left hands out cell 0, and the
compare/swap that follows brings the next smallest symbol into cell 0. The
string therefore comes out of the left end in ascending order. A second
string can enter from the right while the first one drains. It collects its
largest symbol in cell N-1 and later drains out of the right end in
descending order. With the two directions alternating, the array is busy on
every cycle.

**Sorting rotations, column by column.** One pass sorts the rotations by
their first symbol only. Rotations that share a first symbol form a *group*,
and the group must be sorted further by the second symbol, and so on. The
design does this without ever storing rotations:

1. Phase 1 shifts the block in from the left: symbol `S[a]` with address `a`.
2. Each later phase reverses the direction. In the same cycle that a symbol
   with address `a` leaves one end, its successor `S[(a+1) mod m]` is read
   from the block register and enters at the other end. The new column
   therefore arrives in the order of the previous sort.
3. A **control bit** enters with each new symbol. It is set when the symbol
   starts a new group: it is the first of the column, or the symbol leaving
   now differs from the one that left before it, or those two were already
   in different groups (their own control bits say so). A set bit blocks the
   compare/swap unit on its left. Symbols therefore only ever reorder within
   their own group, and the old and new columns never mix.
4. The control bits live in the ControlShiftRegister. They shift with the
   cells but do not follow swaps, so a boundary stays at its position while
   the symbols inside a group are reordered. Bit `i` means "a group boundary
   lies on the left of cell `i`". On a right shift the new bit is written to
   bit 1 (between the new symbol and the one it pushed) and bit 0 is set. On
   a left shift the new bit is written to bit N-1.
5. When a phase ends with every control bit set (`done`, the AND of all
   bits), every rotation is in a group of its own and the order is final.
   With all comparators blocked, the cells then hold the rows in ascending
   order from left to right.
6. **GetResults** shifts the column out once more, without compare/swap. The
   shift runs in the direction opposite to the last phase, so a block shorter
   than the array also finishes in `m` cycles. After `p` columns, a cell
   holding address `x` belongs to the row that starts at
   `(x - (p-1)) mod m`. Its last-column symbol is therefore
   `S[(x - p) mod m]`. That symbol is written to the result buffer at the
   row's position. The row that starts at 0 gives the BWT index `I`.

The group rule in step 3 is equivalent to sorting by the full key (group,
symbol). Because the new column enters in group order, symbols of different
groups are always already in order. Blocking their comparison therefore
changes nothing except keeping the groups from mixing.

A block made of repeated identical rotations (for example `abab…` or
`zzzz…`) never separates. The run is therefore also ended after `m+1` phases.
The last column is still correct in that case. The index is then one of the
identical rows.

**Timing.** Every phase is `m` shift/compare pairs, so `2m` cycles. Let `D` be
the number of leading symbols needed to tell all rotations apart. The sort
takes `phases = D + 1` phases (at least 2, at most `m+1`), followed by `m`
cycles of GetResults and 1 command cycle:

```
cycles(ExecuteBWT) = 1 + 2·m·phases + m        (control unit, command to done)
```

Throughput therefore depends on the data. Text of 16-symbol blocks needs
about 4 phases, roughly 150 cycles a block. A block of one repeated byte, as
in bitmap images, never separates and needs all `m+1` phases: 561 cycles for
16 symbols.

The term `2·m·phases` is the familiar Weavesorter cost `2n(t+1)` with
`t + 1 = phases`. Example: `_she_sells_sea_shells` (m = 21) needs 7 leading
symbols to tell its rotations apart. It takes 8 phases and 1 + 336 + 21 = 358 cycles, and
gives the last column `sesaehsshsseellll____` with index 2.

## 2. LZ77 on the same cells

For LZ77 the cells hold the dictionary, with the newest symbol in cell N-1.
Every cycle the next input symbol is offered as `search` to all cells, and
then shifted in from the right. Each cell reports `found[i]` when it holds
that symbol. The ControlShiftRegister bits now serve as "cell holds a
dictionary symbol" flags. They are cleared when a new stream starts, and a 1
enters with every shifted symbol.

The token generator (`lz77_token_gen`) keeps one **History** bit per cell:

* `match = found & history`. An OR tree gives `matched`.
* While `matched` is high, `history <= match` and the length counter counts
  up. The dictionary moves one cell left per symbol, so a match that
  continues shows up at the *same* cell index on the next symbol.
* When no position continues, the positions still in History are the
  longest matches. The priority encoder picks the right-most of them, which
  is the nearest match. The token is emitted in that same cycle:
  `T_o = N - index` (1 = the newest symbol), `T_l = count`,
  `T_n = current symbol`. History is then set to all ones and the counter
  cleared, so the next symbol starts a new string. A symbol that matches
  nothing gives a literal token `(0, 0, symbol)`.
* The current symbol also closes the token, even if it matched, in two
  cases: the counter reaches 255, or the symbol is the last one of the
  stream.

Throughput is one symbol per clock. Matches may overlap the text being
encoded, and may continue across block boundaries when a stream is fed in
several blocks. For `_she_sells_sea_shells` the tokens are
`(0,0,_) (0,0,s) (0,0,h) (0,0,e) (4,2,e) (0,0,l) (1,1,s) (6,3,a) (14,4,l)`.
The last two symbols `ls` follow as `(1,1,s)`: the `l` matches the one just
before it, and the `s` closes the token because the stream ends there.

## 3. Instruction interface

The coprocessor sits on the processor's FPU port. An instruction is issued
with a one-cycle `fp_start`, accepted while `fp_busy` is low, together with
the SPARC V8 `opf` field and two 64-bit operands. `fp_busy` stays high until a
one-cycle `fp_rdy` pulse that carries `fp_res`.

| opf (SPARC V8) | operation | operands | result / timing |
|---|---|---|---|
| FADDd `0x042` | ReadData | 16 symbols in `{op1, op2}`, first symbol in `op1[63:56]`; stored at the next free address (0, 16, 32, 48) | 2 cycles (WriteData and ResetCoprocessor too) |
| FSQRTd `0x02A` | ExecuteBWT | `op2[6:0]` = block length m (0 = symbols loaded) | ready 4 + 2·m·phases + m cycles after issue |
| FSQRTs `0x029` | ExecuteLZ77 | `op2[7:0]` = symbol count (0 = loaded), `op2[8]` new stream (clear dictionary), `op2[9]` last block (close the open match) | ready 4 + count cycles after issue |
| FSUBd `0x046` | WriteData | `op1[5:0]` = group g | BWT: last-column symbols of rows 8g…8g+7, row 8g in `[63:56]`. LZ77: tokens 2g (upper word) and 2g+1. |
| FSUBd `0x046` | status | `op1[63]` = 1 | `{token count, BWT index, block length, phases}`, 16 bits each |
| FMULd `0x04A` | ResetCoprocessor | – | control unit to Reset, block register emptied (the LZ77 dictionary is kept) |

A token word is `{8'h00, T_o[7:0], T_l[7:0], T_n[7:0]}`. Other `opf` values
complete with a zero result.

Typical host loops:

* **BWT:** ResetCoprocessor, ReadData ×⌈m/16⌉, ExecuteBWT, WriteData
  ×⌈m/8⌉, then repeat for each block.
* **LZ77:** ResetCoprocessor, ReadData ×⌈count/16⌉, ExecuteLZ77 (new stream
  on the first block, last on the final one), status, WriteData
  ×⌈tokens/2⌉, then repeat for each block.

## 4. Modules

```
bwtlz_coproc                top: instruction interface + shared datapath
├── fpu_if                  FPop decoding, handshake, result/status mux
├── block_mem               N×8 block register, 16-symbol write, N-to-1 read mux
├── ws_control              FSM: Reset, ShiftRight, CompareSwap, ShiftLeft, GetResults, LZ77
├── weavesorter             N cells + N/2 comparators + ControlShiftRegister + output mux
│   ├── ws_cell             symbol/address register, Found comparator
│   ├── ws_comparator       compare/swap decision, blocked by a control bit
│   └── ws_ctrl_shift_reg   control bits, Done = AND of all bits
├── lz77_token_gen          History, AND groups, counter, token output
│   ├── or_tree             log2(N)-level OR tree → matched
│   └── priority_encoder    right-most set History bit
└── result_buf              N×32 result words (last column or tokens)
bwtlz_pkg                   symbol type, operation/state enums, opf codes, token struct
```

The parameter `N_CELLS` (default 64) sets the number of cells. This is also
the largest BWT block and the LZ77 dictionary size. `LEN_W` (default 8) is the
width of the match-length counter. `N_CELLS` must be even, a multiple of 16,
and at most 255, because the token fields are 8 bits.

## 5. What follows the original architecture and what is this design's own

These parts follow the original architecture:

* the Weavesorter structure (pairwise comparators, a bidirectional shift with
  a compare/swap after every shift);
* the ControlShiftRegister with its AND-gate Done;
* column-by-column successor insertion;
* the FSM states and their order;
* the LZ77 reuse of the cells with a per-cell Search comparator;
* the token generator's History / AND groups / OR tree / priority encoder /
  counter;
* the right-most tie break;
* the five-instruction set and the 64-cell, 8-bit size.

These are this design's own choices:

* the exact meaning and placement of the control bits, and the rule for when
  a new symbol starts a group;
* the phase limit for blocks that never separate;
* the direction of GetResults: opposite to the last phase. The original
  always shifts right, which gives the same rows for full blocks.
* BWT block lengths shorter than the array (2…64);
* use of the control bits as "valid" flags in LZ77 mode;
* the 255-symbol match limit and the closing of a match at the end of a
  stream;
* keeping the dictionary across ResetCoprocessor;
* the signal-level FPU-port handshake, the operand fields, the status word,
  the token word and the result buffer;
* reset values (asynchronous, active low);
* shared read paths built as multiplexers rather than tristate buses.

The host may issue ResetCoprocessor before or after each block. The loops
above put it first, so that a fresh block never meets results from the
previous one.

Not included:

* the host processor and its memory system;
* any decompressor;
* the entropy coders that would follow, such as move-to-front, run-length or
  Huffman coding.

## 6. Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_bwtlz_coproc` | whole coprocessor at default size, driven by FPops. It checks: BWT of the running example; 16- and 64-symbol random blocks and periodic blocks against a rotation-sorting reference (last column, index, phases, exact cycle count); LZ77 streams over several blocks against a greedy reference encoder. It also counts that each mechanism occurred: finish by Done, finish by the phase limit, GetResults in both directions, blocked swaps, literals, matches, a match spanning a block, close at end of stream, close at the 255 limit, dictionary clear. |
| `tb_workload_files` | the host loops of §3 over three generated files (English-like prose, program source, a mostly-zero bitmap). BWT runs on 128-bit (16-symbol) blocks, LZ77 on the whole file in 64-symbol blocks. Every block and token is checked, and the cycles per file are printed. |
| `tb_ws_control` | FSM with the real datapath: state sequence, results, `1 + 2·m·phases + m` cycles, LZ77 one cycle per symbol, abort by reset |
| `tb_weavesorter` | ascending drain on the left, descending drain on the right, 2m cycles per phase, Done, addresses travel with their symbols, `found[]` |
| `tb_lz77_token_gen` | tokens against the reference, including the nine example tokens above and the 255 limit |
| `tb_ws_cell`, `tb_ws_comparator`, `tb_ws_ctrl_shift_reg`, `tb_or_tree`, `tb_priority_encoder`, `tb_block_mem`, `tb_fpu_if` | unit behaviour against models in the testbench |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/bwtlz_pkg.sv \
          tb/tb_bwtlz_coproc.sv --top-module tb_bwtlz_coproc -o sim
./obj_dir/sim
```

Replace both `tb_bwtlz_coproc` names to run another testbench.
`-Wno-fatal` keeps Verilator's width and lifetime warnings about the
testbenches' reference code from stopping the build. The testbenches
reset or set everything they read, so they also pass when un-reset state
starts at random values (`./obj_dir/sim +verilator+rand+reset+2`).

**How far to trust it.** The sorting scheme was also checked against a
direct rotation sort on thousands of random blocks (alphabets of 1 to 26
symbols, lengths 2 to 64). Those runs included the phase count and the cycle
formula. The RTL tests repeat this at a smaller scale. Gate-level timing and
area on a real device have not been measured. The only timing claim made
here is the cycle count.
