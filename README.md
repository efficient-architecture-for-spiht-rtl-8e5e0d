# Fixed-order parallel SPIHT image encoder

SPIHT (Set Partitioning In Hierarchical Trees) codes the wavelet coefficients
of an image bit plane by bit plane, most significant plane first, so that the
bit stream can be cut anywhere and still decodes to the best image for that
length. The textbook algorithm keeps three linked lists (LIP: insignificant
pixels, LIS: insignificant sets, LSP: significant pixels) whose contents and
order depend on the image. Lists like that are awkward in hardware.

This RTL implements a list-free variant of SPIHT built around two ideas from
a published FPGA architecture for the algorithm:

* **Fixed order.** Coefficients are visited in a fixed Morton (Z-order) scan,
  2x2 block by 2x2 block, instead of list order. Each block can be coded on
  its own from its four coefficients and a few precomputed tree maxima, so
  several blocks can be coded in parallel. The set of bits sent per plane is
  the same as in classic SPIHT; only their order differs.
* **Refinement before sorting.** Within a plane the refinement bits (LSP) are
  produced before the significance bits. Then "significant before this
  plane" just means `|c| >= 2^(n+1)`, and no per-entry "added in this pass"
  flag is needed.

The encoder takes the coefficients of a 128x128 image. It codes three blocks
per cycle in three coding units. Each unit writes three bit streams (LIP, LIS,
LSP) through packing FIFOs into two memories: Mem#1 holds the LIP and LIS
words, Mem#2 holds the LSP words.

## Block diagram

```
 coef_in (raster) ──► coef_addr_gen ──► coefficient RAM (16384 x 16, 1-D order)
                                             │            ▲
                                             ▼            │
                                       max_mag_calc ──► tree RAM (4096 x {md, ml})
                                             │
                block p, p+1, p+2 ◄──────────┘  (read together each cycle)
                     │
        ┌────────────┼────────────┐
   spiht_unit 0  spiht_unit 1  spiht_unit 2        one 2x2 block each, plane n
   LIP LIS LSP   LIP LIS LSP   LIP LIS LSP
    │   │   │     │   │   │     │   │   │          var_fifo x 9 (bits → 16-bit words)
    └───┴───┴─────┴───┴───┴─────┴───┴───┘
                     │
               fifo_scheduler  ── stall ──► all coding stages
                │          │
     Mem#1 (LIP+LIS)    Mem#2 (LSP)     8192 x {tag, 16 bits} each
```

| File | Module | Role |
|---|---|---|
| `rtl/spiht_pkg.sv` | package | widths, `blk_t`, `tree_t`, tag and memory word types |
| `rtl/spiht_encoder.sv` | top | phase sequencing, block fetch, the pipeline, wiring |
| `rtl/coef_addr_gen.sv` | address generator | raster (row, column) → 1-D address |
| `rtl/max_mag_calc.sv` | maximum magnitude calculator | D-set and L-set maxima of every node, `n_max` |
| `rtl/spiht_unit.sv` | coding unit | LIP/LIS/LSP bits of one 2x2 block in one plane |
| `rtl/var_fifo.sv` | shift register + variable FIFO | variable bit counts → 16-bit words |
| `rtl/fifo_scheduler.sv` | control unit / scheduler | FIFO → Mem#1 / Mem#2, stall, overflow |
| `rtl/spiht_ram.sv` | RAM | 1 write port, N group-read ports |

## Addressing: why offspring are consecutive

Coefficient (X, Y) (row X, column Y) is stored at the 1-D address made by
interleaving the bits of X and Y, row bits in the odd positions. The SPIHT
offspring of (X, Y) are

```
a1 = (2X, 2Y)   a2 = (2X, 2Y+1)   a3 = (2X+1, 2Y)   a4 = (2X+1, 2Y+1)
```

and their 1-D addresses are `4a+0 .. 4a+3`, where `a` is the address of
(X, Y). Finding offspring is therefore one shift and an increment, and the
rule does not depend on the image size. The RAMs read four consecutive
entries as one group, so a 2x2 block is a single read. Block `p` is the group
at addresses `4p..4p+3`, i.e. the offspring of node `p`.

The wavelet decomposition is assumed to go down to a 2x2 low-pass band
(six levels for 128x128). The four roots are then block 0 (addresses 0..3).
Root (0,0) has no offspring. Roots 1, 2 and 3 have the three coarsest
high-pass 2x2 bands as offspring. With that, the one rule above holds
everywhere, and node `a` has offspring exactly when `0 < a < N/4`.

## How a block is coded without lists

This is the core of the design (`spiht_unit`). For each node `a`,
`max_mag_calc` stores two maxima:

* `md(a)`: the largest magnitude among all descendants of `a` (the D set);
* `ml(a)`: the largest magnitude among the descendants below the children
  (the L set).

In classic SPIHT, the lists an entry is on at plane `n` depend only on
thresholds these maxima have crossed. For block `p` (parent `p`) at plane `n`
with threshold `T = 2^n`:

| Entry | Listed at plane n when | Bit(s) sent |
|---|---|---|
| coefficient c, already significant (LSP) | block 0, or `md(p) >= T`; and `\|c\| >= 2T` | bit n of `\|c\|` (LSP stream) |
| coefficient c, insignificant (LIP) | block 0, or `md(p) >= T`; and `\|c\| < 2T` | `\|c\| >= T`, then the sign if significant (1 = negative) (LIP stream) |
| D set of node k (LIS, type D) | k has offspring; block 0, or `ml(p) >= T`; and `md(k) < 2T` | `md(k) >= T` (LIS stream) |
| L set of node k (LIS, type L) | k has grandchildren; D set listed; `md(k) >= T`; `ml(k) < 2T` | `ml(k) >= T` (LIS stream) |

Why these rules hold:

* A coefficient joins LIP or LSP when its parent's D set becomes significant.
* A node's D set joins the LIS when its parent's L set becomes significant.
* The L set of a node is tested from the plane its D set became significant,
  until it is significant itself.

Children always have larger 1-D addresses than their parent, so a block is
coded after the decision that lists it, within the same plane scan. A decoder
that walks the same order always knows, before it reads a block's bits, which
of those bits to expect.

Inside a block, bits are ordered coefficient 0..3 for LIP/LSP and node 0..3
(D bit, then L bit) for LIS. The bits go LSB first into the unit's output
register. A block emits at most 8 LIP, 8 LIS and 4 LSP bits.

## Frame sequence and timing

| Phase | What happens | Cycles (128x128) |
|---|---|---|
| LOAD | one coefficient per cycle on `coef_valid/coef_ready`, raster order | 16384 |
| MAXC | nodes N/4-1 down to 0 visited (children before parents), one per cycle | N/4 + 3 = 4099 |
| SCAN (per plane) | NU blocks issued per cycle, 3-stage pipeline | ceil(4096/NU) = 1366, + stalls |
| DRAIN + FLUSH (per plane) | pipeline empties, partial FIFO words padded and written | a few cycles |

Planes run from `n_max = floor(log2(max|c|))` down to 0. The SCAN pipeline
works like this:

* cycle t: the RAM reads for blocks `g*NU .. g*NU+NU-1` are issued;
* cycle t+1: the units code the blocks;
* cycle t+2: the bits go into the FIFOs.

All three stages stop together while the scheduler's `stall` is high, which
happens when any FIFO could not take a worst-case block (8 free bits for
LIP and LIS, 4 for LSP). The scheduler writes at most
one word per memory per cycle, and three units can produce up to 60 bits per
cycle, so the low planes stall.

In the full-size test (a synthetic 128x128 image with 11 planes) coding takes
18843 cycles, 1713 per plane, of which 3719 cycles in all are stalls. The
stream is 3479 + 2073 words. Another synthetic frame of 10 planes takes 2347
cycles per plane with `NU = 2` and 1681 with `NU = 3`. Since the scan goes up
the 1-D addresses, the coarse levels are always coded before the fine ones.

## Output format

Every memory word is `{plane[3:0], unit[1:0], stream[1:0], data[15:0]}`
(`mem_word_t`). Stream 0 is LIP, 1 is LIS and 2 is LSP. In `data`, the oldest
bit is bit 0. Words for one (plane, unit, stream) appear in stream order. The
streams of different units and kinds are interleaved in the order the
scheduler served them, and the tag separates them. At the end of every plane
each FIFO is flushed, with its last word zero padded, so every stream of a
plane starts on a word boundary.

Blocks are dealt out in turn: block `p` is coded by unit `p mod NU`. To
rebuild the plane's order, a decoder takes the next block's bits from unit
`p mod NU`'s streams.

`mem1_count` and `mem2_count` give the number of words written. If either
memory fills, the frame stops with `truncated` set. Because the stream is
embedded, the words already written decode up to the point where the first
of the interleaved streams runs out. This is the encoder's rate control: a
smaller memory (or an earlier cut) gives a lower bit rate.

## Interface (top `spiht_encoder`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | pulse (when idle or done) to begin a frame; clears FIFOs and memory counters |
| `coef_valid`, `coef_ready`, `coef_in[15:0]` | in/out/in | raster-order two's-complement coefficients |
| `busy`, `done` | out | frame in progress / finished (`done` stays high until the next `start`) |
| `truncated` | out | frame ended because a memory was full |
| `n_max`, `max_mag` | out | first plane and largest magnitude |
| `mem1_count`, `mem2_count` | out | words written |
| `mem1_raddr` → `mem1_rdata`, `mem2_raddr` → `mem2_rdata` | in → out | read ports, data one cycle after the address |
| `code_cycles` | out | cycles spent in SCAN/DRAIN/FLUSH of the frame |

Parameters: `IMG_DIM` (128, a power of two, at least 8), `NU` (3, 1..4),
`FIFO_BITS` (24, LIP and LIS FIFOs), `LSP_FIFO_BITS` (20), `MEM1_DEPTH` and `MEM2_DEPTH` (8192 each). The coefficient
width is `COEF_W = 16` in `spiht_pkg`.

Synthesized with the defaults (generic, memories kept as memories), the
encoder is about 1.8k word-level cells, 580 flip-flops and 762 kbit of RAM:

* coefficients: 262 kbit;
* tree maxima: 131 kbit;
* Mem#1 and Mem#2: 2 x 197 kbit.

Each multi-port RAM would be replicated into single-port block RAMs on an
FPGA.

## Where this differs from the published architecture

* **Cycle count.** The reference implementation reports 689 coding cycles for
  a 128x128 image with three pipelined units at 20 MHz, and 43 Mpixel/s. This
  RTL visits every block in every plane, so it needs at least 1366 cycles per
  plane (1713 per plane measured in the full-size test). How the reference
  design reaches 689 cycles is not described, so it is not reproduced.
* **FIFO size.** The reference sizes the variable FIFOs at 20 bits. The LSP
  FIFOs keep that size (`LSP_FIFO_BITS`), since a block adds at most 4 LSP
  bits. A LIP or LIS FIFO can hold up to 15 bits of an unfinished 16-bit word
  and must still accept a block's 8 bits, so 23 bits is the least that cannot
  deadlock. Their default is 24 (`FIFO_BITS`).
* **One FIFO per stream, not per plane.** The three LIP/LIS/LSP FIFOs per
  unit follow the block diagram. Planes are coded one after another, with a
  flush between them.
* **Maximum calculation order.** Nodes are visited in reverse 1-D order
  (children always before parents) rather than depth first. This takes one
  node per cycle and needs no stack.
* **Coefficient source.** Coefficients arrive on a raster-order stream. In
  the reference they came from a text file, or from a wavelet transform block
  that is not part of this design. No DWT is included.
* **Addresses.** 1-D addresses are 14 bits for 128x128, not 8-bit symbols.
* **Widths and formats.** These are this design's choices:
  * 16-bit coefficients;
  * the word tags;
  * the memory depths;
  * the bit order inside blocks and words;
  * the round-robin scheduling;
  * ending the frame early when a memory is full.
* **Not built.** These are comparison baselines and are not included:
  * the unpipelined variant;
  * the two-unit figures (available by setting `NU = 2`);
  * the 2-D addressing scheme.

  PSNR figures are not reproduced either, since that needs a decoder and an
  inverse DWT.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_spiht_encoder.sv` | four 16x16 frames through two encoders, one with a 48-word Mem#1 (see below) |
| `tb/tb_spiht_encoder_full.sv` | one 128x128 frame, all parameters at their defaults, word-for-word against the model |
| `tb/tb_spiht_encoder_sweep.sv` | 8x8 with NU = 1, 32x32 with NU = 4, 64x64 with NU = 2, each exact against the model |
| `tb/tb_spiht_encoder_table1.sv` | one 128x128 frame coded with NU = 2 and NU = 3, both exact; three units are faster |
| `tb/tb_coef_addr_gen.sv` | every address against the recursive offspring rule; ready/done |
| `tb/tb_max_mag_calc.sv` | every node's md/ml against recursion on 2-D coordinates; gmax, n_max, N/4+3 cycles |
| `tb/tb_spiht_unit.sv` | 3000 random blocks against bit-queue rules; one-cycle latency; hold under stall |
| `tb/tb_var_fifo.sv` | random push/pop/flush/clear against a bit-queue model; full flag |
| `tb/tb_fifo_scheduler.sv` | round-robin grants, addresses, tags, overflow, clear |
| `tb/tb_spiht_ram.sv` | group reads, hold, read-during-write |

`tb/tb_spiht_encoder.sv` checks these things:

* every word in both memories matches `spiht_ref_pkg`, an independent model
  that tracks list membership with flags on 2-D coordinates;
* the 48-word Mem#1 encoder truncates and holds exactly the first 48 words;
* stalls, partial-word flushes, truncation, significant D and L sets and sign
  bits each occur at least once.

The reference model `tb/spiht_ref_pkg.sv` is the executable specification of
the bit streams.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/spiht_pkg.sv tb/spiht_ref_pkg.sv tb/tb_spiht_encoder_full.sv \
    --top-module tb_spiht_encoder_full -o sim
./obj_dir/sim
```

(`tb/spiht_ref_pkg.sv` is needed only by the four encoder testbenches.)
The full-size frame simulates in well under a second.
