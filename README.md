# Full-search block matching with conservative skipping: an 8×8 systolic matcher for QCIF

This design finds a motion vector for every 8×8 block of a QCIF frame (176×144 luma pixels). The
search is exhaustive: every block is compared with all 17×17 = 289 candidate positions within
±8 pixels in a reference frame. The cost of a candidate is the sum of absolute differences (SAD)
over its 64 pixels, and the candidate with the smallest cost gives the vector.

The matching engine is a classic 2-D systolic array of 8×8 processing elements (PEs). It takes
one search pixel per clock and delivers one candidate cost per clock.

On top of it sits a *conservative approximation* unit (the DAU). While a candidate is still
climbing through the array, the DAU adds up the part of its cost that has already been computed.
If that partial cost already exceeds the best cost found so far, the candidate cannot win. The
upper PE rows then skip it: their input registers hold still, which saves switching power. Costs
are never negative, so a partial cost is a lower bound of the full cost. The vectors are therefore
exactly those of a plain full search. Only work that could not change the result is skipped.

The design runs from reset without handshakes. One block takes 578 clocks, and the first vector
appears 580 clocks after reset. A QCIF frame of 396 blocks takes 228,888 clocks, which is 5.9 ms
at a 25.6 ns clock.

## Block diagram

```
            rbd_addr/rbd_pix          sad_addr/sad_pix
   ESG ─────► RBD addr gen            SAD addr gen
    │ en          │ current block         │ search window
    ▼             ▼ (64 clocks)           ▼ (576 clocks)
  ┌─────────────────────────────────────────────┐
  │ SAU: 8×8 PEs, 7 fifteen-stage row shift regs│──tap_sum──► DAU ──dis──┐
  │   sums climb to row 0 ───────── col_sum     │◄───────────────────────┘
  └─────────────────────────────────────────────┘             ▲ min_mad
                     │ 8 × 15 bit                              │
                     ▼                                         │
        PA (adder, 1 clock) ──► BMSU (champion, comparator, subtractor) ──► mv_addr, mv_mad
        CRM (which clocks carry one of the 289 candidates) ──►┘
```

## The block period

A set of MOD-578 counters, all started by reset, divides time into periods of 578 clocks, one per
block. The ESG, both address generators and the CRM each keep their own counter. In each period:

| count | what happens |
|---|---|
| 0 … 63 | ESG enable high: the 8×8 current block is read in raster order at `rbd_addr` and shifted into the chain of PE reference registers (RSR) |
| 0 … 575 | the 24×24 search window is read in raster order at `sad_addr`, one pixel per clock, into the top-left PE |
| 179 + 24u + v | the cost of candidate (u, v), u, v ∈ 0…16, leaves the parallel adder; the CRM marks these 289 clocks valid. The last one (count 579) falls into the first clocks of the next period |
| 577 | the address generators step to the next block |

The reference load and the search stream overlap. The first candidate that needs a loaded
reference pixel reaches the bottom PE row at count 168, long after loading ends. Clocks where
u ≤ 16 but v ∈ 17…23 carry "candidates" that straddle two window lines. The CRM marks them
invalid.

Address generation follows a simple pattern. Within a window, an offset accumulator adds 1 per
clock. At the end of a line it instead adds 169 (current block: 176 − 8 + 1) or 153 (search
window: 176 − 24 + 1). At count 577 the block base moves 8 pixels right. After the 22nd block of a
block row it moves to the next block row (+1240), and after the 396th block it returns to the
start. The search window of a block starts 8 lines above and 8 pixels left of the block.
Addresses are 15-bit and wrap modulo 2^15. For blocks on the frame border the window reaches
outside the frame, or wraps into the neighbouring line, and the frame memory decides what it
returns there.

## How the array lines up a candidate

This is the part that takes some care.

**Reference placement.** The 64 RSRs form one chain: row 0 left to right, then row 1, and so on.
After 64 shifts of the block in raster order, PE(k, j) holds block pixel (7−k, 7−j). Row 0 is the
top row, next to the parallel adder. So the top PE row holds the *bottom* line of the block, and
the columns are mirrored too.

**Search path.** A search pixel enters PE(0,0) and moves one PE to the right per clock, through
register L2. From the end of a row it passes through a 15-stage shift register into the first PE
of the next row down. Rows are therefore 8 + 15 = 23 clocks apart, one less than the 24-pixel
window line.

**Sum path.** Each PE computes `|RSR − L|` (the ADC) into L3. It adds L3 to the partial sum from
the PE below and stores the result in L1, which feeds the PE above. The bottom row is fed 0.
Register L is the PE's gated copy of the search pixel.

With these choices, all eight PEs of a row see the same candidate in the same clock. Because rows
are 23 clocks rather than 24 apart, a candidate reaches row k−1 exactly one clock after row k,
which is when its partial sum arrives from below. For candidate (u, v), counting from the first
search pixel:

| where | clock |
|---|---|
| search pixel at the inputs of row k | 175 − k + 24u + v |
| in L of row k | +1 |
| absolute difference in L3 of row k | +2 |
| column partial sum leaves L1 of row k | +3 (row 0: 178 + 24u + v) |
| parallel adder output | 179 + 24u + v |

Column j of the top row then holds Σ_a |R[a][7−j] − S[u+a][v+7−j]|, and the parallel adder adds
the eight columns.

## Conservative approximation (DAU)

The DAU taps the eight L1 outputs of PE row `DAU_TAP_ROW`, which is 4 by default. At that point
a candidate's sums cover block lines 0…3. The DAU adds the eight sums and compares the total with
the BMSU's current minimum. If the partial cost is strictly greater, `dis` goes high in the same
clock.

A pixel spends three clocks in a PE (L, L3, L1), so the decision is ready while the candidate
stands at the inputs of row `DAU_TAP_ROW − 3`. That row's L registers are gated directly. A
one-flip-flop-per-row chain then carries the decision upward, so every row above skips the same
candidate one clock later. With the default tap, rows 1 and 0 skip and rows 3 and 2 compute the
candidate anyway, because the decision cannot reach them in time. A tap lower in the array gives
a weaker bound but reaches more rows.

A skip flag travels with the candidate through the parallel adder to the BMSU. The BMSU ignores a
skipped cost, which is garbage because some rows compared against held pixels.

The DAU stays silent until the BMSU holds a minimum for the current block. The minimum it uses
may be a few candidates stale, which only makes the test weaker, never wrong.

On the synthetic test frame, 55,730 of 114,733 valid candidates (49%) were skipped, and all 397
vectors were identical to an exhaustive software search.

## Best-match selection and the vector format

The BMSU keeps a champion register. The first valid candidate of a block loads it
unconditionally. After that, a valid, non-skipped cost replaces it only if strictly smaller, so
ties keep the earlier candidate in raster order (u first, then v).

Its subtractor turns the search address into the vector. The search address is delayed 4 clocks,
so for candidate (u, v) it is the address of the candidate's bottom-right pixel. Subtracting
7·176 + 7 = 1239 gives the frame address of the candidate's top-left pixel.

`mv_addr` is therefore the vector in address form. For a block whose top-left pixel is at
`rb = 176·y + x`, the displacement follows from `mv_addr − (rb − 8·176 − 8) = 176·u + v` with
dx = v − 8 and dy = u − 8. After the last candidate, `mv_valid` pulses for one clock, together
with `mv_addr` and `mv_mad`. `mv_mad` is the SAD; divide it by 64 to get the mean.

## Interface (`fsbma_ca_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all state to 0) |
| `rbd_addr` / `rbd_pix` | out / in | 15 / 8 | current-frame read port |
| `sad_addr` / `sad_pix` | out / in | 15 / 8 | reference-frame read port |
| `mv_valid` | out | 1 | one-clock pulse per block: the first 580 clocks after reset, then every 578 |
| `mv_addr` | out | 15 | frame address of the best candidate's top-left pixel |
| `mv_mad` | out | 18 | its SAD |
| `cand_valid` | out | 1 | a valid candidate's cost is at the BMSU this clock |
| `cand_skip` | out | 1 | …and the DAU skipped it |
| `best_upd` | out | 1 | the champion was replaced this clock |

The frame memory is not part of the design. It must return the pixel for an address in the same
clock (asynchronous read), for both ports at once. With a synchronous memory, both pixel streams
would arrive one clock late. The current-block stream and the search stream would still be
aligned with each other, but the CRM and BMSU timing constants would each have to grow by one.

## Files

| file | contents |
|---|---|
| `rtl/fsbma_pkg.sv` | sizes, widths and types |
| `rtl/mod_counter.sv` | MOD-N counter used by every counter of the design |
| `rtl/esg.sv` | enable signal generator (MOD-578, enable for counts ≤ 63) |
| `rtl/rbd_addr_gen.sv`, `rtl/sad_addr_gen.sv` | current-block and search-window address generators |
| `rtl/adc.sv` | absolute difference: comparator + subtractor |
| `rtl/pe.sv` | processing element: RSR, L, ADC, L3, adder, L1, L2 |
| `rtl/search_shift_reg.sv` | 15-stage row-to-row search delay |
| `rtl/sau.sv` | the 8×8 array, its shift registers, tap and disable chain |
| `rtl/dau.sv` | partial-cost adder and comparator |
| `rtl/pa.sv` | 8-input parallel adder, one clock |
| `rtl/crm.sv` | candidate region monitor: 17 count windows of 17 |
| `rtl/bmsu.sv` | champion register, comparator, vector subtractor |
| `rtl/fsbma_ca_top.sv` | everything wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fsbma_ca_sequence.sv`, `tb/tb_fsbma_ca_taps.sv`, `tb/fsbma_tb_pkg.sv` | multi-frame and tap-row tests, and their frame generator |

## Parameters

All defaults are the QCIF configuration. Block size, frame size and displacement live in
`fsbma_pkg`. The timing constants derived from them are commented in the modules that use them:
the CRM windows and delay, and the BMSU delay and offset. Changing the block size or displacement
means revisiting those constants, the 578-clock period and the address-generator jumps together.
The only free choice that leaves everything else untouched is `DAU_TAP_ROW` (a parameter of
`fsbma_ca_top` and `sau`), which may be anything from 3 to 7. The trade-off on the six-frame test
sequence below: tapping row 3 (bound over five block lines, only row 0 can skip) skipped 82,178
candidates of one frame, and tapping row 7 (one block line, rows 4…0 skip) skipped 44,302. The
vectors were exact in both cases.

## Where this differs from the published architecture

The architecture follows a published description of a conservative-approximation FSBMA. Where
that description was silent or did not fit together, this implementation chose as follows:

- **Latch L** is an edge-triggered register with enable rather than a level-sensitive latch. This
  adds one clock per PE to the sum path, and that clock is absorbed into the row skew.
- **What the DAU estimates** is not specified in the source. This design uses the column partial
  sums, which makes the skipping provably lossless. The source's flowchart and prose disagree on
  the direction of the test; the prose ("skip when the estimate is greater than the minimum") is
  followed.
- **CRM delay** is three flip-flops instead of one, to match this pipeline.
- **BMSU offset** is 1239 on a 4-clock delayed address, instead of 1242 on the live address. The
  published constant cannot give a linear address for all 17 horizontal positions in this array.
- **Latency.** The source reports 583 processing clocks per block. This pipeline needs 580 for the
  first block, then 578 per block.
- **Block order over the frame** (row jumps, frame wrap), **window placement**, **border
  behaviour**, **reset style** and the **memory read timing** are not given by the source. They
  are this design's choices, as described above.
- **Power, area and frequency** figures depend on the standard-cell implementation and are not
  reproduced.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing -Irtl rtl/fsbma_pkg.sv tb/tb_fsbma_ca_top.sv --top-module tb_fsbma_ca_top
./obj_dir/Vtb_fsbma_ca_top
```

`tb_fsbma_ca_top` builds a textured reference frame, and a current frame that is the reference
moved by a different displacement in each region, plus noise. It runs a whole frame plus one
block (229,466 clocks, well under a second of simulation). It compares every vector and cost with
an exhaustive software search, and checks the 580/578-clock timing and the 289 valid candidates
per block, arriving in 17 runs of 17. It also requires that DAU skips, champion updates, CRM
rejections of straddling positions, block-row changes and the frame wrap all occurred.

`tb_fsbma_ca_sequence` runs six consecutive frame pairs of a smooth synthetic sequence, a panning
textured background with an independently moving object, and checks all 2,376 vectors. On it the
DAU skipped on average 178 to 187 of the 289 candidates per block, depending on the frame, that
is, about 62% of the candidate clocks left the upper PE rows idle. `tb_fsbma_ca_taps` runs two
instances with tap rows 3 and 7 on the same frame. The shared frame generator and the
exhaustive search are in `tb/fsbma_tb_pkg.sv`.

The module testbenches check:

- the ADC exhaustively;
- the PE against a cycle model;
- the array against directly computed column sums, with forced skips;
- the address generators over a whole frame;
- the CRM windows over three periods;
- the BMSU with ties and legal skips;
- the DAU at its comparison boundary.
