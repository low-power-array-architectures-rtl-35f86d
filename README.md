# Low-power linear systolic array for full-search block matching

Block-matching motion estimation looks for the block of the previous frame
that best matches a block of the current frame. The exhaustive version, full
search, computes the sum of absolute differences (SAD) of an N x N reference
block against every one of the (P+1) x (P+1) candidate positions of an
(N+P) x (N+P) search area, and keeps the candidate with the smallest SAD. Its
motion vector (l, c) runs from floor(-P/2) to floor(P/2) in each direction.

This design is a linear systolic array of N processing elements (PEs) that
performs that search with **early termination**. The SAD of a candidate is
accumulated one reference row at a time. Once the partial SAD of a candidate
reaches the smallest SAD found so far, the rest of its rows cannot make it
the winner. Those rows are then skipped: the PEs hold their input registers,
so the absolute-difference units and adders do not switch and use no dynamic
power. The result (minimum SAD and motion vector) is exactly that of a plain
full search, and so is the throughput: the array still takes one pixel per
cycle, and skipping only saves switching.

Default size: N = 16, P = 31. That is 16 x 16 macroblocks, a 47 x 47 search
area and vectors from -16 to +15, with 8-bit pixels. One block takes
(N+P) x N x (P+1) = 24,064 cycles.

## Order of computation

The search is organised so that the skip decision for a candidate is known
before its next row is computed:

```
for l in 0..P                      -- candidate line (vector row + (P+1)/2)
  for i in 0..N-1                  -- reference row
    for c in 0..P                  -- candidate column, one per cycle
      if not blocked(c): D(c) += sum_j |ref(i,j) - sa(l+i, c+j)|
      blocked(c) := D(c) >= D_min
  D_min, vector := best of line l (first minimum in scan order)
```

For every reference row i, the array reads one complete search-area row,
l+i, of N+P pixels. From it the array produces the row SADs of all P+1
candidates of line l in consecutive cycles. The next row of the same
candidate arrives one row period (N+P cycles) later, which leaves time to
decide whether to block it. `blocked` is cleared at the start of every line,
because the first row of a line is never skipped. D_min only changes at the
end of a line, so all the skip decisions in a line compare against the best
SAD of the earlier lines.

## The array

`me_pe_array` chains N copies of `me_pe`:

```
 sa pixel ──► PE0 ──► PE1 ──► ... ──► PE(N-1) ──► row_sum  (D_i of one candidate per cycle)
   0 ──────►  (partial sum, 1 register per PE)
 disable ──►  (1 register per PE, travels with the partial sum)
 ref(i,N-1)  ref(i,N-2)        ref(i,0)   (stationary reference pixels)
```

* PE k holds reference pixel ref(i, N-1-k). The first PE holds the *last*
  column.
* A candidate pixel passes **two** registers per PE. A partial sum passes
  **one**. Because of this 2:1 speed ratio, the partial sum of candidate c
  meets pixel c+N-1-k in PE k. So the last PE delivers
  D_i(c) = sum_j |ref(i,j) - sa(row, c+j)| 2N-1 cycles after pixel c entered
  the array (2N cycles once it is registered). Candidate c+1 follows one cycle
  later.
* Of the N+P cycles in a row period, P+1 carry valid candidates. The other
  N-1 cycles carry windows that straddle two rows, and the output side
  ignores them.
* Low-power part of each PE: the candidate pixel and the incoming partial sum
  go into two *blocking registers*, which load only while `dis_in` is low.
  The disable bit moves through a one-bit register per PE, in step with the
  partial sum of the same candidate. A blocked candidate therefore freezes
  each PE's AD and adder inputs in exactly the cycle that PE would work on it.
  Its row sum comes out stale, and `dis_out` marks it.

The disable of candidate c must enter PE 0 in the cycle in which pixel c+N-1
is at the array input. That is the last column of the candidate, the one PE 0
uses.

## Output side: partial sums, blocking bits, minimum

In each valid cycle `me_decision` does the following:

1. It adds the row sum to the candidate's accumulated SAD, D^{i-1}. This
   value comes from the output shift register `me_psum_sr`, and is zero in
   row 0. If the candidate was blocked, the stale row sum is *not* added, so
   its SAD stays frozen at a value that is already >= D_min.
2. It writes the new value D^i back into `me_psum_sr`. This register has P+1
   entries, one per candidate of a line, and shifts only in valid cycles.
   After the other P candidates have passed, the entry is at the tail again,
   just when row i+1 of the same candidate leaves the array.
3. It compares D^i >= D_min. The result enters the blocking shift register
   `me_blocking_sr`, a P-stage delay line that shifts every cycle. The
   comparison for candidate c of row i is made P cycles before the last-column
   pixel of candidate c in row i+1 enters the array. That is one row period
   (N+P) minus the array latency (N). So a fixed P-cycle delay delivers each
   bit exactly when it is needed. The controller masks the bit in row 0 of
   every line.
4. In the last row, D^{N-1} < D_min loads D_min and the motion vector. The
   vector is (l, c) from the output-side counter minus (P+1)/2, in two's
   complement. The comparison is a strict "<", so ties go to the first
   candidate in scan order. These updates happen as the last-row candidates
   leave, rather than once at the end of the line. The outcome is the same,
   because no blocking decision of that line uses D_min after row N-2.

At the start of a search D_min is set to all ones. The distortion width
keeps one code above the largest possible SAD (N·N·255), so the all-ones
value acts as infinity.

Against a design without early termination, the extra state is the
eight-bit blocking pixel register and the one-bit disable register of each
PE, plus the P-stage blocking shift register: 9N + P = 175 flip-flops at the
default size. The partial-sum blocking register exists in both versions.

## Controller and reference buffer

`me_control` runs two copies of the (l, i, column) scan counter. The input
copy addresses the search area. The output copy starts 2N-1 cycles later and
names the candidate whose row sum is leaving the last PE. The input copy also
produces:

* the reference row select. It switches to row i when column N of
  search-area row l+i enters. That cycle lies in the idle gap of every PE, so
  one select serves the whole array;
* the disable enable.

`me_ref_buffer` stores the reference block, written one pixel per cycle, and
gives PE k the pixel at (row select, N-1-k).

## Interface and timing (`me_lp_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `ref_we`, `ref_row`, `ref_col`, `ref_px` | in | write reference pixel (row, col) |
| `start` | in | start a search (ignored while `busy`) |
| `busy`, `done` | out | search running; one-cycle pulse when the result is valid |
| `sa_rd`, `sa_row`, `sa_col` | out | search-area pixel needed in this cycle |
| `sa_px` | in | that pixel, in the same cycle (combinational read) |
| `d_min`, `mv_l`, `mv_c` | out | minimum SAD; vertical and horizontal vector, held until the next start |
| `skip`, `min_upd` | out | a candidate row was skipped; the minimum improved (for observing the mechanism) |

To run a search:

1. Write the N·N reference pixels.
2. Pulse `start` for one cycle.
3. In the following (N+P)·N·(P+1) cycles, supply `sa_px` for the requested
   position. Search-area row 0 is vector row floor(-P/2) and column 0 is
   vector column floor(-P/2). The positions come in this order: line l, then
   reference row i, giving search-area row l+i, then columns 0..N+P-1.
4. `done` rises N cycles after the last read, that is (N+P)·N·(P+1) + N
   cycles after the first read cycle. The result outputs hold their values
   from then on.

The reference block cannot be reloaded while a search is running.

At N = 16, P = 31 a block therefore costs 24,064 + 16 + 1 cycles of search,
plus 256 cycles to load the reference. At 20 frames per second the required
clock is:

| format | macroblocks | clock, search only | clock, with this interface |
|---|---|---|---|
| QCIF 176x144 | 99 | 47.7 MHz | 48.2 MHz |
| CIF 352x288 | 396 | 190.6 MHz | 192.7 MHz |

The clock the netlist reaches has not been evaluated.

## Files

| file | content |
|---|---|
| `rtl/me_pkg.sv` | default sizes, width functions |
| `rtl/me_pe.sv` | processing element |
| `rtl/me_pe_array.sv` | chain of N PEs |
| `rtl/me_ref_buffer.sv` | reference block store, per-PE pixel select |
| `rtl/me_blocking_sr.sv` | P-cycle blocking delay line |
| `rtl/me_psum_sr.sv` | (P+1)-entry partial-SAD shift register |
| `rtl/me_decision.sv` | final adder, comparator, D_min, motion vector |
| `rtl/me_control.sv` | scan counters, handshake |
| `rtl/me_lp_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_me_lp_top.sv` | end-to-end test at N = 4, P = 5, 40 searches |
| `tb/tb_me_lp_edge.sv` | the same at N = 3, P = 1 (smallest search area) |
| `tb/tb_me_lp_full.sv` | end-to-end test at the default size, 10 searches |
| `tb/me_tb_body.svh` | shared body of the two end-to-end tests |
| `tb/tb_me_lp_qcif.sv` | synthetic QCIF frame pair, 8 macroblocks at the default size |

Top and sizes are parameters of every module: `N` (block size) and `P` (odd;
the search area is N+P). Widths follow from them.

## Verification

Every testbench checks against values it computes itself and ends with a
`TB_RESULT checks=… failures=…` line. Simulate one with, for example:

```
verilator --binary --timing --assert rtl/me_pkg.sv rtl/me_*.sv tb/tb_me_lp_full.sv \
          --top-module tb_me_lp_full -Mdir obj && obj/Vtb_me_lp_full
```

The end-to-end tests run a software full search next to the array. They
check the minimum, the vector, the cycle count, and the exact number of
skipped rows. Row i >= 1 of candidate (l, c) must be skipped exactly when
its partial SAD D^{i-1}(l,c) is >= the minimum over all earlier lines. The
pictures used are:

* random pictures;
* an exact copy of the reference planted in noise;
* smooth pictures with noise;
* flat pictures, where all candidates tie;
* two planted copies, a tie between two vectors.

The tests also require that rows were skipped, that the minimum was updated,
that a candidate was skipped in its last row and that ties occurred.

At the default size, skipping removes about 55 % of the row computations on
the mixed test pictures. On the synthetic QCIF pair, a smoothed random
texture moved by a fixed displacement plus noise, it removes about 40 % of
the estimated switching energy. That estimate counts an absolute difference
as two units and an addition or comparison as one. The saving on real video
depends on its content; no real sequences are included, so it is not
measured here.

## Where this design makes its own choices

* **Disable timing.** The disable of a candidate enters when the pixel of
  the candidate's *last* column reaches the array input. That is N-1 cycles
  after its first-column pixel, because the first PE holds the last reference
  column.
* **Output shift register length.** It has P+1 entries and shifts only on
  valid cycles. A P+2-entry arrangement with different timing would work
  equally well.
* **No register between the array and the final adder.** The final adder
  works on the last PE's output in the same cycle. Its result is registered
  in the output shift register, in D_min and in the blocking shift register.
  This keeps the blocking delay at exactly P stages. An extra pipeline stage
  in front of the adder would need a P-1 stage blocking register and one
  more cycle of latency.
* **D_min update.** D_min is updated as each last-row candidate leaves, with
  a strict "<" (first minimum in scan order), rather than once per line. The
  result is identical.
* **Blocked candidates.** A blocked candidate keeps its previous
  accumulated SAD rather than adding a held row sum, so no sum can overflow.
* **Parts not shown in the architecture, designed here.** These are the
  reference buffer and its row select, the handshake (`start`/`busy`/`done`),
  the same-cycle search-area read port, reset behaviour, and all sum widths.
  The frame memory is outside the design.
* **Variants not included.** A non-low-power array is not included; it
  would lack the blocking registers. Neither is the variant with two arrays
  working on different blocks in parallel, which would halve the required
  clock.
