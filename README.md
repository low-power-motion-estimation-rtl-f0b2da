# Error-tolerant full-search motion estimation with two systolic arrays

Full-search block matching compares every 16 x 16 macro-block of a frame with
every candidate position in a (2p+1) x (2p+1) search area of the previous
frame. The work is regular and uses a lot of energy. This design cuts that energy
by running most of the search on a datapath with a lowered supply voltage. At
that voltage, thermal noise makes the adders and flip-flops flip bits now and
then ("probabilistic CMOS"). A second, error-free datapath keeps the result
trustworthy.

The idea rests on a property of real video: most motion vectors are small.
The candidates within (±r, ±r) of the current block's own position form
*region 1*, which is (2r+1)^2 candidates. An exact array (SA1) searches region 1.
A noisy, low-voltage array (SA2) searches everything else, *region 2*, at
the same time. SA2 may then report a winner whose SAD is too low. To catch
this, its winner is run once more through SA1. The exact SADs of the two
regions' winners are compared, and the smaller one gives the motion vector. A
slow loop adjusts r from the encoder's quantisation parameter (QP): when
quality suffers, region 1 grows.

The RTL implements this scheme in SystemVerilog (IEEE 1800-2017). It follows
"Low Power Motion Estimation with Probabilistic Computing", which evaluates
the scheme for CIF video. The sizes are that evaluation's: N = 16, p = 11,
r ≤ 4, with an update every 5th frame. The supply voltages and the noise are
physical, so they are not modelled as logic. Instead, SA2's register bits can
be flipped through input ports.

## The systolic array (`me_sa`)

One array has N AD cells in a vertical chain, then an accumulator A and a
comparator M:

```
   0 ─► AD0 ─► AD1 ─► ... ─► AD(N-1) ─► A (a+b, b = own output) ─► M (min(a,b), b = own output)
         ▲      ▲               ▲
   row 0 of   row 1, 1 cycle   row N-1, N-1 cycles late
   column c   late
```

* **Input.** Every cycle the array takes one column of the current block and
  the same column of the candidate block: N pixels each.
* **Skew.** Row j of both columns passes through j delay registers. A column's
  partial sum therefore meets its row-j pixels in AD cell j.
* **AD.** Each AD cell registers `a + |X − Y|`. The subtraction is `X + ~Y + 1`.
  The absolute value comes from XOR gates: the low 8 bits of the difference
  are XORed with its sign, and the sign is then added as an extra carry into
  the accumulation adder.
* **Column sum.** The bottom cell delivers one complete column sum per cycle,
  N cycles after the column entered.
* **A.** It adds N column sums into the candidate's SAD, restarting on the
  first column. The SAD appears with `sad_valid` N+1 cycles after the
  candidate's last column.
* **M.** It keeps the smallest SAD since `clear` and the candidate's
  displacement tag. It updates one cycle after A. On a tie, the earlier
  candidate stays.

A new candidate starts every N cycles, with no bubbles. Control signals
(`valid`, `first`, `last`, the tag) travel through a matching N-stage
pipeline. `busy` stays high while anything is in flight.

Widths: pixels are 8 bits. Column sums are 12 bits (16·255 = 4080). SADs are
16 bits (256·255 = 65280).

## Region split and re-evaluation (`me_ctrl`)

This is the part that differs from a plain full-search engine. One search runs
as follows:

1. **Start.** `start` samples r and limits it to R1. Both comparators are cleared.
2. **Parallel scan.**
   * SA1 scans region 1 in raster order (dx fastest): dx, dy ∈ [−r, r].
   * SA2 scans the rest of the (2p+1)^2 area in raster order. On rows that
     cross region 1, its scanner jumps straight over the 2r+1 region-1
     candidates, so SA2 is fed a column every cycle without gaps.
   * Each scanner sends its array one memory address per cycle. The framing
     signals are delayed one cycle to meet the registered memory data.
3. **Drain.** The controller waits until neither array has a column in
   flight. SA2's comparator now holds its winner. Because of bit flips, this
   may be the wrong candidate, and its SAD may be wrong.
4. **Re-evaluation.** SA2's winner is fed through SA1 once more, which takes
   N cycles. SA1's comparator still holds the exact region-1 minimum. It
   therefore ends up holding the smaller of two *exact* SADs. Region 1 wins
   a tie.
5. **Done.** `done` pulses. `mv` and `mv_sad` are SA1's minimum.

What this guarantees, whatever SA2 does:

* `mv_sad` is always the exact SAD of `mv`.
* `mv_sad` is never worse than the best candidate of region 1.
* A bit flip in SA2 can only cost quality when it hides the true region-2
  optimum, that is, when SA2 picks another region-2 candidate. It can never
  let a falsely low SAD through.

Timing: a search takes N·max(C1, C2) + 3N + 10 cycles, where C1 = (2r+1)^2 and
C2 = (2p+1)^2 − C1. At the default size C2 is always the larger:

| r | C1 | C2  | cycles per block |
|---|----|-----|------------------|
| 0 | 1  | 528 | 8506 |
| 2 | 25 | 504 | 8122 |
| 4 | 81 | 448 | 7226 |

`cand1` and `cand2` report how many candidates each array evaluated. These
counts, not the cycles, set how the energy splits between the two supplies.

Throughput budget: the original evaluation clocks the datapath at 125 MHz for
CIF (352 x 288, 396 macro-blocks) at 20 frames/s. That leaves 15782 cycles per
macro-block. The worst case here is 8506 cycles of search plus 1444 cycles to
load the search window one pixel per cycle, which fits.

## Range parameter (`me_range`)

Once per frame, the encoder reports `qp`: the frame's average QP multiplied by
the number of macro-blocks (396 for CIF). `qp_th` is the same measure taken
with an error-free datapath. After every 5th frame the controller applies one
of two rules:

* if qp > 1.0200 · qp_th and r < 4, then r increases by one;
* otherwise, if qp < 1.0065 · qp_th and r > 0, then r decreases by one.

Between the two thresholds, r holds. The factors are integers in units of
1/10000, so the hardware compares `qp·10000` with `eta·qp_th` exactly. r
starts at 2, which is this design's choice. r takes effect at the next
`mb_start`.

## Modelling the voltage-scaled array

The errors of the low-voltage array come from analog noise, so no logic can
produce them. `me_sa` instead has XOR masks on its AD registers (`flip_ad`,
one 12-bit mask per row) and on A (`flip_acc`). A 1 in a mask flips that
register bit for one clock edge.

* In `me_top`, SA1's masks are tied to zero.
* SA2's masks are top-level inputs (`sa2_flip_ad`, `sa2_flip_acc`).
* With all masks at zero, SA2 is exact and the design is a plain, two-way
  parallel full search.
* M is never given a mask, because it stays at the nominal supply.
* The level shifters between A and M in a two-supply layout are wires at the
  logic level, so they do not appear.

The original study also injects errors into individual full adders, not only
into registers. This model does not do that.

## Top level (`me_top`) interface

| Port | Dir | Meaning |
|------|-----|---------|
| `sw_we, sw_wx, sw_wy, sw_wd` | in | write one pixel of the (2p+N)^2 = 38 x 38 search window; (x, y) = (0, 0) is displacement (−p, −p) |
| `cb_we, cb_wx, cb_wy, cb_wd` | in | write one pixel of the 16 x 16 current block |
| `mb_start` | in | pulse: search the loaded block (do not write while `mb_busy`) |
| `mb_busy`, `mb_done` | out | search running; one-cycle pulse when `mv`/`mv_sad` are valid |
| `mv` | out | `{dx, dy}`, signed 8-bit each, in [−p, p] |
| `mv_sad`, `cand1`, `cand2` | out | exact SAD of `mv`; candidates evaluated by SA1 (including the re-evaluation) and by SA2 |
| `frame_done, qp, qp_th` | in | end-of-frame pulse and QP measures for the r update |
| `r`, `r_used`, `r_inc`, `r_dec` | out | current r, r of the running block, change pulses |
| `sa2_flip_ad`, `sa2_flip_acc` | in | bit errors of the low-voltage array (tie to zero for exact operation) |

Reset is asynchronous and active low. The memory (`me_mem`) keeps one search
window and one current block. It has two read ports, one per array, and each
port returns a whole column per cycle. Loading and searching do not overlap.
A production version would double-buffer the window.

## Where this RTL follows the source and where it chooses

Taken from the source design:

* the AD / A / M structure with the skewed AD chain;
* the XOR-based absolute value;
* M kept error free;
* two arrays, with region 1 on the exact one and region 2 on the scaled one;
* the re-evaluation of SA2's winner on the exact array, and selection by the
  smaller SAD;
* the r update rule: every 5 frames, eta1 = 1.0200, eta2 = 1.0065, r1 = 4,
  QP scaled by 396;
* the sizes N = 16 and p = 11.

This design's own choices:

* signal widths (12-bit column sums and 16-bit SADs, within the source's
  8-to-16-bit adders);
* the tie rules (the earlier candidate, and region 1 on a final tie);
* raster scan order and the region-skip scanner;
* the memory organisation and one-pixel-per-cycle loading;
* the start/done handshake;
* the initial r = 2;
* using the 5th frame's QP, not an average over 5 frames;
* the register-level bit-flip ports as the error model.

Not built:

* the encoder around the estimator (DCT, quantiser, motion compensation,
  entropy coding, rate control), which only supplies `qp`;
* power supplies, level shifters and the noise source;
* the single-array, uniformly scaled configuration that serves as a
  comparison baseline. One `me_sa` with its masks driven is that
  configuration.

## Verification

Each module has a self-checking testbench in `tb/`. Each one computes its
expected values independently and ends with a `TB_RESULT checks=… failures=…`
line.

| Testbench | What it checks |
|-----------|----------------|
| `tb_me_ad` | a + \|x−y\| with corner values, bit flips, reset value |
| `tb_me_acc` | SAD of 16 columns, `sad_valid` exactly one cycle after the last column, flips |
| `tb_me_min` | running minimum over searches with clear, ties kept on the first |
| `tb_me_sa` | every SAD of 100 random candidates, latency N+1, one candidate per N cycles, final minimum, busy, a bit flip held on in row 0 |
| `tb_me_mem` | random column reads on both ports against a copy of the contents |
| `tb_me_ctrl` | for r = 0…4 and r above the limit: every address and framing bit, region 1 only on SA1, region 2 only on SA2, each candidate exactly once, no gaps on SA2, the re-evaluation, counts and cycle totals |
| `tb_me_range` | r after each of 400 frames against a real-number model; increase, decrease, both saturations and the dead band all occur |
| `tb_me_top` | 40 blocks at full size: exact result with SA2 error free; with random SA2 bit flips (10^−4 … 10^−2 per bit and cycle), `mv_sad` is exact, never worse than region 1, and a region-2 vector is SA2's winner. It counts region-1 and region-2 wins, corrupted SA2 winners, corrupted winners rejected by the re-evaluation, r increases and decreases, and blocks at every r = 0…4; each must occur. Every block must fit the 15782-cycle budget. |
| `tb_me_cif` | one synthetic CIF frame pair (352 x 288, 396 blocks; still background, two moving objects, edge pixels repeated outside the frame), searched with SA2 exact and with bit-flip rates of 10^−4 and 10^−3: exact vectors without errors, exact SADs with them, PSNR of the motion-compensated frame, and about 3.79 million cycles per frame against the 6.25 million a 125 MHz clock allows at 20 frames/s |

`tb_me_top` runs the top at its default parameters in about a second, and
`tb_me_cif` in under a minute. With the synthetic frames, the compensated
frame reaches about 45 dB with an exact SA2. It falls by about 5 dB at a
bit-flip rate of 10^−4 per register bit and cycle, and by about 12 dB at
10^−3, because the true optimum in
region 2 is then often missed. The rate at which a real low-voltage array
flips bits depends on the process and supply, and no particular rate is
claimed here.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
          rtl/me_pkg.sv tb/tb_me_top.sv --top-module tb_me_top -o sim
./obj_dir/sim
```

Replace `tb_me_top` with any other testbench name (`-Wno-fatal` keeps width warnings in the testbenches from stopping the build). To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/me_pkg.sv rtl/me_top.sv`. The
remaining lint warnings are about output pins left open on purpose (the
per-candidate SAD stream of each array is not used at the top) and about
package constants that a given module does not need.

## Files

* `rtl/me_pkg.sv`: default sizes, `pixel_t`, the `mv_t` displacement struct
* `rtl/me_ad.sv`, `rtl/me_acc.sv`, `rtl/me_min.sv`: the AD, A and M cells
* `rtl/me_sa.sv`: one systolic array
* `rtl/me_mem.sv`: search window and current block memory
* `rtl/me_ctrl.sv`: region split, scheduling, re-evaluation
* `rtl/me_range.sv`: r update from QP
* `rtl/me_top.sv`: the complete estimator
* `tb/tb_*.sv`: one testbench per module, plus `tb_me_cif` for a whole CIF frame

To change the search range, set `P`. The window becomes (2P+16)^2 pixels. P
must stay below 64, and R1 must stay below P.
