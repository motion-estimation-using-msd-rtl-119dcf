# MSD-first block-matching motion estimator

Full-search block matching compares a block of the current frame with every
candidate position in a search window of the previous frame. It keeps the
candidate with the smallest sum of absolute differences (SAD). Only the position
of the minimum matters, not the exact SAD of every candidate. So this design
forms the SADs most significant digit first, one bit plane at a time. After each
plane it drops every candidate that can no longer win. The lower planes of those
candidates are never computed. The motion vector is still exactly the one that
full search finds.

This SystemVerilog implements that scheme, as proposed in the paper *Motion
estimation using MSD-first processing* (IEE Proceedings - Circuits, Devices and
Systems), at the size of the paper's example array processor: 4x4 blocks,
8-bit pixels, 16 candidate positions. The blocks and the window are parameters,
and the same RTL runs a 31x31 search with 16x16 blocks.

## Digits, planes and the switch

Every pixel is unsigned binary, so bit plane `z` of the current pixel `c` and
of the reference pixel `r` can be bound into one radix-2 signed digit
`c_z - r_z` in {-1, 0, +1}. That is the difference, and it costs no logic. A
signed digit is held as two rails, `p` and `n`, with value `p - n`. Negating it
swaps the rails.

The sign of the whole difference `c - r` is the sign of its first nonzero
digit, counting from the MSB. A per-pixel *switch* (`sd_abs`) remembers whether
that digit has been seen and whether it was negative. If it was, the switch
swaps the rails of that digit and of every later one. The digits that come out
are the signed-digit form of `|c - r|`. They are MSD first, and the first
nonzero one is always +1.

Adding the `N*N` digits of one plane gives a **digit SAD**: an integer in
`[-N*N, +N*N]`. Its digits all have the same weight, so a plain count of
positive minus negative digits does the job (`digit_sad`). Across planes, each
candidate keeps a SAD *prefix* `A <- 2*A + digit_sad`. After plane `z` the prefix
equals `sum_p |(c_p >> z) - (r_p >> z)|`. After plane 0 it is the exact SAD.

## When a candidate can be dropped

This part needs the most care. Take pixel `p` after plane `z`. Its remaining
digits add between `-(2^z - 1)` and `+(2^z - 1)` to its absolute difference. So
each candidate's final SAD lies within `N*N*(2^z - 1)` of `2^z * A` on either
side. For two candidates with prefixes `A_c` and `A_b`, the order of their final
SADs is therefore fixed once

    A_c - A_b >= 2*N*N

The rule does not depend on `z`. This is the principle of the paper's MSD-first
signed-digit comparator: two digit streams are ordered once their running
difference reaches two units of the current digit. Here it is applied to a whole
block, so the margin is `2*N*N`. After the last plane the prefixes are the exact
SADs and the comparison is exact.

`digit_comparator` returns one of three results for a candidate against the
running minimum:
- **larger**: discard the candidate;
- **smaller**: the candidate becomes the running minimum, even while the order
  is not yet certain;
- **undecided**.

An equal SAD after the last plane counts as larger, so the minimum found first
wins a tie. The running minimum is never discarded, so the true minimum always
survives.

## Search order: normal and prediction mode

The search runs plane by plane (`me_ctrl`):

1. In the MSD plane every candidate gets a digit SAD. In each lower plane only
   the candidates still alive get one.
2. Within a plane, each candidate is compared with the running minimum of that
   plane, meaning the best candidate of this plane seen so far. Candidates
   visited before a better one turns up are not compared with it again until
   the next plane. The visiting order therefore changes how many candidates are
   dropped.
3. **Normal mode** visits the candidates row-major, starting top left, in every
   plane.
4. **Prediction mode** starts the MSD plane at the centre candidate,
   displacement (0,0). Each later plane starts at the previous plane's running
   minimum, then visits the rest row-major. A small minimum early in the plane
   drops more candidates.
5. The search ends after plane 0. It also ends early once a plane leaves a
   single candidate alive. The motion vector is then known, but `min_sad` is only
   a prefix and `sad_exact` is 0.

### Short operands: offsets from the last minimum

The prefixes themselves are never stored. At the end of each plane the
minimum's prefix `M` becomes a bias: `M <- 2*M + (minimum's offset)`, held in a
single word register. Each candidate stores only its offset from that bias, and
forms its next offset as `2*E + digit_sad` from it.

Every candidate still alive was compared with a running minimum no smaller
than the final one, so `E >= 0`. A candidate whose offset reaches `2*N*N`
already loses to the previous plane's minimum, which is still alive. So `E` is
clipped to `2*N*N`. Clipping can only make a comparison against that candidate
discard something that would lose anyway, and it never affects the winner. The
stored offset therefore stays within `[-N*N, 5*N*N]`: 8 bits for 4x4 blocks and
12 bits for 16x16, whatever the pixel word length. The winner's exact SAD comes
out of `M`.

Each candidate also keeps its `N*N` two-bit switch states in `me_ctrl`
registers. This is needed because one candidate's planes are interleaved with
those of all the others.

## Structure and timing

```
             load port                  cand, plane
  frame  ───────────────▶  dgu  ◀──────────────────────┐
  memory                    │ cbits, rbits (N*N each)   │
                            ▼                           │
                        digit_sad ◀── switch states ── me_ctrl ──▶ mv, min_sad,
                     (N*N sd_abs + sum) ── dsad ──────▶ (digit_comparator)  done
```

- `dgu` (data generation unit) holds the current block and the
  `(CH+N-1) x (CW+N-1)` reference window. Both are written one pixel per cycle
  before a search, so each reference pixel is fetched once per block match.
  Reads are combinational: bit `z` of the block, and of any candidate's
  reference pixels. Jumping over discarded candidates costs no cycles.
- Each cycle issues exactly one digit SAD: one plane of one candidate, all
  `N*N` pixels in parallel. The path from the candidate register through
  `dgu`, `digit_sad` and the comparator back into `me_ctrl` is combinational,
  with no pipelining.
- A search takes `dsad_count` cycles, at most `CW*CH*BITS`. `busy` is high for
  exactly those cycles, and `done` pulses in the cycle after the last one.
- Candidate `k` is at window row `k / CW`, column `k % CW`. The motion vector is
  `mv_m = k % CW - CW/2` (horizontal) and `mv_n = k / CW - CH/2` (vertical). With
  the defaults both run from -2 to +1.

### Top-level ports (`msd_me`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `ld_valid`, `ld_is_ref`, `ld_row`, `ld_col`, `ld_pixel` | in | write one pixel: block (`ld_is_ref=0`, rows/cols `0..N-1`) or window; ignored while busy |
| `start`, `mode_pred` | in | one-cycle start; mode sampled with it (1 = prediction) |
| `busy`, `done` | out | search running; one-cycle result strobe |
| `mv_m`, `mv_n`, `mv_idx` | out | best displacement and its row-major index |
| `min_sad`, `sad_exact` | out | its SAD (a prefix when `sad_exact = 0`) |
| `dsad_count` | out | digit SADs issued in the last search (= its cycles) |
| `ev_discard`, `ev_newmin` | out | strobes: a candidate was dropped; a later candidate replaced the running minimum |

Parameters: `N` (block side, 4), `BITS` (pixel width = number of planes, 8),
`CW`, `CH` (candidate columns and rows, 4 and 4). Package `me_pkg` holds the
defaults and the shared types (`sd_t`, `sw_state_t`, `cmp_t`).

## Where this departs from the paper

- **Comparator circuit.** The paper's comparator works on a serial
  signed-digit SAD stream. It converts each number to sign-magnitude, removes a
  common bias and keeps a few magnitude bits, so its size is independent of the
  word length. Here the decision rule and the bias removal work on binary
  offsets of whole-block prefixes, with a block-wide margin. The clipping rule
  is this design's own. The gate-level circuit is not reproduced.
- **Summation.** The paper sums each plane with signed-digit adders whose
  insides it does not give. Here it is a count of positive minus negative
  digits.
- **Data generation unit.** The paper's unit is a network of one-bit
  flip-flops. Reference bits move through it by shifting up, left and right, by
  as many steps as there are skipped candidates, with a buffer under `4*N*N`
  bits. This design stores the whole window and reaches any candidate through
  multiplexers. It keeps the once-per-pixel fetch but not the small buffer.
- **Choices the paper leaves open**: the start/busy/done handshake, the reset,
  the pixel-serial load port, the 4x4 arrangement of the 16 candidates (the
  paper gives only their number), the centre candidate for an even grid, the
  tie rule, and where the per-candidate state is kept.
- **Not built**: the word-comparison baseline (all planes of every candidate,
  then a word compare), and the off-chip frame memory, which the testbenches
  model with the load port.
- **Timing and area.** The paper reports a 2.84 ns critical path and 1510 gates
  in a 0.35 µm process. Neither is reproduced or checked here. The
  combinational issue path here is longer than the paper's bit-level pipeline
  would be.

## How far it is checked

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sd_abs` | all 65,536 pixel pairs: every prefix equals `\|(c>>z)-(r>>z)\|` |
| `tb_digit_sad` | 3,000 random and edge-case 4x4 blocks, plane by plane |
| `tb_digit_comparator` | the decision table; that no early discard is unsafe; a one-pixel instance ordering the 8-digit signed-digit numbers 37 and 41 exactly at their eighth digit |
| `tb_dgu` | every candidate and plane, after two loads |
| `tb_me_ctrl` | controller with a behavioural datapath: results, counts, cycle counts, restoring of switch states, start ignored while busy |
| `tb_msd_me` | top at default size, 400 searches in both modes |
| `tb_workloads` | 25 candidates with 4-bit pixels; and 961 candidates (±15) with 16x16 blocks of 8-bit pixels |

`tb/me_ref_pkg.sv` is a word-level reference model. It works from pixel values
alone, not from digits, and replays the same search rule. The top-level tests
compare the following against it:
- motion vector, SAD, exactness flag;
- digit-SAD count, busy cycles, discards and new minima.

Separately, the winning candidate's SAD is checked against plain full search.

`tb_msd_me` also requires each mechanism to occur at least once: discard, new
minimum, early stop, search to the last plane, a tie at the minimum, and both
modes. It also writes garbage through the load port during searches, which
must be ignored.

The test images are generated. They are a copy of a window position plus
noise, random data, a flat image, a ramp, and values around 127/128. On these
images, 75% to 98% of the digit SADs of a full word-level search are issued,
depending on the size. The paper reports 35.7% to 61.4% on real video
sequences; those sequences are not part of these tests.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/me_pkg.sv tb/me_ref_pkg.sv \
    tb/tb_msd_me.sv --top-module tb_msd_me -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Replace `tb_msd_me` with any testbench above. To change the size, set
`N`, `BITS`, `CW` and `CH` on `msd_me`. `tb/me_search_harness.sv` shows a
parameterised instance.
