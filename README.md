# Column-parallel DTW arrays: a ring, a chain, and their reduced forms

Dynamic time warping (DTW) compares a reference utterance A = a_1..a_I with a
test utterance B = b_1..b_J (each a sequence of feature vectors) by finding the
cheapest monotone alignment path from (1,1) to (I,J) through the I x J grid of
frame pairs. With an *adjustment window* |i - j| <= r, each column i of the
grid contains at most 2r+1 points that matter. The key observation behind this
RTL is that **all points of column i can be computed at once, in parallel,
once columns i-1 and i-2 are known**. So an array of 2r+1 processing elements
(PEs) sweeps the window column by column, one column per *step*, and finishes
in I + r + 1 steps whatever J is.

Four arrays are provided, all computing the same number:

| array | module | PEs | idea |
|---|---|---|---|
| linear | `dtw_lin_array` | 2R+1 | each PE stays on one **diagonal** of the window; test vectors shift down the chain |
| circular | `dtw_circ_array` | 2R+1 | each PE stays on one **row** (test frame) for 2R+1 columns, then jumps to the top of the window; a token circulates in a ring |
| reduced linear | `dtw_rlin_array` | NP < 2R+1 | linear scheme, each PE computes M = ceil((2R+1)/NP) diagonals in turn |
| reduced circular | `dtw_rcirc_array` | NP < 2R+1 | circular scheme, each PE hosts M ring positions in turn |

`dtw_top` places all four side by side, each with its own ports. The
partitioning schemes follow the paper *Parallel Partitioning Techniques for the
DTW Algorithm in Speech Recognition*; the cycle timing, bus protocol, number
formats, boundary handling and the insides of the reduced arrays are this
implementation's own (see "Departures and own choices").

## The recurrence

The local distance is the squared Euclidean distance between feature vectors,

    d(i,j) = sum_e (a_i[e] - b_j[e])^2

and the partial sums follow the symmetric Sakoe-Chiba form with slope
constraint P = 1:

    S(i,j) = min { S(i-1,j-2) + 2 d(i,j-1) + d(i,j)     (a)
                   S(i-1,j-1) + 2 d(i,j)                (b)
                   S(i-2,j-1) + 2 d(i-1,j) + d(i,j) }   (c)

with S(1,1) = 2 d(1,1), and every point with i < 1, j < 1, j > J or
|i - j| > R unreachable. The result is S(I,J), not normalised; if
|I - J| > R there is no path and `result_ok` stays low.

"Unreachable" is the all-ones value `DIST_INF` of a 32-bit unsigned number.
All additions saturate (`dtw_pkg::sat_add`), so an unreachable predecessor
makes its candidate `DIST_INF` and it never wins the minimum. `dtw_dpe` is the
combinational three-way minimum; each PE decides which of its registers feed
(a), (b) and (c).

## Sweeping the window: steps and initialisation

Step t works on column i = t - R - 1. The first R+1 steps compute nothing;
they fill the PEs with b_1..b_{R+1} and a_1. During step t the reference
pattern bus (RPB) brings a_{t-R} into *every* PE (broadcast) and the test
pattern bus (TPB) brings b_t into *one* PE; both are used from step t+1 on.
A run therefore takes I + R + 1 steps.

Every PE stores its vectors in two small memories, Ma and Mb, of L elements.
A step begins with L cycles in which element e of Ma and Mb enters a serial
multiply-accumulate (`dtw_dist_mac`); in the same cycle element e of the next
vector is written into the same address. Reading and writing the same address
in one cycle lets each memory be loaded and used at once without double
buffering. The transfer phases follow (`dtw_pkg::phase_e`):

| phase | cycles | what happens |
|---|---|---|
| `PH_MAC` | L (M x L in the reduced arrays) | local distance accumulated; next vectors streamed in |
| `PH_DXFER` | 1 | distances latched and exchanged with the neighbours |
| `PH_SUM` | 1 (M) | new partial sum computed and passed to the neighbours |
| `PH_SHIFT` | 1, ring and reduced arrays only | second-hop transfer, token moves, commit |

`dtw_seq` counts steps, phases, elements and slots for all arrays.

## The linear array

PE p(k), k = 1..2R+1, always computes the point on diagonal k = j - i + R + 1,
so p(R+1) follows the main diagonal. Moving from column i to i+1 keeps the
diagonal but raises the row by one, so each PE needs the test vector its upper
neighbour had: Mb contents shift **down** the chain by one PE per step, and the
top PE p(2R+1) takes the new vector b_{i+R+1} from the TPB.

On diagonals, the three predecessors of (i,j) are: the PE itself one step ago
(b), the lower neighbour one step ago (a) and the upper neighbour two steps
ago (c). Registers at the end of step t:

    S0 = S_t(k)     S1 = S_t(k-1)     S2 = S_t(k+1)     S3 = S_{t-1}(k+1)
    d1 = d_t(k)     d2 = d_t(k-1)     d3 = d_t(k+1)     d4 = d_{t-1}(k+1)

    new S0 = min{ S1 + 2 d2 + d1,  S0 + 2 d1,  S3 + 2 d4 + d1 }

In `PH_DXFER` a PE takes d1 from its own accumulator, d2 and d3 from its
neighbours and moves d3 into d4. In `PH_SUM` it writes the new sum to S0, takes
the neighbours' new sums into S1 and S2, and moves S2 into S3. The two ends of
the chain see `DIST_INF` sums, because they lie outside the window. After the
last step S(I,J) is in S0 of p(J-I+R+1).

## The circular array (hardest part)

Here a PE keeps one **row** j, and its vector b_j, while the window slides
across it: 2R+1 columns, from i = j-R, where it is the bottom of the window, to
i = j+R, where it is the top. After being at the bottom it has nothing more to
do on row j. It then takes row j+2R+1, which is exactly the new top of the
next column. The PEs thus form a ring p(0) -> p(1) -> ... -> p(2R) -> p(0). The
order of PEs up a column rotates by one position per step, and test vectors
never move between PEs.

Along a column the PE below p(k) is its ring predecessor p(k-1), except at
the bottom, where the ring wraps to the top. Which PE is at the bottom is
marked by a **control token**, one flip-flop per PE, passed to the next PE at
the end of every step. At step t the token is in PE (t-1) mod (2R+1). The token
holder has three special duties:

1. It ignores term (a). S(i-1, j-2) lies outside the window, and its ring
   predecessor is actually the top PE.
2. It absorbs its new test vector b_{j+2R+1} from the TPB during `PH_MAC`.
3. It loads `DIST_INF` into S2. In the next step it is at the top of the
   column, where term (c), S(i-2, j-1), is outside the window.

Each PE also records its row number. The token holder loads the step number
as its new row when it absorbs, and this row is used to mask rows outside
1..J and to find the end point (I,J). Registers at the end of step t (p(k-1) is
the ring predecessor):

    S0 = S_t(k)     S1 = S_t(k-1)     S2 = S_{t-1}(k-1)     S3 = S_t(k-2)
    d1 = d_t(k)     d2 = d_{t-1}(k)   d3 = d_t(k-1)

    new S0 = min{ S3 + 2 d3 + d1,  S1 + 2 d1,  S2 + 2 d2 + d1 }

S3 holds a value from **two** PEs back. It arrives in two hops: in `PH_SUM`
each PE's new sum goes into the successor's S1 (and the old S1 into S2).
Then in `PH_SHIFT` each successor copies its predecessor's *new* S1 into its
S3. The d registers need only one hop: in `PH_DXFER`, d1 <= own distance,
d2 <= old d1, d3 <= predecessor's distance.

The result is read from S0 of the PE whose row is J, in `PH_SHIFT` of the last
step, and kept in an output register. It cannot stay in S0 unread: if that PE
holds the token, it takes a new row at the end of the same step.

## Reduced arrays: fewer PEs than window points

With NP < 2R+1 PEs, each PE handles M = ceil((2R+1)/NP) window points per
column, one after the other, in slots s = 0..M-1. A step then has M x L MAC
cycles and M sum cycles. Each PE has one distance unit and one recurrence unit,
shared by its slots. Its storage grows with M: one Mb per slot, plus per slot
the distances of this and the last step (dc, dp) and the sums of the last two
columns (sp = S_{t-1}, spp = S_{t-2}). New sums go into a staging array sn and
are committed in `PH_SHIFT`, so every slot reads the previous step's values
whatever the processing order. Neighbouring points in the same PE are read
directly. Only the edge slots' values cross the links between PEs.

**Reduced linear** (`dtw_rlin_pe`): PE p(Q) owns the diagonals
(Q-1)M+1-PAD .. QM-PAD. The PAD = NP*M - (2R+1) idle slots sit at the bottom
of p(1), so the top slot of p(NP) is diagonal 2R+1 and still takes the TPB.
Test vectors move down one slot per step by advancing a pointer over a ring of
M+1 Mb entries. The spare entry is filled, during slot 0, from the bottom slot
of the PE above. The new reference vector is written during the last slot,
after all slots have used the old one.

**Reduced circular** (`dtw_rcirc_pe`): the 2R+1 ring positions are dealt out in
consecutive runs of M; the last PE gets the remainder and idles in its extra
slots. The token walks from position to position, crossing from the last real
position of p(Q) to slot 0 of p(Q+1). The TPB is read in the slot of the
token holder. Term (a) needs the position two back, so each PE passes on the
sums of its last *two* positions. A "held the token last step" flag per
position replaces the S2 := infinity rule.

## Interfaces and timing

All four arrays have the same ports (in `dtw_top`, prefixed `circ_`, `lin_`,
`rlin_`, `rcirc_`):

| port | dir | width | meaning |
|---|---|---|---|
| `start` | in | 1 | start a run when idle; latches `i_len`, `j_len` (both >= 1) |
| `i_len`, `j_len` | in | 8 | I and J in frames |
| `busy` | out | 1 | run in progress |
| `done` | out | 1 | one-cycle pulse at the end of the run |
| `result` | out | 32 | S(I,J), valid from `done` until the next start |
| `result_ok` | out | 1 | a path exists (and `result` is finite) |
| `rpb_rd`, `rpb_vec`, `rpb_elem` | out | 1, 8, clog2(L) | read element `rpb_elem` of a_`rpb_vec` |
| `rpb_data` | in | 8 | that element, signed, **in the same cycle** |
| `tpb_rd`, `tpb_vec`, `tpb_elem`, `tpb_data` | | | the same for b |

The pattern source is read asynchronously, like a small RAM or register file
holding the two utterances. Data in cycles without a read strobe is ignored.
Reads happen only in `PH_MAC`, for frames that exist (1..I, 1..J).

Latency from the `start` cycle to `done`, in clock cycles:

| array | latency | I = J = 40, R = 7, L = 16 |
|---|---|---|
| linear | 2 + (I+R+1)(L+2) | 866 |
| circular | 2 + (I+R+1)(L+3) | 914 |
| reduced (both), NP = 2, M = 8 | 2 + (I+R+1)(M L + M + 2) | 6626 |

For I = J = 40 and r = 7 the window holds 544 points. The full arrays finish
in 48 steps with 15 PEs, so 544 / (48 x 15) = 76 % of PE-steps do useful
work.
In general the window holds W = IJ - (I-R-1)(I-R)/2 - (J-R-1)(J-R)/2 points,
so the speedup in steps over a single PE is W / (I+R+1), here about 11.3, and
the efficiency is W / ((I+R+1)(2R+1)). The reduced arrays need the same number
of steps, but each step is M times longer, and their NP PEs are busy in
W / ((I+R+1) NP M) of their slots.

## Parameters and number formats

| name | where | default | meaning |
|---|---|---|---|
| `R` | top, arrays | 7 (top), 3 (reduced arrays alone) | window half-width; full arrays have 2R+1 PEs |
| `NP` | top, reduced arrays | 2 | PEs of the reduced arrays |
| `L` | everywhere | 16 | elements per feature vector |
| `FEAT_W` | `dtw_pkg` | 8 | bits per element, signed |
| `DIST_W` | `dtw_pkg` | 32 | bits per distance and partial sum, saturating |
| `IDX_W` | `dtw_pkg` | 8 | bits per frame index (utterances up to 255 frames) |

R = 7 with I = J = 40 is the typical case the paper evaluates. R = 3 with two
PEs is its example for the reduced schemes. L and all widths are not given in
the paper. Worst-case sums: one distance is at most L x 255^2 (about 2^20), and
a path has at most 2(I+J) weighted terms, so 32 bits do not saturate for
realistic lengths.

## Departures and own choices

- **Boundary conditions.** The paper leaves them to the Sakoe-Chiba
  definitions. Here: S(1,1) = 2 d(1,1), end point (I,J), no normalisation by
  I+J.
- **Register contents of the ring PE.** S3 = S_t(k-2) and d3 = d_t(k-1), as
  the transfer order of the scheme produces and as the recurrence requires.
- **Clock timing.** The paper orders the operations of a step but gives no
  cycle timing. The phase split, the serial distance unit and the
  read-then-write use of Ma/Mb are this design's. Nothing is overlapped
  between steps, so a pipelined version could shorten a step to about L
  cycles.
- **PE control units** are reduced to decoding the shared sequencer's phase.
  Each PE keeps only what is local to it: the token and the row in the ring,
  and its diagonal number, from a parameter, in the chain.
- **Reduced arrays.** The paper gives the partitioning, the interconnect (that
  of the full arrays) and the fact that PE memory grows with m. Slot order,
  padding placement, the Mb pointer ring and the position-to-PE mapping are
  this design's.
- **Pattern buses** are modelled as an addressed, same-cycle read port. The
  memories that hold the utterances are outside the design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/dtw_ref_pkg.sv`
holds random patterns and a plain dynamic-programming DTW over the whole grid,
independent of the arrays' scheduling.

| testbench | what it checks |
|---|---|
| `tb_dtw_dpe` | 2000 random operand sets, with infinities and saturation, against a 64-bit model |
| `tb_dtw_dist_mac` | 200 vector pairs including -128/127 extremes |
| `tb_dtw_seq` | phase order, element counter, bus indices, step count and latency, with and without `PH_SHIFT` |
| `tb_dtw_lin_pe`, `tb_dtw_circ_pe` | 300-400 random steps against a register-level model (token rules, masking, start point) |
| `tb_dtw_lin_array`, `tb_dtw_circ_array` | R = 2 (5 PEs): results vs. reference for I = J, I < J, I > J, \|I-J\| = R, \|I-J\| > R, one-frame inputs; latency; bus read counts |
| `tb_dtw_rlin_array`, `tb_dtw_rcirc_array` | the same with R = 3, NP = 2 |
| `tb_dtw_top` | all four arrays at default size, in parallel; I = J = 40 plus 10 more runs up to 200 frames; counts that each mechanism occurred (start point, masking, ring bottom rule, token wrap and crossings, padding slot, test-vector input) |

The reduced arrays were also run with NP = 3, 4 and 7 (R = 3) by changing
`NP` in their testbenches. All pass. Run any testbench with plain Verilator
from the repository root, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dtw_pkg.sv tb/dtw_ref_pkg.sv tb/tb_dtw_top.sv --top-module tb_dtw_top
    ./obj_dir/Vtb_dtw_top

The whole default-size end-to-end test runs in well under a second.
Assertions check that a run never starts with a zero length, and that exactly
one ring PE holds the token.

## Files

- `rtl/dtw_pkg.sv`: types, widths, `DIST_INF`, saturating add, phase enum
- `rtl/dtw_dist_mac.sv`, `rtl/dtw_dpe.sv`: the PE arithmetic
- `rtl/dtw_seq.sv`: step/phase sequencer
- `rtl/dtw_lin_pe.sv`, `rtl/dtw_lin_array.sv`: linear array
- `rtl/dtw_circ_pe.sv`, `rtl/dtw_circ_array.sv`: circular array
- `rtl/dtw_rlin_pe.sv`, `rtl/dtw_rlin_array.sv`: reduced linear array
- `rtl/dtw_rcirc_pe.sv`, `rtl/dtw_rcirc_array.sv`: reduced circular array
- `rtl/dtw_top.sv`: the four arrays side by side
- `tb/`: testbenches and the reference model
