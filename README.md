# MMF-LSD: a metric-first list sphere detector for MIMO in SystemVerilog

A spatial-multiplexing MIMO receiver has to recover several transmitted QAM
symbols that arrive superimposed at its antennas, and a channel decoder after
it wants soft information: a log-likelihood ratio (LLR) per bit, not just a
hard decision. A list sphere detector approximates the optimal soft detector
by finding a short list of the symbol vectors that lie closest to what was
received, and then computing max-log LLRs from that list.

This design searches the tree of candidate vectors **metric first**: it always
extends the open node with the smallest partial distance, which visits the
fewest nodes of any search order. That order normally needs a sorted store of
open nodes; here it is a hardware binary heap. Three measures keep the
hardware cost and the run time bounded:

* a hard limit `dmax` on the number of search iterations (nodes extended);
* two binary-heap memories: a min-heap **S** of open partial candidates and a
  max-heap **L** of the best complete candidates found so far;
* a **memory sphere radius** `C_mem`: a node goes into S only if its partial
  distance is below `W_R` times a running average of earlier searches' best
  distances. This saves heap traffic and iterations in hard channels.

The default build handles 4 transmit antennas (8 real layers) with 64-QAM,
a 150-entry partial memory, a 15-entry list and 15-bit data words. The same
hardware runs 4-, 16- and 64-QAM and 1 to 4 antennas, selected at run time.

## Signal model and numbers

The detector works on the real-valued, triangularised problem

    y~ = R x + noise,   R upper triangular (MT x MT), MT = 2 * N_T

R and y~ come from a (sorted) QR decomposition of the channel. That
decomposition is not part of this RTL: `r` and `y` are inputs. Each real
layer carries a PAM symbol with index `k = 0 .. Q-1` and value
`w(k) = 2k - (Q-1)`, where `Q = 2**qlog` (qlog 1, 2, 3 for 4-, 16- and 64-QAM).

The tree is searched from the last layer (row `mt-1`) down to layer 0. The
partial Euclidean distance (PED) of a node whose layers `i..mt-1` are fixed is

    b_i  = y~_i - sum_{j>i} R[i][j] * w(x_j)
    d(i) = d(i+1) + |b_i - R[i][i] * w(x_i)|^2

Number formats (`rtl/mmf_pkg.sv`):

| quantity | format |
|---|---|
| `y~`, `R`, `b` | signed 15 bit, 8 fractional bits, `b` saturated |
| error magnitude `\|e\|` | unsigned 15 bit, saturated |
| PED / ED | unsigned 24 bit, 8 fractional bits, saturating add of `\|e\|^2 >> 8` |
| `w_r` | unsigned 8 bit, 4 fractional bits (2.0 = 32, 2.5 = 40) |
| `noise` (2 sigma^2) | same units as a PED |
| LLR | signed 8 bit, 4 fractional bits, clipped to +-127/16 (just under 8) |

The 15-bit word length is the figure for 64-QAM. The integer/fraction split,
the PED width and all the saturation rules are choices of this design.

## How the search runs

A node (`node_t`) holds its symbol indices, its level `lvl` (the lowest
fixed layer; `lvl = mt` is the root, `lvl = 0` a complete vector), its PED
`d`, its parent's PED `dpar` and its Schnorr-Euchner rank `rank` (0 = the
symbol closest to the unconstrained estimate on that layer, 1 = second
closest, and so on).

Each **iteration** extends one node, the current node `cur`, in two ways at
once. The tree pruning unit (`tpu`) holds two identical extension modules:

* **child Nc**: the best symbol on layer `lvl-1`, PED built on `cur.d`;
* **next sibling Nf**: the symbol of rank `rank+1` on layer `lvl`, PED built
  on `cur.dpar`. This is why every node carries its parent's PED.

The two together enumerate the tree exactly once, in Schnorr-Euchner order
under each parent, without ever holding all children of a node.

When both extensions are done, the control unit (`cntr`):

1. **Leaf check.** An extended node on layer 0 is a complete candidate. It
   is offered to L. L inserts it while it holds fewer than 15 entries. Once
   full, L keeps it only if it beats L's worst entry (the heap top), which
   it then replaces.
2. **Selection.** The next `cur` is the smallest-PED node among Nc, Nf and
   S_0, the top of S. Ties go to Nc, then Nf, then S_0. A leaf can be
   selected too; then only its sibling is formed.
3. **Storing.** The extended nodes that were not selected go to S, but only
   if their PED is below both `C_mem` and `C_0`. `C_0` is the list radius:
   the worst ED in L once L is full, unlimited before. If S_0 was selected,
   it leaves S. The first stored node is written over the top and sifted down,
   and a second one is appended and sifted up. If S_0 stays, the new nodes are
   only appended. Nodes that win the selection never touch the memory.
4. **Stop.** The search ends on one of three conditions, reported on
   `stop_reason`:
   * `STOP_LIMIT`: `dmax` iterations have run;
   * `STOP_EMPTY`: no open node is left (the whole tree has been seen);
   * `STOP_RADIUS`: the selected node's PED is not below `C_0`, so no better
     candidate can exist.

Without the limit and without `C_mem`, this search ends with exactly the 15
vectors of smallest ED in L. The testbenches check this against an
exhaustive search.

The iteration is overlapped. While the TPU extends `cur`, S and L are still
sifting the nodes stored by the previous iteration. The decision waits for
all three, so an iteration lasts as long as the slower of the TPU and the
heap.

### Timeline of one iteration (64-QAM, 8 layers, N_MUL = 2, N_MAC = 4)

| cycles | TPU | S / L |
|---|---|---|
| 1 | start pulse | previous stores being sifted |
| 1..4 | `b_calc`: 2 products of `b` per cycle (up to 7 terms) | one heap level per cycle |
| 2 | `see_ped`: 8 error magnitudes, 4 per cycle | |
| 1 | n-th minimum search over the 8 errors | |
| 1 | square and add to the base PED | |
| 2 | done collected, decision, store request issued | new stores start |

This comes to 8 to 13 cycles per iteration, depending on the layer. Over
whole 4x4 searches the average is 12.0 cycles for 16-QAM and 13.0 for
64-QAM. A 150-entry heap has 8 levels, so a sift always ends
within one TPU extension.

## Blocks

| module | role |
|---|---|
| `mmf_lsd_top` | detector: search, memory radius, LLRs |
| `mmf_lsd_alg` | the search: `tpu`, `part_mem`, `final_mem`, `cntr` |
| `tpu` | two `cand_ext` modules: child and next sibling |
| `cand_ext` | `b_calc` followed by `see_ped` for one layer |
| `b_calc` | `b = y~_i - sum R_ij w(x_j)`, `N_MUL` multipliers, one group per cycle |
| `see_ped` | `\|b - R_ii w(k)\|` for all symbols (`N_MAC` per cycle), n-th minimum, square, add |
| `heap_unit` | generic binary heap: insert / replace-top / pop, one level per cycle |
| `part_mem` | S: 150-entry min-heap of nodes, store filter and store order, statistics |
| `final_mem` | L: 15-entry max-heap of candidates, compare-with-top, `C_0`, minimum ED |
| `cntr` | iteration counter, leaf check, selection, stop conditions |
| `cmem_unit` | `C_mem = W_R * average(min ED)` |
| `llr_unit` | reciprocal of 2 sigma^2, scaling, per-bit minima, clipping |
| `recip_div` | bit-serial restoring divider `2**24 / den` |
| `mmf_pkg` | widths, `node_t`, `cand_t`, `heap_op_e`, `stop_e`, helper functions |

### Heap memories

`heap_unit` keeps its elements in a register array with 0-based addresses:
the children of X are `2X+1` and `2X+2`, and the parent is `(X-1)>>1`. The
element being placed stays in a register. Each cycle one step reads either
the parent or both children, compares, and writes one word. Three
operations exist:

* `HOP_INSERT`: write at the next free address, then sift up;
* `HOP_REPLACE`: overwrite the top, then sift down;
* `HOP_POP`: move the last element to the top, then sift down.

The PED sits in the most significant bits of each element, so the heap
compares only the top `KEY_W` bits. `part_mem` and `final_mem` wrap the heap
with their own policies. S cannot overflow while `dmax <= D_MAX`: each
iteration removes up to one node and adds up to two. `cntr` clamps `dmax`
to `D_MAX`. An overflowing insert is dropped and shown on `s_overflow`.

`part_mem` counts up-heap operations, down-heap operations and nodes that
`C_mem` turned away, per search (`n_up`, `n_down`, `n_mem_drop`). These are
the statistics by which the memory radius is judged.

### Memory sphere radius

`cmem_unit` folds each search's smallest listed ED into an exponential
average, `avg += (min_ed - avg) / 16`. The first sample loads `avg` directly,
and searches with an empty list are skipped. `C_mem = avg * w_r / 16` applies
from the next search on. With `cmem_en = 0`, or before the first sample,
`C_mem` is unlimited and only `C_0` limits S. Suitable factors are about 2.0
for 16-QAM and 2.5 for 64-QAM.

### LLR unit

For each bit k, the unit computes

    L(b_k) = min{ d(x)/(2 sigma^2) : x in L, b_k = 0 }
           - min{ d(x)/(2 sigma^2) : x in L, b_k = 1 }

It works in three steps:

1. **Reciprocal.** `recip_div` forms `2**24 / noise` in 25 cycles. A
   `noise_load` pulse starts this division ahead of the list. The top
   issues it with `start`, so the division runs during the search.
2. **Scaling.** Two multipliers scale the 15 EDs in 8 cycles.
3. **Bit loop.** One bit per cycle, 15 parallel comparators find both
   minima, and the difference is clipped.

A bit value missing from the list gives the clipped extreme. Bits are Gray
labels of the PAM index, `g = k ^ (k >> 1)`. They come out layer 0 first,
most significant bit first: `llr_idx = layer * qlog + (qlog - 1 - bit)`.
Mapping real layers back to antennas and I/Q, and undoing any ordering from
the QR decomposition, is left to the surrounding receiver. With the
reciprocal loaded ahead, latency is `8 + mt*qlog` cycles: 32 for 64-QAM and
24 for 16-QAM with 4 antennas. That is 188 and 167 Mbit/s at 250 MHz.
Without a load, `start` runs the division first, and latency is
`24 + 8 + mt*qlog + 3` cycles. `div_wait` is high while a vector waits for
the divider; the top holds `ready` low then, so a new load cannot disturb it.

The unit copies the list when it starts. The next search can therefore run
while the LLRs of the previous subcarrier stream out.

## Top-level interface (`mmf_lsd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start a detection (taken while `ready`) |
| `mt` | in | 4 | real layers, 2 N_T (1..8) |
| `qlog` | in | 2 | 1/2/3 = 4/16/64-QAM |
| `dmax` | in | 8 | iteration limit (clamped to `D_MAX`) |
| `r` | in | 8x8x15 | `R[row][col]`, signed, 8 fractional bits |
| `y` | in | 8x15 | `y~` |
| `noise` | in | 24 | 2 sigma^2, PED units |
| `w_r`, `cmem_en`, `cmem_clear` | in | 8, 1, 1 | memory radius factor, enable, restart the average |
| `ready` | out | 1 | a new detection may start |
| `search_done` | out | 1 | search finished, statistics valid |
| `iters`, `stop_reason` | out | 8, 2 | iterations used, why it stopped |
| `n_up`, `n_down`, `n_mem_drop`, `s_overflow` | out | 16, 16, 16, 1 | heap statistics of the last search |
| `c_mem`, `min_ed` | out | 24 | current memory radius, best ED of the last list |
| `llr_valid`, `llr_idx`, `llr`, `llr_done` | out | 1, 5, 8, 1 | LLR stream, last-bit marker |

Hold `r`, `y`, `mt`, `qlog` and `dmax` stable from `start` to `search_done`.
`noise` is sampled with `start`.

Parameters with their defaults are `D_MAX = 150`, `N_CAND = 15`,
`N_MUL_B = 2` (multipliers in `b_calc`), `N_MAC = 4` (error units in
`see_ped`), `LLR_W = 8`, `IT_W = 8`, `CNT_W = 16` and `WR_W = 8`. For
16-QAM-only use, `dmax = 80` is the matching limit, and `N_MAC = 2` gives
the smaller datapath of that configuration. Layer count, alphabet size and
word widths are package constants (`MT`, `QMAX`, `W`, `FRAC`, `PED_W`).

## Throughput and the effect of C_mem

Detection time is about `iterations x 12..13 cycles`. It depends on the
channel and the noise. `tb/tb_workload_cmem.sv` detects 40 random 4x4
channels per configuration, twice each (without and with the memory
radius). It printed:

| configuration | C_mem | avg iterations | up-heaps / search | down-heaps / search | cycles / search | Mbit/s at 250 MHz |
|---|---|---|---|---|---|---|
| 16-QAM, dmax 80 | off | 69.0 | 41.9 | 46.2 | 832 | 4 |
| 16-QAM, dmax 80 | W_R = 2.0 | 24.2 | 3.0 | 7.0 | 291 | 13 |
| 64-QAM, dmax 150 | off | 71.9 | 41.8 | 49.4 | 940 | 6 |
| 64-QAM, dmax 150 | W_R = 2.5 | 34.4 | 4.9 | 11.6 | 451 | 13 |

The channels are synthetic, with uniform noise of about +-1 on a unit-scale
diagonal. The numbers show the trend, not a performance figure for any
standard channel. Published averages for this kind of search at the
operating points of interest are 77 (16-QAM) and 116 (64-QAM) iterations
without the memory radius, and 47 and 93 with it. At high SNR a search
needs about ten iterations, so one unit then delivers roughly
24 bits / (10 x 13 cycles) x 250 MHz, about 45 Mbit/s for 64-QAM. Several
search units can share one LLR unit, which needs 32 cycles per 64-QAM vector.

## Departures and open points

* **Interpretation of the search details.** The algorithm's outline fixes
  the child / next-sibling extension, the selection among Nc, Nf and S_0,
  the C_mem / C_0 store conditions and the iteration limit. Several details
  are this design's reading:
  * the parent PED stored in each node;
  * the tie rules;
  * how leaves reach their siblings;
  * the two extra stop conditions, empty and radius.
* **Store condition.** A node is stored when `d < C_mem`, as the definition
  of the memory radius requires. The opposite sense would discard the best
  nodes.
* **One datapath for all constellations.** The datapath is sized for 64-QAM
  with 15-bit words and runs 16-QAM at run time. A build dedicated to 16-QAM
  would use 12-bit words and fewer units.
* **Register-array memory.** The partial memory is a register array with
  three read addresses and one write per cycle, in place of a dual-port SRAM
  macro. With an SRAM, reads become synchronous, and each heap step needs a
  read cycle and a write cycle.
* **No pipelining.** Multipliers are single-cycle and combinational; no
  pipeline registers are inserted inside them. At 250 MHz in an older
  process, the 15x5-bit products and the 8-way n-th-minimum search would
  need retiming.
* **Reciprocal timing.** The reciprocal is bit-serial (25 cycles). It is
  computed during the search, not after it.
* **Outside this RTL.** Sorted QR decomposition, the channel decoder and
  any per-antenna bit interleaving are outside this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. Reference arithmetic lives in
`tb/mmf_ref_pkg.sv`: plain integer models of the number formats, the
Schnorr-Euchner ranking and the full fixed-point ED, plus a random channel
generator.

| testbench | what it checks |
|---|---|
| `tb_b_calc`, `tb_see_ped`, `tb_cand_ext`, `tb_tpu` | values against the reference arithmetic, exact cycle counts, saturation, rank beyond the alphabet, root / leaf / last-sibling nodes |
| `tb_heap_unit` | min- and max-heap under random insert / replace / pop against a model, heap order of all entries, overflow, clear |
| `tb_part_mem` | store filter (C_mem, C_0), replace-first store order, counters |
| `tb_final_mem` | list always the 15 smallest offered EDs, C_0, minimum, rejections |
| `tb_mmf_lsd_alg` | 150 random searches (4/16/64-QAM, 1..8 layers). When the limit is not hit, the list equals the exhaustive 15-best list and holds the ML vector. Always: each ED matches its vector, vectors are distinct, iterations stay within `dmax`. All stop reasons, heap operations and C_mem drops occur. |
| `tb_cmem_unit`, `tb_recip_div`, `tb_llr_unit` | average and radius model; exact quotients and latency; every LLR against the formula, bit order, clipping, latency with and without a preloaded reciprocal (the noise input is scrambled after the load) |
| `tb_workload_cmem` | default top, 4x4 16-QAM (dmax 80, W_R 2.0) and 64-QAM (dmax 150, W_R 2.5) streams without and with C_mem. Checks the ML distance against an exhaustive search, the iteration limit and no S overflow. The radius must discard nodes and reduce heap operations. The average iteration must take at most 14 cycles (16-QAM) or 17 cycles (64-QAM), which is 56 and 68 ns at 250 MHz. Prints the statistics table above. |
| `tb_mmf_lsd_top` | default parameters, 24 subcarriers back to back (4x4 64-QAM and 16-QAM, 2x2 64-QAM, 1x1 4-QAM). LLRs equal those of the exhaustive list. Hard decisions equal the sent bits at low noise. C_mem follows the model. The LLR unit overlaps the next search. After a search of more than 26 cycles, the LLRs follow within `8 + mt*qlog + 2` cycles. Every mechanism is exercised. |

To run one with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/mmf_pkg.sv tb/mmf_ref_pkg.sv tb/tb_mmf_lsd_alg.sv \
        --top-module tb_mmf_lsd_alg -Mdir obj && ./obj/Vtb_mmf_lsd_alg

The same command works for any testbench. Those of `b_calc`, `see_ped`,
`cand_ext`, `tpu`, the search and the top need `tb/mmf_ref_pkg.sv`. All
tests finish in well under a second of simulation time.

Not verified: timing closure at any clock rate, gate count, and the
error-rate performance of the fixed-point formats on real channels. The
tests compare against a model with the same fixed-point rules. They show
that the hardware does what that model does, not that the formats are good
enough.
