# Nonbinary majority-logic LDPC decoder with adaptive 2D scheduling (GF(4), MLC NAND)

An MLC NAND cell holds one of four threshold-voltage states, so one cell is
naturally one symbol of GF(4). This design decodes a GF(4) LDPC code stored
that way with a *majority-logic* decoder: no probabilities are exchanged,
only finite-field additions/multiplications and small integer
"reliabilities" per symbol value. What sets it apart from a plain
majority-logic (ISRB-style) decoder is the **schedule**. Instead of updating
all checks at once, every iteration walks through the checks one by one in
an order chosen on the fly (first dimension), and inside each check updates
its variable nodes in an order chosen on the fly as well (second dimension).
Every update immediately sees the results of the previous ones, so errors are
attacked where they are most likely first, and decoding converges in a few
iterations.

The default configuration is a length-4544, rate-0.9 code (454 checks,
column weight 5, row weights 50/51, 22720 non-zero entries), with the
constants LAMBDA = 5, THETA = 10, at most 50 iterations and the
early-correcting window I_MLC = 1.

## The quantities the schedule works with

For symbol (cell) `j` and value `l` in GF(4):

| name | meaning | formula |
|---|---|---|
| `R[j][l]` | reliability that symbol j has value l | initial `LAMBDA * sum_t (2 a_{l,t} - 1) q_{j,t}` |
| `z[j]` | hard decision | `argmax_l R[j][l]` |
| `S_v(j)` | VN stability | largest minus second-largest `R[j][.]` |
| `s[i]` | syndrome of check i | `sum_j h_{i,j} z[j]` over GF(4) |
| `S_c(i)` | check stability | `min_j S_v(j)` over the row, replaced by `THETA` when that minimum is 0 |
| `O(j)` | cumulative syndrome | number of unsatisfied checks containing j |
| `phi(i,j)` | extrinsic weight | `min over j' != j of floor(max_l R[j'][l] / LAMBDA)` |

`q_{j,1}, q_{j,2}` are the two 5-bit soft reads of the cell (one per page
bit, positive = "bit is 1"). `a_{l,t}` are the page bits stored in state `l`:
states 0, 1, 2, 3 hold 11, 10, 00, 01 (Gray order from the lowest voltage).
The symbol value *is* the state index, so "adjacent state" means value ±1.

## One iteration

```
P = all ones                                   -- no check visited yet
while some P[i] = 1:
    i = pending unsatisfied check with largest S_c,
        or, if none is unsatisfied, pending check with largest S_c
    P[i] = 0
    order the VNs of row i by O(j), largest first
    for each j in that order:
        z_hat = z[j] + h_{i,j}^-1 * s_i          -- symbol the rest of the check implies
        if EC active and z_hat not in {z_ini, z_ini ± 1}: skip j
        R[j][z_hat] += phi(i,j);  z[j] = argmax;  S_v(j) = ...
        full ATS: recompute s and S_c of every check containing j now
recompute s, S_c, phi for all checks           -- end-of-iteration pass
```

Decoding stops with success as soon as all syndromes are zero (checked
before each iteration, so an error-free page costs only the initial pass),
or with failure after `IMAX` iterations.

`z_hat` uses the identity `h^-1 * sum_{j' != j} h_{i,j'} z_{j'} = z[j] + h^-1 s_i`
(characteristic 2), so the decoder keeps a running syndrome of the selected
check, updated whenever one of its symbols changes, and never re-adds the row.

## Variants (run-time inputs, sampled with the first soft read)

* **Full ATS** (`cfg_simplified = 0`): after each VN update that changes its
  decision or stability, the syndromes and check stabilities of all its
  checks are recomputed at once, so the next selection and ordering use
  up-to-date values. This is the expensive part: `DV` row re-reads per
  update.
* **Simplified ATS** (`cfg_simplified = 1`): syndromes and stabilities are
  refreshed only in the end-of-iteration pass; selection and VN order work
  with the values of the iteration start. The predicted symbol is still
  exact because of the running syndrome.
* **Early correcting** (`cfg_ec_en = 1`): during iterations `k <= I_MLC`
  (the first two with the default) a prediction is used only if it is the
  cell's initial state or a neighbouring one. Misreads of MLC cells are
  overwhelmingly to an adjacent state, so other predictions are treated as
  unreliable in the early iterations. Afterwards every prediction is used.
* **Check-node groups** (`cfg_group_log2 = 1` or `2`, i.e. 2 or 4 groups):
  the checks are split into contiguous groups. Each group runs the schedule
  on its own copy of the reliabilities and decisions, starting from the
  values at the iteration start; at the end of the iteration the increments
  of all groups are added to the starting reliabilities, decisions and
  stabilities are recomputed, and the simplified end-of-iteration pass
  follows. Groups are independent of one another, which is what allows a
  parallel implementation; **this datapath runs them one after another**, so
  the results are those of the grouped algorithm but without the speed-up.

## Microarchitecture

One sequential datapath; one state machine in `nb_ats_decoder`.

Storage (register arrays, no reset, every entry written before use):

| array | depth | content |
|---|---|---|
| `rel_mem` | N | 4 × 16-bit signed reliabilities |
| `z_mem`, `zini_mem`, `sv_mem` | N | decision, initial decision, VN stability |
| `s_mem`, `sc_mem` | M | syndrome, check stability |
| `m1_mem`, `m2_mem`, `m1s_mem` | M | smallest / second smallest weight and the slot of the smallest: `phi(i,j)` is `m2` for that slot and `m1` for all others |
| `pend` | M bits | not-yet-visited checks |
| `rw_mem`, `zw_mem`, `acc_mem` + valid bits | N | group mode: reliabilities of the current group, sum of group increments |

States and their cost per occurrence (`SLOTS = ceil(N/M) * DV`, 55 by
default):

| state | does | cycles |
|---|---|---|
| `LOAD` | reliability init, one symbol per cycle | N |
| `PASS`/`PASS_WR` | syndrome, `S_c`, weights of every check | M × (SLOTS + 1) |
| `SEL`/`SEL_WAIT` | `cn_selector` scans all checks | M + 2 |
| `ROW` | read the row: running syndrome, keys `O(j)` into the sorter | SLOTS |
| `SORT_GO`/`SORT_WAIT` | counting sort by `O(j)` | d + 2 |
| `VN` | one VN update (`vn_update`) | 1 per VN |
| `NBR`/`NBR_WR` | full ATS refresh of the VN's DV checks | DV × (SLOTS + 1) |
| `MERGE` | group mode: fold group sums in | N |
| `OUT` | stream the decision | N |

An error-free page is decided `M × (SLOTS + 1) + 1` cycles after its last
soft read (25 425 cycles by default). A full-ATS iteration at the default
size is dominated by the neighbour refresh, about 6–7 million cycles; a
simplified iteration by the check selection, about 0.3 million. Pages with
a few dozen symbol errors decode in 2–4 iterations.

Blocks:

* `reliability_init` – initial `R`, decision and stability of one cell (combinational).
* `vn_update` – predicted symbol, EC test (`ec_filter`), saturating reliability update, new decision and stability (combinational).
* `ec_filter` – the early-correcting acceptance rule.
* `cn_selector` – the check selection, a one-comparator linear scan (M + 1 cycles).
* `vn_order_sort` – stable counting sort by `O(j)`; keys are 0..DV, so two passes suffice.
* `cn_row_acc` – per-row accumulation of syndrome, `S_c` and the two smallest weights; used by the end-of-iteration pass and by the full-ATS refresh.
* `h_matrix_map` – row and column views of the parity-check matrix, computed from a formula.
* `nbats_pkg` – GF(4) arithmetic, types, the state-to-bits table, arg-max/stability helpers.

## The parity-check matrix

The matrix of the original 4544-symbol code is not published, so
`h_matrix_map` constructs one with the same sizes. The 4544 columns form
ceil(4544/454) = 11 blocks of 454 (the last one has 4 columns). Column
`j = p*M + u` has its 5 non-zero entries in rows
`(u + SH(t,p)) mod M`, `SH(t,p) = (2 t (p+1) + 11 t²) mod M`, `t = 0..4`,
with coefficient `((t + p + u) mod 3) + 1`. Each full block column is a sum
of five circulant permutation matrices. With these shifts every row has
weight 50 or 51, there are 22720 non-zero entries and no 4-cycles. The row
is walked through `NB × DV` "slots" (block, edge); slots of the partial
last block that fall beyond column N−1 are skipped. `SHIFT_A`/`SHIFT_B`
are parameters; another code needs another `h_matrix_map`.

Performance figures obtained with the original code therefore do not carry
over exactly; the algorithm and the dimensions do.

## Interface

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_ec_en`, `cfg_simplified`, `cfg_group_log2` | in | 1, 1, 2 | variant, sampled with the first soft read |
| `llr_valid` / `llr_ready` | in/out | 1 | soft-read handshake, symbols 0..N−1 in order |
| `llr_q1`, `llr_q2` | in | 5 signed | soft reads of page bit 1 and 2, positive = 1 |
| `dec_done` | out | 1 | pulse when decoding ends |
| `dec_success`, `dec_iters` | out | 1, 6 | held until the next page |
| `out_valid` / `out_ready`, `out_sym`, `out_last` | out/in | 1, 2 | decoded states 0..N−1 |
| `ev_*` | out | 1 | event strobes: check chosen unsatisfied / satisfied, EC rejection, decision changed, full-ATS refresh, saturation, iteration start, group merge |

`llr_ready` is high only while idle or loading; a new page can start as
soon as the last symbol of the previous one has been taken. Assertions in
`nb_ats_decoder` check that an offered output symbol is held until taken,
that `dec_done` comes with the first output symbol, and that the iteration
counter never exceeds `IMAX`.

## Where this design makes its own choices

* Reliabilities are 16-bit signed and saturate at +32767; stabilities and
  weights are 16-bit unsigned.
* Ties: arg max picks the lowest state; check selection the lowest index;
  VNs with equal `O(j)` keep row order.
* The reliability update adds the check's weight to the predicted symbol
  only (the classic soft-reliability majority vote).
* The weights are refreshed before the first iteration (equal to the
  static weights at that point) and after every iteration.
* Full ATS skips the neighbour refresh when an update changes neither the
  decision nor the stability (nothing the refresh computes could change).
* Group mode: the sum of group results is taken as the iteration-start
  reliabilities plus each group's increments; group `g` owns checks
  `floor(g M / G)` to `floor((g+1) M / G) − 1`.
* The soft reads come from outside. The flash channel and the read-threshold
  optimisation that produce them are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=F`:

| testbench | what it checks |
|---|---|
| `tb_reliability_init` | all 1024 soft-read pairs against the formula |
| `tb_ec_filter` | all 32 input combinations against the adjacency table |
| `tb_vn_update` | 4000 random updates incl. saturation, against log-table GF(4) |
| `tb_cn_selector` | 300 random scans, priority rule and M + 1 latency |
| `tb_vn_order_sort` | 200 random rows, stable descending order and latency |
| `tb_cn_row_acc` | 300 random rows: syndrome, `S_c` with THETA, min1/min2/slot |
| `tb_h_matrix_map` | default matrix: row/column views agree, weights 50/51, 22720 edges, distinct rows per column |
| `tb_nb_ats_decoder` | 28 pages on a 214-symbol code (53 checks, column weight 3) in every variant and group count; 26 of them are also decoded by a behavioural model of the algorithm inside the testbench, and decisions, success flag and iteration count must match exactly; includes failing pages, the error-free latency, and checks that every mechanism occurred |
| `tb_nb_ats_full` | default size (4544 symbols): an error-free page and pages with 40 adjacent and 3 non-adjacent errors in full ATS, simplified ATS, 2-group and 4-group mode, all with early correcting (about a minute) |

The pages are the all-zero codeword (every cell in state 0) with injected
misreads; the success flag is checked against a syndrome computed in the
testbench.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nbats_pkg.sv \
    tb/tb_nb_ats_decoder.sv --top-module tb_nb_ats_decoder -Mdir obj
./obj/Vtb_nb_ats_decoder
```

Lint: `verilator --lint-only -Wall -Irtl rtl/nbats_pkg.sv rtl/nb_ats_decoder.sv`.
The remaining lint warnings are unused signals (the column coefficients of
`h_matrix_map` and the predicted symbol are not needed by the top).
