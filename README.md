# Run-time configurable NTT/INTT accelerator based on a 3D decomposition

This design computes the negacyclic number-theoretic transform (NTT) and its inverse, as used in
lattice-based homomorphic encryption. The polynomial degree N is chosen per operation, from
2^12 to 2^18, and the coefficients are 60 bits wide. For N = 2^12 it needs about 1100 clocks.

The main idea is to avoid building one huge pipeline for the largest N. Instead, the coefficient
vector is seen as a three-dimensional tensor of n x n x m elements, with n = 64 fixed and m = N / n²
chosen at run time. The full transform then becomes three passes of small transforms:

* the first along the m-long axis,
* the second and third along the two n-long axes,
* with element-wise "dimension-switching" factors between the passes.

One datapath handles all three passes: four pipelined size-n NTT units, each with a pair of
modular multipliers in front. Eight memory banks feed that datapath with eight coefficients per
clock. A twiddle-factor generator makes every switching factor on the fly from a small n x n
table.

## The arithmetic

The tensor layout is as follows:

* Input coefficient a_l, with l = i + n·j + n²·k, sits at (i, j, k).
* Output A_r = Σ_l a_l ψ^{l(2r+1)} sits at (i, j, k) with r = k + m·j + m·n·i. Here ψ is a primitive 2N-th root of unity mod q.

Split l and r this way and the exponent l(2r+1) factors into pieces that each involve only some
of the indices. That gives three passes:

| pass | transform | size | factor applied before the pass |
|---|---|---|---|
| column | along k, negacyclic | m | ψ^{i + n j} (the "twist") |
| row | along j, cyclic | n | ω_{nm}^{j·k} |
| depth | along i, cyclic | n | ω_{n²}^{i·j} · ω_N^{i·k} |

Here ω_x is a primitive x-th root with ω_{2N} = ψ. The inverse runs the three passes in reverse
order (depth, row, column), with inverse roots.

* Each inverse butterfly halves its result, which folds the 1/N scaling into the passes.
* In the inverse, the factor of a pass is applied after that pass's sub-transforms instead of before them. Each inverse pass is then the exact mirror of a forward pass.

When m = 1 the column pass has size 1 and is skipped. Its twist is then multiplied in during the
row pass instead.

## Datapath (`proc_unit`, `pntt`, `pntt_pe`, `bfu`, `mmg`, `mod_mul`)

The processing unit holds four `pntt` units. Each takes one coefficient pair per clock.

`pntt` is a radix-2 multi-path delay-commutator pipeline with log n stages (`pntt_pe`). Each stage
is built from three parts:

* **Commutator.** A FIFO of depth n/2^{S+1} on the lower input, a swap multiplexer, and a FIFO on the upper output. It is left out in the first stage.
* **Butterfly unit** (`bfu`). It does a Cooley-Tukey butterfly for the forward transform, and a Gentleman-Sande butterfly with halving for the inverse.
* **Twiddle table.** A small table of ψ_{2n}^e, indexed by a position counter.

A transform of size 2^s < n switches off the first log n − s stages; they pass their data through
untouched. Each pntt has these properties:

* Input is in natural order: pair c is (x[c], x[c + size/2]).
* Output pair c is (X[r], X[r + size/2]), with r the bit reversal of c.
* Latency for size n is n/2 − 1 + 2·log n clocks.
* Transforms can follow each other without gaps.

`mmg` is two modular multipliers with a one-clock latency. `proc_unit` places it:

* in front of the pntt for the forward direction;
* behind it for the inverse.

`mod_mul` is a plain product followed by a remainder, registered once. It is correct for any q,
but it is not a speed-optimised reduction.

## Memory mapping (`coef_mem`, `agu`, `xbar8`)

Each clock, the four pntt units together consume eight coefficients. Those eight must come from
eight different banks, for every pass. This design uses the following mapping for element
(i, j, k), with b = log n:

    bank    = { j[b-1],  i[b-1] xor k[log m - 1],  j[0] xor i[0] }
    address = ((k mod m/2) · n + i) · n/4 + j[b-2:1]

Each pass reads eight elements per clock, as below:

* **column:** one (i, j-group): four values of j, which differ in bits b−1 and 0, each at k and k + m/2.
* **row:** one k: four values of i, each at j and j + n/2.
* **depth:** one k and one group of four j, each at i and i + n/2. The depth pass walks the planes k in order.

In each case the bank bits above take all eight values. The address generator `agu` is purely
combinational. It gives, for a transform group ("quad") and a position:

* the (i, j, k) of each of the eight slots;
* the bank of each slot;
* the address each bank sees.

`xbar8` is the 8 x 8 multiplexer network between banks and slots. Results are written back in
place. The write-side `agu` takes bit-reversed positions, so memory always holds natural order.

## Twiddle-factor generation (`tfg`)

All switching factors come from three sources.

* **An n x n plane** P[l1][l2] = ω_{n²}^{l1·l2}, in eight banks. Bank = {l2[b−1], l2[0], l1[b−1]}, so any row or depth request is conflict-free.
* **Seed tables**, for every m, holding three seeds:
  * s[x] = ψ^x
  * r[x] = ψ^{n x}
  * g[x] = ω_N^x

  The column twist ψ^{i+nj} is s[i]·r[j], one multiplication.
* **A buffer plane** for the depth pass. For the first plane k = 0, the factor is read from P[i][j]. The factor times g[i] is stored in the buffer. Each later plane reads the buffer and overwrites it with the next power. The buffer therefore always holds ω_{n²}^{ij} ω_N^{ik} for the current k.

The row factor ω_{nm}^{jk} is simply P[j][k·n/m].

Eight modular multipliers serve the twist, the buffer update and the refresh.

For the inverse the plane must hold ω_{n²}^{−l1·l2}. The `tfg` rewrites it with a refresh:

* Every word is multiplied by a refresh factor that depends only on its column l2.
* Rows are afterwards read in reverse order, l1 → n − 1 − l1.

This works because ω^{(n−1−l1)·l2} · ω^{(1−n)·l2} = ω^{−l1·l2}. Refreshing again restores the
forward plane. A refresh takes n²/8 + 2 clocks, and the controller starts one automatically when
the direction differs from the plane's present state.

## Control (`ctrl_unit`)

The controller runs the passes in order: column, row, depth forward, or depth, row, column
inverse. Each pass streams N/8 clocks of reads. Between passes the pipeline is allowed to empty,
so a pass never reads a word that the previous pass has not yet written. The controller drives
three copies of the address generator:

* one for reads;
* one for factor requests in the inverse, in the order the pntt emits;
* one for writes.

## Interface (`ntt3d_top`)

| signal | meaning |
|---|---|
| `q` | modulus. 2n³ must divide q − 1 (for n = 64, 2^19 ∣ q − 1). |
| `start`, `mode_inv`, `log_m` | start a transform; 0 = NTT, 1 = INTT; log2 m, from 0 to 6. |
| `busy`, `done`, `cycles` | status; `cycles` is the length of the last operation. |
| `host_*` | read or write element (i, j, k) while idle, using the layout of the present `log_m`. Reads return one clock later. |
| `cfg_*` | load tables. `sel` 0 = plane, address l1·n + l2. `sel` 1 = seeds, address (dir << (b+5)) ∣ (kind << (b+3)) ∣ (log m << b) ∣ x, with kind 0 = s, 1 = r, 2 = g. `sel` 2 = refresh factor, address {dir, x}: dir 0 holds ω_{n²}^{(1−n)x} and dir 1 holds ω_{n²}^{(n−1)x}. `sel` 3 = pntt twiddle ψ_{2n}^e, e < 2n. |

For the inverse direction, the seed tables hold the modular inverses of the forward seeds.
`tb/ntt3d_tb_body.svh` shows the complete loading sequence.

## Where this departs from the source description

* **Which pass m = 1 removes.** The source says m = 1 skips the *depth-wise* pass. With its own definition N = n·n·m, the axis of size m is the column axis, so this design skips the column pass.
* **Initial planes.** The source keeps two initial planes. This design keeps one and refreshes it for the inverse.
* **Row factors.** The source squares plane values into the buffer to make the row factors. This design reads them directly from the plane, which gives the same values.
* **Factor placement in the inverse.** The inverse applies the factors after each sub-transform rather than before.
* **Bank mapping.** The bank and address mapping is this design's own. It is conflict-free, but not the address sequence the source lists.
* **Cycle counts.** They come out close to the reported ones: 1122 against 1197 clocks for N = 2^12, and 98966 against 98558 for N = 2^18. Pipeline drains between passes cost a few tens of clocks each.
* **No timing or area work.** The reference speed comes from an FPGA implementation; this RTL has had no timing or area work. In particular, the modular multiplier uses a generic remainder.

## Verification

Each block has a self-checking testbench under `tb/`:

* arithmetic blocks against reference modular arithmetic;
* `pntt` at n = 32 for every size and both directions, including latency and a switch from size 2 straight to size n;
* `agu` exhaustively for conflict-freedom and coverage;
* `tfg` against closed forms of every factor, in both directions and across refreshes.

The top-level tests compute expected outputs directly from the definition of the negacyclic NTT
and check that the inverse returns the input:

| testbench | what it runs |
|---|---|
| `tb_ntt3d_top` | n = 8, every m, every output |
| `tb_ntt3d_full` | default n = 64, N = 2^12 |
| `tb_ntt3d_workloads` | n = 64, every N from 2^12 to 2^18: 16 random forward outputs, and every coefficient after the inverse |

The top-level tests also count the column skip, the stage bypass, the refresh and the inverse
mode, and they fail if any of these never happened.

To run one with plain Verilator:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/ntt_pkg.sv tb/tb_util_pkg.sv tb/tb_ntt3d_full.sv --top-module tb_ntt3d_full
    ./obj_dir/Vtb_ntt3d_full

Each testbench prints `TB_RESULT checks=... failures=...`. The workloads testbench takes about
15 s of host time under Verilator.
