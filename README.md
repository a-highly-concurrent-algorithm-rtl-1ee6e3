# Pipelined lattice solver for symmetric Toeplitz systems

This is synthesizable SystemVerilog for a hardware solver of

    T x = y,   T symmetric Toeplitz, (N+1) x (N+1), first row t0 .. tN

that finishes in O(N) clock cycles on a linear array of N+1 identical
stages, each talking only to its two neighbours. It follows the architecture
of the paper *A Highly Concurrent Algorithm and Pipelined Architecture for
Solving Toeplitz Systems*: a pipelined lattice processor factors T, and a
pipelined back-substitution processor, with last-in-first-out stacks,
turns the factors into x. The paper gives the algorithm, the lattice
processor and the outline of the complete solver. It does not give the
back-substitution array, the number format or the control. Those are this
design's own and are marked as such below.

Default build: N = 31, so 32 stages and a 32 x 32 system. That is the
single-chip size the paper expects from a finer process. Numbers are Q15.16
fixed point. A solution takes 6N+4 = 190 cycles from `start` to the last x.

## The idea: factor without inner products

The Levinson recursion solves Toeplitz systems in O(N^2) operations. Each
of its N steps, though, needs an inner product, which a parallel machine
cannot do in less than log2(N) time. The algorithm used here is a
Schur-type recursion that only ever forms linear combinations of two
vectors:

    C      = A<0> / B<0>                       (reflection coefficient)
    A<m-1> = A<m> - C * B<m>     m = 1 .. N    (upper row, shifted left)
    B<m>   = B<m> - C * A<m>     m = 0 .. N    (lower row)

It starts from `A<m> = t(m+1)` (with `A<N> = 0`) and `B<m> = t(m)`. Before
recursion i, the lower row holds row i of the upper-triangular factor U:

    B<k> = u(i, i+k),   k = 0 .. N+1-i,     T = U^t D^-1 U,   D = diag(u11 .. u(N+1,N+1))

One division and one multiply-subtract per element make up a recursion, so
with N+1 processing cells each recursion takes two time units, and the whole
factorization takes O(N). The left shift of the upper row keeps the zeros
made by earlier recursions lined up, so later recursions leave them alone.
Every value below the valid range (`k > N+1-i` in the lower row, `m > N-i`
in the upper row) is garbage and is never used.

## Lattice processor (`plp`): computational wavefronts

The formulation above still needs a broadcast of C to every cell. The
pipelined lattice processor removes it. C travels one cell per clock, and
each cell does its two multiply-subtracts when C reaches it. A recursion is
therefore a wavefront that sweeps left to right. The next wavefront starts
as soon as cell <0> has its new `A<0>`, which is two cycles later. So about N/2
wavefronts are in flight at once, and only local wires are used.

Stage k, counting from the first cycle after `start` as cycle 1:

| event | cycle |
|---|---|
| cell <0> divides for wavefront i, emits `u(i,i)` | 2i - 1 |
| cell <0> lower PE updates `B<0>` | 2i |
| cell <k> (k >= 1) works on wavefront i, emits `u(i,i+k)` | 2i - 1 + k |
| cell <k> writes the new `A<k-1>` | same cycle, into its left neighbour |

This schedule is consistent only because of how the registers are read and
written. Cell <k> reads `A<k>` in cycle 2i-1+k. Cell <k+1> overwrites `A<k>`
at the end of cycle 2i+k, which is after that read and before cell <k>'s
next use in cycle 2i+1+k. Cell <0>'s lower PE reads `A<0>` in cycle 2i,
before cell <1> replaces it at the end of that cycle. The division and the
lattice operation each take one cycle. The paper's cadence is "one division
plus one lattice operation per wavefront", which here is two cycles.

Cell <0> (`plp_cell0`) fires N+1 wavefronts, not N. The extra last one only
serves to emit `u(N+1,N+1)` to the back-substitution processor. Its lattice
results are discarded. Cells <k> (`plp_cell`) count wavefronts and raise
`u_valid` only while their element is meaningful (`k <= N+1-i`).

## Back-substitution processor (`bsp`)

With `T = U^t D^-1 U`, the solution is `x = U^-1 D (U^t)^-1 y`, which is
done in two triangular solves. Cell <k> of this array sits under lattice
cell <k> and takes that cell's downward output.

**Step 1, g = D (U^t)^-1 y, runs during the factorization.** Row i of U
arrives in exactly the wavefront schedule above. Cell <0> holds the current
residual `y'(i)`, which equals `g(i)`. The scaling by D cancels the division
by `u(i,i)`, so no multiplier is spent on D. Cell <0> pushes `g(i)` on the
G-LIFO, pushes `u(i,i)` on its own stack, and sends `r(i) = g(i)/u(i,i)`
to the right. When cell <k> receives `u(i,i+k)` and `r(i)`, it sends
`y'(i+k) - u(i,i+k) * r(i)` to its left neighbour and pushes `u(i,i+k)`.
The residual vector thus shifts left one cell per wavefront, like the upper
row of the lattice.

**Stacks as transposer.** Stage k's stack ends up holding the k-th
superdiagonal of U, `u(1,1+k) .. u(N+1-k, N+1)`, first row at the bottom.
Popping gives the rows last-first, which is the order step 2 needs. Depths
are N+1-k; the G-LIFO holds N+1.

**Step 2, U x = g.** After the last diagonal element, cell <0> sends a turn
token rightward, one cell per cycle. At the right end a small sequencer then
starts N+1 sweeps, one every two cycles. In sweep r (row i = N+1-r), a
partial sum moves left one cell per cycle. Cell <k> adds `u(i,i+k) * x(i+k)`
if its stack still holds an element for row i; it joins from sweep k on.
Cell <0> pops `g(i)` and `u(i,i)` and outputs `x(i) = (g(i) - s) / u(i,i)`.
x values move right: in the cycle after cell <k> fires, it copies the x
that its left neighbour is using in that cycle. Cell <1> copies the
quotient cell <0> forms in that same cycle. x leaves at the left end in the
order x(N+1), x(N), ..., x(1).

Timing (start in cycle 0): last diagonal element in cycle 2N+1, first sweep
enters cell <N> in cycle 3N+3, x(N+1) valid in cycle 4N+4, x(1) in cycle
6N+4.

## Number format and accuracy

`tz_pkg` defines the word: 32-bit two's complement with 16 fraction bits.

- `fx_mul` floors the product and wraps it to 32 bits.
- `fx_div` truncates the quotient toward zero and saturates it. A zero
  divisor gives the largest magnitude.

The divider and the multipliers are single-cycle combinational logic, which
makes them the critical path. Pipelining them would stretch the wavefront
interval but change nothing else in the scheme. Reflection coefficients of a
positive-definite matrix lie in (-1, 1), so the factorization stays in range
when t0 is about 1. Scale T and y to that. At 32 x 32, against a
double-precision solution, the error in x stayed below 1.1e-3 (entries of
x of order 1) for AR(1)
autocorrelation matrices (|rho| <= 0.7) and for random diagonally dominant
matrices. The assumption behind the whole method is that every leading
principal minor of T is nonsingular. The hardware does not check this.

## Top level (`toeplitz_solver`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-cycle pulse; `t` and `y` are sampled in that cycle |
| `t[0:N]` | in | first row of T, t0 .. tN |
| `y[0:N]` | in | right-hand side y(1) .. y(N+1) |
| `x_valid`, `x_data`, `x_index` | out | one solution element every two cycles, index N+1 down to 1 |
| `done` | out | high with x(1) |
| `busy` | out | from `start` to `done` |
| `u_valid[k]`, `u_data[k]` | out | rows of U as they leave lattice cell <k> |
| `k_coef`, `k_coef_valid` | out | reflection coefficient C of each wavefront (C = -K in the usual sign convention) |

A new `start` may follow `done`. A `start` while busy abandons the running
solve: all cells, counters and stacks are reset and the new system is
solved from scratch.

Hierarchy:

```
toeplitz_solver
 |- plp                 lattice processor
 |   |- plp_cell0       divider cell <0>
 |   '- plp_cell x N    lattice cells <1> .. <N>
 '- bsp                 back-substitution processor + right-end sequencer
     |- bsp_cell0       left-end cell: two dividers, G-LIFO, U stack
     '- bsp_cell x N    cells <1> .. <N>, each with its U stack
lifo                    stack used by the bsp cells
tz_pkg                  word type, fx_mul, fx_div
```

Synthesized coarsely at the defaults, the design has about 2,900 word-level
cells, 7,600 flip-flop bits and 17,900 bits of stack memory.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, the full-size end-to-end
run:

```
verilator --binary --timing --assert --top-module tb_toeplitz_solver \
  rtl/tz_pkg.sv tb/tz_ref_pkg.sv rtl/lifo.sv rtl/plp_cell0.sv rtl/plp_cell.sv \
  rtl/plp.sv rtl/bsp_cell0.sv rtl/bsp_cell.sv rtl/bsp.sv rtl/toeplitz_solver.sv \
  tb/tb_toeplitz_solver.sv
./obj_dir/Vtb_toeplitz_solver
```

`tb/tz_ref_pkg.sv` is the reference. It is written as plain sequential code,
independent of the array: the same recursion, one step after another, in the
same fixed-point arithmetic, for bit-exact comparison. It also has a
double-precision Gaussian elimination.

| testbench | size | what it checks |
|---|---|---|
| `tb_lifo` | 6 deep | random push/pop/replace/clear against a queue model |
| `tb_plp_cell0` | N = 5 | divider cadence (cycle 2i-1), C = A/B, lower-PE update, `last_fire`, `busy` |
| `tb_plp_cell` | N = 6, K = 2 | both PE results, forwarding of C, `u_valid` range |
| `tb_plp` | N = 7 | every element of U and its exit cycle, all coefficients, overlapping wavefronts |
| `tb_bsp` | N = 7 | every x bit-exact and the exit cycles of x(N+1) and x(1), with U fed in the lattice schedule |
| `tb_toeplitz_solver` | N = 31 (default) | six 32 x 32 systems end to end. Checks: U, coefficients and x bit-exact; wavefront start cycles; x timing; error against double precision. Also counts overlapping wavefronts, stack traffic, left shifts, the switch from step 1 to step 2, and a restart in mid-solve |

All pass. Each testbench also fails on a deliberately broken copy of its
module. The full-size run takes well under a second.

## Where this departs from, or adds to, the paper

- **Symmetric systems only.** The paper's pipelined architecture is the
  symmetric one, and so is this design. The general nonsymmetric recursion
  needs two different coefficients per step and keeps both halves of each
  row, which doubles the work. It is not built.
- **Back-substitution array, stacks and control are this design's own.**
  The paper calls back substitution well known and does not describe the
  array. Its description of the complete solver names the parts: a U stack used
  as transposer, a G-LIFO, a scaling operator D, x leaving at the left end,
  and step 1 overlapping the factorization. All of these are present. In
  addition, the paper's one-stage chip shows a stack in every stage. Here, D
  is folded into step 1, as explained above.
- **Handshake.** Wavefronts advance by a coefficient-valid bit. Cell <0>
  uses a fixed two-cycle cadence instead of waiting for a "new A<0>" flag.
  In this schedule the two are the same.
- **One extra wavefront** (N+1 instead of N) emits the last diagonal
  element.
- **Arithmetic.** The word length, fixed-point format, rounding and
  saturation are choices. The paper treats the matrix as real-valued.
- **Timing unit.** A division and a lattice operation take one cycle each.
  The paper only names the two intervals.
- **One multiplier per PE.** The one-stage chip of the paper shows a single
  multiplier and adder per stage, presumably time-shared. Here, each
  processing element has its own: two multipliers in a lattice cell, and
  two in a back-substitution cell (one per substitution step).
- **Not built:**
  - the same processor with a global broadcast of C, which the pipelined
    version replaces;
  - the alternative solver organisation in which a second lattice array,
    without a divider, generates the Levinson predictor vectors for a
    matrix-vector multiplier;
  - the multichannel (block Toeplitz) normalized variant, for which only
    the algorithm is given;
  - pads and other physical parts of the chip.
- **Matrix order is fixed at elaboration by `N`.** Solving a smaller system
  needs a build with a smaller `N`. Zero-padding a system does not give the
  same answer.
