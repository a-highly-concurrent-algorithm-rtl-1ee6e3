// plp: pipelined lattice processor for a symmetric Toeplitz matrix.
//
// A linear array of N+1 cells: the divider cell <0> and lattice cells
// <1> .. <N>, connected only to their nearest neighbours. Given the first row
// t0 .. tN of a symmetric (N+1)x(N+1) Toeplitz matrix T, it computes the
// upper-triangular factor U of T = U^t D^-1 U, D = diag(u11 .. u(N+1,N+1)),
// with the Schur-type recursion of the source: each recursion is one
// computational wavefront that starts with a division in cell <0> and
// sweeps to the right one cell per cycle. A new wavefront starts every two
// cycles, so the N recursions overlap and take O(N) time.
//
// Initial contents follow the source: B<0> = t0, A<m-1> = B<m> = t(m) for
// m = 1 .. N, A<N> = 0. Row i of U leaves the array downward during
// wavefront i: u(i, i+k) appears on u_data[k] with u_valid[k] in cycle
// 2(i-1) + 1 + k after start (k >= 1) and in cycle 2(i-1) + 1 for k = 0.
// Wavefront N+1 only emits u(N+1,N+1). busy stays high while cell <0> is
// still starting wavefronts; the array is idle N cycles after busy falls.
// The recursion, the initial contents, the cell structure and the one-cell-
// per-cycle wavefront follow the source; the parallel load (instead of an
// aligning first wavefront), the valid-bit control and the extra (N+1)-th
// wavefront are this design's choices.
module plp
  import tz_pkg::*;
#(
  parameter int unsigned N = 31
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t t [N+1],                  // t0 .. tN, sampled at start
  output logic  u_valid [N+1],
  output word_t u_data  [N+1],
  output word_t c_coef,                   // reflection coefficient of cell <0>
  output logic  c_coef_valid,
  output logic  last_fire,
  output logic  busy
);

  word_t c      [N+1];
  logic  cval   [N+1];
  word_t a_left [N+2];                    // a_left[m]: new A<m-1> from cell <m>
  logic  a_we   [N+2];

  // Cell <N> has no right neighbour: its A register is never rewritten.
  assign a_left[N+1] = '0;
  assign a_we[N+1]   = 1'b0;
  assign a_left[0]   = '0;
  assign a_we[0]     = 1'b0;

  plp_cell0 #(.N(N)) u_cell0 (
    .clk, .rst_n, .start,
    .a_init          (t[1]),
    .b_init          (t[0]),
    .a_from_right    (a_left[1]),
    .a_from_right_we (a_we[1]),
    .c_out           (c[0]),
    .c_val_out       (cval[0]),
    .u_valid         (u_valid[0]),
    .u_data          (u_data[0]),
    .last_fire,
    .busy
  );

  for (genvar k = 1; k <= N; k++) begin : g_cell
    plp_cell #(.N(N), .K(k)) u_cell (
      .clk, .rst_n, .start,
      .a_init          ((k < N) ? t[(k < N) ? k + 1 : k] : '0),
      .b_init          (t[k]),
      .c_in            (c[k-1]),
      .c_val_in        (cval[k-1]),
      .a_from_right    (a_left[k+1]),
      .a_from_right_we (a_we[k+1]),
      .a_to_left       (a_left[k]),
      .a_to_left_we    (a_we[k]),
      .c_out           (c[k]),
      .c_val_out       (cval[k]),
      .u_valid         (u_valid[k]),
      .u_data          (u_data[k])
    );
  end

  assign c_coef       = c[0];
  assign c_coef_valid = cval[0];

endmodule
