// toeplitz_solver: complete solver for a symmetric Toeplitz system T x = y.
//
// T is the (N+1)x(N+1) symmetric Toeplitz matrix with first row t0 .. tN,
// assumed to have nonsingular leading principal minors (positive definite
// in practice). The solver is a pipelined lattice processor (plp), which
// factors T = U^t D^-1 U in O(N) time with one computational wavefront per
// two cycles, feeding a pipelined back-substitution processor (bsp) that
// forms g = D (U^t)^-1 y while the factorization runs and then solves
// U x = g from per-stage stacks. Both arrays are linear, N+1 stages wide and
// use only nearest-neighbour connections; stage k is lattice cell <k> on top
// of back-substitution cell <k> with its stack.
//
// Interface: pulse start for one cycle with t and y valid; they are sampled
// then. The solution appears on x_data with x_valid, one element every two
// cycles, in the order x(N+1) .. x(1) (x_index is the 1-based index); done
// is high with x(1). Each row of U is also visible on u_valid/u_data as it
// leaves the lattice processor, and the reflection coefficients on
// k_coef/k_coef_valid. busy is high from start until done.
// Latency, start in cycle 0: x(N+1) in cycle 4N+4, x(1) in cycle 6N+4.
// Numbers are Q15.16 fixed point (tz_pkg).
module toeplitz_solver
  import tz_pkg::*;
#(
  parameter int unsigned N = 31              // 32 stages
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  word_t                   t [N+1],
  input  word_t                   y [N+1],
  output logic                    x_valid,
  output word_t                   x_data,
  output logic [$clog2(N+2)-1:0]  x_index,
  output logic                    done,
  output logic                    busy,
  output logic                    u_valid [N+1],
  output word_t                   u_data  [N+1],
  output word_t                   k_coef,
  output logic                    k_coef_valid
);

  logic busy_q;

  plp #(.N(N)) u_plp (
    .clk, .rst_n, .start,
    .t,
    .u_valid,
    .u_data,
    .c_coef       (k_coef),
    .c_coef_valid (k_coef_valid),
    .last_fire    (),
    .busy         ()
  );

  bsp #(.N(N)) u_bsp (
    .clk, .rst_n, .start,
    .y,
    .u_valid,
    .u_data,
    .x_valid,
    .x_data,
    .x_index,
    .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     busy_q <= 1'b0;
    else if (start) busy_q <= 1'b1;
    else if (done)  busy_q <= 1'b0;
  end
  assign busy = busy_q;

endmodule
