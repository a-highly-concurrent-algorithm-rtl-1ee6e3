// bsp_cell: cell <K> (K = 1 .. N) of the back-substitution processor.
//
// Each cell sits under lattice cell <K> and owns the stack that stores the
// K-th diagonal of U (u(i,i+K), i = 1 .. N+1-K) as it leaves the lattice
// processor. Pushing it first-row-first and popping it last-row-first turns
// the row order of the factorization into the order back substitution needs.
//
// Forward step (g = D (U^t)^-1 y), riding on the factorization wavefront:
// when u(i,i+K) arrives (u_valid) together with r(i) from the left, the cell
// sends y'(i+K) - u(i,i+K) * r(i) to its left neighbour's y register and
// pushes u(i,i+K). So the residual vector shifts one cell to the left per
// wavefront, as the upper PEs of the lattice do.
//
// Second step (U x = g): partial sums flow to the left, one cell per cycle,
// and x values flow to the right. For row i the cell adds u(i,i+K) * x(i+K)
// to the sum from its right neighbour; it takes part in the last N+1-K of the
// N+1 sweeps, the rows for which its stack holds an element, and passes the
// sum unchanged before that. In the cycle after it fires it takes its next
// x from the left neighbour, which is firing in that cycle.
// The turn token (start of the second step) travels rightward one cell per
// cycle. All of this schedule is this design's choice.
module bsp_cell
  import tz_pkg::*;
#(
  parameter int unsigned N = 31,
  parameter int unsigned K = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t y_init,                  // y(K+1)
  input  logic  u_valid,                 // u(i,i+K) from lattice cell <K>
  input  word_t u_data,
  input  word_t r_in,
  input  word_t y_from_right,
  input  logic  y_from_right_we,
  output word_t y_to_left,
  output logic  y_to_left_we,
  output word_t r_out,
  input  logic  turn_in,
  output logic  turn_out,
  input  word_t s_in,
  input  logic  s_val_in,
  output word_t s_out,
  output logic  s_val_out,
  input  word_t x_from_left,
  output word_t x_out
);

  localparam int unsigned CW = $clog2(N + 2);
  localparam int unsigned D  = N + 1 - K;   // stack depth

  word_t         y_q, r_q, s_q, x_q;
  logic          sval_q, turn_q;
  logic [CW-1:0] sweeps_q;                  // second-step sweeps seen
  logic          take;                      // this sweep uses a stored element
  word_t         u_top;
  logic          u_empty;

  assign take = s_val_in && (sweeps_q >= CW'(K));

  lifo #(.WIDTH(WIDTH), .DEPTH(D)) u_ulifo (
    .clk, .rst_n,
    .clr  (start),
    .push (u_valid),
    .pop  (take),
    .din  (u_data),
    .top  (u_top),
    .count(),
    .empty(u_empty),
    .full ()
  );

  assign y_to_left    = y_q - fx_mul(r_in, u_data);
  assign y_to_left_we = u_valid;
  assign r_out        = r_q;
  assign turn_out     = turn_q;
  assign s_out        = s_q;
  assign s_val_out    = sval_q;
  assign x_out        = x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q      <= '0;
      r_q      <= '0;
      s_q      <= '0;
      x_q      <= '0;
      sval_q   <= 1'b0;
      turn_q   <= 1'b0;
      sweeps_q <= '0;
    end else if (start) begin
      y_q      <= y_init;
      sval_q   <= 1'b0;
      turn_q   <= 1'b0;
      sweeps_q <= '0;
    end else begin
      turn_q <= turn_in;
      if (u_valid) r_q <= r_in;
      if (y_from_right_we) y_q <= y_from_right;
      sval_q <= s_val_in;
      if (s_val_in) begin
        s_q      <= take ? s_in + fx_mul(u_top, x_q) : s_in;
        sweeps_q <= sweeps_q + CW'(1);
      end
      if (sval_q) x_q <= x_from_left;
    end
  end

  a_take_has_data: assert property (@(posedge clk) disable iff (!rst_n) take |-> !u_empty);

endmodule
