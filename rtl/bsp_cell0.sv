// bsp_cell0: left-end cell of the back-substitution processor.
//
// Forward step, concurrent with the factorization. When the lattice
// processor emits the diagonal element u(i,i) (u_valid), this cell holds the
// residual y'(i) of y after rows 1 .. i-1 of U^t have been eliminated. That
// residual is g(i), the i-th element of g = D (U^t)^-1 y: the scaling by D
// cancels the division by u(i,i), so g is taken before dividing. The cell
// pushes g(i) on the G-LIFO and u(i,i) on its own U stack, and forms
// r(i) = g(i) / u(i,i), which travels to the right so that cell k can
// perform y'(i+k) -= u(i,i+k) * r(i). After the (N+1)-th diagonal element it
// sends a turn token to the right that starts the second step.
//
// Second step, U x = g. A partial sum s(i) = sum over j > i of u(i,j) x(j)
// arrives from cell <1> (s_val_in). The cell pops g(i) and u(i,i) and outputs
// x(i) = (g(i) - s(i)) / u(i,i), registered on x_data/x_valid one cycle
// later, in the order x(N+1) .. x(1); x_index gives i (1-based). The same
// value goes combinationally to cell <1> (x_to_right) in the firing cycle.
// Stacks for U and g and output from the left end follow the source; the
// cell-level schedule is this design's choice, as the source leaves the
// back-substitution array to the literature.
module bsp_cell0
  import tz_pkg::*;
#(
  parameter int unsigned N = 31
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  word_t                   y_init,           // y(1)
  input  logic                    u_valid,          // u(i,i) from the PLP
  input  word_t                   u_data,
  input  word_t                   y_from_right,     // new y' from cell <1>
  input  logic                    y_from_right_we,
  output word_t                   r_out,            // r(i) for cell <1>
  output logic                    turn_out,
  input  word_t                   s_in,             // partial sum from cell <1>
  input  logic                    s_val_in,
  output word_t                   x_to_right,
  output logic                    x_valid,
  output word_t                   x_data,
  output logic [$clog2(N+2)-1:0]  x_index
);

  localparam int unsigned CW = $clog2(N + 2);

  word_t         y_q, r_q, x_q;
  logic          xval_q, turn_q;
  logic [CW-1:0] fwd_q;                    // forward steps done
  logic [CW-1:0] idx_q;                    // index of the next x
  word_t         g_top, u_top;
  logic          g_empty, u_empty;

  lifo #(.WIDTH(WIDTH), .DEPTH(N + 1)) u_glifo (
    .clk, .rst_n,
    .clr  (start),
    .push (u_valid),
    .pop  (s_val_in),
    .din  (y_q),
    .top  (g_top),
    .count(),
    .empty(g_empty),
    .full ()
  );

  lifo #(.WIDTH(WIDTH), .DEPTH(N + 1)) u_ulifo (
    .clk, .rst_n,
    .clr  (start),
    .push (u_valid),
    .pop  (s_val_in),
    .din  (u_data),
    .top  (u_top),
    .count(),
    .empty(u_empty),
    .full ()
  );

  assign x_to_right = fx_div(g_top - s_in, u_top);
  assign r_out      = r_q;
  assign turn_out   = turn_q;
  assign x_valid    = xval_q;
  assign x_data     = x_q;
  assign x_index    = idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q    <= '0;
      r_q    <= '0;
      x_q    <= '0;
      xval_q <= 1'b0;
      turn_q <= 1'b0;
      fwd_q  <= '0;
      idx_q  <= '0;
    end else if (start) begin
      y_q    <= y_init;
      xval_q <= 1'b0;
      turn_q <= 1'b0;
      fwd_q  <= '0;
      idx_q  <= CW'(N + 1);
    end else begin
      turn_q <= u_valid && (fwd_q == CW'(N));
      if (u_valid) begin
        r_q   <= fx_div(y_q, u_data);
        fwd_q <= fwd_q + CW'(1);
      end
      if (y_from_right_we) y_q <= y_from_right;
      xval_q <= s_val_in;
      if (s_val_in) begin
        x_q <= x_to_right;
      end
      if (xval_q) idx_q <= idx_q - CW'(1);
    end
  end

  a_g_pop_ok: assert property (@(posedge clk) disable iff (!rst_n) s_val_in |-> !g_empty && !u_empty);

endmodule
