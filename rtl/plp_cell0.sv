// plp_cell0: divider cell <0> of the pipelined lattice processor (PLP).
//
// The cell holds A<0> (upper PE) and B<0> (lower PE). Its upper PE is the
// divider: it forms the reflection coefficient C<0> = A<0> / B<0> and thereby
// starts one computational wavefront, which the lattice cells to the right
// carry on one cell per cycle. One cycle later its lower PE performs
// B<0> <= B<0> - C<0> * A<0>, and cell <1> returns the new A<0> at the end of
// that same cycle, so the next division can start two cycles after the last:
// one time unit for the division and one for the lattice operation, as in the
// source architecture.
//
// Timing (cycle numbers relative to the first cycle after start = 1):
//   wavefront i (i = 1 .. N+1) fires the divider in cycle 1 + 2(i-1);
//   c_val is high in the following cycle, together with the lower-PE update.
// At each firing the old B<0> is the diagonal element u(i,i) of row i of U
// and is presented on u_data with u_valid for that cycle. The source runs N
// recursions; this cell fires an (N+1)-th wavefront so that the last
// diagonal element u(N+1,N+1) is also emitted (the lattice update of that
// last wavefront is not used). last_fire marks the final firing.
//
// Interface: start (one cycle) loads A<0> = t1, B<0> = t0 and begins; busy is
// high until the last wavefront has left the cell. a_from_right/_we is the
// left-shifted upper-PE result from cell <1>.
module plp_cell0
  import tz_pkg::*;
#(
  parameter int unsigned N = 31            // matrix order is N+1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t a_init,                    // t1
  input  word_t b_init,                    // t0
  input  word_t a_from_right,              // new A<0> from cell <1>
  input  logic  a_from_right_we,
  output word_t c_out,                     // C<0>, read by cell <1>
  output logic  c_val_out,                 // C<0> holds a new coefficient
  output logic  u_valid,                   // u_data is u(i,i)
  output word_t u_data,
  output logic  last_fire,
  output logic  busy
);

  localparam int unsigned CW = $clog2(N + 2);

  word_t         a_q, b_q, c_q;
  logic          cval_q;
  logic          busy_q, gap_q;
  logic [CW-1:0] waves_q;                  // wavefronts started so far
  logic          fire;

  // The divider fires every other cycle while wavefronts remain.
  assign fire      = busy_q && !gap_q;
  assign last_fire = fire && (waves_q == CW'(N));
  assign u_valid   = fire;
  assign u_data    = b_q;
  assign c_out     = c_q;
  assign c_val_out = cval_q;
  assign busy      = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      c_q     <= '0;
      cval_q  <= 1'b0;
      busy_q  <= 1'b0;
      gap_q   <= 1'b0;
      waves_q <= '0;
    end else if (start) begin
      a_q     <= a_init;
      b_q     <= b_init;
      cval_q  <= 1'b0;
      busy_q  <= 1'b1;
      gap_q   <= 1'b0;
      waves_q <= '0;
    end else begin
      cval_q <= fire;
      if (fire) begin
        c_q     <= fx_div(a_q, b_q);                 // (4.1) C<0> <= A<0> / B<0>
        waves_q <= waves_q + CW'(1);
        gap_q   <= 1'b1;
        if (last_fire) busy_q <= 1'b0;
      end else begin
        gap_q <= 1'b0;
      end
      if (cval_q) b_q <= b_q - fx_mul(c_q, a_q);      // lower PE of cell <0>
      if (a_from_right_we) a_q <= a_from_right;      // left shift of upper PEs
    end
  end

endmodule
