// plp_cell: lattice cell <K> (K = 1 .. N) of the pipelined lattice processor.
//
// The cell holds A<K> in its upper PE and B<K> in its lower PE. When the
// reflection coefficient of a wavefront arrives from the left neighbour
// (c_val_in high, coefficient on c_in) both PEs work in the same cycle on
// the old register contents:
//   upper PE: A<K> - C * B<K>, sent to the left neighbour's A register
//             (the left shift that prepares the next recursion);
//   lower PE: B<K> <= B<K> - C * A<K>.
// The coefficient is latched and offered to the right neighbour in the next
// cycle, so a wavefront advances one cell per cycle using only
// nearest-neighbour links. The old B<K> is an element of U: in wavefront i
// it is u(i, i+K), and it is output downward with u_valid for the K <= N+1-i
// wavefronts in which it is meaningful. The register semantics follow the
// source (equations 4.2a/4.2b); the handshake by a coefficient-valid bit is
// this design's choice.
//
// Interface: start loads A<K> = t(K+1) and B<K> = t(K) and clears the
// wavefront count. a_from_right/_we is the new A<K> from cell <K+1> (tied
// off for the last cell, whose A is 0).
module plp_cell
  import tz_pkg::*;
#(
  parameter int unsigned N = 31,
  parameter int unsigned K = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t a_init,
  input  word_t b_init,
  input  word_t c_in,
  input  logic  c_val_in,
  input  word_t a_from_right,
  input  logic  a_from_right_we,
  output word_t a_to_left,
  output logic  a_to_left_we,
  output word_t c_out,
  output logic  c_val_out,
  output logic  u_valid,
  output word_t u_data
);

  localparam int unsigned CW = $clog2(N + 2);

  word_t         a_q, b_q, c_q;
  logic          cval_q;
  logic [CW-1:0] waves_q;                  // wavefronts seen so far

  assign a_to_left    = a_q - fx_mul(c_in, b_q);     // (4.2a)
  assign a_to_left_we = c_val_in;
  assign c_out        = c_q;
  assign c_val_out    = cval_q;
  assign u_valid      = c_val_in && (waves_q <= CW'(N - K));
  assign u_data       = b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      c_q     <= '0;
      cval_q  <= 1'b0;
      waves_q <= '0;
    end else if (start) begin
      a_q     <= a_init;
      b_q     <= b_init;
      cval_q  <= 1'b0;
      waves_q <= '0;
    end else begin
      cval_q <= c_val_in;
      if (c_val_in) begin
        c_q     <= c_in;
        b_q     <= b_q - fx_mul(c_in, a_q);          // (4.2b)
        waves_q <= waves_q + CW'(1);
      end
      if (a_from_right_we) a_q <= a_from_right;
    end
  end

endmodule
