// bsp: pipelined back-substitution processor of the Toeplitz solver.
//
// Solves T x = y once the lattice processor delivers the factor U of
// T = U^t D^-1 U, in two substitution steps on a linear array of N+1 cells
// that sit under the lattice cells:
//   step 1  g = D (U^t)^-1 y, performed while the factorization runs: the
//           rows of U are consumed as they leave the lattice array, the
//           residual of y shifts left one cell per wavefront, g goes to the
//           G-LIFO and U to the per-cell stacks;
//   step 2  U x = g, started by a turn token that runs from the left end to
//           the right end after the last row of U. A sequencer at the right
//           end then starts one sweep every two cycles; each sweep carries a
//           partial sum leftward and produces one x at the left end, in the
//           order x(N+1), x(N), .. x(1).
//
// Interface: start (one cycle) loads y(1) .. y(N+1) and must coincide with
// the lattice processor's start. u_valid/u_data are the downward outputs of
// the lattice cells. x_valid marks x_data = x(x_index). done is high in the
// cycle in which x(1) is output.
//
// Timing: with the lattice processor started in the same cycle, the last
// diagonal element arrives in cycle 2N+1, the first sweep starts in cycle
// 2N+3+N, x(N+1) is valid in cycle 4N+4 and x(1) in cycle 6N+4.
module bsp
  import tz_pkg::*;
#(
  parameter int unsigned N = 31
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  word_t                   y [N+1],   // y(1) .. y(N+1)
  input  logic                    u_valid [N+1],
  input  word_t                   u_data  [N+1],
  output logic                    x_valid,
  output word_t                   x_data,
  output logic [$clog2(N+2)-1:0]  x_index,
  output logic                    done
);

  localparam int unsigned CW = $clog2(N + 2);

  word_t r      [N+1];
  word_t y_left [N+2];                     // y_left[k]: new y' for cell k-1
  logic  y_we   [N+2];
  logic  turn   [N+1];
  word_t s      [N+2];                     // s[k]: partial sum leaving cell k
  logic  s_val  [N+2];
  word_t x      [N+1];                     // x[k]: x handed to cell k+1

  assign y_left[N+1] = '0;
  assign y_we[N+1]   = 1'b0;
  assign y_left[0]   = '0;
  assign y_we[0]     = 1'b0;
  assign s[0]        = '0;
  assign s_val[0]    = 1'b0;

  bsp_cell0 #(.N(N)) u_cell0 (
    .clk, .rst_n, .start,
    .y_init          (y[0]),
    .u_valid         (u_valid[0]),
    .u_data          (u_data[0]),
    .y_from_right    (y_left[1]),
    .y_from_right_we (y_we[1]),
    .r_out           (r[0]),
    .turn_out        (turn[0]),
    .s_in            (s[1]),
    .s_val_in        (s_val[1]),
    .x_to_right      (x[0]),
    .x_valid,
    .x_data,
    .x_index
  );

  for (genvar k = 1; k <= N; k++) begin : g_cell
    bsp_cell #(.N(N), .K(k)) u_cell (
      .clk, .rst_n, .start,
      .y_init          (y[k]),
      .u_valid         (u_valid[k]),
      .u_data          (u_data[k]),
      .r_in            (r[k-1]),
      .y_from_right    (y_left[k+1]),
      .y_from_right_we (y_we[k+1]),
      .y_to_left       (y_left[k]),
      .y_to_left_we    (y_we[k]),
      .r_out           (r[k]),
      .turn_in         (turn[k-1]),
      .turn_out        (turn[k]),
      .s_in            (s[k+1]),
      .s_val_in        (s_val[k+1]),
      .s_out           (s[k]),
      .s_val_out       (s_val[k]),
      .x_from_left     (x[k-1]),
      .x_out           (x[k])
    );
  end

  // Right-end sequencer: N+1 sweeps, one every two cycles, each entering
  // cell <N> with an empty partial sum.
  logic          seq_busy_q, seq_gap_q;
  logic [CW-1:0] seq_cnt_q;
  logic          seq_fire;

  assign seq_fire   = seq_busy_q && !seq_gap_q;
  assign s[N+1]     = '0;
  assign s_val[N+1] = seq_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_busy_q <= 1'b0;
      seq_gap_q  <= 1'b0;
      seq_cnt_q  <= '0;
    end else if (start) begin
      seq_busy_q <= 1'b0;
      seq_gap_q  <= 1'b0;
      seq_cnt_q  <= '0;
    end else begin
      if (turn[N]) begin
        seq_busy_q <= 1'b1;
        seq_gap_q  <= 1'b0;
      end else if (seq_fire) begin
        seq_gap_q <= 1'b1;
        seq_cnt_q <= seq_cnt_q + CW'(1);
        if (seq_cnt_q == CW'(N)) seq_busy_q <= 1'b0;
      end else begin
        seq_gap_q <= 1'b0;
      end
    end
  end

  assign done = x_valid && (x_index == CW'(1));

endmodule
