// tb_toeplitz_solver: end-to-end test of the complete solver at its default
// size (32 stages, a 32x32 system).
//
// Several symmetric Toeplitz systems (AR(1) autocorrelations and random
// diagonally dominant matrices) are solved one after another. For each:
//   - every row of U leaving the lattice processor, every reflection
//     coefficient and every x is compared bit for bit with the sequential
//     reference model;
//   - the real-valued residual of T x = y is checked against a
//     double-precision solution;
//   - the schedule is checked: wavefront i starts in cycle 2i-1 (one
//     division plus one lattice operation per wavefront), x(N+1) appears in
//     cycle 4N+4 and x(1) in cycle 6N+4 after start.
// It also counts the mechanisms of the design and fails if one never
// happened: overlapping wavefronts, rows of U emitted while the forward
// substitution runs, stack pushes and pops, left-shift transfers and the
// turn from the first to the second substitution step (the first x
// follows the last row of U), and a restart: one solve is abandoned
// during its second step by a new start, after which the next system must
// still come out exact. Only the top's ports are observed.
module tb_toeplitz_solver;
  import tz_pkg::*;
  import tz_ref_pkg::*;

  localparam int N      = 31;
  localparam int NCASES = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  word_t t [N+1];
  word_t y [N+1];
  logic  x_valid, done, busy, k_coef_valid;
  word_t x_data, k_coef;
  logic [$clog2(N+2)-1:0] x_index;
  logic  u_valid [N+1];
  word_t u_data  [N+1];

  toeplitz_solver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc;
  vec_t tv, yv, gr, xr, cr;
  mat_t ur;
  rvec_t xd;
  int wave_seen [N+1];
  int n_coef, n_x;
  int last_row_cyc;
  bit quiet = 1'b0;
  int x_hw [MAXN];
  // mechanism counters
  int m_overlap = 0, m_rows = 0, m_push = 0, m_pop = 0, m_shift = 0, m_turn = 0;
  int m_restart = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitors, sampled mid-cycle.
  always @(negedge clk) begin
    if (busy && !quiet && !start) begin
      int active;
      active = 0;
      for (int k = 0; k <= N; k++) begin
        if (u_valid[k]) begin
          int i;
          i = wave_seen[k] + 1;
          wave_seen[k]++;
          m_rows++;
          if (k > 0) m_shift++;
          check(u_data[k] == ur[i][i+k],
                $sformatf("u(%0d,%0d) hw=%0d ref=%0d", i, i + k, u_data[k], ur[i][i+k]));
          if (k == 0) check(cyc == 2 * i - 1,
                            $sformatf("wavefront %0d started in cycle %0d", i, cyc));
          active++;
        end
      end
      if (active > 0 && u_valid[0] && u_valid[2]) m_overlap++;
      if (k_coef_valid) begin
        n_coef++;
        if (n_coef <= N)
          check(k_coef == cr[n_coef],
                $sformatf("coefficient %0d hw=%0d ref=%0d", n_coef, k_coef, cr[n_coef]));
      end
      if (u_valid[0]) last_row_cyc = cyc;
      if (x_valid) begin
        m_pop++;
        if (n_x == 0 && cyc > last_row_cyc) m_turn++;
        n_x++;
        x_hw[x_index] = x_data;
        check(int'(x_index) == N + 2 - n_x, $sformatf("x index %0d", x_index));
        check(x_data == xr[x_index],
              $sformatf("x(%0d) hw=%0d ref=%0d", x_index, x_data, xr[x_index]));
        if (n_x == 1) check(cyc == 4 * N + 4, $sformatf("x(N+1) in cycle %0d", cyc));
        if (x_index == 1) check(cyc == 6 * N + 4, $sformatf("x(1) in cycle %0d", cyc));
      end
    end
  end

  // Cycle count since start; stack traffic at the lattice/back-substitution
  // boundary.
  always @(posedge clk) begin
    cyc++;
    if (u_valid[0] && busy) m_push++;
  end

  initial begin
    for (int k = 0; k <= N; k++) begin t[k] = '0; y[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int tc = 0; tc < NCASES; tc++) begin
      real err, maxerr;
      if (tc == 3) begin
        // Abandon a solve halfway (second step running) by a new start.
        make_case(N, 1, tv, yv);
        for (int k = 0; k <= N; k++) begin t[k] = tv[k]; y[k] = yv[k]; end
        quiet = 1'b1;
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        repeat (4 * N + 10) @(negedge clk);
        m_restart++;
      end
      make_case(N, tc % 2, tv, yv);
      ref_solve(N, tv, yv, ur, gr, xr, cr);
      real_solve(N, tv, yv, xd);
      for (int k = 0; k <= N; k++) begin
        t[k] = tv[k];
        y[k] = yv[k];
        wave_seen[k] = 0;
      end
      n_coef = 0;
      n_x = 0;
      @(negedge clk);
      cyc = 0;
      quiet = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      check(n_x == N + 1, $sformatf("case %0d: %0d x values", tc, n_x));
      check(n_coef == N + 1, $sformatf("case %0d: %0d wavefronts", tc, n_coef));
      maxerr = 0.0;
      for (int i = 1; i <= N + 1; i++) begin
        err = to_real(x_hw[i]) - xd[i-1];
        if (err < 0.0) err = -err;
        if (err > maxerr) maxerr = err;
      end
      check(maxerr < 0.01, $sformatf("case %0d: max |x - x_double| = %f", tc, maxerr));
      $display("case %0d (%s): max |x - x_double| = %f", tc,
               (tc % 2) ? "diag. dominant" : "AR(1)", maxerr);
      repeat (2) @(negedge clk);
    end
    check(m_overlap > 0, "overlapping wavefronts never seen");
    check(m_rows > 0,    "rows of U never emitted");
    check(m_push > 0,    "stacks never pushed");
    check(m_pop > 0,     "stacks never popped");
    check(m_shift > 0,   "left shifts never seen");
    check(m_turn > 0,    "turn to second step never seen");
    check(m_restart > 0, "restart while busy never exercised");
    $display("mechanisms: overlap=%0d rows=%0d push=%0d pop=%0d shift=%0d turn=%0d restart=%0d",
             m_overlap, m_rows, m_push, m_pop, m_shift, m_turn, m_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCASES * (8 * N + 40) + 6 * N + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
