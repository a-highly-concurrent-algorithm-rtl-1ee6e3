// tb_plp: test of the pipelined lattice processor (N = 7, an 8x8 matrix).
// For random symmetric Toeplitz matrices it checks every element of U as it
// leaves the array, bit for bit against the sequential reference, the cycle
// in which it leaves (u(i,i+k) in cycle 2i-1+k, k >= 1; u(i,i) in cycle
// 2i-1), the reflection coefficients, and that no element is missing or
// extra. It also checks that successive wavefronts overlap in the array.
module tb_plp;
  import tz_pkg::*;
  import tz_ref_pkg::*;

  localparam int N = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  word_t t [N+1];
  logic  u_valid [N+1];
  word_t u_data  [N+1];
  word_t c_coef;
  logic  c_coef_valid, last_fire, busy;

  plp #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc, n_el, n_coef, overlap;
  int seen [N+1];
  vec_t tv, yv, gr, xr, cr;
  mat_t ur;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    int nv;
    nv = 0;
    for (int k = 0; k <= N; k++) begin
      if (u_valid[k]) begin
        int i;
        seen[k]++;
        i = seen[k];
        n_el++;
        nv++;
        check(u_data[k] == ur[i][i+k], $sformatf("u(%0d,%0d) %0d vs %0d", i, i + k, u_data[k], ur[i][i+k]));
        check(cyc == 2 * i - 1 + k, $sformatf("u(%0d,%0d) in cycle %0d", i, i + k, cyc));
      end
    end
    if (nv > 1) overlap++;
    if (c_coef_valid) begin
      n_coef++;
      if (n_coef <= N) check(c_coef == cr[n_coef], $sformatf("coefficient %0d", n_coef));
    end
  end

  initial begin
    for (int k = 0; k <= N; k++) t[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    overlap = 0;
    for (int tc = 0; tc < 4; tc++) begin
      make_case(N, tc % 2, tv, yv);
      ref_solve(N, tv, yv, ur, gr, xr, cr);
      for (int k = 0; k <= N; k++) begin t[k] = tv[k]; seen[k] = 0; end
      n_el = 0; n_coef = 0;
      @(negedge clk);
      start = 1'b1; cyc = 0;
      @(negedge clk);
      start = 1'b0;
      repeat (3 * N + 6) @(negedge clk);
      check(n_el == (N + 1) * (N + 2) / 2, $sformatf("%0d elements of U", n_el));
      check(n_coef == N + 1, $sformatf("%0d wavefronts", n_coef));
      check(!busy, "busy after the last wavefront");
    end
    check(overlap > 0, "wavefronts never overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
