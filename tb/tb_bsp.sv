// tb_bsp: test of the back-substitution processor on its own (N = 7).
// The testbench plays the lattice processor: it delivers the rows of U,
// computed by the reference model, in the lattice processor's schedule
// (u(i,i+k) in cycle 2i-1+k after start, u(i,i) in cycle 2i-1). Checks every
// x bit for bit against the reference, their order x(N+1) .. x(1), the
// cycles of the first and last x (4N+4 and 6N+4) and done. The first x
// can only be on time if the forward step kept pace with the delivery of U.
module tb_bsp;
  import tz_pkg::*;
  import tz_ref_pkg::*;

  localparam int N = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  word_t y [N+1];
  logic  u_valid [N+1];
  word_t u_data  [N+1];
  logic  x_valid, done;
  word_t x_data;
  logic [$clog2(N+2)-1:0] x_index;

  bsp #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc, n_x;
  vec_t tv, yv, gr, xr, cr;
  mat_t ur;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc++;

  // Drive U in the lattice processor's schedule (changes at negedge).
  always @(negedge clk) begin
    for (int k = 0; k <= N; k++) begin
      int i;
      u_valid[k] = 1'b0;
      u_data[k]  = '0;
      // u(i,i+k) in cycle 2i-1+k
      if (((cyc - k) % 2) == 1 && cyc - k >= 1) begin
        i = (cyc - k + 1) / 2;
        if (i >= 1 && i <= N + 1 - k && n_x >= 0) begin
          u_valid[k] = 1'b1;
          u_data[k]  = ur[i][i+k];
        end
      end
    end
  end

  always @(negedge clk) begin
    if (x_valid && n_x >= 0) begin
      n_x++;
      check(int'(x_index) == N + 2 - n_x, $sformatf("x index %0d", x_index));
      check(x_data == xr[x_index], $sformatf("x(%0d) %0d vs %0d", x_index, x_data, xr[x_index]));
      if (n_x == 1) check(cyc == 4 * N + 4, $sformatf("x(N+1) in cycle %0d", cyc));
      check(done == (x_index == 1), "done");
      if (x_index == 1) check(cyc == 6 * N + 4, $sformatf("x(1) in cycle %0d", cyc));
    end
  end

  initial begin
    for (int k = 0; k <= N; k++) begin y[k] = '0; u_valid[k] = 1'b0; u_data[k] = '0; end
    n_x = -1;
    cyc = 1000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int tc = 0; tc < 4; tc++) begin
      make_case(N, tc % 2, tv, yv);
      ref_solve(N, tv, yv, ur, gr, xr, cr);
      for (int k = 0; k <= N; k++) y[k] = yv[k];
      @(negedge clk);
      start = 1'b1; cyc = 0; n_x = 0;
      @(negedge clk);
      start = 1'b0;
      repeat (7 * N + 7) @(negedge clk);
      check(n_x == N + 1, $sformatf("%0d x values", n_x));
      n_x = -1;
      cyc = 1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
