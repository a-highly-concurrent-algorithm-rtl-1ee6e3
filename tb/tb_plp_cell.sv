// tb_plp_cell: test of one lattice cell (K = 2, N = 6) on its own.
// The testbench plays both neighbours: it sends coefficients from the left
// every other cycle and returns new A values from the right. Checks the
// upper-PE result sent left (A - C*B), the lower-PE update (B - C*A), the
// coefficient forwarded one cycle later, and that u_valid is given for the
// first N+1-K wavefronts only.
module tb_plp_cell;
  import tz_pkg::*;
  import tz_ref_pkg::*;

  localparam int N = 6;
  localparam int K = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  word_t a_init = '0, b_init = '0, c_in = '0, a_from_right = '0;
  logic  c_val_in = 1'b0, a_from_right_we = 1'b0;
  word_t a_to_left, c_out, u_data;
  logic  a_to_left_we, c_val_out, u_valid;

  plp_cell #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int am, bm, cm, waves;
  bit expect_c;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    am = 30000; bm = 50000;
    a_init = am; b_init = bm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    waves = 0; expect_c = 1'b0;
    for (int c = 0; c < 4 * (N + 1); c++) begin
      if (expect_c) check(c_val_out && c_out == cm, "coefficient forwarded");
      else          check(!c_val_out, "no coefficient forwarded");
      expect_c = 1'b0;
      a_from_right_we = 1'b0;
      c_val_in = 1'b0;
      if (c % 2 == 0 && waves < N + 1) begin
        cm = $urandom_range(60000) - 30000;
        c_in = cm; c_val_in = 1'b1;
        #1;
        check(a_to_left_we, "a_to_left_we");
        check(a_to_left == am - ref_mul(cm, bm), $sformatf("upper PE %0d", a_to_left));
        check(u_valid == (waves < N + 1 - K), $sformatf("u_valid in wavefront %0d", waves + 1));
        check(u_data == bm, "u_data is the old B");
        bm = bm - ref_mul(cm, am);
        waves++;
        expect_c = 1'b1;
      end else if (c % 2 == 1) begin
        // right neighbour returns a new A
        am = $urandom_range(60000) - 30000;
        a_from_right = am; a_from_right_we = 1'b1;
      end
      @(negedge clk);
    end
    c_val_in = 1'b0; a_from_right_we = 1'b0;
    // lower PE result visible as u_data once more
    c_in = '0; c_val_in = 1'b1;
    #1 check(u_data == bm, "final B");
    @(negedge clk);
    c_val_in = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
