// tb_plp_cell0: test of the divider cell on its own (N = 5).
// The testbench plays lattice cell <1>: whenever the cell offers a new
// coefficient it returns a fresh random A<0>. Checks: a division every other
// cycle starting in cycle 1, N+1 of them; u_data is the current B<0>;
// C = A/B and the lower-PE update B <= B - C*A, both in the reference
// fixed-point arithmetic; last_fire and busy.
module tb_plp_cell0;
  import tz_pkg::*;
  import tz_ref_pkg::*;

  localparam int N = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  word_t a_init = '0, b_init = '0, a_from_right = '0;
  logic  a_from_right_we = 1'b0;
  word_t c_out, u_data;
  logic  c_val_out, u_valid, last_fire, busy;

  plp_cell0 #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc, fires;
  int am, bm, cm;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      am = $urandom_range(40000) - 20000;
      bm = 65536 + $urandom_range(30000);
      a_init = am; b_init = bm;
      start = 1'b1; cyc = 0; fires = 0;
      @(negedge clk);
      start = 1'b0;
      while (cyc < 2 * N + 6) begin
        // cycle number cyc, signals settled
        a_from_right_we = 1'b0;
        if (u_valid) begin
          fires++;
          check(cyc == 2 * fires - 1, $sformatf("division %0d in cycle %0d", fires, cyc));
          check(u_data == bm, $sformatf("u_data %0d vs %0d", u_data, bm));
          check(last_fire == (fires == N + 1), "last_fire");
          cm = ref_div(am, bm);
        end
        if (c_val_out) begin
          check(c_out == cm, $sformatf("C %0d vs %0d", c_out, cm));
          bm = bm - ref_mul(cm, am);
          // play cell <1>: return a new A<0>
          am = $urandom_range(40000) - 20000;
          a_from_right = am;
          a_from_right_we = 1'b1;
        end
        @(negedge clk);
      end
      check(fires == N + 1, $sformatf("%0d divisions", fires));
      check(!busy, "busy after last wavefront");
    end
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
