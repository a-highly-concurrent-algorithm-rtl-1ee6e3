// tb_lifo: random push/pop test of the stack against a queue model.
// Checks the top entry, the count and the empty/full flags every cycle,
// including simultaneous push and pop (replace the top) and clear.
module tb_lifo;

  localparam int W = 16;
  localparam int D = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0, clr = 1'b0;
  logic [W-1:0] din = '0;
  logic [W-1:0] top;
  logic [$clog2(D+1)-1:0] count;
  logic empty, full;

  lifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_replace = 0, n_clr = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      check(int'(count) == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(top == model[$], $sformatf("top %h vs %h", top, model[$]));
      if (full) n_full++;
      // choose the next operation, legal only
      din  = W'($urandom);
      push = ($urandom_range(99) < ((c / 100) % 2 ? 35 : 65)) && (model.size() < D || model.size() > 0);
      pop  = ($urandom_range(99) < 45) && (model.size() > 0);
      clr  = (c % 150 == 149);
      if (push && !pop && model.size() == D) push = 1'b0;
      if (clr) begin
        n_clr++;
        model.delete();
      end else if (push && pop) begin
        n_replace++;
        model[$] = din;
      end else if (push) model.push_back(din);
      else if (pop) void'(model.pop_back());
    end
    @(negedge clk);
    push = 1'b0; pop = 1'b0; clr = 1'b0;
    check(n_full > 0, "stack never filled");
    check(n_replace > 0, "replace never exercised");
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
