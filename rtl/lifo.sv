// lifo: last-in-first-out memory stack.
//
// The solver uses one stack per stage to turn the rows of U, which leave the
// lattice processor first row first, into the last-row-first order that
// the final back substitution consumes (the matrix transposer), and one more
// stack, the G-LIFO, for the intermediate vector g. Using stacks for both
// follows the source architecture; their width, depth and interface are
// this design's choice.
//
// Interface: clr (synchronous) empties the stack and takes precedence;
// push writes din on top at the clock edge, pop removes the top entry. top is a combinational read of the current top entry, so a consumer
// reads top and pops in the same cycle. push and pop together replace the
// top entry. Pushing a full stack or popping an empty one is an error and is
// flagged by an assertion; the stack is left unchanged in that case.
// Reset (asynchronous, active low) empties the stack.
module lifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       push,
  input  logic                       pop,
  input  logic [WIDTH-1:0]           din,
  output logic [WIDTH-1:0]           top,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       empty,
  output logic                       full
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [CW-1:0]    sp;      // number of entries; top is mem[sp-1]
  logic [AW-1:0]    wr_idx, top_idx;

  assign wr_idx  = AW'(sp);
  assign top_idx = AW'(sp - CW'(1));

  assign count = sp;
  assign empty = (sp == '0);
  assign full  = (sp == CW'(DEPTH));
  assign top   = empty ? '0 : mem[top_idx];

  // Stack pointer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (clr) begin
      sp <= '0;
    end else if (push && !pop && !full) begin
      sp <= sp + CW'(1);
    end else if (pop && !push && !empty) begin
      sp <= sp - CW'(1);
    end
  end

  // Storage: no reset, an entry is only read after it was written.
  always_ff @(posedge clk) begin
    if (clr) begin
      // nothing stored
    end else if (push && pop && !empty) begin
      mem[top_idx] <= din;
    end else if (push && !pop && !full) begin
      mem[wr_idx] <= din;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clr) !(push && !pop && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clr) !(pop && empty));

endmodule
