// axi_fifo -- small synchronous FIFO used for the pending-address and
// pending-data registers of the slave and the pending-burst queue of the
// master.
//
// DEPTH entries of type T. push is ignored when full, pop when empty; the
// head entry is visible on 'dout' whenever 'empty' is low (show-ahead). A push
// and a pop in the same cycle are both honoured. Entries are written in the
// cycle of the push and can be popped from the next cycle on.
module axi_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic  aclk,
  input  logic  aresetn,
  input  logic  push,
  input  T      din,
  input  logic  pop,
  output T      dout,
  output logic  full,
  output logic  empty
);

  T              mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rptr];

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge aclk) begin
    if (do_push) mem[wptr] <= din;
  end

endmodule
