// sync_fifo: single-clock first-in first-out buffer used for the queues of the
// vector unit (pre-issue queue, issue queues, lane buffers).
//
// Circular array of DEPTH entries with read and write pointers and an entry
// count.  push and pop may happen in the same cycle, also when full (the
// popped slot is reused).  The head entry is visible on rdata combinationally
// whenever empty is low.  Synchronous active-low reset empties it; the array
// itself is not reset.  A generic helper of this design.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wdata,
  input  logic pop,
  output T     rdata,
  output logic full,
  output logic empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [PW-1:0] rp, wp;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rdata = mem[rp];

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= nxt(wp);
      if (do_pop)  rp <= nxt(rp);
      count <= count + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= wdata;

  // A push into a full queue that is not popped is lost: flag it.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("sync_fifo: push into full queue");
endmodule
