// token_fifo: synchronous first-in first-out queue, used for the matching
// token queue (MTQ, entries are matched pairs), the unmatching token queue
// (UTQ, single tokens) and the SOCS controlling process queue (CPQ).
//
// The head is visible on dout while empty is low (first-word fall-through);
// pop removes it at the next clock edge. push and pop may happen in the same
// cycle. Pushing a full queue or popping an empty one is a protocol error,
// flagged by assertions and ignored by the logic. The entry type and the
// depth are parameters; the queues' depths are not fixed by the architecture
// and the default of 16 is this design's choice. Reset is active-low and
// synchronous.
module token_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign dout  = mem[rd_ptr];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
