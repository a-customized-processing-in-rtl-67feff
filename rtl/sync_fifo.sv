// sync_fifo: single-clock first-in first-out queue.
//
// Used for every queue of the vault logic layer: the PIM queue and memory
// queue that receive host packets, and the address queue, store queue and
// read-data buffer of each processing element. The design description sets
// the PE address queue to 10 entries; the other depths are this design's
// choice. Storage is a register array indexed by read and write pointers that
// wrap at DEPTH, so any depth (not only powers of two) works.
//
// Interface: push when push && !full (also when popping in the same cycle), pop when
// pop && !empty. dout shows the
// oldest entry whenever !empty (first-word fall-through). A push and a pop in
// the same cycle are both accepted unless the queue is full: a full queue
// refuses the push even when it is popped in that cycle. count is the number of entries held.
// Reset empties the queue. Pushing when full or popping when empty is a
// protocol error caught by assertions; such requests are ignored.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
