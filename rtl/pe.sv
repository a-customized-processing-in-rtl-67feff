// pe: one processing element of a vault: AGU, datapath and its queues.
//
// The AGU turns an alignment task into memory requests and drives the
// one-cycle datapath. Requests wait in the PE's address queue (10 entries, as
// in the design description; the AGU stalls when it is full) and the data of
// write requests in the parallel store queue. The vault arbiter takes the
// head of the address queue, and, for a write, the head of the store queue
// with it. Read data come back in request order into a small read-data
// buffer that the AGU drains; the AGU never has more reads in flight than the
// buffer holds. The read buffer depth is this design's choice.
// CHAR_BITS selects the alphabet: 2-bit DNA characters (default) or 5-bit
// protein characters, 6 to a word; the score table keeps its +1/-1 contents.
//
// Interface: task_valid/task_in/agu_ready as for the AGU; done and score
// report the finished task. req_valid/req/req_wdata/req_pop face the vault
// arbiter; resp_valid/resp_data deliver read data (always accepted).
module pe
  import pim_pkg::*;
#(
  parameter int unsigned CHAR_BITS   = pim_pkg::CHAR_W,
  parameter int unsigned QUEUE_DEPTH = 10,
  parameter int unsigned RESP_DEPTH  = 8,
  parameter int          GAP         = -1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   task_valid,
  input  pim_task_t              task_in,
  output logic                   agu_ready,
  output logic                   done,
  output logic signed [DP_W-1:0] score,
  // to the vault arbiter
  output logic                   req_valid,
  output pe_req_t                req,
  output logic [WORD_W-1:0]      req_wdata,
  input  logic                   req_pop,
  input  logic                   resp_valid,
  input  logic [WORD_W-1:0]      resp_data
);

  logic              rq_push, rq_full, rq_empty;
  pe_req_t           rq_data;
  logic              sq_push, sq_full, sq_empty;
  logic [WORD_W-1:0] sq_data;
  logic              rb_full, rb_empty, rb_pop;
  logic [WORD_W-1:0] rb_data;

  logic                   ld_a, ld_b, ld_north, row_init, start, dp_valid;
  logic [CHAR_BITS-1:0]   a_char, b_char;
  logic signed [DP_W-1:0] north, west_init, nw_init, dp_value;
  dir_e                   dp_dir;

  agu #(.CHAR_BITS(CHAR_BITS), .RESP_DEPTH(RESP_DEPTH), .GAP(GAP)) u_agu (
    .clk, .rst_n,
    .task_valid, .task_in, .agu_ready, .done, .score,
    .rq_push, .rq_data, .rq_full,
    .sq_push, .sq_data, .sq_full,
    .rd_valid(!rb_empty), .rd_data(rb_data), .rd_pop(rb_pop),
    .ld_a, .a_char, .ld_b, .b_char, .ld_north, .north,
    .row_init, .west_init, .nw_init, .start,
    .dp_valid, .dp_value, .dp_dir
  );

  pe_datapath #(.CHAR_W(CHAR_BITS), .GAP(GAP)) u_dp (
    .clk, .rst_n,
    .ld_a, .a_in(a_char), .ld_b, .b_in(b_char),
    .ld_north, .north_in(north),
    .row_init, .west_init, .nw_init,
    .start, .valid(dp_valid), .value(dp_value), .direction(dp_dir),
    .st_wr_en(1'b0), .st_wr_addr('0), .st_wr_score('0)
  );

  // Address queue.
  sync_fifo #(.W($bits(pe_req_t)), .DEPTH(QUEUE_DEPTH)) u_addr_q (
    .clk, .rst_n,
    .push(rq_push), .din(rq_data), .pop(req_pop), .dout(req),
    .full(rq_full), .empty(rq_empty), .count()
  );

  // Store queue: data of the write requests, in the same order.
  sync_fifo #(.W(WORD_W), .DEPTH(QUEUE_DEPTH)) u_store_q (
    .clk, .rst_n,
    .push(sq_push), .din(sq_data), .pop(req_pop && req.we), .dout(req_wdata),
    .full(sq_full), .empty(sq_empty), .count()
  );

  // Read data buffer.
  sync_fifo #(.W(WORD_W), .DEPTH(RESP_DEPTH)) u_read_buf (
    .clk, .rst_n,
    .push(resp_valid), .din(resp_data), .pop(rb_pop), .dout(rb_data),
    .full(rb_full), .empty(rb_empty), .count()
  );

  assign req_valid = !rq_empty;

  a_store_follows_addr: assert property (@(posedge clk) disable iff (!rst_n)
    (req_pop && req.we) |-> !sq_empty);
  a_read_buf_room: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> !rb_full);

endmodule
