// pim_vault: the logic layer of one vault, extended with alignment PEs.
//
// Host packets routed to this vault are split by command: PIM alignment
// packets go to the PIM queue, reads and writes to the memory queue. The
// scheduler hands queued tasks to idle PEs; each PE aligns the query with
// one reference sequence stored in this vault. The vault arbiter drains the
// PE queues and the memory queue round robin into the vault controller and
// steers read data back by tag. When a task ends, its score is compared with
// the best score seen in this vault, which is kept together with the start
// address of that reference sequence, so the host only has to compare the
// per-vault maxima. These functions follow the design description; the
// depths of the PIM, memory and response queues and the reset of the best
// score to the most negative value are this design's choices.
//
// Flow control: pim_credit pulses for each PIM packet that leaves the PIM
// queue, returning one credit to the host, which must never have more than
// PIM_Q_DEPTH packets in flight to a vault. req_ready also back-pressures
// the crossbar. The vault controller interface is a request valid/ready
// channel and a read-data channel that is always accepted, in request order.
module pim_vault
  import pim_pkg::*;
#(
  parameter int unsigned CHAR_BITS   = pim_pkg::CHAR_W,
  parameter int unsigned N_PE        = 2,
  parameter int unsigned QUEUE_DEPTH = 10,
  parameter int unsigned PIM_Q_DEPTH = 8,
  parameter int unsigned MEM_Q_DEPTH = 8,
  parameter int unsigned RESP_DEPTH  = 8,
  parameter int unsigned HRESP_DEPTH = 8,
  parameter int          GAP         = -1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from the request crossbar
  input  logic                    req_valid,
  input  host_req_t               req,
  output logic                    req_ready,
  output logic                    pim_credit,
  // to the response crossbar
  output logic                    resp_valid,
  output host_resp_t              resp,
  input  logic                    resp_ready,
  // vault controller
  output logic                    vc_req_valid,
  output vc_req_t                 vc_req,
  input  logic                    vc_req_ready,
  input  logic                    vc_resp_valid,
  input  vc_resp_t                vc_resp,
  // results
  input  logic [VAULT_W-1:0]      vault_id,
  output logic signed [DP_W-1:0]  best_score,
  output logic [ADDR_W-1:0]       best_addr_b,
  output logic [31:0]             tasks_done,
  output logic                    idle
);

  // ---------------- PIM queue and memory queue ----------------
  logic      pq_full, pq_empty, pq_pop;
  pim_task_t pq_head;
  logic      mq_full, mq_empty, mq_pop;
  mem_req_t  mq_head, mq_in;
  logic      is_pim;

  assign is_pim    = (req.cmd == CMD_PIM);
  assign req_ready = is_pim ? !pq_full : !mq_full;
  assign mq_in     = '{we: (req.cmd == CMD_WR), link: req.link, tag: req.tag,
                       addr: req.addr, wdata: req.wdata};

  sync_fifo #(.W($bits(pim_task_t)), .DEPTH(PIM_Q_DEPTH)) u_pim_q (
    .clk, .rst_n,
    .push(req_valid && is_pim), .din(req.pim), .pop(pq_pop), .dout(pq_head),
    .full(pq_full), .empty(pq_empty), .count()
  );

  sync_fifo #(.W($bits(mem_req_t)), .DEPTH(MEM_Q_DEPTH)) u_mem_q (
    .clk, .rst_n,
    .push(req_valid && !is_pim), .din(mq_in), .pop(mq_pop), .dout(mq_head),
    .full(mq_full), .empty(mq_empty), .count()
  );

  assign pim_credit = pq_pop;

  // ---------------- scheduler and PEs ----------------
  logic [N_PE-1:0]        agu_ready, pe_sel, pe_done;
  pim_task_t              sched_task;
  logic signed [DP_W-1:0] pe_score [N_PE];
  logic [ADDR_W-1:0]      pe_addr_b [N_PE];

  pim_scheduler #(.N_PE(N_PE)) u_sched (
    .clk, .rst_n,
    .q_valid(!pq_empty), .q_task(pq_head), .q_pop(pq_pop),
    .agu_ready, .pe_sel, .task_out(sched_task)
  );

  logic [N_PE-1:0]   pe_req_valid, pe_req_pop, pe_resp_valid;
  pe_req_t           pe_req       [N_PE];
  logic [WORD_W-1:0] pe_req_wdata [N_PE];
  logic [WORD_W-1:0] pe_resp_data;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe #(.CHAR_BITS(CHAR_BITS), .QUEUE_DEPTH(QUEUE_DEPTH), .RESP_DEPTH(RESP_DEPTH), .GAP(GAP)) u_pe (
      .clk, .rst_n,
      .task_valid(pe_sel[p]), .task_in(sched_task), .agu_ready(agu_ready[p]),
      .done(pe_done[p]), .score(pe_score[p]),
      .req_valid(pe_req_valid[p]), .req(pe_req[p]), .req_wdata(pe_req_wdata[p]),
      .req_pop(pe_req_pop[p]),
      .resp_valid(pe_resp_valid[p]), .resp_data(pe_resp_data)
    );

    // Remember which reference sequence each PE works on.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         pe_addr_b[p] <= '0;
      else if (pe_sel[p]) pe_addr_b[p] <= sched_task.addr_b;
    end
  end

  // ---------------- vault arbiter ----------------
  logic              hr_push, hr_full, hr_empty;
  host_resp_t        hr_in;
  logic [LINK_W-1:0] hr_link;
  logic [HTAG_W-1:0] hr_tag;
  logic [WORD_W-1:0] hr_data;

  vault_arbiter #(.N_PE(N_PE), .HRESP_DEPTH(HRESP_DEPTH)) u_varb (
    .clk, .rst_n,
    .pe_req_valid, .pe_req, .pe_req_wdata, .pe_req_pop,
    .pe_resp_valid, .pe_resp_data,
    .mq_valid(!mq_empty), .mq_req(mq_head), .mq_pop,
    .host_resp_push(hr_push), .host_resp_link(hr_link), .host_resp_tag(hr_tag),
    .host_resp_data(hr_data), .host_resp_pop(resp_valid && resp_ready),
    .vc_req_valid, .vc_req, .vc_req_ready, .vc_resp_valid, .vc_resp
  );

  // Host response queue.
  assign hr_in = '{vault: vault_id, link: hr_link, tag: hr_tag, rdata: hr_data};
  sync_fifo #(.W($bits(host_resp_t)), .DEPTH(HRESP_DEPTH)) u_hresp_q (
    .clk, .rst_n,
    .push(hr_push), .din(hr_in), .pop(resp_valid && resp_ready), .dout(resp),
    .full(hr_full), .empty(hr_empty), .count()
  );
  assign resp_valid = !hr_empty;

  // ---------------- vault maximum ----------------
  // PEs finishing in the same cycle are taken in index order.
  logic signed [DP_W-1:0] best_score_d;
  logic [ADDR_W-1:0]      best_addr_b_d;
  logic [31:0]            tasks_done_d;

  always_comb begin
    best_score_d  = best_score;
    best_addr_b_d = best_addr_b;
    tasks_done_d  = tasks_done;
    for (int unsigned p = 0; p < N_PE; p++) begin
      if (pe_done[p]) begin
        tasks_done_d = tasks_done_d + 1;
        if (pe_score[p] > best_score_d) begin
          best_score_d  = pe_score[p];
          best_addr_b_d = pe_addr_b[p];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_score  <= {1'b1, {(DP_W-1){1'b0}}};
      best_addr_b <= '0;
      tasks_done  <= '0;
    end else begin
      best_score  <= best_score_d;
      best_addr_b <= best_addr_b_d;
      tasks_done  <= tasks_done_d;
    end
  end

  assign idle = pq_empty && mq_empty && (&agu_ready) && (pe_req_valid == '0) && hr_empty;

  a_pim_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && is_pim) |-> !pq_full);
  a_hresp_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    hr_push |-> !hr_full);

endmodule
