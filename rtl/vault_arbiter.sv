// vault_arbiter: shares one vault controller between the PEs and the host.
//
// Requests come from the address queue (plus store queue) of every PE and
// from the vault's memory queue of host reads and writes. As in the design
// description the queues are drained round robin, one request per cycle when
// the vault controller accepts it (vc_req_ready). Each request carries a tag
// naming its source (PE index, or N_PE for the memory queue) and, for host
// requests, the host link and tag. Read data return from the vault
// controller with that tag and are steered to the PE's read buffer or to the
// host response queue.
//
// Host reads are admitted only while the host response queue has a free
// place for their reply (counted by host_credits, this design's choice), so
// replies are never dropped. Source N_PE is the memory queue.
module vault_arbiter
  import pim_pkg::*;
#(
  parameter int unsigned N_PE        = 2,
  parameter int unsigned HRESP_DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // PE side
  input  logic [N_PE-1:0]          pe_req_valid,
  input  pe_req_t                  pe_req      [N_PE],
  input  logic [WORD_W-1:0]        pe_req_wdata[N_PE],
  output logic [N_PE-1:0]          pe_req_pop,
  output logic [N_PE-1:0]          pe_resp_valid,
  output logic [WORD_W-1:0]        pe_resp_data,
  // memory queue side
  input  logic                     mq_valid,
  input  mem_req_t                 mq_req,
  output logic                     mq_pop,
  output logic                     host_resp_push,
  output logic [LINK_W-1:0]        host_resp_link,
  output logic [HTAG_W-1:0]        host_resp_tag,
  output logic [WORD_W-1:0]        host_resp_data,
  input  logic                     host_resp_pop,   // a reply left the response queue
  // vault controller
  output logic                     vc_req_valid,
  output vc_req_t                  vc_req,
  input  logic                     vc_req_ready,
  input  logic                     vc_resp_valid,
  input  vc_resp_t                 vc_resp
);

  localparam int unsigned NS = N_PE + 1;
  localparam int unsigned HW = $clog2(HRESP_DEPTH + 1);

  logic [NS-1:0]           src_req, grant;
  logic [$clog2(NS)-1:0]   grant_idx;
  logic [HW-1:0]           host_credits;
  logic                    mq_ok, fire;

  // A host read needs a free place for its reply.
  assign mq_ok = mq_valid && (mq_req.we || host_credits != '0);
  assign src_req = {mq_ok, pe_req_valid};

  rr_arbiter #(.N(NS)) u_arb (
    .clk, .rst_n, .req(src_req), .advance(fire), .grant, .grant_idx
  );

  assign vc_req_valid = (grant != '0);
  assign fire         = vc_req_valid && vc_req_ready;

  always_comb begin
    vc_req = '0;
    if (grant[N_PE]) begin
      vc_req.we       = mq_req.we;
      vc_req.addr     = mq_req.addr;
      vc_req.wdata    = mq_req.wdata;
      vc_req.tag.src  = SRC_W'(N_PE);
      vc_req.tag.link = mq_req.link;
      vc_req.tag.htag = mq_req.tag;
    end else begin
      for (int unsigned p = 0; p < N_PE; p++) begin
        if (grant[p]) begin
          vc_req.we      = pe_req[p].we;
          vc_req.addr    = pe_req[p].addr;
          vc_req.wdata   = pe_req_wdata[p];
          vc_req.tag.src = SRC_W'(p);
        end
      end
    end
  end

  assign pe_req_pop = fire ? grant[N_PE-1:0] : '0;
  assign mq_pop     = fire && grant[N_PE];

  // Read data steering.
  always_comb begin
    pe_resp_valid = '0;
    for (int unsigned p = 0; p < N_PE; p++)
      pe_resp_valid[p] = vc_resp_valid && (vc_resp.tag.src == SRC_W'(p));
  end
  assign pe_resp_data   = vc_resp.rdata;
  assign host_resp_push = vc_resp_valid && (vc_resp.tag.src == SRC_W'(N_PE));
  assign host_resp_link = vc_resp.tag.link;
  assign host_resp_tag  = vc_resp.tag.htag;
  assign host_resp_data = vc_resp.rdata;

  // Credits for the host response queue.
  logic take_credit;
  assign take_credit = mq_pop && !mq_req.we;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_credits <= HW'(HRESP_DEPTH);
    else        host_credits <= host_credits - HW'(take_credit) + HW'(host_resp_pop);
  end

  a_src_known: assert property (@(posedge clk) disable iff (!rst_n)
    vc_resp_valid |-> (vc_resp.tag.src <= SRC_W'(N_PE)));
  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    host_credits <= HW'(HRESP_DEPTH));

endmodule
