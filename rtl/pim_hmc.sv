// pim_hmc: logic layer of an HMC-like memory stack with sequence alignment
// processing elements in every vault.
//
// Host packets arrive on N_LINKS link ports (the serial link controllers
// themselves are outside this RTL). A request crossbar steers each packet to
// the vault its vault field names. Every vault (pim_vault) separates PIM
// alignment packets from ordinary reads and writes, schedules the alignment
// tasks on its N_PE processing elements and shares its vault controller
// between the PEs and the host traffic. Read replies return through a
// response crossbar to the link the request came from. The DRAM vault
// controllers are outside this RTL: each vault's controller channel is a
// port of this module. So are the per-vault flow-control credits of the PIM
// queues and the per-vault best alignment score, which the host compares to
// find the global best. Defaults follow the design description: 32 vaults, 4
// links, 2 PEs per vault (64 PEs) and a 10-entry PE address queue, with
// DNA characters (CHAR_BITS = 2; 5 selects a protein alphabet).
//
// Timing: all ports are synchronous to clk; requests and replies use
// valid/ready handshakes, vault controller read data are always accepted.
module pim_hmc
  import pim_pkg::*;
#(
  parameter int unsigned CHAR_BITS   = pim_pkg::CHAR_W,
  parameter int unsigned N_VAULTS    = 32,
  parameter int unsigned N_LINKS     = 4,
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
  // host links
  input  logic [N_LINKS-1:0]      link_req_valid,
  input  host_req_t               link_req       [N_LINKS],
  output logic [N_LINKS-1:0]      link_req_ready,
  output logic [N_LINKS-1:0]      link_resp_valid,
  output host_resp_t              link_resp      [N_LINKS],
  input  logic [N_LINKS-1:0]      link_resp_ready,
  output logic [N_VAULTS-1:0]     pim_credit,
  // vault controllers
  output logic [N_VAULTS-1:0]     vc_req_valid,
  output vc_req_t                 vc_req         [N_VAULTS],
  input  logic [N_VAULTS-1:0]     vc_req_ready,
  input  logic [N_VAULTS-1:0]     vc_resp_valid,
  input  vc_resp_t                vc_resp        [N_VAULTS],
  // per-vault results
  output logic signed [DP_W-1:0]  best_score     [N_VAULTS],
  output logic [ADDR_W-1:0]       best_addr_b    [N_VAULTS],
  output logic [31:0]             tasks_done     [N_VAULTS],
  output logic [N_VAULTS-1:0]     vault_idle
);

  localparam int unsigned VW = (N_VAULTS > 1) ? $clog2(N_VAULTS) : 1;
  localparam int unsigned LW = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;
  localparam int unsigned RQ_W = $bits(host_req_t);
  localparam int unsigned RS_W = $bits(host_resp_t);

  // ---------------- request crossbar: links -> vaults ----------------
  logic [VW-1:0]      rq_dest [N_LINKS];
  logic [RQ_W-1:0]    rq_in   [N_LINKS];
  logic [N_VAULTS-1:0] v_req_valid, v_req_ready;
  logic [RQ_W-1:0]    v_req_bits [N_VAULTS];

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link_in
    assign rq_dest[l] = VW'(link_req[l].vault);
    assign rq_in[l]   = link_req[l];
  end

  xbar #(.N_IN(N_LINKS), .N_OUT(N_VAULTS), .W(RQ_W), .DW(VW)) u_req_xbar (
    .clk, .rst_n,
    .in_valid(link_req_valid), .in_dest(rq_dest), .in_data(rq_in),
    .in_ready(link_req_ready),
    .out_valid(v_req_valid), .out_data(v_req_bits), .out_ready(v_req_ready)
  );

  // ---------------- vaults ----------------
  logic [N_VAULTS-1:0] v_resp_valid, v_resp_ready;
  host_resp_t          v_resp [N_VAULTS];
  logic [LW-1:0]       rs_dest [N_VAULTS];
  logic [RS_W-1:0]     rs_in   [N_VAULTS];

  for (genvar v = 0; v < N_VAULTS; v++) begin : g_vault
    pim_vault #(
      .CHAR_BITS(CHAR_BITS), .N_PE(N_PE), .QUEUE_DEPTH(QUEUE_DEPTH), .PIM_Q_DEPTH(PIM_Q_DEPTH),
      .MEM_Q_DEPTH(MEM_Q_DEPTH), .RESP_DEPTH(RESP_DEPTH),
      .HRESP_DEPTH(HRESP_DEPTH), .GAP(GAP)
    ) u_vault (
      .clk, .rst_n,
      .req_valid(v_req_valid[v]), .req(host_req_t'(v_req_bits[v])),
      .req_ready(v_req_ready[v]), .pim_credit(pim_credit[v]),
      .resp_valid(v_resp_valid[v]), .resp(v_resp[v]), .resp_ready(v_resp_ready[v]),
      .vc_req_valid(vc_req_valid[v]), .vc_req(vc_req[v]), .vc_req_ready(vc_req_ready[v]),
      .vc_resp_valid(vc_resp_valid[v]), .vc_resp(vc_resp[v]),
      .vault_id(VAULT_W'(v)),
      .best_score(best_score[v]), .best_addr_b(best_addr_b[v]),
      .tasks_done(tasks_done[v]), .idle(vault_idle[v])
    );
    assign rs_dest[v] = LW'(v_resp[v].link);
    assign rs_in[v]   = v_resp[v];
  end

  // ---------------- response crossbar: vaults -> links ----------------
  logic [RS_W-1:0] l_resp_bits [N_LINKS];

  xbar #(.N_IN(N_VAULTS), .N_OUT(N_LINKS), .W(RS_W), .DW(LW)) u_resp_xbar (
    .clk, .rst_n,
    .in_valid(v_resp_valid), .in_dest(rs_dest), .in_data(rs_in),
    .in_ready(v_resp_ready),
    .out_valid(link_resp_valid), .out_data(l_resp_bits), .out_ready(link_resp_ready)
  );

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link_out
    assign link_resp[l] = host_resp_t'(l_resp_bits[l]);
  end

endmodule
