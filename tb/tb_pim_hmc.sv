// tb_pim_hmc: end-to-end run of the whole logic layer at its default size
// (32 vaults, 2 PEs each, 4 links), with one behavioural vault controller
// per vault. The host side, modelled here, does what the host of the
// accelerator does:
//  1. writes the query sequence into every vault and REFS_PER_VAULT
//     reference sequences per vault, with write packets over the 4 links;
//  2. sends one PIM packet per reference sequence, tagged with its vault,
//     as a burst per vault longer than the PIM queue, each only while it holds a credit for that vault's PIM queue;
//  3. reads results back with read packets while the PEs run and after;
//  4. compares the 32 per-vault maxima to find the global best alignment.
// Checks every DP cell and direction word in every vault, the per-vault and
// global best scores, the read replies and the link they return on, and
// counts the mechanisms: PIM credit stall, both PEs of a vault busy, PE
// address queue full, several vaults contending for one link's replies, and
// host reads served while PEs align. A mechanism that never happened counts
// as a failure.
module tb_pim_hmc;
  import pim_pkg::*;
  import nw_ref_pkg::*;
  localparam int NV = 32, NL = 4, PIM_Q_DEPTH = 8;
  localparam int REFS_PER_VAULT = 12;
  localparam int M = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int credit_stalls = 0, both_busy = 0, q_full = 0, resp_contention = 0, host_during = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [NL-1:0] link_req_valid, link_req_ready, link_resp_valid, link_resp_ready;
  host_req_t link_req [NL];
  host_resp_t link_resp [NL];
  logic [NV-1:0] pim_credit, vc_req_valid, vc_req_ready, vc_resp_valid, vault_idle;
  vc_req_t vc_req [NV];
  vc_resp_t vc_resp [NV];
  logic signed [31:0] best_score [NV];
  logic [31:0] best_addr_b [NV], tasks_done [NV];

  pim_hmc dut (.*);

  for (genvar v = 0; v < NV; v++) begin : g_mem
    vault_mem_model #(.LATENCY(6), .STALL_PCT(10)) u_mem (
      .clk, .rst_n, .vc_req_valid(vc_req_valid[v]), .vc_req(vc_req[v]),
      .vc_req_ready(vc_req_ready[v]), .vc_resp_valid(vc_resp_valid[v]), .vc_resp(vc_resp[v]));
  end

  // ---------------- monitors ----------------
  int credits [NV];
  logic [31:0] shadow [NV][int unsigned];
  logic [31:0] exp_data [NL][int];
  int replies = 0, reads = 0;
  assign link_resp_ready = '1;

  for (genvar v = 0; v < NV; v++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (pim_credit[v]) credits[v]++;
      if (vc_req_valid[v] && vc_req_ready[v] && vc_req[v].we) shadow[v][vc_req[v].addr >> 2] = vc_req[v].wdata;
      if (dut.g_vault[v].u_vault.agu_ready == '0) both_busy++;
      if (dut.g_vault[v].u_vault.g_pe[0].u_pe.rq_full || dut.g_vault[v].u_vault.g_pe[1].u_pe.rq_full) q_full++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) begin
      automatic int waiting = 0;
      for (int v = 0; v < NV; v++)
        if (dut.v_resp_valid[v] && dut.v_resp[v].link == LINK_W'(l)) waiting++;
      if (waiting > 1) resp_contention++;
      if (link_resp_valid[l]) begin
        check(link_resp[l].link == LINK_W'(l), "reply on the wrong link");
        check(exp_data[l].exists(int'(link_resp[l].tag)) &&
              link_resp[l].rdata == exp_data[l][int'(link_resp[l].tag)], "read reply data");
        replies++;
      end
    end
  end

  // ---------------- host ----------------
  task automatic send(input int l, input host_req_t r);
    r.link = LINK_W'(l);
    @(negedge clk);
    link_req_valid[l] = 1; link_req[l] = r;
    @(posedge clk);
    while (!link_req_ready[l]) @(posedge clk);
    @(negedge clk);
    link_req_valid[l] = 0;
  endtask

  int tagc [NL];
  task automatic host_read(input int l, input int v, input logic [31:0] a, input logic [31:0] d);
    host_req_t r = '0;
    r.cmd = CMD_RD; r.vault = VAULT_W'(v); r.addr = a; r.tag = HTAG_W'(tagc[l]);
    exp_data[l][tagc[l] % 256] = d;
    tagc[l]++;
    reads++;
    send(l, r);
  endtask

  int q[];
  int refs [NV][REFS_PER_VAULT][];
  int rdp  [NV][REFS_PER_VAULT][];
  int rdr  [NV][REFS_PER_VAULT][];

  function automatic logic [31:0] b_addr(input int r);  return 32'h1000 + 32'h100 * r;  endfunction
  function automatic logic [31:0] dp_addr(input int r); return 32'h10_0000 + 32'h1_0000 * r; endfunction
  function automatic logic [31:0] dir_addr(input int r); return 32'h80_0000 + 32'h1_0000 * r; endfunction

  function automatic bit link_vaults_done(input int l);
    for (int v = l; v < NV; v += NL)
      if (tasks_done[v] != REFS_PER_VAULT) return 0;
    return 1;
  endfunction

  // Everything link l does: the vaults v with v % NL == l.
  task automatic link_host(input int l);
    for (int v = l; v < NV; v += NL) begin
      for (int k = 0; k < (M + 15) / 16; k++) begin
        host_req_t r = '0;
        r.cmd = CMD_WR; r.vault = VAULT_W'(v); r.addr = 32'h100 + 4 * k; r.wdata = pack_word(q, k);
        send(l, r);
      end
      for (int rr = 0; rr < REFS_PER_VAULT; rr++)
        for (int k = 0; k < (refs[v][rr].size() + 15) / 16; k++) begin
          host_req_t r = '0;
          r.cmd = CMD_WR; r.vault = VAULT_W'(v); r.addr = b_addr(rr) + 4 * k;
          r.wdata = pack_word(refs[v][rr], k);
          send(l, r);
        end
    end
    // PIM packets, a burst per vault (more than the PIM queue holds)
    for (int v = l; v < NV; v += NL)
      for (int rr = 0; rr < REFS_PER_VAULT; rr++) begin
        host_req_t p = '0;
        while (credits[v] == 0) begin credit_stalls++; @(negedge clk); end
        p.cmd = CMD_PIM; p.vault = VAULT_W'(v);
        p.pim = '{addr_a: 32'h100, addr_b: b_addr(rr), addr_dp: dp_addr(rr), addr_dir: dir_addr(rr),
                  len_a: 32'(M), len_b: 32'(refs[v][rr].size())};
        credits[v]--;
        send(l, p);
      end
    // poll with reads of the query word while the vaults work
    while (!link_vaults_done(l)) begin
      // the query word of every vault of this link and of the next vault up,
      // which another link loads, so replies must follow the request's link
      for (int v = l; v < NV; v += NL) begin
        host_read(l, v, 32'h100, pack_word(q, 0));
        host_read(l, (v + 1) % NV, 32'h100, pack_word(q, 0));
      end
      host_during++;
      repeat (20) @(negedge clk);
    end
  endtask

  initial begin
    int gbest, gvault, total;
    link_req_valid = '0;
    foreach (link_req[l]) link_req[l] = '0;
    foreach (credits[v]) credits[v] = PIM_Q_DEPTH;
    foreach (tagc[l]) tagc[l] = 0;
    q = new[M];
    foreach (q[k]) q[k] = $urandom_range(3);
    for (int v = 0; v < NV; v++)
      for (int r = 0; r < REFS_PER_VAULT; r++) begin
        automatic int n = $urandom_range(8, 30);
        refs[v][r] = new[n];
        foreach (refs[v][r][k]) refs[v][r][k] = ((v + r) % 7 == 0 && k < M) ? q[k] : $urandom_range(3);
        nw_fill(q, refs[v][r], 1, -1, -1, rdp[v][r], rdr[v][r]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      link_host(0);
      link_host(1);
      link_host(2);
      link_host(3);
    join
    while (!(&vault_idle)) @(negedge clk);
    repeat (200) @(negedge clk);
    // results
    gbest = -1000000; gvault = -1; total = 0;
    for (int v = 0; v < NV; v++) begin
      automatic int vb = -1000000;
      automatic bit found = 0;
      total += tasks_done[v];
      check(tasks_done[v] == REFS_PER_VAULT, $sformatf("vault %0d tasks %0d", v, tasks_done[v]));
      for (int r = 0; r < REFS_PER_VAULT; r++) begin
        automatic int n = refs[v][r].size();
        if (rdp[v][r][M*n-1] > vb) vb = rdp[v][r][M*n-1];
        for (int k = 0; k < M * n; k++)
          check(g_mem_peek(v, dp_addr(r) + 4 * k) == rdp[v][r][k], $sformatf("vault %0d task %0d DP %0d", v, r, k));
        for (int i = 0; i < M; i++) for (int j = 0; j < n; j++)
          check(g_mem_peek(v, dir_addr(r) + 4 * dir_word_index(i, j, n))[2*(j%16) +: 2] == 2'(rdr[v][r][i*n+j]),
                "Dir");
      end
      check(best_score[v] == vb, $sformatf("vault %0d best %0d vs %0d", v, best_score[v], vb));
      for (int r = 0; r < REFS_PER_VAULT; r++)
        if (best_addr_b[v] == b_addr(r) && rdp[v][r][M*refs[v][r].size()-1] == vb) found = 1;
      check(found, $sformatf("vault %0d best reference address", v));
      if (best_score[v] > gbest) begin gbest = best_score[v]; gvault = v; end
    end
    $display("global best score %0d in vault %0d, %0d alignments", gbest, gvault, total);
    // read the winning DP cell back through a link
    begin
      automatic int r = (best_addr_b[gvault] - 32'h1000) / 32'h100;
      automatic int n = refs[gvault][r].size();
      host_read(gvault % NL, gvault, dp_addr(r) + 4 * (M * n - 1), rdp[gvault][r][M*n-1]);
    end
    repeat (100) @(negedge clk);
    check(replies == reads, $sformatf("replies %0d of %0d reads", replies, reads));
    $display("credit stalls %0d, both PEs busy %0d, queue full %0d, reply contention %0d, host reads during run %0d",
             credit_stalls, both_busy, q_full, resp_contention, host_during);
    check(credit_stalls > 0, "no PIM credit stall");
    check(both_busy > 0, "never two PEs of a vault busy");
    check(q_full > 0, "no address queue full");
    check(resp_contention > 0, "no reply contention on a link");
    check(host_during > 0, "no host reads during alignment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory contents as written through each vault controller.
  function automatic logic [31:0] g_mem_peek(input int v, input logic [31:0] a);
    return shadow[v].exists(a >> 2) ? shadow[v][a >> 2] : 32'd0;
  endfunction

  initial begin
    #200000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
