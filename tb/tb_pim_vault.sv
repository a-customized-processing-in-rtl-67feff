// tb_pim_vault: one vault with its two PEs and the behavioural vault
// controller, driven as the host would drive it:
//  1. memory initialisation: the query and reference sequences are written
//     with ordinary write packets through the memory queue;
//  2. one PIM packet per reference sequence, sent only while the host holds
//     a credit for the PIM queue (credits come back on pim_credit);
//  3. host reads of finished DP cells, mixed with the running PEs.
// Checks the per-vault best score and its reference address, the task
// count, every DP cell and direction word of every task, the read replies,
// and that the mechanisms happened: credit stall, both PEs busy at once,
// address queue full, host traffic during alignment.
module tb_pim_vault;
  import pim_pkg::*;
  import nw_ref_pkg::*;
  localparam int PIM_Q_DEPTH = 8;
  localparam int NREF = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int credit_stalls = 0, both_busy = 0, q_full = 0, host_during = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic req_valid, req_ready, pim_credit, resp_valid, resp_ready, idle;
  host_req_t req;
  host_resp_t resp;
  logic vc_req_valid, vc_req_ready, vc_resp_valid;
  vc_req_t vc_req;
  vc_resp_t vc_resp;
  logic signed [31:0] best_score;
  logic [31:0] best_addr_b, tasks_done;

  pim_vault dut (.clk, .rst_n, .req_valid, .req, .req_ready, .pim_credit,
    .resp_valid, .resp, .resp_ready,
    .vc_req_valid, .vc_req, .vc_req_ready, .vc_resp_valid, .vc_resp,
    .vault_id(5'd7), .best_score, .best_addr_b, .tasks_done, .idle);
  vault_mem_model #(.LATENCY(6), .STALL_PCT(15)) u_mem (.*);

  int credits = PIM_Q_DEPTH;
  always @(posedge clk) begin
    if (rst_n) begin
      if (pim_credit) credits++;
      if (dut.agu_ready == '0) both_busy++;
      if (dut.g_pe[0].u_pe.rq_full || dut.g_pe[1].u_pe.rq_full) q_full++;
    end
  end

  // replies: expected data by tag
  logic [31:0] exp_data [int];
  int replies = 0;
  assign resp_ready = 1'b1;
  always @(posedge clk) if (rst_n && resp_valid) begin
    check(exp_data.exists(int'(resp.tag)) && resp.rdata == exp_data[int'(resp.tag)], "read reply data");
    check(resp.vault == 5'd7, "reply vault id");
    replies++;
  end

  task automatic send(input host_req_t r);
    @(negedge clk);
    req_valid = 1; req = r;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic host_write(input logic [31:0] a, input logic [31:0] d);
    host_req_t r = '0;
    r.cmd = CMD_WR; r.vault = 5'd7; r.addr = a; r.wdata = d;
    send(r);
  endtask

  int tagc = 0;
  task automatic host_read(input logic [31:0] a, input logic [31:0] expect_d);
    host_req_t r = '0;
    r.cmd = CMD_RD; r.vault = 5'd7; r.addr = a; r.tag = HTAG_W'(tagc);
    exp_data[tagc % 256] = expect_d;
    tagc++;
    send(r);
  endtask

  initial begin
    int q[], refs[NREF][], rdp[NREF][], rdr[NREF][];
    int m, best, reads_sent;
    logic [31:0] base_b [NREF];
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    m = 20;
    q = new[m];
    foreach (q[k]) q[k] = $urandom_range(3);
    for (int k = 0; k < (m + 15) / 16; k++) host_write(32'h100 + 4 * k, pack_word(q, k));
    best = -1000;
    for (int r = 0; r < NREF; r++) begin
      automatic int n = $urandom_range(4, 40);
      refs[r] = new[n];
      foreach (refs[r][k]) refs[r][k] = (r % 3 == 0 && k < m) ? q[k] : $urandom_range(3);
      base_b[r] = 32'h1000 + 32'h100 * r;
      for (int k = 0; k < (n + 15) / 16; k++) host_write(base_b[r] + 4 * k, pack_word(refs[r], k));
      nw_fill(q, refs[r], 1, -1, -1, rdp[r], rdr[r]);
      if (rdp[r][m*n-1] > best) best = rdp[r][m*n-1];
    end
    // PIM packets under credit flow control
    for (int r = 0; r < NREF; r++) begin
      host_req_t p = '0;
      while (credits == 0) begin credit_stalls++; @(negedge clk); end
      p.cmd = CMD_PIM; p.vault = 5'd7;
      p.pim = '{addr_a: 32'h100, addr_b: base_b[r], addr_dp: 32'h10_0000 + 32'h1_0000 * r,
                addr_dir: 32'h80_0000 + 32'h1_0000 * r, len_a: 32'(m), len_b: 32'(refs[r].size())};
      credits--;
      send(p);
    end
    // host reads of the query while the PEs run
    reads_sent = 0;
    while (!(idle && tasks_done == NREF) && reads_sent < 5000) begin
      if (!idle) host_during++;
      host_read(32'h100, pack_word(q, 0));
      reads_sent++;
      repeat (5) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    check(tasks_done == NREF, $sformatf("tasks done %0d", tasks_done));
    check(best_score == best, $sformatf("best score %0d vs %0d", best_score, best));
    begin
      bit found = 0;
      for (int r = 0; r < NREF; r++)
        if (base_b[r] == best_addr_b && rdp[r][m*refs[r].size()-1] == best) found = 1;
      check(found, "best reference address");
    end
    for (int r = 0; r < NREF; r++) begin
      automatic int n = refs[r].size();
      for (int k = 0; k < m * n; k++)
        check(u_mem.peek(32'h10_0000 + 32'h1_0000 * r + 4 * k) == rdp[r][k], $sformatf("task %0d DP %0d", r, k));
      for (int i = 0; i < m; i++) for (int j = 0; j < n; j++)
        check(u_mem.peek(32'h80_0000 + 32'h1_0000 * r + 4 * dir_word_index(i, j, n))[2*(j%16) +: 2]
              == 2'(rdr[r][i*n+j]), "Dir");
    end
    // read back two DP results through the host path
    host_read(32'h10_0000 + 4 * (m * refs[0].size() - 1), rdp[0][m*refs[0].size()-1]);
    host_read(32'h10_0000 + 32'h1_0000 + 4 * (m * refs[1].size() - 1), rdp[1][m*refs[1].size()-1]);
    repeat (100) @(negedge clk);
    check(replies == tagc, $sformatf("replies %0d of %0d", replies, tagc));
    check(credits == PIM_Q_DEPTH, "all credits returned");
    check(credit_stalls > 0, "host never waited for a PIM credit");
    check(both_busy > 0, "the two PEs never worked at the same time");
    check(q_full > 0, "no address queue ever filled");
    check(host_during > 0, "no host traffic during alignment");
    $display("stalls %0d both_busy %0d q_full %0d host_during %0d", credit_stalls, both_busy, q_full, host_during);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
