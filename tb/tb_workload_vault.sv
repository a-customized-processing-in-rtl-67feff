// tb_workload_vault: the database-search workload on one vault, at sizes a
// simulator can finish. One query of random DNA is compared with six
// references of 64, 256 and 1024 characters (two of each), run as six PIM
// packets on the vault's two PEs. Five references are random; the last one
// is close to the query, so it must come out as the vault's best. The
// vault controller model accepts a request every cycle (no back-pressure,
// fixed latency), so the vault's single request port is the limit, as it
// is for a real vault at full bandwidth.
// Checks:
//  * the final score of every task and the vault's best score and best
//    reference, against the software model;
//  * memory traffic per DP cell. Each cell reads North and writes its DP
//    word, and one word of B and one Dir word serve 16 cells, so the rate
//    must come out close to 2.125 accesses per cell;
//  * the vault request port stays busy while both PEs work, which is the
//    sense in which two PEs per vault use up the vault's bandwidth.
// The query is 1024 characters long; a longer one only takes
// longer to simulate.
module tb_workload_vault;
  import pim_pkg::*;
  import nw_ref_pkg::*;
  localparam int M    = 1024;
  localparam int NREF = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic req_valid, req_ready, pim_credit, resp_valid, idle;
  logic resp_ready = 1'b1;
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
    .vault_id(5'd3), .best_score, .best_addr_b, .tasks_done, .idle);
  vault_mem_model #(.LATENCY(8), .STALL_PCT(0)) u_mem (.*);

  // port use while both PEs hold a task
  longint both_cycles = 0, both_busy_port = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.agu_ready == '0) begin
      both_cycles++;
      if (vc_req_valid && vc_req_ready) both_busy_port++;
    end
  end

  task automatic send(input host_req_t r);
    @(negedge clk);
    req_valid = 1; req = r;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    int q[], refs[NREF][], rdp[], rdr[];
    int lens[NREF] = '{64, 1024, 256, 64, 256, 1024};
    int score[NREF];
    logic [31:0] base_b[NREF], base_dp[NREF], base_dir[NREF];
    int best;
    longint cells, t0, t1;
    real per_cell, port_use;
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    q = new[M];
    foreach (q[k]) q[k] = $urandom_range(3);
    for (int k = 0; k < (M + 15) / 16; k++) u_mem.poke(32'h100 + 4 * k, pack_word(q, k));
    best = -(1 << 30);
    cells = 0;
    for (int r = 0; r < NREF; r++) begin
      refs[r] = new[lens[r]];
      // the last reference copies six of every seven query characters, so its
      // score is well above the rest
      foreach (refs[r][k]) refs[r][k] = (r == 5 && k < M && k % 7 != 0) ? q[k] : $urandom_range(3);
      base_b[r]   = 32'h1_0000 + 32'h1000 * r;
      base_dp[r]  = 32'h100_0000 + 32'h40_0000 * r;
      base_dir[r] = 32'h800_0000 + 32'h10_0000 * r;
      for (int k = 0; k < (lens[r] + 15) / 16; k++) u_mem.poke(base_b[r] + 4 * k, pack_word(refs[r], k));
      nw_fill(q, refs[r], 1, -1, -1, rdp, rdr);
      score[r] = rdp[M*lens[r]-1];
      if (score[r] > best) best = score[r];
      cells += longint'(M) * lens[r];
    end
    t0 = cycles;
    for (int r = 0; r < NREF; r++) begin
      host_req_t p = '0;
      p.cmd = CMD_PIM; p.vault = 5'd3;
      p.pim = '{addr_a: 32'h100, addr_b: base_b[r], addr_dp: base_dp[r],
                addr_dir: base_dir[r], len_a: 32'(M), len_b: 32'(lens[r])};
      send(p);
    end
    while (tasks_done != NREF) @(negedge clk);
    t1 = cycles;
    repeat (40) @(negedge clk);
    check(idle, "vault idle at the end");
    for (int r = 0; r < NREF; r++)
      check($signed(u_mem.peek(base_dp[r] + 4 * (M * lens[r] - 1))) == score[r],
            $sformatf("final score of task %0d", r));
    check(best_score == best, $sformatf("best score %0d vs %0d", best_score, best));
    check(best_addr_b == base_b[5] && score[5] == best, "best reference is the similar one");
    per_cell = real'(u_mem.n_reads + u_mem.n_writes) / real'(cells);
    port_use = real'(both_busy_port) / real'(both_cycles);
    $display("%0d cells in %0d cycles (%.3f cells/cycle), %.4f accesses per cell, port busy %.3f while both PEs work",
             cells, t1 - t0, real'(cells) / real'(t1 - t0), per_cell, port_use);
    check(per_cell > 2.10 && per_cell < 2.16, $sformatf("accesses per cell %.4f", per_cell));
    check(both_cycles > 0, "the two PEs never worked at the same time");
    check(port_use > 0.95, $sformatf("vault port busy only %.3f of the time with two PEs", port_use));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
