// tb_pe: one processing element (AGU, datapath, address/store queues, read
// buffer) against the behavioural vault controller with random
// back-pressure. Runs back-to-back alignment tasks at different addresses and
// checks the DP matrix, the direction matrix and the final score of each
// against the reference model, that a busy PE reports agu_ready low, and
// that the 10-entry address queue filled up at least once (AGU stall).
// Also counts the memory accesses of each task: one North read and one DP
// write per cell plus one B read and one Dir write per 16 cells, which is
// about 2.125 accesses per cell for long rows.
module tb_pe;
  import pim_pkg::*;
  import nw_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_full = 0, cycles_busy = 0, cells = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic task_valid, agu_ready, done, req_valid, req_pop;
  pim_task_t task_in;
  logic signed [31:0] score;
  pe_req_t req;
  logic [31:0] req_wdata;
  logic vc_req_valid, vc_req_ready, vc_resp_valid;
  vc_req_t vc_req;
  vc_resp_t vc_resp;

  pe dut (.clk, .rst_n, .task_valid, .task_in, .agu_ready, .done, .score,
          .req_valid, .req, .req_wdata, .req_pop,
          .resp_valid(vc_resp_valid), .resp_data(vc_resp.rdata));

  assign vc_req_valid = req_valid;
  assign vc_req       = '{we: req.we, addr: req.addr, wdata: req_wdata, tag: '0};
  assign req_pop      = req_valid && vc_req_ready;

  vault_mem_model #(.LATENCY(8), .STALL_PCT(30)) u_mem (.*);

  always @(posedge clk) if (rst_n && dut.rq_full) n_full++;

  // memory accesses per task, counted at the vault controller
  int n_rd = 0, n_wr = 0;
  always @(posedge clk) if (rst_n && vc_req_valid && vc_req_ready) begin
    if (vc_req.we) n_wr++; else n_rd++;
  end

  task automatic run_task(input int m, input int n, input int unsigned base);
    int a[], b[], rdp[], rdr[];
    int w;
    pim_task_t t;
    a = new[m]; b = new[n];
    foreach (a[k]) a[k] = $urandom_range(3);
    foreach (b[k]) b[k] = $urandom_range(3);
    t = '{addr_a: base, addr_b: base + 32'h400, addr_dp: base + 32'h1000,
          addr_dir: base + 32'h8000, len_a: 32'(m), len_b: 32'(n)};
    for (int k = 0; k < (m + 15) / 16; k++) u_mem.poke(t.addr_a + 4 * k, pack_word(a, k));
    for (int k = 0; k < (n + 15) / 16; k++) u_mem.poke(t.addr_b + 4 * k, pack_word(b, k));
    nw_fill(a, b, 1, -1, -1, rdp, rdr);
    @(negedge clk);
    while (!agu_ready) @(negedge clk);
    task_valid = 1; task_in = t;
    @(negedge clk);
    task_valid = 0;
    check(!agu_ready, "busy after the task is taken");
    w = 0;
    while (!done && w < 200000) begin @(negedge clk); w++; end
    cycles_busy += w; cells += m * n;
    check(done, "task done");
    check(score == rdp[m*n-1], $sformatf("score %0d vs %0d", score, rdp[m*n-1]));
    // let the last writes reach memory
    while (req_valid) @(negedge clk);
    for (int k = 0; k < m * n; k++)
      check(u_mem.peek(t.addr_dp + 4 * k) == rdp[k], $sformatf("DP %0d m=%0d n=%0d", k, m, n));
    // access counts: A once per 16 rows, B once per 16 columns of every row,
    // North for rows 1..m-1; DP every cell, Dir once per 16 columns per row
    check(n_rd == (m + 15) / 16 + m * ((n + 15) / 16) + (m - 1) * n,
          $sformatf("reads %0d for m=%0d n=%0d", n_rd, m, n));
    check(n_wr == m * n + m * ((n + 15) / 16), $sformatf("writes %0d for m=%0d n=%0d", n_wr, m, n));
    $display("m=%0d n=%0d: %0d accesses, %0.3f per cell", m, n, n_rd + n_wr, real'(n_rd + n_wr) / (m * n));
    n_rd = 0; n_wr = 0;
    for (int i = 0; i < m; i++) for (int j = 0; j < n; j++)
      check(u_mem.peek(t.addr_dir + 4 * dir_word_index(i, j, n))[2*(j%16) +: 2] == 2'(rdr[i*n+j]),
            $sformatf("Dir %0d,%0d", i, j));
  endtask

  initial begin
    task_valid = 0; task_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_task(5, 7, 32'h0010_0000);
    run_task(20, 18, 32'h0020_0000);
    run_task(1, 1, 32'h0030_0000);
    run_task(33, 16, 32'h0040_0000);
    run_task(40, 64, 32'h0050_0000);
    check(n_full > 0, "address queue never filled (no AGU stall)");
    $display("cells %0d in %0d cycles", cells, cycles_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
