// tb_agu: the AGU driving a real datapath, with the address queue, store
// queue, memory and read buffer modelled in the testbench.
// Checks, for random tasks (including lengths 1, 16, 17 and 33 around word
// boundaries) and random queue back-pressure and memory latency:
//  * DP and Dir words written to memory equal the reference model, the
//    final score equals DP(m-1,n-1), and no other address is written;
//  * A, B and North reads stay inside their structures, and every North read
//    of DP(i-1,j) is issued after the write of DP(i-1,j);
//  * the DP write is queued in the cycle right after the start pulse
//    whenever the queue has room (one-cycle datapath);
//  * agu_ready is low while a task runs and the number of reads in flight
//    never exceeds the read buffer depth.
module tb_agu;
  import pim_pkg::*;
  import nw_ref_pkg::*;
  localparam int RESP_DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_full = 0, n_wb_next = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic task_valid, agu_ready, done;
  pim_task_t task_in;
  logic signed [31:0] score;
  logic rq_push, rq_full, sq_push, sq_full, rd_valid, rd_pop;
  pe_req_t rq_data;
  logic [31:0] sq_data, rd_data;
  logic ld_a, ld_b, ld_north, row_init, start, dp_valid;
  logic [1:0] a_char, b_char;
  logic signed [31:0] north, west_init, nw_init, dp_value;
  dir_e dp_dir;

  agu #(.RESP_DEPTH(RESP_DEPTH)) dut (.*);
  pe_datapath u_dp (.clk, .rst_n, .ld_a, .a_in(a_char), .ld_b, .b_in(b_char),
    .ld_north, .north_in(north), .row_init, .west_init, .nw_init, .start,
    .valid(dp_valid), .value(dp_value), .direction(dp_dir),
    .st_wr_en(1'b0), .st_wr_addr('0), .st_wr_score('0));

  // memory and queues
  logic [31:0] mem [int unsigned];
  logic [31:0] rbuf [$];
  logic [31:0] pend_d [$];
  int          pend_t [$];
  int          cyc = 0;
  int          written [int unsigned];   // word address -> cycle of the write
  bit          start_d1;

  assign rd_valid = rbuf.size() > 0;
  assign rd_data  = rbuf.size() > 0 ? rbuf[0] : 32'd0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    start_d1 <= start;
    if (rst_n) begin
      if (rq_full) n_full++;
      // one-cycle write-back after start
      if (start_d1 && !rq_full && !sq_full) begin
        check(rq_push && rq_data.we, "DP write queued the cycle after start");
        n_wb_next++;
      end
      if (rq_push) begin
        check(!rq_full, "push into a full address queue");
        if (rq_data.we) begin
          check(sq_push, "write without store data");
          mem[rq_data.addr >> 2] = sq_data;
          written[rq_data.addr >> 2] = cyc;
        end else begin
          pend_d.push_back(mem.exists(rq_data.addr >> 2) ? mem[rq_data.addr >> 2] : 32'hDEAD_BEEF);
          pend_t.push_back(cyc + $urandom_range(1, 12));
          last_read = rq_data.addr;
        end
      end
      if (rd_pop) void'(rbuf.pop_front());
      if (pend_d.size() > 0 && pend_t[0] <= cyc) begin
        rbuf.push_back(pend_d.pop_front());
        void'(pend_t.pop_front());
      end
      check(rbuf.size() + pend_d.size() <= RESP_DEPTH, "more reads in flight than buffer room");
    end
  end
  logic [31:0] last_read;

  always @(negedge clk) begin
    rq_full <= ($urandom_range(99) < 15);
    sq_full <= 1'b0;
  end

  // North read ordering: the DP word read must already have been written.
  always @(posedge clk) begin
    if (rst_n && rq_push && !rq_data.we &&
        rq_data.addr >= task_in.addr_dp && rq_data.addr < task_in.addr_dir)
      check(written.exists(rq_data.addr >> 2), $sformatf("North read of %h before its write", rq_data.addr));
  end

  task automatic run_task(input int m, input int n);
    int a[], b[], rdp[], rdr[];
    int wait_c;
    a = new[m]; b = new[n];
    foreach (a[k]) a[k] = $urandom_range(3);
    foreach (b[k]) b[k] = $urandom_range(3);
    // sequences: A at 0x1000, B at 0x2000, DP at 0x10000, Dir at 0x80000
    mem.delete(); written.delete();
    for (int k = 0; k < (m + 15) / 16; k++) mem[(32'h1000 >> 2) + k] = pack_word(a, k);
    for (int k = 0; k < (n + 15) / 16; k++) mem[(32'h2000 >> 2) + k] = pack_word(b, k);
    nw_fill(a, b, 1, -1, -1, rdp, rdr);
    @(negedge clk);
    check(agu_ready, "agu_ready before the task");
    task_valid = 1;
    task_in = '{addr_a: 32'h1000, addr_b: 32'h2000, addr_dp: 32'h10000, addr_dir: 32'h80000,
                len_a: 32'(m), len_b: 32'(n)};
    @(negedge clk);
    task_valid = 0;
    check(!agu_ready, "agu_ready low while busy");
    wait_c = 0;
    while (!done && wait_c < 100000) begin @(negedge clk); wait_c++; end
    check(done, "task finished");
    @(negedge clk);
    check(agu_ready, "agu_ready after the task");
    check(score == rdp[m*n-1], $sformatf("score %0d vs %0d (m=%0d n=%0d)", score, rdp[m*n-1], m, n));
    for (int k = 0; k < m * n; k++)
      check(mem.exists((32'h10000 >> 2) + k) && mem[(32'h10000 >> 2) + k] == rdp[k],
            $sformatf("DP cell %0d (m=%0d n=%0d)", k, m, n));
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) begin
        int wi = (32'h80000 >> 2) + dir_word_index(i, j, n);
        check(mem.exists(wi) && mem[wi][2*(j%16) +: 2] == 2'(rdr[i*n + j]),
              $sformatf("Dir cell %0d,%0d", i, j));
      end
    // nothing written outside DP and Dir
    foreach (written[w])
      check((w >= (32'h10000 >> 2) && w < (32'h10000 >> 2) + m * n) ||
            (w >= (32'h80000 >> 2) && w < (32'h80000 >> 2) + m * ((n + 15) / 16)),
            $sformatf("stray write to word %h", w));
  endtask

  initial begin
    task_valid = 0; task_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_task(1, 1);
    run_task(3, 4);
    run_task(16, 16);
    run_task(17, 33);
    run_task(2, 1);
    run_task(1, 20);
    for (int t = 0; t < 8; t++) run_task($urandom_range(1, 40), $urandom_range(1, 40));
    check(n_full > 0, "address queue never full");
    check(n_wb_next > 0, "write-back timing never observed");
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
