// tb_vault_arbiter: two PE queues and the memory queue, modelled in the
// testbench, share the behavioural vault controller through the arbiter.
// Checks that every request reaches the controller once and in order per
// source, with the source's write data and tag; that read data come back to
// the PE or host that asked, in order and with the right value; that with
// all sources waiting the grants rotate; and that host reads stop while the
// host response queue is full (credits exhausted) and resume after it drains.
module tb_vault_arbiter;
  import pim_pkg::*;
  localparam int N_PE = 2, HRESP_DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, rotations = 0, credit_blocks = 0, host_reads = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [N_PE-1:0] pe_req_valid, pe_req_pop, pe_resp_valid;
  pe_req_t pe_req [N_PE];
  logic [31:0] pe_req_wdata [N_PE];
  logic [31:0] pe_resp_data;
  logic mq_valid, mq_pop, host_resp_push, host_resp_pop;
  mem_req_t mq_req;
  logic [LINK_W-1:0] host_resp_link;
  logic [HTAG_W-1:0] host_resp_tag;
  logic [31:0] host_resp_data;
  logic vc_req_valid, vc_req_ready, vc_resp_valid;
  vc_req_t vc_req;
  vc_resp_t vc_resp;

  vault_arbiter #(.N_PE(N_PE), .HRESP_DEPTH(HRESP_DEPTH)) dut (.*);
  vault_mem_model #(.LATENCY(5), .STALL_PCT(10)) u_mem (.*);

  // source queues: PE p uses addresses 0x1000*(p+1) + 4*k; host uses 0x9000 + 4*k
  pe_req_t  pq [N_PE][$];
  logic [31:0] pd [N_PE][$];
  mem_req_t hq [$];
  logic [31:0] exp_pe [N_PE][$];     // expected read data per PE
  logic [31:0] exp_host [$];
  logic [HTAG_W-1:0] exp_tag [$];
  logic [31:0] shadow [int unsigned];
  int last_src = -1;
  bit host_hold;
  int hr_count = 0;

  always_comb begin
    for (int p = 0; p < N_PE; p++) begin
      pe_req_valid[p] = pq[p].size() > 0;
      pe_req[p]       = pq[p].size() > 0 ? pq[p][0] : '0;
      pe_req_wdata[p] = pd[p].size() > 0 ? pd[p][0] : '0;
    end
    mq_valid = hq.size() > 0;
    mq_req   = hq.size() > 0 ? hq[0] : '0;
  end

  // host response queue model: drained only when host_hold is low
  assign host_resp_pop = (hr_count > 0) && !host_hold;

  always @(posedge clk) begin
    if (rst_n) begin
      // requests leaving
      if (vc_req_valid && vc_req_ready) begin
        automatic int src = int'(vc_req.tag.src);
        if (src < N_PE) begin
          check(pe_req_pop[src] && !mq_pop, "pop of the granted PE");
          check(vc_req.addr == pq[src][0].addr && vc_req.we == pq[src][0].we, "PE request order");
          if (vc_req.we) begin
            check(vc_req.wdata == pd[src][0], "PE write data");
            void'(pd[src].pop_front());
            shadow[vc_req.addr] = vc_req.wdata;
          end else exp_pe[src].push_back(shadow.exists(vc_req.addr) ? shadow[vc_req.addr] : 0);
          void'(pq[src].pop_front());
        end else begin
          check(src == N_PE && mq_pop, "memory queue source tag");
          check(vc_req.addr == hq[0].addr && vc_req.tag.htag == hq[0].tag, "host request order");
          if (vc_req.we) shadow[vc_req.addr] = vc_req.wdata;
          else begin
            exp_host.push_back(shadow.exists(vc_req.addr) ? shadow[vc_req.addr] : 0);
            exp_tag.push_back(hq[0].tag);
            host_reads++;
          end
          void'(hq.pop_front());
        end
        if (pe_req_valid == '1 && mq_valid && last_src >= 0)
          if (src == (last_src + 1) % (N_PE + 1)) rotations++;
        last_src = src;
      end else begin
        check(pe_req_pop == '0 && !mq_pop, "pop without a transfer");
      end
      if (mq_valid && !mq_req.we && dut.host_credits == 0) begin
        credit_blocks++;
        check(!(vc_req_valid && vc_req.tag.src == SRC_W'(N_PE)), "host read sent without credit");
      end
      // read data
      for (int p = 0; p < N_PE; p++) if (pe_resp_valid[p]) begin
        check(exp_pe[p].size() > 0 && pe_resp_data == exp_pe[p][0], $sformatf("PE %0d read data", p));
        void'(exp_pe[p].pop_front());
      end
      if (host_resp_push) begin
        check(exp_host.size() > 0 && host_resp_data == exp_host[0] && host_resp_tag == exp_tag[0],
              "host read reply");
        void'(exp_host.pop_front()); void'(exp_tag.pop_front());
      end
      hr_count = hr_count + int'(host_resp_push) - int'(host_resp_pop);
      check(hr_count <= HRESP_DEPTH, "host response queue overflow");
    end
  end

  initial begin
    int k = 0;
    host_hold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      host_hold = (c >= 1000 && c < 1600);
      for (int p = 0; p < N_PE; p++) if (pq[p].size() < 6 && $urandom_range(1)) begin
        automatic logic we = $urandom_range(1);
        automatic logic [31:0] a = 32'h1000 * (p + 1) + 4 * $urandom_range(15);
        pq[p].push_back('{we: we, addr: a});
        if (we) pd[p].push_back($urandom);
      end
      if (hq.size() < 6 && $urandom_range(2) == 0) begin
        automatic logic we = (c >= 1000 && c < 1600) ? 1'b0 : 1'(($urandom_range(1)));
        hq.push_back('{we: we, link: 2'($urandom), tag: HTAG_W'(k++),
                       addr: 32'h1000 * $urandom_range(1, 3) + 4 * $urandom_range(15), wdata: $urandom});
      end
    end
    repeat (100) @(negedge clk);
    check(rotations > 20, "grants did not rotate");
    check(credit_blocks > 0, "host reads were never held back for credits");
    check(host_reads > 50, "too few host reads");
    check(exp_host.size() == 0 && exp_pe[0].size() == 0 && exp_pe[1].size() == 0, "replies missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
