// vault_mem_model: behavioural model of a DRAM vault controller.
//
// Not synthesizable. Accepts one request per cycle (with random back-pressure
// of STALL_PCT percent), serves requests in arrival order and returns each
// read's data with its tag LATENCY cycles after acceptance, at most one per
// cycle. Storage is sparse, word addressed by addr/4; unwritten words read 0.
// The testbench preloads and inspects memory with the poke/peek functions.
module vault_mem_model
  import pim_pkg::*;
#(
  parameter int unsigned LATENCY   = 6,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     vc_req_valid,
  input  vc_req_t  vc_req,
  output logic     vc_req_ready,
  output logic     vc_resp_valid,
  output vc_resp_t vc_resp
);

  logic [31:0] mem [int unsigned];
  vc_resp_t    rq_data [$];
  longint      rq_due  [$];
  longint      cyc;
  int unsigned n_reads, n_writes, n_stalls;

  function automatic void poke(input int unsigned addr, input logic [31:0] d);
    mem[addr >> 2] = d;
  endfunction

  function automatic logic [31:0] peek(input int unsigned addr);
    return mem.exists(addr >> 2) ? mem[addr >> 2] : 32'd0;
  endfunction

  initial begin
    cyc = 0; n_reads = 0; n_writes = 0; n_stalls = 0;
    vc_req_ready = 1'b0;
    vc_resp_valid = 1'b0;
    vc_resp = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      vc_resp_valid <= 1'b0;
      vc_req_ready  <= 1'b0;
    end else begin
      // accept
      if (vc_req_valid && vc_req_ready) begin
        if (vc_req.we) begin
          mem[vc_req.addr >> 2] = vc_req.wdata;
          n_writes++;
        end else begin
          vc_resp_t r;
          r.rdata = mem.exists(vc_req.addr >> 2) ? mem[vc_req.addr >> 2] : 32'd0;
          r.tag   = vc_req.tag;
          rq_data.push_back(r);
          rq_due.push_back(cyc + longint'(LATENCY));
          n_reads++;
        end
      end
      if (vc_req_valid && !vc_req_ready) n_stalls++;
      vc_req_ready <= ($urandom_range(99) >= STALL_PCT);
      // reply
      if (rq_data.size() > 0 && rq_due[0] <= cyc) begin
        vc_resp_valid <= 1'b1;
        vc_resp       <= rq_data.pop_front();
        void'(rq_due.pop_front());
      end else begin
        vc_resp_valid <= 1'b0;
      end
    end
  end

endmodule
