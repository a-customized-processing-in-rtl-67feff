// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle. The search starts one position after
// the requester granted last, so every requester that keeps requesting is
// served within N grants. grant is one-hot (or zero when nobody requests) and
// combinational from req; the priority pointer moves only when advance is
// high, that is, when the granted transfer actually took place. grant_idx is
// the index of the granted requester.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         advance,
  output logic [N-1:0]                 grant,
  output logic [(N>1?$clog2(N):1)-1:0] grant_idx
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;

  always_comb begin
    int unsigned idx;
    grant     = '0;
    grant_idx = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last_q) + k) % N;
      if (req[idx] && grant == '0) begin
        grant[idx] = 1'b1;
        grant_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       last_q <= IW'(N - 1);
    else if (advance && grant != '0)  last_q <= grant_idx;
  end

endmodule
