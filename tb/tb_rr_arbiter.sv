// tb_rr_arbiter: checks one-hot grants to requesters only, the round-robin
// order (the next requester after the last grant wins) and that the pointer
// holds when advance is low.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [$clog2(N)-1:0] grant_idx;
  logic advance;
  int checks = 0, failures = 0;
  int last;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int expect_idx(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++) if (r[(l + k) % N]) return (l + k) % N;
    return -1;
  endfunction

  initial begin
    req = '0; advance = 0; last = N - 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req = N'($urandom);
      if (c % 50 < 10) req = '1;         // all requesting: strict rotation
      advance = ($urandom_range(3) != 0);
      #1;
      begin
        automatic int e = expect_idx(req, last);
        if (e < 0) check(grant == '0, "grant without request");
        else begin
          check(grant == N'(1) << e, $sformatf("req %b last %0d grant %b expected idx %0d", req, last, grant, e));
          check(int'(grant_idx) == e, "grant_idx");
        end
        @(posedge clk);
        if (e >= 0 && advance) last = e;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
