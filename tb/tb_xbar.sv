// tb_xbar: 3 inputs, 5 outputs, random destinations and random output
// back-pressure. Every packet carries its input number and a sequence
// number; the testbench checks that each packet leaves on the output it
// named, exactly once, in order per input, that an input is told ready only
// when its packet moves, and that several packets move in one cycle.
module tb_xbar;
  localparam int N_IN = 3, N_OUT = 5, W = 16, DW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, sent = 0, recv = 0, multi = 0;

  logic [N_IN-1:0] in_valid, in_ready;
  logic [DW-1:0] in_dest [N_IN];
  logic [W-1:0] in_data [N_IN];
  logic [N_OUT-1:0] out_valid, out_ready;
  logic [W-1:0] out_data [N_OUT];
  int seq [N_IN];
  int expect_seq [N_IN];

  xbar #(.N_IN(N_IN), .N_OUT(N_OUT), .W(W), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // packet: [15:14] input, [13:11] dest, [10:0] sequence
  initial begin
    in_valid = '0; out_ready = '0;
    foreach (seq[i]) begin seq[i] = 0; expect_seq[i] = 0; in_dest[i] = '0; in_data[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) begin
        if (!in_valid[i] && $urandom_range(1)) begin
          automatic int d = $urandom_range(N_OUT - 1);
          in_valid[i] = 1;
          in_dest[i]  = DW'(d);
          in_data[i]  = {2'(i), 3'(d), 11'(seq[i])};
          seq[i]++;
        end
      end
      out_ready = N_OUT'($urandom);
      #1;
      begin
        automatic int moved = 0;
        for (int o = 0; o < N_OUT; o++) begin
          if (out_valid[o] && out_ready[o]) begin
            automatic int src = out_data[o][15:14];
            moved++;
            recv++;
            check(out_data[o][13:11] == 3'(o), "packet on the wrong output");
            check(int'(out_data[o][10:0]) == expect_seq[src] % 2048, "packet order per input");
            check(in_ready[src], "input not told its packet moved");
            expect_seq[src]++;
          end
        end
        check($countones(in_ready) == moved, "in_ready count differs from packets moved");
        if (moved > 1) multi++;
      end
      @(posedge clk);
      in_valid = in_valid & ~in_ready;
    end
    check(recv > 1000, "too little traffic");
    check(multi > 0, "never more than one packet per cycle");
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
