// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, count, full and empty at the default depth of 10 and with
// simultaneous push and pop.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 10;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      check(count == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h vs %h", dout, model[0]));
      // phases: fill, drain, mixed
      case ((c / 200) % 3)
        0: begin push = ($urandom_range(3) != 0); pop = ($urandom_range(3) == 0); end
        1: begin push = ($urandom_range(3) == 0); pop = ($urandom_range(3) != 0); end
        default: begin push = $urandom_range(1); pop = $urandom_range(1); end
      endcase
      if (full) push = 0;
      if (empty) pop = 0;
      din = W'($urandom);
      if (full) n_full++;
      if (push && pop) n_both++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(n_full > 0, "queue never became full");
    check(n_both > 0, "no simultaneous push and pop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
