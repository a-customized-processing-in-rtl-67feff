// tb_pim_scheduler: random PIM queue contents and random agu_ready patterns
// over 3 PEs. Checks that a task goes only to a ready PE, at most one per
// cycle, that the queue is popped exactly when a task is handed out, that no
// task is held back while a PE is ready, that the task bus carries the queue
// head, and that all PEs receive work when all stay ready (round robin).
module tb_pim_scheduler;
  import pim_pkg::*;
  localparam int N_PE = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int given [N_PE];

  logic q_valid, q_pop;
  pim_task_t q_task, task_out;
  logic [N_PE-1:0] agu_ready, pe_sel;

  pim_scheduler #(.N_PE(N_PE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    q_valid = 0; q_task = '0; agu_ready = '0;
    foreach (given[p]) given[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      q_valid = ($urandom_range(3) != 0);
      q_task  = '{addr_a: $urandom, addr_b: $urandom, addr_dp: $urandom, addr_dir: $urandom,
                  len_a: $urandom, len_b: $urandom};
      agu_ready = (c < 1000) ? '1 : N_PE'($urandom);
      #1;
      check($countones(pe_sel) <= 1, "more than one PE selected");
      check((pe_sel & ~agu_ready) == '0, "task to a busy PE");
      check(q_pop == (pe_sel != '0), "pop without hand-out or hand-out without pop");
      check(q_pop == (q_valid && agu_ready != '0), "task held back while a PE is ready");
      check(task_out == q_task, "task bus is not the queue head");
      for (int p = 0; p < N_PE; p++) if (pe_sel[p] && c < 1000) given[p]++;
    end
    for (int p = 0; p < N_PE; p++)
      check(given[p] > 200, $sformatf("PE %0d got %0d tasks while always ready", p, given[p]));
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
