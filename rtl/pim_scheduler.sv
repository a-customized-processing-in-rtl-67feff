// pim_scheduler: hands alignment tasks from the PIM queue to idle PEs.
//
// The design description gives each vault a light-weight scheduler that
// distributes PIM packets over the vault's PEs, using each AGU's agu_ready
// signal to see which PE can take a new task. This implementation serves the
// ready PEs in round-robin order: in any cycle where the PIM queue is not
// empty and at least one PE is ready, the head task is sent to one ready PE
// and popped from the queue. pe_sel (one-hot) is the PE that receives
// task_out in that cycle; it doubles as that PE's task_valid.
module pim_scheduler
  import pim_pkg::*;
#(
  parameter int unsigned N_PE = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              q_valid,      // PIM queue not empty
  input  pim_task_t         q_task,
  output logic              q_pop,
  input  logic [N_PE-1:0]   agu_ready,
  output logic [N_PE-1:0]   pe_sel,
  output pim_task_t         task_out
);

  logic [N_PE-1:0] grant;

  rr_arbiter #(.N(N_PE)) u_arb (
    .clk, .rst_n,
    .req(agu_ready & {N_PE{q_valid}}),
    .advance(q_pop),
    .grant, .grant_idx()
  );

  assign q_pop    = q_valid && (grant != '0);
  assign pe_sel   = grant;
  assign task_out = q_task;

  a_one_task: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pe_sel));
  a_to_ready: assert property (@(posedge clk) disable iff (!rst_n) (pe_sel & ~agu_ready) == '0);

endmodule
