// spec_ctrl: the speculation controller. It implements the speculation
// primitives of the execution model for NCPU processors:
//   START(n)      the processor joins speculative mode with task ID n. The first
//                 START while speculation is off turns it on and makes n the
//                 task that owns the current (non-speculative) state; this is
//                 the master's START, issued before it wakes the slaves.
//   COMMIT        waits until the processor owns the current state, then
//                 commits its speculative state (write log to L2, L1 bits).
//   COMMIT_ADV    as COMMIT, then task ID += NCPU and the current state passes
//                 to the next task (cur_task + 1).
//   TERMINATE     as COMMIT, then every other processor's speculative state is
//                 flushed, they are told to stop, and speculation turns off.
// The processor owning the current state is the head: the active processor
// whose task ID equals cur_task. A commit-type operation completes (op_done
// pulses) in the first cycle in which the issuer is head, its store FIFO is
// empty (all of its writes have been broadcast) and the buffer pool can take
// the commit. When an L1 reports a RAW hazard (viol), that processor's task and
// every later task are rolled back: squash clears their speculative state and
// restart pulses with each one's task ID, for the software handler to restart
// it. Operations issued by a processor that is not in speculative mode complete
// at once with no effect (except START). The primitives and the roll-back rule
// follow the execution model; the head/cur_task bookkeeping, the
// drain-before-START rule and the one-cycle timing are this design's choices.
module spec_ctrl
  import tls_pkg::*;
#(
  parameter int unsigned NCPU = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // speculation operations from the processors (held until op_done)
  input  logic [NCPU-1:0]   op_valid,
  input  spec_op_e          op      [NCPU],
  input  task_t             op_arg  [NCPU],
  output logic [NCPU-1:0]   op_done,
  // status from the memory system
  input  logic [NCPU-1:0]   sf_empty,     // store FIFO of each processor empty
  input  logic [NCPU-1:0]   commit_ok,    // buffer pool can take a commit from it
  input  logic              drain_idle,   // no committed write log is draining
  input  logic [NCPU-1:0]   viol,         // RAW hazard detected by its L1
  // state
  output logic              spec_mode,
  output logic [NCPU-1:0]   active,
  output task_t             task_id [NCPU],
  output logic [NCPU-1:0]   head,
  // actions
  output logic [NCPU-1:0]   commit,       // commit this processor's speculative state
  output logic [NCPU-1:0]   squash,       // discard this processor's speculative state
  output logic [NCPU-1:0]   restart,      // pulse: restart task restart_task
  output task_t             restart_task [NCPU],
  output logic [NCPU-1:0]   stop          // pulse: leave speculative mode
);
  logic            spec_q;
  logic [NCPU-1:0] act_q;
  task_t           task_q [NCPU];
  task_t           cur_q;

  assign spec_mode = spec_q;
  assign active    = act_q;
  assign task_id   = task_q;

  always_comb begin
    for (int unsigned c = 0; c < NCPU; c++)
      head[c] = spec_q && act_q[c] && (task_q[c] == cur_q);
  end

  // Roll-back: the earliest violating task; it and all later tasks restart.
  logic  any_viol;
  task_t viol_task;
  always_comb begin
    any_viol  = 1'b0;
    viol_task = '0;
    for (int unsigned c = 0; c < NCPU; c++) begin
      if (viol[c] && spec_q && act_q[c] && (!any_viol || task_q[c] < viol_task)) begin
        any_viol  = 1'b1;
        viol_task = task_q[c];
      end
    end
  end

  // Commit-type operation of the head (at most one processor is head).
  logic [NCPU-1:0] do_commit, do_adv, do_term, idle_done;
  always_comb begin
    do_commit = '0; do_adv = '0; do_term = '0; idle_done = '0;
    for (int unsigned c = 0; c < NCPU; c++) begin
      if (op_valid[c] && op[c] != OP_START && op[c] != OP_NONE) begin
        if (!(spec_q && act_q[c])) begin
          idle_done[c] = 1'b1;
        end else if (head[c] && sf_empty[c] && commit_ok[c] && !any_viol) begin
          do_commit[c] = 1'b1;
          do_adv[c]    = (op[c] == OP_COMMIT_ADV);
          do_term[c]   = (op[c] == OP_TERMINATE);
        end
      end
    end
  end

  logic [NCPU-1:0] do_start;
  always_comb begin
    for (int unsigned c = 0; c < NCPU; c++)
      do_start[c] = op_valid[c] && op[c] == OP_START && drain_idle && !(spec_q && act_q[c]);
  end

  always_comb begin
    commit  = do_commit;
    squash  = '0;
    restart = '0;
    stop    = '0;
    for (int unsigned c = 0; c < NCPU; c++) begin
      restart_task[c] = task_q[c];
      if (any_viol && spec_q && act_q[c] && task_q[c] >= viol_task) begin
        squash[c]  = 1'b1;
        restart[c] = 1'b1;
      end
      if (do_term != '0 && !do_term[c] && spec_q && act_q[c]) begin
        squash[c] = 1'b1;
        stop[c]   = 1'b1;
      end
    end
    op_done = do_commit | idle_done | do_start;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spec_q <= 1'b0;
      act_q  <= '0;
      cur_q  <= '0;
      for (int unsigned c = 0; c < NCPU; c++) task_q[c] <= '0;
    end else begin
      if (do_term != '0) begin
        spec_q <= 1'b0;
        act_q  <= '0;
      end else begin
        for (int unsigned c = 0; c < NCPU; c++) begin
          if (do_start[c]) begin
            act_q[c]  <= 1'b1;
            task_q[c] <= op_arg[c];
          end
          if (do_adv[c]) task_q[c] <= task_q[c] + task_t'(NCPU);
        end
        if (do_adv != '0) cur_q <= cur_q + 1'b1;
        if (do_start != '0) begin
          spec_q <= 1'b1;
          if (!spec_q) begin
            // the master's START (lowest-numbered processor if several) sets the current task
            for (int c = int'(NCPU) - 1; c >= 0; c--)
              if (do_start[c]) cur_q <= op_arg[c];
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(head));

endmodule
