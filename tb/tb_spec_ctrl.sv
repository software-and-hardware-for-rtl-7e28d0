// tb_spec_ctrl: directed run of the speculation primitives on four
// processors: START of master and slaves, a COMMIT_AND_ADVANCE that must wait
// for the head, for an empty store FIFO and for a free write log, a RAW
// violation that rolls back the violating task and all later ones (and no
// earlier one), a plain COMMIT, and a TERMINATE that stops and flushes the
// others. Expected values are written out by hand from the primitive rules.
module tb_spec_ctrl;
  import tls_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] op_valid, op_done, sf_empty, commit_ok, viol;
  spec_op_e op [N];
  task_t op_arg [N];
  logic drain_idle, spec_mode;
  logic [N-1:0] active, head, commit, squash, restart, stop;
  task_t task_id [N];
  task_t restart_task [N];
  int checks = 0, failures = 0;

  spec_ctrl #(.NCPU(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(int c, spec_op_e o, int arg = 0);
    op_valid[c] = 1; op[c] = o; op_arg[c] = task_t'(arg);
  endtask

  task automatic step;   // advance one clock, then settle at the next negedge
    @(posedge clk); @(negedge clk);
  endtask

  initial begin
    op_valid = '0; sf_empty = '1; commit_ok = '1; viol = '0; drain_idle = 1;
    for (int c = 0; c < N; c++) begin op[c] = OP_NONE; op_arg[c] = '0; end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);

    // an operation from a processor outside speculation completes at once
    issue(2, OP_COMMIT); #1;
    chk("idle op done", op_done == 4'b0100 && commit == '0);
    step; op_valid = '0;

    // START must wait for the drain queue to be idle
    drain_idle = 0; issue(0, OP_START, 0); #1;
    chk("start waits for drain", op_done == '0);
    step; drain_idle = 1; #1;
    chk("master start done", op_done == 4'b0001);
    step; op_valid = '0; #1;
    chk("spec on, head cpu0", spec_mode && head == 4'b0001 && task_id[0] == 0);
    for (int c = 1; c < N; c++) issue(c, OP_START, c);
    #1; chk("slave starts done", op_done == 4'b1110);
    step; op_valid = '0; #1;
    chk("tasks 0..3", task_id[1] == 1 && task_id[2] == 2 && task_id[3] == 3 && active == '1);

    // CPU2 wants to commit_and_advance: not head
    issue(2, OP_COMMIT_ADV); #1;
    chk("non-head waits", op_done == '0 && commit == '0);
    // CPU0 commit_and_advance blocked by its store FIFO, then by the pool
    issue(0, OP_COMMIT_ADV); sf_empty[0] = 0; #1;
    chk("waits for store fifo", op_done[0] == 0);
    step; sf_empty[0] = 1; commit_ok[0] = 0; #1;
    chk("waits for free log", op_done[0] == 0);
    step; commit_ok[0] = 1; #1;
    chk("head commit_and_advance", op_done[0] && commit == 4'b0001);
    step; op_valid[0] = 0; #1;
    chk("task 0 -> 4, head cpu1", task_id[0] == 4 && head == 4'b0010);

    // RAW hazard seen by CPU2 (task 2): tasks 2, 3 and 4 roll back, task 1 not
    viol[2] = 1; #1;
    chk("squash 2,3,4", squash == 4'b1101 && restart == 4'b1101 && commit == '0);
    chk("restart task ids", restart_task[2] == 2 && restart_task[3] == 3 && restart_task[0] == 4);
    step; viol = '0; op_valid[2] = 0;

    // plain commit by head CPU1: task id unchanged
    issue(1, OP_COMMIT); #1;
    chk("plain commit", op_done[1] && commit == 4'b0010);
    step; op_valid[1] = 0; #1;
    chk("task stays 1, still head", task_id[1] == 1 && head == 4'b0010);

    // commit_and_advance CPU1 -> task 5; CPU2 (task 2) is head
    issue(1, OP_COMMIT_ADV); step; op_valid[1] = 0; #1;
    chk("head cpu2", head == 4'b0100 && task_id[1] == 5);

    // terminate from CPU2: others stop and are flushed, speculation ends
    issue(2, OP_TERMINATE); #1;
    chk("terminate", op_done[2] && commit == 4'b0100 && stop == 4'b1011 && squash == 4'b1011);
    step; op_valid[2] = 0; #1;
    chk("spec off", !spec_mode && active == '0 && head == '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
