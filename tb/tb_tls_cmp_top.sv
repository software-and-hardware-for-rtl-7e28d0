// tb_tls_cmp_top: end-to-end run of the speculative multiprocessor memory
// system. Four behavioural processors run a loop as speculative tasks, one
// iteration per task, distributed cyclically (processor p runs iterations p,
// p+4, ...), exactly as a compiler-generated SPMD loop would:
//
//   for (i = 0; ; i++) {
//     x = A[i];
//     if (i % 3 == 0) s = S;                  // loop-carried dependence ...
//     if (i % 5 == 1) read 5 lines that conflict with A[i] in the L1;
//     if (i % 5 == 2) write 20 lines C[20*i + k] = 100*i + k;
//     if (i % 5 == 0) read A[0..29];          // a long iteration
//     if (i == 2) { Commit; kernel-mode store K = 0x99; }
//     if (i % 3 == 0) S = s + x;              // ... written late in the iteration
//     B[i] = 2*x + i;
//     if (i % 4 == 2) D[i] = B[i-1];          // value from the previous task
//     if (x == 0xFFFF) break;                 // early exit at i = EXIT
//   }
//
// Every iteration ends with Commit_and_Advance, the exiting one with
// Terminate_Speculation. A processor told to restart re-runs its iteration;
// one told to stop leaves the loop. Processor 0 first initialises A and then
// acts as master. At the end processor 0 reads S, B, C and K back through its
// L1 and compares them with a sequential execution of the loop; B beyond EXIT
// must be untouched. The run must exercise every speculation mechanism:
// RAW roll-back, pre-invalidation, commit waiting for the head,
// commit-and-advance, terminate flush, write-log drain, forwarding from an
// uncommitted log, victim capture, victim-full stall, early commit of a full
// head log and a kernel-mode bypass write. Runs at the default parameters.
module tb_tls_cmp_top;
  import tls_pkg::*;
  localparam int N    = 4;
  localparam int EXIT = 21;
  localparam addr_t A_BASE = 32'h1000, B_BASE = 32'h2000, C_BASE = 32'h4000, D_BASE = 32'h3000;
  localparam addr_t S_ADDR = 32'h0800, K_ADDR = 32'h0900;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] cpu_req_valid, cpu_req_we, cpu_req_sync, cpu_req_ready, cpu_rsp_valid, cpu_kernel;
  addr_t cpu_req_addr [N];
  word_t cpu_req_wdata [N], cpu_rsp_data [N];
  logic [3:0] cpu_req_be [N];
  logic [N-1:0] cpu_op_valid, cpu_op_done, cpu_restart, cpu_stop, head;
  spec_op_e cpu_op [N];
  task_t cpu_op_arg [N], cpu_restart_task [N], task_id [N];
  logic spec_mode;
  logic [N-1:0] ev_viol, ev_commit, ev_squash, ev_victim_push, ev_victim_stall, ev_log_swap;
  logic ev_pre_inval, ev_fwd, ev_drain;

  tls_cmp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  initial begin
    #2000000;   // 200000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int n_viol = 0, n_restart = 0, n_commit = 0, n_pre_inval = 0, n_fwd = 0, n_drain = 0;
  int n_vpush = 0, n_vstall = 0, n_swap = 0, n_stop = 0, n_wait = 0, n_adv = 0, n_kernel = 0;
  logic [N-1:0] restart_f, stop_f;
  logic [N-1:0] restart_clr, stop_clr;
  always @(posedge clk) begin
    cycles++;
    n_viol      += $countones(ev_viol);
    n_restart   += $countones(cpu_restart);
    n_commit    += $countones(ev_commit);
    n_pre_inval += int'(ev_pre_inval);
    n_fwd       += int'(ev_fwd);
    n_drain     += int'(ev_drain);
    n_vpush     += $countones(ev_victim_push);
    n_vstall    += $countones(ev_victim_stall);
    n_swap      += $countones(ev_log_swap);
    n_stop      += $countones(cpu_stop);
    for (int c = 0; c < N; c++) begin
      if (cpu_op_valid[c] && !cpu_op_done[c] && cpu_op[c] != OP_START) n_wait++;
      if (cpu_op_valid[c] && cpu_op_done[c] && cpu_op[c] == OP_COMMIT_ADV) n_adv++;
      if (cpu_req_valid[c] && cpu_req_ready[c] && cpu_kernel[c] && cpu_req_we[c]) n_kernel++;
    end
  end
  always @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      if (cpu_restart[c]) restart_f[c] <= 1'b1; else if (restart_clr[c]) restart_f[c] <= 1'b0;
      if (cpu_stop[c])    stop_f[c]    <= 1'b1; else if (stop_clr[c])    stop_f[c]    <= 1'b0;
    end
  end

  logic readback = 0;   // sequential phase after the loop: nothing aborts a load
  function automatic logic aborted(int c);
    if (readback) return 1'b0;
    return restart_f[c] || stop_f[c] || cpu_restart[c] || cpu_stop[c];
  endfunction

  word_t last_rd [N];   // data of each processor's latest completed load

  // ---------------- processor actions (abandoned on restart/stop) ----------------
  task automatic load(int c, addr_t a, output word_t d, output logic ab);
    logic taken, got;
    ab = 0; d = '0; taken = 0; got = 0;
    @(negedge clk);
    if (aborted(c)) ab = 1;   // redirected before issue
    else begin cpu_req_valid[c] = 1; cpu_req_we[c] = 0; cpu_req_addr[c] = a; end
    while (!taken && !ab) begin
      @(posedge clk);
      if (cpu_req_ready[c]) taken = 1;
      else if (aborted(c)) ab = 1;
    end
    #1 cpu_req_valid[c] = 0;
    while (taken && !got && !ab) begin
      if (cpu_rsp_valid[c]) got = 1;
      else if (aborted(c)) ab = 1;
      else begin @(posedge clk); #1; end
    end
    if (got) d = cpu_rsp_data[c];
    last_rd[c] = d;
  endtask

  task automatic store(int c, addr_t a, word_t d, output logic ab);
    logic taken;
    ab = 0; taken = 0;
    @(negedge clk);
    if (aborted(c)) ab = 1;
    else begin cpu_req_valid[c] = 1; cpu_req_we[c] = 1; cpu_req_addr[c] = a; cpu_req_wdata[c] = d; end
    cpu_req_be[c] = 4'hf; cpu_req_sync[c] = 0;
    while (!taken && !ab) begin
      @(posedge clk);
      if (cpu_req_ready[c]) taken = 1;
      else if (aborted(c)) ab = 1;
    end
    #1 cpu_req_valid[c] = 0; cpu_req_we[c] = 0;
  endtask

  task automatic spec_op(int c, spec_op_e o, int arg, output logic ab);
    logic done;
    ab = 0; done = 0;
    @(negedge clk);
    cpu_op_valid[c] = 1; cpu_op[c] = o; cpu_op_arg[c] = task_t'(arg);
    while (!done && !ab) begin
      #1;
      if (cpu_op_done[c]) done = 1;
      else if (o != OP_START && aborted(c)) ab = 1;
      @(posedge clk);
    end
    #1 cpu_op_valid[c] = 0; cpu_op[c] = OP_NONE;
  endtask

  function automatic word_t a_init(int i);
    return (i == EXIT) ? 32'hFFFF : word_t'(i * 7 + 3);
  endfunction

  // one loop iteration as task i on processor c; returns whether it aborted
  // and whether it took the exit
  task automatic iteration(int c, int i, output logic ab, output logic ex);
    word_t x, s, y, dummy;
    ex = 0; s = 0;
    repeat ($urandom % 8) @(posedge clk);   // processor work between memory operations
    load(c, A_BASE + addr_t'(4 * i), x, ab); if (ab) return;
    if (i % 3 == 0) begin
      load(c, S_ADDR, s, ab); if (ab) return;
    end
    if (i % 5 == 1) begin
      for (int k = 1; k <= 5; k++) begin
        load(c, A_BASE + addr_t'(4 * i + 8192 * k), dummy, ab); if (ab) return;
      end
    end
    if (i % 5 == 2) begin
      for (int k = 0; k < 20; k++) begin
        store(c, C_BASE + addr_t'(16 * (20 * i + k)), word_t'(100 * i + k), ab); if (ab) return;
      end
    end
    if (i % 5 == 0) begin
      for (int k = 0; k < 30; k++) begin
        load(c, A_BASE + addr_t'(4 * k), dummy, ab); if (ab) return;
      end
    end
    if (i == 2) begin
      spec_op(c, OP_COMMIT, 0, ab); if (ab) return;
      @(negedge clk) cpu_kernel[c] = 1;
      store(c, K_ADDR, 32'h99, ab);
      @(negedge clk) cpu_kernel[c] = 0;
      if (ab) return;
    end
    if (i % 3 == 0) begin
      store(c, S_ADDR, s + x, ab); if (ab) return;
    end
    store(c, B_BASE + addr_t'(4 * i), 2 * x + word_t'(i), ab); if (ab) return;
    if (i % 4 == 2) begin
      load(c, B_BASE + addr_t'(4 * (i - 1)), y, ab); if (ab) return;
      store(c, D_BASE + addr_t'(4 * i), y, ab); if (ab) return;
    end
    ex = (x == 32'hFFFF);
  endtask

  event master_started;
  logic [N-1:0] finished;

  task automatic cpu_run(int c);
    logic ab, ex;
    int   t;
    if (c != 0) @(master_started);
    spec_op(c, OP_START, c, ab);
    if (c == 0) -> master_started;
    t = c;
    while (1) begin
      @(negedge clk); restart_clr[c] = 1; @(posedge clk); #1 restart_clr[c] = 0;
      if (stop_f[c]) break;
      iteration(c, t, ab, ex);
      if (!ab) spec_op(c, ex ? OP_TERMINATE : OP_COMMIT_ADV, 0, ab);
      if (stop_f[c] || cpu_stop[c]) break;
      if (ab) begin
        while (!restart_f[c] && !stop_f[c]) @(posedge clk);
        if (stop_f[c]) break;
        t = int'(cpu_restart_task[c]) == t ? t : t;   // same task is re-run
        continue;
      end
      if (ex) break;
      t += N;
    end
    @(negedge clk); stop_clr[c] = 1; @(posedge clk); #1 stop_clr[c] = 0;
    finished[c] = 1;
  endtask

  initial begin
    automatic logic ab;
    automatic word_t d, exp_s;
    cpu_req_valid = '0; cpu_req_we = '0; cpu_req_sync = '0; cpu_kernel = '0; cpu_op_valid = '0;
    restart_clr = '0; stop_clr = '0; restart_f = '0; stop_f = '0; finished = '0;
    for (int c = 0; c < N; c++) begin
      cpu_req_addr[c] = '0; cpu_req_wdata[c] = '0; cpu_req_be[c] = '0;
      cpu_op[c] = OP_NONE; cpu_op_arg[c] = '0;
    end
    repeat (3) @(posedge clk); rst_n = 1;

    // sequential initialisation of A by processor 0
    for (int i = 0; i < EXIT + N + 1; i++) store(0, A_BASE + addr_t'(4 * i), a_init(i), ab);

    fork
      cpu_run(0); cpu_run(1); cpu_run(2); cpu_run(3);
    join
    repeat (20) @(posedge clk);
    checks++;
    if (spec_mode) begin failures++; $display("speculation still on"); end

    // read back and compare with the sequential loop
    readback = 1;
    exp_s = 0;
    for (int i = 0; i <= EXIT; i++) if (i % 3 == 0) exp_s += a_init(i);
    load(0, S_ADDR, d, ab); d = last_rd[0];
    checks++; if (d != exp_s) begin failures++; $display("S = %0d expected %0d", d, exp_s); end
    for (int i = 0; i < EXIT + N; i++) begin
      word_t e;
      e = (i <= EXIT) ? 2 * a_init(i) + word_t'(i) : 0;
      load(0, B_BASE + addr_t'(4 * i), d, ab); d = last_rd[0];
      checks++; if (d != e) begin failures++; $display("B[%0d] = %h expected %h", i, d, e); end
    end
    for (int i = 0; i < EXIT + N; i++) if (i % 5 == 2)
      for (int k = 0; k < 20; k += 7) begin
        word_t e;
        e = (i <= EXIT) ? word_t'(100 * i + k) : 0;
        load(0, C_BASE + addr_t'(16 * (20 * i + k)), d, ab); d = last_rd[0];
        checks++; if (d != e) begin failures++; $display("C[%0d] = %h expected %h", 20 * i + k, d, e); end
      end
    for (int i = 2; i < EXIT + N; i += 4) begin
      word_t e;
      e = (i <= EXIT) ? 2 * a_init(i - 1) + word_t'(i - 1) : 0;
      load(0, D_BASE + addr_t'(4 * i), d, ab); d = last_rd[0];
      checks++; if (d != e) begin failures++; $display("D[%0d] = %h expected %h", i, d, e); end
    end
    load(0, K_ADDR, d, ab); d = last_rd[0];
    checks++; if (d != 32'h99) begin failures++; $display("K = %h", d); end

    // every mechanism must have happened
    begin
      string nm [12] = '{"RAW roll-back", "restart", "commit", "pre-invalidate", "forwarding",
                         "log drain", "victim capture", "victim stall", "early log commit",
                         "terminate stop", "commit wait", "kernel bypass"};
      int cnt [12];
      cnt = '{n_viol, n_restart, n_adv, n_pre_inval, n_fwd, n_drain, n_vpush, n_vstall, n_swap,
              n_stop, n_wait, n_kernel};
      for (int m = 0; m < 12; m++) begin
        $display("%-18s %0d", nm[m], cnt[m]);
        checks++;
        if (cnt[m] == 0) begin failures++; $display("mechanism never exercised: %s", nm[m]); end
      end
    end
    $display("cycles: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
