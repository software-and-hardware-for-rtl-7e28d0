// tb_tls_workloads: speedup and restart measurements on four loop kernels
// whose dependence structure follows the four integer programs used to judge
// the hardware (wc, eqntott, grep, diff). Each kernel is a loop of
// iterations that read an input word, do some processor work (modelled as idle
// cycles between memory operations) and write an output word; most also carry
// a running sum S from one iteration to the next:
//
//   wc       S is read late and written right after; the iteration first waits
//            for a flag that the previous iteration sets with a synchronising
//            write (as a compiler inserts for a dependence that occurs in every
//            iteration), so tasks restart only while the pipeline fills.
//   eqntott  S is read in the middle of the iteration and written later.
//   grep     independent iterations (do-all with an early exit), except that
//            every other iteration updates S early.
//   diff     S is read at the start and written at the end: nearly every
//            speculative task reads it too early and restarts.
//
// Each kernel is first run sequentially by processor 0 with speculation off,
// then as speculative tasks on all four processors (Start_Speculation,
// Commit_and_Advance at the end of each iteration, Terminate_Speculation on the
// exit iteration). Both runs must leave the same, correct results in memory
// and nothing past the exit iteration. The testbench prints the speedup
// (sequential cycles / speculative cycles) and the share of tasks that were
// restarted, and checks the expected ordering: wc restarts least and gains
// most, diff restarts most and gains least, wc runs at least 1.5 times faster
// than sequentially. The absolute numbers depend on the modelled processor
// work and are not expected to match the published measurements.
// Runs the top at its default parameters.
module tb_tls_workloads;
  import tls_pkg::*;
  localparam int N    = 4;
  localparam int NK   = 4;
  localparam int EXIT = 27;

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
    #3000000;   // 300000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_restart = 0;
  logic [N-1:0] restart_f, stop_f, restart_clr, stop_clr;
  always @(posedge clk) begin
    cycles++;
    n_restart += $countones(cpu_restart);
    for (int c = 0; c < N; c++) begin
      if (cpu_restart[c]) restart_f[c] <= 1'b1; else if (restart_clr[c]) restart_f[c] <= 1'b0;
      if (cpu_stop[c])    stop_f[c]    <= 1'b1; else if (stop_clr[c])    stop_f[c]    <= 1'b0;
    end
  end

  logic readback = 0;
  function automatic logic aborted(int c);
    if (readback) return 1'b0;
    return restart_f[c] || stop_f[c] || cpu_restart[c] || cpu_stop[c];
  endfunction

  word_t last_rd [N];

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

  task automatic store(int c, addr_t a, word_t d, output logic ab, input logic sy = 1'b0);
    logic taken;
    ab = 0; taken = 0;
    @(negedge clk);
    if (aborted(c)) ab = 1;
    else begin cpu_req_valid[c] = 1; cpu_req_we[c] = 1; cpu_req_addr[c] = a; cpu_req_wdata[c] = d; end
    cpu_req_be[c] = 4'hf; cpu_req_sync[c] = sy;
    while (!taken && !ab) begin
      @(posedge clk);
      if (cpu_req_ready[c]) taken = 1;
      else if (aborted(c)) ab = 1;
    end
    #1 cpu_req_valid[c] = 0; cpu_req_we[c] = 0; cpu_req_sync[c] = 0;
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

  task automatic work(int n);
    repeat (n) @(posedge clk);
  endtask

  // kernel layout: input, sequential-run output and sum, speculative-run
  // output and sum, each in its own lines
  function automatic addr_t base(int k);
    return addr_t'(32'h4000 + 32'h1000 * k);
  endfunction
  function automatic addr_t in_a(int k, int i);   return base(k) + addr_t'(4 * i); endfunction
  function automatic addr_t out_a(int k, int r, int i);
    return base(k) + addr_t'(32'h200 + 32'h200 * r + 4 * i);
  endfunction
  function automatic addr_t s_a(int k, int r);    return base(k) + addr_t'(32'h600 + 32'h40 * r); endfunction
  function automatic addr_t f_a(int k, int r, int i);
    return base(k) + addr_t'(32'h800 + 32'h200 * r + 4 * i);
  endfunction
  function automatic word_t in_v(int k, int i);
    return (i == EXIT) ? 32'hFFFF : word_t'(13 * i + 5 * k + 1);
  endfunction
  function automatic logic has_dep(int k, int i);
    return (k == 2) ? (i % 2 == 0) : 1'b1;
  endfunction

  // one iteration of kernel k (run r: 0 sequential, 1 speculative) as task i
  task automatic iteration(int c, int k, int r, int i, output logic ab, output logic ex);
    word_t x, s;
    ex = 0; s = 0;
    load(c, in_a(k, i), x, ab); if (ab) return;
    case (k)
      0: begin                                   // wc: late, short window, synchronised
        work(30);
        if (i > 0) begin                         // wait for the previous iteration's flag
          word_t f;
          f = 0;
          while (f == 0) begin
            load(c, f_a(k, r, i), f, ab); if (ab) return;
            f = last_rd[c];
          end
        end
        load(c, s_a(k, r), s, ab); if (ab) return;
        store(c, s_a(k, r), s + x, ab); if (ab) return;
        store(c, f_a(k, r, i + 1), 1, ab, 1'b1); if (ab) return;   // synch_write
        work(4);
      end
      1: begin                                   // eqntott: window in the middle
        work(14);
        load(c, s_a(k, r), s, ab); if (ab) return;
        work(10);
        store(c, s_a(k, r), s + x, ab); if (ab) return;
        work(8);
      end
      2: begin                                   // grep: do-all, every other iteration early update
        if (has_dep(k, i)) begin
          load(c, s_a(k, r), s, ab); if (ab) return;
          work(12);
          store(c, s_a(k, r), s + x, ab); if (ab) return;
          work(20);
        end else work(34);
      end
      default: begin                             // diff: whole-iteration window
        load(c, s_a(k, r), s, ab); if (ab) return;
        work(32);
        store(c, s_a(k, r), s + x, ab); if (ab) return;
      end
    endcase
    store(c, out_a(k, r, i), 3 * x + word_t'(i), ab); if (ab) return;
    ex = (x == 32'hFFFF);
  endtask

  event master_started;

  task automatic cpu_run(int c, int k);
    logic ab, ex;
    int   t;
    if (c != 0) @(master_started);
    spec_op(c, OP_START, c, ab);
    if (c == 0) -> master_started;
    t = c;
    while (1) begin
      @(negedge clk); restart_clr[c] = 1; @(posedge clk); #1 restart_clr[c] = 0;
      if (stop_f[c]) break;
      iteration(c, k, 1, t, ab, ex);
      if (!ab) spec_op(c, ex ? OP_TERMINATE : OP_COMMIT_ADV, 0, ab);
      if (stop_f[c] || cpu_stop[c]) break;
      if (ab) begin
        while (!restart_f[c] && !stop_f[c]) @(posedge clk);
        if (stop_f[c]) break;
        continue;
      end
      if (ex) break;
      t += N;
    end
    @(negedge clk); stop_clr[c] = 1; @(posedge clk); #1 stop_clr[c] = 0;
  endtask

  int seq_cyc [NK], spec_cyc [NK], restarts [NK];
  real speedup [NK], rpct [NK];
  string kname [NK] = '{"wc", "eqntott", "grep", "diff"};

  initial begin
    automatic logic ab, ex;
    automatic word_t d;
    automatic int t0;
    cpu_req_valid = '0; cpu_req_we = '0; cpu_req_sync = '0; cpu_kernel = '0; cpu_op_valid = '0;
    restart_clr = '0; stop_clr = '0; restart_f = '0; stop_f = '0;
    for (int c = 0; c < N; c++) begin
      cpu_req_addr[c] = '0; cpu_req_wdata[c] = '0; cpu_req_be[c] = '0;
      cpu_op[c] = OP_NONE; cpu_op_arg[c] = '0;
    end
    repeat (3) @(posedge clk); rst_n = 1;

    for (int k = 0; k < NK; k++) begin
      @(negedge clk); restart_clr = '1; stop_clr = '1;   // leftovers of the previous run
      @(posedge clk); #1 restart_clr = '0; stop_clr = '0;
      for (int i = 0; i < EXIT + N + 1; i++) store(0, in_a(k, i), in_v(k, i), ab);
      repeat (10) @(posedge clk);

      // sequential run on processor 0
      t0 = cycles;
      for (int i = 0; i <= EXIT; i++) iteration(0, k, 0, i, ab, ex);
      seq_cyc[k] = cycles - t0;
      repeat (10) @(posedge clk);

      // speculative run on all processors
      t0 = cycles;
      restarts[k] = n_restart;
      fork
        cpu_run(0, k); cpu_run(1, k); cpu_run(2, k); cpu_run(3, k);
      join
      spec_cyc[k] = cycles - t0;
      restarts[k] = n_restart - restarts[k];
      repeat (20) @(posedge clk);
      checks++;
      if (spec_mode) begin failures++; $display("%s: speculation still on", kname[k]); end

      // compare both runs with the loop's sequential meaning
      readback = 1;
      for (int r = 0; r < 2; r++) begin
        automatic word_t es = 0;
        for (int i = 0; i <= EXIT; i++) if (has_dep(k, i)) es += in_v(k, i);
        load(0, s_a(k, r), d, ab); d = last_rd[0];
        checks++;
        if (d != es) begin failures++; $display("%s run %0d: S = %0d expected %0d", kname[k], r, d, es); end
        for (int i = 0; i < EXIT + N; i++) begin
          automatic word_t e = (i <= EXIT) ? 3 * in_v(k, i) + word_t'(i) : 0;
          load(0, out_a(k, r, i), d, ab); d = last_rd[0];
          checks++;
          if (d != e) begin failures++; $display("%s run %0d: out[%0d] = %h expected %h", kname[k], r, i, d, e); end
        end
      end
      readback = 0;
      speedup[k] = real'(seq_cyc[k]) / real'(spec_cyc[k]);
      rpct[k]    = 100.0 * real'(restarts[k]) / real'(EXIT + 1 + restarts[k]);
      $display("%-8s sequential %5d cycles, speculative %5d cycles, speedup %0.2f, restarted tasks %0d (%0.1f%%)",
               kname[k], seq_cyc[k], spec_cyc[k], speedup[k], restarts[k], rpct[k]);
    end

    checks++;
    if (!(rpct[0] < rpct[3])) begin failures++; $display("wc should restart less than diff"); end
    checks++;
    if (!(speedup[0] > speedup[3])) begin failures++; $display("wc should gain more than diff"); end
    for (int k = 1; k < NK; k++) begin
      checks++;
      if (speedup[k] > speedup[0]) begin failures++; $display("%s faster than wc", kname[k]); end
      checks++;
      if (rpct[k] < rpct[0]) begin failures++; $display("%s restarts less than wc", kname[k]); end
    end
    checks++;
    if (speedup[0] < 1.5) begin failures++; $display("wc speedup below 1.5"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
