// tls_cmp_top: memory system of a single-chip multiprocessor with hardware
// support for thread-level speculation. NCPU processors (outside this module,
// attached through the cpu_* ports) each have a speculative L1 data cache and
// a store FIFO. The caches are write-through: every store crosses a shared
// write bus, which orders all writes and is snooped by every L1 (invalidation,
// RAW-hazard detection, pre-invalidation). L1 misses use a shared read bus to
// the L2. Both buses are allocated by pipelined round-robin arbiters one cycle
// ahead of use and are held for one cycle per transaction. Speculative writes
// are kept in a pool of 2 x NCPU write logs beside the L2 until their task
// commits; L1 refills merge the L2 line with the logs of the reader and of
// earlier tasks. A speculation controller keeps task IDs, decides the head,
// sequences commits and rolls tasks back on RAW hazards.
//
// Read-bus timing: slot granted in cycle N (request in N-1), L2 read in N,
// merge and L1 install in N+1. Write-bus timing: slot granted in cycle N, the
// store FIFO head is broadcast and performed (log or L2) in N.
//
// The processors, instruction caches and external memory interface are not
// part of this module; the L2 is treated as holding all of memory.
// A store already on the write bus in the cycle its task is rolled back is
// still broadcast (gating it would close a loop through RAW detection); it
// lands in the log being discarded in that same cycle.
// Observation outputs (ev_*) pulse on the internal events they name.
module tls_cmp_top
  import tls_pkg::*;
#(
  parameter int unsigned NCPU     = 4,
  parameter int unsigned NWB      = 2 * NCPU,
  parameter int unsigned L1_LINES = 512,
  parameter int unsigned VICTIMS  = 4,
  parameter int unsigned SF_DEPTH = 4,
  parameter int unsigned WB_LINES = 16,
  parameter int unsigned L2_WORDS = 16384
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor memory ports
  input  logic [NCPU-1:0]  cpu_req_valid,
  input  logic [NCPU-1:0]  cpu_req_we,
  input  addr_t            cpu_req_addr  [NCPU],
  input  word_t            cpu_req_wdata [NCPU],
  input  logic [3:0]       cpu_req_be    [NCPU],
  input  logic [NCPU-1:0]  cpu_req_sync,
  output logic [NCPU-1:0]  cpu_req_ready,
  output logic [NCPU-1:0]  cpu_rsp_valid,
  output word_t            cpu_rsp_data  [NCPU],
  input  logic [NCPU-1:0]  cpu_kernel,       // kernel mode: speculation bypassed
  // processor speculation-operation ports
  input  logic [NCPU-1:0]  cpu_op_valid,
  input  spec_op_e         cpu_op        [NCPU],
  input  task_t            cpu_op_arg    [NCPU],
  output logic [NCPU-1:0]  cpu_op_done,
  output logic [NCPU-1:0]  cpu_restart,      // RAW hazard: restart task cpu_restart_task
  output task_t            cpu_restart_task [NCPU],
  output logic [NCPU-1:0]  cpu_stop,         // another task terminated speculation
  // status
  output logic             spec_mode,
  output task_t            task_id       [NCPU],
  output logic [NCPU-1:0]  head,
  // observation
  output logic [NCPU-1:0]  ev_viol,
  output logic [NCPU-1:0]  ev_commit,
  output logic [NCPU-1:0]  ev_squash,
  output logic [NCPU-1:0]  ev_victim_push,
  output logic [NCPU-1:0]  ev_victim_stall,
  output logic [NCPU-1:0]  ev_log_swap,
  output logic             ev_pre_inval,     // a later task's write pre-invalidated a line
  output logic             ev_fwd,           // a refill took bytes from an uncommitted log
  output logic             ev_drain          // a committed log line was written to the L2
);
  localparam int unsigned CW = $clog2(SF_DEPTH + 1);

  // ---------------- speculation controller ----------------
  logic [NCPU-1:0] active, commit, squash, sf_empty, commit_ok, viol, spec_c;
  logic            drain_idle;

  spec_ctrl #(.NCPU(NCPU)) u_ctrl (
    .clk, .rst_n,
    .op_valid    (cpu_op_valid),
    .op          (cpu_op),
    .op_arg      (cpu_op_arg),
    .op_done     (cpu_op_done),
    .sf_empty    (sf_empty),
    .commit_ok   (commit_ok),
    .drain_idle  (drain_idle),
    .viol        (viol),
    .spec_mode   (spec_mode),
    .active      (active),
    .task_id     (task_id),
    .head        (head),
    .commit      (commit),
    .squash      (squash),
    .restart     (cpu_restart),
    .restart_task(cpu_restart_task),
    .stop        (cpu_stop)
  );

  always_comb
    for (int unsigned c = 0; c < NCPU; c++)
      spec_c[c] = spec_mode && active[c] && !cpu_kernel[c];

  // ---------------- write bus ----------------
  logic [NCPU-1:0] wgnt_q, wreq, wr_accept, wr_direct, sf_pop, sf_full;
  store_t          sf_head  [NCPU];
  store_t          sf_din   [NCPU];
  logic [NCPU-1:0] sf_push;
  logic [CW-1:0]   sf_cnt   [NCPU];
  wbus_t           wbus;

  bus_arbiter #(.N(NCPU)) u_warb (.clk, .rst_n, .req(wreq), .gnt_q(wgnt_q));

  always_comb begin
    wbus   = '0;
    sf_pop = '0;
    for (int unsigned c = 0; c < NCPU; c++) begin
      wreq[c] = (sf_cnt[c] > (wgnt_q[c] ? CW'(1) : CW'(0))) && wr_accept[c] && !squash[c];
      if (wgnt_q[c] && !sf_empty[c] && wr_accept[c]) begin
        sf_pop[c]     = 1'b1;
        wbus.valid    = 1'b1;
        wbus.cpu      = CPUID_W'(c);
        wbus.addr     = sf_head[c].addr;
        wbus.data     = sf_head[c].data;
        wbus.be       = sf_head[c].be;
        wbus.sync     = sf_head[c].sync;
        wbus.has_task = spec_c[c];
        wbus.task_id  = task_id[c];
      end
    end
  end

  // ---------------- read bus ----------------
  logic [NCPU-1:0]     rgnt_q, rreq;
  laddr_t              rb_laddr [NCPU];
  logic                rd_q;
  logic [CPUID_W-1:0]  rd_cpu_q;
  laddr_t              rd_laddr_q;
  line_t               l2_rdata, merged;
  logic                merged_spec;
  logic                l2_re;
  laddr_t              l2_raddr;

  bus_arbiter #(.N(NCPU)) u_rarb (.clk, .rst_n, .req(rreq), .gnt_q(rgnt_q));

  always_comb begin
    l2_re    = 1'b0;
    l2_raddr = '0;
    for (int unsigned c = 0; c < NCPU; c++) begin
      if (rgnt_q[c]) begin
        l2_re    = 1'b1;
        l2_raddr = rb_laddr[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q       <= 1'b0;
      rd_cpu_q   <= '0;
      rd_laddr_q <= '0;
    end else begin
      rd_q       <= l2_re;
      rd_laddr_q <= l2_raddr;
      for (int unsigned c = 0; c < NCPU; c++)
        if (rgnt_q[c]) rd_cpu_q <= CPUID_W'(c);
    end
  end

  // ---------------- write-log pool and L2 ----------------
  logic   l2_we;
  laddr_t l2_waddr;
  line_t  l2_wdata;
  lmask_t l2_wmask;

  write_buffer_pool #(.NCPU(NCPU), .NWB(NWB), .WB_LINES(WB_LINES)) u_pool (
    .clk, .rst_n,
    .spec_mode, .active, .task_id, .head,
    .kernel    (cpu_kernel),
    .commit, .squash, .commit_ok, .drain_idle,
    .wbus, .wr_accept, .wr_direct,
    .rd_cpu    (rd_cpu_q),
    .rd_laddr  (rd_laddr_q),
    .rd_base   (l2_rdata),
    .rd_data   (merged),
    .rd_spec   (merged_spec),
    .l2_we, .l2_waddr, .l2_wdata, .l2_wmask,
    .swap_event(ev_log_swap)
  );

  l2_cache #(.WORDS(L2_WORDS)) u_l2 (
    .clk,
    .we     (l2_we),
    .waddr  (l2_waddr),
    .wdata  (l2_wdata),
    .wmask  (l2_wmask),
    .re     (l2_re),
    .raddr  (l2_raddr),
    .rd_data(l2_rdata)
  );

  // ---------------- per-processor L1 and store FIFO ----------------
  for (genvar c = 0; c < NCPU; c++) begin : g_cpu
    spec_l1_dcache #(.CPU_ID(c), .LINES(L1_LINES), .VICTIMS(VICTIMS)) u_l1 (
      .clk, .rst_n,
      .req_valid (cpu_req_valid[c]),
      .req_we    (cpu_req_we[c]),
      .req_addr  (cpu_req_addr[c]),
      .req_wdata (cpu_req_wdata[c]),
      .req_be    (cpu_req_be[c]),
      .req_sync  (cpu_req_sync[c]),
      .req_ready (cpu_req_ready[c]),
      .rsp_valid (cpu_rsp_valid[c]),
      .rsp_data  (cpu_rsp_data[c]),
      .sf_push   (sf_push[c]),
      .sf_din    (sf_din[c]),
      .sf_full   (sf_full[c]),
      .sf_empty  (sf_empty[c]),
      .spec      (spec_c[c]),
      .is_head   (head[c]),
      .my_task   (task_id[c]),
      .commit    (commit[c]),
      .squash    (squash[c]),
      .viol      (viol[c]),
      .wbus      (wbus),
      .rb_req    (rreq[c]),
      .rb_laddr  (rb_laddr[c]),
      .rb_use    (rgnt_q[c]),
      .rb_data   (merged),
      .rb_spec   (merged_spec),
      .victim_push_o (ev_victim_push[c]),
      .victim_stall_o(ev_victim_stall[c])
    );

    store_fifo #(.DEPTH(SF_DEPTH)) u_sf (
      .clk, .rst_n,
      .flush (squash[c]),
      .push  (sf_push[c]),
      .din   (sf_din[c]),
      .pop   (sf_pop[c]),
      .head  (sf_head[c]),
      .empty (sf_empty[c]),
      .full  (sf_full[c]),
      .count (sf_cnt[c])
    );
  end

  // ---------------- observation ----------------
  assign ev_viol   = viol;
  assign ev_commit = commit;
  assign ev_squash = squash;
  assign ev_fwd    = rd_q && merged_spec;
  assign ev_drain  = l2_we && !drain_idle;

  always_comb begin
    ev_pre_inval = 1'b0;
    if (wbus.valid && wbus.has_task)
      for (int unsigned c = 0; c < NCPU; c++)
        if (c != int'(wbus.cpu) && spec_c[c] && wbus.task_id > task_id[c]) ev_pre_inval = 1'b1;
  end

endmodule
