// write_buffer_pool: the set of speculative write logs (write buffers) that
// sits beside the L2. There are NWB = 2 x NCPU logs. During speculation each
// processor owns one live log, and every speculative write it puts on the write
// bus is stored in that log instead of the L2, so the sequential state is not
// changed before the task commits. On commit the owner's log joins a drain
// queue and the processor is handed a free log at once (double buffering), so
// it can start its next task while the committed log is copied into the L2,
// one line per cycle, one log at a time, in commit order. On roll-back the
// owner's live log is discarded in one cycle.
//
// Refill merge: for an L1 read miss of processor r, the line read from the L2
// is overlaid, byte by byte, with the logs that hold newer data: committed logs
// still draining (oldest lowest), then the live logs of r and of every task
// earlier than r's (the later the task, the higher its priority; r's own log
// highest). Logs of later tasks are never visible to r.
//
// Write routing (wr_accept/wr_direct per processor): a write that is not
// speculative (speculation off, processor not in speculative mode, or kernel
// mode) goes straight to the L2, but only once no committed log is draining,
// so it lands after every earlier committed write. The head (the task owning
// the current state) also writes straight to the L2 once its log is empty and
// the drain queue is idle. A speculative write goes to the owner's live log if
// the log is not full. When the head's log fills up, it is committed early
// (moved to the drain queue) and the head continues with direct writes.
//
// The 2 x NCPU count, double buffering, one-at-a-time draining, one-cycle
// discard and the merge priority follow the described design. Log size
// (WB_LINES), the full-log policy and the routing of the head's writes are this
// design's choices. Timing: wbus writes, commit and squash take effect at the
// clock edge; the merge (rd_*) is combinational on the current log contents.
module write_buffer_pool
  import tls_pkg::*;
#(
  parameter int unsigned NCPU     = 4,
  parameter int unsigned NWB      = 2 * NCPU,
  parameter int unsigned WB_LINES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // speculation state
  input  logic             spec_mode,
  input  logic [NCPU-1:0]  active,
  input  task_t            task_id [NCPU],
  input  logic [NCPU-1:0]  head,
  input  logic [NCPU-1:0]  kernel,
  input  logic [NCPU-1:0]  commit,
  input  logic [NCPU-1:0]  squash,
  output logic [NCPU-1:0]  commit_ok,
  output logic             drain_idle,
  // write bus (valid only when wr_accept of the writer is high)
  input  wbus_t            wbus,
  output logic [NCPU-1:0]  wr_accept,
  output logic [NCPU-1:0]  wr_direct,
  // refill merge
  input  logic [CPUID_W-1:0] rd_cpu,
  input  laddr_t           rd_laddr,
  input  line_t            rd_base,
  output line_t            rd_data,
  output logic             rd_spec,
  // L2 write port
  output logic             l2_we,
  output laddr_t           l2_waddr,
  output line_t            l2_wdata,
  output lmask_t           l2_wmask,
  // observation
  output logic [NCPU-1:0]  swap_event     // head's full log committed early
);
  localparam int unsigned BW = $clog2(NWB);
  localparam int unsigned QW = $clog2(NWB + 1);

  typedef enum logic [1:0] {B_FREE, B_LIVE, B_DRAIN} bstate_e;

  bstate_e              bst_q  [NWB];
  logic [CPUID_W-1:0]   own_q  [NWB];
  task_t                seq_q  [NWB];
  logic [BW-1:0]        cur_q  [NCPU];
  logic [BW-1:0]        dq_q   [NWB];       // drain queue of log indices
  logic [BW-1:0]        dq_rd_q, dq_wr_q;
  logic [QW-1:0]        dq_cnt_q;

  // per-log ports
  logic [NWB-1:0] b_clear, b_wr, b_pop, b_empty, b_full, b_acc, b_lk_hit, b_dr_valid;
  line_t          b_lk_data [NWB];
  lmask_t         b_lk_mask [NWB];
  laddr_t         b_dr_laddr [NWB];
  line_t          b_dr_data [NWB];
  lmask_t         b_dr_mask [NWB];

  for (genvar b = 0; b < NWB; b++) begin : g_log
    spec_write_buffer #(.LINES(WB_LINES)) u_log (
      .clk, .rst_n,
      .clear     (b_clear[b]),
      .wr_en     (b_wr[b]),
      .wr_addr   (wbus.addr),
      .wr_data   (wbus.data),
      .wr_be     (wbus.be),
      .lk_laddr  (rd_laddr),
      .lk_hit    (b_lk_hit[b]),
      .lk_data   (b_lk_data[b]),
      .lk_mask   (b_lk_mask[b]),
      .dr_valid  (b_dr_valid[b]),
      .dr_laddr  (b_dr_laddr[b]),
      .dr_data   (b_dr_data[b]),
      .dr_mask   (b_dr_mask[b]),
      .dr_pop    (b_pop[b]),
      .empty     (b_empty[b]),
      .full      (b_full[b]),
      .can_accept(b_acc[b])
    );
  end

  // free log search
  logic          have_free;
  logic [BW-1:0] free_idx;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int unsigned b = 0; b < NWB; b++) begin
      if (bst_q[b] == B_FREE && !have_free) begin
        have_free = 1'b1;
        free_idx  = BW'(b);
      end
    end
  end

  assign drain_idle = (dq_cnt_q == '0);

  // routing, commit readiness, early commit of a full head log
  logic [NCPU-1:0] spec_c, cur_empty, cur_full, swap, to_drain;
  always_comb begin
    for (int unsigned c = 0; c < NCPU; c++) begin
      spec_c[c]    = spec_mode && active[c] && !kernel[c];
      cur_empty[c] = b_empty[cur_q[c]];
      cur_full[c]  = b_full[cur_q[c]];
      wr_direct[c] = !spec_c[c] || (head[c] && cur_empty[c]);
      wr_accept[c] = wr_direct[c] ? drain_idle : !cur_full[c];
      commit_ok[c] = cur_empty[c] || have_free;
      swap[c]      = spec_c[c] && head[c] && cur_full[c] && have_free && !commit[c];
      to_drain[c]  = (commit[c] && !cur_empty[c]) || swap[c];
    end
  end
  assign swap_event = swap;

  // the one processor (if any) handing a log to the drain queue this cycle
  logic          push_q;
  logic [BW-1:0] push_idx;
  task_t         push_seq;
  always_comb begin
    push_q   = 1'b0;
    push_idx = '0;
    push_seq = '0;
    for (int unsigned c = 0; c < NCPU; c++) begin
      if (to_drain[c] && !push_q) begin
        push_q   = 1'b1;
        push_idx = cur_q[c];
        push_seq = task_id[c];
      end
    end
  end

  // drain engine: one line per cycle of the oldest committed log
  logic [BW-1:0] dh;
  logic          dh_has_line;
  assign dh          = dq_q[dq_rd_q];
  assign dh_has_line = !drain_idle && b_dr_valid[dh];

  // direct (non-speculative) write from the bus
  logic wdirect;
  assign wdirect = wbus.valid && wr_direct[wbus.cpu];

  always_comb begin
    b_wr    = '0;
    b_pop   = '0;
    b_clear = '0;
    if (wbus.valid && !wdirect) b_wr[cur_q[wbus.cpu]] = 1'b1;
    if (dh_has_line) b_pop[dh] = 1'b1;
    for (int unsigned c = 0; c < NCPU; c++)
      if (squash[c]) b_clear[cur_q[c]] = 1'b1;
  end

  always_comb begin
    l2_we    = 1'b0;
    l2_waddr = line_of(wbus.addr);
    l2_wdata = {LINE_WORDS{wbus.data}};
    l2_wmask = lmask_t'(wbus.be) << (word_of(wbus.addr) * 4);
    if (!rst_n) begin
      l2_we    = 1'b0;          // the L2 has no reset: never write it during reset
    end else if (dh_has_line) begin
      l2_we    = 1'b1;
      l2_waddr = b_dr_laddr[dh];
      l2_wdata = b_dr_data[dh];
      l2_wmask = b_dr_mask[dh];
    end else if (wdirect) begin
      l2_we    = 1'b1;
    end
  end

  // refill merge
  logic               rd_spec_rdr;
  logic [NWB-1:0]     m_en, m_spec;
  logic [TASK_W:0]    m_rank [NWB];
  always_comb begin
    rd_spec_rdr = spec_mode && active[rd_cpu] && !kernel[rd_cpu];
    for (int unsigned b = 0; b < NWB; b++) begin
      m_en[b]   = 1'b0;
      m_spec[b] = 1'b0;
      m_rank[b] = {1'b0, seq_q[b]};
      if (bst_q[b] == B_DRAIN) begin
        m_en[b] = b_lk_hit[b];
      end else if (bst_q[b] == B_LIVE) begin
        m_spec[b] = 1'b1;
        m_rank[b] = {1'b1, task_id[own_q[b]]};
        m_en[b]   = b_lk_hit[b] && rd_spec_rdr && active[own_q[b]]
                    && (task_id[own_q[b]] <= task_id[rd_cpu]);
      end
    end
  end

  line_merge #(.NSRC(NWB), .RANK_W(TASK_W + 1)) u_merge (
    .base     (rd_base),
    .src_en   (m_en),
    .src_spec (m_spec),
    .src_rank (m_rank),
    .src_data (b_lk_data),
    .src_mask (b_lk_mask),
    .merged   (rd_data),
    .spec_used(rd_spec)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NWB; b++) begin
        bst_q[b] <= (b < NCPU) ? B_LIVE : B_FREE;
        own_q[b] <= CPUID_W'(b % NCPU);
        seq_q[b] <= '0;
        dq_q[b]  <= '0;
      end
      for (int unsigned c = 0; c < NCPU; c++) cur_q[c] <= BW'(c);
      dq_rd_q  <= '0;
      dq_wr_q  <= '0;
      dq_cnt_q <= '0;
    end else begin
      logic pop_q;
      pop_q = !drain_idle && !b_dr_valid[dh];
      if (pop_q) begin
        bst_q[dh] <= B_FREE;
        dq_rd_q   <= (dq_rd_q == BW'(NWB - 1)) ? '0 : dq_rd_q + 1'b1;
      end
      if (push_q) begin
        dq_q[dq_wr_q]   <= push_idx;
        dq_wr_q         <= (dq_wr_q == BW'(NWB - 1)) ? '0 : dq_wr_q + 1'b1;
        bst_q[push_idx] <= B_DRAIN;
        seq_q[push_idx] <= push_seq;
      end
      dq_cnt_q <= dq_cnt_q + QW'(push_q) - QW'(pop_q);
      for (int unsigned c = 0; c < NCPU; c++) begin
        if (to_drain[c]) begin
          cur_q[c]        <= free_idx;
          bst_q[free_idx] <= B_LIVE;
          own_q[free_idx] <= CPUID_W'(c);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(to_drain));
  assert property (@(posedge clk) disable iff (!rst_n) !(wbus.valid && !wr_accept[wbus.cpu]));

endmodule
