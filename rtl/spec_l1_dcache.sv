// spec_l1_dcache: a processor's primary data cache with the speculation
// support bits. Direct-mapped, write-through, no allocation on a store miss.
// Besides valid, tag and data each line has one read bit per 32-bit word and
// two line bits, modified and pre-invalidate:
//   read bit       set when the processor speculatively loads the word; a later
//                  write-bus write to that word from an earlier task is a RAW
//                  hazard (viol pulses; the controller rolls the task back).
//   modified       the line holds speculative data: set when the processor
//                  stores to it, or when a refill brought in bytes from an
//                  uncommitted write log of another task. A roll-back
//                  (squash) invalidates these lines.
//   pre-invalidate set when a later task writes the line; the line stays usable
//                  for this task and is invalidated when this task commits.
// A write-bus write from an earlier task (or any non-speculative write)
// invalidates the line; a synch_write never raises a RAW hazard. When this
// processor is not speculating, every foreign write simply invalidates.
// A miss waits until the processor's own store FIFO is empty, evicts the old
// line (moving its read bits into the victim store if it carried speculative
// state and the task is not the head; if the victim store is full it stalls
// until the task becomes the head), requests the read bus, and installs the
// line returned by the L2/write-log merge in the cycle after its bus slot. A
// refill is retried if a foreign write to the same line appears in the install
// cycle. Commit clears all read and modified bits and invalidates
// pre-invalidated lines; a foreign write to a line in the cycle of a commit or
// roll-back invalidates it. The bits, their meaning, the commit and roll-back
// actions and the victim stall follow the described design; the organisation
// (direct-mapped, LINES lines, no store allocation) and the timing are this
// design's choices.
// Processor timing: a request is taken when req_ready is high; a load hit
// answers on rsp_valid the next cycle, a miss some cycles later. Stores are
// acknowledged by req_ready alone. Being write-through, the cache hands every
// accepted store to the store FIFO unchanged: sf_din is the request's address,
// data, byte enables and sync flag. A squash abandons a pending load (no
// response).
module spec_l1_dcache
  import tls_pkg::*;
#(
  parameter int unsigned CPU_ID   = 0,
  parameter int unsigned LINES    = 512,
  parameter int unsigned VICTIMS  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        req_valid,
  input  logic        req_we,
  input  addr_t       req_addr,
  input  word_t       req_wdata,
  input  logic [3:0]  req_be,
  input  logic        req_sync,
  output logic        req_ready,
  output logic        rsp_valid,
  output word_t       rsp_data,
  // store FIFO
  output logic        sf_push,
  output store_t      sf_din,
  input  logic        sf_full,
  input  logic        sf_empty,
  // speculation state and actions
  input  logic        spec,       // this processor runs a speculative task
  input  logic        is_head,
  input  task_t       my_task,
  input  logic        commit,
  input  logic        squash,
  output logic        viol,
  // write-bus snoop
  input  wbus_t       wbus,
  // read bus
  output logic        rb_req,
  output laddr_t      rb_laddr,
  input  logic        rb_use,     // this cycle is our read-bus slot
  input  line_t       rb_data,    // merged line, the cycle after the slot
  input  logic        rb_spec,
  // observation
  output logic        victim_push_o,
  output logic        victim_stall_o
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = LADDR_W - IW;

  typedef enum logic [1:0] {S_IDLE, S_MISS, S_REQ, S_DATA} state_e;

  logic [LINES-1:0]      v_q, mod_q, pinv_q;
  logic [LINE_WORDS-1:0] rb_q   [LINES];
  logic [TW-1:0]         tag_q  [LINES];
  line_t                 data_q [LINES];

  state_e st_q;
  addr_t  maddr_q;       // address of the pending load miss

  function automatic logic [IW-1:0] idx_of(addr_t a);
    return a[LOFF_W +: IW];
  endfunction
  function automatic logic [TW-1:0] tag_of(addr_t a);
    return a[ADDR_W-1 -: TW];
  endfunction

  // ---------------- snoop ----------------
  logic [IW-1:0] s_idx;
  logic          s_foreign, s_hit, s_earlier, s_rbit, v_hit;
  assign s_idx     = idx_of(wbus.addr);
  assign s_foreign = wbus.valid && (wbus.cpu != CPUID_W'(CPU_ID));
  assign s_hit     = s_foreign && v_q[s_idx] && tag_q[s_idx] == tag_of(wbus.addr);
  assign s_earlier = !wbus.has_task || (wbus.task_id < my_task);
  assign s_rbit    = rb_q[s_idx][word_of(wbus.addr)];

  // ---------------- victim store ----------------
  logic          vc_push, vc_full;
  rws_victim_cache #(.ENTRIES(VICTIMS)) u_victim (
    .clk, .rst_n,
    .clear       (commit || squash),
    .push        (vc_push),
    .push_laddr  ({tag_q[idx_of(maddr_q)], idx_of(maddr_q)}),
    .push_rbits  (rb_q[idx_of(maddr_q)]),
    .full        (vc_full),
    .snp_laddr   (line_of(wbus.addr)),
    .snp_word    (word_of(wbus.addr)),
    .snp_read_hit(v_hit)
  );

  always_comb begin
    viol = s_foreign && spec && s_earlier && !wbus.sync
           && ((s_hit && s_rbit) || v_hit);
  end

  // ---------------- processor request ----------------
  logic [IW-1:0] r_idx;
  logic          r_hit, block;
  assign r_idx = idx_of(req_addr);
  assign r_hit = v_q[r_idx] && tag_q[r_idx] == tag_of(req_addr);
  assign block = commit || squash || (s_foreign && s_idx == r_idx);

  always_comb begin
    req_ready = 1'b0;
    if (st_q == S_IDLE && !block) req_ready = req_we ? !sf_full : 1'b1;
  end

  logic ld_go, st_go;
  assign ld_go = req_valid && req_ready && !req_we;
  assign st_go = req_valid && req_ready && req_we;

  assign sf_push = st_go;
  assign sf_din  = '{addr: req_addr, data: req_wdata, be: req_be, sync: req_sync};

  // ---------------- miss handling ----------------
  logic [IW-1:0] m_idx;
  logic          old_spec, need_victim;
  assign m_idx       = idx_of(maddr_q);
  assign old_spec    = v_q[m_idx] && ((rb_q[m_idx] != '0) || mod_q[m_idx]);
  assign need_victim = spec && !is_head && old_spec;

  logic evict;
  assign evict   = (st_q == S_MISS) && !squash && sf_empty && !(need_victim && vc_full);
  assign vc_push = evict && need_victim;
  assign victim_push_o  = vc_push;
  assign victim_stall_o = (st_q == S_MISS) && sf_empty && need_victim && vc_full;

  assign rb_req   = (st_q == S_REQ) && !rb_use;
  assign rb_laddr = line_of(maddr_q);

  logic conflict, install;
  assign conflict = s_foreign && line_of(wbus.addr) == line_of(maddr_q);
  assign install  = (st_q == S_DATA) && !squash && !conflict;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      maddr_q   <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st_q)
        S_IDLE: if (ld_go) begin
          if (r_hit) begin
            rsp_valid <= 1'b1;
            rsp_data  <= data_q[r_idx][word_of(req_addr)*32 +: 32];
          end else begin
            maddr_q <= req_addr;
            st_q    <= S_MISS;
          end
        end
        S_MISS: if (squash) st_q <= S_IDLE;
                else if (evict) st_q <= S_REQ;
        S_REQ:  if (squash) st_q <= S_IDLE;
                else if (rb_use) st_q <= S_DATA;
        S_DATA: begin
          if (squash) st_q <= S_IDLE;
          else if (conflict) st_q <= S_REQ;
          else begin
            st_q      <= S_IDLE;
            rsp_valid <= 1'b1;
            rsp_data  <= rb_data[word_of(maddr_q)*32 +: 32];
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- line state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= '0;
      mod_q  <= '0;
      pinv_q <= '0;
      for (int unsigned i = 0; i < LINES; i++) rb_q[i] <= '0;
    end else begin
      // flash operations at commit and roll-back
      if (commit) begin
        v_q    <= v_q & ~pinv_q;
        pinv_q <= '0;
        mod_q  <= '0;
        for (int unsigned i = 0; i < LINES; i++) rb_q[i] <= '0;
      end else if (squash) begin
        v_q   <= v_q & ~mod_q;
        mod_q <= '0;
        for (int unsigned i = 0; i < LINES; i++) rb_q[i] <= '0;
      end
      if (commit || squash) begin
        // a foreign write hitting a line in a flash cycle always invalidates it
        if (s_hit) v_q[s_idx] <= 1'b0;
      end else begin
        // snoop
        if (s_hit) begin
          if (!spec || s_earlier) begin
            v_q[s_idx]  <= 1'b0;
            rb_q[s_idx] <= '0;
            mod_q[s_idx] <= 1'b0;
            pinv_q[s_idx] <= 1'b0;
          end else begin
            pinv_q[s_idx] <= 1'b1;
          end
        end
        // load hit: read bit
        if (ld_go && r_hit && spec) rb_q[r_idx][word_of(req_addr)] <= 1'b1;
        // store hit: speculative data
        if (st_go && r_hit && spec) mod_q[r_idx] <= 1'b1;
        // eviction of the old line at a miss
        if (evict) begin
          v_q[m_idx]    <= 1'b0;
          rb_q[m_idx]   <= '0;
          mod_q[m_idx]  <= 1'b0;
          pinv_q[m_idx] <= 1'b0;
        end
        // refill
        if (install) begin
          v_q[m_idx]    <= 1'b1;
          mod_q[m_idx]  <= spec && rb_spec;
          pinv_q[m_idx] <= 1'b0;
          rb_q[m_idx]   <= spec ? (LINE_WORDS'(1) << word_of(maddr_q)) : '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (install) begin
      tag_q[m_idx]  <= tag_of(maddr_q);
      data_q[m_idx] <= rb_data;
    end else if (st_go && r_hit && !commit && !squash) begin
      for (int unsigned b = 0; b < 4; b++)
        if (req_be[b]) data_q[r_idx][word_of(req_addr)*32 + b*8 +: 8] <= req_wdata[b*8 +: 8];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(commit && squash));

endmodule
