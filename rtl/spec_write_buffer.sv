// spec_write_buffer: one speculative write log. It holds the writes of one
// task, line by line, in a small fully associative store: each entry is a line
// address, the line's bytes and a byte-valid mask. A write merges its bytes
// into the entry of its line or allocates a free entry. The lookup port returns
// the entry of a line, combinationally, for the byte-priority merge that
// refills an L1 miss. The drain port presents the lowest-numbered valid entry
// so that a committed log can be copied to the L2 one line per cycle; drain_pop
// frees it. clear discards the whole log in one cycle (roll-back, or reuse).
// Full associativity follows the description of the write buffers; LINES is
// this design's choice. A write to a new line when the log is full is dropped:
// the pool never issues one (it checks can_accept first).
module spec_write_buffer
  import tls_pkg::*;
#(
  parameter int unsigned LINES = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  // write port
  input  logic    wr_en,
  input  addr_t   wr_addr,
  input  word_t   wr_data,
  input  logic [3:0] wr_be,
  // lookup port
  input  laddr_t  lk_laddr,
  output logic    lk_hit,
  output line_t   lk_data,
  output lmask_t  lk_mask,
  // drain port
  output logic    dr_valid,
  output laddr_t  dr_laddr,
  output line_t   dr_data,
  output lmask_t  dr_mask,
  input  logic    dr_pop,
  // status
  output logic    empty,
  output logic    full,
  output logic    can_accept   // a write to wr_addr would be stored
);
  localparam int unsigned IW = (LINES > 1) ? $clog2(LINES) : 1;

  logic   [LINES-1:0] v_q;
  laddr_t             tag_q  [LINES];
  line_t              data_q [LINES];
  lmask_t             mask_q [LINES];

  logic          wr_hit, have_free;
  logic [IW-1:0] wr_idx, free_idx, dr_idx;

  always_comb begin
    wr_hit = 1'b0; wr_idx = '0;
    have_free = 1'b0; free_idx = '0;
    lk_hit = 1'b0; lk_data = '0; lk_mask = '0;
    dr_valid = 1'b0; dr_idx = '0;
    for (int unsigned i = 0; i < LINES; i++) begin
      if (v_q[i] && tag_q[i] == line_of(wr_addr) && !wr_hit) begin
        wr_hit = 1'b1; wr_idx = IW'(i);
      end
      if (!v_q[i] && !have_free) begin
        have_free = 1'b1; free_idx = IW'(i);
      end
      if (v_q[i] && tag_q[i] == lk_laddr && !lk_hit) begin
        lk_hit = 1'b1; lk_data = data_q[i]; lk_mask = mask_q[i];
      end
      if (v_q[i] && !dr_valid) begin
        dr_valid = 1'b1; dr_idx = IW'(i);
      end
    end
  end

  assign dr_laddr   = tag_q[dr_idx];
  assign dr_data    = data_q[dr_idx];
  assign dr_mask    = mask_q[dr_idx];
  assign empty      = (v_q == '0);
  assign full       = (v_q == '1);
  assign can_accept = wr_hit || have_free;

  logic [IW-1:0] tgt;
  assign tgt = wr_hit ? wr_idx : free_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (clear) begin
      v_q <= '0;
    end else begin
      if (dr_pop && dr_valid) v_q[dr_idx] <= 1'b0;
      if (wr_en && can_accept) v_q[tgt] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && can_accept && !clear) begin
      tag_q[tgt] <= line_of(wr_addr);
      for (int unsigned b = 0; b < 4; b++) begin
        if (wr_be[b]) begin
          data_q[tgt][(word_of(wr_addr)*32 + b*8) +: 8] <= wr_data[b*8 +: 8];
        end
      end
      mask_q[tgt] <= (wr_hit ? mask_q[tgt] : '0)
                   | (lmask_t'(wr_be) << (word_of(wr_addr) * 4));
    end
  end

endmodule
