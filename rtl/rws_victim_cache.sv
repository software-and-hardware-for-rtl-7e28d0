// rws_victim_cache: keeps the speculative tag state of lines that a speculative
// processor's L1 data cache had to replace, so that RAW hazards on those words
// are still detected. Each entry is a line address and its per-word read bits.
// The snoop port is checked against every write-bus write from an
// earlier task, in the same cycle. The modified bit of a replaced line is not
// kept: the line's written data lives in the task's write log, and a roll-back
// discards that log, so nothing is left to do for it. Entries are dropped all at once when the
// task commits or is rolled back. When the victim store is full the L1 must
// stall the replacement; the cache only reports full. Keeping victim state and
// stalling when it overflows follow the described design; the entry count
// ENTRIES and the fully associative organisation are this design's choices.
module rws_victim_cache
  import tls_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  push,
  input  laddr_t                push_laddr,
  input  logic [LINE_WORDS-1:0] push_rbits,
  output logic                  full,
  // snoop check: was word snp_word of line snp_laddr speculatively read?
  input  laddr_t                snp_laddr,
  input  logic [WOFF_W-1:0]     snp_word,
  output logic                  snp_read_hit
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]    v_q;
  laddr_t                tag_q  [ENTRIES];
  logic [LINE_WORDS-1:0] rb_q   [ENTRIES];

  logic                          have_free;
  logic [IW-1:0]                 free_idx;

  always_comb begin
    have_free    = 1'b0;
    free_idx     = '0;
    snp_read_hit = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!v_q[i] && !have_free) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
      if (v_q[i] && tag_q[i] == snp_laddr && rb_q[i][snp_word]) snp_read_hit = 1'b1;
    end
  end

  assign full = !have_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= '0;
    end else if (clear) begin
      v_q   <= '0;
    end else if (push && have_free) begin
      v_q[free_idx]   <= 1'b1;
      tag_q[free_idx] <= push_laddr;
      rb_q[free_idx]  <= push_rbits;
    end
  end

endmodule
