// line_merge: byte-wise priority merge that builds the line returned for an L1
// read miss during speculation. The base is the line read from the L2 (lowest
// priority); on top of it each eligible write-buffer line supplies the bytes
// its mask marks as written. Where several buffers wrote a byte, the one with
// the highest rank wins, so the reader sees the most recent value written by
// itself or by any earlier task. Ranks are unique among eligible sources; the
// pool gives a task's live buffer its task ID and a committed buffer still
// draining a rank below every live one. spec_used reports whether any byte came
// from a source flagged speculative, which makes the refilled line
// speculatively modified in the reader's L1. Purely combinational.
module line_merge
  import tls_pkg::*;
#(
  parameter int unsigned NSRC   = 8,
  parameter int unsigned RANK_W = TASK_W + 1
) (
  input  line_t              base,
  input  logic [NSRC-1:0]    src_en,     // eligible and holding this line
  input  logic [NSRC-1:0]    src_spec,   // source holds uncommitted (speculative) data
  input  logic [RANK_W-1:0]  src_rank [NSRC],
  input  line_t              src_data [NSRC],
  input  lmask_t             src_mask [NSRC],
  output line_t              merged,
  output logic               spec_used
);
  always_comb begin
    merged    = base;
    spec_used = 1'b0;
    for (int unsigned b = 0; b < LINE_BYTES; b++) begin
      logic              found;
      logic [RANK_W-1:0] best;
      logic              best_spec;
      found     = 1'b0;
      best      = '0;
      best_spec = 1'b0;
      for (int unsigned s = 0; s < NSRC; s++) begin
        if (src_en[s] && src_mask[s][b] && (!found || src_rank[s] > best)) begin
          found = 1'b1;
          best  = src_rank[s];
          merged[b*8 +: 8] = src_data[s][b*8 +: 8];
          best_spec = src_spec[s];
        end
      end
      spec_used = spec_used | (found && best_spec);
    end
  end
endmodule
