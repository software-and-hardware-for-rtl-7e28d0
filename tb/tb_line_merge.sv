// tb_line_merge: random sources, masks and ranks; each merged byte is checked
// against a byte-by-byte reference that picks the highest-ranked enabled
// source that wrote the byte, or the base line. Also checks spec_used.
module tb_line_merge;
  import tls_pkg::*;
  localparam int NS = 8;
  line_t base, merged;
  logic [NS-1:0] src_en, src_spec;
  logic [TASK_W:0] src_rank [NS];
  line_t src_data [NS];
  lmask_t src_mask [NS];
  logic spec_used;
  int checks = 0, failures = 0;

  line_merge #(.NSRC(NS), .RANK_W(TASK_W + 1)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      logic [NS-1:0] perm_used;
      base = {$urandom, $urandom, $urandom, $urandom};
      src_en = NS'($urandom);
      src_spec = NS'($urandom);
      perm_used = '0;
      for (int s = 0; s < NS; s++) begin
        int r;
        do r = $urandom % NS; while (perm_used[r]);   // unique ranks
        perm_used[r] = 1'b1;
        src_rank[s] = {1'($urandom), 16'(r)};
        if (s > 0 && src_rank[s][TASK_W] != src_rank[0][TASK_W]) src_rank[s][TASK_W] = src_rank[0][TASK_W];
        src_data[s] = {$urandom, $urandom, $urandom, $urandom};
        src_mask[s] = lmask_t'($urandom);
      end
      #1;
      begin
        logic exp_spec; exp_spec = 0;
        for (int b = 0; b < LINE_BYTES; b++) begin
          logic [7:0] e; int best; best = -1; e = base[b*8 +: 8];
          for (int s = 0; s < NS; s++)
            if (src_en[s] && src_mask[s][b] && (best < 0 || src_rank[s] > src_rank[best])) best = s;
          if (best >= 0) begin e = src_data[best][b*8 +: 8]; exp_spec |= src_spec[best]; end
          checks++;
          if (merged[b*8 +: 8] != e) begin failures++; $display("it %0d byte %0d: %h exp %h", it, b, merged[b*8 +: 8], e); end
        end
        checks++;
        if (exp_spec != spec_used) begin failures++; $display("it %0d: spec_used missing", it); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
