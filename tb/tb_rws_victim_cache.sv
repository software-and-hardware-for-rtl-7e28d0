// tb_rws_victim_cache: pushes replaced-line read bits, checks snoop hits word
// by word against a model, the full flag after ENTRIES pushes, refusal of a
// push when full, and clear.
module tb_rws_victim_cache;
  import tls_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 0;
  logic clear, push, full, snp_read_hit;
  laddr_t push_laddr, snp_laddr;
  logic [LINE_WORDS-1:0] push_rbits;
  logic [WOFF_W-1:0] snp_word;
  logic [LINE_WORDS-1:0] model [laddr_t];
  int checks = 0, failures = 0;

  rws_victim_cache #(.ENTRIES(E)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; push = 0; push_laddr = '0; push_rbits = '0; snp_laddr = '0; snp_word = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      for (int k = 0; k < E + 2; k++) begin
        @(negedge clk);
        checks++;
        if (full != (model.num() == E)) begin failures++; $display("full %b with %0d", full, model.num()); end
        push = 1;
        do push_laddr = laddr_t'($urandom % 64); while (model.exists(push_laddr));
        push_rbits = LINE_WORDS'($urandom);
        @(posedge clk);
        if (model.num() < E) model[push_laddr] = push_rbits;
        @(negedge clk); push = 0;
        for (int l = 0; l < 64; l++)
          for (int w = 0; w < LINE_WORDS; w++) begin
            snp_laddr = laddr_t'(l); snp_word = WOFF_W'(w);
            #1;
            checks++;
            if (snp_read_hit != (model.exists(snp_laddr) && model[snp_laddr][w])) begin
              failures++; $display("line %0d word %0d: hit %b", l, w, snp_read_hit);
            end
          end
      end
      @(negedge clk); clear = 1; @(posedge clk); #1; clear = 0; model.delete();
      checks++;
      if (full) begin failures++; $display("full after clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
