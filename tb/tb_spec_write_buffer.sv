// tb_spec_write_buffer: random byte writes into a 4-line log, compared with a
// line-keyed model: lookup data and byte masks, full/empty, refusal of a new
// line when full, draining line by line (each line leaves once) and clear.
module tb_spec_write_buffer;
  import tls_pkg::*;
  localparam int L = 4;
  logic clk = 0, rst_n = 0;
  logic clear, wr_en, lk_hit, dr_valid, dr_pop, empty, full, can_accept;
  addr_t wr_addr;
  word_t wr_data;
  logic [3:0] wr_be;
  laddr_t lk_laddr, dr_laddr;
  line_t lk_data, dr_data;
  lmask_t lk_mask, dr_mask;
  int checks = 0, failures = 0;

  line_t  mdata [laddr_t];
  lmask_t mmask [laddr_t];

  spec_write_buffer #(.LINES(L)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_line(laddr_t la);
    lk_laddr = la;
    #1;
    checks++;
    if (mmask.exists(la)) begin
      line_t md; md = lk_data;
      for (int b = 0; b < LINE_BYTES; b++) if (!mmask[la][b]) md[b*8 +: 8] = mdata[la][b*8 +: 8];
      if (!lk_hit || lk_mask != mmask[la] || md != mdata[la]) begin
        failures++; $display("line %h: hit %b mask %h/%h", la, lk_hit, lk_mask, mmask[la]);
      end
    end else if (lk_hit) begin
      failures++; $display("line %h: unexpected hit", la);
    end
  endtask

  initial begin
    clear = 0; wr_en = 0; dr_pop = 0; wr_addr = '0; wr_data = '0; wr_be = '0; lk_laddr = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 30; k++) begin
        @(negedge clk);
        wr_addr = addr_t'(32'h4000 + ($urandom % 6) * 16 + ($urandom % 4) * 4);
        wr_data = $urandom;
        wr_be   = 4'($urandom) | 4'b0001;
        wr_en   = 1;
        #1;
        checks++;
        if (can_accept != (mmask.exists(line_of(wr_addr)) || mmask.num() < L)) begin
          failures++; $display("can_accept %b wrong", can_accept);
        end
        @(posedge clk);
        if (can_accept) begin
          laddr_t la; la = line_of(wr_addr);
          if (!mmask.exists(la)) begin mmask[la] = '0; mdata[la] = '0; end
          for (int b = 0; b < 4; b++) if (wr_be[b]) begin
            mdata[la][word_of(wr_addr)*32 + b*8 +: 8] = wr_data[b*8 +: 8];
            mmask[la][word_of(wr_addr)*4 + b] = 1'b1;
          end
        end
        @(negedge clk); wr_en = 0;
        for (int i = 0; i < 6; i++) check_line(laddr_t'((32'h4000 >> 4) + i));
        checks++;
        if (full != (mmask.num() == L) || empty != (mmask.num() == 0)) begin failures++; $display("full/empty wrong"); end
      end
      if (round % 2 == 0) begin
        // drain everything
        while (1) begin
          @(negedge clk);
          #1;
          if (!dr_valid) break;
          checks++;
          if (!mmask.exists(dr_laddr) || dr_mask != mmask[dr_laddr]) begin failures++; $display("drain mismatch"); end
          else mmask.delete(dr_laddr);
          dr_pop = 1;
          @(posedge clk); #1; dr_pop = 0;
        end
        checks++;
        if (mmask.num() != 0 || !empty) begin failures++; $display("drain left %0d lines", mmask.num()); end
      end else begin
        @(negedge clk); clear = 1; @(posedge clk); #1; clear = 0;
        mmask.delete(); mdata.delete();
        checks++;
        if (!empty) begin failures++; $display("clear failed"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
