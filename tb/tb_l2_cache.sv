// tb_l2_cache: masked line writes and line reads against an array model,
// including the one-cycle read latency and a write to the line being read in
// the same cycle (the read must return the updated bytes).
module tb_l2_cache;
  import tls_pkg::*;
  localparam int W = 256;            // 64 lines
  logic clk = 0;
  logic we, re;
  laddr_t waddr, raddr;
  line_t wdata, rd_data;
  lmask_t wmask;
  line_t model [W / LINE_WORDS];
  int checks = 0, failures = 0;

  l2_cache #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    line_t exp;
    for (int i = 0; i < W / LINE_WORDS; i++) model[i] = '0;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0; wmask = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      we    = $urandom % 2;
      re    = 1;
      waddr = laddr_t'($urandom % 16);
      raddr = ($urandom % 4 == 0) ? waddr : laddr_t'($urandom % 16);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      wmask = lmask_t'($urandom);
      @(posedge clk);
      if (we) for (int b = 0; b < LINE_BYTES; b++) if (wmask[b]) model[waddr[5:0]][b*8 +: 8] = wdata[b*8 +: 8];
      exp = model[raddr[5:0]];
      #1;
      checks++;
      if (rd_data != exp) begin failures++; $display("cycle %0d: line %0d read %h exp %h", cyc, raddr, rd_data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
