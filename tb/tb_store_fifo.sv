// tb_store_fifo: pushes and pops random stores against a queue model and
// checks order, full/empty/count and that flush empties the FIFO.
module tb_store_fifo;
  import tls_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic flush, push, pop, empty, full;
  store_t din, head;
  logic [$clog2(D+1)-1:0] count;
  store_t q[$];
  int checks = 0, failures = 0;

  store_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .flush, .push, .din, .pop, .head, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      checks++;
      if (count != ($bits(count))'(q.size()) || empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++;
        $display("cycle %0d: count %0d model %0d", cyc, count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (head != q[0]) begin failures++; $display("cycle %0d: head mismatch", cyc); end
      end
      flush = ($urandom % 100) == 0;
      push  = ($urandom % 2) && (q.size() < D);
      pop   = ($urandom % 2) && (q.size() > 0);
      din   = '{addr: $urandom, data: $urandom, be: 4'($urandom), sync: 1'($urandom)};
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
