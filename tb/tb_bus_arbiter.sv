// tb_bus_arbiter: checks the pipelined round-robin arbiter against a reference
// model: the grant seen in a cycle is the round-robin choice among the requests
// of the previous cycle, one-hot, and every steady requester is served within
// N slots.
module tb_bus_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt_q;
  int checks = 0, failures = 0;
  int unsigned last;
  logic [N-1:0] exp_q;

  bus_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt_q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rr(logic [N-1:0] r, int unsigned l);
    for (int k = 1; k <= N; k++) if (r[(l + k) % N]) return N'(1) << ((l + k) % N);
    return '0;
  endfunction

  initial begin
    req = '0;
    last = N - 1;
    exp_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      // check the grant produced by last cycle's requests
      checks++;
      if (gnt_q !== exp_q) begin
        failures++;
        $display("cycle %0d: grant %b expected %b", cyc, gnt_q, exp_q);
      end
      req = (cyc < 40) ? 4'b1111 : 4'($urandom);
      @(posedge clk);
      exp_q = rr(req, last);
      for (int i = 0; i < N; i++) if (exp_q[i]) last = i;
    end
    // fairness: all four request continuously, each gets one slot in every 4
    begin
      int cnt[N];
      req = '1;
      for (int i = 0; i < N; i++) cnt[i] = 0;
      repeat (2) @(posedge clk);
      for (int k = 0; k < 4 * N; k++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) if (gnt_q[i]) cnt[i]++;
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (cnt[i] != 4) begin failures++; $display("cpu %0d got %0d slots", i, cnt[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
