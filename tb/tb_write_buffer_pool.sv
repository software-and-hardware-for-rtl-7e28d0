// tb_write_buffer_pool: drives the write-log pool as the speculation
// controller and write bus would. Checks: speculative writes stay out of the
// L2; the refill merge gives each reader its own and earlier tasks' bytes
// (later tasks' never) with the right priority; the head writes straight to
// the L2; a committed log drains line by line into the L2 while its bytes stay
// visible to readers; a roll-back discards a log; a full head log is committed
// early; a full non-head log refuses writes. Expected values are computed from
// the written bytes by the testbench.
module tb_write_buffer_pool;
  import tls_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic spec_mode, drain_idle, rd_spec, l2_we;
  logic [N-1:0] active, head, kernel, commit, squash, commit_ok, wr_accept, wr_direct, swap_event;
  task_t task_id [N];
  wbus_t wbus;
  logic [CPUID_W-1:0] rd_cpu;
  laddr_t rd_laddr, l2_waddr;
  line_t rd_base, rd_data, l2_wdata;
  lmask_t l2_wmask;
  int checks = 0, failures = 0;
  int drained = 0;
  line_t l2m [laddr_t];

  write_buffer_pool #(.NCPU(N), .NWB(2 * N), .WB_LINES(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // L2 model fed by the pool's write port
  always @(posedge clk) if (l2_we) begin
    if (!l2m.exists(l2_waddr)) l2m[l2_waddr] = '0;
    for (int b = 0; b < LINE_BYTES; b++) if (l2_wmask[b]) l2m[l2_waddr][b*8 +: 8] = l2_wdata[b*8 +: 8];
    if (!drain_idle) drained++;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic line_t l2_line(laddr_t a);
    return l2m.exists(a) ? l2m[a] : '0;
  endfunction

  // one write-bus write of a full word
  task automatic bus_write(int c, addr_t a, word_t d);
    @(negedge clk);
    wbus = '0;
    wbus.valid = 1; wbus.cpu = CPUID_W'(c); wbus.addr = a; wbus.data = d; wbus.be = 4'hf;
    wbus.has_task = spec_mode && active[c]; wbus.task_id = task_id[c];
    #1 chk($sformatf("cpu%0d accepted", c), wr_accept[c]);
    @(posedge clk); #1 wbus = '0;
  endtask

  function automatic word_t merged_word(int w);
    return rd_data[w*32 +: 32];
  endfunction

  task automatic read_as(int c, laddr_t la);
    @(negedge clk);
    rd_cpu = CPUID_W'(c); rd_laddr = la; rd_base = l2_line(la);
    #1;
  endtask

  task automatic pulse(ref logic [N-1:0] sig, input int c);
    @(negedge clk); sig[c] = 1; @(posedge clk); #1 sig[c] = 0;
  endtask

  localparam addr_t A = 32'h0000_1000;   // line 0x100, words 0..3
  localparam addr_t B = 32'h0000_2000;
  localparam addr_t C = 32'h0000_3000;

  initial begin
    spec_mode = 0; active = '0; head = '0; kernel = '0; commit = '0; squash = '0;
    wbus = '0; rd_cpu = '0; rd_laddr = '0; rd_base = '0;
    for (int c = 0; c < N; c++) task_id[c] = task_t'(c);
    repeat (2) @(posedge clk); rst_n = 1;

    // non-speculative write goes to the L2
    bus_write(0, A + 12, 32'h5555_5555);
    chk("non-spec write in L2", l2_line(line_of(A))[127:96] == 32'h5555_5555);

    spec_mode = 1; active = '1; head = 4'b0001;
    bus_write(1, A + 0, 32'h1111_1111);   // task 1, word 0
    bus_write(2, A + 4, 32'h2222_2222);   // task 2, word 1
    bus_write(3, A + 0, 32'h3333_3333);   // task 3, word 0
    bus_write(1, A + 4, 32'h1111_aaaa);   // task 1, word 1 (older than task 2's)
    chk("spec writes kept out of L2", l2_line(line_of(A))[63:0] == 64'h0);

    read_as(2, line_of(A));
    chk("task2 sees task1 word0", merged_word(0) == 32'h1111_1111);
    chk("task2 sees own word1 over task1", merged_word(1) == 32'h2222_2222);
    chk("task2 sees L2 word3", merged_word(3) == 32'h5555_5555);
    chk("task2 refill speculative", rd_spec);
    read_as(3, line_of(A));
    chk("task3 sees own word0", merged_word(0) == 32'h3333_3333);
    read_as(0, line_of(A));
    chk("task0 sees no later data", merged_word(0) == 0 && merged_word(1) == 0 && !rd_spec);
    read_as(1, line_of(A));
    chk("task1 sees own words", merged_word(0) == 32'h1111_1111 && merged_word(1) == 32'h1111_aaaa);

    // head (task 0) writes straight to the L2
    @(negedge clk); #1 chk("head direct", wr_direct[0] && !wr_direct[1]);
    bus_write(0, B, 32'h0000_00b0);
    chk("head write in L2", l2_line(line_of(B))[31:0] == 32'h0000_00b0);

    // task 0 commits (empty log), head passes to task 1, which commits
    pulse(commit, 0); task_id[0] = 4; head = 4'b0010;
    @(negedge clk); #1 chk("commit ok", commit_ok[1]);
    pulse(commit, 1); task_id[1] = 5; head = 4'b0100;
    #1 chk("drain busy", !drain_idle);
    read_as(3, line_of(A));
    chk("draining bytes visible under task3", merged_word(1) == 32'h2222_2222 && merged_word(0) == 32'h3333_3333);
    read_as(0, line_of(A));   // task 4, now later than 1..3
    chk("task4 sees 3 over 1", merged_word(0) == 32'h3333_3333);
    wait (drain_idle);
    @(negedge clk);
    chk("task1 log drained to L2", l2_line(line_of(A))[63:0] == 64'h1111_aaaa_1111_1111);
    chk("drain wrote a line", drained >= 1);

    // roll back task 3: its bytes vanish
    pulse(squash, 3);
    read_as(0, line_of(A));
    chk("task3 bytes discarded", merged_word(0) == 32'h1111_1111);

    // non-head log fills (2 lines) and then refuses a third line
    bus_write(3, B, 1); bus_write(3, C, 2);
    @(negedge clk); #1 chk("full non-head log refuses", !wr_accept[3]);

    // head task 2 fills its log: it is committed early, then direct writes
    bus_write(2, B + 4, 32'hbbbb_0002);   // second line of task 2's log
    @(negedge clk); #1;
    chk("head log full -> early commit", swap_event[2]);
    @(posedge clk); @(negedge clk);
    wait (drain_idle);
    @(negedge clk); #1;
    chk("head direct after early commit", wr_direct[2] && wr_accept[2]);
    bus_write(2, C + 8, 32'hcccc_0002);
    chk("head direct write in L2", l2_line(line_of(C))[95:64] == 32'hcccc_0002);
    chk("early-committed line in L2", l2_line(line_of(B))[63:32] == 32'hbbbb_0002);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
