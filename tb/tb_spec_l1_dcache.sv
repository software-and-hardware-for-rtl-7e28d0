// tb_spec_l1_dcache: one speculative L1 (CPU 1, 8 lines, 2 victim entries)
// with the read bus, store FIFO and write bus modelled by the testbench.
// Checks load hit/miss data and latency, store-hit update and store FIFO
// push, read bits and RAW detection (and its absence for synch_writes and
// unread words), invalidation by earlier writers, pre-invalidation by later
// writers and its effect at commit, roll-back of modified lines (own stores
// and forwarded refills), victim capture of read bits, the victim-full stall
// that lasts until the task is head, refill retry on a conflicting write, and
// that a miss waits for the store FIFO to empty.
module tb_spec_l1_dcache;
  import tls_pkg::*;
  localparam int LINES = 8;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_we, req_sync, req_ready, rsp_valid;
  addr_t req_addr;
  word_t req_wdata, rsp_data;
  logic [3:0] req_be;
  logic sf_push, sf_full, sf_empty;
  store_t sf_din;
  logic spec, is_head, commit, squash, viol;
  task_t my_task;
  wbus_t wbus;
  logic rb_req, rb_use, rb_spec, victim_push_o, victim_stall_o;
  laddr_t rb_laddr;
  line_t rb_data;
  int checks = 0, failures = 0;
  int n_req = 0, n_push = 0, n_viol = 0;

  spec_l1_dcache #(.CPU_ID(1), .LINES(LINES), .VICTIMS(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory model: word value = address xor constant unless written
  word_t mem [addr_t];
  function automatic word_t memw(addr_t a);
    return mem.exists(a) ? mem[a] : (a ^ 32'hA5A5_0000);
  endfunction
  always_comb
    for (int w = 0; w < LINE_WORDS; w++)
      rb_data[w*32 +: 32] = memw({rb_laddr, 4'b0} + addr_t'(w * 4));

  // read bus: slot the cycle after the request
  always_ff @(posedge clk) begin
    rb_use <= rst_n && rb_req;
    if (rb_req && rst_n) n_req++;
    if (sf_push) n_push++;
    if (viol) n_viol++;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // load; returns the data and the number of cycles to the response
  task automatic load(addr_t a, output word_t d, output int cyc);
    @(negedge clk);
    req_valid = 1; req_we = 0; req_addr = a;
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1 req_valid = 0;
    cyc = 1;
    while (!rsp_valid) begin @(posedge clk); #1; cyc++; end
    d = rsp_data;
  endtask

  task automatic load_chk(string what, addr_t a, word_t exp, int exp_cyc = -1);
    word_t d; int cyc;
    load(a, d, cyc);
    chk($sformatf("%s: data %h exp %h", what, d, exp), d == exp);
    if (exp_cyc >= 0) chk($sformatf("%s: latency %0d exp %0d", what, cyc, exp_cyc), cyc == exp_cyc);
  endtask

  task automatic store(addr_t a, word_t d, logic sync = 0);
    @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = a; req_wdata = d; req_be = 4'hf; req_sync = sync;
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1 req_valid = 0; req_we = 0;
  endtask

  // one foreign write-bus write; returns whether viol was raised
  task automatic fwrite(addr_t a, word_t d, task_t t, logic has_task = 1, logic sync = 0, output logic v);
    @(negedge clk);
    wbus = '0; wbus.valid = 1; wbus.cpu = 2; wbus.addr = a; wbus.data = d; wbus.be = 4'hf;
    wbus.has_task = has_task; wbus.task_id = t; wbus.sync = sync;
    #1 v = viol;
    @(posedge clk); #1 wbus = '0;
    mem[a] = d;
  endtask

  task automatic pulse_commit; @(negedge clk); commit = 1; @(posedge clk); #1 commit = 0; endtask
  task automatic pulse_squash; @(negedge clk); squash = 1; @(posedge clk); #1 squash = 0; endtask

  // addresses: line index = addr[6:4] for 8 lines
  localparam addr_t X  = 32'h0000_0100;   // index 0
  localparam addr_t X2 = 32'h0000_0180;   // index 0, other tag
  localparam addr_t X3 = 32'h0000_0200;   // index 0, third tag
  localparam addr_t Y  = 32'h0000_0110;   // index 1
  localparam addr_t Z  = 32'h0000_0120;   // index 2

  initial begin
    logic v; int r0;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; req_be = '0; req_sync = 0;
    sf_full = 0; sf_empty = 1; spec = 0; is_head = 0; my_task = 5; commit = 0; squash = 0;
    wbus = '0; rb_spec = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // --- non-speculative basics
    load_chk("miss", X, memw(X), 5);        // accept, evict, arbitrate, slot, install
    load_chk("hit", X + 4, memw(X + 4), 1);
    r0 = n_push;
    store(X + 4, 32'h1234_5678);
    chk("store pushed to FIFO", n_push == r0 + 1 && sf_din.data == 32'h1234_5678);
    load_chk("store hit updates line", X + 4, 32'h1234_5678, 1);
    mem[X + 4] = 32'h1234_5678;
    fwrite(X + 8, 32'h0bad_0001, 0, 0, 0, v);
    chk("non-spec: no RAW check", !v);
    r0 = n_req;
    load_chk("foreign write invalidated", X + 8, 32'h0bad_0001);
    chk("refetched", n_req == r0 + 1);

    // --- speculative: read bits and RAW detection
    spec = 1; my_task = 5;
    load_chk("spec read", Y, memw(Y), 5);
    fwrite(Y + 4, 32'h1, 3, 1, 0, v);
    chk("earlier write to unread word: no hazard", !v);
    load_chk("line invalidated by earlier write", Y, memw(Y), 5);
    fwrite(Y, 32'h2, 3, 1, 1, v);
    chk("synch_write to read word: no hazard", !v);
    load_chk("reload after sync write", Y, 32'h2, 5);
    fwrite(Y, 32'h3, 4, 1, 0, v);
    chk("RAW hazard on read word", v);
    pulse_squash;
    load_chk("reload after roll-back", Y, 32'h3, 5);
    fwrite(Y, 32'h4, 0, 0, 0, v);
    chk("kernel write checked against speculative reads", v);
    pulse_squash;

    // --- later writer: pre-invalidate, line kept until commit
    load_chk("load Z", Z, memw(Z), 5);
    fwrite(Z, 32'h7777, 7, 1, 0, v);
    chk("later write: no hazard", !v);
    load_chk("pre-invalidated line still hits", Z, Z ^ 32'hA5A5_0000, 1);
    pulse_commit;
    load_chk("commit invalidated pre-invalidated line", Z, 32'h7777, 5);

    // --- roll-back invalidates modified lines, keeps clean ones
    load_chk("load X (clean)", X, memw(X));
    pulse_commit;                               // clear read bits
    store(Y + 8, 32'hdead_beef);                 // Y cached: store hit -> modified
    pulse_squash;
    r0 = n_req;
    load_chk("clean line survives roll-back", X, memw(X), 1);
    load_chk("modified line dropped by roll-back", Y + 8, memw(Y + 8), 5);
    chk("one refill", n_req == r0 + 1);
    // forwarded speculative refill is modified
    rb_spec = 1;
    load_chk("forwarded refill", 32'h150, memw(32'h150), 5);
    rb_spec = 0;
    pulse_squash;
    load_chk("forwarded line dropped by roll-back", 32'h150, memw(32'h150), 5);
    pulse_commit;

    // --- victim store
    load_chk("read X", X, memw(X), 1);       // X still valid: hit
    load_chk("evict X by X2", X2, memw(X2), 5);
    chk("victim captured", dut.u_victim.v_q == 2'b01);
    fwrite(X, 32'h55, 2, 1, 0, v);
    chk("RAW hazard via victim", v);
    pulse_squash;
    chk("victims cleared", dut.u_victim.v_q == 2'b00);
    load_chk("read X2", X2, memw(X2), 1);
    load_chk("evict X2 by X", X, memw(X), 5);
    load_chk("evict X by X3", X3, memw(X3), 5);
    chk("victim store full", dut.u_victim.full);
    fork
      load_chk("stalled eviction completes as head", X, memw(X));
      begin
        repeat (6) @(posedge clk);
        #1 chk("victim-full stall", victim_stall_o);
        @(negedge clk) is_head = 1;
      end
    join
    is_head = 0;
    pulse_commit;

    // --- miss waits for the store FIFO
    sf_empty = 0;
    fork
      load_chk("miss after FIFO empty", 32'h0000_0330, memw(32'h330));
      begin
        repeat (5) @(posedge clk);
        #1 chk("no request while FIFO busy", !rb_req && dut.st_q == 2'd1);
        @(negedge clk) sf_empty = 1;
      end
    join

    // --- refill retried on conflicting write in the install cycle
    r0 = n_req;
    fork
      load_chk("retry gets new data", 32'h0000_0340, 32'hfeed_0001);
      begin
        while (!rb_use) @(posedge clk);
        @(negedge clk);
        wbus = '0; wbus.valid = 1; wbus.cpu = 3; wbus.addr = 32'h344; wbus.data = 1; wbus.be = 4'hf;
        wbus.has_task = 1; wbus.task_id = 9;
        mem[32'h340] = 32'hfeed_0001;
        @(posedge clk); #1 wbus = '0;
      end
    join
    chk("refill retried", n_req == r0 + 2);

    chk("hazards seen", n_viol >= 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
