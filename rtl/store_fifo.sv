// store_fifo: the write buffer between a processor and the write bus. The L1
// data caches are write-through, so every store is queued here and the
// processor continues while the store waits for its write-bus slot. Entries
// leave in program order, one per granted bus cycle. A flush empties it; this
// is used when the owning task is rolled back, since queued stores of a
// squashed task must never reach the bus. DEPTH is this design's choice.
// Timing: push and pop in the same cycle are allowed; head is valid whenever
// empty is low.
module store_fifo
  import tls_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    push,
  input  store_t  din,
  input  logic    pop,
  output store_t  head,
  output logic    empty,
  output logic    full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  store_t        mem [DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [CW-1:0] cnt_q;

  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == CW'(DEPTH));
  assign count = cnt_q;
  assign head  = mem[rd_q];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push && !full) wr_q <= inc(wr_q);
      if (pop && !empty) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full && !flush) mem[wr_q] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !flush));

endmodule
