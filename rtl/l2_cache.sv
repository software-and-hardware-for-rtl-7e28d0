// l2_cache: the shared secondary cache, which holds the sequential (in-order)
// memory state. It is written only by non-speculative write-bus writes and by
// committed write logs being drained, one line per cycle with a byte mask, and
// it is read a whole line at a time for L1 refills. The array is treated as
// holding all of memory (the external memory interface is not modelled), so
// there are no L2 misses; WORDS is this design's choice and higher address
// bits alias. Read timing: the line requested in cycle N is on rd_data in
// cycle N+1. A write to the same line in cycle N is visible in that read
// (write-first), so a refill never misses a line drained in the same cycle.
module l2_cache
  import tls_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic    clk,
  input  logic    we,
  input  laddr_t  waddr,
  input  line_t   wdata,
  input  lmask_t  wmask,
  input  logic    re,
  input  laddr_t  raddr,
  output line_t   rd_data
);
  localparam int unsigned NLINES = WORDS / LINE_WORDS;
  localparam int unsigned IW     = $clog2(NLINES);

  line_t mem [NLINES];

  logic [IW-1:0] wi, ri;
  assign wi = waddr[IW-1:0];
  assign ri = raddr[IW-1:0];

  function automatic line_t apply(line_t old, line_t nw, lmask_t m);
    line_t r;
    r = old;
    for (int unsigned b = 0; b < LINE_BYTES; b++)
      if (m[b]) r[b*8 +: 8] = nw[b*8 +: 8];
    return r;
  endfunction

  initial begin
    for (int unsigned i = 0; i < NLINES; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[wi] <= apply(mem[wi], wdata, wmask);
    if (re) rd_data <= (we && wi == ri) ? apply(mem[ri], wdata, wmask) : mem[ri];
  end

endmodule
