// bus_arbiter: pipelined centralised round-robin arbiter for one on-chip bus.
// The bus is allocated every cycle, one cycle before it is used: requests
// sampled in cycle N produce a registered one-hot grant that is valid during
// cycle N+1, the cycle in which the winner drives the bus. Each transaction
// holds the bus for a single cycle. Pipelining the arbitration and the
// one-cycle occupancy follow the described bus design; the round-robin policy
// is this design's choice. A requester that is using the bus in the current
// cycle must drop the request for that transaction (it may keep requesting for
// a further one), otherwise it is granted twice.
module bus_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,       // requests for the next cycle's bus slot
  output logic [N-1:0]  gnt_q      // one-hot: owner of the bus in this cycle
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;   // most recent winner; search starts just after it
  logic [N-1:0]  gnt_d;
  logic [IW-1:0] win;

  always_comb begin
    gnt_d = '0;
    win   = last_q;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (gnt_d == '0 && req[idx]) begin
        gnt_d[idx] = 1'b1;
        win        = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_q  <= '0;
      last_q <= IW'(N - 1);
    end else begin
      gnt_q  <= gnt_d;
      if (gnt_d != '0) last_q <= win;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_q));

endmodule
