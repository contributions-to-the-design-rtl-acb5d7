// hermes_a_out_arbiter: arbiter of a Hermes-A output port.
//
// Each output port can be requested by the four other ports. Fairness comes
// from six two-input first-come-first-served arbiters, one for every pair of
// requesters: pair (i,j) remembers which of the two raised its request first.
// A requester wins when it is ahead of every other pending requester, so
// requests are served in arrival order. Requests that rise on the same edge
// are ordered by index (in the clockless original an electrical race in the
// mutual-exclusion element decides). The grant is held until its request is
// withdrawn (after the packet's kill token), then passes to the oldest
// waiting request on the next edge.
//
// Interface: req and gnt one bit per requester; gnt is registered and
// one-hot or zero.
module hermes_a_out_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  logic [N-1:0]        req_q, arrive;
  logic [N-1:0][N-1:0] ahead;   // ahead[i][j]: i requested earlier than j
  logic [N-1:0][N-1:0] order;   // ahead, including arrivals at this edge
  logic [N-1:0]        winner;
  logic                held;

  assign arrive = req & ~req_q;

  // A new request is behind every request already pending, and behind a
  // simultaneous arrival with a lower index.
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++) begin
        if (i == j)                        order[i][j] = 1'b0;
        else if (arrive[i] && arrive[j])   order[i][j] = (i < j);
        else if (arrive[i])                order[i][j] = !req_q[j];
        else if (arrive[j])                order[i][j] = 1'b1;
        else                               order[i][j] = ahead[i][j];
      end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      winner[i] = req[i];
      for (int unsigned j = 0; j < N; j++)
        if (j != i && req[j] && !order[i][j]) winner[i] = 1'b0;
    end
  end

  assign held = |(gnt & req);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_q <= '0;
      ahead <= '0;
      gnt   <= '0;
    end else begin
      req_q <= req;
      ahead <= order;
      if (!held) gnt <= winner;
      else       gnt <= gnt & req;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
