// baba_arbiter: arbiter in front of BaBaRouter's shared switch control.
//
// All input ports share one switch control, so their routing requests must be
// arbitrated. The original uses Balsa's arbitrate construct (a tree of
// two-way mutual-exclusion elements, first come first served). In this
// clocked model requests that arrive on the same edge are genuinely
// simultaneous, so the choice among them is made round-robin, starting after
// the last port granted: every requester is served within N grants.
//
// Interface: req[i] held high by port i until it is granted; gnt is one-hot
// (or zero) and combinational; advance is pulsed when the granted request has
// been served, which moves the round-robin pointer past the winner.
module baba_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  logic [$clog2(N)-1:0] last_q;

  always_comb begin
    gnt = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [$clog2(N)-1:0] idx;
      idx = $clog2(N)'((32'(last_q) + k) % N);
      if (req[idx] && gnt == '0) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q <= $clog2(N)'(N - 1);
    end else if (advance) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last_q <= $clog2(N)'(i);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
