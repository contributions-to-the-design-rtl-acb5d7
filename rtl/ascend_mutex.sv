// ascend_mutex: behavioural model of the ASCEnD metastability filter
// (mutual-exclusion element). Not synthesizable as written: the real cell is
// a cross-coupled latch followed by a metastability filter, a transistor
// circuit.
//
// Two request inputs RA and RB compete for one resource; the acknowledge
// outputs AA and AB are mutually exclusive. With a single request pending the
// outputs follow AA = RA & ~RB and AB = RB & ~RA. Once an acknowledge has been
// given it is kept while its request stays high, even if the other request
// rises meanwhile; the other side is served after the first request falls.
// When both requests rise at the same instant the real cell resolves an
// electrical race after a short, unbounded delay; this model always favours
// RA in that case and resolves after RESOLVE_DELAY.
module ascend_mutex #(
  parameter int unsigned RESOLVE_DELAY = 1
) (
  input  logic ra,
  input  logic rb,
  output logic aa,
  output logic ab
);
  initial begin
    aa = 1'b0;
    ab = 1'b0;
  end

  always @(ra or rb or aa or ab) begin
    if (!ra && aa) aa = #RESOLVE_DELAY 1'b0;
    if (!rb && ab) ab = #RESOLVE_DELAY 1'b0;
    if (ra && !aa && !ab)      aa = #RESOLVE_DELAY 1'b1;
    else if (rb && !ab && !aa) ab = #RESOLVE_DELAY 1'b1;
  end

endmodule
