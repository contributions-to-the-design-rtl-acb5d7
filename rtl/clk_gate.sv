// clk_gate: latch-based clock gate (integrated clock-gating cell).
//
// The enable is captured by a latch that is transparent while clk is low, so
// it can only change while the gated output is held low; gclk = clk & latched
// enable therefore never produces a shortened pulse. Used by the Hermes-GLP
// clock control to stop the router clock when every port is idle.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
