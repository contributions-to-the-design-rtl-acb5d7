// clk_switch: glitch-free switch between two unrelated clocks.
//
// Hermes-GLP changes a router's operating frequency at run time by choosing
// between two clock sources. Switching a plain multiplexer could cut a clock
// pulse short, so each source has an enable chain: the request for a source is
// qualified by the other source being disabled, synchronized on the rising
// edge of its own clock and applied on its falling edge. A source is only
// enabled after the other has been disabled while low, and each enable only
// changes while its clock is low, so the output never glitches. The switch
// takes about two cycles of the old clock plus two of the new one.
//
// Interface: sel_fast selects clk_fast (1) or clk_slow (0); may change at any
// time. fast_on reports that clk_fast is the clock currently passed.
// Asynchronous active-low reset selects clk_slow (and disables clk_fast), so
// that a clock keeps running during reset for logic with synchronous reset;
// after reset the selected source takes over as on any other change.
module clk_switch (
  input  logic clk_fast,
  input  logic clk_slow,
  input  logic rst_n,
  input  logic sel_fast,
  output logic clk_out,
  output logic fast_on
);
  logic f_meta, f_en, s_meta, s_en;

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) f_meta <= 1'b0;
    else        f_meta <= sel_fast && !s_en;
  end
  always_ff @(negedge clk_fast or negedge rst_n) begin
    if (!rst_n) f_en <= 1'b0;
    else        f_en <= f_meta;
  end

  always_ff @(posedge clk_slow or negedge rst_n) begin
    if (!rst_n) s_meta <= 1'b1;
    else        s_meta <= !sel_fast && !f_en;
  end
  always_ff @(negedge clk_slow or negedge rst_n) begin
    if (!rst_n) s_en <= 1'b1;
    else        s_en <= s_meta;
  end

  assign clk_out = (clk_fast && f_en) || (clk_slow && s_en);
  assign fast_on = f_en;

endmodule
