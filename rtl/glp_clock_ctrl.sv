// glp_clock_ctrl: Hermes-GLP clock control module.
//
// Two power-saving mechanisms act on the router clock:
//  * dynamic frequency scaling: each input port reports the priority of the
//    packet it carries (its sel_clk_in sideband). If any active port carries a
//    high-priority packet the fast clock is chosen, otherwise the slow one.
//    Only active ports take part in the decision.
//  * clock gating: when no port reports activity (Port_State idle for all
//    five) the router clock is stopped; it restarts as soon as a port becomes
//    active again, e.g. when a write arrives at its input FIFO.
// The frequency choice goes through the glitch-free clk_switch; the activity
// summary is synchronized by two flops on the switched (ungated) clock and
// drives the latch-based clk_gate.
//
// Interface: port_state and port_prio may come from any clock domain.
// router_clk is the gated, switched clock; fast_on and clk_on report the
// current state. During reset the clock runs so that the router's
// synchronous reset takes effect.
//
// Timing: the clock stops about two cycles after the last port goes idle and
// restarts about two cycles of the selected clock after a port becomes active.
module glp_clock_ctrl
  import noc_pkg::*;
(
  input  logic              clk_fast,
  input  logic              clk_slow,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] port_state,
  input  logic [NPORTS-1:0] port_prio,
  output logic              router_clk,
  output logic              fast_on,
  output logic              clk_on
);
  logic sw_clk, want_fast, any_active, en_s;

  assign want_fast  = |(port_state & port_prio);
  assign any_active = |port_state;

  clk_switch u_switch (
    .clk_fast, .clk_slow, .rst_n, .sel_fast(want_fast),
    .clk_out(sw_clk), .fast_on
  );

  sync2 #(.W(1), .RST_VAL(1'b1)) u_en_sync (
    .clk(sw_clk), .rst_n, .d(any_active), .q(en_s)
  );

  clk_gate u_gate (.clk(sw_clk), .en(en_s), .gclk(router_clk));

  assign clk_on = en_s;

endmodule
