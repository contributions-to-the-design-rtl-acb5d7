// hermes_glp_router: GALS router with clock gating and dynamic frequency
// scaling (Hermes-GLP organisation).
//
// Every input port has a bisynchronous FIFO (bisync_fifo) written with the
// sender's clock, so each neighbour and the local IP may run at its own
// frequency. All FIFOs are read with the router's own clock, which drives the
// routing core (router_core: IN CTRL, switch control with XY routing,
// crossbar). That clock comes from glp_clock_ctrl:
//  * a port is active (Port_State) while its FIFO holds flits or while a
//    packet from it is being switched; when no port is active the router
//    clock is gated off, and the next write into any input FIFO wakes it up.
//    FIFO occupancy compares the Gray write and read pointers directly, so
//    it stays correct while the writer's clock is stopped too: in a mesh the
//    writer is a neighbour whose clock is gated as soon as it is idle;
//  * each packet carries a priority on a sideband wire (sel_clk_in, here
//    rx_prio) stored with every flit; if any active port carries a
//    high-priority packet the router runs on clk_fast, otherwise on clk_slow.
// The priority of the input that owns an output is forwarded on that output's
// sideband (sel_clk_out, here tx_prio) so that the next router on the path
// makes the same choice.
//
// Interface: per input port a write clock rx_clk[i], and rx_valid/rx_ready/
// rx_data/rx_prio sampled on it (rx_ready = FIFO not full). The outputs are
// synchronous to tx_clk, the router clock, and are meant to be written into
// the neighbour's bisynchronous FIFO with that clock. rst_n is asynchronous
// and must be held for a few cycles of every clock.
//
// Own choices: FIFO depth 8 flits; the priority of a port is taken from the
// flit at its FIFO head, or from the last flit read while the FIFO is empty
// and its packet is still passing; once the packet is done it is cleared, so
// a new packet does not inherit the previous packet's priority while its
// first flit is still crossing into the router's clock domain.
module hermes_glp_router
  import noc_pkg::*;
#(
  parameter int unsigned         FLIT_W      = 8,
  parameter int unsigned         FIFO_AW     = 3,
  parameter logic [FLIT_W/2-1:0] ROUTER_ADDR = 4'h5
) (
  input  logic                           clk_fast,
  input  logic                           clk_slow,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              rx_clk,
  input  logic [NPORTS-1:0]              rx_valid,
  output logic [NPORTS-1:0]              rx_ready,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  rx_data,
  input  logic [NPORTS-1:0]              rx_prio,
  output logic                           tx_clk,
  output logic [NPORTS-1:0]              tx_valid,
  input  logic [NPORTS-1:0]              tx_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0]  tx_data,
  output logic [NPORTS-1:0]              tx_prio,
  output logic                           fast_on,
  output logic                           clk_on
);
  logic                          rclk;
  logic [NPORTS-1:0]             wfull, occupied, rempty, rinc;
  logic [NPORTS-1:0][FLIT_W:0]   rdata;
  logic [NPORTS-1:0]             f_valid, f_ready;
  logic [NPORTS-1:0][FLIT_W-1:0] f_data;
  logic [NPORTS-1:0]             in_busy, bound_valid;
  logic [NPORTS-1:0][PORT_W-1:0] bound_in;
  logic [NPORTS-1:0]             prio_q, prio_cur, port_state;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    bisync_fifo #(.DATA_W(FLIT_W + 1), .ADDR_W(FIFO_AW)) u_fifo (
      .wclk(rx_clk[i]), .wrst_n(rst_n),
      .winc(rx_valid[i]), .wdata({rx_prio[i], rx_data[i]}),
      .wfull(wfull[i]), .occupied(occupied[i]),
      .rclk, .rrst_n(rst_n),
      .rinc(rinc[i]), .rdata(rdata[i]), .rempty(rempty[i])
    );
    assign rx_ready[i] = !wfull[i];
    assign f_valid[i]  = !rempty[i];
    assign f_data[i]   = rdata[i][FLIT_W-1:0];
    assign rinc[i]     = f_valid[i] && f_ready[i];

    always_ff @(posedge rclk or negedge rst_n) begin
      if (!rst_n)          prio_q[i] <= 1'b0;
      else if (f_valid[i]) prio_q[i] <= rdata[i][FLIT_W];
      else if (!in_busy[i]) prio_q[i] <= 1'b0;     // packet done: forget it
    end
    assign prio_cur[i]   = f_valid[i] ? rdata[i][FLIT_W] : prio_q[i];
    assign port_state[i] = occupied[i] || in_busy[i];
  end

  glp_clock_ctrl u_clk_ctrl (
    .clk_fast, .clk_slow, .rst_n,
    .port_state, .port_prio(prio_cur),
    .router_clk(rclk), .fast_on, .clk_on
  );

  router_core #(.FLIT_W(FLIT_W), .ROUTER_ADDR(ROUTER_ADDR)) u_core (
    .clk(rclk), .rst_n,
    .in_valid (f_valid),
    .in_ready (f_ready),
    .in_data  (f_data),
    .out_valid(tx_valid),
    .out_ready(tx_ready),
    .out_data (tx_data),
    .in_busy, .bound_valid, .bound_in
  );

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++)
      tx_prio[o] = bound_valid[o] && prio_cur[bound_in[o]];
  end

  assign tx_clk = rclk;

endmodule
